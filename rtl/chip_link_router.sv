// chip_link_router: the full 4x4 CHIP-LINK network-on-chip router.
//
// Datapath, in the order a flit passes through it:
//   1. input buffer   - a FIFO per input port, written by ew[n] with i[n];
//                       pf[n] (port free) is high while it is not full.
//   2. head prefetch  - keeps the oldest flit of each input buffer on the
//                       buffer output and marks it valid.
//   3. routing table  - translates each valid head flit's destination
//                       address into an output port and requests that output,
//                       unless the output buffer is full.
//   4. allocator      - one round-robin arbiter per output picks one of the
//                       requesting inputs in the same cycle.
//   5. control        - crossbar multiplexers move each granted flit to its
//                       output buffer (enable) and pop it from its input
//                       buffer (erase).
//   6. output buffer  - a FIFO per output port; ne[n] (not empty) is high
//                       while it holds flits, er[n] reads one, and the flit
//                       appears on o[n] after that clock edge.
//
// Timing: a flit written at edge t is on the input buffer output after edge
// t+1, crosses the switch at edge t+2 and raises ne at that edge if it meets
// no contention, so ew to ne takes three clocks. Each input and each output
// moves up to one flit per clock. Flits that share an input stay in order.
// A flit written into a full input buffer is lost, so the source must watch
// pf. The block structure, port names and buffer sizes follow the document;
// the prefetch stage, the full-output stall and the configuration port of the
// routing table are this design's choices. Reset is active high.
module chip_link_router #(
  parameter int N      = chip_link_pkg::NPORTS,
  parameter int W      = chip_link_pkg::FLIT_W,
  parameter int ADDR_W = chip_link_pkg::ADDR_W,
  parameter int PTR_W  = chip_link_pkg::BUF_PTR_W
) (
  input  logic                 clk,
  input  logic                 rst,
  // input ports
  input  logic [N-1:0][W-1:0]  i,       // input flits
  input  logic [N-1:0]         ew,      // enable write: i[n] holds a flit
  output logic [N-1:0]         pf,      // port free: input buffer not full
  // output ports
  output logic [N-1:0][W-1:0]  o,       // output flits
  input  logic [N-1:0]         er,      // enable read: take a flit
  output logic [N-1:0]         ne,      // not empty: output buffer holds flits
  // routing table configuration
  input  logic                 cfg_we,
  input  logic [ADDR_W-1:0]    cfg_addr,
  input  logic [$clog2(N)-1:0] cfg_port
);

  logic [N-1:0][W-1:0] head_flit;
  logic [N-1:0]        head_valid, in_empty, in_full, in_rd;
  logic [N-1:0]        out_full, out_empty;
  logic [N-1:0][N-1:0] req, gnt;
  logic [N-1:0][W-1:0] xbar_out;
  logic [N-1:0]        erase, enable;

  for (genvar n = 0; n < N; n++) begin : g_in
    logic [PTR_W:0] count_unused;
    fifo #(.WIDTH(W), .PTR_W(PTR_W)) u_in_buf (
      .clk         (clk),
      .rst         (rst),
      .buf_in      (i[n]),
      .wr_en       (ew[n]),
      .rd_en       (in_rd[n]),
      .buf_out     (head_flit[n]),
      .buf_empty   (in_empty[n]),
      .buf_full    (in_full[n]),
      .fifo_counter(count_unused)
    );
    head_prefetch u_pre (
      .clk       (clk),
      .rst       (rst),
      .buf_empty (in_empty[n]),
      .erase     (erase[n]),
      .rd_en     (in_rd[n]),
      .head_valid(head_valid[n])
    );
    assign pf[n] = !in_full[n];
  end

  routing_table #(.N(N), .W(W), .ADDR_W(ADDR_W)) u_rt (
    .clk       (clk),
    .rst       (rst),
    .cfg_we    (cfg_we),
    .cfg_addr  (cfg_addr),
    .cfg_port  (cfg_port),
    .head_flit (head_flit),
    .head_valid(head_valid),
    .out_full  (out_full),
    .req       (req)
  );

  allocator #(.N(N)) u_alloc (
    .clk(clk),
    .rst(rst),
    .req(req),
    .gnt(gnt)
  );

  control #(.N(N), .W(W)) u_ctrl (
    .flitin (head_flit),
    .grantin(gnt),
    .portout(xbar_out),
    .erase  (erase),
    .enable (enable)
  );

  for (genvar n = 0; n < N; n++) begin : g_out
    logic [PTR_W:0] count_unused;
    fifo #(.WIDTH(W), .PTR_W(PTR_W)) u_out_buf (
      .clk         (clk),
      .rst         (rst),
      .buf_in      (xbar_out[n]),
      .wr_en       (enable[n]),
      .rd_en       (er[n]),
      .buf_out     (o[n]),
      .buf_empty   (out_empty[n]),
      .buf_full    (out_full[n]),
      .fifo_counter(count_unused)
    );
    assign ne[n] = !out_empty[n];
  end

  // The switch never writes a full output buffer.
  a_no_out_overflow : assert property (@(posedge clk) disable iff (rst)
    (enable & out_full) == '0);

endmodule
