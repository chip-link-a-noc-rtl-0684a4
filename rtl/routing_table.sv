// routing_table: configurable address translation and request generation.
//
// The router routes deterministically by table lookup: every flit carries the
// network address of its destination, and a table of 2**ADDR_W entries
// translates that address into the output port of this router. The table is
// writable at run time through the cfg_* port (one entry per clock), which is
// how a network is configured; after reset entry a holds port a mod N.
//
// For each input whose head flit is valid, the block looks up the flit's
// address and raises req[k][i] for the resulting output k. A request to an
// output whose buffer is full is held back (out_full), so the flit stalls in
// its input buffer until the output buffer frees a place. The lookup is
// combinational; only the table is registered. The document gives the
// block's function; the table format, the configuration port, the reset
// contents and the full-output masking are this design's choices.
module routing_table #(
  parameter int N      = chip_link_pkg::NPORTS,
  parameter int W      = chip_link_pkg::FLIT_W,
  parameter int ADDR_W = chip_link_pkg::ADDR_W
) (
  input  logic                  clk,
  input  logic                  rst,
  // table configuration
  input  logic                  cfg_we,
  input  logic [ADDR_W-1:0]     cfg_addr,
  input  logic [$clog2(N)-1:0]  cfg_port,
  // head flits of the input buffers
  input  logic [N-1:0][W-1:0]   head_flit,
  input  logic [N-1:0]          head_valid,
  // output buffer state
  input  logic [N-1:0]          out_full,
  // requests to the allocator, req[k][i]: input i wants output k
  output logic [N-1:0][N-1:0]   req
);

  localparam int PW      = $clog2(N);
  localparam int ENTRIES = 1 << ADDR_W;

  logic [PW-1:0] table_q [ENTRIES];

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      for (int a = 0; a < ENTRIES; a++) table_q[a] <= PW'(a % N);
    end else if (cfg_we) begin
      table_q[cfg_addr] <= cfg_port;
    end
  end

  always_comb begin
    req = '0;
    for (int i = 0; i < N; i++) begin
      logic [PW-1:0] dest;
      dest = table_q[head_flit[i][W-1 -: ADDR_W]];
      if (head_valid[i] && !out_full[dest]) req[dest][i] = 1'b1;
    end
  end

endmodule
