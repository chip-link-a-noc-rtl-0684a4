// fifo: synchronous flit buffer used at every input and output of the router.
//
// A circular buffer of 2**PTR_W words with separate read and write pointers
// and an occupancy counter, as the document describes. A write (wr_en) is
// ignored when the buffer is full and a read (rd_en) when it is empty. Read
// data is registered: the word popped by rd_en at a clock edge appears on
// buf_out after that edge and stays there until the next accepted read.
// buf_empty and buf_full are decoded from fifo_counter. With both enables
// high the counter holds, except that a full buffer only reads and an empty
// one only writes. Reset is asynchronous and active high, as in the document;
// the storage array itself is not reset.
module fifo #(
  parameter int WIDTH = chip_link_pkg::FLIT_W,
  parameter int PTR_W = chip_link_pkg::BUF_PTR_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [WIDTH-1:0] buf_in,
  input  logic             wr_en,
  input  logic             rd_en,
  output logic [WIDTH-1:0] buf_out,
  output logic             buf_empty,
  output logic             buf_full,
  output logic [PTR_W:0]   fifo_counter
);

  localparam int DEPTH = 1 << PTR_W;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign buf_empty = (fifo_counter == '0);
  assign buf_full  = (fifo_counter == (PTR_W+1)'(DEPTH));
  assign do_wr     = wr_en && !buf_full;
  assign do_rd     = rd_en && !buf_empty;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      fifo_counter <= '0;
      wr_ptr       <= '0;
      rd_ptr       <= '0;
      buf_out      <= '0;
    end else begin
      case ({do_wr, do_rd})
        2'b10:   fifo_counter <= fifo_counter + 1'b1;
        2'b01:   fifo_counter <= fifo_counter - 1'b1;
        default: fifo_counter <= fifo_counter;
      endcase
      if (do_wr) wr_ptr <= wr_ptr + 1'b1;
      if (do_rd) begin
        rd_ptr  <= rd_ptr + 1'b1;
        buf_out <= mem[rd_ptr];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= buf_in;
  end

  a_count_range : assert property (@(posedge clk) disable iff (rst)
    fifo_counter <= (PTR_W+1)'(DEPTH));

endmodule
