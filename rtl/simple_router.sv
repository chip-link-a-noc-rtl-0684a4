// simple_router: the first, bufferless 4x4 router with dropping flow control.
//
// Every input and output has a single phit register. Between them, for each
// output port, a simple_alloc picks at most one input, a one-hot multiplexer
// forwards that input's phit, and a shifter consumes the route field of a
// head phit that has just been granted: the 2-bit port field in bits
// [PHIT_W-3:PHIT_W-4] is dropped, the bits below it move up by two and zeros
// enter at the bottom, while the type field stays in place. The next 2-bit
// route field thus comes to the top for the next router (source routing).
// A head that loses arbitration, and the payload that follows it, is
// dropped; an output with no selected input emits an all-zero (idle) phit.
//
// Timing: a phit on i[n] at edge t is in the input register after t and on
// o[k] after edge t+1, a latency of two clocks; a packet keeps its output
// while its payload phits arrive back to back. The structure follows the
// document; keeping the type bits across the shift and resetting the
// registers to idle are this design's choices.
module simple_router #(
  parameter int N = chip_link_pkg::NPORTS,
  parameter int W = chip_link_pkg::PHIT_W
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][W-1:0] i,
  output logic [N-1:0][W-1:0] o
);

  localparam int PW = $clog2(N);

  logic [N-1:0][W-1:0]    r;        // input registers
  logic [N-1:0][PW+1:0]   top;      // type and route field of each input
  logic [N-1:0][N-1:0]    sel;      // sel[k]: one-hot input select of output k
  logic [N-1:0]           shift;
  logic [N-1:0][W-1:0]    m, s;     // multiplexer and shifter outputs

  for (genvar n = 0; n < N; n++) begin : g_top
    assign top[n] = r[n][W-1 -: PW+2];
  end

  for (genvar k = 0; k < N; k++) begin : g_out
    simple_alloc #(.N(N)) u_alloc (
      .clk      (clk),
      .rst      (rst),
      .this_port(PW'(k)),
      .top      (top),
      .select   (sel[k]),
      .shift    (shift[k])
    );

    always_comb begin
      m[k] = '0;
      for (int n = 0; n < N; n++)
        if (sel[k][n]) m[k] = m[k] | r[n];
      if (shift[k]) s[k] = {m[k][W-1 -: 2], m[k][W-3-PW:0], PW'(0)};
      else          s[k] = m[k];
    end
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      r <= '0;
      o <= '0;
    end else begin
      r <= i;
      o <= s;
    end
  end

endmodule
