// allocator: single-cycle switch allocator of the CHIP-LINK router.
//
// One round-robin arbiter per output port. Arbiter k sees req[k], the
// requests of all N inputs for output k, and returns gnt[k], a one-hot (or
// zero) vector naming the input that wins output k in this cycle. The
// document uses this as a one-iteration simplification of iSLIP: grants are
// combinational from the requests and each arbiter's priority moves past its
// winner at the next clock edge. Because the routing table gives every input
// a single output, no input can win two outputs, so no input stage of
// arbitration is needed.
module allocator #(
  parameter int N = chip_link_pkg::NPORTS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [N-1:0][N-1:0] req,   // req[k][i]: input i wants output k
  output logic [N-1:0][N-1:0] gnt    // gnt[k][i]: output k granted to input i
);

  for (genvar k = 0; k < N; k++) begin : g_arb
    logic any_unused;
    rr_arbiter #(.N(N), .TRUE_RR(1'b1)) u_arb (
      .clk      (clk),
      .rst      (rst),
      .req      (req[k]),
      .grant    (gnt[k]),
      .any_grant(any_unused)
    );
  end

endmodule
