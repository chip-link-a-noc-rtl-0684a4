// rr_arbiter: N-input round-robin arbiter with a one-hot priority vector.
//
// A grant is produced in the same cycle as the requests: the agent that holds
// priority wins if it requests, otherwise the first requesting agent after it
// (cyclically, in increasing index order) wins. This is the same function as
// a cyclic fixed-priority carry chain started at the priority position; the
// chain is unrolled over two laps so that it has no combinational loop.
//
// Priority update (registered, only in a cycle with a grant):
//   TRUE_RR = 1  priority moves to the agent just after the winner, so the
//                winner becomes lowest priority ("non-blind" round robin, the
//                variant the router uses, as the document states).
//   TRUE_RR = 0  priority moves one step on from where it was ("blind").
// Reset (asynchronous, active high) gives agent 0 the priority, as in the
// document. any_grant is high whenever some agent requests.
module rr_arbiter #(
  parameter int N       = 4,
  parameter bit TRUE_RR = 1'b1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] req,
  output logic [N-1:0] grant,
  output logic         any_grant
);

  logic [N-1:0] prio_q;   // one-hot: the agent with highest priority

  // Two laps of the priority carry chain: the carry is set at the priority
  // position and is consumed by the first requester it reaches.
  always_comb begin
    logic carry;
    logic done;
    carry = 1'b0;
    done  = 1'b0;
    grant = '0;
    for (int k = 0; k < 2 * N; k++) begin
      carry = carry | prio_q[k % N];
      if (carry && req[k % N] && !done) begin
        grant[k % N] = 1'b1;
        done         = 1'b1;
      end
    end
  end

  assign any_grant = |req;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      prio_q <= N'(1);
    end else if (any_grant) begin
      if (TRUE_RR) prio_q <= {grant[N-2:0], grant[N-1]};
      else         prio_q <= {prio_q[N-2:0], prio_q[N-1]};
    end
  end

  // A grant goes only to a requester, and to at most one agent.
  a_grant_onehot : assert property (@(posedge clk) disable iff (rst)
    $onehot0(grant) && ((grant & ~req) == '0));
  a_grant_when_req : assert property (@(posedge clk) disable iff (rst)
    (|req) |-> (|grant));

endmodule
