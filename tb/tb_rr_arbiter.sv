// tb_rr_arbiter: self-checking test of the round-robin arbiter.
//
// Drives directed and random request vectors and compares the grant with a
// reference model that keeps its own priority pointer and searches the
// requests cyclically from it. Checks the reset priority, the one-cycle
// grant, rotation after every grant (non-blind), no rotation without a
// request, and that with all four agents requesting every agent is served
// once in four consecutive cycles (fairness).
module tb_rr_arbiter;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0] req, grant;
  logic any_grant;
  int checks = 0, failures = 0;
  int model_prio;   // index of the highest-priority agent

  rr_arbiter #(.N(N)) dut (.clk, .rst, .req, .grant, .any_grant);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] model_grant(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++)
      if (r[(p + k) % N]) return N'(1) << ((p + k) % N);
    return '0;
  endfunction

  task automatic check_cycle(logic [N-1:0] r);
    logic [N-1:0] exp;
    req = r;
    #1;
    exp = model_grant(r, model_prio);
    checks++;
    if (grant !== exp || any_grant !== (|r)) begin
      failures++;
      $display("FAIL req=%b prio=%0d grant=%b exp=%b", r, model_prio, grant, exp);
    end
    @(posedge clk);
    if (|exp) for (int k = 0; k < N; k++) if (exp[k]) model_prio = (k + 1) % N;
    #1;
  endtask

  initial begin
    int served [N];
    req = '0;
    model_prio = 0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    // after reset agent 0 has priority
    check_cycle(4'b1111);               // grant 0
    check_cycle(4'b1111);               // grant 1
    check_cycle(4'b0000);               // no request, no rotation
    check_cycle(4'b1001);               // priority at 2 -> grant 3
    check_cycle(4'b0011);               // priority at 0 -> grant 0
    // fairness: four cycles of full requests serve every agent once
    for (int k = 0; k < N; k++) served[k] = 0;
    for (int c = 0; c < N; c++) begin
      req = 4'b1111; #1;
      for (int k = 0; k < N; k++) if (grant[k]) served[k]++;
      check_cycle(4'b1111);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (served[k] != 1) begin failures++; $display("FAIL fairness agent %0d served %0d", k, served[k]); end
    end
    // random
    for (int c = 0; c < 500; c++) check_cycle(N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
