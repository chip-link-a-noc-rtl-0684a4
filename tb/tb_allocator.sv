// tb_allocator: self-checking test of the four-arbiter switch allocator.
//
// Random request matrices are applied in which every input requests at most
// one output (as the routing table guarantees). Each output's grant is
// compared with a reference round-robin model that keeps one priority
// pointer per output; the test also checks that no input is granted twice
// and that each requested output grants someone in the same cycle.
module tb_allocator;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0][N-1:0] req, gnt;
  int checks = 0, failures = 0;
  int prio [N];

  allocator #(.N(N)) dut (.clk, .rst, .req, .gnt);

  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int conflicts = 0;
    req = '0;
    for (int k = 0; k < N; k++) prio[k] = 0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    for (int c = 0; c < 1000; c++) begin
      logic [N-1:0][N-1:0] exp;
      logic [N-1:0] granted_inputs;
      int nreq;
      req = '0;
      for (int i = 0; i < N; i++)
        if ($urandom_range(0, 3) != 0) req[$urandom_range(0, N-1)][i] = 1'b1;
      #1;
      exp = '0;
      for (int k = 0; k < N; k++) begin
        nreq = $countones(req[k]);
        if (nreq > 1) conflicts++;
        for (int d = 0; d < N; d++)
          if (req[k][(prio[k] + d) % N]) begin
            exp[k][(prio[k] + d) % N] = 1'b1;
            break;
          end
      end
      checks++;
      if (gnt !== exp) begin
        failures++;
        $display("FAIL cycle %0d req=%h gnt=%h exp=%h", c, req, gnt, exp);
      end
      granted_inputs = '0;
      for (int k = 0; k < N; k++) begin
        checks++;
        if ((granted_inputs & gnt[k]) != '0) begin failures++; $display("FAIL input granted twice"); end
        granted_inputs |= gnt[k];
      end
      @(posedge clk);
      for (int k = 0; k < N; k++)
        for (int i = 0; i < N; i++) if (exp[k][i]) prio[k] = (i + 1) % N;
      #1;
    end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL no output conflict exercised"); end
    $display("output conflicts resolved: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
