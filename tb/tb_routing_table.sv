// tb_routing_table: self-checking test of the address translation block.
//
// Checks the reset contents (address a goes to port a mod 4), then rewrites
// random entries through the configuration port while keeping a model copy
// of the table, and compares the request matrix for random head flits,
// valid bits and output-full flags with the model: an input requests exactly
// the output its address maps to, and nothing when its head is invalid or
// that output is full.
module tb_routing_table;
  localparam int N = 4, W = 8, AW = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic cfg_we;
  logic [AW-1:0] cfg_addr;
  logic [1:0] cfg_port;
  logic [N-1:0][W-1:0] head_flit;
  logic [N-1:0] head_valid, out_full;
  logic [N-1:0][N-1:0] req;
  int checks = 0, failures = 0;
  int model [1 << AW];
  int blocked = 0;

  routing_table #(.N(N), .W(W), .ADDR_W(AW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_lookup();
    logic [N-1:0][N-1:0] exp;
    #1;
    exp = '0;
    for (int i = 0; i < N; i++) begin
      int d;
      d = model[head_flit[i][W-1 -: AW]];
      if (head_valid[i] && !out_full[d]) exp[d][i] = 1'b1;
      if (head_valid[i] && out_full[d]) blocked++;
    end
    checks++;
    if (req !== exp) begin
      failures++;
      $display("FAIL flits=%h valid=%b full=%b req=%h exp=%h", head_flit, head_valid, out_full, req, exp);
    end
  endtask

  initial begin
    cfg_we = 0; cfg_addr = '0; cfg_port = '0;
    head_flit = '0; head_valid = '0; out_full = '0;
    for (int a = 0; a < (1 << AW); a++) model[a] = a % N;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    // reset contents, every address on input 0..3
    for (int a = 0; a < (1 << AW); a++) begin
      for (int i = 0; i < N; i++) head_flit[i] = {AW'(a), 4'(i)};
      head_valid = '1;
      check_lookup();
      @(posedge clk);
      #1;
    end
    // random reconfiguration and lookups
    for (int c = 0; c < 1000; c++) begin
      cfg_we = ($urandom_range(0, 3) == 0);
      cfg_addr = AW'($urandom);
      cfg_port = 2'($urandom);
      for (int i = 0; i < N; i++) head_flit[i] = W'($urandom);
      head_valid = N'($urandom);
      out_full = ($urandom_range(0, 2) == 0) ? N'($urandom) : '0;
      check_lookup();
      @(posedge clk);
      if (cfg_we) model[cfg_addr] = cfg_port;
      #1;
    end
    cfg_we = 0;
    checks++;
    if (blocked == 0) begin failures++; $display("FAIL full output never blocked a request"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
