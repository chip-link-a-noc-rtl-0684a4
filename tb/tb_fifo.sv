// tb_fifo: self-checking test of the flit buffer.
//
// Random pushes and pops are checked against a SystemVerilog queue model:
// read data (one clock after the pop), the occupancy counter, the empty and
// full flags, writes ignored when full, reads ignored when empty, and the
// simultaneous push/pop cases. Directed phases fill the buffer to its 8-word
// capacity and drain it again.
module tb_fifo;
  localparam int W = 8, PW = 3, DEPTH = 1 << PW;
  logic clk = 1'b0, rst = 1'b1;
  logic [W-1:0] buf_in, buf_out;
  logic wr_en, rd_en, buf_empty, buf_full;
  logic [PW:0] fifo_counter;
  int checks = 0, failures = 0;
  logic [W-1:0] q [$];
  logic [W-1:0] exp_out;
  int full_seen = 0, wr_dropped = 0;

  fifo #(.WIDTH(W), .PTR_W(PW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(logic w, logic r, logic [W-1:0] d);
    logic do_w, do_r;
    wr_en = w; rd_en = r; buf_in = d;
    #1;
    checks++;
    if (fifo_counter !== ($size(q)) || buf_empty !== (q.size() == 0) || buf_full !== (q.size() == DEPTH)) begin
      failures++;
      $display("FAIL count=%0d empty=%b full=%b model=%0d", fifo_counter, buf_empty, buf_full, q.size());
    end
    if (buf_full) full_seen++;
    do_w = w && (q.size() < DEPTH);
    do_r = r && (q.size() > 0);
    if (w && !do_w) wr_dropped++;
    @(posedge clk);
    if (do_r) exp_out = q.pop_front();
    if (do_w) q.push_back(d);
    #1;
    checks++;
    if (buf_out !== exp_out) begin
      failures++;
      $display("FAIL buf_out=%h exp=%h", buf_out, exp_out);
    end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; buf_in = '0; exp_out = '0;
    repeat (2) @(posedge clk);
    rst = 1'b0;
    #1;
    // fill beyond capacity, then drain beyond empty
    for (int k = 0; k < DEPTH + 3; k++) step(1'b1, 1'b0, W'(8'h10 + k));
    step(1'b1, 1'b1, 8'hAA);              // full: read only
    for (int k = 0; k < DEPTH + 3; k++) step(1'b0, 1'b1, '0);
    step(1'b1, 1'b1, 8'h55);              // empty: write only
    // random traffic
    for (int c = 0; c < 2000; c++) step($urandom_range(0, 1) == 1, $urandom_range(0, 2) == 0 ? 1'b0 : ($urandom_range(0,1) == 1), W'($urandom));
    checks++;
    if (full_seen == 0 || wr_dropped == 0) begin failures++; $display("FAIL full case not exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
