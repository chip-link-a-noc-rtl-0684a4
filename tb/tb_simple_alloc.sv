// tb_simple_alloc: self-checking test of the fixed-priority allocator of the
// simple router.
//
// A reference model keeps the previous cycle's selected input and computes,
// for random type/route fields on the four inputs, which input must be
// selected: the held input while it shows a payload phit, otherwise the
// lowest-numbered head phit routed to this port. Checks select and shift
// every cycle and counts that grants, holds and lost arbitrations occurred.
module tb_simple_alloc;
  localparam int N = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [1:0] this_port;
  logic [N-1:0][3:0] top;
  logic [N-1:0] select;
  logic shift;
  int checks = 0, failures = 0;
  int last_sel = -1;
  int n_grant = 0, n_hold = 0, n_lost = 0;

  simple_alloc #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    this_port = 2'd2;
    top = '0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int c = 0; c < 3000; c++) begin
      int sel, nreq;
      logic exp_shift;
      logic [N-1:0] exp_select;
      // bias towards heads for this port and payloads
      for (int n = 0; n < N; n++) begin
        int t;
        t = $urandom_range(0, 3);
        top[n] = {2'(t), ($urandom_range(0, 1) == 1) ? this_port : 2'($urandom)};
      end
      #1;
      sel = -1; exp_shift = 1'b0; nreq = 0;
      if (last_sel >= 0 && top[last_sel][3:2] == 2'b10) begin
        sel = last_sel;
        n_hold++;
      end
      for (int n = 0; n < N; n++)
        if (top[n][3:2] == 2'b11 && top[n][1:0] == this_port) nreq++;
      if (sel < 0) begin
        for (int n = 0; n < N; n++)
          if (top[n][3:2] == 2'b11 && top[n][1:0] == this_port) begin
            sel = n; exp_shift = 1'b1; n_grant++;
            break;
          end
        if (nreq > 1) n_lost++;
      end else if (nreq > 0) n_lost++;
      exp_select = (sel >= 0) ? N'(1) << sel : '0;
      checks++;
      if (select !== exp_select || shift !== exp_shift) begin
        failures++;
        $display("FAIL c=%0d top=%h last=%0d select=%b exp=%b shift=%b exp=%b", c, top, last_sel, select, exp_select, shift, exp_shift);
      end
      @(posedge clk);
      last_sel = sel;
      #1;
    end
    checks++;
    if (n_grant == 0 || n_hold == 0 || n_lost == 0) begin
      failures++; $display("FAIL mechanism missing grant=%0d hold=%0d lost=%0d", n_grant, n_hold, n_lost);
    end
    $display("grants=%0d holds=%0d lost=%0d", n_grant, n_hold, n_lost);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
