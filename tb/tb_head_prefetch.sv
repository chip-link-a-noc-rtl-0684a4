// tb_head_prefetch: self-checking test of the input-buffer read-ahead stage.
//
// Random empty/erase patterns (erase only while a head is valid, as the
// allocator guarantees) are compared with a model: read when the buffer has
// data and the output register is free or being emptied; head_valid set by a
// read, cleared by an erase without a read.
module tb_head_prefetch;
  logic clk = 1'b0, rst = 1'b1;
  logic buf_empty, erase, rd_en, head_valid;
  logic m_valid;
  int checks = 0, failures = 0;
  int n_refill = 0;

  head_prefetch dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_rd;
    buf_empty = 1'b1; erase = 1'b0; m_valid = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    for (int c = 0; c < 2000; c++) begin
      buf_empty = ($urandom_range(0, 2) == 0);
      erase = m_valid && ($urandom_range(0, 1) == 1);
      #1;
      exp_rd = !buf_empty && (!m_valid || erase);
      if (exp_rd && erase) n_refill++;
      checks++;
      if (rd_en !== exp_rd || head_valid !== m_valid) begin
        failures++;
        $display("FAIL empty=%b erase=%b rd_en=%b exp=%b valid=%b exp=%b", buf_empty, erase, rd_en, exp_rd, head_valid, m_valid);
      end
      @(posedge clk);
      m_valid = exp_rd ? 1'b1 : (erase ? 1'b0 : m_valid);
      #1;
    end
    checks++;
    if (n_refill == 0) begin failures++; $display("FAIL read in the erase clock never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
