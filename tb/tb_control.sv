// tb_control: self-checking test of the crossbar and buffer control.
//
// Applies random flits and random legal grant matrices (each output grants at
// most one input, each input wins at most one output) and checks the data on
// every output, the output-buffer write enables and the input-buffer erase
// signals against values computed in the testbench.
module tb_control;
  localparam int N = 4, W = 8;
  logic [N-1:0][W-1:0] flitin, portout;
  logic [N-1:0][N-1:0] grantin;
  logic [N-1:0] erase, enable;
  int checks = 0, failures = 0;

  control #(.N(N), .W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1000; c++) begin
      logic [N-1:0] used;
      logic [N-1:0][W-1:0] exp_out;
      logic [N-1:0] exp_erase, exp_en;
      for (int i = 0; i < N; i++) flitin[i] = W'($urandom);
      grantin = '0; used = '0; exp_out = '0; exp_erase = '0; exp_en = '0;
      for (int k = 0; k < N; k++) begin
        int i;
        i = $urandom_range(0, N);            // N means no grant
        if (i < N && !used[i]) begin
          grantin[k][i] = 1'b1;
          used[i] = 1'b1;
          exp_out[k] = flitin[i];
          exp_en[k] = 1'b1;
          exp_erase[i] = 1'b1;
        end
      end
      #1;
      checks++;
      if (portout !== exp_out || enable !== exp_en || erase !== exp_erase) begin
        failures++;
        $display("FAIL grant=%h out=%h exp=%h en=%b/%b erase=%b/%b", grantin, portout, exp_out, enable, exp_en, erase, exp_erase);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
