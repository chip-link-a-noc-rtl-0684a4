// tb_simple_router: self-checking test of the bufferless simple router.
//
// A cycle-level reference model written from the router's rules (two-clock
// latency, fixed priority among heads, a packet holds its output while
// payload phits follow, losers are dropped, a granted head loses its top
// route field) runs beside the router. Directed packets check the latency
// and the route-field shift of one packet, a two-way conflict, and a head
// dropped because the output is held; random traffic is then compared with
// the model every cycle.
module tb_simple_router;
  import chip_link_pkg::*;
  localparam int N = 4, W = 18;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0][W-1:0] i, o;
  int checks = 0, failures = 0;
  int n_drop = 0, n_hold = 0, n_shift = 0;

  // model state
  logic [N-1:0][W-1:0] m_r, m_o;
  int m_last [N];

  simple_router #(.N(N), .W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] head(logic [1:0] p0, logic [1:0] p1, logic [11:0] rest);
    return {2'b11, p0, p1, rest};
  endfunction
  function automatic logic [W-1:0] pay(logic [15:0] d);
    return {2'b10, d};
  endfunction

  // one clock of the reference model, evaluated with the values before the edge
  task automatic model_step();
    logic [N-1:0][W-1:0] nxt_o;
    for (int k = 0; k < N; k++) begin
      int sel; logic sh; int nreq;
      sel = -1; sh = 1'b0; nreq = 0;
      for (int n = 0; n < N; n++) if (m_r[n][17:16] == 2'b11 && m_r[n][15:14] == 2'(k)) nreq++;
      if (m_last[k] >= 0 && m_r[m_last[k]][17:16] == 2'b10) begin
        sel = m_last[k]; n_hold++;
        n_drop += nreq;
      end else begin
        for (int n = 0; n < N; n++)
          if (m_r[n][17:16] == 2'b11 && m_r[n][15:14] == 2'(k)) begin sel = n; sh = 1'b1; break; end
        if (nreq > 1) n_drop += nreq - 1;
      end
      if (sel < 0)  nxt_o[k] = '0;
      else if (sh) begin nxt_o[k] = {m_r[sel][17:16], m_r[sel][13:0], 2'b00}; n_shift++; end
      else          nxt_o[k] = m_r[sel];
      m_last[k] = sel;
    end
    m_o = nxt_o;
    m_r = i;
  endtask

  task automatic cycle();
    @(posedge clk);
    model_step();
    #1;
    checks++;
    if (o !== m_o) begin
      failures++;
      $display("FAIL t=%0t o=%h exp=%h", $time, o, m_o);
    end
  endtask

  initial begin
    logic [W-1:0] seen [$];
    i = '0; m_r = '0; m_o = '0;
    for (int k = 0; k < N; k++) m_last[k] = -1;
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    // directed 1: one packet from input 0 to port 2, next hop field 1
    i[0] = head(2'd2, 2'd1, 12'h5A5); cycle();
    checks++;
    if (o[2] !== '0) begin failures++; $display("FAIL output early"); end
    i[0] = pay(16'h1234);             cycle();
    // the head leaves two clocks after it was applied, route field shifted
    checks++;
    if (o[2] !== {2'b11, 2'd1, 12'h5A5, 2'b00}) begin failures++; $display("FAIL head latency/shift o2=%h", o[2]); end
    i[0] = pay(16'hBEEF);             cycle();
    checks++;
    if (o[2] !== pay(16'h1234)) begin failures++; $display("FAIL payload o2=%h", o[2]); end
    i[0] = '0; cycle(); cycle(); cycle();
    // directed 2: inputs 1 and 3 both send a head to port 0; input 1 wins
    i[1] = head(2'd0, 2'd3, 12'h111); i[3] = head(2'd0, 2'd2, 12'h333); cycle();
    i[1] = pay(16'h0001); i[3] = pay(16'h0003); cycle();
    checks++;
    if (o[0] !== {2'b11, 2'd3, 12'h111, 2'b00}) begin failures++; $display("FAIL conflict winner o0=%h", o[0]); end
    i = '0; cycle();
    checks++;
    if (o[0] !== pay(16'h0001)) begin failures++; $display("FAIL conflict payload o0=%h", o[0]); end
    cycle(); cycle();
    // directed 3: packet on input 2 holds port 1, a later head from input 0 is dropped
    i[2] = head(2'd1, 2'd0, 12'h222); cycle();
    i[2] = pay(16'h2001); cycle();
    i[2] = pay(16'h2002); i[0] = head(2'd1, 2'd2, 12'h000); cycle();
    i[2] = pay(16'h2003); i[0] = pay(16'h0bad); cycle();
    i = '0;
    repeat (3) begin
      cycle();
      checks++;
      if (o[1][17:16] == 2'b10 && o[1][15:12] != 4'h2) begin failures++; $display("FAIL held output taken o1=%h", o[1]); end
    end
    // random traffic against the model
    for (int c = 0; c < 5000; c++) begin
      for (int n = 0; n < N; n++) begin
        int t;
        t = $urandom_range(0, 5);
        if (t == 0)      i[n] = head(2'($urandom), 2'($urandom), 12'($urandom));
        else if (t < 4)  i[n] = pay(16'($urandom));
        else             i[n] = {2'($urandom_range(0, 1)), 16'($urandom)};
      end
      cycle();
    end
    checks++;
    if (n_drop == 0 || n_hold == 0 || n_shift == 0) begin failures++; $display("FAIL mechanism missing"); end
    $display("dropped heads=%0d held cycles=%0d shifted heads=%0d", n_drop, n_hold, n_shift);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
