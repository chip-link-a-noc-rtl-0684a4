// tb_chip_link_top: end-to-end test of the whole design at its default sizes.
//
// Part A exercises the full router through the top's fr_ ports; part B runs
// the simple router through the sr_ ports at the same time.
//
// Part A, full router:
// Sources write only while pf (port free) is high, so no flit may be lost.
// Every flit carries its source input and a sequence number in its payload;
// a scoreboard holds, per output and per source input, the flits expected in
// order, using a model copy of the routing table. Each flit read from an
// output must be the oldest expected one from its source. Phases:
//   1. one flit, ew to ne latency of three clocks and read data one clock
//      after er;
//   2. all four inputs send to the same output: round-robin service, each
//      input served once in every four grants;
//   3. an output that is not read fills up: requests to it stall, the input
//      buffer fills and pf falls after 17 flits, then everything drains;
//   4. the routing table is rewritten and traffic follows the new entry;
//   5. random traffic with random reads, then a full drain.
// The number of conflicts, stalls, pf-low cycles and table writes is
// counted, and a mechanism that never happened counts as a failure.
module tb_chip_link_top;
  import chip_link_pkg::*;
  localparam int N = 4, W = 8, AW = 4;
  logic clk = 1'b0, rst = 1'b1;
  logic [N-1:0][W-1:0] i, o;
  logic [N-1:0] ew, er, pf, ne;
  logic cfg_we;
  logic [AW-1:0] cfg_addr;
  logic [1:0] cfg_port;
  int checks = 0, failures = 0;

  int model_table [1 << AW];
  logic [W-1:0] expq [N][N][$];    // [output][source] expected flits
  int seq [N];
  int received [N];                // per source, during a phase
  int n_conflict = 0, n_stall = 0, n_pf_low = 0, n_cfg = 0, n_delivered = 0;
  int last_src [N];

  logic [N-1:0][PHIT_W-1:0] sr_i, sr_o;
  logic sr_done = 1'b0;
  int n_drop = 0, n_hold = 0, n_shift = 0;

  chip_link_top dut (
    .clk, .rst,
    .fr_i(i), .fr_ew(ew), .fr_pf(pf), .fr_o(o), .fr_er(er), .fr_ne(ne),
    .fr_cfg_we(cfg_we), .fr_cfg_addr(cfg_addr), .fr_cfg_port(cfg_port),
    .sr_i, .sr_o
  );

  // Part B, simple router: random phits against a cycle-level model of the
  // bufferless router (two-clock latency, fixed priority, packet hold,
  // dropped losers, route-field shift).
  initial begin
    logic [N-1:0][PHIT_W-1:0] m_r, m_o, nxt_o;
    int m_last [N];
    sr_i = '0; m_r = '0; m_o = '0;
    for (int k = 0; k < N; k++) m_last[k] = -1;
    @(negedge rst);
    for (int c = 0; c < 4000; c++) begin
      for (int n = 0; n < N; n++) begin
        int t;
        t = $urandom_range(0, 5);
        if (t == 0)     sr_i[n] = {2'b11, 16'($urandom)};
        else if (t < 4) sr_i[n] = {2'b10, 16'($urandom)};
        else            sr_i[n] = {2'($urandom_range(0, 1)), 16'($urandom)};
      end
      @(posedge clk);
      for (int k = 0; k < N; k++) begin
        int sel, nreq; logic sh;
        sel = -1; sh = 1'b0; nreq = 0;
        for (int n = 0; n < N; n++) if (m_r[n][17:16] == 2'b11 && m_r[n][15:14] == 2'(k)) nreq++;
        if (m_last[k] >= 0 && m_r[m_last[k]][17:16] == 2'b10) begin
          sel = m_last[k]; n_hold++; n_drop += nreq;
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
      m_r = sr_i;
      #1;
      checks++;
      if (sr_o !== m_o) begin failures++; $display("FAIL simple router o=%h exp=%h", sr_o, m_o); end
    end
    sr_done = 1'b1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, sampled before every edge from the scoreboard:
  // a conflict is an output wanted by flits of two or more inputs at once, a
  // stall is an output with more flits pending than its buffer holds (the
  // rest must wait in input buffers)
  always @(negedge clk) if (!rst) begin
    for (int k = 0; k < N; k++) begin
      int srcs, tot;
      srcs = 0; tot = 0;
      for (int n = 0; n < N; n++) begin
        if (expq[k][n].size() > 0) srcs++;
        tot += expq[k][n].size();
      end
      if (srcs > 1) n_conflict++;
      if (tot > (1 << BUF_PTR_W)) n_stall++;
    end
    if (pf != '1) n_pf_low++;
  end

  function automatic logic [W-1:0] make_flit(int src, int addr);
    logic [W-1:0] f;
    f = {AW'(addr), 2'(src), 2'(seq[src])};
    seq[src]++;
    return f;
  endfunction

  // one clock: writes that the sources asked for, reads of non-empty outputs
  task automatic cycle();
    logic [N-1:0] rd;
    #1;
    rd = er & ne;
    for (int n = 0; n < N; n++)
      if (ew[n]) begin
        checks++;
        if (!pf[n]) begin failures++; $display("FAIL source %0d wrote while not free", n); end
        expq[model_table[i[n][W-1 -: AW]]][n].push_back(i[n]);
      end
    @(posedge clk);
    if (cfg_we) begin model_table[cfg_addr] = cfg_port; n_cfg++; end
    #1;
    for (int k = 0; k < N; k++) if (rd[k]) begin
      int src;
      src = o[k][3:2];
      checks++;
      if (expq[k][src].size() == 0) begin
        failures++; $display("FAIL output %0d unexpected flit %h", k, o[k]);
      end else begin
        logic [W-1:0] e;
        e = expq[k][src].pop_front();
        if (o[k] !== e) begin failures++; $display("FAIL output %0d got %h exp %h", k, o[k], e); end
      end
      received[src]++;
      last_src[k] = src;
      n_delivered++;
    end
    ew = '0;
    cfg_we = 1'b0;
  endtask

  function automatic int pending();
    int c = 0;
    for (int k = 0; k < N; k++) for (int n = 0; n < N; n++) c += expq[k][n].size();
    return c;
  endfunction

  task automatic drain();
    int guard = 0;
    er = '1;
    while (pending() > 0 && guard < 500) begin cycle(); guard++; end
    repeat (4) cycle();
    checks++;
    if (pending() != 0 || ne != '0) begin failures++; $display("FAIL drain left %0d flits", pending()); end
  endtask

  initial begin
    i = '0; ew = '0; er = '0; cfg_we = 1'b0; cfg_addr = '0; cfg_port = '0;
    for (int a = 0; a < (1 << AW); a++) model_table[a] = a % N;
    for (int n = 0; n < N; n++) begin seq[n] = 0; received[n] = 0; end
    repeat (2) @(posedge clk);
    #1;
    rst = 1'b0;
    cycle();

    // 1. single flit latency: address 6 goes to output 2
    i[0] = make_flit(0, 6); ew[0] = 1'b1;
    cycle();                                   // written at this edge
    for (int c = 1; c <= 3; c++) begin
      checks++;
      if (ne[2] !== (c == 3)) begin failures++; $display("FAIL ne[2]=%b %0d clocks after write", ne[2], c); end
      if (c < 3) cycle();
    end
    er[2] = 1'b1;
    cycle();
    er = '0;
    checks++;
    if (received[0] != 1 || ne[2] !== 1'b0) begin failures++; $display("FAIL single flit not delivered"); end

    // 2. all inputs to output 1, output read every clock
    for (int n = 0; n < N; n++) received[n] = 0;
    for (int r = 0; r < 6; r++) begin
      for (int n = 0; n < N; n++) begin i[n] = make_flit(n, 1 + 4 * r[1:0]); ew[n] = 1'b1; end
      cycle();
    end
    er[1] = 1'b1;
    begin
      int window [N];
      int got = 0;
      for (int n = 0; n < N; n++) window[n] = 0;
      while (got < 16) begin
        int n_before;
        n_before = n_delivered;
        cycle();
        if (n_delivered != n_before) begin window[last_src[1]]++; got++; end
      end
      for (int n = 0; n < N; n++) begin
        checks++;
        if (window[n] != 4) begin failures++; $display("FAIL round robin: input %0d served %0d of 16", n, window[n]); end
      end
    end
    drain();

    // 3. output 3 not read: it fills, input 0 stalls and fills, pf[0] falls.
    // Capacity: 8 in the output buffer, 8 in the input buffer and one on the
    // input buffer's output register.
    er = '0;
    begin
      int accepted = 0;
      for (int c = 0; c < 30; c++) begin
        if (pf[0]) begin i[0] = make_flit(0, 3); ew[0] = 1'b1; accepted++; end
        cycle();
      end
      checks++;
      if (pf[0] !== 1'b0 || accepted != 2 * (1 << BUF_PTR_W) + 1) begin
        failures++; $display("FAIL backpressure: pf=%b accepted=%0d", pf[0], accepted);
      end
    end
    drain();

    // 4. reconfigure address 5 (reset: output 1) to output 3
    cfg_we = 1'b1; cfg_addr = 4'd5; cfg_port = 2'd3;
    cycle();
    for (int n = 0; n < N; n++) received[n] = 0;
    i[2] = make_flit(2, 5); ew[2] = 1'b1;
    cycle();
    er = 4'b1000;
    repeat (5) cycle();
    checks++;
    if (received[2] != 1 || last_src[3] != 2) begin failures++; $display("FAIL reconfigured route not taken"); end
    drain();

    // 5. random traffic, occasional reconfiguration while drained
    for (int blk = 0; blk < 8; blk++) begin
      for (int c = 0; c < 300; c++) begin
        for (int n = 0; n < N; n++)
          if (pf[n] && $urandom_range(0, 2) != 0) begin i[n] = make_flit(n, $urandom_range(0, 15)); ew[n] = 1'b1; end
        er = N'($urandom);
        cycle();
      end
      drain();
      cfg_we = 1'b1; cfg_addr = AW'($urandom); cfg_port = 2'($urandom);
      cycle();
    end

    wait (sr_done);
    checks++;
    if (n_drop == 0 || n_hold == 0 || n_shift == 0) begin
      failures++; $display("FAIL simple router mechanism missing");
    end
    $display("simple router: dropped heads=%0d held cycles=%0d shifted heads=%0d", n_drop, n_hold, n_shift);
    checks++;
    if (n_conflict == 0 || n_stall == 0 || n_pf_low == 0 || n_cfg == 0) begin
      failures++; $display("FAIL mechanism missing");
    end
    $display("delivered=%0d conflicts=%0d stalls=%0d pf_low=%0d table_writes=%0d",
             n_delivered, n_conflict, n_stall, n_pf_low, n_cfg);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
