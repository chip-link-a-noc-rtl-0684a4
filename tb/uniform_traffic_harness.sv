// uniform_traffic_harness: drives one chip_link_router with uniform random
// traffic and measures delivered throughput and average latency.
//
// Every input generates a flit with probability LOAD_PCT percent per clock,
// addressed to an output chosen uniformly at random; flits wait in an
// unbounded source queue and are written only while pf is high. All outputs
// are read every clock. Latency is counted in clock edges from the clock in
// which the flit is generated to the edge that puts it on o, so it includes
// source queueing; with no contention it is four: the edge that writes the
// input buffer plus the router's three clocks. Each flit carries its source
// and a sequence number, and a scoreboard checks that every flit arrives,
// unchanged, at the right output and in order. For each load in LOADS the
// harness warms up, measures for MEASURE clocks and drains.
module uniform_traffic_harness #(
  parameter int N       = 4,
  parameter int W       = 16,
  parameter int ADDR_W  = 4,
  parameter int MEASURE = 5000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int NLOADS = 6;
  localparam int LOADS [NLOADS] = '{10, 30, 50, 70, 90, 100};
  localparam int SRC_W = $clog2(N);
  localparam int SEQ_W = W - ADDR_W - SRC_W;

  logic [N-1:0][W-1:0] i, o;
  logic [N-1:0] ew, er, pf, ne;

  chip_link_router #(.N(N), .W(W), .ADDR_W(ADDR_W)) dut (
    .clk, .rst, .i, .ew, .pf, .o, .er, .ne,
    .cfg_we(1'b0), .cfg_addr('0), .cfg_port('0)
  );

  typedef struct { logic [W-1:0] flit; longint born; } entry_t;
  entry_t srcq [N][$];
  entry_t expq [N][N][$];      // [output][source]
  int seq [N];
  longint now = 0;

  task automatic run_load(int load, bit measure, int clocks,
                          output real thr, output real lat, output int min_lat);
    longint lat_sum = 0;
    int delivered = 0;
    min_lat = 1 << 30;
    for (int c = 0; c < clocks; c++) begin
      logic [N-1:0] rd;
      // generate
      for (int n = 0; n < N; n++)
        if ($urandom_range(1, 100) <= load) begin
          entry_t e;
          int d;
          d = $urandom_range(0, N - 1);
          e.flit = {ADDR_W'(d), SRC_W'(n), SEQ_W'(seq[n])};
          e.born = now;
          seq[n]++;
          srcq[n].push_back(e);
        end
      // inject while the input port is free
      ew = '0;
      for (int n = 0; n < N; n++)
        if (pf[n] && srcq[n].size() > 0) begin
          entry_t e;
          e = srcq[n].pop_front();
          i[n] = e.flit;
          ew[n] = 1'b1;
          expq[int'(e.flit[W-1 -: ADDR_W]) % N][n].push_back(e);
        end
      rd = er & ne;
      @(posedge clk);
      now++;
      #1;
      for (int k = 0; k < N; k++) if (rd[k]) begin
        int s;
        s = int'(o[k][SEQ_W +: SRC_W]);
        checks++;
        if (expq[k][s].size() == 0) begin
          failures++;
          $display("FAIL N=%0d output %0d unexpected flit %h", N, k, o[k]);
        end else begin
          entry_t e;
          e = expq[k][s].pop_front();
          if (o[k] !== e.flit) begin
            failures++;
            $display("FAIL N=%0d output %0d got %h exp %h", N, k, o[k], e.flit);
          end
          if (measure) begin
            int l;
            l = int'(now - e.born);
            lat_sum += longint'(l);
            delivered++;
            if (l < min_lat) min_lat = l;
          end
        end
      end
    end
    thr = real'(delivered) / real'(clocks * N);
    lat = delivered > 0 ? real'(lat_sum) / real'(delivered) : 0.0;
  endtask

  function automatic int in_flight();
    int c = 0;
    for (int n = 0; n < N; n++) begin
      c += srcq[n].size();
      for (int k = 0; k < N; k++) c += expq[k][n].size();
    end
    return c;
  endfunction

  initial begin
    real thr, lat, prev_lat, sat_thr;
    int  min_lat;
    done = 1'b0; checks = 0; failures = 0;
    i = '0; ew = '0; er = '1;
    for (int n = 0; n < N; n++) seq[n] = 0;
    @(negedge rst);
    #1;
    prev_lat = 0.0;
    for (int l = 0; l < NLOADS; l++) begin
      run_load(LOADS[l], 1'b0, 300, thr, lat, min_lat);     // warm-up
      run_load(LOADS[l], 1'b1, MEASURE, thr, lat, min_lat);
      sat_thr = thr;
      $display("N=%0d offered=%0d%% accepted=%0.3f flits/clock/port avg latency=%0.2f min=%0d",
               N, LOADS[l], thr, lat, min_lat);
      // below saturation the router must accept what is offered
      if (LOADS[l] <= 50) begin
        checks++;
        if (thr < 0.9 * LOADS[l] / 100.0) begin
          failures++; $display("FAIL N=%0d accepted %0.3f at offered %0d%%", N, thr, LOADS[l]);
        end
      end
      // the lightest load must show the minimum latency: the write edge
      // plus the router's three clocks
      if (l == 0) begin
        checks++;
        if (min_lat != 4) begin failures++; $display("FAIL N=%0d minimum latency %0d", N, min_lat); end
      end
      // latency does not fall as the load rises
      checks++;
      if (lat + 0.5 < prev_lat) begin failures++; $display("FAIL N=%0d latency fell with load", N); end
      prev_lat = lat;
      // drain before the next load
      run_load(0, 1'b0, 200, thr, lat, min_lat);
      while (in_flight() > 0) run_load(0, 1'b0, 100, thr, lat, min_lat);
    end
    // saturation throughput of a FIFO input-queued switch is limited by
    // head-of-line blocking to well below one flit per clock and port
    // (measured at the last, 100 % load)
    checks++;
    if (sat_thr < 0.5 || sat_thr > 0.85) begin
      failures++; $display("FAIL N=%0d saturation throughput %0.3f", N, sat_thr);
    end
    done = 1'b1;
  end

endmodule
