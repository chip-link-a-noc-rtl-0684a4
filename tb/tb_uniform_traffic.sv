// tb_uniform_traffic: uniform random traffic through the full router at two
// sizes, the default 4x4 and an 8x8 build of the same RTL (the crossbar size
// of the allocator comparison the design is based on).
//
// Each size runs in its own uniform_traffic_harness at offered loads from
// 10 % to 100 % of a flit per clock and input, printing accepted throughput
// and average latency. The checks: every flit delivered intact and in order,
// offered load accepted up to 50 %, the four-clock minimum latency (write
// edge plus three router clocks) at light load, latency never falling as load rises, and a saturation throughput in
// the range head-of-line blocking allows for a FIFO input-queued switch.
module tb_uniform_traffic;
  logic clk = 1'b0, rst = 1'b1;
  logic done4, done8;
  int checks4, failures4, checks8, failures8;

  always #5 clk = ~clk;

  uniform_traffic_harness #(.N(4)) h4 (.clk, .rst, .done(done4), .checks(checks4), .failures(failures4));
  uniform_traffic_harness #(.N(8)) h8 (.clk, .rst, .done(done8), .checks(checks8), .failures(failures8));

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8 + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst = 1'b0;
    wait (done4 && done8);
    $display("TB_RESULT checks=%0d failures=%0d", checks4 + checks8, failures4 + failures8);
    $finish;
  end
endmodule
