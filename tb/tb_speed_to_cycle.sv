// Testbench for speed_to_cycle at 50 MHz and k = 20 Hz per um/s. Applies
// speeds from the profile's range (the first non-zero step 144 um/s, half
// and full cruise speed 10000 / 20000 um/s, extremes and random values) and
// checks freq = 20*v, cycle = floor(50e6 / (20*v)), the stop code for v = 0
// and the latency of 34 clocks from a new speed to the new period. Also
// changes the speed while a division runs and checks that the newest speed
// wins.
module tb_speed_to_cycle;
  import s_curve_pkg::*;

  localparam longint F = 50_000_000;
  localparam longint K = 20;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [SPEED_W-1:0] v = '0;
  logic [CYCLE_W-1:0] freq;
  logic [CYCLE_W-1:0] cycle;
  logic cycle_valid;
  logic busy;

  int checks = 0;
  int failures = 0;

  speed_to_cycle dut (.clk, .rst_n, .v, .freq, .cycle, .cycle_valid, .busy);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic apply(input int unsigned speed);
    int lat;
    longint exp_cycle;
    @(negedge clk);
    v = SPEED_W'(speed);
    lat = 0;
    do begin
      @(negedge clk);
      lat++;
    end while (!cycle_valid && lat < 100);
    exp_cycle = (speed == 0) ? 0 : F / (K * speed);
    check(cycle_valid, $sformatf("v=%0d: no result", speed));
    check(longint'(cycle) == exp_cycle, $sformatf("v=%0d: cycle %0d expected %0d", speed, cycle, exp_cycle));
    check(longint'(freq) == K * speed, $sformatf("v=%0d: freq %0d", speed, freq));
    check(lat == ((speed == 0) ? 1 : 34), $sformatf("v=%0d: latency %0d", speed, lat));
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(cycle == '0 && !busy && !cycle_valid, "idle at zero speed");
    apply(144);
    apply(10000);
    apply(20000);
    apply(1);
    apply(65535);
    apply(0);
    apply(3);
    for (int i = 0; i < 200; i++) apply($urandom_range(65535, 1));
    // Same speed again: nothing to do.
    @(negedge clk);
    v = v;
    repeat (40) begin
      @(negedge clk);
      check(!busy && !cycle_valid, "no conversion for an unchanged speed");
    end
    // Speed changes while dividing: the last one is converted in the end.
    @(negedge clk);
    v = 16'd500;
    repeat (10) @(negedge clk);
    v = 16'd777;
    repeat (100) @(negedge clk);
    check(longint'(cycle) == F / (K * 777), $sformatf("newest speed wins: cycle %0d", cycle));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
