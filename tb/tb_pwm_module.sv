// Testbench for pwm_module. Measures the pulse train on clkout edge by edge
// and checks: the period equals the loaded cycle value and the duty is 50%
// (low for C/2 clocks, high for the rest), for the 8-clock example period,
// the 125-clock period of the 20 mm/s cruise speed and long odd periods; a
// new cycle value takes effect only when the pulse in progress ends; a
// cycle value of zero stops the output low after the current pulse; and the
// counter runs 1..C with the rise after count C/2.
module tb_pwm_module;
  import s_curve_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic [CYCLE_W-1:0] cycle = '0;
  logic clkout;
  logic [CYCLE_W-1:0] compare_reg;
  logic [CYCLE_W-1:0] compare_count;

  int checks = 0;
  int failures = 0;

  pwm_module dut (.clk, .rst_n, .cycle, .clkout, .compare_reg, .compare_count);

  always #10 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Edge timestamps, in clocks.
  longint cyc = 0;
  longint last_rise = -1, last_fall = -1;
  longint high_len = -1, low_len = -1, period = -1;
  int rises = 0, falls = 0;
  logic clkout_q = 1'b0;

  always @(posedge clk) begin
    #1;
    cyc++;
    if (clkout && !clkout_q) begin
      if (last_fall >= 0) low_len = cyc - last_fall;
      last_rise = cyc;
      rises++;
    end
    if (!clkout && clkout_q) begin
      high_len = cyc - last_rise;
      if (last_fall >= 0) period = cyc - last_fall;
      last_fall = cyc;
      falls++;
    end
    clkout_q = clkout;
  end

  // Wait for the next falling edge (end of a pulse period).
  task automatic wait_fall();
    int f;
    f = falls;
    while (falls == f) @(posedge clk);
    #2;
  endtask

  task automatic check_steady(input int c, input int n);
    for (int i = 0; i < n; i++) begin
      wait_fall();
      if (i > 0) begin
        check(period == c, $sformatf("C=%0d: period %0d", c, period));
        check(high_len == c - c / 2, $sformatf("C=%0d: high for %0d", c, high_len));
        check(low_len == c / 2, $sformatf("C=%0d: low for %0d", c, low_len));
      end
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    check(!clkout && compare_reg == '0, "idle in reset");
    // Stopped while cycle is zero.
    rst_n = 1'b1;
    repeat (20) @(negedge clk);
    check(!clkout && rises == 0, "no pulses while the period is zero");

    // 8-clock example: the counter runs 1..8, clkout rises after count 4.
    cycle = 8;
    wait_fall();
    begin
      int seen_hi_at;
      seen_hi_at = -1;
      for (int i = 0; i < 8; i++) begin
        @(negedge clk);
        check(compare_count == CYCLE_W'(i + 2) || (i == 7 && compare_count == 1),
              $sformatf("count %0d at step %0d", compare_count, i));
        if (clkout && seen_hi_at < 0) seen_hi_at = int'(compare_count);
      end
      check(seen_hi_at == 5, $sformatf("first high with count %0d, expected 5", seen_hi_at));
    end
    check_steady(8, 5);

    // Cruise speed period and long, odd periods.
    cycle = 125;
    wait_fall();
    check_steady(125, 5);
    cycle = 17361;
    wait_fall();
    check_steady(17361, 3);
    cycle = 3;
    wait_fall();
    check_steady(3, 5);

    // A change in the middle of a pulse period does not cut it short.
    cycle = 100;
    wait_fall();
    wait_fall();
    repeat (30) @(negedge clk);
    cycle = 40;
    wait_fall();
    check(period == 100, $sformatf("period in progress %0d, expected 100", period));
    check(compare_reg == 40, "new period loaded at the period end");
    wait_fall();
    check(period == 40, $sformatf("next period %0d, expected 40", period));

    // Stop: the pulse in progress completes, then clkout stays low.
    repeat (25) @(negedge clk);
    cycle = 0;
    wait_fall();
    check(period == 40, "last pulse completed before stopping");
    begin
      int r;
      r = rises;
      repeat (200) @(negedge clk);
      check(rises == r && !clkout, "stopped after a zero period");
      check(compare_reg == '0, "period register cleared");
    end

    // Restart.
    cycle = 10;
    wait_fall();
    check_steady(10, 4);

    // Reset in the middle of a pulse.
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    check(!clkout && compare_count == '0, "reset clears the output");
    rst_n = 1'b1;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
