// End-to-end testbench for s_curve_top with every parameter at its default:
// 50 MHz clock, 200 us speed refresh, 1 s S-curve acceleration to 20 mm/s,
// 1 s cruise and 1 s deceleration, k = 20 pulses per um. That is a 3 s move
// of 150 million clocks which should produce 800000 pulses (40 mm). The
// whole move is checked by s_curve_top_checker.
module tb_s_curve_top_full;
  import s_curve_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clkout;
  logic [SPEED_W-1:0] v;
  logic [15:0] n_c;
  logic [CYCLE_W-1:0] freq, cycle;
  stage_e stage;
  logic done;
  logic end_of_test = 1'b0;
  int checks, failures;

  s_curve_top dut (.clk, .rst_n, .clkout, .v, .n_c, .freq, .cycle, .stage, .done);

  s_curve_top_checker u_chk (
    .clk, .rst_n, .clkout, .v, .freq, .cycle, .stage, .done,
    .v_valid     (dut.u_s_curve.v_valid),
    .compare_reg (dut.u_pwm.compare_reg),
    .end_of_test,
    .checks, .failures
  );

  always #10 clk = ~clk;  // 50 MHz

  initial begin
    repeat (5) @(negedge clk);
    rst_n = 1'b1;
    wait (done);
    repeat (40000) @(negedge clk);  // longer than the longest pulse period
    end_of_test = 1'b1;
    @(negedge clk);
    end_of_test = 1'b0;
    @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (15010 * 10000 + 100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
