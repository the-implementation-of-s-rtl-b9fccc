// End-to-end testbench for s_curve_top at reduced sizes: a 20 us speed
// refresh, 100-refresh acceleration and deceleration, a 100-refresh cruise
// and a zero-speed threshold of 6, which keeps the speed values of the full
// design (same V_MAX, same first non-zero speed of 144 um/s) on a shorter
// time scale. The whole move is checked by s_curve_top_checker.
module tb_s_curve_top;
  import s_curve_pkg::*;

  localparam int unsigned REFRESH_US = 20;
  localparam int unsigned ACCEL      = 100;
  localparam int unsigned CRUISE     = 100;
  localparam int unsigned P_INIT     = 6;

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

  s_curve_top #(
    .REFRESH_US        (REFRESH_US),
    .ACCEL_TICKS       (ACCEL),
    .CRUISE_TICKS      (CRUISE),
    .PWM_INITIAL_COUNT (P_INIT)
  ) dut (.clk, .rst_n, .clkout, .v, .n_c, .freq, .cycle, .stage, .done);

  s_curve_top_checker #(
    .REFRESH_US        (REFRESH_US),
    .ACCEL_TICKS       (ACCEL),
    .CRUISE_TICKS      (CRUISE),
    .PWM_INITIAL_COUNT (P_INIT)
  ) u_chk (
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
    repeat ((2 * ACCEL + CRUISE + 10) * 50 * REFRESH_US + 100000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
