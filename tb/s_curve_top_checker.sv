// Scoreboard for the whole S-curve axis (s_curve_top), shared by the
// reduced-size and the full-size end-to-end testbenches. It watches the
// top's outputs and a few internal strobes and checks, against values it
// works out itself:
//   - refresh spacing: one speed refresh every F_CLK_HZ/1e6*REFRESH_US clocks
//   - every speed set-point and stage against the S-curve profile
//   - every pulse period and frequency word against floor(F / (K*v))
//   - every pulse period on clkout against the period loaded for it
//   - the cruise pulse period, F / (K*V_MAX) clocks
//   - the total number of pulses against the integral of the frequency and
//     against the move length 2*T*V_MAX (acceleration and deceleration each
//     cover half their time at full speed), within 1%
//   - the output stops after the move
// and counts how often each mechanism happened: each profile stage, the
// zero-speed hold below PWM_INITIAL_COUNT, a period update deferred to the
// end of the pulse in progress, the pulse generator starting and stopping.
// A mechanism that never happened is a failure. Pulse `end_of_test` high
// for one clock to run the final checks; `checks` and `failures` then hold
// the totals.
module s_curve_top_checker
  import s_curve_pkg::*;
#(
  parameter int unsigned F_CLK_HZ          = 50_000_000,
  parameter int unsigned REFRESH_US        = 200,
  parameter int unsigned V_MAX             = 20000,
  parameter int unsigned ACCEL_TICKS       = 5000,
  parameter int unsigned CRUISE_TICKS      = 5000,
  parameter int unsigned PWM_INITIAL_COUNT = 300,
  parameter int unsigned K_HZ_PER_UMPS     = 20
) (
  input logic               clk,
  input logic               rst_n,
  input logic               clkout,
  input logic [SPEED_W-1:0] v,
  input logic [CYCLE_W-1:0] freq,
  input logic [CYCLE_W-1:0] cycle,
  input stage_e             stage,
  input logic               done,
  input logic               v_valid,      // internal: speed refreshed
  input logic [CYCLE_W-1:0] compare_reg,  // internal: period in use by the PWM
  input logic               end_of_test,
  output int                checks,
  output int                failures
);

  localparam longint TICK_CLKS = longint'(F_CLK_HZ / 1_000_000) * REFRESH_US;
  localparam longint N   = ACCEL_TICKS;
  localparam longint CR  = CRUISE_TICKS;
  localparam longint VV  = V_MAX;
  localparam longint F   = F_CLK_HZ;
  localparam longint K   = K_HZ_PER_UMPS;

  function automatic longint ref_n(longint k);
    if (k <= N) return k;
    if (k < N + CR) return N;
    if (k <= 2 * N + CR) return 2 * N + CR - k;
    return 0;
  endfunction

  function automatic longint ref_v(longint k);
    longint n;
    n = ref_n(k);
    if (2 * n <= N) return (n < PWM_INITIAL_COUNT) ? 0 : (2 * VV * n * n) / (N * N);
    return VV - (2 * VV * (N - n) * (N - n)) / (N * N);
  endfunction

  function automatic stage_e ref_stage(longint k);
    if (2 * k <= N) return ST_ACCEL_1;
    if (k <= N) return ST_ACCEL_2;
    if (k < N + CR) return ST_CRUISE;
    if (2 * k <= 2 * N + 2 * CR + N) return ST_DECEL_1;
    if (k <= 2 * N + CR) return ST_DECEL_2;
    return ST_DONE;
  endfunction

  function automatic longint ref_cycle(longint speed);
    return (speed == 0) ? 0 : F / (K * speed);
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  longint cyc = 0;
  longint k = 0;
  longint last_refresh = -1;
  int     conv_wait = -1;
  longint conv_speed = 0;
  longint last_fall = -1;
  longint next_period = 0;
  bit     period_known = 1'b0;
  longint rises = 0;
  longint rises_at_done = -1;
  longint sum_freq = 0;
  logic   clkout_q = 1'b0;
  logic   waiting_q = 1'b0;
  logic [CYCLE_W-1:0] compare_q = '0;
  int     seen_stage [6];
  int     zero_hold = 0;
  int     deferred = 0;
  int     pwm_starts = 0;
  int     pwm_stops = 0;
  int     cruise_periods = 0;

  initial begin
    checks = 0;
    failures = 0;
    foreach (seen_stage[i]) seen_stage[i] = 0;
  end

  always @(negedge clk) begin
    if (rst_n) begin
      cyc++;
      sum_freq += longint'(freq);

      // Speed refreshes.
      if (v_valid) begin
        if (last_refresh >= 0)
          check(cyc - last_refresh == TICK_CLKS,
                $sformatf("refresh %0d after %0d clocks", k, cyc - last_refresh));
        last_refresh = cyc;
        check(longint'(v) == ref_v(k), $sformatf("refresh %0d: v=%0d expected %0d", k, v, ref_v(k)));
        check(stage == ref_stage(k), $sformatf("refresh %0d: stage %0d expected %0d", k, stage, ref_stage(k)));
        seen_stage[int'(stage)]++;
        if (ref_n(k) > 0 && ref_n(k) < PWM_INITIAL_COUNT && v == '0) zero_hold++;
        conv_wait = CYCLE_W + 3;
        conv_speed = longint'(v);
        k++;
      end

      // Period conversion of the newest speed.
      if (conv_wait == 0) begin
        check(longint'(cycle) == ref_cycle(conv_speed),
              $sformatf("v=%0d: cycle %0d expected %0d", conv_speed, cycle, ref_cycle(conv_speed)));
        check(longint'(freq) == K * conv_speed, $sformatf("v=%0d: freq %0d", conv_speed, freq));
      end
      if (conv_wait >= 0) conv_wait--;

      // Pulse generator.
      if (compare_reg != '0 && compare_q == '0) pwm_starts++;
      if (compare_reg == '0 && compare_q != '0) pwm_stops++;
      // A new period waiting for the pulse in progress to end.
      if (compare_reg != '0 && cycle != '0 && cycle != compare_reg && !waiting_q) deferred++;
      waiting_q = (compare_reg != '0 && cycle != '0 && cycle != compare_reg);
      if (clkout && !clkout_q) rises++;
      if (!clkout && clkout_q) begin
        if (period_known) begin
          check(cyc - last_fall == next_period,
                $sformatf("pulse period %0d, loaded %0d", cyc - last_fall, next_period));
          if (stage == ST_CRUISE && next_period == ref_cycle(VV)) cruise_periods++;
        end
        last_fall = cyc;
        next_period = longint'(compare_reg);
        period_known = 1'b1;
      end
      if (compare_reg == '0) period_known = 1'b0;
      if (done && rises_at_done < 0 && compare_reg == '0) rises_at_done = rises;
      clkout_q = clkout;
      compare_q = compare_reg;
    end
  end

  always @(posedge clk) begin
    if (end_of_test) begin
      longint exp_int;
      longint exp_move;
      exp_int = sum_freq / F;
      // Move length 2*T*V (um) times K pulses per um.
      exp_move = (2 * N * TICK_CLKS * VV * K) / F;
      check(done, "move finished");
      check(k == 2 * N + CR + 2, $sformatf("%0d refreshes, expected %0d", k, 2 * N + CR + 2));
      check(!clkout && compare_reg == '0, "pulse output stopped after the move");
      check(rises_at_done >= 0 && rises == rises_at_done, "no pulses after the stop");
      check(100 * (rises - exp_int) <= exp_int && 100 * (exp_int - rises) <= exp_int,
            $sformatf("%0d pulses, integral of the frequency gives %0d", rises, exp_int));
      check(100 * (rises - exp_move) <= exp_move && 100 * (exp_move - rises) <= exp_move,
            $sformatf("%0d pulses, move length gives %0d", rises, exp_move));
      $display("pulses %0d, frequency integral %0d, move length %0d", rises, exp_int, exp_move);
      $display("mechanisms: accel1 %0d accel2 %0d cruise %0d decel1 %0d decel2 %0d done %0d",
               seen_stage[0], seen_stage[1], seen_stage[2], seen_stage[3], seen_stage[4], seen_stage[5]);
      $display("mechanisms: zero-speed hold %0d, deferred period update %0d, pwm start %0d, pwm stop %0d, cruise periods %0d",
               zero_hold, deferred, pwm_starts, pwm_stops, cruise_periods);
      foreach (seen_stage[i]) check(seen_stage[i] > 0, $sformatf("stage %0d never seen", i));
      check(zero_hold > 0, "zero-speed hold never happened");
      check(deferred > 0, "deferred period update never happened");
      check(pwm_starts > 0, "pulse generator never started");
      check(pwm_stops > 0, "pulse generator never stopped");
      check(cruise_periods > 0, "no cruise-speed pulse period measured");
    end
  end

endmodule
