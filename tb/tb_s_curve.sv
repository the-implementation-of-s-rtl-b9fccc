// Testbench for s_curve at its default sizes (5000-refresh acceleration,
// 5000-refresh cruise, 20000 um/s). Refresh strobes are applied with random
// gaps. Every refreshed set-point is compared with the profile written in
// its per-stage form, v = 16*n^2/10000 and v = 20000 - (10000 - 2n)^2/2500
// (um/s), with n following the up / hold / down schedule, and the stage, the
// n_c counter, the number of refreshes and the final stop are checked.
module tb_s_curve;
  import s_curve_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick = 1'b0;
  logic [SPEED_W-1:0] v;
  logic v_valid;
  logic [15:0] n_c;
  stage_e stage;
  logic done;

  int checks = 0;
  int failures = 0;

  s_curve dut (.clk, .rst_n, .tick, .v, .v_valid, .n_c, .stage, .done);

  always #5 clk = ~clk;

  // Reference profile, per refresh index k (0 = first refresh).
  function automatic int ref_n(int k);
    if (k <= 5000) return k;
    if (k < 10000) return 5000;
    if (k <= 15000) return 15000 - k;
    return 0;
  endfunction

  function automatic int ref_v(int k);
    int n;
    n = ref_n(k);
    if (n < 300) return 0;
    if (n <= 2500) return (16 * n * n) / 10000;
    return 20000 - ((10000 - 2 * n) * (10000 - 2 * n)) / 2500;
  endfunction

  function automatic stage_e ref_stage(int k);
    if (k <= 2500) return ST_ACCEL_1;
    if (k <= 5000) return ST_ACCEL_2;
    if (k < 10000) return ST_CRUISE;
    if (k <= 12500) return ST_DECEL_1;
    if (k <= 15000) return ST_DECEL_2;
    return ST_DONE;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  int k = 0;
  int at_v = 0;

  // Score every refresh.
  always @(posedge clk) begin
    if (rst_n && v_valid) begin
      check(v == SPEED_W'(ref_v(k)), $sformatf("refresh %0d: v=%0d expected %0d", k, v, ref_v(k)));
      check(stage == ref_stage(k), $sformatf("refresh %0d: stage=%0d expected %0d", k, stage, ref_stage(k)));
      // n_c already shows the count for the next refresh.
      check(32'(n_c) == ref_n(k + 1), $sformatf("refresh %0d: n_c=%0d expected %0d", k, n_c, ref_n(k + 1)));
      check(done == (k > 15000), $sformatf("refresh %0d: done=%0d", k, done));
      if (v == 16'd20000) at_v++;
      k++;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    check(v == '0 && !done && !v_valid, "outputs idle in reset");
    rst_n = 1'b1;
    // No strobe, no change.
    repeat (5) @(negedge clk);
    check(!v_valid && v == '0, "no refresh without a strobe");
    while (!done) begin
      tick = 1'b1;
      @(negedge clk);
      tick = 1'b0;
      repeat ($urandom_range(2, 0)) @(negedge clk);
    end
    // Further strobes do nothing once the move is over.
    repeat (10) begin
      tick = 1'b1;
      @(negedge clk);
    end
    tick = 1'b0;
    repeat (3) @(negedge clk);
    check(k == 15002, $sformatf("refresh count %0d, expected 15002", k));
    begin
      int exp_at_v;
      exp_at_v = 0;
      for (int i = 0; i < 15002; i++) if (ref_v(i) == 20000) exp_at_v++;
      check(at_v == exp_at_v, $sformatf("%0d refreshes at cruise speed, expected %0d", at_v, exp_at_v));
    end
    check(v == '0 && stage == ST_DONE, "stopped at the end");
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
