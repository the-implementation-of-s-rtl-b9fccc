// S-curve dissociation module: speed set-point generator for one move.
//
// Each speed refresh strobe (`tick`, one system clock wide, every 200 us at
// the default settings) advances a move-time counter `s_count` and an
// n_c counter, and registers a new speed set-point `v` in um/s:
//   - acceleration: n_c counts up 0..ACCEL_TICKS
//   - cruise:       n_c holds at ACCEL_TICKS for CRUISE_TICKS refreshes
//   - deceleration: n_c counts back down to 0 (the mirror of acceleration)
// With N = ACCEL_TICKS and V = V_MAX the speed is
//   n_c <= N/2 : v = 2*V*n_c^2 / N^2                 (jerk +J, concave part)
//   n_c >  N/2 : v = V - 2*V*(N - n_c)^2 / N^2       (jerk -J, convex part)
// which at the defaults (N = 5000, V = 20000 um/s, 200 us refresh) is
// v = 16*n_c^2/10000 and v = 20000 - (10000 - 2*n_c)^2/2500. Both halves meet
// at V/2 when n_c = N/2. Below PWM_INITIAL_COUNT the speed is forced to zero,
// because such low pulse rates cannot be produced usefully; this threshold is
// applied in the deceleration too, as its mirror image.
//
// The profile starts when reset is released and runs once: after
// 2*ACCEL_TICKS + CRUISE_TICKS refreshes `done` rises and v stays zero.
// The counters, formulas, stage boundaries and default numbers follow the
// design description. Using one system clock with a refresh enable (instead
// of a separate refresh clock), the active-low asynchronous reset, the
// `v_valid` strobe and the `stage` output are this design's own choices.
//
// Timing: v, n_c, stage and v_valid are registered; they change on the clock
// edge where `tick` is high, and v_valid is high for that one clock after it.
// The divisions are by constants, so the speed path is a squarer followed by
// a constant divider.
module s_curve
  import s_curve_pkg::*;
#(
  parameter int unsigned V_MAX             = 20000, // cruise speed, um/s
  parameter int unsigned ACCEL_TICKS       = 5000,  // refreshes per acceleration (TOTAL_SPEEDUP_TIMES)
  parameter int unsigned CRUISE_TICKS      = 5000,  // refreshes at constant speed
  parameter int unsigned PWM_INITIAL_COUNT = 300    // first n_c with a non-zero speed
) (
  input  logic               clk,
  input  logic               rst_n,     // asynchronous, active low
  input  logic               tick,      // speed refresh strobe (speed_change_clk)
  output logic [SPEED_W-1:0] v,         // speed set-point, um/s
  output logic               v_valid,   // one-clock strobe: v was just refreshed
  output logic [15:0]        n_c,       // profile counter
  output stage_e             stage,     // stage of the current set-point
  output logic               done       // move finished
);

  // Stage boundaries, counted in refreshes since the start of the move.
  localparam int unsigned FIR_STAG_TIMES       = ACCEL_TICKS / 2;
  localparam int unsigned TOTAL_SPEEDUP_TIMES  = ACCEL_TICKS;
  localparam int unsigned SPEEDDOWN_START      = ACCEL_TICKS + CRUISE_TICKS;
  localparam int unsigned SPEEDDOWN_2ND_START  = SPEEDDOWN_START + ACCEL_TICKS / 2;
  localparam int unsigned S_CURVE_END          = SPEEDDOWN_START + ACCEL_TICKS;
  localparam int unsigned CNT_W                = $clog2(S_CURVE_END + 2);

  localparam longint unsigned TWO_V = 2 * longint'(V_MAX);
  localparam longint unsigned N_SQ  = longint'(ACCEL_TICKS) * longint'(ACCEL_TICKS);

  logic [CNT_W-1:0] s_count;

  // Concave half: 2V x^2 / N^2.
  function automatic logic [SPEED_W-1:0] concave(input logic [15:0] x);
    longint unsigned x2;
    x2 = longint'(x) * longint'(x);
    return SPEED_W'((TWO_V * x2) / N_SQ);
  endfunction

  // Speed for a given n_c (both halves of the S).
  function automatic logic [SPEED_W-1:0] speed_of(input logic [15:0] n);
    if (32'(n) <= FIR_STAG_TIMES) begin
      if (32'(n) < PWM_INITIAL_COUNT) return '0;
      return concave(n);
    end
    return SPEED_W'(V_MAX) - concave(16'(TOTAL_SPEEDUP_TIMES - 32'(n)));
  endfunction

  function automatic stage_e stage_of(input logic [CNT_W-1:0] c);
    if (32'(c) <= FIR_STAG_TIMES)       return ST_ACCEL_1;
    if (32'(c) <= TOTAL_SPEEDUP_TIMES)  return ST_ACCEL_2;
    if (32'(c) <  SPEEDDOWN_START)      return ST_CRUISE;
    if (32'(c) <= SPEEDDOWN_2ND_START)  return ST_DECEL_1;
    if (32'(c) <= S_CURVE_END)          return ST_DECEL_2;
    return ST_DONE;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_count <= '0;
      n_c     <= '0;
      v       <= '0;
      v_valid <= 1'b0;
      stage   <= ST_ACCEL_1;
      done    <= 1'b0;
    end else begin
      v_valid <= 1'b0;
      if (tick && !done) begin
        // Set-point for the current count.
        v       <= speed_of(n_c);
        v_valid <= 1'b1;
        stage   <= stage_of(s_count);
        done    <= (32'(s_count) > S_CURVE_END);
        // Advance: up while accelerating, hold while cruising, down while
        // decelerating.
        if (32'(s_count) <= S_CURVE_END) s_count <= s_count + 1'b1;
        if (32'(s_count) < TOTAL_SPEEDUP_TIMES)
          n_c <= n_c + 1'b1;
        else if (32'(s_count) >= SPEEDDOWN_START && 32'(s_count) < S_CURVE_END)
          n_c <= n_c - 1'b1;
      end
    end
  end

endmodule
