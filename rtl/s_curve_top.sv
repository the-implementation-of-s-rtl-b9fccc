// One motion axis with S-curve acceleration and deceleration.
//
// The chain that turns a jerk-limited speed profile into the variable-rate
// pulse train a position-mode servo drive follows:
//   refresh_tick   -> 200 us speed refresh strobe from the 50 MHz clock
//   s_curve        -> speed set-point v (um/s) per refresh: 1 s S-shaped
//                     acceleration to 20 mm/s, 1 s cruise, 1 s deceleration
//   speed_to_cycle -> pulse frequency f = 20*v (Hz) and its period in clocks
//   pwm_module     -> 50% duty pulse train with that period on `clkout`
// Each pulse on `clkout` is one position command to the drive, so the pulse
// rate sets the motor speed. `clkout` leaves the chip for the signal
// isolation board and the drive, which are outside this design.
//
// The move starts when reset is released and ends with `done` high and the
// pulse output stopped low, 3 s later at the defaults. The block chain and
// all default numbers follow the design description; the single clock
// domain with a refresh enable is this design's own choice.
//
// Timing: a new speed reaches `v` on the clock of each refresh strobe, the
// period `cycle` follows CYCLE_W + 2 clocks later, and the pulse generator
// takes it over at the end of the pulse in progress.
module s_curve_top
  import s_curve_pkg::*;
#(
  parameter int unsigned F_CLK_HZ          = 50_000_000, // system clock
  parameter int unsigned REFRESH_US        = 200,        // speed refresh period, us
  parameter int unsigned V_MAX             = 20000,      // cruise speed, um/s
  parameter int unsigned ACCEL_TICKS       = 5000,       // refreshes per acceleration
  parameter int unsigned CRUISE_TICKS      = 5000,       // refreshes at cruise speed
  parameter int unsigned PWM_INITIAL_COUNT = 300,        // first n_c with non-zero speed
  parameter int unsigned K_HZ_PER_UMPS     = 20          // pulse Hz per um/s
) (
  input  logic               clk,
  input  logic               rst_n,    // asynchronous, active low; release starts the move
  output logic               clkout,   // step pulses to the drive
  output logic [SPEED_W-1:0] v,        // current speed set-point, um/s
  output logic [15:0]        n_c,      // profile counter of the S-curve generator
  output logic [CYCLE_W-1:0] freq,     // current pulse frequency, Hz
  output logic [CYCLE_W-1:0] cycle,    // current pulse period, clocks
  output stage_e             stage,    // profile stage
  output logic               done      // move finished
);

  localparam int unsigned TICK_CLKS = (F_CLK_HZ / 1_000_000) * REFRESH_US;

  logic        tick;
  logic        v_valid;
  logic        cycle_valid;
  logic        div_busy;
  logic [CYCLE_W-1:0] compare_reg;
  logic [CYCLE_W-1:0] compare_count;

  refresh_tick #(
    .TICK_CLKS (TICK_CLKS)
  ) u_refresh (
    .clk   (clk),
    .rst_n (rst_n),
    .tick  (tick)
  );

  s_curve #(
    .V_MAX             (V_MAX),
    .ACCEL_TICKS       (ACCEL_TICKS),
    .CRUISE_TICKS      (CRUISE_TICKS),
    .PWM_INITIAL_COUNT (PWM_INITIAL_COUNT)
  ) u_s_curve (
    .clk     (clk),
    .rst_n   (rst_n),
    .tick    (tick),
    .v       (v),
    .v_valid (v_valid),
    .n_c     (n_c),
    .stage   (stage),
    .done    (done)
  );

  speed_to_cycle #(
    .F_CLK_HZ      (F_CLK_HZ),
    .K_HZ_PER_UMPS (K_HZ_PER_UMPS)
  ) u_convert (
    .clk         (clk),
    .rst_n       (rst_n),
    .v           (v),
    .freq        (freq),
    .cycle       (cycle),
    .cycle_valid (cycle_valid),
    .busy        (div_busy)
  );

  pwm_module u_pwm (
    .clk           (clk),
    .rst_n         (rst_n),
    .cycle         (cycle),
    .clkout        (clkout),
    .compare_reg   (compare_reg),
    .compare_count (compare_count)
  );

  // The period must be known before the next speed refresh arrives.
  a_convert_in_time: assert property (
    @(posedge clk) disable iff (!rst_n) v_valid |-> !div_busy
  ) else $error("s_curve_top: speed refreshed while the previous one is still converting");

endmodule
