// Shared types for the S-curve motion profile generator.
//
// The speed profile is split into the stages of a jerk-limited move:
// the concave and convex halves of the acceleration, the constant-speed
// plateau, the two halves of the deceleration, and the finished state.
// The split of acceleration and deceleration into two halves at half the
// cruise speed follows the profile the design implements; the encoding of
// the stage codes is this design's own choice.
package s_curve_pkg;

  typedef enum logic [2:0] {
    ST_ACCEL_1 = 3'd0,  // jerk +J: speed rises with n^2
    ST_ACCEL_2 = 3'd1,  // jerk -J: speed approaches cruise speed
    ST_CRUISE  = 3'd2,  // constant speed
    ST_DECEL_1 = 3'd3,  // mirror of ST_ACCEL_2
    ST_DECEL_2 = 3'd4,  // mirror of ST_ACCEL_1
    ST_DONE    = 3'd5   // profile finished, speed held at zero
  } stage_e;

  // Speed word width (um/s) and PWM period width (system clocks).
  localparam int unsigned SPEED_W = 16;
  localparam int unsigned CYCLE_W = 32;

endpackage
