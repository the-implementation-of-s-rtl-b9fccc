// PWM speed regulation model: variable-frequency pulse generator with a
// fixed 50% duty ratio.
//
// A buffer register (`compare_reg`) holds the pulse period in system clocks.
// A cycle counter (`compare_count`) advances by one every clock. A comparator
// sets `clkout` high when the counter equals half the period and low again
// when it equals the full period, at which point the counter restarts at 1.
// In steady state the counter therefore runs 1..C, giving a period of
// exactly C clocks: low for C/2 clocks, high for C - C/2 clocks.
//
// The buffer register reloads from the `cycle` input only at the end of a
// pulse period (and whenever it holds zero), so a new speed never cuts a
// pulse short. A period of zero stops the generator with `clkout` low; the
// pulse in progress is completed first.
//
// The counter, comparator and register structure, the 50% duty, the stop on
// zero and the 32-bit period follow the design description. Loading the
// register at the period end is how this design reads the "comparator reset"
// path from the counter to the register. The first period after leaving the
// stopped state starts the counter at 0 and so lasts C + 1 clocks. Periods
// below 2 clocks cannot form a 50% pulse and are not meaningful.
//
// Interface: `rst_n` is asynchronous and active low; `cycle` may change at
// any time; `clkout` is a registered output.
module pwm_module
  import s_curve_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic [CYCLE_W-1:0] cycle,          // pulse period in clk cycles, 0 = stop
  output logic               clkout,         // pulse output to the drive
  output logic [CYCLE_W-1:0] compare_reg,    // period in use
  output logic [CYCLE_W-1:0] compare_count   // cycle counter
);

  logic [CYCLE_W-1:0] duty;
  assign duty = compare_reg >> 1;  // half period: the rising-edge point

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      compare_reg   <= '0;
      compare_count <= '0;
      clkout        <= 1'b0;
    end else if (compare_reg == '0) begin
      // Stopped: wait for a period to be loaded.
      compare_reg   <= cycle;
      compare_count <= '0;
      clkout        <= 1'b0;
    end else if (compare_count == compare_reg) begin
      // End of the pulse period: output low, restart, take the new period.
      clkout        <= 1'b0;
      compare_count <= CYCLE_W'(1);
      compare_reg   <= cycle;
    end else if (compare_count == duty) begin
      clkout        <= 1'b1;
      compare_count <= compare_count + 1'b1;
    end else begin
      compare_count <= compare_count + 1'b1;
    end
  end

  // The counter never passes the period it counts to.
  a_count_in_period: assert property (
    @(posedge clk) disable iff (!rst_n)
    compare_reg != '0 |-> compare_count <= compare_reg
  ) else $error("pwm_module: counter %0d beyond period %0d", compare_count, compare_reg);

endmodule
