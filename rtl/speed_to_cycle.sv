// Speed to pulse-period converter.
//
// Turns a speed set-point v (um/s) into the pulse frequency the drive needs,
// f = K_HZ_PER_UMPS * v (Hz), and then into the period of that pulse train
// counted in system clocks, cycle = floor(F_CLK_HZ / f), which is the value
// the PWM model counts to. A speed of zero gives a period of zero, which
// stops the pulse output.
//
// The division is done by a sequential restoring divider, one quotient bit
// per clock (CYCLE_W clocks in all), far inside the 200 us between two speed
// refreshes. The converter starts whenever it is idle and its input differs
// from the speed it last converted, so it always catches up with the newest
// set-point even if v changes while a division runs. `cycle` and `freq`
// change together, one clock after the last quotient bit; `cycle_valid` is
// high for that clock.
//
// The factor k = 20 and the 50 MHz clock come from the design description;
// the divider, the rounding down and the change-driven start are this
// design's own choices.
module speed_to_cycle
  import s_curve_pkg::*;
#(
  parameter int unsigned F_CLK_HZ      = 50_000_000, // system clock frequency
  parameter int unsigned K_HZ_PER_UMPS = 20          // pulse Hz per um/s
) (
  input  logic               clk,
  input  logic               rst_n,        // asynchronous, active low
  input  logic [SPEED_W-1:0] v,            // speed set-point, um/s
  output logic [CYCLE_W-1:0] freq,         // pulse frequency, Hz
  output logic [CYCLE_W-1:0] cycle,        // pulse period, clk cycles (0 = stop)
  output logic               cycle_valid,  // one-clock strobe: cycle updated
  output logic               busy          // a division is running
);

  localparam int unsigned CNT_W = $clog2(CYCLE_W + 1);

  logic [SPEED_W-1:0] v_conv;     // speed being / last converted
  logic [CYCLE_W-1:0] divisor;    // K * v_conv
  logic [CYCLE_W-1:0] quo;        // dividend shifting out, quotient shifting in
  logic [CYCLE_W-1:0] rem;        // partial remainder (always below divisor)
  logic [CNT_W-1:0]   steps;

  logic [CYCLE_W:0]   rem_shift;
  logic               ge;
  assign rem_shift = {rem, quo[CYCLE_W-1]};
  assign ge        = (rem_shift >= {1'b0, divisor});

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_conv      <= '0;
      divisor     <= '0;
      quo         <= '0;
      rem         <= '0;
      steps       <= '0;
      busy        <= 1'b0;
      freq        <= '0;
      cycle       <= '0;
      cycle_valid <= 1'b0;
    end else begin
      cycle_valid <= 1'b0;
      if (!busy) begin
        if (v != v_conv) begin
          v_conv <= v;
          if (v == '0) begin
            freq        <= '0;
            cycle       <= '0;
            cycle_valid <= 1'b1;
          end else begin
            divisor <= CYCLE_W'(K_HZ_PER_UMPS) * CYCLE_W'(v);
            quo     <= CYCLE_W'(F_CLK_HZ);
            rem     <= '0;
            steps   <= '0;
            busy    <= 1'b1;
          end
        end
      end else if (32'(steps) == CYCLE_W) begin
        busy        <= 1'b0;
        freq        <= divisor;
        cycle       <= quo;
        cycle_valid <= 1'b1;
      end else begin
        rem   <= ge ? CYCLE_W'(rem_shift - {1'b0, divisor}) : CYCLE_W'(rem_shift);
        quo   <= {quo[CYCLE_W-2:0], ge};
        steps <= steps + 1'b1;
      end
    end
  end

endmodule
