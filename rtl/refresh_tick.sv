// Speed refresh strobe generator.
//
// Divides the system clock down to the speed refresh rate: `tick` is high
// for one clock every TICK_CLKS clocks (10000 clocks = 200 us at 50 MHz),
// the first time TICK_CLKS clocks after reset is released. It stands in for
// the refresh clock that paces the S-curve generator; producing it as a
// clock enable in the system clock domain, rather than as a clock of its
// own, is this design's choice. The 200 us refresh period and the 50 MHz
// clock follow the design description.
module refresh_tick #(
  parameter int unsigned TICK_CLKS = 10000  // system clocks per refresh
) (
  input  logic clk,
  input  logic rst_n,  // asynchronous, active low
  output logic tick    // one-clock refresh strobe
);

  localparam int unsigned CNT_W = (TICK_CLKS > 1) ? $clog2(TICK_CLKS) : 1;

  logic [CNT_W-1:0] count;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      tick  <= 1'b0;
    end else if (32'(count) == TICK_CLKS - 1) begin
      count <= '0;
      tick  <= 1'b1;
    end else begin
      count <= count + 1'b1;
      tick  <= 1'b0;
    end
  end

endmodule
