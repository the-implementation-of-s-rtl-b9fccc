// Testbench for refresh_tick at its default 10000-clock (200 us at 50 MHz)
// refresh period: checks the distance from reset to the first strobe, the
// distance between strobes and that each strobe lasts one clock.
module tb_refresh_tick;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic tick;

  int checks = 0;
  int failures = 0;

  refresh_tick dut (.clk, .rst_n, .tick);

  always #10 clk = ~clk;  // 50 MHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    int cyc;
    int last;
    int n;
    repeat (3) @(negedge clk);
    check(!tick, "no strobe in reset");
    rst_n = 1'b1;
    cyc = 0;
    last = 0;
    n = 0;
    while (n < 6) begin
      @(posedge clk);
      #1;
      cyc++;
      if (tick) begin
        check(cyc - last == 10000, $sformatf("strobe %0d after %0d clocks, expected 10000", n, cyc - last));
        last = cyc;
        n++;
        @(posedge clk);
        #1;
        cyc++;
        check(!tick, "strobe lasts one clock");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
