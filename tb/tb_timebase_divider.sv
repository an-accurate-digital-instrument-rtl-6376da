// tb_timebase_divider: the crystal-to-period divider at its full size.
//
// With the default 5 * 10^5 ratio a tick must come exactly once per 500000
// enabled clocks (7.213475 MHz / 500000 = 14.427 pulses/s). The enable is
// dropped at random for short stretches, which must only delay the tick;
// a clear in mid-count must restart the full 500000-clock interval.
`timescale 1ns/1ps
module tb_timebase_divider;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  logic tick;
  int checks = 0, failures = 0;
  int enabled = 0, ticks = 0;

  localparam int RATIO = 500000;

  timebase_divider dut (.clk, .rst_n, .clr, .en, .tick);

  always #2 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (enabled=%0d ticks=%0d)", what, enabled, ticks);
    end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // three intervals with a random enable
    while (ticks < 3) begin
      en = ($urandom % 16) != 0;
      #1;
      if (en) enabled++;
      if (tick) begin
        ticks++;
        check(en, "tick only when enabled");
        check(enabled == ticks * RATIO, $sformatf("tick after %0d enabled clocks", enabled));
      end else if (en && enabled % RATIO == 0) begin
        check(1'b0, "missing tick");
      end
      @(negedge clk);
    end
    // clear in mid-count restarts the interval
    en = 1'b1;
    repeat (123457) @(negedge clk);
    clr = 1'b1; @(negedge clk); clr = 1'b0;
    enabled = 0;
    while (!tick && enabled < 2 * RATIO) begin #1; enabled++; @(negedge clk); end
    // `enabled` counts the clocks before the one that carries the tick
    check(enabled + 1 == RATIO, $sformatf("tick on clock %0d after clear", enabled + 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
