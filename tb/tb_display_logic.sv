// tb_display_logic: the display board with a shortened time base (divide by
// 5 * 10 = 50 instead of 5 * 10^5, everything else as built). START clears
// the display; after its release the board must count exactly
// floor(N / 50) time-base pulses for N enabled clocks until STOP, show them
// as four BCD digits with matching Nixie cathodes, and hold the reading
// after STOP. Two measurements are made; the second also checks that START
// clears the reading of the first.
`timescale 1ns/1ps
module tb_display_logic;
  import period_meter_pkg::*;
  localparam int RATIO = 50;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  bcd_t digit [4];
  logic [9:0] cathode_n [4];
  logic counting, tick;
  int checks = 0, failures = 0;

  display_logic #(.DECADES(1)) dut (.clk, .rst_n, .start, .stop, .digit,
                                    .cathode_n, .counting, .tick);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  function automatic int shown();
    return int'(digit[3]) * 1000 + int'(digit[2]) * 100 + int'(digit[1]) * 10
           + int'(digit[0]);
  endfunction

  task automatic measure(input int n_clocks);
    int n;
    start = 1'b1;
    repeat (5) @(negedge clk);
    check(shown() == 0, "display cleared by START");
    start = 1'b0;
    n = 0;
    #1;
    while (n < n_clocks) begin
      if (counting) n++;
      @(negedge clk);
      #1;
    end
    stop = 1'b1;
    @(negedge clk);
    stop = 1'b0;
    check(!counting, "gate closed after STOP");
    check(shown() == n_clocks / RATIO,
          $sformatf("reading %0d for %0d clocks", shown(), n_clocks));
    for (int d = 0; d < 4; d++)
      check(cathode_n[d] == ~(10'd1 << digit[d]), "cathode drive");
    repeat (200) @(negedge clk);
    check(shown() == n_clocks / RATIO, "reading held after STOP");
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
    measure(12345);
    measure(51 * 50 + 49);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
