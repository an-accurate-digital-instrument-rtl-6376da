// tb_tracking_adc: the tracking converter against a comparator model.
//
// The model compares an ideal analog level x (in counts, may be fractional)
// with the converter word: comp_up = (x > code). Checks:
//  * a full-scale step from 0 reaches 255 in 255 steps of four clocks;
//  * in the steady state the word toggles between floor(x) and ceil(x);
//  * a slow ramp is followed within one count at every CLOCK4;
//  * with START held the timing freezes at CLOCK4 on the upper count and the
//    word stays constant; it tracks again after START is released;
//  * the word saturates at 0 and 255.
`timescale 1ns/1ps
module tb_tracking_adc;
  import period_meter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  real  x = 0.0;
  logic comp_up;
  logic [7:0] code;
  logic dir_up, frozen;
  phase_e phase;
  logic [3:0] clk_ph;
  int checks = 0, failures = 0;

  assign comp_up = (x > real'(code));

  tracking_adc dut (.clk, .rst_n, .comp_up, .start, .code, .dir_up, .phase,
                    .clk_ph, .frozen);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t code=%0d x=%f)", what, $time, code, x);
    end
  endtask

  function automatic int fl(real v);
    return int'($floor(v));
  endfunction

  initial begin
    #5000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int cycles;
  int lo, hi;
  bit seen_lo, seen_hi;

  initial begin
    repeat (2) @(negedge clk);
    check(code == 8'd0, "reset code");
    // full-scale step
    x = 300.0;
    rst_n = 1'b1;
    cycles = 0;
    while (code != 8'd255 && cycles < 5000) begin @(negedge clk); cycles++; end
    // 255 steps; the first up-step lands at the end of the second CLOCK2
    // after reset is released at CLOCK1: 4*255 - 2 clocks.
    check(cycles == 4 * 255 - 2, $sformatf("full-scale step time %0d clocks", cycles));
    repeat (40) @(negedge clk);
    check(code == 8'd255, "saturates at 255");
    // settle on a fractional level and look at the toggling
    x = 100.4;
    repeat (4 * 200) @(negedge clk);
    seen_lo = 0; seen_hi = 0;
    for (int i = 0; i < 80; i++) begin
      @(negedge clk);
      check(code == 8'd100 || code == 8'd101, "toggle between bracketing counts");
      if (code == 8'd100) seen_lo = 1;
      if (code == 8'd101) seen_hi = 1;
    end
    check(seen_lo && seen_hi, "both counts seen");
    // slow ramp: 1 count per 40 clocks, checked each CLOCK4
    for (int i = 0; i < 4000; i++) begin
      x = 100.4 + real'(i) / 40.0;
      @(negedge clk);
      if (phase == PH_CLOCK4)
        check(int'(code) >= fl(x) - 1 && int'(code) <= fl(x) + 1, "ramp tracking");
    end
    // START: freeze at CLOCK4 after an up step, on the upper count
    x = 57.5;
    repeat (4 * 200) @(negedge clk);
    start = 1'b1;
    repeat (12) @(negedge clk);
    check(frozen, "frozen while START held");
    check(phase == PH_CLOCK4, "frozen at CLOCK4");
    check(dir_up, "frozen after an up step");
    check(code == 8'd58, "frozen on upper count");
    x = 20.0;   // input moves, word must not
    for (int i = 0; i < 50; i++) begin
      @(negedge clk);
      check(code == 8'd58, "word held while frozen");
    end
    start = 1'b0;
    repeat (4 * 60) @(negedge clk);
    check(code == 8'd20 || code == 8'd19, "tracks again after release");
    // saturation at zero
    x = -3.0;
    repeat (4 * 40) @(negedge clk);
    check(code == 8'd0, "saturates at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
