// tb_adc_timing: checks the four-phase sequence of the A/D board timing and
// the freeze at CLOCK4. An independent phase counter predicts every phase;
// with the freeze request held the phase must stop at CLOCK4 and resume with
// CLOCK1 once the request falls. Also checks the step rate: one full
// CLOCK1..CLOCK4 cycle every four clocks.
`timescale 1ns/1ps
module tb_adc_timing;
  import period_meter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, freeze_req = 1'b0;
  phase_e phase;
  logic [3:0] clk_ph;
  logic frozen;
  int checks = 0, failures = 0;
  int exp_ph;
  int c4_count;

  adc_timing dut (.clk, .rst_n, .freeze_req, .phase, .clk_ph, .frozen);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t phase=%0d exp=%0d)", what, $time, phase, exp_ph);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    exp_ph = 0;
    c4_count = 0;
    // free run: 100 clocks, 25 CLOCK4 phases expected
    for (int i = 0; i < 100; i++) begin
      check(int'(phase) == exp_ph, "free-run phase");
      check(clk_ph == 4'(1 << exp_ph), "one-hot decode");
      check(!frozen, "not frozen");
      if (clk_ph[3]) c4_count++;
      @(negedge clk);
      exp_ph = (exp_ph + 1) % 4;
    end
    check(c4_count == 25, "rate: one step per four clocks");
    // request freeze while at CLOCK2: must run to CLOCK4 and hold
    while (phase != PH_CLOCK2) begin @(negedge clk); exp_ph = (exp_ph + 1) % 4; end
    freeze_req = 1'b1;
    check(!frozen, "no freeze before CLOCK4");
    repeat (2) @(negedge clk);
    exp_ph = 3;
    for (int i = 0; i < 20; i++) begin
      check(phase == PH_CLOCK4, "held at CLOCK4");
      check(frozen, "frozen flag");
      @(negedge clk);
    end
    freeze_req = 1'b0;
    #1;
    check(!frozen, "unfrozen when request falls");
    @(negedge clk);
    exp_ph = 0;
    check(phase == PH_CLOCK1, "resume at CLOCK1");
    // asynchronous reset returns to CLOCK1
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(phase == PH_CLOCK1, "reset to CLOCK1");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
