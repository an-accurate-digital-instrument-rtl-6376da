// tb_calibration: the instrument's calibration procedure, run on the
// tracking converter with the analog front-end model.
//   * input shorted (0 V): the word must toggle between 0 and 1;
//   * -5 V input: the word must toggle between 254 and 255;
//   * -1 V input: the word must toggle around 1/5 of that, 50 and 51.
// It also checks that a full-scale step settles within about 0.01 s of
// 100 kHz clocks, the converter's resolution time.
`timescale 1ns/1ps
module tb_calibration;
  import period_meter_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic comp_up;
  logic [7:0] code;
  logic dir_up, frozen;
  phase_e phase;
  logic [3:0] clk_ph;
  real vin = 0.0;
  int checks = 0, failures = 0;

  tracking_adc dut (.clk, .rst_n, .comp_up, .start(1'b0), .code, .dir_up,
                    .phase, .clk_ph, .frozen);
  adc_frontend_model u_front (.vin(vin), .code(code), .comp_up(comp_up));

  always #5000 clk = ~clk;   // 100 kHz

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (code=%0d)", what, code); end
  endtask

  task automatic observe(input int lo, input string what);
    bit seen_lo = 0, seen_hi = 0;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      check(int'(code) == lo || int'(code) == lo + 1, what);
      if (int'(code) == lo) seen_lo = 1;
      if (int'(code) == lo + 1) seen_hi = 1;
    end
    check(seen_lo && seen_hi, {what, ": both counts seen"});
  endtask

  initial begin
    #1.0e9;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    repeat (40) @(negedge clk);
    observe(0, "shorted input toggles 0/1");
    vin = 5.0;
    n = 0;
    while (code < 8'd254 && n < 5000) begin @(negedge clk); n++; end
    $display("full-scale step settled in %0d clocks (%.2f ms)", n, real'(n) * 0.01);
    check(n <= 1100, "full-scale resolution time about 0.01 s");
    observe(254, "-5 V toggles 254/255");
    vin = 1.0;
    repeat (1200) @(negedge clk);
    observe(50, "-1 V toggles 50/51");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
