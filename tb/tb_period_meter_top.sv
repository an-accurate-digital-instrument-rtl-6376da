// tb_period_meter_top: end-to-end reactor period measurements with the whole
// instrument at its real size and clock rates (100 kHz A/D clock,
// 7.213475 MHz crystal, divide by 500000, four digits).
//
// The reactor power signal is v(t) = v0 * exp(t / T) volts (0 to 5 V
// magnitude), fed through the analog front-end model to the comparator input.
// For each measurement the signal runs steadily for 30 ms so the converter
// locks on, START is held for 1 ms, and the reading is taken after STOP.
// Expected reading: 10 * |T| (period in tenths of a second). The allowed
// error is the instrument's worst case 0.71 / K percent (K = P0 / full scale)
// plus one count of display quantisation and the button time.
// Measurements:
//   1. T = +20 s from just under half scale (doubling, best-accuracy
//      range; the power must be able to double within full scale);
//   2. T = -10 s from near full scale (halving; P0 >= 128 so the MSB clamp
//      must suppress the false doubling carry);
//   3. T = +10 s from 0.2 of full scale (lower accuracy range);
//   4. T = +10 s from 0.1 of full scale (worst range, 7.1 % bound).
// About 35 s of instrument time are simulated.
// Each mechanism is counted: up and down converter steps, freeze at CLOCK4,
// STOP by doubling, STOP by halving, MSB clamp, time-base ticks and the
// display clear; one that never happens is a failure.
`timescale 1ns/1ps
module tb_period_meter_top;
  import period_meter_pkg::*;

  localparam real T_ADC  = 10000.0;             // ns, 100 kHz
  localparam real T_XTAL = 1.0e9 / 7213475.0;   // ns

  logic clk_adc = 1'b0, clk_xtal = 1'b0, rst_n = 1'b0, start_btn = 1'b0;
  logic comp_up;
  logic [7:0] dac_code, p0;
  logic adc_frozen, stop, counting, dir_up, doubled, halved, inhibit, tick;
  bcd_t digit [4];
  logic [9:0] cathode_n [4];

  real vin = 0.0;
  real v0 = 0.0, period = 1.0, t_ref = 0.0;

  int checks = 0, failures = 0;
  int n_up = 0, n_down = 0, n_freeze = 0, n_stop_double = 0, n_stop_half = 0;
  int n_inhibit = 0, n_tick = 0, n_clear = 0;
  logic [7:0] code_q;
  logic stop_q, frozen_q;

  period_meter_top dut (
    .clk_adc, .clk_xtal, .rst_n, .start_btn, .comp_up, .dac_code, .p0,
    .adc_frozen, .stop, .counting, .dir_up, .doubled, .halved, .inhibit,
    .tick, .digit, .cathode_n
  );

  adc_frontend_model u_front (.vin(vin), .code(dac_code), .comp_up(comp_up));

  always #(T_ADC / 2.0)  clk_adc  = ~clk_adc;
  always #(T_XTAL / 2.0) clk_xtal = ~clk_xtal;

  // power signal, updated every A/D clock
  always @(negedge clk_adc) begin
    vin = v0 * $exp((($realtime - t_ref) * 1.0e-9) / period);
    if (vin > 6.0) vin = 6.0;
  end

  // mechanism counters
  always @(posedge clk_adc) begin
    code_q   <= dac_code;
    stop_q   <= stop;
    frozen_q <= adc_frozen;
    if (rst_n) begin
      if (dac_code > code_q) n_up++;
      if (dac_code < code_q) n_down++;
      if (adc_frozen && !frozen_q) n_freeze++;
      if (stop && !stop_q && doubled) n_stop_double++;
      if (stop && !stop_q && halved) n_stop_half++;
      if (inhibit && !start_btn) n_inhibit++;
    end
  end
  always @(posedge clk_xtal) if (tick) n_tick++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real rabs(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int shown();
    return int'(digit[3]) * 1000 + int'(digit[2]) * 100 + int'(digit[1]) * 10
           + int'(digit[0]);
  endfunction

  task automatic measure(input real v_start, input real t_period, input string name);
    real k, tol_pct, expect_cnt, err;
    int  reading;
    // signal chosen so that v = v_start when START is released
    period = t_period;
    t_ref  = $realtime + 31.0e6;
    v0     = v_start;
    repeat (3000) @(posedge clk_adc);          // 30 ms: converter locks on
    start_btn = 1'b1;
    repeat (100) @(posedge clk_adc);           // 1 ms press
    check(adc_frozen, {name, ": converter frozen while START held"});
    check(shown() == 0, {name, ": display cleared by START"});
    if (shown() == 0) n_clear++;
    check(dir_up, {name, ": frozen after an up step"});
    check(rabs(real'(dac_code) - vin * 254.5 / 5.0) <= 1.0,
          {name, ": frozen word matches input"});
    start_btn = 1'b0;
    // wait for the gate to open, then for STOP
    wait (counting);
    wait (!counting);
    repeat (10) @(posedge clk_adc);
    reading    = shown();
    k          = real'(p0) / 255.0;
    tol_pct    = 0.71 / k + 0.2;
    expect_cnt = 10.0 * rabs(t_period);
    err        = rabs(real'(reading) - expect_cnt);
    $display("%s: P0=%0d K=%.2f reading %0d.%0d s, expected %.1f s (error %.2f %%)",
             name, p0, k, reading / 10, reading % 10, expect_cnt / 10.0,
             100.0 * err / expect_cnt);
    check(err <= expect_cnt * tol_pct / 100.0 + 1.0,
          $sformatf("%s: reading %0d within %.2f %% of %.0f", name, reading, tol_pct,
                    expect_cnt));
    for (int d = 0; d < 4; d++)
      check(cathode_n[d] == ~(10'd1 << digit[d]), {name, ": cathode drive"});
    repeat (1000) @(posedge clk_adc);
    check(shown() == reading, {name, ": reading held"});
  endtask

  initial begin
    #60.0e9;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #25000;
    rst_n = 1'b1;
    measure(2.4, 20.0, "positive T=20.0 s from K=0.48");
    measure(4.8, -10.0, "negative T=-10.0 s from K=0.96");
    measure(1.0, 10.0, "positive T=10.0 s from K=0.2");
    measure(0.5, 10.0, "positive T=10.0 s from K=0.1");
    check(n_up > 0,          "mechanism: converter step up");
    check(n_down > 0,        "mechanism: converter step down");
    check(n_freeze >= 4,     "mechanism: freeze at CLOCK4 on START");
    check(n_stop_double >= 3, "mechanism: STOP on doubling");
    check(n_stop_half >= 1,  "mechanism: STOP on halving");
    check(n_inhibit > 0,     "mechanism: MSB clamp of the doubling carry");
    check(n_tick > 0,        "mechanism: time-base ticks");
    check(n_clear >= 4,      "mechanism: display clear by START");
    $display("mechanisms: up=%0d down=%0d freeze=%0d stop_double=%0d stop_half=%0d inhibit=%0d ticks=%0d clears=%0d",
             n_up, n_down, n_freeze, n_stop_double, n_stop_half, n_inhibit, n_tick, n_clear);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
