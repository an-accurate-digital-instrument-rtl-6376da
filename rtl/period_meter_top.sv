// period_meter_top: digital reactor period meter.
//
// Measures how long the reactor power takes to double (positive period) or
// to halve (negative period) and displays it as reactor period
// T = t_double / ln 2, in tenths of a second, on four decimal digits.
//
//   clk_adc domain (A/D board clock, about 100 kHz):
//     tracking_adc    follows the 0 to -5 V power signal with an 8-bit
//                     up/down counter; `dac_code` drives the external DAC and
//                     `comp_up` is the external comparator's answer.
//     decision_logic  latches P0 while START is pressed and raises STOP when
//                     the converter word reaches 2*P0 or falls to P0/2.
//   clk_xtal domain (7.213475 MHz crystal):
//     display_logic   counts 14.427 pulses/s from the release of START until
//                     STOP, and drives the Nixie cathodes.
// The partition into three boards, the two clocks and all widths and ratios
// follow the original instrument. This design's own additions are the
// reset, the synchronisers and the registered STOP: START (`start_btn`, high
// while pressed, assumed debounced) is synchronised into both domains and
// STOP into the crystal domain.
// The analog parts (DAC, comparator, both oscillators, tubes) are outside: their
// signals are the ports below. `dir_up`, `doubled`, `halved`, `inhibit` and
// `tick` are status outputs for observation (converter direction, the two
// adder-chain decisions, the MSB clamp acting, and each time-base pulse).
`timescale 1ns/1ps
module period_meter_top
  import period_meter_pkg::*;
#(
  parameter int unsigned ADC_W    = ADC_BITS,
  parameter int unsigned PRESCALE = PRESCALE_DIV,
  parameter int unsigned DECADES  = DIV_DECADES,
  parameter int unsigned DIGITS   = DISPLAY_DIGITS
) (
  input  logic             clk_adc,
  input  logic             clk_xtal,
  input  logic             rst_n,
  input  logic             start_btn,
  input  logic             comp_up,
  output logic [ADC_W-1:0] dac_code,
  output logic [ADC_W-1:0] p0,
  output logic             adc_frozen,
  output logic             stop,
  output logic             counting,
  output logic             dir_up,
  output logic             doubled,
  output logic             halved,
  output logic             inhibit,
  output logic             tick,
  output bcd_t             digit     [DIGITS],
  output logic [9:0]       cathode_n [DIGITS]
);

  logic       start_adc, start_xtal, stop_xtal;
  phase_e     phase;
  logic [3:0] clk_ph;

  // ---------------- A/D board and decision logic ----------------
  sync2 u_sync_start_adc (
    .clk  (clk_adc),
    .rst_n(rst_n),
    .d    (start_btn),
    .q    (start_adc)
  );

  tracking_adc #(.W(ADC_W)) u_adc (
    .clk    (clk_adc),
    .rst_n  (rst_n),
    .comp_up(comp_up),
    .start  (start_adc),
    .code   (dac_code),
    .dir_up (dir_up),
    .phase  (phase),
    .clk_ph (clk_ph),
    .frozen (adc_frozen)
  );

  decision_logic #(.W(ADC_W)) u_decision (
    .clk    (clk_adc),
    .rst_n  (rst_n),
    .strobe (start_adc),
    .code   (dac_code),
    .clock4 (clk_ph[3]),
    .p0     (p0),
    .doubled(doubled),
    .halved (halved),
    .inhibit(inhibit),
    .stop   (stop)
  );

  // ---------------- display board ----------------
  sync2 u_sync_start_xtal (
    .clk  (clk_xtal),
    .rst_n(rst_n),
    .d    (start_btn),
    .q    (start_xtal)
  );

  sync2 u_sync_stop_xtal (
    .clk  (clk_xtal),
    .rst_n(rst_n),
    .d    (stop),
    .q    (stop_xtal)
  );

  display_logic #(
    .PRESCALE(PRESCALE),
    .DECADES (DECADES),
    .DIGITS  (DIGITS)
  ) u_display (
    .clk      (clk_xtal),
    .rst_n    (rst_n),
    .start    (start_xtal),
    .stop     (stop_xtal),
    .digit    (digit),
    .cathode_n(cathode_n),
    .counting (counting),
    .tick     (tick)
  );

endmodule
