// display_logic: the display board.
//
// Counts the period-equivalent time base between the release of START and
// STOP, and drives the digit tubes. Made of:
//   display_gate      START/STOP flip-flop and enable gating;
//   timebase_divider  crystal / (PRESCALE * 10^DECADES) = 14.427 pulses/s;
//   display_counter   DIGITS decimal stages, tenths of period-seconds;
//   nixie_driver      one BCD-to-cathode driver per digit.
// Pressing START clears the dividers and the display; the reading then
// holds after STOP until the next START. The structure follows the
// original display board; placing the gate ahead of the dividers and
// clearing them with START is this design's reading of it.
// Clock: the crystal clock (7.213475 MHz). `start` and `stop` must already
// be synchronous to it. `tick` shows each time-base pulse.
`timescale 1ns/1ps
module display_logic
  import period_meter_pkg::*;
#(
  parameter int unsigned PRESCALE = PRESCALE_DIV,
  parameter int unsigned DECADES  = DIV_DECADES,
  parameter int unsigned DIGITS   = DISPLAY_DIGITS
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic       stop,
  output bcd_t       digit     [DIGITS],
  output logic [9:0] cathode_n [DIGITS],
  output logic       counting,
  output logic       tick
);

  logic gate_open, clear;

  display_gate u_gate (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .stop     (stop),
    .gate_open(gate_open),
    .count_en (counting),
    .clear    (clear)
  );

  timebase_divider #(.PRESCALE(PRESCALE), .DECADES(DECADES)) u_timebase (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clear),
    .en   (counting),
    .tick (tick)
  );

  display_counter #(.DIGITS(DIGITS)) u_display (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clear),
    .inc  (tick),
    .digit(digit)
  );

  for (genvar i = 0; i < DIGITS; i++) begin : g_drv
    nixie_driver u_drv (
      .bcd      (digit[i]),
      .cathode_n(cathode_n[i])
    );
  end

endmodule
