// period_meter_pkg: types and constants shared by the reactor period meter.
//
// The instrument measures the time the reactor power takes to double (or to
// halve) and shows it as reactor period in tenths of a second. The converter
// word width, the four timing phases of the A/D board and the BCD digit type
// live here so every board module agrees on them.
//
// Numbers that follow the instrument as described: an 8-bit converter word,
// four clock phases CLOCK1..CLOCK4, a 7.213475 MHz crystal divided by
// 5 * 10^5 to give 14.427 pulses per second, and four display decades.
`timescale 1ns/1ps
package period_meter_pkg;

  // Width of the tracking A/D converter word.
  localparam int unsigned ADC_BITS = 8;

  // Timing phases of the A/D board, decoded from a two-stage binary counter.
  typedef enum logic [1:0] {
    PH_CLOCK1 = 2'd0,  // direction flip-flop samples the comparator
    PH_CLOCK2 = 2'd1,  // up/down pulse; counter steps at the end of it
    PH_CLOCK3 = 2'd2,  // idle phase
    PH_CLOCK4 = 2'd3   // quiet phase: STOP is gated here, START freezes here
  } phase_e;

  // One decimal digit as held by a 7490 decade counter.
  typedef logic [3:0] bcd_t;

  // Display time base: crystal frequency and total division ratio.
  localparam longint unsigned XTAL_HZ       = 64'd7_213_475;
  localparam int unsigned     PRESCALE_DIV  = 5;   // divide-by-five section
  localparam int unsigned     DIV_DECADES   = 5;   // five divide-by-ten stages
  localparam int unsigned     DISPLAY_DIGITS = 4;  // 999.9 s full scale

endpackage
