// display_counter: the decimal display register.
//
// DIGITS cascaded decade stages count time-base pulses. With four digits and
// a decimal point ahead of the last digit the display reads the reactor
// period from 000.0 to 999.9 seconds. `digit[0]` is the tenths digit,
// `digit[DIGITS-1]` the most significant. After 9999 the register wraps to
// 0000, as the 7490 chain of the original does (nothing else is said about
// an overflow). `clr` clears all digits synchronously; `inc` adds one.
`timescale 1ns/1ps
module display_counter
  import period_meter_pkg::*;
#(
  parameter int unsigned DIGITS = DISPLAY_DIGITS
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic inc,
  output bcd_t digit [DIGITS]
);

  logic [DIGITS:0] en;

  assign en[0] = inc;

  for (genvar i = 0; i < DIGITS; i++) begin : g_digit
    decade_counter #(.MODULUS(10)) u_dec (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .en   (en[i]),
      .q    (digit[i]),
      .carry(en[i+1])
    );
  end

endmodule
