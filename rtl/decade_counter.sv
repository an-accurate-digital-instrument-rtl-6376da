// decade_counter: one synchronous counting stage in the style of a 7490.
//
// Counts 0 .. MODULUS-1 on every clock with `en` high and wraps to 0.
// MODULUS = 10 gives a decade (BCD) stage, MODULUS = 5 the divide-by-five
// section of a 7490. `carry` is high in the clock where the stage wraps, so
// stages chain by feeding one stage's `carry` to the next stage's `en`
// (a synchronous version of the ripple chain of the original counters).
// `clr` clears the stage synchronously and wins over `en`; `rst_n` clears
// it asynchronously.
`timescale 1ns/1ps
module decade_counter
  import period_meter_pkg::*;
#(
  parameter int unsigned MODULUS = 10
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output bcd_t q,
  output logic carry
);

  localparam bcd_t LAST = bcd_t'(MODULUS - 1);

  assign carry = en && (q == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     q <= '0;
    else if (clr)   q <= '0;
    else if (carry) q <= '0;
    else if (en)    q <= q + 1'b1;
  end

endmodule
