// timebase_divider: crystal-to-period time base of the display board.
//
// Reactor period T equals doubling time divided by ln 2 = 0.69315, so a
// display counting tenths of period-seconds needs 10 / 0.69315 = 14.427
// pulses per real second. The crystal runs at 7.213475 MHz = 5 * 1.442695 MHz
// and is divided by 5 and then by DECADES decade stages (10^5 by default):
// 7 213 475 / 500 000 = 14.42695 pulses per second.
//
// The chain is one divide-by-five stage followed by DECADES divide-by-ten
// stages, all decade_counter instances enabled by the carry of the stage
// before. `tick` is one clock wide, once every PRESCALE * 10^DECADES clocks
// with `en` high. `clr` restarts the whole chain (the display is reset by
// START). Gating the crystal pulses ahead of the dividers with `en`, so the
// dividers start from zero with each measurement, is this design's reading
// of the "gated counter".
`timescale 1ns/1ps
module timebase_divider
  import period_meter_pkg::*;
#(
  parameter int unsigned PRESCALE = PRESCALE_DIV,
  parameter int unsigned DECADES  = DIV_DECADES
) (
  input  logic clk,
  input  logic rst_n,
  input  logic clr,
  input  logic en,
  output logic tick
);

  logic [DECADES:0] stage_en;   // stage_en[i+1] is the carry out of stage i
  bcd_t             stage_q [DECADES+1];

  assign stage_en[0] = en;

  decade_counter #(.MODULUS(PRESCALE)) u_prescale (
    .clk  (clk),
    .rst_n(rst_n),
    .clr  (clr),
    .en   (stage_en[0]),
    .q    (stage_q[0]),
    .carry(stage_en[1])
  );

  for (genvar i = 1; i <= DECADES; i++) begin : g_dec
    logic carry_out;
    decade_counter #(.MODULUS(10)) u_dec (
      .clk  (clk),
      .rst_n(rst_n),
      .clr  (clr),
      .en   (stage_en[i]),
      .q    (stage_q[i]),
      .carry(carry_out)
    );
    if (i < DECADES) begin : g_link
      assign stage_en[i+1] = carry_out;
    end else begin : g_last
      assign tick = carry_out;
    end
  end

endmodule
