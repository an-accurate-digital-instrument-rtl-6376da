// decision_logic: decides when the reactor power has doubled or halved.
//
// On STROBE (the START push button) the present converter word is copied
// into the P0 register; like the two 7475 latches of the instrument it
// follows the word while STROBE is high and holds it once STROBE falls.
// The inverted register value L' = ~P0 feeds two W-bit adder chains:
//   chain 1 adds code + {L'[W-2:0], 1} + carry-in 1. Its carry-out is 1
//           exactly when code >= 2*P0 (power has doubled).
//   chain 2 adds code + {1, L'[W-1:1]} with carry-in 0. Its carry-out is 0
//           exactly when code <= floor(P0/2) (power has halved).
// When P0 has its top bit set, chain 1 would carry at once (2*P0 does not
// fit in W bits); the instrument clamps that carry with a diode to L'[W-1],
// which is modelled as an AND with L'[W-1]. `inhibit` shows the clamp
// acting. The doubled and halved terms are ORed and gated with CLOCK4,
// when the converter word is quiet, to form STOP.
//
// Timing: `stop` is registered, so it is high during the clock after a
// CLOCK4 phase in which the power had doubled or halved (10 us late at
// 100 kHz). The original drives STOP straight from the gate; the register is
// this design's own choice, so the signal can be passed safely to the
// display board's clock domain. `doubled`, `halved` and `inhibit` are the
// ungated, combinational adder-chain decisions.
`timescale 1ns/1ps
module decision_logic
  import period_meter_pkg::*;
#(
  parameter int unsigned W = ADC_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         strobe,
  input  logic [W-1:0] code,
  input  logic         clock4,
  output logic [W-1:0] p0,
  output logic         doubled,
  output logic         halved,
  output logic         inhibit,
  output logic         stop
);

  logic [W-1:0] l_n;         // inverted latch outputs
  logic [W-1:0] l_star;      // shifted left, LSD tied to 1
  logic [W-1:0] l_dstar;     // shifted right, MSD tied to 1
  logic [W:0]   sum1, sum2;
  logic         carry1;

  // P0 register: transparent while STROBE is high.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      p0 <= '0;
    else if (strobe) p0 <= code;
  end

  assign l_n     = ~p0;
  assign l_star  = {l_n[W-2:0], 1'b1};
  assign l_dstar = {1'b1, l_n[W-1:1]};

  assign sum1 = {1'b0, code} + {1'b0, l_star} + (W+1)'(1);
  assign sum2 = {1'b0, code} + {1'b0, l_dstar};

  assign carry1  = sum1[W];
  assign doubled = carry1 & l_n[W-1];
  assign inhibit = carry1 & ~l_n[W-1];
  assign halved  = ~sum2[W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) stop <= 1'b0;
    else        stop <= clock4 & (doubled | halved);
  end

endmodule
