// tracking_adc: digital half of the tracking analog-to-digital converter.
//
// The converter word `code` drives an external current-output DAC whose
// current is summed at a node with the input signal; a comparator reports
// which side is larger (`comp_up` = 1: input above the DAC, count up).
// Each conversion step takes the four timing phases of adc_timing:
//   CLOCK1  the direction flip-flop samples `comp_up`;
//   CLOCK2  the up/down counter (a 74193 pair in the original) steps one
//           count in that direction; the new value appears at the end of
//           CLOCK2;
//   CLOCK3, CLOCK4  no change.
// In the steady state the word therefore toggles between the two counts that
// bracket the input, and a full-scale step is followed in 255 steps
// (1020 clocks, about 10 ms at 100 kHz).
//
// START handling follows the instrument: START is gated with CLOCK4 and with
// the Up direction, so the timing freezes at CLOCK4 only after a step up.
// The frozen word is then always the upper of the two toggling counts, which
// halves the end-of-measurement uncertainty.
//
// This design's own choices: the counter saturates at 0 and at 2^W-1 instead
// of wrapping like a bare 74193 (the input can reach 120 % of range), and an
// asynchronous active-low reset clears the word and the direction flip-flop.
//
// Interface: clk is the A/D board clock, `start` the (synchronised) START
// push button, level high while pressed. `frozen` is high while the timing is
// held at CLOCK4; `clk_ph` gives the four phases for the decision logic.
`timescale 1ns/1ps
module tracking_adc
  import period_meter_pkg::*;
#(
  parameter int unsigned W = ADC_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         comp_up,
  input  logic         start,
  output logic [W-1:0] code,
  output logic         dir_up,
  output phase_e       phase,
  output logic [3:0]   clk_ph,
  output logic         frozen
);

  localparam logic [W-1:0] MAXCODE = '1;

  logic dir_q;

  adc_timing u_timing (
    .clk       (clk),
    .rst_n     (rst_n),
    .freeze_req(start && dir_q),
    .phase     (phase),
    .clk_ph    (clk_ph),
    .frozen    (frozen)
  );

  // Direction flip-flop, loaded at CLOCK1.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 dir_q <= 1'b0;
    else if (phase == PH_CLOCK1) dir_q <= comp_up;
  end

  // Reversible counter, stepped at the trailing edge of CLOCK2.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) code <= '0;
    else if (phase == PH_CLOCK2) begin
      if (dir_q && code != MAXCODE) code <= code + 1'b1;
      else if (!dir_q && code != '0) code <= code - 1'b1;
    end
  end

  assign dir_up = dir_q;

endmodule
