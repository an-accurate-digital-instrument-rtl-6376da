// adc_timing: clock and timing circuit of the A/D converter board.
//
// A two-stage binary counter, clocked by the board's free-running clock
// (about 100 kHz), is decoded into four one-hot timing phases CLOCK1..CLOCK4,
// each one clock long, so one conversion step takes four clocks (about
// 25 kHz). The decode is a plain one-hot compare, as the four NOR gates do.
//
// Freeze: while `freeze_req` is high and the counter has reached CLOCK4, the
// counter holds, so the phase sits at CLOCK4 and the converter word cannot
// change. The instrument freezes this way while START is pressed so that the
// word copied into the decision logic is free of switching transients. When
// `freeze_req` falls the sequence resumes with CLOCK1 on the next clock.
//
// Interface: `phase` is the current phase, `clk_ph[i]` is high during phase
// CLOCK(i+1), `frozen` is high while the counter is held at CLOCK4.
// Reset (asynchronous, active low) starts the sequence at CLOCK1; the original
// free-running counter has no reset, so this is this design's own choice.
`timescale 1ns/1ps
module adc_timing
  import period_meter_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       freeze_req,
  output phase_e     phase,
  output logic [3:0] clk_ph,
  output logic       frozen
);

  logic [1:0] cnt_q;

  assign frozen = freeze_req && (cnt_q == 2'd3);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt_q <= 2'd0;
    else if (!frozen) cnt_q <= cnt_q + 2'd1;
  end

  assign phase = phase_e'(cnt_q);

  always_comb begin
    for (int i = 0; i < 4; i++) clk_ph[i] = (cnt_q == 2'(i));
  end

endmodule
