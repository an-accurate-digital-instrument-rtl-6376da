// display_gate: the input gate of the display board.
//
// A set/reset flip-flop (a NAND-NAND latch in the original) is set while the
// START push button is pressed and cleared by the STOP signal of the decision
// logic. Counting is enabled (`count_en`, the NOR and NAND gates of the
// original) only while the flip-flop is set and START has been released, so
// the measured interval runs from the release of START to STOP.
// If START and STOP are high together, START wins (this design's choice; a
// NAND-NAND latch with both inputs active has no defined state).
// `clear` is high while START is pressed: the display is reset then.
// Inputs must be synchronous to clk.
`timescale 1ns/1ps
module display_gate (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  logic stop,
  output logic gate_open,
  output logic count_en,
  output logic clear
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     gate_open <= 1'b0;
    else if (start) gate_open <= 1'b1;
    else if (stop)  gate_open <= 1'b0;
  end

  assign count_en = gate_open && !start && !stop;
  assign clear    = start;

endmodule
