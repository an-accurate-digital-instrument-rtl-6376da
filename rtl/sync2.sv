// sync2: two flip-flop synchroniser for a level signal entering a clock
// domain (START into both boards, STOP into the display board). The output
// follows the input two clocks late. Reset value is 0. The original
// instrument has no synchroniser; this is this design's own addition for
// its two independent clocks.
`timescale 1ns/1ps
module sync2 (
  input  logic clk,
  input  logic rst_n,
  input  logic d,
  output logic q
);

  logic meta;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end

endmodule
