// nixie_driver: BCD to one-of-ten cathode driver, the function of a 7441.
//
// Pulls exactly one of ten Nixie cathodes low (`cathode_n[d]` = 0 lights
// digit d) for a BCD input 0..9. For the unused codes 10..15 all outputs
// stay high and the tube is blank; this is this design's own choice.
// Purely combinational.
`timescale 1ns/1ps
module nixie_driver
  import period_meter_pkg::*;
(
  input  bcd_t       bcd,
  output logic [9:0] cathode_n
);

  always_comb begin
    cathode_n = '1;
    if (bcd <= 4'd9) cathode_n[bcd] = 1'b0;
  end

endmodule
