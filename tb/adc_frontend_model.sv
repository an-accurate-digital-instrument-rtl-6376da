// adc_frontend_model: behavioural model (not synthesizable) of the analog
// front end of the tracking converter: the current-output DAC, the input
// resistor with its calibration potentiometer, and the comparator.
//
// The DAC sources `code` * ILSB (about 7.8 uA per count); the input signal,
// a magnitude `vin` in volts of the 0 to -5 V power signal, draws
// vin / RIN from the same node. The comparator output `comp_up` is 1 while
// the input current is at least the DAC current (node voltage not positive),
// i.e. the converter must count up; with a shorted input the word therefore
// toggles between 0 and 1, as the calibration procedure expects. RIN is set as the calibration prescribes: a 5 V
// input makes the count toggle between 254 and 255 (current of 254.5 LSB).
`timescale 1ns/1ps
module adc_frontend_model #(
  parameter real ILSB  = 7.8e-6,
  parameter real VFULL = 5.0
) (
  input  real        vin,
  input  logic [7:0] code,
  output logic       comp_up
);
  localparam real RIN = VFULL / (254.5 * ILSB);

  real i_in, i_dac;

  always_comb begin
    i_in    = vin / RIN;
    i_dac   = real'(code) * ILSB;
    comp_up = i_in >= i_dac;
  end
endmodule
