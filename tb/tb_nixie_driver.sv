// tb_nixie_driver: all sixteen BCD codes. Codes 0..9 must pull exactly the
// matching cathode low; codes 10..15 must leave every cathode high.
`timescale 1ns/1ps
module tb_nixie_driver;
  import period_meter_pkg::*;
  bcd_t bcd;
  logic [9:0] cathode_n;
  int checks = 0, failures = 0;

  nixie_driver dut (.bcd, .cathode_n);

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      bcd = bcd_t'(v);
      #1;
      for (int k = 0; k < 10; k++) begin
        checks++;
        if (cathode_n[k] != !(k == v)) begin
          failures++;
          $display("FAIL code %0d cathode %0d = %b", v, k, cathode_n[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
