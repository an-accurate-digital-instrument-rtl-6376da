// tb_decade_counter: the 7490-style stage as a decade and as a
// divide-by-five, with random enables and clears, against a reference count.
`timescale 1ns/1ps
module tb_decade_counter;
  import period_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0;
  bcd_t q10, q5;
  logic c10, c5;
  int checks = 0, failures = 0;
  int r10 = 0, r5 = 0, wraps10 = 0;

  decade_counter #(.MODULUS(10)) u10 (.clk, .rst_n, .clr, .en, .q(q10), .carry(c10));
  decade_counter #(.MODULUS(5))  u5  (.clk, .rst_n, .clr, .en, .q(q5),  .carry(c5));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t q10=%0d r10=%0d q5=%0d r5=%0d)",
                                  what, $time, q10, r10, q5, r5);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      en  = ($urandom % 4) != 0;
      clr = ($urandom % 200) == 0;
      #1;
      check(c10 == (en && r10 == 9), "decade carry");
      check(c5 == (en && r5 == 4), "div5 carry");
      @(negedge clk);
      if (clr) begin r10 = 0; r5 = 0; end
      else if (en) begin
        if (r10 == 9) wraps10++;
        r10 = (r10 + 1) % 10;
        r5 = (r5 + 1) % 5;
      end
      check(int'(q10) == r10, "decade value");
      check(int'(q5) == r5, "div5 value");
    end
    check(wraps10 > 10, "wraps exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
