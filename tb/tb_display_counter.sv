// tb_display_counter: four-decade BCD display register. Random increments
// and clears are mirrored by an integer count modulo 10000; every digit is
// compared with that count's decimal digits, including the wrap 9999 -> 0000.
`timescale 1ns/1ps
module tb_display_counter;
  import period_meter_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, clr = 1'b0, inc = 1'b0;
  bcd_t digit [4];
  int checks = 0, failures = 0;
  int ref_cnt = 0, wraps = 0;

  display_counter dut (.clk, .rst_n, .clr, .inc, .digit);

  always #5 clk = ~clk;

  task automatic check_digits(input string what);
    int v;
    v = ref_cnt;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(digit[i]) != v % 10) begin
        failures++;
        if (failures < 20) $display("FAIL %s digit %0d = %0d, count %0d", what, i,
                                    digit[i], ref_cnt);
      end
      v = v / 10;
    end
  endtask

  initial begin
    #2000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check_digits("after reset");
    for (int i = 0; i < 25000; i++) begin
      inc = ($urandom % 8) != 0;
      clr = (i == 7000);
      @(negedge clk);
      if (clr) ref_cnt = 0;
      else if (inc) begin
        if (ref_cnt == 9999) wraps++;
        ref_cnt = (ref_cnt + 1) % 10000;
      end
      check_digits("count");
    end
    checks++;
    if (wraps == 0) begin failures++; $display("FAIL wrap never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
