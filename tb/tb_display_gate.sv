// tb_display_gate: the START/STOP gate. Checks that START opens the gate and
// clears the display, that counting begins only when START is released, that
// STOP closes the gate and that START wins when both are high.
`timescale 1ns/1ps
module tb_display_gate;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, stop = 1'b0;
  logic gate_open, count_en, clear;
  int checks = 0, failures = 0;

  display_gate dut (.clk, .rst_n, .start, .stop, .gate_open, .count_en, .clear);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    check(!gate_open && !count_en, "closed after reset");
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    check(!gate_open, "STOP alone keeps closed");
    start = 1'b1; #1;
    check(clear, "clear while START held");
    check(!count_en, "no count while START held");
    @(negedge clk);
    check(gate_open, "START sets gate");
    check(!count_en, "still no count while START held");
    stop = 1'b1; @(negedge clk); stop = 1'b0;
    check(gate_open, "START wins over STOP");
    repeat (3) @(negedge clk);
    start = 1'b0; #1;
    check(count_en, "counting after release");
    check(!clear, "clear released");
    repeat (10) begin @(negedge clk); check(count_en, "keeps counting"); end
    stop = 1'b1; #1;
    check(!count_en, "STOP gates off at once");
    @(negedge clk); stop = 1'b0; #1;
    check(!gate_open && !count_en, "STOP closes gate");
    repeat (5) begin @(negedge clk); check(!count_en, "stays closed"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
