// tb_decision_logic: exhaustive check of the doubling/halving decision.
//
// For every initial value P0 (0..255) latched through STROBE and every
// converter word (0..255) it compares the outputs with arithmetic worked out
// here: doubled = P0 < 128 and code >= 2*P0; halved = code <= P0/2 (integer
// division); inhibit = P0 >= 128 and code >= 2*(P0-128) (the carry the MSB
// clamp suppresses). It also checks that the P0 register follows the word
// while STROBE is high and holds it after, and that STOP is raised one clock
// after a CLOCK4 phase with a decision and never without CLOCK4.
`timescale 1ns/1ps
module tb_decision_logic;
  logic clk = 1'b0, rst_n = 1'b0, strobe = 1'b0, clock4 = 1'b0;
  logic [7:0] code = '0, p0;
  logic doubled, halved, inhibit, stop;
  int checks = 0, failures = 0;
  int n_double = 0, n_half = 0, n_inhibit = 0;

  decision_logic dut (.clk, .rst_n, .strobe, .code, .clock4, .p0, .doubled,
                      .halved, .inhibit, .stop);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s (p0=%0d code=%0d d=%b h=%b i=%b s=%b)", what, p0, code,
                 doubled, halved, inhibit, stop);
    end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit exp_d, exp_h, exp_i;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // latch behaviour
    strobe = 1'b1; code = 8'd10; @(negedge clk);
    check(p0 == 8'd10, "latch follows 10");
    code = 8'd11; @(negedge clk);
    check(p0 == 8'd11, "latch follows 11");
    strobe = 1'b0; code = 8'd99; @(negedge clk); @(negedge clk);
    check(p0 == 8'd11, "latch holds");
    // exhaustive decision
    for (int p = 0; p < 256; p++) begin
      @(negedge clk);
      strobe = 1'b1; code = 8'(p); clock4 = 1'b0;
      @(negedge clk);
      strobe = 1'b0;
      check(p0 == 8'(p), "P0 loaded");
      for (int c = 0; c < 256; c++) begin
        code = 8'(c);
        #1;
        exp_d = (p < 128) && (c >= 2 * p);
        exp_h = (c <= p / 2);
        exp_i = (p >= 128) && (c >= 2 * (p - 128));
        check(doubled == exp_d, "doubled");
        check(halved == exp_h, "halved");
        check(inhibit == exp_i, "inhibit");
        if (exp_d) n_double++;
        if (exp_h) n_half++;
        if (exp_i) n_inhibit++;
      end
    end
    // STOP gating and timing: P0 = 100
    @(negedge clk);
    strobe = 1'b1; code = 8'd100; @(negedge clk); strobe = 1'b0;
    code = 8'd200; clock4 = 1'b0; @(negedge clk);
    check(!stop, "no STOP without CLOCK4");
    clock4 = 1'b1; #1;
    check(!stop, "STOP is registered");
    @(negedge clk);
    check(stop, "STOP after CLOCK4 with doubled power");
    clock4 = 1'b0; @(negedge clk);
    check(!stop, "STOP drops after CLOCK4");
    code = 8'd50; clock4 = 1'b1; @(negedge clk);
    check(stop, "STOP on halved power");
    code = 8'd120; @(negedge clk);
    check(!stop, "no STOP in between");
    // P0 = 200 (negative period range): doubling must be inhibited
    strobe = 1'b1; code = 8'd200; @(negedge clk); strobe = 1'b0;
    code = 8'd201; @(negedge clk);
    check(!stop, "MSB clamp blocks false STOP");
    code = 8'd100; @(negedge clk);
    check(stop, "halving from 200 stops");
    check(n_double > 0 && n_half > 0 && n_inhibit > 0, "all decisions exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
