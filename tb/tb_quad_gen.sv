// tb_quad_gen: checks the 0/90 degree square waves of both reference
// dividers (56 and 44) cycle by cycle against the definition of a square
// wave of period DIV with the second one delayed by a quarter period, and
// checks the duty cycle and the number of periods in one 616-cycle symbol.
`timescale 1ns/1ps
module tb_quad_gen;
  logic clk = 1'b0, rst_n = 1'b0;
  logic i0, q0, i1, q1;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  quad_gen              dut0 (.clk, .rst_n, .sq_i(i0), .sq_q(q0));
  quad_gen #(.DIV(44))  dut1 (.clk, .rst_n, .sq_i(i1), .sq_q(q1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ideal square wave: high during the first half of each period
  function automatic bit sq(input int t, input int period);
    int p = ((t % period) + period) % period;
    return p < period / 2;
  endfunction

  initial begin
    int rise0 = 0, rise1 = 0, hi0 = 0, hi1 = 0;
    bit p_i0, p_i1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int c = 0; c < 616; c++) begin
      check(i0 == sq(c, 56),       $sformatf("DIV=56 I at %0d", c));
      check(q0 == sq(c - 14, 56),  $sformatf("DIV=56 Q at %0d", c));
      check(i1 == sq(c, 44),       $sformatf("DIV=44 I at %0d", c));
      check(q1 == sq(c - 11, 44),  $sformatf("DIV=44 Q at %0d", c));
      if (c > 0 && i0 && !p_i0) rise0++;
      if (c > 0 && i1 && !p_i1) rise1++;
      hi0 += int'(i0); hi1 += int'(i1);
      p_i0 = i0; p_i1 = i1;
      @(posedge clk); #1;
    end
    // a 616-cycle symbol holds 11 periods of f0 and 14 of f1 (first starts at 0)
    check(rise0 == 10, $sformatf("f0 rising edges %0d", rise0));
    check(rise1 == 13, $sformatf("f1 rising edges %0d", rise1));
    check(hi0 == 308 && hi1 == 308, "50% duty cycle over a symbol");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
