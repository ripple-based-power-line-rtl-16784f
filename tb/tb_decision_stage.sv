// tb_decision_stage: random and corner metric pairs; checks bit = (y1 > y0),
// tie -> 0, one-cycle latency of bit_valid, and that outputs hold while
// in_valid is low.
`timescale 1ns/1ps
module tb_decision_stage;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [9:0] y0 = '0, y1 = '0, y0_q, y1_q;
  logic in_valid = 1'b0, bit_out, bit_valid;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  decision_stage dut (.clk, .rst_n, .y0, .y1, .in_valid, .bit_out, .bit_valid, .y0_q, .y1_q);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int a, input int b);
    bit exp_bit;
    @(negedge clk);
    y0 = 10'(a); y1 = 10'(b); in_valid = 1'b1;
    exp_bit = (b > a);
    @(posedge clk); #1;
    check(bit_valid && bit_out == exp_bit && y0_q == 10'(a) && y1_q == 10'(b),
          $sformatf("y0=%0d y1=%0d -> bit %0d valid %0d", a, b, bit_out, bit_valid));
    // hold while idle
    @(negedge clk); in_valid = 1'b0; y0 = 10'($urandom); y1 = 10'($urandom);
    @(posedge clk); #1;
    check(!bit_valid && bit_out == exp_bit && y0_q == 10'(a), "hold while in_valid low");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    one(308, 0); one(0, 308); one(100, 100); one(0, 0); one(616, 615); one(615, 616);
    for (int k = 0; k < 200; k++) one($urandom % 617, $urandom % 617);
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
