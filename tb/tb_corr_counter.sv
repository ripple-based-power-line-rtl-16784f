// tb_corr_counter: drives random signal and reference bits and symbol
// windows of random length (1 to 1000 cycles), keeps its own count of the
// cycles where the two differ, and checks count and count_valid one cycle
// after each window end. Also checks the all-equal (0) and all-different
// (full window) extremes.
`timescale 1ns/1ps
module tb_corr_counter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic r_in = 1'b0, ref_in = 1'b0, sym_end = 1'b0;
  logic [9:0] count;
  logic count_valid;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  corr_counter dut (.clk, .rst_n, .r_in, .ref_in, .sym_end, .count, .count_valid);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one window of len cycles; mode 0 random, 1 all equal, 2 all different
  task automatic window(input int len, input int mode);
    int expect_cnt = 0;
    for (int c = 0; c < len; c++) begin
      @(negedge clk);
      ref_in = 1'($urandom);
      case (mode)
        1: r_in = ref_in;
        2: r_in = ~ref_in;
        default: r_in = 1'($urandom);
      endcase
      sym_end = (c == len - 1);
      expect_cnt += int'(r_in ^ ref_in);
      @(posedge clk); #1;
      check(count_valid == (c == len - 1), $sformatf("count_valid at %0d of %0d", c, len));
    end
    check(count == 10'(expect_cnt), $sformatf("count %0d expected %0d (len %0d)", count, expect_cnt, len));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    window(616, 0);
    window(616, 1);
    window(616, 2);
    window(1, 2);
    for (int k = 0; k < 40; k++) window(1 + ($urandom % 1000), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
