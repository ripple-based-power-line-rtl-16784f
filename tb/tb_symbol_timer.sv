// tb_symbol_timer: checks that sym_end is high exactly on every N-th cycle,
// the first time on cycle N-1 after reset is released, at the default
// N = 616 and at a small N. Self-checking, with a watchdog.
`timescale 1ns/1ps
module tb_symbol_timer;
  logic clk = 1'b0, rst_n = 1'b0;
  logic se_a, se_b;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  symbol_timer              dut_a (.clk, .rst_n, .sym_end(se_a));
  symbol_timer #(.N(7))     dut_b (.clk, .rst_n, .sym_end(se_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    // cycle index c counts clock periods after the release of reset
    for (cyc = 0; cyc < 4 * 616 + 5; cyc++) begin
      check(se_a == ((cyc % 616) == 615), $sformatf("N=616 cycle %0d sym_end=%0b", cyc, se_a));
      check(se_b == ((cyc % 7) == 6),     $sformatf("N=7 cycle %0d sym_end=%0b", cyc, se_b));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
