// tb_bfsk_modulator: sends random bits and checks, for every 616-cycle
// symbol, that sym_start pulses exactly at the symbol's first cycle, that
// the output holds 11 full periods for a 0 and 14 for a 1 (f_clk/56 and
// f_clk/44), that it is high half of the time, and that every high or low
// run lies between 22 and 28 cycles (no phase jump or glitch when the
// frequency changes). A second instance with a 2% higher f0 (INC0 = 45,
// i.e. f_clk*45/2464) checks that the increment sets the frequency.
`timescale 1ns/1ps
module tb_bfsk_modulator;
  localparam int N = 616;
  logic clk = 1'b0, rst_n = 1'b0, data_in = 1'b0;
  logic sym_start, sync_out, sym_start_b, sync_b;
  int checks = 0, failures = 0;
  int n0 = 0, n1 = 0, n_switch = 0;

  always #10 clk = ~clk;

  bfsk_modulator dut (.clk, .rst_n, .data_in, .sym_start, .sync_out);
  bfsk_modulator #(.INC0(45)) dut_b (.clk, .rst_n, .data_in(1'b0), .sym_start(sym_start_b), .sync_out(sync_b));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    bit prev, prev_b, cur_bit, last_bit;
    int rises, highs, run, rises_b;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = sync_out; prev_b = sync_b; run = 0; rises_b = 0; last_bit = 1'b0;
    for (int s = 0; s < 40; s++) begin
      cur_bit = 1'($urandom);
      data_in = cur_bit;
      rises = 0; highs = 0;
      for (int c = 0; c < N; c++) begin
        check(sym_start == (c == 0), $sformatf("sym_start at symbol %0d cycle %0d", s, c));
        @(posedge clk); #1;
        data_in = 1'($urandom);   // ignored outside sym_start
        if (sync_out && !prev) rises++;
        if (sync_b && !prev_b) rises_b++;
        if (sync_out != prev) begin
          if (s > 0 || run > 0)
            check(run >= 22 && run <= 28, $sformatf("run of %0d cycles", run));
          run = 1;
        end else run++;
        highs += int'(sync_out);
        prev = sync_out; prev_b = sync_b;
      end
      check(rises == (cur_bit ? 14 : 11), $sformatf("symbol %0d bit %0d: %0d periods", s, cur_bit, rises));
      check(highs == N / 2, $sformatf("symbol %0d: high %0d cycles", s, highs));
      if (cur_bit) n1++; else n0++;
      if (s > 0 && cur_bit != last_bit) n_switch++;
      last_bit = cur_bit;
    end
    // 40 symbols at f = f_clk*45/2464: 40*616*45/2464 = 450 periods
    check(rises_b >= 449 && rises_b <= 450, $sformatf("INC0=45: %0d periods", rises_b));
    check(n0 > 0 && n1 > 0 && n_switch > 0, "both symbols and switches occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50 * 616) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
