// tb_freq_sweep: metric range of the receiver against input frequency.
//
// For input tones from 0.60 to 1.40 MHz (10 kHz steps, plus the two
// nominal tones and +-2 % around each) the testbench feeds an ideal square
// wave with 16 different starting phases, one reset per phase, and records
// the smallest and largest y0 and y1 of the second symbol after reset
// (the first one starts with two synchronizer samples that are not input). Every
// metric is also recomputed in the testbench from the stimulus and must
// match. It then checks the properties the receiver is designed for:
//   * a nominal tone gives its own metric = N/2 = 308 for every phase;
//   * within +-2 % of f0 the smallest y0 exceeds the largest y1, and within
//     +-2 % of f1 the smallest y1 exceeds the largest y0;
//   * between the two tones, the frequencies where the metric ranges
//     overlap lie more than 5 % away from both.
// The table of min/max values is printed.
`timescale 1ns/1ps
module tb_freq_sweep;
  localparam int N = 616;
  localparam real FCK = 50.0e6;
  localparam real F0 = FCK / 56.0, F1 = FCK / 44.0;
  localparam int NPH = 16;

  logic clk = 1'b0, rst_n = 1'b0, r_hat = 1'b0;
  logic bit_out, bit_valid;
  logic [9:0] y0, y1;
  int checks = 0, failures = 0;

  always #10 clk = ~clk;

  fsk_receiver dut (.clk, .rst_n, .r_hat, .bit_out, .bit_valid, .y0, .y1);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  function automatic bit sq(input int t, input int period, input int delay);
    int p = (((t - delay) % period) + period) % period;
    return p < period / 2;
  endfunction

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  // min/max of y0 and y1 over NPH phases of a tone at f
  task automatic sweep_point(input real f, output int mn0, output int mx0, output int mn1, output int mx1);
    bit r[2 * N + 8];
    mn0 = 1 << 20; mx0 = -1; mn1 = 1 << 20; mx1 = -1;
    for (int p = 0; p < NPH; p++) begin
      real ph = real'(p) / real'(NPH) + 0.013;
      int c[4];
      int e0, e1;
      foreach (r[k]) begin
        r[k] = (ph - $floor(ph)) < 0.5;
        ph += f / FCK;
      end
      c = '{default: 0};
      for (int t = N; t < 2 * N; t++) begin
        bit rs = (t >= 2) ? r[t - 2] : 1'b0;
        c[0] += int'(rs != sq(t, 56, 0));
        c[1] += int'(rs != sq(t, 56, 14));
        c[2] += int'(rs != sq(t, 44, 0));
        c[3] += int'(rs != sq(t, 44, 11));
      end
      e0 = iabs(c[0] - N / 2) + iabs(c[1] - N / 2);
      e1 = iabs(c[2] - N / 2) + iabs(c[3] - N / 2);
      rst_n = 1'b0;
      @(posedge clk); @(posedge clk);
      #1 rst_n = 1'b1;
      for (int j = 0; j <= 2 * N; j++) begin
        r_hat = r[j];
        @(posedge clk); #1;
      end
      check(bit_valid, $sformatf("f=%f: no decision after two symbols", f));
      check(int'(y0) == e0 && int'(y1) == e1, $sformatf("f=%f phase %0d: y0=%0d/%0d y1=%0d/%0d", f, p, y0, e0, y1, e1));
      if (int'(y0) < mn0) mn0 = int'(y0);
      if (int'(y0) > mx0) mx0 = int'(y0);
      if (int'(y1) < mn1) mn1 = int'(y1);
      if (int'(y1) > mx1) mx1 = int'(y1);
    end
  endtask

  initial begin
    int mn0, mx0, mn1, mx1;
    real overlap_lo = 10.0e6, overlap_hi = 0.0;
    real f, d;
    $display("  f [MHz]   min y0  max y0  min y1  max y1");
    for (int i = 0; i <= 80; i++) begin
      f = 0.60e6 + 10.0e3 * real'(i);
      sweep_point(f, mn0, mx0, mn1, mx1);
      $display("  %7.3f   %6d  %6d  %6d  %6d", f / 1.0e6, mn0, mx0, mn1, mx1);
      // overlap: neither metric clearly above the other
      if (f > F0 && f < F1 && !(mn0 > mx1) && !(mn1 > mx0)) begin
        if (f < overlap_lo) overlap_lo = f;
        if (f > overlap_hi) overlap_hi = f;
      end
    end
    // nominal tones: metric = N/2 for every phase
    sweep_point(F0, mn0, mx0, mn1, mx1);
    check(mn0 == N / 2 && mx0 == N / 2, $sformatf("nominal f0: y0 in [%0d,%0d]", mn0, mx0));
    check(mx1 < N / 4, $sformatf("nominal f0: max y1 %0d", mx1));
    sweep_point(F1, mn0, mx0, mn1, mx1);
    check(mn1 == N / 2 && mx1 == N / 2, $sformatf("nominal f1: y1 in [%0d,%0d]", mn1, mx1));
    check(mx0 < N / 4, $sformatf("nominal f1: max y0 %0d", mx0));
    // +-2 % tolerance around each tone
    for (int k = -2; k <= 2; k++) begin
      d = 0.01 * real'(k);
      sweep_point(F0 * (1.0 + d), mn0, mx0, mn1, mx1);
      $display("  f0 %0d%%: y0 in [%0d,%0d], y1 in [%0d,%0d]", k, mn0, mx0, mn1, mx1);
      check(mn0 > mx1, $sformatf("f0 %f: min y0 %0d <= max y1 %0d", d, mn0, mx1));
      sweep_point(F1 * (1.0 + d), mn0, mx0, mn1, mx1);
      $display("  f1 %0d%%: y1 in [%0d,%0d], y0 in [%0d,%0d]", k, mn1, mx1, mn0, mx0);
      check(mn1 > mx0, $sformatf("f1 %f: min y1 %0d <= max y0 %0d", d, mn1, mx0));
    end
    $display("metrics overlap between %0.3f and %0.3f MHz", overlap_lo / 1.0e6, overlap_hi / 1.0e6);
    check(overlap_lo > F0 * 1.05 && overlap_hi < F1 * 0.95, "overlap region far from both tones");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100 * NPH * (2 * N + 4)) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
