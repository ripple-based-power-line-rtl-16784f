// tb_fsk_receiver: end-to-end test of the correlation receiver at its
// default size (N = 616, references f_ck/56 and f_ck/44, 50 MHz clock).
//
// The stimulus is an ideal comparator output: a square wave whose
// frequency follows random bits (f0 or f1, possibly off by a relative
// deviation), with continuous phase and a random starting phase, sampled
// once per clock. For every symbol the testbench computes the four XOR
// counts, the two metrics and the decision itself from the stimulus and
// compares them with y0, y1 and bit_out; it also checks that the decided
// bits equal the sent bits, that a nominal tone gives its metric = N/2
// exactly, and that each bit appears exactly 2 cycles after the last
// cycle of its symbol (one bit per 616 cycles).
`timescale 1ns/1ps
module tb_fsk_receiver;
  localparam int N = 616;
  localparam real FCK = 50.0e6;
  localparam real F0 = FCK / 56.0, F1 = FCK / 44.0;

  logic clk = 1'b0, rst_n = 1'b0, r_hat = 1'b0;
  logic bit_out, bit_valid;
  logic [9:0] y0, y1;
  int checks = 0, failures = 0;
  int n_bits = 0, n_nominal_max = 0;

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

  // one run: reset, then nsym random symbols with relative frequency error dev
  task automatic run_case(input int nsym, input real dev, input bit expect_correct, input bit nominal);
    bit sent[];
    bit r[];
    real ph;
    int s_seen = 0;
    sent = new[nsym];
    r = new[nsym * N + 8];
    foreach (sent[s]) sent[s] = 1'($urandom);
    ph = real'($urandom % 1000) / 1000.0;
    // r[k] is counted on clock edge k+2 (two-flop synchronizer)
    foreach (r[k]) begin
      int s = (k + 2) / N;
      real f = ((s < nsym && sent[s]) ? F1 : F0) * (1.0 + dev);
      r[k] = (ph - $floor(ph)) < 0.5;
      ph += f / FCK;
    end
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int j = 0; j < nsym * N + 4; j++) begin
      r_hat = r[j];
      @(posedge clk); #1;
      if (bit_valid) begin
        int c[4];
        int e0, e1;
        c = '{default: 0};
        for (int t = s_seen * N; t < s_seen * N + N; t++) begin
          bit rs = (t >= 2) ? r[t - 2] : 1'b0;
          c[0] += int'(rs != sq(t, 56, 0));
          c[1] += int'(rs != sq(t, 56, 14));
          c[2] += int'(rs != sq(t, 44, 0));
          c[3] += int'(rs != sq(t, 44, 11));
        end
        e0 = iabs(c[0] - N / 2) + iabs(c[1] - N / 2);
        e1 = iabs(c[2] - N / 2) + iabs(c[3] - N / 2);
        check(j == s_seen * N + N, $sformatf("symbol %0d decided after edge %0d", s_seen, j));
        check(int'(y0) == e0 && int'(y1) == e1 && bit_out == (e1 > e0),
              $sformatf("symbol %0d: y0=%0d/%0d y1=%0d/%0d", s_seen, y0, e0, y1, e1));
        if (expect_correct && s_seen > 0)   // symbol 0 starts with two synchronizer zeros
          check(bit_out == sent[s_seen], $sformatf("symbol %0d sent %0d got %0d (dev %f)", s_seen, sent[s_seen], bit_out, dev));
        if (nominal && s_seen > 0 && (s_seen + 1 < nsym) && sent[s_seen] == sent[s_seen - 1]) begin
          check((sent[s_seen] ? y1 : y0) == 10'(N / 2), $sformatf("nominal metric %0d", sent[s_seen] ? y1 : y0));
          n_nominal_max++;
        end
        s_seen++;
        n_bits++;
      end
    end
    check(s_seen == nsym, $sformatf("decided %0d of %0d symbols", s_seen, nsym));
  endtask

  initial begin
    run_case(12, 0.0, 1'b1, 1'b1);
    run_case(12, 0.0, 1'b1, 1'b1);
    run_case(8,  0.02, 1'b1, 1'b0);
    run_case(8, -0.02, 1'b1, 1'b0);
    run_case(8,  0.01, 1'b1, 1'b0);
    run_case(6,  0.10, 1'b0, 1'b0);   // far off: only the arithmetic is checked
    check(n_nominal_max > 0, "nominal-metric case occurred");
    $display("decided %0d bits", n_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80 * 616) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
