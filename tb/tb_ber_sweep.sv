// tb_ber_sweep: bit error rate of the receiver against transmitter
// frequency error, with a modelled analog front end.
//
// The comparator input is modelled as the band-passed ripple, a sine at the
// transmitter's actual switching frequency, plus an interfering tone at
// 4 x 251 kHz (the 4th harmonic of a slave converter switching near
// 250 kHz, which falls inside the 0.8-1.2 MHz pass band) and white
// Gaussian noise; r_hat is its sign, sampled at 50 MHz. Two interference
// levels are simulated ("low": interferer 0.25, noise 0.15; "high":
// interferer 0.7, noise 0.3, relative to the ripple amplitude). These
// amplitudes are illustrative and not measured values. For each symbol
// value and each frequency error from -8 % to +8 % a run of symbols of that
// value is sent with continuous phase and the wrong decisions are counted.
//
// Checks: no errors at the nominal frequencies with low interference; the
// error count grows from the nominal frequency toward +-8 %; high
// interference gives at least as many errors as low.
`timescale 1ns/1ps
module tb_ber_sweep;
  localparam int N = 616;
  localparam int SYMS = 400;
  localparam real FCK = 50.0e6;
  localparam real F0 = FCK / 56.0, F1 = FCK / 44.0;
  localparam real FI = 4.0 * 251.0e3;
  localparam real PI2 = 6.283185307179586;

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

  function automatic real urand01();
    return (real'($urandom % 1000000) + 0.5) / 1000000.0;
  endfunction

  function automatic real gauss();
    return $sqrt(-2.0 * $ln(urand01())) * $cos(PI2 * urand01());
  endfunction

  // errors among SYMS symbols of value b at frequency (1+dev) times nominal
  task automatic point(input bit b, input real dev, input real a_int, input real sigma, output int errors);
    real f, ph, phi;
    int seen;
    f = (b ? F1 : F0) * (1.0 + dev);
    ph = urand01();
    phi = urand01();
    errors = 0;
    seen = 0;
    rst_n = 1'b0;
    @(posedge clk); @(posedge clk);
    #1 rst_n = 1'b1;
    for (int k = 0; k < (SYMS + 1) * N + 2; k++) begin
      real v;
      v = $sin(PI2 * ph) + a_int * $sin(PI2 * phi) + sigma * gauss();
      r_hat = (v > 0.0);
      ph += f / FCK;   ph -= $floor(ph);
      phi += FI / FCK; phi -= $floor(phi);
      @(posedge clk); #1;
      if (bit_valid) begin
        if (seen > 0 && bit_out != b) errors++;   // first symbol holds reset samples
        seen++;
      end
    end
  endtask

  initial begin
    int e[2][2][9];   // [interference][bit][deviation step]
    real a_int, sigma, dev;
    $display("BER over %0d symbols per point", SYMS);
    $display("  interference  bit  f [MHz]  errors");
    for (int lvl = 0; lvl < 2; lvl++) begin
      a_int = lvl ? 0.7 : 0.25;
      sigma = lvl ? 0.3 : 0.15;
      for (int b = 0; b < 2; b++)
        for (int i = 0; i < 9; i++) begin
          dev = 0.02 * real'(i - 4);
          point(1'(b), dev, a_int, sigma, e[lvl][b][i]);
          $display("  %-12s  %0d    %6.3f   %0d", lvl ? "high" : "low", b,
                   (b ? F1 : F0) * (1.0 + dev) / 1.0e6, e[lvl][b][i]);
        end
    end
    for (int b = 0; b < 2; b++) begin
      int tot_lo = 0, tot_hi = 0;
      check(e[0][b][4] == 0, $sformatf("bit %0d: %0d errors at nominal, low interference", b, e[0][b][4]));
      for (int lvl = 0; lvl < 2; lvl++) begin
        check(e[lvl][b][0] > e[lvl][b][4] && e[lvl][b][8] > e[lvl][b][4],
              $sformatf("level %0d bit %0d: errors at -8%%/0/+8%% = %0d/%0d/%0d", lvl, b, e[lvl][b][0], e[lvl][b][4], e[lvl][b][8]));
      end
      for (int i = 0; i < 9; i++) begin tot_lo += e[0][b][i]; tot_hi += e[1][b][i]; end
      check(tot_hi >= tot_lo, $sformatf("bit %0d: high interference %0d errors, low %0d", b, tot_hi, tot_lo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40 * (SYMS + 2) * N) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
