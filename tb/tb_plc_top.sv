// tb_plc_top: the whole link, transmitter to receiver, at the default
// parameters (616-cycle symbols, tones f_clk/56 and f_clk/44, 50 MHz).
//
// The transmitter and receiver run on separate 50 MHz clocks with a 7 ns
// offset. The analog path (converter, DC bus, front end) is modelled as a
// pure delay from sync_out to r_hat, optionally with random one-cycle
// glitches standing for residual interference at the comparator. Each run
// resets both sides, releasing the receiver's reset so that its symbol
// windows line up with the transmitter's symbols seen through the channel,
// sends random bits and checks every decided bit and its timing
// (one bit every 616 receiver cycles, 2 cycles after the window closes).
//
// Runs use several channel delays, so the received tone arrives with
// different phases against the receiver's references. The testbench counts
// the mechanisms of the link and fails if one never happened: symbols 0
// and 1 decided, frequency switches at symbol boundaries, a correlation
// count driven toward 0 and one driven toward N (in phase / anti-phase),
// more than one reference phase, and decisions made under glitch noise.
`timescale 1ns/1ps
module tb_plc_top;
  localparam int N = 616;
  localparam int NSYM = 40;

  logic tx_clk = 1'b0, rx_clk = 1'b0;
  logic tx_rst_n = 1'b0, rx_rst_n = 1'b0;
  logic tx_data = 1'b0, tx_sym_start, sync_out;
  logic r_hat, rx_bit, rx_valid;
  logic [9:0] y0, y1;
  logic chan = 1'b1, glitch = 1'b0;
  int   chan_delay_ns = 3;
  bit   noise_on = 1'b0;

  int checks = 0, failures = 0;
  int n_sym0 = 0, n_sym1 = 0, n_switch = 0, n_toward0 = 0, n_towardN = 0, n_noisy = 0, n_glitches = 0;
  int phases_seen[int];

  always #10 tx_clk = ~tx_clk;
  initial begin #7; forever #10 rx_clk = ~rx_clk; end

  plc_top dut (
    .tx_clk, .tx_rst_n, .tx_data, .tx_sym_start, .sync_out,
    .rx_clk, .rx_rst_n, .r_hat, .rx_bit, .rx_valid, .y0, .y1
  );

  // channel: transport delay plus optional glitches
  always @(sync_out) chan <= #(chan_delay_ns * 1ns) sync_out;
  assign r_hat = chan ^ glitch;
  always @(negedge tx_clk) begin
    glitch <= noise_on && ($urandom % 100 < 3);
    if (noise_on && glitch) n_glitches++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic run(input int delay_cycles, input bit noisy);
    bit bits[NSYM];
    realtime t_tx0, t_target, t_rx0;
    int s_tx = 0, s_rx = 0, j = 0;
    foreach (bits[i]) bits[i] = 1'($urandom);
    noise_on = 1'b0;
    chan_delay_ns = delay_cycles * 20 + 3;
    tx_rst_n = 1'b0; rx_rst_n = 1'b0;
    repeat (4 + delay_cycles) @(posedge tx_clk);
    #1 tx_rst_n = 1'b1;
    noise_on = noisy;
    t_tx0 = $realtime + 19;                    // first tx edge with reset released
    // receiver edge 0 must sample, two edges earlier, the channel output of tx edge 0
    t_target = t_tx0 + 40 + chan_delay_ns;
    fork
      begin : drive_tx
        forever begin
          if (tx_sym_start) begin
            tx_data = (s_tx < NSYM) ? bits[s_tx] : 1'b0;
            if (s_tx > 0 && s_tx < NSYM && bits[s_tx] != bits[s_tx - 1]) n_switch++;
            s_tx++;
          end
          @(posedge tx_clk); #1;
        end
      end
      begin : rx_side
        @(posedge rx_clk);
        while ($realtime + 20 < t_target) @(posedge rx_clk);
        t_rx0 = $realtime + 20;
        #1 rx_rst_n = 1'b1;
        for (j = 0; j < NSYM * N + 3; j++) begin
          @(posedge rx_clk); #1;
          if (dut.u_rx.u_c0i.count_valid) begin
            if (dut.u_rx.c0i < 10'(N / 8) || dut.u_rx.c1i < 10'(N / 8)) n_toward0++;
            if (dut.u_rx.c0i > 10'(N - N / 8) || dut.u_rx.c1i > 10'(N - N / 8)) n_towardN++;
          end
          if (rx_valid) begin
            check(j == s_rx * N + N, $sformatf("bit %0d after receiver edge %0d", s_rx, j));
            check(rx_bit == bits[s_rx], $sformatf("delay %0d noisy %0d symbol %0d sent %0d got %0d (y0=%0d y1=%0d)",
                                                  delay_cycles, noisy, s_rx, bits[s_rx], rx_bit, y0, y1));
            if (rx_bit) n_sym1++; else n_sym0++;
            if (noisy) n_noisy++;
            s_rx++;
          end
        end
        check(s_rx == NSYM, $sformatf("received %0d of %0d symbols", s_rx, NSYM));
      end
    join_any
    disable fork;
    phases_seen[(delay_cycles + 3) % 44] = 1;
  endtask

  initial begin
    run(0, 1'b0);
    run(9, 1'b0);
    run(23, 1'b0);
    run(37, 1'b1);
    $display("mechanisms: sym0=%0d sym1=%0d switches=%0d toward0=%0d towardN=%0d phases=%0d noisy_bits=%0d glitches=%0d",
             n_sym0, n_sym1, n_switch, n_toward0, n_towardN, phases_seen.num(), n_noisy, n_glitches);
    check(n_sym0 > 0, "symbol 0 decided");
    check(n_sym1 > 0, "symbol 1 decided");
    check(n_switch > 0, "frequency switch at a symbol boundary");
    check(n_toward0 > 0, "count driven toward 0");
    check(n_towardN > 0, "count driven toward N");
    check(phases_seen.num() > 1, "several reference phases");
    check(n_noisy > 0 && n_glitches > 0, "decisions under glitch noise");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(5 * 45 * 616 * 20 * 1ns);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
