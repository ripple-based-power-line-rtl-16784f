// fsk_receiver: digital correlation receiver for binary FSK.
//
// The receiver decides, once per symbol of N clock cycles, whether the
// comparator output r_hat was a square wave at f0 = f_ck/DIV0 (bit 0) or at
// f1 = f_ck/DIV1 (bit 1). It approximates the classic correlation receiver
// (two quadrature mixers and integrators per tone, then an envelope) with
// one-bit arithmetic:
//   * two quad_gen dividers make 0/90 degree square waves at f0 and f1;
//   * four corr_counter branches XOR r_hat with each reference and count the
//     cycles the XOR is high during the symbol (the integrators);
//   * two corr_metric units form y0 = |y0I - N/2| + |y0Q - N/2| and y1 alike
//     (the envelopes);
//   * decision_stage outputs bit = (y1 > y0).
// With N a whole number of periods of both references (616 = 11*56 = 14*44)
// the two tones are orthogonal over a symbol: a clean f0 input gives
// y0 between N/4 and N/2 whatever its phase, and y1 near 0.
//
// Symbol timing is free running from reset (symbol_timer); releasing reset
// fixes where symbols begin. r_hat is asynchronous and passes a two-flop
// synchronizer first (bit_sync), which is this design's addition.
//
// Timing: a sample of r_hat taken on clock edge t is counted on edge t+2.
// The counts of a symbol close on the symbol's last cycle; bit_valid pulses
// two cycles after that cycle, with bit_out, y0 and y1 held until the next
// symbol. Throughput is one bit per N cycles (50 MHz / 616 = 81.2 kbit/s).
module fsk_receiver #(
  parameter int unsigned N    = plc_pkg::N_SYM,
  parameter int unsigned DIV0 = plc_pkg::DIV_F0,
  parameter int unsigned DIV1 = plc_pkg::DIV_F1,
  parameter int unsigned W    = plc_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         r_hat,      // asynchronous comparator output
  output logic         bit_out,
  output logic         bit_valid,
  output logic [W-1:0] y0,
  output logic [W-1:0] y1
);
  logic r_s;
  logic sym_end;
  logic f0_i, f0_q, f1_i, f1_q;
  logic [W-1:0] c0i, c0q, c1i, c1q;
  logic v0i, v0q, v1i, v1q;
  logic [W-1:0] m0, m1;

  bit_sync u_sync (.clk, .rst_n, .d(r_hat), .q(r_s));

  symbol_timer #(.N(N)) u_timer (.clk, .rst_n, .sym_end);

  quad_gen #(.DIV(DIV0)) u_ref0 (.clk, .rst_n, .sq_i(f0_i), .sq_q(f0_q));
  quad_gen #(.DIV(DIV1)) u_ref1 (.clk, .rst_n, .sq_i(f1_i), .sq_q(f1_q));

  corr_counter #(.W(W)) u_c0i (.clk, .rst_n, .r_in(r_s), .ref_in(f0_i), .sym_end, .count(c0i), .count_valid(v0i));
  corr_counter #(.W(W)) u_c0q (.clk, .rst_n, .r_in(r_s), .ref_in(f0_q), .sym_end, .count(c0q), .count_valid(v0q));
  corr_counter #(.W(W)) u_c1i (.clk, .rst_n, .r_in(r_s), .ref_in(f1_i), .sym_end, .count(c1i), .count_valid(v1i));
  corr_counter #(.W(W)) u_c1q (.clk, .rst_n, .r_in(r_s), .ref_in(f1_q), .sym_end, .count(c1q), .count_valid(v1q));

  corr_metric #(.N(N), .W(W)) u_m0 (.y_i(c0i), .y_q(c0q), .y(m0));
  corr_metric #(.N(N), .W(W)) u_m1 (.y_i(c1i), .y_q(c1q), .y(m1));

  decision_stage #(.W(W)) u_dec (
    .clk, .rst_n, .y0(m0), .y1(m1), .in_valid(v0i),
    .bit_out, .bit_valid, .y0_q(y0), .y1_q(y1)
  );

  // The four branches share one symbol timer, so they finish together, and
  // no count can exceed the symbol length.
  assert property (@(posedge clk) disable iff (!rst_n) (v0i == v0q) && (v0i == v1i) && (v0i == v1q));
  assert property (@(posedge clk) disable iff (!rst_n)
                   v0i |-> (c0i <= W'(N)) && (c0q <= W'(N)) && (c1i <= W'(N)) && (c1q <= W'(N)));

  initial begin
    assert (N % DIV0 == 0 && N % DIV1 == 0) else $error("fsk_receiver: N must be a multiple of DIV0 and DIV1");
    assert (N < (1 << W)) else $error("fsk_receiver: W too narrow for N");
  end
endmodule
