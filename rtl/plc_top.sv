// plc_top: digital ends of a power-line link that rides on a DC-DC
// converter's output ripple.
//
// Transmitter side: bfsk_modulator turns a bit stream into a
// continuous-phase B-FSK clock (sync_out) for the sync pin of the master
// switching converter. The converter's switching frequency, and so the
// frequency of the ripple on the DC bus, follows that clock.
// Receiver side: an analog front end (AC coupling, 0.8-1.2 MHz band-pass,
// gain, comparator; not part of this RTL) returns the ripple as the one-bit
// signal r_hat, and fsk_receiver decides one bit per symbol.
//
// The two sides are separate devices with their own clocks and resets; the
// whole analog path from sync_out to r_hat lies outside and is reached
// through the ports. Both sides use the same N, DIV0 and DIV1, so the
// transmitter's nominal tones are exactly the receiver's references
// (f_clk/56 and f_clk/44, 616-cycle symbols at 50 MHz).
module plc_top #(
  parameter int unsigned N    = plc_pkg::N_SYM,
  parameter int unsigned DIV0 = plc_pkg::DIV_F0,
  parameter int unsigned DIV1 = plc_pkg::DIV_F1,
  parameter int unsigned W    = plc_pkg::CNT_W
) (
  // transmitter
  input  logic         tx_clk,
  input  logic         tx_rst_n,
  input  logic         tx_data,
  output logic         tx_sym_start,
  output logic         sync_out,
  // receiver
  input  logic         rx_clk,
  input  logic         rx_rst_n,
  input  logic         r_hat,
  output logic         rx_bit,
  output logic         rx_valid,
  output logic [W-1:0] y0,
  output logic [W-1:0] y1
);
  bfsk_modulator #(
    .ACC_MOD(DIV0 * DIV1), .INC0(DIV1), .INC1(DIV0), .N(N)
  ) u_tx (
    .clk(tx_clk), .rst_n(tx_rst_n), .data_in(tx_data),
    .sym_start(tx_sym_start), .sync_out
  );

  fsk_receiver #(.N(N), .DIV0(DIV0), .DIV1(DIV1), .W(W)) u_rx (
    .clk(rx_clk), .rst_n(rx_rst_n), .r_hat,
    .bit_out(rx_bit), .bit_valid(rx_valid), .y0, .y1
  );
endmodule
