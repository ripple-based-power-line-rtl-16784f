// bfsk_modulator: continuous-phase binary FSK clock for a converter's sync pin.
//
// The master converter switches at the frequency of its sync input, so
// modulating that clock is all the transmitter needs. Every N cycles a
// new symbol starts: sym_start pulses for one cycle and data_in is taken.
// During the symbol the output is a square wave at
//   f0 = f_clk * INC0 / ACC_MOD  (data 0)   or   f1 = f_clk * INC1 / ACC_MOD  (data 1).
// It is produced by a phase accumulator counting modulo ACC_MOD; sync_out is
// high while the phase is in the lower half of the range. Changing the
// increment at a symbol boundary changes the frequency without a phase jump
// (continuous-phase FSK), as the converter requires. The defaults give
// f_clk/56 and f_clk/44 with exact integer periods, matching the receiver's
// references, and a symbol of 616 cycles. Building the modulator as a
// phase accumulator, and its input interface, are this design's choices;
// other frequencies (e.g. an off-nominal transmitter) follow from INC0/INC1.
//
// Timing: sync_out is registered. After reset the first symbol starts on the
// first cycle with rst_n high; its sync_out period begins on the next edge.
module bfsk_modulator #(
  parameter int unsigned ACC_MOD = plc_pkg::DIV_F0 * plc_pkg::DIV_F1,
  parameter int unsigned INC0    = plc_pkg::DIV_F1,
  parameter int unsigned INC1    = plc_pkg::DIV_F0,
  parameter int unsigned N       = plc_pkg::N_SYM
) (
  input  logic clk,
  input  logic rst_n,      // synchronous, active low
  input  logic data_in,    // symbol to send, sampled when sym_start is high
  output logic sym_start,  // first cycle of a symbol
  output logic sync_out    // modulated clock
);
  localparam int unsigned AW = $clog2(ACC_MOD) + 1;
  localparam int unsigned SW = $clog2(N);

  logic [AW-1:0] acc, acc_sum, acc_next;
  logic [SW-1:0] sym_cnt;
  logic          cur_bit, sel_bit;

  assign sym_start = (sym_cnt == '0);
  assign sel_bit   = sym_start ? data_in : cur_bit;
  assign acc_sum   = acc + (sel_bit ? AW'(INC1) : AW'(INC0));
  assign acc_next  = (acc_sum >= AW'(ACC_MOD)) ? acc_sum - AW'(ACC_MOD) : acc_sum;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc      <= '0;
      sym_cnt  <= '0;
      cur_bit  <= 1'b0;
      sync_out <= 1'b1;
    end else begin
      acc      <= acc_next;
      sync_out <= (acc_next < AW'(ACC_MOD / 2));
      sym_cnt  <= (sym_cnt == SW'(N - 1)) ? '0 : sym_cnt + 1'b1;
      if (sym_start) cur_bit <= data_in;
    end
  end

  initial assert (INC0 < ACC_MOD / 2 && INC1 < ACC_MOD / 2)
    else $error("bfsk_modulator: increments must stay below half the phase range");
endmodule
