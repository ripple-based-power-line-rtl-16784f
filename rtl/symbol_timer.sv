// symbol_timer: marks the symbol period T_s of the receiver.
//
// A modulo-N counter clocked at f_ck. sym_end is high during the last cycle
// of every symbol, i.e. once every N cycles; the counters of the receiver
// close their window on that cycle. After reset the count starts at 0, so
// the first sym_end comes on the N-th clock edge after reset is released:
// the release of reset sets the symbol alignment. N = 616 follows the
// operating point of the design; the reset behaviour is this design's choice.
module symbol_timer #(
  parameter int unsigned N = plc_pkg::N_SYM
) (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low
  output logic sym_end
);
  localparam int unsigned CW = $clog2(N);
  logic [CW-1:0] cnt;

  assign sym_end = (cnt == CW'(N - 1));

  always_ff @(posedge clk) begin
    if (!rst_n)       cnt <= '0;
    else if (sym_end) cnt <= '0;
    else              cnt <= cnt + 1'b1;
  end
endmodule
