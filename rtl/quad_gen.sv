// quad_gen: quadrature square-wave reference at f_ck / DIV.
//
// A modulo-DIV counter; sq_i is high for the first DIV/2 cycles of each
// period (0 degrees) and sq_q is the same wave delayed by DIV/4 cycles
// (90 degrees), so sq_q lags sq_i. Both are registered and change only on
// clock edges. Reset sets the phase to 0: since the symbol length N is a
// whole number of periods, the references then start every symbol at the
// same phase. Dividing the receiver clock by 56 and 44 follows the design's
// operating point; DIV must be a multiple of 4. The choice of which output
// leads is arbitrary, as the receiver uses the magnitude of both
// correlations.
module quad_gen #(
  parameter int unsigned DIV = plc_pkg::DIV_F0
) (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low
  output logic sq_i,
  output logic sq_q
);
  localparam int unsigned CW = $clog2(DIV);
  logic [CW-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= '0;
      sq_i  <= 1'b1;   // phase 0 lies in the high half of I
      sq_q  <= 1'b0;   // and in the low half of Q (Q(p) = I(p - DIV/4))
    end else begin
      automatic logic [CW-1:0] nxt = (phase == CW'(DIV - 1)) ? '0 : phase + 1'b1;
      phase <= nxt;
      sq_i  <= (nxt < CW'(DIV / 2));
      sq_q  <= (nxt >= CW'(DIV / 4)) && (nxt < CW'(DIV / 4 + DIV / 2));
    end
  end

  initial assert (DIV % 4 == 0) else $error("quad_gen: DIV must be a multiple of 4");
endmodule
