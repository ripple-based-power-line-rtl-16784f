// corr_metric: correlation magnitude for one frequency.
//
// y = |y_i - N/2| + |y_q - N/2|. The exact correlation receiver would take
// sqrt(a^2 + b^2) of the two quadrature terms; the sum of magnitudes is the
// cheaper approximation that needs only subtraction, negation and addition.
// Each term is at most N/2, so the result fits in W bits when N < 2^W.
// Purely combinational.
module corr_metric #(
  parameter int unsigned N = plc_pkg::N_SYM,
  parameter int unsigned W = plc_pkg::CNT_W
) (
  input  logic [W-1:0] y_i,
  input  logic [W-1:0] y_q,
  output logic [W-1:0] y
);
  localparam logic [W-1:0] HALF = W'(N / 2);

  function automatic logic [W-1:0] absdiff(input logic [W-1:0] a);
    return (a >= HALF) ? a - HALF : HALF - a;
  endfunction

  always_comb y = absdiff(y_i) + absdiff(y_q);
endmodule
