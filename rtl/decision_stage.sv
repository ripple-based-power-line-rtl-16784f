// decision_stage: chooses the symbol with the higher correlation.
//
// When in_valid is high the stage registers bit_out = (y1 > y0) together
// with both metrics, and pulses bit_valid one cycle later. Equal metrics
// give 0; that tie rule is this design's choice.
module decision_stage #(
  parameter int unsigned W = plc_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic [W-1:0] y0,
  input  logic [W-1:0] y1,
  input  logic         in_valid,
  output logic         bit_out,
  output logic         bit_valid,
  output logic [W-1:0] y0_q,
  output logic [W-1:0] y1_q
);
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      bit_out   <= 1'b0;
      bit_valid <= 1'b0;
      y0_q      <= '0;
      y1_q      <= '0;
    end else begin
      bit_valid <= in_valid;
      if (in_valid) begin
        bit_out <= (y1 > y0);
        y0_q    <= y0;
        y1_q    <= y1;
      end
    end
  end
endmodule
