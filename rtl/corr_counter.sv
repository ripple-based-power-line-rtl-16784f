// corr_counter: one branch of the digital correlator.
//
// The (binary) product of the received signal and a reference square wave is
// their XOR; the counter adds one on every clock cycle the XOR is high.
// On the last cycle of a symbol (sym_end) the total, including that cycle,
// is moved to the output register `count`, count_valid pulses for one
// cycle, and the accumulator restarts from zero. A count near N/2 means no
// correlation, near 0 or near N strong correlation (in phase or in
// anti-phase). The structure follows the XOR + counter pair of the
// receiver; holding the result in an output register is this design's
// choice.
//
// Timing: count and count_valid appear one cycle after the sym_end cycle.
module corr_counter #(
  parameter int unsigned W = plc_pkg::CNT_W
) (
  input  logic         clk,
  input  logic         rst_n,      // synchronous, active low
  input  logic         r_in,       // synchronized received signal
  input  logic         ref_in,     // reference square wave
  input  logic         sym_end,    // last cycle of the symbol
  output logic [W-1:0] count,
  output logic         count_valid
);
  logic [W-1:0] acc;
  logic         hit;

  assign hit = r_in ^ ref_in;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc         <= '0;
      count       <= '0;
      count_valid <= 1'b0;
    end else begin
      count_valid <= sym_end;
      if (sym_end) begin
        count <= acc + W'(hit);
        acc   <= '0;
      end else begin
        acc   <= acc + W'(hit);
      end
    end
  end
endmodule
