// bit_sync: two-flop synchronizer for a single asynchronous input.
//
// The received signal comes from an analog comparator and is not related to
// the receiver clock; two flip-flops in series bring it into the clock
// domain with two cycles of delay. The synchronizer is this design's
// addition.
module bit_sync (
  input  logic clk,
  input  logic rst_n,     // synchronous, active low
  input  logic d,
  output logic q
);
  logic meta;
  always_ff @(posedge clk) begin
    if (!rst_n) {q, meta} <= 2'b00;
    else        {q, meta} <= {meta, d};
  end
endmodule
