// tb_corr_metric: compares |yi - 308| + |yq - 308| (N = 616) computed with
// signed integers against the block, for every yi in 0..616 with random yq,
// for the corner cases, and for a small N of 10.
`timescale 1ns/1ps
module tb_corr_metric;
  logic [9:0] yi, yq, y, ys;
  int checks = 0, failures = 0;

  corr_metric          dut  (.y_i(yi), .y_q(yq), .y(y));
  corr_metric #(.N(10)) dut_s (.y_i(yi), .y_q(yq), .y(ys));

  function automatic int iabs(input int v);
    return v < 0 ? -v : v;
  endfunction

  task automatic apply(input int a, input int b);
    int e, es;
    yi = 10'(a); yq = 10'(b);
    #1;
    e = iabs(a - 308) + iabs(b - 308);
    checks++;
    if (int'(y) != e) begin failures++; $display("FAIL: (%0d,%0d) -> %0d, expected %0d", a, b, y, e); end
    if (a <= 10 && b <= 10) begin
      es = iabs(a - 5) + iabs(b - 5);
      checks++;
      if (int'(ys) != es) begin failures++; $display("FAIL: N=10 (%0d,%0d) -> %0d, expected %0d", a, b, ys, es); end
    end
  endtask

  initial begin
    apply(0, 0); apply(616, 616); apply(0, 616); apply(308, 308); apply(308, 0); apply(307, 309);
    for (int a = 0; a <= 616; a++) apply(a, $urandom % 617);
    for (int a = 0; a <= 10; a++) for (int b = 0; b <= 10; b++) apply(a, b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
