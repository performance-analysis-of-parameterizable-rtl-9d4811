// tb_poly_mult: self-checking test of the sparse x dense multiplier.
// Runs the HQC-1 size (N=17669, W=128) and a small size whose N leaves a
// partly used last word, with random dense operands and random distinct
// positions. The product is checked bit by bit against a reference computed
// here by rotating and XORing the dense operand, and the cycle count from
// start to done against weight*(ceil(N/W)+4) + ceil(N/W) + 2.
module tb_poly_mult;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int done_cnt = 0;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  // one harness per size
  poly_mult_harness #(.N(17669), .W(128), .MAX_WT(75), .RUNS(2)) h_full (.clk, .rst_n);
  poly_mult_harness #(.N(97),    .W(16),  .MAX_WT(9),  .RUNS(20)) h_small (.clk, .rst_n);

  initial begin
    wait (h_full.finished && h_small.finished);
    checks   = h_full.checks + h_small.checks;
    failures = h_full.failures + h_small.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
