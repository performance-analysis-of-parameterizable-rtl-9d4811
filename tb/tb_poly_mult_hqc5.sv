// tb_poly_mult_hqc5: the multiplier at the HQC-5 size for every datapath
// width in the published evaluation (W = 128, 256, 512, 1024).
// Each width multiplies a random dense polynomial of n = 57,637 bits by a
// sparse one of weight 131 (the HQC-5 weight of x and y) and checks the
// product bit by bit and the cycle count against
// weight*(ceil(n/W)+4) + ceil(n/W) + 2, which gives 60,058 / 30,358 /
// 15,442 / 8,050 cycles. The published table lists the first three of these
// figures and 8,070 for W = 1024, 20 cycles more than the same formula gives.
module tb_poly_mult_hqc5;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
  end

  poly_mult_harness #(.N(57637), .W(128),  .MAX_WT(149), .RUNS(1), .FIRST_WT(131)) h128  (.clk, .rst_n);
  poly_mult_harness #(.N(57637), .W(256),  .MAX_WT(149), .RUNS(1), .FIRST_WT(131)) h256  (.clk, .rst_n);
  poly_mult_harness #(.N(57637), .W(512),  .MAX_WT(149), .RUNS(1), .FIRST_WT(131)) h512  (.clk, .rst_n);
  poly_mult_harness #(.N(57637), .W(1024), .MAX_WT(149), .RUNS(1), .FIRST_WT(131)) h1024 (.clk, .rst_n);

  initial begin
    wait (h128.finished && h256.finished && h512.finished && h1024.finished);
    checks   = h128.checks + h256.checks + h512.checks + h1024.checks;
    failures = h128.failures + h256.failures + h512.failures + h1024.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
