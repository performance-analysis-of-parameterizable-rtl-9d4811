// tb_fixed_weight_gen: self-checking test of the constant-weight generator.
// Feeds random 32-bit words (with random stalls in some runs), rebuilds the
// expected position list here with the reference procedure (multiply-shift
// sampling, then backward duplicate replacement by linear search), and checks
// every emitted position, that all positions are distinct and below N, and
// the 3*weight+1 cycle latency on runs without stalls. Small-N runs force
// duplicates so the replacement path is exercised. The three HQC sizes
// (n = 17,669 / 35,851 / 57,637 with w_r = 75 / 114 / 149) are all run.
module tb_fixed_weight_gen;
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

  fwg_harness #(.N(17669), .MAX_WT(75), .RUNS(6))  h_full  (.clk, .rst_n);
  fwg_harness #(.N(35851), .MAX_WT(114), .RUNS(2)) h_hqc3  (.clk, .rst_n);
  fwg_harness #(.N(57637), .MAX_WT(149), .RUNS(2)) h_hqc5  (.clk, .rst_n);
  fwg_harness #(.N(40),    .MAX_WT(20), .RUNS(30)) h_small (.clk, .rst_n);

  initial begin
    wait (h_full.finished && h_hqc3.finished && h_hqc5.finished && h_small.finished);
    checks   = h_full.checks + h_hqc3.checks + h_hqc5.checks + h_small.checks;
    failures = h_full.failures + h_hqc3.failures + h_hqc5.failures + h_small.failures;
    if (h_small.dups == 0) begin
      failures++;
      $display("no duplicate was ever replaced");
    end
    $display("duplicates replaced: %0d", h_small.dups + h_full.dups);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
