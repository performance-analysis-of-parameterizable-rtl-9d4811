// tb_encoder: self-checking test of Encode(m) and its W-bit wrapper.
// Runs W = 128 (HQC-1 default) and W = 1024 (last word partly used) with
// random output stalls; rebuilds the N1*N2-bit codeword here from the
// reference RS encoder and the RM bit formula, and checks every output bit,
// the number of words and the zero padding of the last word.
module tb_encoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2) @(posedge clk); rst_n = 1; end
  encoder_harness #(.W(128))  h0 (.clk, .rst_n);
  encoder_harness #(.W(1024)) h1 (.clk, .rst_n);
  initial begin
    wait (h0.finished && h1.finished);
    checks = h0.checks + h1.checks;
    failures = h0.failures + h1.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
