// tb_decoder: self-checking test of Decode with its W-bit input wrapper.
// Builds the reference codeword of a random message, flips random bits
// (a few hundred spread over the word, plus a burst that destroys whole
// Reed-Muller symbols, fewer than the Reed-Solomon code corrects), streams it
// in W-bit words with random gaps and checks the decoded message. Runs W = 128
// and W = 512.
module tb_decoder;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (2) @(posedge clk); rst_n = 1; end
  decoder_harness #(.W(128)) h0 (.clk, .rst_n);
  decoder_harness #(.W(512)) h1 (.clk, .rst_n);
  initial begin
    wait (h0.finished && h1.finished);
    checks = h0.checks + h1.checks;
    failures = h0.failures + h1.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
