// tb_rs_encoder: self-checking test of the Reed-Solomon encoder.
// Encodes random messages and compares the codeword with the long-division
// reference, checks that every syndrome r(alpha^i), i = 1..N1-KB, is zero, and
// checks the KB+1 cycle latency.
module tb_rs_encoder;
  import tb_ref_pkg::*;
  localparam int N1 = 46, KB = 16;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic [KB*8-1:0] msg;
  logic [N1*8-1:0] cdw;
  int checks = 0, failures = 0;
  rs_encoder #(.N1(N1), .KB(KB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    u8 m[]; u8 c[]; u8 s; int t0;
    m = new[KB];
    start = 0; msg = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 50; run++) begin
      @(negedge clk);
      foreach (m[i]) begin m[i] = u8'($urandom); msg[i*8 +: 8] = m[i]; end
      ref_rs_encode(N1, KB, m, c);
      start = 1; t0 = $time;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (($time - t0) / 10 != KB + 1) begin failures++; $display("latency %0d", ($time - t0) / 10); end
      for (int j = 0; j < N1; j++) begin
        checks++;
        if (cdw[j*8 +: 8] != c[j]) failures++;
      end
      for (int i = 1; i <= N1 - KB; i++) begin
        s = 0;
        for (int j = N1 - 1; j >= 0; j--) s = ref_mul(s, ref_alpha(i)) ^ u8'(cdw[j*8 +: 8]);
        checks++;
        if (s != 0) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
