// tb_rs_decoder: self-checking test of the Reed-Solomon decoder.
// Encodes random messages with the reference encoder, adds 0..t random byte
// errors at random positions (parity and message), and checks the decoded
// message and the N1 + 3t + KB + 1 cycle latency.
module tb_rs_decoder;
  import tb_ref_pkg::*;
  localparam int N1 = 46, KB = 16, T = (N1 - KB) / 2;
  logic clk = 0, rst_n = 0, start, busy, done;
  logic [N1*8-1:0] rx;
  logic [KB*8-1:0] msg;
  int checks = 0, failures = 0;
  rs_decoder #(.N1(N1), .KB(KB)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    u8 m[]; u8 c[]; int ne, p, t0; bit used [N1];
    m = new[KB];
    start = 0; rx = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 120; run++) begin
      @(negedge clk);
      foreach (m[i]) m[i] = u8'($urandom);
      ref_rs_encode(N1, KB, m, c);
      ne = (run < 10) ? run : (run < 20 ? T : $urandom % (T + 1));
      foreach (used[i]) used[i] = 0;
      for (int e = 0; e < ne; e++) begin
        do p = $urandom % N1; while (used[p]);
        used[p] = 1;
        c[p] ^= u8'(1 + $urandom % 255);
      end
      for (int j = 0; j < N1; j++) rx[j*8 +: 8] = c[j];
      start = 1; t0 = $time;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (($time - t0) / 10 != N1 + 3 * T + KB + 1) begin
        failures++;
        if (failures < 5) $display("latency %0d", ($time - t0) / 10);
      end
      for (int i = 0; i < KB; i++) begin
        checks++;
        if (msg[i*8 +: 8] != m[i]) begin
          failures++;
          if (failures < 5) $display("run %0d errors %0d byte %0d got %h exp %h", run, ne, i, msg[i*8 +: 8], m[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
