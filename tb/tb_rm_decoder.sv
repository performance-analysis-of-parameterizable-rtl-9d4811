// tb_rm_decoder: self-checking test of the duplicated RM(1,7) decoder.
// Sends MULT = 3 copies of the reference codeword of a random byte with up to
// 90 random bit flips in total (fewer than half the distance 3*64 of the
// duplicated code), and checks the decoded byte and the MULT+8 cycle rate.
module tb_rm_decoder;
  import tb_ref_pkg::*;
  localparam int MULT = 3;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid;
  logic [127:0] in_data;
  logic [7:0] out_byte;
  int checks = 0, failures = 0;
  rm_decoder #(.MULT(MULT)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [127:0] cp [MULT];
    u8 m; int nflip, c, t, t0;
    in_valid = 0; in_data = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int run = 0; run < 300; run++) begin
      m = u8'($urandom);
      for (int k = 0; k < MULT; k++)
        for (int b = 0; b < 128; b++) cp[k][b] = ref_rm_bit(m, b);
      nflip = (run < 256) ? 0 : $urandom % 91;
      if (run < 256) m = u8'(run);
      if (run < 256) for (int k = 0; k < MULT; k++) for (int b = 0; b < 128; b++) cp[k][b] = ref_rm_bit(m, b);
      for (int f = 0; f < nflip; f++) begin
        c = $urandom % MULT; t = $urandom % 128;
        cp[c][t] = ~cp[c][t];
      end
      for (int k = 0; k < MULT; k++) begin
        @(negedge clk);
        if (k == 0) t0 = $time;
        in_valid = 1; in_data = cp[k];
        while (!in_ready) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
      while (!out_valid) @(negedge clk);
      checks++;
      if (out_byte != m) begin
        failures++;
        if (failures < 5) $display("byte %h decoded %h (flips %0d)", m, out_byte, nflip);
      end
      checks++;
      if (($time - t0) / 10 != MULT + 8) begin
        failures++;
        if (failures < 5) $display("rate %0d", ($time - t0) / 10);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
