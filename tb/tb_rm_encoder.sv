// tb_rm_encoder: self-checking test of the RM(1,7) encoder.
// Checks all 256 codewords bit by bit against the formula
// bit t = m[7] ^ parity(m[6:0] & t) and that distinct bytes give codewords at
// Hamming distance 64 or 128.
module tb_rm_encoder;
  import tb_ref_pkg::*;
  logic [7:0] msg;
  logic [127:0] cw, first;
  int checks = 0, failures = 0;
  rm_encoder dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    msg = 0; #1; first = cw;
    for (int m = 0; m < 256; m++) begin
      msg = 8'(m); #1;
      for (int t = 0; t < 128; t++) begin
        checks++;
        if (cw[t] != ref_rm_bit(u8'(m), t)) failures++;
      end
      if (m != 0) begin
        checks++;
        if (!($countones(cw ^ first) inside {64, 128})) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
