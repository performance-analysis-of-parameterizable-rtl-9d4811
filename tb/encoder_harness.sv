// encoder_harness: drives one encoder instance for tb_encoder.
module encoder_harness #(
  parameter int unsigned W = 128
) (
  input logic clk,
  input logic rst_n
);
  import tb_ref_pkg::*;
  localparam int N1 = 46, N2 = 384, KB = 16;
  localparam int NBITS = N1 * N2;
  localparam int NW = (NBITS + W - 1) / W;
  int checks = 0, failures = 0;
  logic finished = 0;
  logic start, busy, done, out_valid, out_ready;
  logic [KB*8-1:0] msg;
  logic [W-1:0] out_data;
  encoder #(.N1(N1), .N2(N2), .KB(KB), .W(W)) dut (.*);

  bit expbits [NBITS];
  int nwords;
  always_ff @(negedge clk) out_ready <= ($urandom % 3) != 0;

  always @(posedge clk) begin
    if (out_valid && out_ready) begin
      for (int t = 0; t < W; t++) begin
        checks++;
        if (out_data[t] != ((nwords * W + t < NBITS) ? expbits[nwords*W+t] : 1'b0)) failures++;
      end
      nwords++;
    end
  end

  initial begin
    u8 m[]; u8 c[];
    m = new[KB];
    start = 0; msg = '0;
    wait (rst_n);
    for (int run = 0; run < 4; run++) begin
      @(negedge clk);
      foreach (m[i]) begin m[i] = u8'($urandom); msg[i*8 +: 8] = m[i]; end
      ref_rs_encode(N1, KB, m, c);
      for (int j = 0; j < N1; j++)
        for (int b = 0; b < N2; b++) expbits[j*N2 + b] = ref_rm_bit(c[j], b % 128);
      nwords = 0;
      start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks++;
      if (nwords != NW) begin
        failures++;
        $display("W=%0d words %0d expected %0d", W, nwords, NW);
      end
    end
    finished = 1;
  end
endmodule
