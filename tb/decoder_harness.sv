// decoder_harness: drives one decoder instance for tb_decoder.
module decoder_harness #(
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
  logic start, busy, done, in_valid, in_ready;
  logic [W-1:0] in_data;
  logic [KB*8-1:0] msg;
  decoder #(.N1(N1), .N2(N2), .KB(KB), .W(W)) dut (.*);
  bit cw [NBITS];

  initial begin
    u8 m[]; u8 c[]; int p, sym;
    m = new[KB];
    start = 0; in_valid = 0; in_data = '0;
    wait (rst_n);
    for (int run = 0; run < 3; run++) begin
      @(negedge clk);
      foreach (m[i]) m[i] = u8'($urandom);
      ref_rs_encode(N1, KB, m, c);
      for (int j = 0; j < N1; j++)
        for (int b = 0; b < N2; b++) cw[j*N2 + b] = ref_rm_bit(c[j], b % 128);
      for (int f = 0; f < 400; f++) begin p = $urandom % NBITS; cw[p] = ~cw[p]; end
      for (int k = 0; k < 10; k++) begin          // 10 symbols wiped out
        sym = (k * 4 + run) % N1;
        for (int b = 0; b < N2; b++) cw[sym*N2 + b] = bit'($urandom % 2);
      end
      start = 1;
      @(negedge clk); start = 0;
      for (int wi = 0; wi < NW; wi++) begin
        while (($urandom % 4) == 0) @(negedge clk);
        for (int t = 0; t < W; t++) in_data[t] = (wi * W + t < NBITS) ? cw[wi*W+t] : 1'b0;
        in_valid = 1;
        while (!in_ready) @(negedge clk);
        @(posedge clk);
        @(negedge clk);
        in_valid = 0;
      end
      while (!done) @(negedge clk);
      for (int i = 0; i < KB; i++) begin
        checks++;
        if (msg[i*8 +: 8] != m[i]) failures++;
      end
    end
    finished = 1;
  end
endmodule
