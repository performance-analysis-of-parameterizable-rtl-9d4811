// rs_encoder: systematic shortened Reed-Solomon encoder over GF(2^8).
//
// Encodes KB message bytes into an N1-byte codeword with a linear feedback
// shift register of N1-KB parity bytes. Each cycle one message byte (highest
// index first) is added to the top parity byte; the sum is multiplied in
// parallel by every coefficient of the generator polynomial, one GF(2^8)
// multiplier per coefficient, and the products are added into the shifted
// register. The generator g(x) = prod_{i=1..N1-KB} (x - alpha^i) is computed
// at elaboration by a constant function of hqc_pkg.
// Codeword layout: byte j of `cdw` (bits 8j+7:8j) is the coefficient of x^j;
// bytes 0..N1-KB-1 are parity and bytes N1-KB..N1-1 the message.
// Timing: `start` samples `msg`; `done` is high KB+1 cycles after the start cycle, and `cdw`
// holds the codeword from then until the next start. The LFSR structure and
// one multiplier per generator coefficient follow the source design; the
// ports are this design's own.
module rs_encoder
  import hqc_pkg::*;
#(
  parameter int unsigned N1 = 46,
  parameter int unsigned KB = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [KB*8-1:0]   msg,
  output logic              busy,
  output logic              done,
  output logic [N1*8-1:0]   cdw
);
  localparam int unsigned NR = N1 - KB;
  localparam gpoly_t G = rs_gen_poly(NR);

  gf_t            par [NR];
  logic [KB*8-1:0] msg_q;
  logic [$clog2(KB+1)-1:0] cnt;
  gf_t            gate;
  logic [KB*8-1:0] msg_h;

  always_comb begin
    cdw[N1*8-1 -: KB*8] = msg_h;
    for (int j = 0; j < NR; j++) cdw[j*8 +: 8] = par[j];
  end

  assign gate = msg_q[(KB-1)*8 +: 8] ^ par[NR-1];
  assign busy = (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < NR; j++) par[j] <= '0;
      msg_q <= '0;
      cnt   <= '0;
      done  <= 1'b0;
      msg_h <= '0;
    end else begin
      done <= 1'b0;
      if (start && cnt == 0) begin
        for (int j = 0; j < NR; j++) par[j] <= '0;
        msg_q <= msg;
        msg_h <= msg;
        cnt   <= ($clog2(KB+1))'(KB);
      end else if (cnt != 0) begin
        for (int j = NR - 1; j > 0; j--) par[j] <= par[j-1] ^ gf_mul(gate, G[j]);
        par[0] <= gf_mul(gate, G[0]);
        msg_q  <= msg_q << 8;
        cnt    <= cnt - 1'b1;
        if (cnt == 1) done <= 1'b1;
      end
    end
  end

endmodule
