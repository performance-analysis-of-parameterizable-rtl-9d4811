// rs_decoder: decoder of the shortened Reed-Solomon code over GF(2^8).
//
// Corrects up to (N1-KB)/2 byte errors in an N1-byte word produced by
// rs_encoder and returns the KB message bytes. Four sequential phases:
//   SYN    Horner evaluation of the 2t syndromes S_i = r(alpha^i), i=1..2t,
//          all in parallel, one received byte per cycle (N1 cycles);
//   BM     Berlekamp-Massey iteration for the error locator Lambda(x),
//          one iteration per cycle (2t cycles);
//   OMEGA  error evaluator Omega(x) = S(x) Lambda(x) mod x^t, one
//          coefficient per cycle (t cycles);
//   CHIEN  for each message position j: Lambda(alpha^-j) = 0 marks an error,
//          whose value Omega(alpha^-j) / Lambda'(alpha^-j) (Forney) is added
//          to the byte (KB cycles).
// Only message positions are searched, since parity bytes are not needed.
// Interface: `start` samples `rx` (byte j = coefficient of x^j); `done`
// pulses when `msg` is valid; it holds until the next start.
// Latency: N1 + 2t + t + KB + 1 cycles. The source design takes this decoder
// from earlier work and gives only its function; the algorithm choice and
// schedule here are this design's own.
module rs_decoder
  import hqc_pkg::*;
#(
  parameter int unsigned N1 = 46,
  parameter int unsigned KB = 16
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N1*8-1:0]   rx,
  output logic              busy,
  output logic              done,
  output logic [KB*8-1:0]   msg
);
  localparam int unsigned NR = N1 - KB;   // 2t
  localparam int unsigned T  = NR / 2;
  localparam int unsigned CW = $clog2(N1 + 1);

  typedef enum logic [2:0] {S_IDLE, S_SYN, S_BM, S_OMEGA, S_CHIEN} state_e;
  state_e state;

  logic [N1*8-1:0] rx_q;
  gf_t  syn   [NR];
  gf_t  lam   [NR+1];
  gf_t  bsh   [NR+1];   // x^m * B(x)
  gf_t  omg   [T];
  gf_t  bcoef;
  logic [CW-1:0] llen;
  logic [CW-1:0] cnt;
  gf_t  xinv;

  // combinational helpers
  gf_t  disc, scale;
  gf_t  lam_v, om_v, der_v, pw, err_v, om_i;
  gf_t  rx_byte;

  // discrepancy of iteration r = cnt
  always_comb begin
    disc = '0;
    for (int i = 0; i <= NR; i++)
      if (i <= int'(cnt)) disc ^= gf_mul(lam[i], syn[int'(cnt) - i]);
    scale = gf_mul(disc, gf_inv(bcoef));
  end

  // Omega coefficient cnt
  always_comb begin
    om_i = '0;
    for (int j = 0; j < T; j++)
      if (j <= int'(cnt)) om_i ^= gf_mul(lam[j], syn[int'(cnt) - j]);
  end

  // Chien / Forney at x = xinv
  always_comb begin
    lam_v = '0; om_v = '0; der_v = '0;
    pw = 8'h01;
    for (int i = 0; i <= T; i++) begin
      lam_v ^= gf_mul(lam[i], pw);
      if (i < T) om_v ^= gf_mul(omg[i], pw);
      if (i + 1 <= T && ((i + 1) % 2 == 1)) der_v ^= gf_mul(lam[i+1], pw);
      pw = gf_mul(pw, xinv);
    end
    err_v   = gf_mul(om_v, gf_inv(der_v));
    rx_byte = rx_q[(NR + int'(cnt)) * 8 +: 8];
  end

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      rx_q  <= '0;
      for (int i = 0; i < NR; i++) syn[i] <= '0;
      for (int i = 0; i <= NR; i++) begin lam[i] <= '0; bsh[i] <= '0; end
      for (int i = 0; i < T; i++) omg[i] <= '0;
      bcoef <= 8'h01;
      llen  <= '0;
      cnt   <= '0;
      xinv  <= '0;
      msg   <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          rx_q <= rx;
          for (int i = 0; i < NR; i++) syn[i] <= '0;
          cnt   <= CW'(N1 - 1);
          state <= S_SYN;
        end
        S_SYN: begin
          for (int i = 0; i < NR; i++)
            syn[i] <= gf_mul(syn[i], gf_pow_alpha(i + 1)) ^ rx_q[int'(cnt) * 8 +: 8];
          if (cnt == 0) begin
            for (int i = 0; i <= NR; i++) begin
              lam[i] <= (i == 0) ? 8'h01 : 8'h00;
              bsh[i] <= (i == 1) ? 8'h01 : 8'h00;
            end
            bcoef <= 8'h01;
            llen  <= '0;
            state <= S_BM;
          end else begin
            cnt <= cnt - 1'b1;
          end
        end
        S_BM: begin
          if (disc == 0) begin
            for (int i = NR; i > 0; i--) bsh[i] <= bsh[i-1];
            bsh[0] <= '0;
          end else begin
            for (int i = 0; i <= NR; i++) lam[i] <= lam[i] ^ gf_mul(scale, bsh[i]);
            if (2 * int'(llen) <= int'(cnt)) begin
              llen  <= CW'(int'(cnt) + 1 - int'(llen));
              bcoef <= disc;
              for (int i = NR; i > 0; i--) bsh[i] <= lam[i-1];
              bsh[0] <= '0;
            end else begin
              for (int i = NR; i > 0; i--) bsh[i] <= bsh[i-1];
              bsh[0] <= '0;
            end
          end
          if (32'(cnt) == NR - 1) begin
            cnt   <= '0;
            state <= S_OMEGA;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_OMEGA: begin
          omg[cnt] <= om_i;
          if (32'(cnt) == T - 1) begin
            cnt   <= '0;
            xinv  <= gf_pow_alpha(255 - NR);
            state <= S_CHIEN;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_CHIEN: begin
          msg[int'(cnt) * 8 +: 8] <= (lam_v == 0) ? (rx_byte ^ err_v) : rx_byte;
          xinv <= gf_mul(xinv, gf_pow_alpha(254));
          if (32'(cnt) == KB - 1) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
