// hqc_top: unified HQC key generation, encapsulation and decapsulation.
//
// One sparse x dense polynomial multiplier (poly_mult), one constant-weight
// generator (fixed_weight_gen), one encoder and one decoder are shared by the
// three operations, and one SHAKE256 core outside this module is shared by
// all of them through the xof_* port. A sequencer walks a fixed program of
// steps per operation (absorb into / squeeze from the XOF, sample a sparse
// vector, multiply, write a product, add a sparse vector, compare, encode,
// decode). Polynomials live in five memories of ceil(N/W) words of W bits:
// h, s, u, v and a scratch copy t.
//
// Key generation (cmd OP_KEYGEN, seed_kem_i):
//   (seed_dk, seed_ek, sigma) <- XOF_1(seed_kem); y, x <- FW(XOF_2(seed_dk), w);
//   h <- XOF_3(seed_ek); s = x + h*y.  Results: seed_dk_o, seed_ek_o, sigma_o
//   and s in memory S.
// Encapsulation (OP_ENCAPS, msg_i, salt_i, key registers, S):
//   hek <- XOF_4(seed_ek || s); (K, theta) <- XOF_5(hek || m || salt);
//   h <- XOF_3(seed_ek); r2, e, r1 <- FW(XOF_6(theta), w_r);
//   u = r1 + h*r2 -> U;  v = Encode(m) + s*r2 + e (N1*N2 bits) -> V;  ss_o = K.
//   The encoder runs while the multiplier works. With PARALLEL = 1 both
//   products are computed at once and the separate s*r2 step disappears.
// Decapsulation (OP_DECAPS, salt_i, U and V written through the host port):
//   y <- FW(XOF_2(seed_dk), w); m' = Decode(v - u*y); hek, (K', theta') as
//   above; re-encrypt into T and compare with U and V;
//   Kbar <- XOF_7(hek || sigma || u || v || salt); ss_o = K' if equal else
//   Kbar, with reject_o set.
// OP_DECAPS_SEED is decapsulation from the compressed decapsulation key
//   seed_kem alone (seed_kem_i): the key-generation program runs first and
//   re-derives seed_dk, seed_ek, sigma and s, then OP_DECAPS follows.
// Keys are used in their compressed forms: h is always regenerated from
// seed_ek and y from seed_dk, as in the latest specification; OP_DECAPS uses
// the stored (seed_dk, seed_ek, sigma, s), OP_DECAPS_SEED the 32-byte seed.
//
// XOF port (to an external SHAKE256): xof_init pulses with a domain byte
// xof_dom to start a new hash; 32-bit words are absorbed on xof_in_* (valid/
// ready); xof_final pulses to end absorbing; 32-bit words are squeezed on
// xof_out_* (valid/ready). Polynomials are absorbed as ceil(bits/32) words.
// Host port: while busy is low, host_sel/host_addr/host_we/host_wdata access
// one word of a polynomial memory and host_rdata returns it (combinational).
// key_load_i loads seed_ek_i, seed_dk_i, sigma_i into the key registers.
// cmd_valid starts an operation when busy is low; done pulses at its end.
//
// What follows the source design: the shared multiplier, generator, encoder
// and decoder; key compression; the sampling order (y then x; r2, e, r1);
// re-encryption with implicit rejection; the single-multiplier (standard)
// encrypt schedule by default, and with PARALLEL = 1 the parallel one, where
// a second multiplier computes s*r2 while the first computes h*r2. This
// design's own choices: the XOF port and the domain
// numbers, the derivation of seed_dk, seed_ek and sigma from one XOF call,
// 32-bit absorb granularity, the memory organisation and the step sequencer,
// and that e and r1 are sampled before (not during) the first product.
// Lint notes: the sequencer advances on the units' done pulses and stream
// handshakes, so their busy outputs (and the encoder's done) are left unread;
// with PARALLEL = 0 the second multiplier's control signals are unused.
module hqc_top
  import hqc_pkg::*;
#(
  parameter int unsigned N  = 17669,
  parameter int unsigned N1 = 46,
  parameter int unsigned N2 = 384,
  parameter int unsigned WT = 66,
  parameter int unsigned WR = 75,
  parameter int unsigned KB = 16,
  parameter int unsigned W  = 128,
  parameter bit          PARALLEL = 1'b0,   // 1: second multiplier for s*r2 (P variant)
  localparam int unsigned D      = (N + W - 1) / W,
  localparam int unsigned DAW    = $clog2(D + 1),
  localparam int unsigned NV     = N1 * N2,
  localparam int unsigned DV     = (NV + W - 1) / W,
  localparam int unsigned MAX_WT = (WT > WR) ? WT : WR,
  localparam int unsigned PW     = $clog2(N),
  localparam int unsigned WTW    = $clog2(MAX_WT + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  // command
  input  logic            cmd_valid,
  input  op_e             cmd,
  output logic            busy,
  output logic            done,
  input  logic [255:0]    seed_kem_i,
  input  logic [KB*8-1:0] msg_i,
  input  logic [127:0]    salt_i,
  // key registers
  input  logic            key_load_i,
  input  logic [255:0]    seed_ek_i,
  input  logic [255:0]    seed_dk_i,
  input  logic [KB*8-1:0] sigma_i,
  output logic [255:0]    seed_ek_o,
  output logic [255:0]    seed_dk_o,
  output logic [KB*8-1:0] sigma_o,
  // results
  output logic [255:0]    ss_o,
  output logic            reject_o,
  // host access to the polynomial memories
  input  ram_e            host_sel,
  input  logic [DAW-1:0]  host_addr,
  input  logic            host_we,
  input  logic [W-1:0]    host_wdata,
  output logic [W-1:0]    host_rdata,
  // external SHAKE256
  output logic            xof_init,
  output logic [7:0]      xof_dom,
  output logic            xof_in_valid,
  input  logic            xof_in_ready,
  output logic [31:0]     xof_in_data,
  output logic            xof_final,
  input  logic            xof_out_valid,
  output logic            xof_out_ready,
  input  logic [31:0]     xof_out_data
);
  localparam int unsigned WPW = W / 32;     // 32-bit XOF words per memory word
  localparam int unsigned NRAM = 5;

  // ---------------------------------------------------------------- program
  typedef enum logic [3:0] {
    K_END, K_XINIT, K_XFIN, K_XABS_REG, K_XABS_RAM, K_XSQZ_REG, K_XSQZ_H,
    K_FW, K_MUL, K_WRPROD, K_WRV, K_SPADD, K_CMP, K_ENC, K_DEC, K_SELECT
  } kind_e;

  // registers that can be absorbed or squeezed
  localparam logic [3:0] R_SEED_KEM = 4'd0, R_SEED_DK = 4'd1, R_SEED_EK = 4'd2,
                         R_SIGMA = 4'd3, R_HEK = 4'd4, R_MSG = 4'd5, R_SALT = 4'd6,
                         R_THETA = 4'd7, R_KEY = 4'd8, R_KBAR = 4'd9;

  typedef struct packed {
    kind_e      kind;
    logic [3:0] a;     // register, memory or domain
    logic [1:0] l;     // position list
    logic       w;     // weight: 0 -> WT, 1 -> WR
    logic       v;     // bound: 0 -> N bits, 1 -> N1*N2 bits
  } step_t;

  function automatic step_t mk(kind_e k, logic [3:0] a, logic [1:0] l, logic w, logic v);
    step_t s;
    s.kind = k; s.a = a; s.l = l; s.w = w; s.v = v;
    return s;
  endfunction

  function automatic step_t prog(op_e op, logic [6:0] pc);
    step_t p [128];
    int n;
    logic cmp;
    for (int i = 0; i < 128; i++) p[i] = mk(K_END, 4'd0, 2'd0, 1'b0, 1'b0);
    n = 0;
    cmp = (op == OP_DECAPS) || (op == OP_DECAPS_SEED);
    // key generation; decapsulation from the compressed key (seed_kem) runs it
    // first to re-derive seed_dk, seed_ek, sigma and s
    if (op == OP_KEYGEN || op == OP_DECAPS_SEED) begin
      p[n] = mk(K_XINIT, 4'd1, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_SEED_KEM, 2'd0, 1'b0, 1'b0); n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_XSQZ_REG, R_SEED_DK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XSQZ_REG, R_SEED_EK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XSQZ_REG, R_SIGMA, 2'd0, 1'b0, 1'b0);    n++;
      p[n] = mk(K_XINIT, 4'd2, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_SEED_DK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_FW, 4'd0, 2'd0, 1'b0, 1'b0);             n++;  // y -> L0
      p[n] = mk(K_FW, 4'd0, 2'd1, 1'b0, 1'b0);             n++;  // x -> L1
      p[n] = mk(K_XINIT, 4'd3, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_SEED_EK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_XSQZ_H, 4'd0, 2'd0, 1'b0, 1'b0);         n++;
      p[n] = mk(K_MUL, 4'(RAM_H), 2'd0, 1'b0, 1'b0);       n++;  // h*y
      p[n] = mk(K_WRPROD, 4'(RAM_S), 2'd0, 1'b0, 1'b0);    n++;
      p[n] = mk(K_SPADD, 4'(RAM_S), 2'd1, 1'b0, 1'b0);     n++;  // + x
    end
    if (op != OP_KEYGEN) begin
      if (cmp) begin
        p[n] = mk(K_XINIT, 4'd2, 2'd0, 1'b0, 1'b0);          n++;
        p[n] = mk(K_XABS_REG, R_SEED_DK, 2'd0, 1'b0, 1'b0);  n++;
        p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
        p[n] = mk(K_FW, 4'd0, 2'd0, 1'b0, 1'b0);             n++;  // y -> L0
        p[n] = mk(K_MUL, 4'(RAM_U), 2'd0, 1'b0, 1'b0);       n++;  // u*y
        p[n] = mk(K_DEC, 4'd0, 2'd0, 1'b0, 1'b0);            n++;  // m'
      end
      // hek = H(ek)
      p[n] = mk(K_XINIT, 4'd4, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_SEED_EK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XABS_RAM, 4'(RAM_S), 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_XSQZ_REG, R_HEK, 2'd0, 1'b0, 1'b0);      n++;
      // (K, theta) = G(hek || m || salt)
      p[n] = mk(K_XINIT, 4'd5, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_HEK, 2'd0, 1'b0, 1'b0);      n++;
      p[n] = mk(K_XABS_REG, R_MSG, 2'd0, 1'b0, 1'b0);      n++;
      p[n] = mk(K_XABS_REG, R_SALT, 2'd0, 1'b0, 1'b0);     n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_XSQZ_REG, R_KEY, 2'd0, 1'b0, 1'b0);      n++;
      p[n] = mk(K_XSQZ_REG, R_THETA, 2'd0, 1'b0, 1'b0);    n++;
      // encrypt
      p[n] = mk(K_XINIT, 4'd3, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_SEED_EK, 2'd0, 1'b0, 1'b0);  n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_XSQZ_H, 4'd0, 2'd0, 1'b0, 1'b0);         n++;
      p[n] = mk(K_XINIT, 4'd6, 2'd0, 1'b0, 1'b0);          n++;
      p[n] = mk(K_XABS_REG, R_THETA, 2'd0, 1'b0, 1'b0);    n++;
      p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);           n++;
      p[n] = mk(K_FW, 4'd0, 2'd0, 1'b1, 1'b0);             n++;  // r2 -> L0
      p[n] = mk(K_FW, 4'd0, 2'd1, 1'b1, 1'b0);             n++;  // e  -> L1
      p[n] = mk(K_FW, 4'd0, 2'd2, 1'b1, 1'b0);             n++;  // r1 -> L2
      p[n] = mk(K_ENC, 4'd0, 2'd0, 1'b0, 1'b0);            n++;
      p[n] = mk(K_MUL, 4'(RAM_H), 2'd0, 1'b1, 1'b0);       n++;  // h*r2
      p[n] = mk(K_WRPROD, cmp ? 4'(RAM_T) : 4'(RAM_U), 2'd0, 1'b0, 1'b0); n++;
      p[n] = mk(K_SPADD, cmp ? 4'(RAM_T) : 4'(RAM_U), 2'd2, 1'b1, 1'b0);  n++;  // + r1
      if (cmp) begin
        p[n] = mk(K_CMP, 4'(RAM_U), 2'd0, 1'b0, 1'b0);     n++;
      end
      if (!PARALLEL) begin
        p[n] = mk(K_MUL, 4'(RAM_S), 2'd0, 1'b1, 1'b0);     n++;  // s*r2
      end
      p[n] = mk(K_WRV, cmp ? 4'(RAM_T) : 4'(RAM_V), 2'd0, 1'b0, 1'b1);    n++;  // + Encode(m)
      p[n] = mk(K_SPADD, cmp ? 4'(RAM_T) : 4'(RAM_V), 2'd1, 1'b1, 1'b1);  n++;  // + e
      if (cmp) begin
        p[n] = mk(K_CMP, 4'(RAM_V), 2'd0, 1'b0, 1'b1);     n++;
        // Kbar = J(hek || sigma || u || v || salt)
        p[n] = mk(K_XINIT, 4'd7, 2'd0, 1'b0, 1'b0);        n++;
        p[n] = mk(K_XABS_REG, R_HEK, 2'd0, 1'b0, 1'b0);    n++;
        p[n] = mk(K_XABS_REG, R_SIGMA, 2'd0, 1'b0, 1'b0);  n++;
        p[n] = mk(K_XABS_RAM, 4'(RAM_U), 2'd0, 1'b0, 1'b0); n++;
        p[n] = mk(K_XABS_RAM, 4'(RAM_V), 2'd0, 1'b0, 1'b1); n++;
        p[n] = mk(K_XABS_REG, R_SALT, 2'd0, 1'b0, 1'b0);   n++;
        p[n] = mk(K_XFIN, 4'd0, 2'd0, 1'b0, 1'b0);         n++;
        p[n] = mk(K_XSQZ_REG, R_KBAR, 2'd0, 1'b0, 1'b0);   n++;
      end
      p[n] = mk(K_SELECT, 4'd0, 2'd0, 1'b0, 1'b0);         n++;
    end
    return p[pc];
  endfunction

  // ---------------------------------------------------------------- state
  op_e            op_q;
  logic [6:0]     pc;
  logic [1:0]     phase;
  logic [15:0]    cnt;
  logic           running;
  step_t          st;

  logic [255:0]    seed_kem_q, seed_dk_q, seed_ek_q, hek_q, theta_q, key_q, kbar_q;
  logic [KB*8-1:0] sigma_q, msg_q;
  logic [127:0]    salt_q;
  logic            mismatch_q;
  logic [W-1:0]    sq_q;          // squeeze collector for h

  logic [PW-1:0]   lists [3][MAX_WT];

  assign st        = prog(op_q, pc);
  assign busy      = running;
  assign seed_ek_o = seed_ek_q;
  assign seed_dk_o = seed_dk_q;
  assign sigma_o   = sigma_q;

  // ---------------------------------------------------------------- memories
  logic [DAW-1:0] addr0, addr1, waddr;
  logic [W-1:0]   rdata0 [NRAM];
  logic [W-1:0]   rdata1 [NRAM];
  logic           we;
  ram_e           wsel, rsel;
  logic [W-1:0]   wdata;

  for (genvar r = 0; r < NRAM; r++) begin : g_ram
    poly_ram #(.W(W), .DEPTH(D), .AW(DAW)) u_ram (
      .clk,
      .raddr0(addr0), .rdata0(rdata0[r]),
      .raddr1(addr1), .rdata1(rdata1[r]),
      .we(we && wsel == ram_e'(r)), .waddr, .wdata
    );
  end

  assign host_rdata = rdata0[host_sel];

  // ---------------------------------------------------------------- units
  logic           pm_start, pm_busy, pm_done;
  logic [WTW-1:0] pm_pos_addr;
  logic [PW-1:0]  pm_pos_data;
  logic [DAW-1:0] pm_da_addr, pm_db_addr, pm_res_addr;
  logic [W-1:0]   pm_res_data;
  logic [WTW-1:0] wt_sel;

  assign wt_sel      = st.w ? WTW'(WR) : WTW'(WT);
  assign pm_pos_data = lists[st.l][pm_pos_addr];

  poly_mult #(.N(N), .W(W), .MAX_WT(MAX_WT)) u_mult (
    .clk, .rst_n, .start(pm_start), .weight(wt_sel), .busy(pm_busy), .done(pm_done),
    .pos_addr(pm_pos_addr), .pos_data(pm_pos_data),
    .da_addr(pm_da_addr), .da_data(rdata0[rsel]),
    .db_addr(pm_db_addr), .db_data(rdata1[rsel]),
    .res_addr(pm_res_addr), .res_data(pm_res_data)
  );

  // second multiplier (P variant): computes s*r2 in lockstep with h*r2. Both
  // units see the same weight and position list, so they issue the same
  // read addresses and can share addr0/addr1; this one reads memory S.
  logic           pm2_start, pm2_busy, pm2_done;
  logic [W-1:0]   pm2_res_data;

  if (PARALLEL) begin : g_par
    logic [WTW-1:0] pm2_pos_addr;
    logic [DAW-1:0] pm2_da_addr, pm2_db_addr;
    poly_mult #(.N(N), .W(W), .MAX_WT(MAX_WT)) u_mult2 (
      .clk, .rst_n, .start(pm2_start), .weight(wt_sel), .busy(pm2_busy), .done(pm2_done),
      .pos_addr(pm2_pos_addr), .pos_data(lists[st.l][pm2_pos_addr]),
      .da_addr(pm2_da_addr), .da_data(rdata0[RAM_S]),
      .db_addr(pm2_db_addr), .db_data(rdata1[RAM_S]),
      .res_addr(pm_res_addr), .res_data(pm2_res_data)
    );
    // the two multipliers run in lockstep: the second is never busy or done alone
    always_ff @(posedge clk) begin
      if (rst_n) assert (!pm2_busy || pm_busy) else $error("second multiplier out of step");
      if (rst_n) assert (!pm2_done || pm_done) else $error("second multiplier out of step");
    end
  end else begin : g_std
    assign pm2_busy     = 1'b0;
    assign pm2_done     = 1'b0;
    assign pm2_res_data = '0;
  end

  logic           fw_start, fw_busy, fw_done, fw_rnd_valid, fw_rnd_ready, fw_we;
  logic [WTW-1:0] fw_idx;
  logic [PW-1:0]  fw_pos;

  fixed_weight_gen #(.N(N), .MAX_WT(MAX_WT)) u_fw (
    .clk, .rst_n, .start(fw_start), .weight(wt_sel), .busy(fw_busy), .done(fw_done),
    .rnd_valid(fw_rnd_valid), .rnd_ready(fw_rnd_ready), .rnd_data(xof_out_data),
    .out_we(fw_we), .out_idx(fw_idx), .out_pos(fw_pos)
  );

  logic           enc_start, enc_busy, enc_done, enc_valid, enc_ready;
  logic [W-1:0]   enc_data;

  encoder #(.N1(N1), .N2(N2), .KB(KB), .W(W)) u_enc (
    .clk, .rst_n, .start(enc_start), .msg(msg_q), .busy(enc_busy), .done(enc_done),
    .out_valid(enc_valid), .out_ready(enc_ready), .out_data(enc_data)
  );

  logic           dec_start, dec_busy, dec_done, dec_valid, dec_ready;
  logic [W-1:0]   dec_data;
  logic [KB*8-1:0] dec_msg;

  decoder #(.N1(N1), .N2(N2), .KB(KB), .W(W)) u_dec (
    .clk, .rst_n, .start(dec_start), .busy(dec_busy), .done(dec_done),
    .in_valid(dec_valid), .in_ready(dec_ready), .in_data(dec_data), .msg(dec_msg)
  );

  // ---------------------------------------------------------------- helpers
  function automatic logic [W-1:0] bound_mask(int unsigned word, int unsigned nbits);
    logic [W-1:0] m;
    for (int unsigned t = 0; t < W; t++) m[t] = (word * W + t < nbits);
    return m;
  endfunction

  logic [255:0] abs_src;
  logic [4:0]   reg_words;      // words of the selected register
  logic [15:0]  ram_words;      // 32-bit words of the selected memory
  logic [15:0]  step_len;       // items of the current counted step
  logic [PW-1:0] sp_pos;
  logic         last_item;

  always_comb begin
    unique case (st.a)
      R_SEED_KEM: abs_src = seed_kem_q;
      R_SEED_DK:  abs_src = seed_dk_q;
      R_SEED_EK:  abs_src = seed_ek_q;
      R_SIGMA:    abs_src = 256'(sigma_q);
      R_HEK:      abs_src = hek_q;
      R_MSG:      abs_src = 256'(msg_q);
      R_SALT:     abs_src = 256'(salt_q);
      R_THETA:    abs_src = theta_q;
      default:    abs_src = '0;
    endcase
    unique case (st.a)
      R_SIGMA, R_MSG: reg_words = 5'(KB / 4);
      R_SALT:         reg_words = 5'd4;
      default:        reg_words = 5'd8;
    endcase
    ram_words = st.v ? 16'((NV + 31) / 32) : 16'((N + 31) / 32);
    unique case (st.kind)
      K_XABS_REG, K_XSQZ_REG: step_len = 16'(reg_words);
      K_XABS_RAM:             step_len = ram_words;
      K_XSQZ_H:               step_len = 16'(D * WPW);
      K_WRPROD:               step_len = 16'(D);
      K_WRV:                  step_len = 16'(D);
      K_DEC:                  step_len = 16'(DV);
      K_SPADD:                step_len = 16'(wt_sel);
      K_CMP:                  step_len = st.v ? 16'(DV) : 16'(D);
      default:                step_len = 16'd1;
    endcase
    last_item = (cnt == step_len - 1'b1);
    sp_pos    = lists[st.l][cnt[WTW-1:0]];
  end

  // ---------------------------------------------------------------- control signals
  logic advance;   // current step finishes this cycle

  always_comb begin
    advance       = 1'b0;
    xof_init      = 1'b0;
    xof_dom       = 8'(st.a);
    xof_final     = 1'b0;
    xof_in_valid  = 1'b0;
    xof_in_data   = abs_src[cnt[2:0]*32 +: 32];
    xof_out_ready = 1'b0;
    pm_start      = 1'b0;
    pm2_start     = 1'b0;
    pm_res_addr   = cnt[DAW-1:0];
    fw_start      = 1'b0;
    fw_rnd_valid  = 1'b0;
    enc_start     = 1'b0;
    enc_ready     = 1'b0;
    dec_start     = 1'b0;
    dec_valid     = 1'b0;
    dec_data      = (rdata0[RAM_V] ^ pm_res_data) & bound_mask(32'(cnt), NV);
    addr0         = host_addr;
    addr1         = host_addr;
    rsel          = ram_e'(st.a[2:0]);
    we            = 1'b0;
    wsel          = host_sel;
    waddr         = host_addr;
    wdata         = host_wdata;
    if (!running) begin
      we = host_we;
    end else begin
      unique case (st.kind)
        K_END: ;
        K_XINIT: begin xof_init = 1'b1; advance = 1'b1; end
        K_XFIN:  begin xof_final = 1'b1; advance = 1'b1; end
        K_XABS_REG: begin
          xof_in_valid = 1'b1;
          advance      = xof_in_ready && last_item;
        end
        K_XABS_RAM: begin
          addr0        = DAW'(cnt / WPW);
          xof_in_valid = 1'b1;
          xof_in_data  = rdata0[rsel][(cnt % WPW) * 32 +: 32];
          advance      = xof_in_ready && last_item;
        end
        K_XSQZ_REG: begin
          xof_out_ready = 1'b1;
          advance       = xof_out_valid && last_item;
        end
        K_XSQZ_H: begin
          xof_out_ready = 1'b1;
          wsel          = RAM_H;
          waddr         = DAW'(cnt / WPW);
          wdata         = sq_q;
          wdata[(WPW-1)*32 +: 32] = xof_out_data;
          wdata         = wdata & bound_mask(32'(cnt / WPW), N);
          we            = xof_out_valid && ((cnt % WPW) == WPW - 1);
          advance       = xof_out_valid && last_item;
        end
        K_FW: begin
          fw_start      = (phase == 2'd0) && !fw_busy;
          fw_rnd_valid  = xof_out_valid && (phase != 2'd0);
          xof_out_ready = fw_rnd_ready && (phase != 2'd0);
          advance       = fw_done;
        end
        K_MUL: begin
          pm_start = (phase == 2'd0);
          // encrypt's h*r2 (weight w_r, memory H) also starts s*r2 in the P variant
          pm2_start = PARALLEL && (phase == 2'd0) && st.w && (st.a == 4'(RAM_H));
          addr0    = pm_da_addr;
          addr1    = pm_db_addr;
          advance  = pm_done;
        end
        K_WRPROD: begin
          wsel    = ram_e'(st.a[2:0]);
          waddr   = cnt[DAW-1:0];
          wdata   = pm_res_data;
          we      = 1'b1;
          advance = last_item;
        end
        K_WRV: begin
          // words at and above DV hold no code bits and are written as zero
          enc_ready = (32'(cnt) < DV);
          wsel      = ram_e'(st.a[2:0]);
          waddr     = cnt[DAW-1:0];
          wdata     = ((PARALLEL ? pm2_res_data : pm_res_data) ^ enc_data) & bound_mask(32'(cnt), NV);
          we        = enc_valid || (32'(cnt) >= DV);
          advance   = we && last_item;
        end
        K_SPADD: begin
          addr0   = DAW'(sp_pos / W);
          wsel    = ram_e'(st.a[2:0]);
          waddr   = DAW'(sp_pos / W);
          wdata   = rdata0[rsel] ^ (W'(1) << (sp_pos % W));
          we      = st.v ? (32'(sp_pos) < NV) : 1'b1;
          advance = last_item;
        end
        K_CMP: begin
          addr0   = cnt[DAW-1:0];
          advance = last_item;
        end
        K_ENC: begin enc_start = 1'b1; advance = 1'b1; end
        K_DEC: begin
          dec_start = (phase == 2'd0);
          addr0     = cnt[DAW-1:0];
          dec_valid = (phase == 2'd1);
          advance   = dec_done;
        end
        K_SELECT: advance = 1'b1;
        default: advance = 1'b1;
      endcase
    end
  end

  // ---------------------------------------------------------------- sequencer
  always_ff @(posedge clk) begin
    if (fw_we) lists[st.l][fw_idx] <= fw_pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q       <= OP_KEYGEN;
      pc         <= '0;
      phase      <= '0;
      cnt        <= '0;
      running    <= 1'b0;
      done       <= 1'b0;
      seed_kem_q <= '0;
      seed_dk_q  <= '0;
      seed_ek_q  <= '0;
      hek_q      <= '0;
      theta_q    <= '0;
      key_q      <= '0;
      kbar_q     <= '0;
      sigma_q    <= '0;
      msg_q      <= '0;
      salt_q     <= '0;
      mismatch_q <= 1'b0;
      sq_q       <= '0;
      ss_o       <= '0;
      reject_o   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!running) begin
        if (key_load_i) begin
          seed_ek_q <= seed_ek_i;
          seed_dk_q <= seed_dk_i;
          sigma_q   <= sigma_i;
        end
        if (cmd_valid) begin
          op_q       <= cmd;
          pc         <= '0;
          phase      <= '0;
          cnt        <= '0;
          running    <= 1'b1;
          seed_kem_q <= seed_kem_i;
          salt_q     <= salt_i;
          if (cmd == OP_ENCAPS) msg_q <= msg_i;
          mismatch_q <= 1'b0;
          reject_o   <= 1'b0;
        end
      end else begin
        // per-step data movement
        unique case (st.kind)
          K_XABS_REG, K_XABS_RAM: if (xof_in_ready) cnt <= cnt + 1'b1;
          K_XSQZ_REG: if (xof_out_valid) begin
            cnt <= cnt + 1'b1;
            unique case (st.a)
              R_SEED_DK: seed_dk_q[cnt[2:0]*32 +: 32] <= xof_out_data;
              R_SEED_EK: seed_ek_q[cnt[2:0]*32 +: 32] <= xof_out_data;
              R_SIGMA:   sigma_q[cnt[2:0]*32 +: 32]   <= xof_out_data;
              R_HEK:     hek_q[cnt[2:0]*32 +: 32]     <= xof_out_data;
              R_THETA:   theta_q[cnt[2:0]*32 +: 32]   <= xof_out_data;
              R_KEY:     key_q[cnt[2:0]*32 +: 32]     <= xof_out_data;
              R_KBAR:    kbar_q[cnt[2:0]*32 +: 32]    <= xof_out_data;
              default: ;
            endcase
          end
          K_XSQZ_H: if (xof_out_valid) begin
            cnt <= cnt + 1'b1;
            sq_q[(cnt % WPW) * 32 +: 32] <= xof_out_data;
          end
          K_FW:  if (fw_start) phase <= 2'd1;
          K_MUL: phase <= 2'd1;
          K_WRPROD, K_SPADD: cnt <= cnt + 1'b1;
          K_WRV: if (we) cnt <= cnt + 1'b1;
          K_CMP: begin
            cnt <= cnt + 1'b1;
            if (rdata0[RAM_T] != rdata0[rsel]) mismatch_q <= 1'b1;
          end
          K_DEC: begin
            if (phase == 2'd0) phase <= 2'd1;
            else if (phase == 2'd1 && dec_ready) begin
              cnt <= cnt + 1'b1;
              if (last_item) phase <= 2'd2;
            end
            if (dec_done) msg_q <= dec_msg;
          end
          K_SELECT: begin
            ss_o     <= mismatch_q ? kbar_q : key_q;
            reject_o <= mismatch_q;
          end
          K_END: begin
            running <= 1'b0;
            done    <= 1'b1;
          end
          default: ;
        endcase
        if (advance) begin
          pc    <= pc + 1'b1;
          phase <= '0;
          cnt   <= '0;
        end
      end
    end
  end

endmodule
