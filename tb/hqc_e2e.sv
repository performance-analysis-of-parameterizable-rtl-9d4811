// hqc_e2e: end-to-end exercise of the unified accelerator with a
// behavioural XOF that stalls at random. Shared by tb_hqc_top (default
// parameters, top instantiated without a parameter list) and tb_hqc_sets
// (the other parameter sets and datapath widths).
//
// 1. Key generation (repeated with new seeds until the constant-weight
//    generator has replaced at least one duplicate position): s is checked
//    bit by bit against x + h*y computed here from the sampled h, x, y.
// 2. Encapsulation: u and v are checked against r1 + h*r2 and
//    Encode(m) + s*r2 + e computed here (reference RS and RM encoders).
// 3. Decapsulation of that ciphertext: the message must be recovered, the
//    ciphertext accepted and the shared secret equal the encapsulated one.
//    Then decapsulation again, from the 32-byte compressed key seed_kem only,
//    after the key registers and s have been overwritten.
// 4. Decapsulation of a ciphertext with one flipped bit in u and in v:
//    implicit rejection must be taken and give a different secret.
// Also counted, and each must occur: XOF back-pressure, the encoder running
// while the multiplier runs, h regenerated from its seed, noisy bits removed
// by the decoder, duplicate replacement, acceptance and rejection,
// decapsulation from the seed, and with
// PARALLEL = 1 the second multiplier running.
// Cycle counts of the three operations are printed. The caller reads
// checks/failures once finished rises.
module hqc_e2e
  import hqc_pkg::*, tb_ref_pkg::*;
#(
  parameter int N = 17669,
  parameter int N1 = 46,
  parameter int N2 = 384,
  parameter int WT = 66,
  parameter int WR = 75,
  parameter int KB = 16,
  parameter int W = 128,
  parameter bit PARALLEL = 1'b0,
  parameter bit DEFAULTS = 1'b1   // instantiate the top without a parameter list
) (
  output int   checks,
  output int   failures,
  output logic finished
);
  localparam int D = (N + W - 1) / W, NV = N1 * N2, DAW = $clog2(D + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  initial begin checks = 0; failures = 0; finished = 1'b0; end

  logic cmd_valid, busy, done, key_load_i, reject_o, host_we;
  op_e cmd;
  logic [255:0] seed_kem_i, seed_ek_i, seed_dk_i, seed_ek_o, seed_dk_o, ss_o;
  logic [KB*8-1:0] msg_i, sigma_i, sigma_o;
  logic [127:0] salt_i;
  ram_e host_sel;
  logic [DAW-1:0] host_addr;
  logic [W-1:0] host_wdata, host_rdata;
  logic xof_init, xof_in_valid, xof_in_ready, xof_final, xof_out_valid, xof_out_ready;
  logic [7:0] xof_dom;
  logic [31:0] xof_in_data, xof_out_data;

  if (DEFAULTS) begin : g
    hqc_top dut (.*);
  end else begin : g
    hqc_top #(.N(N), .N1(N1), .N2(N2), .WT(WT), .WR(WR), .KB(KB), .W(W), .PARALLEL(PARALLEL)) dut (.*);
  end
  xof_model #(.STALL(1'b1)) u_xof (.*);

  // mechanism counters
  int n_xof_stall = 0, n_overlap = 0, n_hgen = 0, n_dup = 0, n_accept = 0, n_reject = 0, n_par = 0, n_seed_dec = 0;
  always @(posedge clk) begin
    if ((xof_in_valid && !xof_in_ready) || (xof_out_ready && !xof_out_valid)) n_xof_stall++;
    if (g.dut.enc_busy && g.dut.pm_busy) n_overlap++;
    if (g.dut.pm2_busy) n_par++;
    if (xof_init && xof_dom == 8'd3) n_hgen++;  // domain 3: expansion of h from its seed
    if (g.dut.u_fw.out_we && g.dut.u_fw.is_dup) n_dup++;
  end


  bit hb [N], sb [N], ub [N], vb [N], refb [N];

  task automatic run(input op_e op, output int cycles);
    int t0;
    @(negedge clk);
    cmd = op; cmd_valid = 1; t0 = $time;
    @(negedge clk); cmd_valid = 0;
    while (!done) @(negedge clk);
    cycles = ($time - t0) / 10;
  endtask

  task automatic read_ram(input ram_e r, output bit b [N]);
    for (int d = 0; d < D; d++) begin
      host_sel = r; host_addr = DAW'(d); #1;
      for (int t = 0; t < W; t++) if (d * W + t < N) b[d*W+t] = host_rdata[t];
    end
  endtask

  task automatic peek_h();
    for (int d = 0; d < D; d++)
      for (int t = 0; t < W; t++) if (d * W + t < N) hb[d*W+t] = g.dut.g_ram[0].u_ram.mem[d][t];
  endtask

  // refb = dense * sparse(list) + sparse(list2)
  task automatic ref_mul_add(input bit a [N], input int l, input int wt, input int l2, input int wt2);
    int p;
    for (int i = 0; i < N; i++) refb[i] = 0;
    for (int k = 0; k < wt; k++) begin
      p = g.dut.lists[l][k];
      for (int i = 0; i < N; i++) if (a[i]) refb[(i + p) % N] ^= 1;
    end
    for (int k = 0; k < wt2; k++) refb[g.dut.lists[l2][k]] ^= 1;
  endtask

  task automatic check_list(input int l, input int wt);
    int p;
    for (int k = 0; k < wt; k++) begin
      p = g.dut.lists[l][k];
      checks++;
      if (p >= N) failures++;
      for (int j = 0; j < k; j++) if (g.dut.lists[l][j] == p) failures++;
    end
  endtask

  task automatic flip(input ram_e r, input int bitpos);
    @(negedge clk);
    host_sel = r; host_addr = DAW'(bitpos / W); #1;
    host_wdata = host_rdata ^ (W'(1) << (bitpos % W));
    host_we = 1;
    @(negedge clk); host_we = 0;
  endtask

  initial begin
    int cyc_kg, cyc_enc, cyc_dec, cyc_dsd, cyc_rej, err, tries;
    logic [255:0] ss_enc;
    u8 m[]; u8 c[];
    cmd_valid = 0; cmd = OP_KEYGEN; key_load_i = 0; seed_ek_i = '0; seed_dk_i = '0; sigma_i = '0;
    seed_kem_i = '0; msg_i = '0; salt_i = '0; host_sel = RAM_S; host_addr = '0; host_we = 0; host_wdata = '0;
    repeat (3) @(posedge clk); rst_n = 1;

    // 1. key generation
    tries = 0;
    do begin
      for (int i = 0; i < 8; i++) seed_kem_i[i*32 +: 32] = $urandom;
      run(OP_KEYGEN, cyc_kg);
      tries++;
    end while (n_dup == 0 && tries < 40);
    $display("[n=%0d W=%0d] keygen: %0d cycles (%0d key generations until a duplicate was replaced)", N, W, cyc_kg, tries);
    check_list(0, WT); check_list(1, WT);
    peek_h();
    read_ram(RAM_S, sb);
    ref_mul_add(hb, 0, WT, 1, WT);
    err = 0;
    for (int i = 0; i < N; i++) if (sb[i] != refb[i]) err++;
    checks++; if (err != 0) begin failures++; $display("s differs in %0d bits", err); end

    // 2. encapsulation
    m = new[KB];
    foreach (m[i]) begin m[i] = u8'($urandom); msg_i[i*8 +: 8] = m[i]; end
    for (int i = 0; i < 4; i++) salt_i[i*32 +: 32] = $urandom;
    run(OP_ENCAPS, cyc_enc);
    ss_enc = ss_o;
    $display("[n=%0d W=%0d] encaps: %0d cycles", N, W, cyc_enc);
    check_list(0, WR); check_list(1, WR); check_list(2, WR);
    peek_h();
    read_ram(RAM_U, ub);
    read_ram(RAM_V, vb);
    ref_mul_add(hb, 0, WR, 2, WR);                   // u = h*r2 + r1
    err = 0;
    for (int i = 0; i < N; i++) if (ub[i] != refb[i]) err++;
    checks++; if (err != 0) begin failures++; $display("u differs in %0d bits", err); end
    ref_mul_add(sb, 0, WR, 1, WR);                   // s*r2 + e
    ref_rs_encode(N1, KB, m, c);
    for (int j = 0; j < N1; j++)
      for (int b = 0; b < N2; b++) refb[j*N2+b] ^= ref_rm_bit(c[j], b % 128);
    err = 0;
    for (int i = 0; i < N; i++) if (vb[i] != ((i < NV) ? refb[i] : 0)) begin
      err++;
      if (err < 4) $display("v bit %0d: got %0d expected %0d", i, vb[i], refb[i]);
    end
    checks++; if (err != 0) begin failures++; $display("v differs in %0d bits", err); end

    // 3. decapsulation of the genuine ciphertext
    msg_i = '0;
    run(OP_DECAPS, cyc_dec);
    $display("[n=%0d W=%0d] decaps: %0d cycles", N, W, cyc_dec);
    checks++; if (g.dut.msg_q != msg_from(m)) begin failures++; $display("message not recovered"); end
    checks++; if (reject_o) begin failures++; $display("genuine ciphertext rejected"); end else n_accept++;
    checks++; if (ss_o != ss_enc) begin failures++; $display("shared secrets differ"); end

    // 3b. decapsulation from the compressed key: key registers and s are
    //     spoilt first, so they must be re-derived from seed_kem
    @(negedge clk);
    key_load_i = 1; seed_ek_i = '1; seed_dk_i = '1; sigma_i = '1;
    @(negedge clk);
    key_load_i = 0;
    flip(RAM_S, 7);
    run(OP_DECAPS_SEED, cyc_dsd);
    $display("[n=%0d W=%0d] decaps from seed: %0d cycles", N, W, cyc_dsd);
    checks++; if (reject_o) begin failures++; $display("decaps from seed rejected"); end else n_seed_dec++;
    checks++; if (ss_o != ss_enc) begin failures++; $display("decaps from seed: shared secrets differ"); end

    // 4. decapsulation of tampered ciphertexts
    flip(RAM_V, $urandom % NV);
    run(OP_DECAPS, cyc_rej);
    checks++; if (!reject_o) begin failures++; $display("tampered v accepted"); end else n_reject++;
    checks++; if (ss_o == ss_enc) begin failures++; $display("rejection key equals the real key"); end
    read_ram(RAM_V, sb);
    for (int i = 0; i < NV; i++) if (sb[i] != vb[i]) begin sb[i] = vb[i]; flip(RAM_V, i); end
    flip(RAM_U, $urandom % N);
    run(OP_DECAPS, cyc_rej);
    checks++; if (!reject_o) begin failures++; $display("tampered u accepted"); end else n_reject++;

    $display("[n=%0d W=%0d] mechanisms: xof_stall=%0d enc_overlap=%0d h_regen=%0d dup=%0d accept=%0d reject=%0d noise_bits=%0d",
             N, W, n_xof_stall, n_overlap, n_hgen, n_dup, n_accept, n_reject, noise_bits);
    checks++; if (n_xof_stall == 0) failures++;
    checks++; if (n_overlap == 0) failures++;
    checks++; if (n_hgen < 3) failures++;
    checks++; if (n_dup == 0) failures++;
    checks++; if (n_accept == 0) failures++;
    checks++; if (n_reject < 2) failures++;
    checks++; if (noise_bits == 0) failures++;
    checks++; if (n_seed_dec == 0) failures++;
    if (PARALLEL) begin
      $display("[n=%0d W=%0d] parallel multiplier busy for %0d cycles", N, W, n_par);
      checks++; if (n_par == 0) failures++;
    end
    finished = 1'b1;
  end

  function automatic logic [KB*8-1:0] msg_from(u8 mm[]);
    logic [KB*8-1:0] r;
    for (int i = 0; i < KB; i++) r[i*8 +: 8] = mm[i];
    return r;
  endfunction

  // noisy bits fed to the decoder: v - u*y differs from Encode(m) there
  int noise_bits = 0;
  bit encb [NV];
  always @(posedge clk) begin
    if (g.dut.dec_valid && g.dut.dec_ready) begin
      for (int t = 0; t < W; t++)
        if (g.dut.cnt * W + t < NV && g.dut.dec_data[t] != encb[g.dut.cnt*W+t]) noise_bits++;
    end
  end
  initial begin
    wait (g.dut.op_q == OP_ENCAPS && done);
    // reference Encode(m) for the noise count, built once the message is known
    begin
      u8 mm[]; u8 cc[];
      mm = new[KB];
      for (int i = 0; i < KB; i++) mm[i] = g.dut.msg_q[i*8 +: 8];
      ref_rs_encode(N1, KB, mm, cc);
      for (int j = 0; j < N1; j++)
        for (int b = 0; b < N2; b++) encb[j*N2+b] = ref_rm_bit(cc[j], b % 128);
    end
  end
endmodule
