// hqc_pkg: parameters and arithmetic shared by the HQC accelerator.
//
// Holds the HQC-1 parameter set (the configuration all modules default to),
// GF(2^8) arithmetic over the primitive polynomial x^8+x^4+x^3+x^2+1 used by
// the Reed-Solomon code, and constant functions that derive the
// Reed-Solomon generator polynomial g(x) = prod_{i=1..2*delta} (x - alpha^i)
// at elaboration time, so no coefficient table has to be stored as data.
// The parameter values follow the HQC-1 row of the parameter table; the GF
// polynomial and the generator construction follow the HQC specification.
package hqc_pkg;

  // HQC-1 parameter set.
  localparam int unsigned HQC1_N      = 17669; // ring length n
  localparam int unsigned HQC1_N1     = 46;    // Reed-Solomon length (bytes)
  localparam int unsigned HQC1_N2     = 384;   // duplicated Reed-Muller length (bits)
  localparam int unsigned HQC1_W      = 66;    // weight of x, y
  localparam int unsigned HQC1_WR     = 75;    // weight of r1, r2, e
  localparam int unsigned HQC1_KBYTES = 16;    // message size k/8

  localparam int unsigned RM_BITS     = 128;   // RM(1,7) codeword length
  localparam int unsigned MAX_ROOTS   = 64;    // upper bound on n1 - k

  typedef logic [7:0] gf_t;
  typedef gf_t gpoly_t [MAX_ROOTS+1];

  // Multiply in GF(2^8) modulo x^8+x^4+x^3+x^2+1 (0x11D).
  function automatic gf_t gf_mul(input gf_t a, input gf_t b);
    logic [7:0] acc;
    logic [7:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= sh;
      sh = {sh[6:0], 1'b0} ^ (sh[7] ? 8'h1D : 8'h00);
    end
    return acc;
  endfunction

  // alpha^e for alpha = 2.
  function automatic gf_t gf_pow_alpha(input int unsigned e);
    gf_t r;
    r = 8'h01;
    for (int unsigned i = 0; i < (e % 255); i++) r = gf_mul(r, 8'h02);
    return r;
  endfunction

  // Multiplicative inverse a^254 (returns 0 for a = 0).
  function automatic gf_t gf_inv(input gf_t a);
    gf_t r;
    gf_t sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  // Coefficients g[0..nroots] of prod_{i=1..nroots} (x + alpha^i).
  function automatic gpoly_t rs_gen_poly(input int unsigned nroots);
    gpoly_t g;
    gf_t    a;
    for (int i = 0; i <= MAX_ROOTS; i++) g[i] = '0;
    g[0] = 8'h01;
    for (int unsigned r = 1; r <= nroots; r++) begin
      a = gf_pow_alpha(r);
      for (int j = MAX_ROOTS; j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], a);
      g[0] = gf_mul(g[0], a);
    end
    return g;
  endfunction

  // Operations of the unified accelerator.
  typedef enum logic [1:0] {OP_KEYGEN = 2'd0, OP_ENCAPS = 2'd1, OP_DECAPS = 2'd2, OP_DECAPS_SEED = 2'd3} op_e;

  // Polynomial memories: h, s, u, v and a scratch copy used by decapsulation.
  typedef enum logic [2:0] {RAM_H = 3'd0, RAM_S = 3'd1, RAM_U = 3'd2, RAM_V = 3'd3, RAM_T = 3'd4} ram_e;

  // Ceiling division.
  function automatic int unsigned cdiv(input int unsigned a, input int unsigned b);
    return (a + b - 1) / b;
  endfunction

endpackage
