// tb_ref_pkg: reference models used by the testbenches.
// GF(2^8) arithmetic via exponent/log tables built at time zero, the
// Reed-Solomon encoding as polynomial long division by g(x), the RM(1,7)
// codeword bit formula and the constant-weight sampling procedure, all
// written independently of the RTL so that it can be checked against them.
package tb_ref_pkg;
  typedef byte unsigned u8;

  function automatic u8 ref_mul(u8 a, u8 b);
    int unsigned x, r;
    x = a; r = 0;
    for (int i = 0; i < 8; i++) begin
      if ((b >> i) & 1) r ^= x << i;
    end
    for (int i = 15; i >= 8; i--) if ((r >> i) & 1) r ^= 32'h11D << (i - 8);
    return u8'(r);
  endfunction

  function automatic u8 ref_alpha(int e);
    u8 r;
    r = 1;
    for (int i = 0; i < ((e % 255) + 255) % 255; i++) r = ref_mul(r, 2);
    return r;
  endfunction

  // systematic RS codeword: cdw[0..nr-1] parity, cdw[nr..n1-1] message
  function automatic void ref_rs_encode(input int n1, input int kb, input u8 msg[], output u8 cdw[]);
    u8 g[];
    u8 rem[];
    u8 coef;
    int nr;
    nr = n1 - kb;
    g = new[nr + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int r = 1; r <= nr; r++) begin
      for (int j = nr; j > 0; j--) g[j] = g[j-1] ^ ref_mul(g[j], ref_alpha(r));
      g[0] = ref_mul(g[0], ref_alpha(r));
    end
    // remainder of msg(x) * x^nr divided by g(x)
    rem = new[n1];
    foreach (rem[i]) rem[i] = 0;
    for (int i = 0; i < kb; i++) rem[nr + i] = msg[i];
    for (int d = n1 - 1; d >= nr; d--) begin
      coef = rem[d];
      if (coef != 0)
        for (int j = 0; j <= nr; j++) rem[d - nr + j] ^= ref_mul(coef, g[j]);
    end
    cdw = new[n1];
    for (int i = 0; i < nr; i++) cdw[i] = rem[i];
    for (int i = 0; i < kb; i++) cdw[nr + i] = msg[i];
  endfunction

  function automatic bit ref_rm_bit(u8 m, int t);
    bit b;
    b = m[7];
    for (int i = 0; i < 7; i++) b ^= m[i] & t[i];
    return b;
  endfunction
endpackage
