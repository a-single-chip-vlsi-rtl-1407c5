// tb_gf_pkg: reference GF(2^5) arithmetic and Reed-Solomon helpers for the
// testbenches, written independently of the design: multiplication goes
// through exponent/logarithm tables built by stepping an LFSR for the
// primitive polynomial x^5 + x^2 + 1, and codewords are made by
// multiplying a random message by the generator g(x) = prod_{k=1..16}
// (x + alpha^k), so that c(alpha^k) = 0 for k = 1..16.
package tb_gf_pkg;

  typedef logic [4:0] sym_t;

  function automatic sym_t ref_exp(int e);
    int   r;
    sym_t v;
    r = e % 31;
    if (r < 0) r += 31;
    v = 5'd1;
    for (int i = 0; i < r; i++) v = v[4] ? ((v << 1) ^ 5'b00101) : (v << 1);
    return v;
  endfunction

  function automatic int ref_log(sym_t a);
    for (int e = 0; e < 31; e++) if (ref_exp(e) == a) return e;
    return -1;
  endfunction

  function automatic sym_t ref_mul(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 5'd0;
    return ref_exp(ref_log(a) + ref_log(b));
  endfunction

  function automatic sym_t ref_inv(sym_t a);
    if (a == 0) return 5'd0;
    return ref_exp(31 - ref_log(a));
  endfunction

  // value of sum c[i] x^i at x
  function automatic sym_t ref_eval(sym_t c[], sym_t x);
    sym_t acc;
    acc = 0;
    for (int i = c.size() - 1; i >= 0; i--) acc = ref_mul(acc, x) ^ c[i];
    return acc;
  endfunction

  // random codeword of the (31,15) code, c[n] for position n
  function automatic void ref_codeword(output sym_t c[31]);
    sym_t g[17];
    sym_t m[15];
    for (int i = 0; i < 17; i++) g[i] = 0;
    g[0] = 1;
    for (int k = 1; k <= 16; k++)
      for (int i = 16; i >= 0; i--)
        g[i] = ref_mul(g[i], ref_exp(k)) ^ ((i > 0) ? g[i-1] : 5'd0);
    for (int i = 0; i < 15; i++) m[i] = sym_t'($urandom_range(0, 31));
    for (int n = 0; n < 31; n++) c[n] = 0;
    for (int i = 0; i < 15; i++)
      for (int j = 0; j < 17; j++)
        c[i+j] ^= ref_mul(m[i], g[j]);
  endfunction

  // A random key-equation instance: a codeword hit by t errors and s
  // erasures at distinct positions; returns the Forney syndrome
  // T = S * prod(1 + alpha^e x) mod x^16 (e over the erasures), with
  // S = sum_k S_k x^(k-1), and the error and erasure positions.
  function automatic void ref_forney(input int s, input int t,
                                     output sym_t tt[16],
                                     output int errs[$], output int eras[$]);
    sym_t c[31];
    sym_t syn[16];
    sym_t lr[17];
    logic used[31];
    errs = {}; eras = {};
    ref_codeword(c);
    for (int n = 0; n < 31; n++) used[n] = 1'b0;
    for (int k = 0; k < s + t; k++) begin
      int p;
      do p = $urandom_range(0, 30); while (used[p]);
      used[p] = 1'b1;
      if (k < s) begin
        eras.push_back(p);
        c[p] ^= sym_t'($urandom_range(0, 31));
      end else begin
        errs.push_back(p);
        c[p] ^= sym_t'($urandom_range(1, 31));
      end
    end
    for (int k = 1; k <= 16; k++) begin
      syn[k-1] = 0;
      for (int n = 0; n < 31; n++) syn[k-1] ^= ref_mul(c[n], ref_exp(n * k));
    end
    for (int i = 0; i < 17; i++) lr[i] = (i == 0) ? 5'd1 : 5'd0;
    foreach (eras[q])
      for (int i = 16; i >= 1; i--) lr[i] ^= ref_mul(lr[i-1], ref_exp(eras[q]));
    for (int k = 0; k < 16; k++) begin
      tt[k] = 0;
      for (int i = 0; i <= k; i++) tt[k] ^= ref_mul(syn[k-i], lr[i]);
    end
  endfunction

endpackage
