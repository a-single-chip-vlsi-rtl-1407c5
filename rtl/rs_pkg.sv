// rs_pkg: shared constants, types and Galois-field arithmetic for the
// pipelined Reed-Solomon errors-and-erasures decoder.
//
// The decoder works on the (31,15) Reed-Solomon code over GF(2^5): N = 31
// symbols per codeword, I = 15 information symbols, D = N - I = 16 syndromes
// (design distance d = 17).  These are the main configuration of the design.
// The field is generated by the primitive polynomial x^5 + x^2 + 1 and alpha
// is the root x; the choice of that polynomial is this design's own.
//
// All functions are pure combinational logic: gf_mul is a shift-and-add
// multiplier with modular reduction, gf_alpha_pow builds alpha^e by repeated
// multiplication, gf_inv raises a to the power 2^M - 2 (the inverse of 0 is
// returned as 0).  Polynomials throughout the decoder are held as arrays of
// coefficients with index i holding the coefficient of x^i.
package rs_pkg;

  parameter int M      = 5;              // bits per symbol
  parameter int NQ     = (1 << M) - 1;   // multiplicative group order, 31
  parameter logic [M:0] PRIM = 6'b100101; // x^5 + x^2 + 1

  parameter int N_DEF  = 31;             // code length
  parameter int I_DEF  = 15;             // information symbols
  parameter int D_DEF  = N_DEF - I_DEF;  // d - 1 = number of syndromes, 16
  parameter int NCELL_DEF = 9;           // recursive Euclid cells for (31,15)

  typedef logic [M-1:0] gf_t;

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [M-1:0] acc;
    logic [M-1:0] sh;
    acc = '0;
    sh  = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) acc = acc ^ sh;
      // multiply sh by x modulo PRIM
      if (sh[M-1]) sh = (sh << 1) ^ PRIM[M-1:0];
      else         sh = sh << 1;
    end
    return acc;
  endfunction

  // alpha^e for any integer e (negative allowed)
  function automatic gf_t gf_alpha_pow(int e);
    int  r;
    gf_t v;
    r = e % NQ;
    if (r < 0) r = r + NQ;
    v = gf_t'(1);
    for (int i = 0; i < NQ; i++)
      if (i < r) v = gf_mul(v, gf_t'(2));
    return v;
  endfunction

  function automatic gf_t gf_inv(gf_t a);
    gf_t v;
    v = gf_t'(1);
    // a^(2^M - 2) = a^(NQ - 1)
    for (int i = 0; i < NQ - 1; i++) v = gf_mul(v, a);
    return v;
  endfunction

endpackage
