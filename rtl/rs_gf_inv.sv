// rs_gf_inv: GF(2^5) field inversion, combinational.
//
// out = in^-1, computed as in^(2^M - 2) by the package function (a fixed
// chain of multipliers that synthesis reduces to a small lookup); the
// inverse of 0 is defined as 0.  The decoder uses it to remove the Euclid
// scale factor K and to form [X P'(X)]^-1 for the errata magnitudes.  There
// is no clock: the result is valid in the same cycle.
module rs_gf_inv
  import rs_pkg::*;
(
  input  gf_t a,
  output gf_t y
);

  assign y = gf_inv(a);

endmodule
