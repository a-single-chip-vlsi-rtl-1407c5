// rs_correct: errata magnitude and correction stage.
//
// For each position n of a codeword, with X = alpha^n, it receives
//   a_val   = X^-1 * Omega(X^-1)   (the errata evaluator, shifted by x)
//   p_val   = X^-1 * P'(X^-1)      (odd part of the errata locator P)
//   lam_zero: the error locator vanishes here (Chien search hit)
//   era     : the position was flagged as an erasure
//   r       : the received symbol
// and forms the magnitude Y = a_val * p_val^-1 (one field inversion and one
// multiplication).  The errata location flag is lam_zero OR era; where it is
// set Y is added to r, elsewhere r passes unchanged.  fail marks a codeword
// the earlier stages found uncorrectable; its symbols pass uncorrected.
//
// Timing: one register stage; out_* follow in_valid by one cycle.
// The structure (inverse, multiply, OR of the two location streams, gate,
// add) follows the decoder description; the fail bypass is this design's.
module rs_correct
  import rs_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  gf_t  r,
  input  logic era,
  input  gf_t  a_val,
  input  gf_t  p_val,
  input  logic lam_zero,
  input  logic fail,
  output logic out_valid,
  output gf_t  out_sym,
  output logic out_loc
);

  gf_t  p_inv, y;
  logic loc;

  rs_gf_inv u_inv (.a(p_val), .y(p_inv));

  assign y   = gf_mul(a_val, p_inv);
  assign loc = (lam_zero | era) & !fail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
      out_loc   <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_sym   <= r ^ (loc ? y : '0);
      out_loc   <= in_valid & loc;
    end
  end

endmodule
