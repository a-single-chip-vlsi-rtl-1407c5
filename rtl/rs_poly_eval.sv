// rs_poly_eval: polynomial evaluation pipeline.
//
// Evaluates p(x) = sum_{i<NC} c_i x^i at x = alpha^-n for every codeword
// position n = 0..N-1, one position per cycle.  Cell i owns a register that
// is loaded with c_i and is then multiplied by the fixed constant alpha^-i
// after every output, so at position n it holds c_i * alpha^(-i*n).  The
// value is the sum (exclusive OR) of all cell registers.  One such pipeline
// serves the errata evaluator, the errata locator derivative and the Chien
// search on the error locator.
//
// Evaluating at alpha^-n, not alpha^n, is what the reciprocal (x = 1/Z)
// polynomial form used throughout this decoder requires: a factor (1 + X x)
// vanishes at x = X^-1.  Loading c_i unmultiplied, so that the first output
// belongs to position 0, is likewise this design's choice.
//
// Interface and timing: load (one cycle) captures coef.  The next N cycles
// give out_valid = 1 with out_pos = 0, 1, ..., N-1, out_val = p(alpha^-pos)
// and out_zero = (out_val == 0).  A new load may follow the last output
// directly; a load during a run restarts it.
module rs_poly_eval
  import rs_pkg::*;
#(
  parameter int N  = N_DEF,
  parameter int NC = D_DEF + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic load,
  input  gf_t  coef [NC],
  output logic out_valid,
  output logic [$clog2(N)-1:0] out_pos,
  output gf_t  out_val,
  output logic out_zero
);

  localparam int PW = $clog2(N);

  gf_t cr [NC];

  always_comb begin
    out_val = '0;
    for (int i = 0; i < NC; i++) out_val = out_val ^ cr[i];
    out_zero = (out_val == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pos   <= '0;
      for (int i = 0; i < NC; i++) cr[i] <= '0;
    end else begin
      if (load) begin
        out_valid <= 1'b1;
        out_pos   <= '0;
        for (int i = 0; i < NC; i++) cr[i] <= coef[i];
      end else if (out_valid) begin
        for (int i = 0; i < NC; i++) cr[i] <= gf_mul(cr[i], gf_alpha_pow(-i));
        if (out_pos == PW'(N - 1)) begin
          out_valid <= 1'b0;
          out_pos   <= '0;
        end else begin
          out_pos <= out_pos + 1'b1;
        end
      end
    end
  end

endmodule
