// rs_syndrome: the transform (syndrome) unit of the decoder front end.
//
// Computes S_k = sum_{n=0}^{N-1} r_n * alpha^(n*k) for k = 1..D over one
// received codeword.  Received symbols arrive one per cycle, r_0 first, and
// are qualified by in_valid; the unit counts positions itself, so a codeword
// is exactly N valid symbols.  There is one cell per syndrome (D cells, the
// number of cells the transform needs for an (N,I) code is N - I).  Cell k
// keeps a running power register p_k = alpha^(n*k) that is multiplied by the
// constant alpha^k after each symbol, and an accumulator that adds r_n * p_k.
//
// Timing: the cycle after the N-th symbol of a codeword, syn_valid pulses for
// one cycle and syn[k-1] holds S_k until the next codeword completes.  A new
// codeword may start in the very next cycle (no gaps needed).
// The cell count and the equation follow the decoder description; the
// symbol order (r_0 first) and the parallel output register are this
// design's own choices.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int D = D_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  gf_t  in_sym,
  output logic syn_valid,
  output gf_t  syn [D]
);

  localparam int PW = $clog2(N);

  logic [PW-1:0] pos;
  gf_t acc [D];
  gf_t pw  [D];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      syn_valid <= 1'b0;
      for (int k = 0; k < D; k++) begin
        acc[k] <= '0;
        pw[k]  <= gf_t'(1);
        syn[k] <= '0;
      end
    end else begin
      syn_valid <= 1'b0;
      if (in_valid) begin
        for (int k = 0; k < D; k++) begin
          // position 0 restarts the accumulation; alpha^(0*k) = 1
          if (pos == '0) begin
            acc[k] <= in_sym;
            pw[k]  <= gf_alpha_pow(k + 1);
          end else begin
            acc[k] <= acc[k] ^ gf_mul(in_sym, pw[k]);
            pw[k]  <= gf_mul(pw[k], gf_alpha_pow(k + 1));
          end
        end
        if (pos == PW'(N - 1)) begin
          pos       <= '0;
          syn_valid <= 1'b1;
          for (int k = 0; k < D; k++)
            syn[k] <= acc[k] ^ gf_mul(in_sym, pw[k]);
        end else begin
          pos <= pos + 1'b1;
        end
      end
    end
  end

endmodule
