// rs_poly_mult: serial polynomial multiplier, P = A * B truncated to LP
// coefficients (P mod x^LP).
//
// A start pulse captures both operands.  A is held in parallel registers;
// B is loaded into a shift register that shifts its coefficients out one
// per cycle, highest power first (for the erasure locator this is the
// serial shift-out of the expanded coefficients).  The product is built by
// Horner's rule: every cycle the accumulator is multiplied by x (shifted up
// one place, the top coefficient dropping off, which is the mod x^LP) and
// A times the current coefficient of B is added, using LA multipliers.
// After LB cycles the accumulator holds sum_j b_j x^j A(x) mod x^LP.
//
// The decoder uses two instances: T = S * Lr mod x^D (the Forney syndrome)
// and P = Lr * lambda (the errata locator).
//
// Timing: start in cycle 0, done pulses in cycle LB + 1 and p holds the
// product until the next start.  start while busy restarts the product.
// The multiplier's internal structure is not taken from the decoder
// description (which gives only its function); this one-coefficient-per-
// cycle form is this design's choice.
module rs_poly_mult
  import rs_pkg::*;
#(
  parameter int LA = D_DEF + 1,
  parameter int LB = D_DEF + 1,
  parameter int LP = D_DEF + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  a_in [LA],
  input  gf_t  b_in [LB],
  output logic busy,
  output logic done,
  output gf_t  p [LP]
);

  localparam int JW = $clog2(LB + 1);

  gf_t           a_r [LA];
  gf_t           b_r [LB];
  gf_t           acc [LP];
  gf_t           nxt [LP];
  logic [JW-1:0] j;

  // one Horner step: acc * x + A * b, with b the top of the B register
  always_comb begin
    for (int k = 0; k < LP; k++) begin
      nxt[k] = (k == 0) ? '0 : acc[(k == 0) ? 0 : k - 1];
      if (k < LA) nxt[k] = nxt[k] ^ gf_mul(a_r[(k < LA) ? k : 0], b_r[LB-1]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      j    <= '0;
      for (int i = 0; i < LA; i++) a_r[i] <= '0;
      for (int i = 0; i < LB; i++) b_r[i] <= '0;
      for (int k = 0; k < LP; k++) begin
        acc[k] <= '0;
        p[k]   <= '0;
      end
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        j    <= '0;
        for (int i = 0; i < LA; i++) a_r[i] <= a_in[i];
        for (int i = 0; i < LB; i++) b_r[i] <= b_in[i];
        for (int k = 0; k < LP; k++) acc[k] <= '0;
      end else if (busy) begin
        // the B register shifts its coefficients out, b_(LB-1) first
        for (int i = 0; i < LB; i++) b_r[i] <= (i == 0) ? '0 : b_r[(i == 0) ? 0 : i - 1];
        for (int k = 0; k < LP; k++) acc[k] <= nxt[k];
        if (j == JW'(LB - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          for (int k = 0; k < LP; k++) p[k] <= nxt[k];
        end else begin
          j <= j + 1'b1;
        end
      end
    end
  end

endmodule
