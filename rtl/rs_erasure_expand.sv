// rs_erasure_expand: polynomial expansion of the erasure locator.
//
// Erasure information arrives serially with the received symbols, one bit
// per position (1 = erased), position 0 first.  A generator register that
// starts at 1 and is multiplied by alpha every cycle gives alpha^n at
// position n; ANDing it with the erasure bit turns the bit stream into a
// stream of alpha^n's and 0's (the erasure locators X = alpha^n).
//
// A linear array of D+1 coefficient latches then multiplies the factors
// (1 + X x) into the product one at a time as they arrive: for a nonzero
// input X every latch j takes c_j + X*c_{j-1}, the lowest cell seeing 0 from
// below.  A zero input leaves the latches alone, so the input stream itself
// enables the update.  The result is the erasure locator in reciprocal form,
// Lr(x) = prod (1 + X_i x) = x^s * Lambda(1/x) where Lambda(Z) = prod (Z - X_i);
// coefficient j of Lr is coefficient s-j of Lambda.  The decoder keeps every
// polynomial in this x = 1/Z form.
//
// Timing: the cycle after the N-th position of a codeword, the latches are
// copied into the output registers (lam, s_cnt, overflow) and lam_valid
// pulses; the latches restart with the next codeword at once.  overflow is
// set when more than D erasures were flagged: the array has only D cells
// beyond the constant term, so such a codeword cannot be corrected.
// The bit-to-locator conversion and the shift/scale/add update follow the
// decoder description; the reciprocal form, the parallel output registers
// and the overflow flag are this design's own choices.
module rs_erasure_expand
  import rs_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int D = D_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  logic in_era,
  output logic lam_valid,
  output gf_t  lam [D+1],
  output logic [$clog2(N+1)-1:0] s_cnt,
  output logic overflow
);

  localparam int PW = $clog2(N);
  localparam int SW = $clog2(N + 1);

  logic [PW-1:0] pos;
  gf_t           gen;        // alpha^pos
  gf_t           loc;        // alpha^pos or 0
  gf_t           c     [D+1];
  gf_t           c_base[D+1];
  gf_t           c_next[D+1];
  logic [SW-1:0] cnt, cnt_base, cnt_next;

  assign loc = in_era ? gen : '0;

  always_comb begin
    // position 0 starts a new product: 1
    for (int j = 0; j <= D; j++)
      c_base[j] = (pos == '0) ? ((j == 0) ? gf_t'(1) : '0) : c[j];
    cnt_base = (pos == '0) ? '0 : cnt;
    for (int j = 0; j <= D; j++)
      c_next[j] = c_base[j] ^ ((j == 0) ? '0 : gf_mul(loc, c_base[j-1]));
    cnt_next = cnt_base + SW'(in_era);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos       <= '0;
      gen       <= gf_t'(1);
      cnt       <= '0;
      lam_valid <= 1'b0;
      s_cnt     <= '0;
      overflow  <= 1'b0;
      for (int j = 0; j <= D; j++) begin
        c[j]   <= '0;
        lam[j] <= '0;
      end
    end else begin
      lam_valid <= 1'b0;
      if (in_valid) begin
        cnt <= cnt_next;
        for (int j = 0; j <= D; j++) c[j] <= c_next[j];
        if (pos == PW'(N - 1)) begin
          pos       <= '0;
          gen       <= gf_t'(1);
          lam_valid <= 1'b1;
          s_cnt     <= cnt_next;
          overflow  <= (cnt_next > SW'(D));
          for (int j = 0; j <= D; j++) lam[j] <= c_next[j];
        end else begin
          pos <= pos + 1'b1;
          gen <= gf_mul(gen, gf_t'(2));
        end
      end
    end
  end

endmodule
