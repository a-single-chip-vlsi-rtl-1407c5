// rs_euclid_cell: one recursive cell of the modified Euclid algorithm.
//
// Given the Forney syndrome T(x) (D coefficients) and the erasure count s,
// the cell finds the error locator lambda(x) and the errata evaluator
// Omega(x) with lambda*T = Omega mod x^D.  It starts from the pairs
// (R, lambda) = (x^D, 0) and (Q, mu) = (T, 1), and uses one set of hardware
// recursively: every recursion performs one division-free Euclid step
//
//   a = lead(R), b = lead(Q), l = deg R - deg Q
//   l >= 0:  R <- b*R + a*x^l*Q        lambda <- b*lambda + a*x^l*mu
//   l <  0:  R <- a*Q + b*x^-l*R,  Q <- old R
//            lambda <- a*mu + b*x^-l*lambda,  mu <- old lambda
//
// (in characteristic 2 subtraction is addition).  The step works on one
// coefficient per cycle, from index D down to 0, so a recursion takes D+1
// cycles; processing from the top down lets the swap be done in place.  The
// degree of the new R is found on the way (the first nonzero coefficient).
// At the start of each recursion the cell verifies the degrees: once
// 2*deg(R) < D + s (or R = 0) the pair (R, lambda) is the answer, otherwise
// once 2*deg(Q) < D + s (or Q = 0) the pair (Q, mu) is; the cell then holds
// its state for the remaining recursions.  The cell always runs exactly D
// recursions so that its latency is fixed.
//
// The results carry an unknown common scale factor K.  The cell reports
// K = lambda(0) (the leading coefficient of the locator in 1/x form), which a
// later stage inverts to remove it.
//
// Interface and timing: start (one cycle) captures t_in and s_in; done pulses
// 1 + D*(D+1) + 1 cycles later (274 cycles for D = 16) with omega, lam, k_out,
// sel_q (answer taken from Q rather than R) and ok (a pair met the degree
// test) held until the next start.  busy is high in between; a start while
// busy is ignored and must be avoided by the caller.
// The step equations, the degree tests and the recursive reuse follow the
// decoder description; the coefficient-serial order, the Q-side answer
// selection and taking K from lambda(0) are this design's own.
module rs_euclid_cell
  import rs_pkg::*;
#(
  parameter int N = N_DEF,
  parameter int D = D_DEF
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  t_in [D],
  input  logic [$clog2(N+1)-1:0] s_in,
  output logic busy,
  output logic done,
  output gf_t  omega [D],
  output gf_t  lam   [D+1],
  output gf_t  k_out,
  output logic sel_q,
  output logic ok
);

  localparam int DW = $clog2(D + 1) + 1;   // holds 0..D and differences
  localparam int RW = $clog2(D + 1);
  localparam int SW = $clog2(N + 1);

  gf_t r  [D+1];
  gf_t q  [D+1];
  gf_t lm [D+1];
  gf_t mu [D+1];
  logic [DW-1:0] dr, dq;
  logic          rz, qz;       // R = 0, Q = 0
  logic [SW-1:0] s_r;
  logic          fin, fin_q;   // answer found, and taken from Q
  logic [RW-1:0] rec;          // recursion number
  logic [DW-1:0] j;            // coefficient index, D down to 0
  logic          run, last;

  // per-recursion constants, latched in the first cycle of a recursion
  gf_t           a_l, b_l;
  logic          sig_l;
  logic [DW-1:0] sh_l;
  logic          hold_l;
  logic          found;       // a nonzero coefficient of the new R was seen
  logic [DW-1:0] ndr;

  // values for the current cycle
  gf_t           a_c, b_c;
  logic          sig_c, hold_c, stop_r, stop_q;
  logic [DW-1:0] sh_c;
  logic          first;
  logic [DW+SW:0] lim;

  assign first = (j == DW'(D));
  assign lim   = (DW+SW+1)'(D) + (DW+SW+1)'(s_r);

  always_comb begin
    stop_r = rz || ((DW+SW+1)'({dr, 1'b0}) < lim);
    stop_q = qz || ((DW+SW+1)'({dq, 1'b0}) < lim);
    if (first) begin
      a_c    = r[dr[RW-1:0]];
      b_c    = q[dq[RW-1:0]];
      sig_c  = (dr >= dq);
      sh_c   = (dr >= dq) ? (dr - dq) : (dq - dr);
      hold_c = fin || stop_r || stop_q;
    end else begin
      a_c    = a_l;
      b_c    = b_l;
      sig_c  = sig_l;
      sh_c   = sh_l;
      hold_c = hold_l;
    end
  end

  // one coefficient of the step
  gf_t r_j, q_j, lm_j, mu_j, q_lo, r_lo, mu_lo, lm_lo;
  gf_t r_new, lm_new;
  logic [DW:0] lo_idx;
  always_comb begin
    r_j  = r[j[RW-1:0]];
    q_j  = q[j[RW-1:0]];
    lm_j = lm[j[RW-1:0]];
    mu_j = mu[j[RW-1:0]];
    lo_idx = {1'b0, j} - {1'b0, sh_c};
    q_lo  = lo_idx[DW] ? '0 : q [lo_idx[RW-1:0]];
    r_lo  = lo_idx[DW] ? '0 : r [lo_idx[RW-1:0]];
    mu_lo = lo_idx[DW] ? '0 : mu[lo_idx[RW-1:0]];
    lm_lo = lo_idx[DW] ? '0 : lm[lo_idx[RW-1:0]];
    if (sig_c) begin
      r_new  = gf_mul(b_c, r_j)  ^ gf_mul(a_c, q_lo);
      lm_new = gf_mul(b_c, lm_j) ^ gf_mul(a_c, mu_lo);
    end else begin
      r_new  = gf_mul(a_c, q_j)  ^ gf_mul(b_c, r_lo);
      lm_new = gf_mul(a_c, mu_j) ^ gf_mul(b_c, lm_lo);
    end
  end

  // degree of the incoming T
  logic [DW-1:0] dt;
  logic          tz;
  always_comb begin
    dt = '0;
    tz = 1'b1;
    for (int i = 0; i < D; i++)
      if (t_in[i] != '0) begin
        dt = DW'(i);
        tz = 1'b0;
      end
  end

  assign busy = run | last;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; last <= 1'b0; done <= 1'b0;
      dr <= '0; dq <= '0; rz <= 1'b1; qz <= 1'b1; s_r <= '0;
      fin <= 1'b0; fin_q <= 1'b0; rec <= '0; j <= '0;
      a_l <= '0; b_l <= '0; sig_l <= 1'b0; sh_l <= '0; hold_l <= 1'b1;
      found <= 1'b0; ndr <= '0;
      k_out <= '0; sel_q <= 1'b0; ok <= 1'b0;
      for (int i = 0; i <= D; i++) begin
        r[i] <= '0; q[i] <= '0; lm[i] <= '0; mu[i] <= '0; lam[i] <= '0;
      end
      for (int i = 0; i < D; i++) omega[i] <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        for (int i = 0; i <= D; i++) begin
          r[i]  <= (i == D) ? gf_t'(1) : '0;
          q[i]  <= (i == D) ? '0 : t_in[i];
          lm[i] <= '0;
          mu[i] <= (i == 0) ? gf_t'(1) : '0;
        end
        dr <= DW'(D); rz <= 1'b0;
        dq <= dt;     qz <= tz;
        s_r <= s_in;
        fin <= 1'b0; fin_q <= 1'b0;
        rec <= '0; j <= DW'(D);
        found <= 1'b0;
        run <= 1'b1;
      end else if (run) begin
        if (first) begin
          a_l <= a_c; b_l <= b_c; sig_l <= sig_c; sh_l <= sh_c; hold_l <= hold_c;
          if (!fin && (stop_r || stop_q)) begin
            fin   <= 1'b1;
            fin_q <= !stop_r;
          end
        end
        if (!hold_c) begin
          r[j[RW-1:0]]  <= r_new;
          lm[j[RW-1:0]] <= lm_new;
          if (!sig_c) begin
            q[j[RW-1:0]]  <= r_j;
            mu[j[RW-1:0]] <= lm_j;
          end
        end
        // degree of the new R, found from the top down
        if (first) begin
          found <= (r_new != '0);
          ndr   <= (r_new != '0) ? j : '0;
        end else if (!found && r_new != '0) begin
          found <= 1'b1;
          ndr   <= j;
        end
        if (j == '0) begin
          if (!hold_c) begin
            dr <= (found || r_new != '0) ? ((found) ? ndr : '0) : '0;
            rz <= !(found || r_new != '0);
            if (!sig_c) begin
              dq <= dr;
              qz <= rz;
            end
          end
          j <= DW'(D);
          if (rec == RW'(D - 1)) begin
            run  <= 1'b0;
            last <= 1'b1;
          end else begin
            rec <= rec + 1'b1;
          end
        end else begin
          j <= j - 1'b1;
        end
      end else if (last) begin
        // final degree test and output
        last <= 1'b0;
        done <= 1'b1;
        if (fin ? fin_q : (!stop_r && stop_q)) begin
          for (int i = 0; i < D; i++) omega[i] <= q[i];
          for (int i = 0; i <= D; i++) lam[i] <= mu[i];
          k_out <= mu[0];
          sel_q <= 1'b1;
        end else begin
          for (int i = 0; i < D; i++) omega[i] <= r[i];
          for (int i = 0; i <= D; i++) lam[i] <= lm[i];
          k_out <= lm[0];
          sel_q <= 1'b0;
        end
        ok <= fin || stop_r || stop_q;
      end
    end
  end

endmodule
