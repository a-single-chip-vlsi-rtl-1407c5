// rs_decoder: pipelined Reed-Solomon decoder for errors and erasures,
// (31,15) code over GF(2^5), one received symbol per clock.
//
// Received symbols enter with an erasure flag each (in_era = 1 marks a
// symbol known to be unreliable).  For every codeword the pipeline
//   1. computes the D = 16 syndromes (rs_syndrome),
//   2. expands the erasure locator Lr(x) = prod (1 + X x) from the flags
//      (rs_erasure_expand),
//   3. multiplies them into the Forney syndrome T = S*Lr mod x^D
//      (rs_poly_mult),
//   4. solves lambda*T = Omega mod x^D with the modified Euclid algorithm
//      in 9 multiplexed recursive cells and removes the scale factor
//      (rs_euclid_array),
//   5. multiplies the error locator by the erasure locator into the errata
//      locator P = Lr*lambda (rs_poly_mult),
//   6. evaluates, for every position n, x*Omega(x), the odd part of P (which
//      is x*P'(x)) and lambda(x) at x = alpha^-n (three rs_poly_eval), the
//      last being the Chien search,
//   7. forms Y = x*Omega / (x*P') and adds it to the received symbol where
//      the Chien search found an error or an erasure was flagged
//      (rs_correct).
// The received symbols and flags wait in rs_delay_buf until then.  Up to
// s erasures and t errors with s + 2t <= 16 are corrected.
//
// Each codeword is tagged with its slot number in the delay memory; the
// erasure locator, erasure count and overflow flag are kept in small tables
// indexed by that tag until step 5 needs them.
//
// Interface: a codeword is N = 31 consecutive valid input symbols, r_0
// first; gaps in in_valid are allowed.  Decoded symbols come out in the same
// order with out_valid, out_first marks position 0, out_loc marks a position
// that was treated as an errata location, out_fail marks a codeword found
// uncorrectable (more than D erasures, or no solution of the key equation),
// which is passed on unchanged.  overrun is a sticky flag for a codeword
// whose Euclid cell was still busy; it cannot happen when codewords are at
// least N cycles apart, the full input rate.
// Timing: the first decoded symbol of a codeword leaves 315 cycles after the
// last symbol of that codeword entered (syndrome and locator 1, T product 18,
// Euclid array 275, P product 18, evaluation and correction 3), and the 31
// symbols follow back to back; throughput is one symbol per cycle.
// The block structure follows the decoder description; the reciprocal
// polynomial form, the tagging and the fail handling are this design's.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int N     = N_DEF,
  parameter int D     = N_DEF - I_DEF,
  parameter int NCELL = NCELL_DEF,
  parameter int DEPTH = 16
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  gf_t  in_sym,
  input  logic in_era,
  output logic out_valid,
  output gf_t  out_sym,
  output logic out_first,
  output logic out_loc,
  output logic out_fail,
  output logic overrun
);

  localparam int TW = $clog2(DEPTH);
  localparam int SW = $clog2(N + 1);
  localparam int PW = $clog2(N);

  // ---------------- front end: syndromes and erasure locator ----------
  logic          syn_valid;
  gf_t           syn [D];
  gf_t           lr [D+1];
  logic [SW-1:0] s_cnt;
  logic          ovf;

  rs_syndrome #(.N(N), .D(D)) u_syn (
    .clk, .rst_n, .in_valid, .in_sym, .syn_valid, .syn);

  rs_erasure_expand #(.N(N), .D(D)) u_era (
    .clk, .rst_n, .in_valid, .in_era,
    .lam_valid(), .lam(lr), .s_cnt, .overflow(ovf));

  // evaluation stage signals (the delay memory is read by them)
  logic          ev_valid, ev_zero_l;
  logic [PW-1:0] ev_pos;
  gf_t           ev_a, ev_p;
  logic [TW-1:0] ev_tag;
  logic          ev_fail;
  logic [M:0]    dly_data;

  rs_delay_buf #(.N(N), .DEPTH(DEPTH), .W(M + 1)) u_dly (
    .clk, .rst_n,
    .wr_en   (in_valid),
    .wr_data ({in_era, in_sym}),
    .rd_en   (ev_valid),
    .rd_slot (ev_tag),
    .rd_pos  (ev_pos),
    .rd_data (dly_data));

  // per-codeword tables, indexed by tag
  logic [TW-1:0] tag_cnt;
  gf_t           lr_tab  [DEPTH][D+1];
  logic [SW-1:0] s_tab   [DEPTH];
  logic          ovf_tab [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_cnt <= '0;
      for (int c = 0; c < DEPTH; c++) begin
        s_tab[c] <= '0;
        ovf_tab[c] <= 1'b0;
        for (int i = 0; i <= D; i++) lr_tab[c][i] <= '0;
      end
    end else if (syn_valid) begin
      tag_cnt <= tag_cnt + 1'b1;
      s_tab[tag_cnt]   <= s_cnt;
      ovf_tab[tag_cnt] <= ovf;
      for (int i = 0; i <= D; i++) lr_tab[tag_cnt][i] <= lr[i];
    end
  end

  // ---------------- Forney syndrome T = S * Lr mod x^D ----------------
  logic          t_done;
  gf_t           t_p [D];
  logic [TW-1:0] t_tag;

  rs_poly_mult #(.LA(D), .LB(D + 1), .LP(D)) u_tmul (
    .clk, .rst_n, .start(syn_valid), .a_in(syn), .b_in(lr),
    .busy(), .done(t_done), .p(t_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         t_tag <= '0;
    else if (syn_valid) t_tag <= tag_cnt;
  end

  // ---------------- modified Euclid algorithm -------------------------
  logic          eu_valid, eu_fail;
  gf_t           eu_omega [D];
  gf_t           eu_lam   [D+1];
  logic [TW-1:0] eu_tag;

  rs_euclid_array #(.N(N), .D(D), .NCELL(NCELL), .TW(TW)) u_euclid (
    .clk, .rst_n,
    .start   (t_done),
    .t_in    (t_p),
    .s_in    (s_tab[t_tag]),
    .tag_in  (t_tag),
    .out_valid (eu_valid),
    .omega   (eu_omega),
    .lam     (eu_lam),
    .fail    (eu_fail),
    .tag_out (eu_tag),
    .sel_q   (),
    .overrun (overrun));

  // ---------------- errata locator P = Lr * lambda --------------------
  logic          p_done;
  gf_t           p_p [D+1];
  gf_t           h_omega [D];
  gf_t           h_lam   [D+1];
  logic [TW-1:0] p_tag;
  logic          p_fail;

  rs_poly_mult #(.LA(D + 1), .LB(D + 1), .LP(D + 1)) u_pmul (
    .clk, .rst_n, .start(eu_valid), .a_in(eu_lam), .b_in(lr_tab[eu_tag]),
    .busy(), .done(p_done), .p(p_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_tag <= '0; p_fail <= 1'b0;
      for (int i = 0; i < D; i++)  h_omega[i] <= '0;
      for (int i = 0; i <= D; i++) h_lam[i] <= '0;
    end else if (eu_valid) begin
      p_tag  <= eu_tag;
      p_fail <= eu_fail | ovf_tab[eu_tag];
      for (int i = 0; i < D; i++)  h_omega[i] <= eu_omega[i];
      for (int i = 0; i <= D; i++) h_lam[i] <= eu_lam[i];
    end
  end

  // ---------------- evaluation: x*Omega, x*P', Chien search -----------
  gf_t coef_a [D+1];
  gf_t coef_p [D+1];
  always_comb begin
    for (int i = 0; i <= D; i++) begin
      coef_a[i] = (i == 0) ? '0 : h_omega[(i == 0) ? 0 : i - 1];
      coef_p[i] = (i % 2 == 1) ? p_p[i] : '0;   // drop the even terms
    end
  end


  rs_poly_eval #(.N(N), .NC(D + 1)) u_eval_a (
    .clk, .rst_n, .load(p_done), .coef(coef_a),
    .out_valid(ev_valid), .out_pos(ev_pos), .out_val(ev_a), .out_zero());
  rs_poly_eval #(.N(N), .NC(D + 1)) u_eval_p (
    .clk, .rst_n, .load(p_done), .coef(coef_p),
    .out_valid(), .out_pos(), .out_val(ev_p), .out_zero());
  rs_poly_eval #(.N(N), .NC(D + 1)) u_chien (
    .clk, .rst_n, .load(p_done), .coef(h_lam),
    .out_valid(), .out_pos(), .out_val(), .out_zero(ev_zero_l));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ev_tag <= '0; ev_fail <= 1'b0;
    end else if (p_done) begin
      ev_tag  <= p_tag;
      ev_fail <= p_fail;
    end
  end

  // align the evaluator outputs with the one-cycle read of the delay memory
  logic          c_valid, c_zero_l, c_fail, c_first;
  gf_t           c_a, c_p;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c_valid <= 1'b0; c_zero_l <= 1'b0; c_fail <= 1'b0; c_first <= 1'b0;
      c_a <= '0; c_p <= '0;
    end else begin
      c_valid  <= ev_valid;
      c_zero_l <= ev_zero_l;
      c_fail   <= ev_fail;
      c_first  <= ev_valid && (ev_pos == '0);
      c_a      <= ev_a;
      c_p      <= ev_p;
    end
  end

  // ---------------- correction -----------------------------------------
  rs_correct u_corr (
    .clk, .rst_n,
    .in_valid (c_valid),
    .r        (dly_data[M-1:0]),
    .era      (dly_data[M]),
    .a_val    (c_a),
    .p_val    (c_p),
    .lam_zero (c_zero_l),
    .fail     (c_fail),
    .out_valid,
    .out_sym,
    .out_loc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_first <= 1'b0; out_fail <= 1'b0;
    end else begin
      out_first <= c_first;
      out_fail  <= c_valid & c_fail;
    end
  end

endmodule
