// rs_euclid_array: multiplexed recursive cells for the modified Euclid
// algorithm, with removal of the scale factor K.
//
// Only one Forney syndrome polynomial arrives per codeword (every N symbol
// times), while one cell needs D recursions of D+1 cycles for it.  So
// NCELL >= D*(D+1)/N cells, used in turn, keep up with the full pipeline
// rate: the input multiplexer hands each new polynomial to the next cell in
// round-robin order, and the output multiplexer takes the results of
// whichever cell has finished (the cells finish at least N cycles apart, in
// the same order).  From the finished cell it takes K*Omega, K*lambda and K;
// an inversion circuit forms K^-1 and multipliers scale both polynomials by
// it, so lambda(0) = 1 on the output.
//
// Interface and timing: start with t_in, s_in and a caller tag; about
// 1 + D*(D+1) + 2 cycles later out_valid pulses with omega, lam, fail (no
// pair passed the degree test, or K = 0) and the same tag.  Starts must be at
// least N cycles apart; a start that finds its cell still busy sets the
// sticky overrun flag and is dropped.  For (31,15): 9 cells, each busy 274
// cycles, against 9*31 = 279 cycles between two uses of one cell.
// The cell count (the document's table gives 9 cells for (31,15)), the two
// multiplexers and the inverse-and-multiply stage follow the decoder
// description.  Scaling lambda as well as Omega by K^-1 is this design's
// own: with this cell both polynomials carry the same factor K, and the
// errata magnitudes are only right when the locator is normalised too.
module rs_euclid_array
  import rs_pkg::*;
#(
  parameter int N     = N_DEF,
  parameter int D     = D_DEF,
  parameter int NCELL = NCELL_DEF,
  parameter int TW    = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  input  gf_t  t_in [D],
  input  logic [$clog2(N+1)-1:0] s_in,
  input  logic [TW-1:0] tag_in,
  output logic out_valid,
  output gf_t  omega [D],
  output gf_t  lam   [D+1],
  output logic fail,
  output logic [TW-1:0] tag_out,
  output logic sel_q,
  output logic overrun
);

  localparam int CW = (NCELL > 1) ? $clog2(NCELL) : 1;

  logic [CW-1:0] ptr;
  logic          c_start [NCELL];
  logic          c_busy  [NCELL];
  logic          c_done  [NCELL];
  gf_t           c_omega [NCELL][D];
  gf_t           c_lam   [NCELL][D+1];
  gf_t           c_k     [NCELL];
  logic          c_selq  [NCELL];
  logic          c_ok    [NCELL];
  logic [TW-1:0] c_tag   [NCELL];

  for (genvar g = 0; g < NCELL; g++) begin : g_cell
    assign c_start[g] = start && (ptr == CW'(g)) && !c_busy[g];
    rs_euclid_cell #(.N(N), .D(D)) u_cell (
      .clk, .rst_n,
      .start (c_start[g]),
      .t_in,
      .s_in,
      .busy  (c_busy[g]),
      .done  (c_done[g]),
      .omega (c_omega[g]),
      .lam   (c_lam[g]),
      .k_out (c_k[g]),
      .sel_q (c_selq[g]),
      .ok    (c_ok[g])
    );
  end

  // output multiplexer
  logic          any_done;
  gf_t           m_omega [D];
  gf_t           m_lam   [D+1];
  gf_t           m_k, m_kinv;
  logic          m_selq, m_ok;
  logic [TW-1:0] m_tag;

  always_comb begin
    any_done = 1'b0;
    m_k = '0; m_selq = 1'b0; m_ok = 1'b0; m_tag = '0;
    for (int i = 0; i < D; i++)  m_omega[i] = '0;
    for (int i = 0; i <= D; i++) m_lam[i] = '0;
    for (int c = 0; c < NCELL; c++)
      if (c_done[c]) begin
        any_done = 1'b1;
        m_k = c_k[c]; m_selq = c_selq[c]; m_ok = c_ok[c]; m_tag = c_tag[c];
        for (int i = 0; i < D; i++)  m_omega[i] = c_omega[c][i];
        for (int i = 0; i <= D; i++) m_lam[i] = c_lam[c][i];
      end
  end

  rs_gf_inv u_kinv (.a(m_k), .y(m_kinv));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr <= '0; overrun <= 1'b0;
      out_valid <= 1'b0; fail <= 1'b0; tag_out <= '0; sel_q <= 1'b0;
      for (int c = 0; c < NCELL; c++) c_tag[c] <= '0;
      for (int i = 0; i < D; i++)  omega[i] <= '0;
      for (int i = 0; i <= D; i++) lam[i] <= '0;
    end else begin
      if (start) begin
        ptr <= (ptr == CW'(NCELL - 1)) ? '0 : ptr + 1'b1;
        for (int c = 0; c < NCELL; c++)
          if (ptr == CW'(c)) begin
            if (c_busy[c]) overrun <= 1'b1;
            else           c_tag[c] <= tag_in;
          end
      end
      out_valid <= any_done;
      if (any_done) begin
        tag_out <= m_tag;
        sel_q   <= m_selq;
        fail    <= !m_ok || (m_k == '0);
        for (int i = 0; i < D; i++)  omega[i] <= gf_mul(m_omega[i], m_kinv);
        for (int i = 0; i <= D; i++) lam[i]   <= gf_mul(m_lam[i], m_kinv);
      end
    end
  end

  // a new polynomial must never find its cell still busy
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    !(start && c_busy[ptr]));

endmodule
