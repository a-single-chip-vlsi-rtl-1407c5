// tb_rs_euclid_cell: gives one recursive Euclid cell random key equations
// (s erasures and t errors with s + 2t <= 16, built by the reference from a
// corrupted codeword) and checks, after normalising by K = lambda(0):
//   - lambda * T = Omega mod x^16 (reference multiplication),
//   - lambda vanishes at alpha^-p for every error position p and has
//     exactly t roots among the 31 positions,
//   - deg Omega < (16 + s) / 2 and ok = 1,
//   - done comes exactly 1 + 16*17 + 1 = 274 cycles after start.
// Both ways of answering (from R and from Q) must occur.
`timescale 1ns/1ps
module tb_rs_euclid_cell;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0] t_in [16];
  logic [4:0] s_in = '0;
  logic busy, done, sel_q, ok;
  logic [4:0] omega [16];
  logic [4:0] lam [17];
  logic [4:0] k_out;

  always #5 clk = ~clk;
  rs_euclid_cell dut (.*);

  int checks = 0, failures = 0, n_q = 0, n_r = 0;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) t_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 60; trial++) begin
      int s, t, lat, roots;
      int errs[$], eras[$];
      sym_t tt[16];
      sym_t kinv;
      sym_t ln[17];
      sym_t on[16];
      s = $urandom_range(0, 16);
      t = $urandom_range(0, (16 - s) / 2);
      ref_forney(s, t, tt, errs, eras);
      for (int i = 0; i < 16; i++) t_in[i] = tt[i];
      s_in = 5'(s);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      while (!done) begin @(posedge clk); lat++; end
      check(lat == 274, $sformatf("latency %0d", lat));
      check(ok, "ok");
      check(k_out != 0 && k_out == lam[0], "K = lambda(0), nonzero");
      if (sel_q) n_q++; else n_r++;
      kinv = ref_inv(k_out);
      for (int i = 0; i < 17; i++) ln[i] = ref_mul(lam[i], kinv);
      for (int i = 0; i < 16; i++) on[i] = ref_mul(omega[i], kinv);
      for (int k = 0; k < 16; k++) begin
        sym_t acc;
        acc = 0;
        for (int i = 0; i <= k; i++) acc ^= ref_mul(ln[i], tt[k-i]);
        check(acc == on[k], $sformatf("trial %0d key equation coef %0d", trial, k));
        if (2 * k >= 16 + s) check(on[k] == 0, $sformatf("trial %0d deg Omega", trial));
      end
      roots = 0;
      for (int p = 0; p < 31; p++) begin
        sym_t v[] = new[17];
        for (int i = 0; i < 17; i++) v[i] = ln[i];
        if (ref_eval(v, ref_exp(-p)) == 0) roots++;
      end
      check(roots == t, $sformatf("trial %0d: %0d roots for %0d errors", trial, roots, t));
      foreach (errs[e]) begin
        sym_t v[] = new[17];
        for (int i = 0; i < 17; i++) v[i] = ln[i];
        check(ref_eval(v, ref_exp(-errs[e])) == 0, "root at error position");
      end
    end
    check(n_q > 0 && n_r > 0, "both answer sides used");
    $display("answers from R: %0d, from Q: %0d", n_r, n_q);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60 * 300 + 100) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
