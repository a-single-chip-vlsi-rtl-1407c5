// tb_rs_erasure_expand: feeds random erasure bit patterns (0 to 20 erasures,
// including more than the 16 the array holds) and compares the expanded
// locator with prod (1 + alpha^n x) over the flagged positions n, built by
// the reference, together with the erasure count and the overflow flag.
`timescale 1ns/1ps
module tb_rs_erasure_expand;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, in_era = 1'b0;
  logic lam_valid, overflow;
  logic [4:0] lam [17];
  logic [4:0] s_cnt;

  always #5 clk = ~clk;
  rs_erasure_expand dut (.*);

  int checks = 0, failures = 0, n_ovf = 0;
  logic pat [24][31];
  int   cnt [24];
  int   got = 0;

  initial begin
    for (int w = 0; w < 24; w++) begin
      int s;
      s = (w < 21) ? w : $urandom_range(0, 31);
      for (int n = 0; n < 31; n++) pat[w][n] = 1'b0;
      for (int k = 0; k < s; k++) begin
        int p;
        do p = $urandom_range(0, 30); while (pat[w][p]);
        pat[w][p] = 1'b1;
      end
      cnt[w] = s;
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 24; w++)
      for (int n = 0; n < 31; n++) begin
        in_valid <= 1'b1; in_era <= pat[w][n];
        @(posedge clk);
      end
    in_valid <= 1'b0;
  end

  always @(posedge clk) if (rst_n && lam_valid) begin
    sym_t ref_c [17];
    for (int i = 0; i < 17; i++) ref_c[i] = (i == 0) ? 5'd1 : 5'd0;
    for (int n = 0; n < 31; n++)
      if (pat[got][n])
        for (int i = 16; i >= 1; i--) ref_c[i] ^= ref_mul(ref_c[i-1], ref_exp(n));
    checks += 2;
    if (int'(s_cnt) != cnt[got]) begin failures++; $display("FAIL count cw %0d", got); end
    if (overflow != (cnt[got] > 16)) begin failures++; $display("FAIL overflow cw %0d", got); end
    if (overflow) n_ovf++;
    if (cnt[got] <= 16)
      for (int i = 0; i < 17; i++) begin
        checks++;
        if (lam[i] != ref_c[i]) begin failures++; $display("FAIL cw %0d coef %0d", got, i); end
      end
    got++;
    if (got == 24) begin
      checks++;
      if (n_ovf == 0) failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (1500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
