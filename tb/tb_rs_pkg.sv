// tb_rs_pkg: checks the design's GF(2^5) functions against the reference
// tables: every product of two field elements, alpha^e for e = -40..40,
// and the inverse of every nonzero element (and 0 -> 0).
module tb_rs_pkg;
  import rs_pkg::*;
  import tb_gf_pkg::*;

  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int a = 0; a < 32; a++)
      for (int b = 0; b < 32; b++)
        check(gf_mul(gf_t'(a), gf_t'(b)) == ref_mul(sym_t'(a), sym_t'(b)),
              $sformatf("mul %0d %0d", a, b));
    for (int e = -40; e <= 40; e++)
      check(gf_alpha_pow(e) == ref_exp(e), $sformatf("alpha^%0d", e));
    for (int a = 0; a < 32; a++)
      check(gf_inv(gf_t'(a)) == ref_inv(sym_t'(a)), $sformatf("inv %0d", a));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
