// tb_rs_correct: drives random evaluator values, flags and received symbols
// and checks, one cycle later, out_sym = r + a/p where (lam_zero or era) and
// not fail, r elsewhere, and the location flag, using the reference
// inverse and multiplier.
`timescale 1ns/1ps
module tb_rs_correct;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, era = 1'b0, lam_zero = 1'b0, fail = 1'b0;
  logic [4:0] r = '0, a_val = '0, p_val = '0;
  logic out_valid, out_loc;
  logic [4:0] out_sym;

  always #5 clk = ~clk;
  rs_correct dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int i = 0; i < 400; i++) begin
      logic [4:0] er, ea, ep;
      logic ee, ez, ef, ev, l;
      er = 5'($urandom); ea = 5'($urandom); ep = 5'($urandom_range(1, 31));
      ee = ($urandom_range(0, 3) == 0); ez = ($urandom_range(0, 3) == 0);
      ef = ($urandom_range(0, 7) == 0); ev = ($urandom_range(0, 7) != 0);
      in_valid <= ev; r <= er; a_val <= ea; p_val <= ep;
      era <= ee; lam_zero <= ez; fail <= ef;
      @(posedge clk);
      #1;
      l = (ee | ez) & !ef;
      checks += 3;
      if (out_valid != ev) failures++;
      if (out_sym != (l ? (er ^ ref_mul(ea, ref_inv(ep))) : er)) begin
        failures++;
        $display("FAIL step %0d", i);
      end
      if (out_loc != (ev & l)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
