// tb_rs_gf_inv: exhaustive check of the field inverter: a * inv(a) = 1 for
// every nonzero a (reference multiplier), inv(a) against the reference
// inverse, and inv(0) = 0.
`timescale 1ns/1ps
module tb_rs_gf_inv;
  import tb_gf_pkg::*;

  logic [4:0] a, y;
  int checks = 0, failures = 0;

  rs_gf_inv dut (.a, .y);

  initial begin
    for (int v = 0; v < 32; v++) begin
      a = 5'(v);
      #1;
      checks++;
      if (y != ref_inv(a)) begin failures++; $display("FAIL inv(%0d)=%0d", v, y); end
      if (v != 0) begin
        checks++;
        if (ref_mul(a, y) != 5'd1) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
