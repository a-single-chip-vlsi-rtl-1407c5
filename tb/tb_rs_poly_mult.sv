// tb_rs_poly_mult: multiplies random polynomials (16 x 17 coefficients,
// product kept mod x^16, the size used for the Forney syndrome) and
// compares with the reference convolution.  done must come exactly LB + 1 =
// 18 cycles after start.
`timescale 1ns/1ps
module tb_rs_poly_mult;
  import tb_gf_pkg::*;

  localparam int LA = 16, LB = 17, LP = 16;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0] a_in [LA];
  logic [4:0] b_in [LB];
  logic [4:0] p [LP];
  logic busy, done;

  always #5 clk = ~clk;
  rs_poly_mult #(.LA(LA), .LB(LB), .LP(LP)) dut (.*);

  int checks = 0, failures = 0;

  initial begin
    for (int i = 0; i < LA; i++) a_in[i] = '0;
    for (int i = 0; i < LB; i++) b_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int trial = 0; trial < 30; trial++) begin
      sym_t r [LP];
      int lat;
      for (int i = 0; i < LA; i++) a_in[i] = sym_t'($urandom_range(0, 31));
      for (int i = 0; i < LB; i++) b_in[i] = (trial == 0 && i > 0) ? 5'd0 : sym_t'($urandom_range(0, 31));
      for (int k = 0; k < LP; k++) begin
        r[k] = 0;
        for (int i = 0; i < LA; i++)
          if (k - i >= 0 && k - i < LB) r[k] ^= ref_mul(a_in[i], b_in[k-i]);
      end
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      lat = 0;
      while (!done) begin @(posedge clk); lat++; end
      checks++;
      if (lat != LB + 1) begin failures++; $display("FAIL latency %0d", lat); end
      for (int k = 0; k < LP; k++) begin
        checks++;
        if (p[k] != r[k]) begin failures++; $display("FAIL trial %0d coef %0d", trial, k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
