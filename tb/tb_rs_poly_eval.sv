// tb_rs_poly_eval: loads random 17-coefficient polynomials (one of them a
// product of (1 + alpha^p x) factors, so that zeros occur) and checks every
// output p(alpha^-n), its position number and the zero flag against the
// reference evaluator, with loads back to back every 31 cycles.
`timescale 1ns/1ps
module tb_rs_poly_eval;
  import tb_gf_pkg::*;

  localparam int NC = 17;
  logic clk = 1'b0, rst_n = 1'b0, load = 1'b0;
  logic [4:0] coef [NC];
  logic out_valid, out_zero;
  logic [4:0] out_pos;
  logic [4:0] out_val;

  always #5 clk = ~clk;
  rs_poly_eval dut (.*);

  int checks = 0, failures = 0, zeros = 0;
  sym_t polys [10][NC];
  int   npoly = 0, cidx = -1;

  initial begin
    for (int i = 0; i < NC; i++) coef[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 10; w++) begin
      sym_t c [NC];
      if (w == 1) begin
        for (int i = 0; i < NC; i++) c[i] = (i == 0) ? 5'd1 : 5'd0;
        for (int q = 0; q < 5; q++) begin
          int p;
          p = $urandom_range(0, 30);
          for (int i = NC - 1; i >= 1; i--) c[i] ^= ref_mul(c[i-1], ref_exp(p));
        end
      end else
        for (int i = 0; i < NC; i++) c[i] = sym_t'($urandom_range(0, 31));
      for (int i = 0; i < NC; i++) begin
        coef[i] <= c[i];
        polys[w][i] = c[i];
      end
      load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      npoly++;
      repeat (30) @(posedge clk);
    end
    repeat (3) @(posedge clk);
    checks++;
    if (zeros == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pos_exp = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    sym_t v[] = new[NC];
    sym_t e;
    if (out_pos == 0) cidx++;
    for (int i = 0; i < NC; i++) v[i] = polys[cidx][i];
    e = ref_eval(v, ref_exp(-int'(out_pos)));
    checks += 3;
    if (out_val != e) begin failures++; $display("FAIL poly %0d pos %0d", cidx, out_pos); end
    if (out_zero != (e == 0)) failures++;
    if (int'(out_pos) != pos_exp) failures++;
    if (e == 0) zeros++;
    pos_exp = (pos_exp == 30) ? 0 : pos_exp + 1;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
