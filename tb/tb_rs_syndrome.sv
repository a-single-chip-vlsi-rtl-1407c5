// tb_rs_syndrome: streams random received vectors (some valid codewords,
// whose syndromes must all be 0) back to back, with some idle gaps, and
// compares each S_k with r(alpha^k) computed by the reference.  Also checks
// that syn_valid comes exactly one cycle after the 31st symbol.
`timescale 1ns/1ps
module tb_rs_syndrome;
  import tb_gf_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0;
  logic [4:0] in_sym = '0;
  logic syn_valid;
  logic [4:0] syn [16];

  always #5 clk = ~clk;
  rs_syndrome dut (.*);

  int checks = 0, failures = 0;
  sym_t r [20][31];
  int got = 0;
  logic last_in = 1'b0;

  initial begin
    for (int w = 0; w < 20; w++) begin
      sym_t c[31];
      ref_codeword(c);
      for (int n = 0; n < 31; n++)
        r[w][n] = (w % 2 == 0) ? c[n] : sym_t'($urandom_range(0, 31));
    end
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    for (int w = 0; w < 20; w++)
      for (int n = 0; n < 31; n++) begin
        if (w > 10 && $urandom_range(0, 4) == 0) begin
          in_valid <= 1'b0; last_in <= 1'b0; @(posedge clk);
        end
        in_valid <= 1'b1; in_sym <= r[w][n]; last_in <= (n == 30);
        @(posedge clk);
      end
    in_valid <= 1'b0; last_in <= 1'b0;
  end

  logic last_d = 1'b0;
  always @(posedge clk) begin
    last_d <= in_valid && last_in;
    if (rst_n) begin
      checks++;
      if (syn_valid != last_d) begin failures++; $display("FAIL timing"); end
      if (syn_valid) begin
        for (int k = 1; k <= 16; k++) begin
          sym_t v[] = new[31];
          for (int n = 0; n < 31; n++) v[n] = r[got][n];
          checks++;
          if (syn[k-1] != ref_eval(v, ref_exp(k))) begin
            failures++;
            $display("FAIL cw %0d S_%0d", got, k);
          end
        end
        got++;
        if (got == 20) begin
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
