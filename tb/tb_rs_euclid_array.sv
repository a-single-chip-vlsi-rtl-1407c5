// tb_rs_euclid_array: hands 30 random key equations to the 9-cell array at
// the full pipeline rate (one every 31 cycles) and checks each result:
// results come back in order with their tags, 31 cycles apart, lambda is
// normalised (lambda(0) = 1), lambda*T = Omega mod x^16, lambda vanishes at
// every error position, fail = 0, no overrun, and every one of the nine
// cells has been used.
`timescale 1ns/1ps
module tb_rs_euclid_array;
  import tb_gf_pkg::*;

  localparam int NT = 30;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [4:0] t_in [16];
  logic [4:0] s_in = '0;
  logic [3:0] tag_in = '0;
  logic out_valid, fail, sel_q, overrun;
  logic [4:0] omega [16];
  logic [4:0] lam [17];
  logic [3:0] tag_out;

  always #5 clk = ~clk;
  rs_euclid_array dut (.*);

  int checks = 0, failures = 0;
  sym_t tt_s [NT][16];
  int   s_s [NT];
  int   errs_s [NT][$];
  int   got = 0;
  longint cycle = 0, prev = -1;
  int   used [9];
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    for (int w = 0; w < NT; w++) begin
      int s, t;
      int eras[$];
      sym_t tt[16];
      s = $urandom_range(0, 16);
      t = $urandom_range(0, (16 - s) / 2);
      ref_forney(s, t, tt, errs_s[w], eras);
      for (int i = 0; i < 16; i++) tt_s[w][i] = tt[i];
      s_s[w] = s;
    end
    for (int i = 0; i < 16; i++) t_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < NT; w++) begin
      for (int i = 0; i < 16; i++) t_in[i] <= tt_s[w][i];
      s_in   <= 5'(s_s[w]);
      tag_in <= 4'(w);
      start  <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      repeat (30) @(posedge clk);
    end
  end

  always @(posedge clk) if (rst_n)
    for (int c = 0; c < 9; c++) if (dut.c_start[c]) used[c]++;

  always @(posedge clk) if (rst_n && out_valid) begin
    sym_t v[] = new[17];
    check(tag_out == 4'(got), $sformatf("tag %0d want %0d", tag_out, got));
    check(!fail, "fail");
    check(lam[0] == 5'd1, "lambda normalised");
    if (prev >= 0) check(cycle - prev == 31, "output spacing");
    prev = cycle;
    for (int k = 0; k < 16; k++) begin
      sym_t acc;
      acc = 0;
      for (int i = 0; i <= k; i++) acc ^= ref_mul(lam[i], tt_s[got][k-i]);
      check(acc == omega[k], $sformatf("result %0d coef %0d", got, k));
    end
    for (int i = 0; i < 17; i++) v[i] = lam[i];
    foreach (errs_s[got][e])
      check(ref_eval(v, ref_exp(-errs_s[got][e])) == 0, "root at error");
    got++;
    if (got == NT) begin
      int unused_cells;
      unused_cells = 0;
      for (int c = 0; c < 9; c++) if (used[c] == 0) unused_cells++;
      check(unused_cells == 0, "all cells used");
      check(!overrun, "no overrun");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (NT * 31 + 600) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
