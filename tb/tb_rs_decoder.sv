// tb_rs_decoder: end-to-end test of the (31,15) errors-and-erasures decoder
// at its default size.  It streams random codewords, corrupted with random
// patterns of errors and erasures, back to back through the decoder (some
// with idle gaps between symbols), and compares every decoded symbol with
// the transmitted codeword, every errata-location flag with the injected
// pattern, and the fail flag with whether the pattern was correctable.  It
// also checks that the decoder keeps the full rate (one symbol per cycle
// out, constant latency).  Mechanisms that must each occur at least once:
// error-only, erasure-only and mixed correction, an erased symbol that was
// in fact right, a key-equation answer taken from the Q side, every Euclid
// cell used, an erasure overflow (more than 16 erasures), input gaps, and a
// codeword with more errors than the code corrects that the key-equation
// solver flags as uncorrectable (such a codeword must pass unchanged;
// unflagged ones beyond the capacity are not checked).
`timescale 1ns/1ps
module tb_rs_decoder;
  import tb_gf_pkg::*;

  localparam int NCW = 480;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [4:0] in_sym = '0;
  logic in_era = 1'b0;
  logic out_valid, out_first, out_loc, out_fail, overrun;
  logic [4:0] out_sym;

  always #5 clk = ~clk;

  rs_decoder dut (.*);

  int checks = 0, failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  sym_t tx   [NCW][31];
  sym_t rx   [NCW][31];
  logic era  [NCW][31];
  logic loc  [NCW][31];
  logic exp_fail [NCW];
  logic beyond [NCW];
  longint t_last_in [NCW];

  int n_err_only = 0, n_era_only = 0, n_mixed = 0, n_clean = 0, n_ovf = 0;
  int n_era_right = 0, n_gap = 0, n_selq = 0, n_beyond_flagged = 0, n_beyond = 0;
  int cell_used [9];

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // build codeword w's corruption pattern
  task automatic make_case(input int w);
    int s, t, kind;
    sym_t c[31];
    ref_codeword(c);
    kind = (w % 2 == 1 && w >= 80) ? 6 : w % 6;
    case (kind)
      0: begin s = 0; t = 0; end
      1: begin s = 0; t = $urandom_range(1, 8); end
      2: begin s = $urandom_range(1, 16); t = 0; end
      3: begin s = $urandom_range(1, 14); t = $urandom_range(1, (16 - s) / 2); end
      4: begin s = (w % 4 == 0) ? $urandom_range(17, 20) : 16; t = 0; end
      6: begin s = 0; t = $urandom_range(10, 15); end
      default: begin s = $urandom_range(0, 6); t = (16 - s) / 2; end
    endcase
    exp_fail[w] = (s > 16);
    beyond[w] = (s + 2 * t > 16);
    if (s == 0 && t > 0 && t <= 8) n_err_only++;
    if (s > 0 && t == 0 && s <= 16) n_era_only++;
    if (s > 0 && t > 0) n_mixed++;
    if (s == 0 && t == 0) n_clean++;
    if (s > 16) n_ovf++;
    for (int n = 0; n < 31; n++) begin
      tx[w][n] = c[n]; rx[w][n] = c[n]; era[w][n] = 1'b0; loc[w][n] = 1'b0;
    end
    // choose s + t distinct positions
    for (int k = 0; k < s + t; k++) begin
      int p;
      do p = $urandom_range(0, 30); while (era[w][p] || loc[w][p]);
      if (k < s) begin
        era[w][p] = 1'b1;
        // an erased symbol may still be right
        if ($urandom_range(0, 3) == 0) n_era_right++;
        else rx[w][p] = c[p] ^ sym_t'($urandom_range(1, 31));
        loc[w][p] = 1'b1;
      end else begin
        rx[w][p] = c[p] ^ sym_t'($urandom_range(1, 31));
        loc[w][p] = 1'b1;
      end
    end
    // erasures are always reported as errata locations, errors only if nonzero
  endtask

  // stimulus
  initial begin
    for (int w = 0; w < NCW; w++) make_case(w);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < NCW; w++) begin
      for (int n = 0; n < 31; n++) begin
        if (w >= NCW / 2 && $urandom_range(0, 9) == 0) begin
          in_valid <= 1'b0;
          n_gap++;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_sym   <= rx[w][n];
        in_era   <= era[w][n];
        @(posedge clk);
        if (n == 30) t_last_in[w] = cycle;
      end
    end
    in_valid <= 1'b0;
  end

  // count how often each Euclid cell is used and the Q-side answers
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 9; c++)
      if (dut.u_euclid.c_start[c]) cell_used[c]++;
    if (dut.u_euclid.out_valid && dut.u_euclid.sel_q) n_selq++;
  end

  // checker
  int w_out = 0, n_out = 0;
  longint lat0 = -1, prev_first = -1;
  initial begin
    wait (rst_n);
    forever begin
      @(posedge clk);
      if (out_valid) begin
        if (out_first) begin
          longint lat;
          check(n_out == 0, "codeword boundary");
          n_out = 0;
          lat = cycle - t_last_in[w_out];
          if (lat0 < 0) lat0 = lat;
          check(lat == lat0, $sformatf("latency %0d vs %0d (cw %0d)", lat, lat0, w_out));
          // back-to-back input must give back-to-back output
          if (w_out > 0 && w_out < NCW / 2)
            check(cycle - prev_first == 31, "full-rate output spacing");
          prev_first = cycle;
        end
        if (w_out < NCW && beyond[w_out] && !exp_fail[w_out]) begin
          // beyond the correction capability: a flagged codeword must pass
          // through unchanged; an unflagged one may be miscorrected
          if (n_out == 0) begin
            n_beyond++;
            if (out_fail) n_beyond_flagged++;
          end
          if (out_fail)
            check(out_sym == rx[w_out][n_out], $sformatf("pass-through cw %0d pos %0d", w_out, n_out));
        end else if (w_out < NCW) begin
          check(out_fail == exp_fail[w_out], $sformatf("fail flag cw %0d", w_out));
          if (exp_fail[w_out])
            check(out_sym == rx[w_out][n_out], $sformatf("pass-through cw %0d pos %0d", w_out, n_out));
          else begin
            check(out_sym == tx[w_out][n_out],
                  $sformatf("cw %0d pos %0d got %0d want %0d", w_out, n_out, out_sym, tx[w_out][n_out]));
            check(out_loc == loc[w_out][n_out],
                  $sformatf("errata location cw %0d pos %0d", w_out, n_out));
          end
        end
        n_out++;
        if (n_out == 31) begin
          n_out = 0;
          w_out++;
          if (w_out == NCW) begin
            int unused_cells;
            unused_cells = 0;
            for (int c = 0; c < 9; c++) if (cell_used[c] == 0) unused_cells++;
            $display("latency (last symbol in to first symbol out): %0d cycles", lat0);
            $display("mechanisms: clean=%0d err_only=%0d era_only=%0d mixed=%0d era_right=%0d selq=%0d ovf=%0d gaps=%0d unused_cells=%0d",
                     n_clean, n_err_only, n_era_only, n_mixed, n_era_right, n_selq, n_ovf, n_gap, unused_cells);
            check(n_clean > 0 && n_err_only > 0 && n_era_only > 0 && n_mixed > 0, "correction kinds seen");
            check(n_era_right > 0, "erased-but-right symbol seen");
            check(n_selq > 0, "Q-side answer seen");
            check(n_ovf > 0, "erasure overflow seen");
            check(n_gap > 0, "input gaps seen");
            $display("beyond capacity: %0d codewords, %0d flagged uncorrectable", n_beyond, n_beyond_flagged);
            check(n_beyond_flagged > 0, "uncorrectable codeword detected");
            check(unused_cells == 0, "all Euclid cells used");
            check(!overrun, "no Euclid overrun");
            $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
            $finish;
          end
        end
      end
    end
  end

  // watchdog
  initial begin
    repeat (NCW * 40 + 2000) @(posedge clk);
    failures++;
    $display("watchdog: only %0d codewords decoded", w_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
