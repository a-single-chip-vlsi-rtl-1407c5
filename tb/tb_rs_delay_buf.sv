// tb_rs_delay_buf: writes 40 codewords of random 6-bit entries (so the 16
// slots wrap around) and reads each codeword back, in position order, from
// its slot (codeword c in slot c mod 16) while the writer is 10 codewords
// ahead, comparing each entry one cycle after the read request.
`timescale 1ns/1ps
module tb_rs_delay_buf;

  logic clk = 1'b0, rst_n = 1'b0;
  logic wr_en = 1'b0, rd_en = 1'b0;
  logic [5:0] wr_data = '0, rd_data;
  logic [3:0] rd_slot = '0;
  logic [4:0] rd_pos = '0;

  always #5 clk = ~clk;
  rs_delay_buf dut (.*);

  int checks = 0, failures = 0;
  logic [5:0] data [40][31];
  logic       chk = 1'b0;
  logic [5:0] want = '0;

  initial begin
    for (int w = 0; w < 40; w++)
      for (int n = 0; n < 31; n++) data[w][n] = 6'($urandom);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int w = 0; w < 50; w++)
      for (int n = 0; n < 31; n++) begin
        wr_en   <= (w < 40);
        wr_data <= (w < 40) ? data[w][n] : '0;
        rd_en   <= (w >= 10);
        rd_slot <= 4'(w - 10);
        rd_pos  <= 5'(n);
        @(posedge clk);
      end
    rd_en <= 1'b0;
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // compare one cycle after each read request
  int rw = 0, rn = 0;
  always @(posedge clk) begin
    if (chk) begin
      checks++;
      if (rd_data != want) begin failures++; $display("FAIL cw %0d pos %0d", rw, rn); end
    end
    chk <= rd_en;
  end

  // codeword number and position of the current read, counted here
  int rd_count = 0;
  always @(posedge clk) if (rd_en) begin
    want <= data[rd_count / 31][rd_count % 31];
    rw = rd_count / 31;
    rn = rd_count % 31;
    rd_count++;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
