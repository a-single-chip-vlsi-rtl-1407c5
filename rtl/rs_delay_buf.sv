// rs_delay_buf: codeword delay memory.
//
// Holds the received symbols and their erasure flags while the decoder works
// out the corrections.  It is a memory of DEPTH codeword slots of N entries
// (W bits each).  The writer stores each valid input at (wr_slot, wr_pos),
// advancing through the positions and the slots by itself, so codeword c
// lands in slot c mod DEPTH.  The reader asks for (rd_slot, rd_pos)
// and gets the entry one cycle later.  DEPTH must cover the decoder latency
// in codewords; the memory form and the tagging are this design's choices
// for the delay elements of the decoder.
module rs_delay_buf
  import rs_pkg::*;
#(
  parameter int N     = N_DEF,
  parameter int DEPTH = 16,
  parameter int W     = M + 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic wr_en,
  input  logic [W-1:0] wr_data,
  input  logic rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_slot,
  input  logic [$clog2(N)-1:0] rd_pos,
  output logic [W-1:0] rd_data
);

  localparam int PW = $clog2(N);
  localparam int SW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH * N];
  logic [PW-1:0] wr_pos;
  logic [SW-1:0] wr_slot;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pos  <= '0;
      wr_slot <= '0;
    end else if (wr_en) begin
      if (wr_pos == PW'(N - 1)) begin
        wr_pos  <= '0;
        wr_slot <= wr_slot + 1'b1;
      end else begin
        wr_pos <= wr_pos + 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_slot) * N + int'(wr_pos)] <= wr_data;
    if (rd_en) rd_data <= mem[int'(rd_slot) * N + int'(rd_pos)];
  end

endmodule
