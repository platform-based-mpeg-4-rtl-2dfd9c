// me_mbram: current macroblock buffer (MB RAM) of the motion estimator.
// Stores the 16x16 luminance pixels of the macroblock being coded, written as
// 32-bit words of four pixels and read as 64-bit half rows of eight pixels
// (the width of the distortion datapath). While the macroblock is loaded, a
// four-input adder tree accumulates the sum of its pixels into a register,
// kept for the later intra/inter mode decision, as the document describes.
// Timing: read data appear one cycle after rd_en; mb_sum is valid once the 64
// words have been written after clear_sum.
module me_mbram
  import me_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clear_sum,
  input  logic        wr_en,
  input  logic [3:0]  wr_row,
  input  logic [1:0]  wr_word,
  input  logic [31:0] wr_data,
  input  logic        rd_en,
  input  logic [3:0]  rd_row,
  input  logic        rd_half,
  output logic [63:0] rd_data,
  output logic [15:0] mb_sum
);
  logic [31:0] even [32];   // words 0 and 2 of each row
  logic [31:0] odd  [32];   // words 1 and 3 of each row
  logic [4:0]  wa, ra;
  logic [9:0]  wsum;

  assign wa   = {wr_row, wr_word[1]};
  assign ra   = {rd_row, rd_half};
  assign wsum = 10'(wr_data[7:0]) + 10'(wr_data[15:8]) + 10'(wr_data[23:16]) + 10'(wr_data[31:24]);

  always_ff @(posedge clk) begin
    if (wr_en && !wr_word[0]) even[wa] <= wr_data;
    if (wr_en &&  wr_word[0]) odd[wa]  <= wr_data;
    if (rd_en) rd_data <= {odd[ra], even[ra]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         mb_sum <= '0;
    else if (clear_sum) mb_sum <= '0;
    else if (wr_en)     mb_sum <= mb_sum + 16'(wsum);
  end
endmodule
