// Testbench of me_mbram: a random macroblock is written as 64 words; every
// half row read back must match, and the pixel sum register must equal the
// sum of the 256 pixels.
module tb_me_mbram;
  logic clk = 0, rst_n = 0, clear_sum = 0, wr_en = 0, rd_en = 0, rd_half;
  logic [3:0] wr_row, rd_row; logic [1:0] wr_word; logic [31:0] wr_data;
  logic [63:0] rd_data; logic [15:0] mb_sum;
  logic [7:0] pix [16][16]; int sum;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_mbram dut (.clk, .rst_n, .clear_sum, .wr_en, .wr_row, .wr_word, .wr_data, .rd_en, .rd_row, .rd_half, .rd_data, .mb_sum);
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      sum = 0;
      for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin pix[y][x] = 8'($urandom); sum += pix[y][x]; end
      @(negedge clk) clear_sum = 1; @(negedge clk) clear_sum = 0;
      for (int y = 0; y < 16; y++) for (int w = 0; w < 4; w++) begin
        wr_en = 1; wr_row = 4'(y); wr_word = 2'(w);
        for (int j = 0; j < 4; j++) wr_data[8*j +: 8] = pix[y][4*w + j];
        @(negedge clk);
      end
      wr_en = 0;
      checks++; if (mb_sum !== 16'(sum)) begin failures++; $display("FAIL: sum %0d exp %0d", mb_sum, sum); end
      for (int y = 0; y < 16; y++) for (int h = 0; h < 2; h++) begin
        rd_en = 1; rd_row = 4'(y); rd_half = 1'(h);
        @(negedge clk) rd_en = 0;
        for (int k = 0; k < 8; k++) begin
          checks++;
          if (rd_data[8*k +: 8] !== pix[y][8*h + k]) begin failures++; $display("FAIL: y%0d h%0d k%0d", y, h, k); end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
