// Testbench of me_swmem: a random 48x48 window is written strip by strip,
// each logical strip s into physical strip (s+rot) mod 3, and half rows read
// at random positions (any x alignment) must return the eight window pixels
// x..x+7 of row y, one cycle after the read. Then one strip is replaced, as
// when moving to the next macroblock, and the window seen through the new
// rotation is checked again.
module tb_me_swmem;
  logic clk = 0, wr_en = 0, rd_en = 0;
  logic [1:0] wr_strip, wr_word, rot; logic [5:0] wr_row, rd_x, rd_y;
  logic [31:0] wr_data; logic [63:0] rd_data;
  logic [7:0] ref_col [144][48];   // reference-frame columns, [x][y]
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_swmem dut (.clk, .wr_en, .wr_strip, .wr_row, .wr_word, .wr_data, .rd_en, .rd_x, .rd_y, .rot, .rd_data);
  // load reference strip c (columns 16c..16c+15) into physical strip c mod 3
  task automatic load_strip(input int c);
    for (int y = 0; y < 48; y++)
      for (int w = 0; w < 4; w++) begin
        @(negedge clk);
        wr_en = 1; wr_strip = 2'(c % 3); wr_row = 6'(y); wr_word = 2'(w);
        for (int j = 0; j < 4; j++) wr_data[8*j +: 8] = ref_col[16*c + 4*w + j][y];
      end
    @(negedge clk) wr_en = 0;
  endtask
  // window of macroblock column m starts at reference strip m
  task automatic read_check(input int m, input int n);
    rot = 2'(m % 3);
    for (int i = 0; i < n; i++) begin
      int x = $urandom_range(0, 40), y = $urandom_range(0, 47);
      @(negedge clk) rd_en = 1; rd_x = 6'(x); rd_y = 6'(y);
      @(negedge clk) rd_en = 0;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (rd_data[8*k +: 8] !== ref_col[16*m + x + k][y]) begin
          failures++;
          if (failures < 10) $display("FAIL: m=%0d x=%0d y=%0d k=%0d got %h exp %h", m, x, y, k, rd_data[8*k +: 8], ref_col[16*m + x + k][y]);
        end
      end
    end
  endtask
  initial begin
    #(10 * 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int x = 0; x < 144; x++) for (int y = 0; y < 48; y++) ref_col[x][y] = 8'($urandom);
    for (int c = 0; c < 3; c++) load_strip(c);
    read_check(0, 300);
    load_strip(3);
    read_check(1, 300);
    load_strip(4);
    read_check(2, 300);
    load_strip(5);
    read_check(3, 300);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
