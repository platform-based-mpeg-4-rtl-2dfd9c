// Testbench of mc: random 9x9 (three-word-wide) reference areas, every block
// offset inside the first word, all four half-pixel cases and both rounding
// control values; each predicted pixel is compared with the MPEG-4 bilinear
// formula evaluated here, and the output must start right after the load
// and last 16 cycles.
module tb_mc;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, hx, hy, rc, in_valid = 0, in_ready, out_valid, busy;
  logic [1:0] xoff; logic [3:0] out_idx; word_t in_data, out_data;
  logic [7:0] ref_px [12][9];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mc dut (.clk, .rst_n, .start, .xoff, .hx, .hy, .rc, .in_valid, .in_data, .in_ready,
          .out_valid, .out_idx, .out_data, .busy);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  task automatic run(input int xo, input bit h_x, input bit h_y, input bit r_c);
    int n = 0;
    for (int x = 0; x < 12; x++) for (int y = 0; y < 9; y++) ref_px[x][y] = 8'($urandom);
    xoff = 2'(xo); hx = h_x; hy = h_y; rc = r_c;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    for (int c = 0; c < 3; c++) for (int r = 0; r < 9; r++) begin
      in_valid = 1;
      in_data = {ref_px[4*c+3][r], ref_px[4*c+2][r], ref_px[4*c+1][r], ref_px[4*c][r]};
      #1 check(in_ready, "accepts a word every cycle");
      @(negedge clk);
    end
    in_valid = 0;
    for (int k = 0; k < 16; k++) begin
      #1 check(out_valid && out_idx == 4'(k), "output word in order, no gap");
      for (int j = 0; j < 4; j++) begin
        int px = xo + 4 * (k % 2) + j, r = k / 2, a, b, c2, d, e;
        a = ref_px[px][r]; b = ref_px[px + 1][r]; c2 = ref_px[px][r + 1]; d = ref_px[px + 1][r + 1];
        if (!h_x && !h_y) e = a;
        else if (h_x && !h_y) e = (a + b + 1 - r_c) / 2;
        else if (!h_x && h_y) e = (a + c2 + 1 - r_c) / 2;
        else e = (a + b + c2 + d + 2 - r_c) / 4;
        check(out_data[8*j +: 8] == 8'(e), $sformatf("xo%0d hx%0d hy%0d rc%0d k%0d j%0d", xo, h_x, h_y, r_c, k, j));
      end
      @(negedge clk);
    end
    #1 check(!busy && !out_valid, "done after 16 words");
  endtask
  initial begin
    #(10 * 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int xo = 0; xo < 4; xo++) for (int h = 0; h < 4; h++) for (int r = 0; r < 2; r++)
      run(xo, h[0], h[1], r[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
