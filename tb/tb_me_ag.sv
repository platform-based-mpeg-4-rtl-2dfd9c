// Testbench of me_ag: for random candidates of every block id, the sequence
// of reads (window x/y, macroblock row/half, last flag) must be the rows of
// the block displaced by the vector, one per cycle: 32 reads for the 16x16
// macroblock, 8 for an 8x8 block. A terminate in mid-candidate must stop the
// reads at once.
module tb_me_ag;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, terminate = 0, rd_en, rd_last, mb_half, busy;
  cand_t cand; logic [5:0] sw_x, sw_y; logic [3:0] mb_row;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_ag dut (.clk, .rst_n, .start, .cand, .terminate, .rd_en, .rd_last, .sw_x, .sw_y, .mb_row, .mb_half, .busy);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  task automatic run(input int id, input int u, input int v, input int kill_at);
    int bx = (id == 2 || id == 4) ? 8 : 0, by = (id == 3 || id == 4) ? 8 : 0;
    int nh = (id == 0) ? 2 : 1, nr = (id == 0) ? 16 : 8, n = 0;
    cand = '{id: 3'(id), u: mv_t'(u), v: mv_t'(v)};
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    for (int r = 0; r < nr; r++)
      for (int h = 0; h < nh; h++) begin
        if (n == kill_at) begin
          terminate = 1; #1;
          check(!rd_en, "no read while terminating");
          @(negedge clk) terminate = 0; #1;
          check(!busy && !rd_en, "stopped after terminate");
          return;
        end
        #1;
        check(rd_en, "read issued");
        check(sw_x == 6'(16 + bx + u + 8*h) && sw_y == 6'(16 + by + v + r),
              $sformatf("window address id%0d r%0d h%0d: %0d,%0d", id, r, h, sw_x, sw_y));
        check(mb_row == 4'(by + r) && mb_half == 1'((bx / 8) + h), "mb address");
        check(rd_last == (r == nr - 1 && h == nh - 1), "last flag");
        n++;
        @(negedge clk);
      end
    #1 check(!busy && !rd_en, "idle after last read");
  endtask
  initial begin
    #(10 * 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 100; i++)
      run(i % 5, $urandom_range(0, 31) - 16, $urandom_range(0, 31) - 16, (i % 7 == 3) ? $urandom_range(1, 7) : 99);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
