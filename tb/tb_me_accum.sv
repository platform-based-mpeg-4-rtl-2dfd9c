// Testbench of me_accum together with me_term, as they are wired in the
// distortion stage: random candidates with random row SADs; the final minimum
// cost, its SAD and vector must equal those computed here from the full
// costs (bias lambda*(|u-pu|+|v-pv|) plus all row sums, first strictly
// smaller wins), every candidate must report done exactly once, and
// candidates whose partial cost reached the minimum must have been dropped.
module tb_me_accum;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, start = 0, in_valid = 0, in_last = 0, term;
  mv_t u, v, pu, pv; logic [3:0] lambda; logic [10:0] sad;
  logic active, done, killed; logic [SADW-1:0] partial, min_cost, min_sad; mv_t bu, bv;
  int checks = 0, failures = 0, nkilled = 0;
  always #5 clk = ~clk;
  me_accum dut (.clk, .rst_n, .clear, .start, .u, .v, .pu, .pv, .lambda, .in_valid, .in_last, .sad,
                .terminate(term), .active, .partial, .min_cost, .min_sad, .best_u(bu), .best_v(bv),
                .done, .killed);
  me_term u_term (.active, .partial, .min_cost, .terminate(term));
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #(10 * 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run_all;
    for (int s = 0; s < 20; s++) begin
      int mc = 1 << 30, ms = 0, mu = 0, mv = 0;
      lambda = 4'($urandom_range(0, 8)); pu = mv_t'($urandom_range(0, 8) - 4); pv = mv_t'($urandom_range(0, 8) - 4);
      @(negedge clk) clear = 1; @(negedge clk) clear = 0;
      for (int c = 0; c < 30; c++) begin
        int cu = $urandom_range(0, 31) - 16, cv = $urandom_range(0, 31) - 16, rows = (s % 2) ? 8 : 32;
        int bias, tot, d = 0, running; bit was_killed = 0;
        int rs [32];
        begin int ipu = int'(pu), ipv = int'(pv), il = int'(lambda); bias = il * ((cu > ipu ? cu - ipu : ipu - cu) + (cv > ipv ? cv - ipv : ipv - cv)); end
        tot = bias;
        for (int r = 0; r < rows; r++) begin rs[r] = $urandom_range(0, 300); tot += rs[r]; end
        u = mv_t'(cu); v = mv_t'(cv);
        @(negedge clk) start = 1; @(negedge clk) start = 0;
        running = bias;
        for (int r = 0; r < rows && !was_killed; r++) begin
          if (running >= mc) was_killed = 1;   // expected halfway termination
          in_valid = 1; in_last = (r == rows - 1); sad = 11'(rs[r]);
          #1; if (done) d++;
          @(negedge clk); running += rs[r];
        end
        in_valid = 0; in_last = 0;
        repeat (3) begin #1; if (done) begin d++; if (killed) nkilled++; end @(negedge clk); end
        check(d == 1, $sformatf("done count %0d", d));
        if (tot < mc) begin mc = tot; ms = tot - bias; mu = cu; mv = cv; end
      end
      check(int'(min_cost) == mc && int'(min_sad) == ms && int'(bu) == mu && int'(bv) == mv,
            $sformatf("min %0d/%0d (%0d,%0d) exp %0d/%0d (%0d,%0d)", min_cost, min_sad, bu, bv, mc, ms, mu, mv));
    end
  endtask
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run_all();
    check(nkilled > 0, "halfway termination happened");
    $display("killed candidates: %0d", nkilled);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
