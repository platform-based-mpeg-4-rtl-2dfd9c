// Testbench of me_diamond_gen: the initial phase yields the centre and the
// eight large-diamond points, the last phase the four small-diamond points,
// and a refinement phase after a move exactly the large-diamond points around
// the new centre that were not in the large diamond around the old one
// (computed here by set difference), each once, with `last` on the final one.
module tb_me_diamond_gen;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, out_valid, out_ready = 1, out_last, busy;
  dp_phase_t phase; logic [2:0] dir; mv_t cu, cv; cand_t oc;
  int checks = 0, failures = 0;
  int ldx [8] = '{0, 1, 2, 1, 0, -1, -2, -1};
  int ldy [8] = '{-2, -1, 0, 1, 2, 1, 0, -1};
  always #5 clk = ~clk;
  me_diamond_gen dut (.clk, .rst_n, .start, .phase, .dir, .center_u(cu), .center_v(cv), .id(3'd0),
                      .out_valid, .out_ready, .out_cand(oc), .out_last, .busy);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int key(int x, int y); return (x + 64) * 256 + y + 64; endfunction
  task automatic run(input dp_phase_t ph, input int d, input int c_u, input int c_v);
    bit exp [int]; int nexp, n = 0, nlast = 0, cyc = 0;
    if (ph == DP_LARGE_FULL) begin
      exp[key(c_u, c_v)] = 1;
      for (int i = 0; i < 8; i++) exp[key(c_u + ldx[i], c_v + ldy[i])] = 1;
    end else if (ph == DP_SMALL) begin
      exp[key(c_u, c_v - 1)] = 1; exp[key(c_u + 1, c_v)] = 1;
      exp[key(c_u, c_v + 1)] = 1; exp[key(c_u - 1, c_v)] = 1;
    end else begin
      int ou = c_u - ldx[d], ov = c_v - ldy[d]; bit old [int];
      old[key(ou, ov)] = 1;
      for (int i = 0; i < 8; i++) old[key(ou + ldx[i], ov + ldy[i])] = 1;
      for (int i = 0; i < 8; i++)
        if (!old.exists(key(c_u + ldx[i], c_v + ldy[i]))) exp[key(c_u + ldx[i], c_v + ldy[i])] = 1;
    end
    nexp = exp.num();
    phase = ph; dir = 3'(d); cu = mv_t'(c_u); cv = mv_t'(c_v);
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (busy && cyc < 100) begin
      #1;
      if (out_valid) begin
        int k = key(int'(oc.u), int'(oc.v));
        check(exp.exists(k), $sformatf("unexpected point %0d,%0d (phase %0d dir %0d)", oc.u, oc.v, ph, d));
        exp.delete(k);
        n++; if (out_last) begin nlast++; check(n == nexp, "last on final point"); end
      end
      @(negedge clk); cyc++;
    end
    check(exp.num() == 0 && n == nexp, $sformatf("phase %0d dir %0d: %0d of %0d points", ph, d, n, nexp));
    check(nlast == 1, "one last");
    check(cyc == nexp, "one point per cycle");
  endtask
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(DP_LARGE_FULL, 0, 3, -4);
    run(DP_SMALL, 0, -7, 2);
    for (int d = 0; d < 8; d++) run(DP_LARGE_MOVE, d, 1, 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
