// Testbench of me_spiral_gen: every point of the square of the requested
// number of rings is emitted exactly once, ring by ring outwards, the centre
// first, `last` only on the final point, and one point per cycle when the
// consumer is always ready; a second run stalls the consumer at random.
module tb_me_spiral_gen;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, out_valid, out_ready = 1, out_last, busy;
  mv_t cu, cv; logic [4:0] rings; logic [2:0] id; cand_t oc;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_spiral_gen dut (.clk, .rst_n, .start, .center_u(cu), .center_v(cv), .rings, .id,
                     .out_valid, .out_ready, .out_cand(oc), .out_last, .busy);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  function automatic int cheb(int a, int b); a = a < 0 ? -a : a; b = b < 0 ? -b : b; return a > b ? a : b; endfunction
  task automatic run(input int c_u, input int c_v, input int r, input bit stall);
    bit seen [int]; int n = 0, cyc = 0, lastring = 0, nlast = 0; bit first = 1;
    cu = mv_t'(c_u); cv = mv_t'(c_v); rings = 5'(r); id = 3'd2;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    while (busy && cyc < 5000) begin
      out_ready = stall ? 1'($urandom_range(0, 1)) : 1'b1;
      #1;
      if (out_valid && out_ready) begin
        int du = int'(oc.u) - c_u, dv = int'(oc.v) - c_v, key = (du + 64) * 256 + dv + 64;
        if (first) check(du == 0 && dv == 0, "centre first");
        first = 0;
        check(!seen.exists(key), $sformatf("duplicate %0d,%0d", du, dv));
        seen[key] = 1;
        check(cheb(du, dv) >= lastring && cheb(du, dv) <= r, "ring order");
        lastring = cheb(du, dv);
        check(oc.id == 3'd2, "id");
        if (out_last) nlast++;
        n++;
        if (n == (2*r+1)*(2*r+1)) check(out_last, "last on final point");
      end
      @(negedge clk); cyc++;
    end
    check(n == (2*r+1)*(2*r+1), $sformatf("count %0d for %0d rings", n, r));
    check(nlast == 1, "one last");
    if (!stall) check(cyc == n, $sformatf("rate: %0d cycles for %0d points", cyc, n));
  endtask
  initial begin
    #(10 * 20000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(3, -2, 2, 0);
    run(0, 0, 16, 0);
    run(-5, 7, 3, 1);
    run(1, 1, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
