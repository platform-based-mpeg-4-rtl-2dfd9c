// Testbench of me_halfpel: a random 48x48 search window and a current block
// built from a half-pixel shifted copy of it (plus noise) are held here in
// arrays that answer the unit's read port one cycle later, like the window
// and block memories. For random integer centres (including the edges of the
// range), block ids 0..4, predictors and lambdas, the refined vector and SAD
// must equal a model run here: the centre's cost first, then the eight
// half-pixel neighbours in raster order inside -16.0..+15.5, bilinear
// interpolation rounded up, first strictly smaller cost wins. The number of
// cycles per refinement must not exceed the reads of all valid neighbours
// plus 4 cycles each, one per neighbour slot and 4 of set-up. Halfway
// terminations (refinements faster than that bound) and refinements that
// leave the integer position are counted and must occur.
module tb_me_halfpel;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] id; mv_t cu, cv, pu, pv; logic [3:0] lambda; logic [SADW-1:0] c_sad;
  logic rd_en, mb_half, busy, done; logic [5:0] sw_x, sw_y; logic [3:0] mb_row;
  logic [63:0] sw_q, mb_q; hmv_t best_u, best_v; logic [SADW-1:0] best_sad;
  logic [7:0] win [48][48], blk [16][16];    // [x][y]
  int checks = 0, failures = 0, ev_term = 0, ev_moved = 0;
  always #5 clk = ~clk;

  me_halfpel dut (.*);

  always @(posedge clk) if (rd_en) begin
    for (int i = 0; i < 8; i++) begin
      sw_q[8*i +: 8] <= (int'(sw_x) + i < 48) ? win[int'(sw_x) + i][sw_y] : 8'h00;
      mb_q[8*i +: 8] <= blk[8 * int'(mb_half) + i][mb_row];
    end
  end

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  function automatic int hsad(int b, int hu, int hv);
    int bx = (b == 2 || b == 4) ? 8 : 0, by = (b == 3 || b == 4) ? 8 : 0, n = (b == 0) ? 16 : 8, s = 0;
    int iu = hu >>> 1, iv = hv >>> 1, hx = hu & 1, hy = hv & 1;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      int px = 16 + bx + x + iu, py = 16 + by + y + iv;
      int p = (int'(win[px][py]) + int'(win[px + hx][py]) + int'(win[px][py + hy]) + int'(win[px + hx][py + hy]) + 2) / 4;
      s += iabs(int'(blk[bx + x][by + y]) - p);
    end
    return s;
  endfunction

  task automatic run_one(input int b, input int icu, input int icv, input int ipu, input int ipv, input int lam);
    int bu, bv, bs, best, t0, t1, bound, reads, n = (b == 0) ? 16 : 8, halves = (b == 0) ? 2 : 1;
    bu = 2 * icu; bv = 2 * icv; bs = hsad(b, bu, bv);
    best = bs + lam * (iabs(bu - 2 * ipu) + iabs(bv - 2 * ipv));
    bound = 4 + 9; reads = 0;
    for (int dv = -1; dv <= 1; dv++) for (int dh = -1; dh <= 1; dh++) begin
      int hu = 2 * icu + dh, hv = 2 * icv + dv, c, sd;
      if ((dh == 0 && dv == 0) || hu < -32 || hu > 31 || hv < -32 || hv > 31) continue;
      reads += (1 + (hu & 1)) * (n + (hv & 1)) * halves;
      bound += 4;
      sd = hsad(b, hu, hv);
      c = sd + lam * (iabs(hu - 2 * ipu) + iabs(hv - 2 * ipv));
      if (c < best) begin best = c; bu = hu; bv = hv; bs = sd; end
    end
    bound += reads;
    id = 3'(b); cu = mv_t'(icu); cv = mv_t'(icv); pu = mv_t'(ipu); pv = mv_t'(ipv); lambda = 4'(lam);
    c_sad = SADW'(hsad(b, 2 * icu, 2 * icv));
    @(negedge clk) start = 1; t0 = $time / 10; @(negedge clk) start = 0;
    while (!done) @(negedge clk);
    t1 = $time / 10;
    check(int'(best_u) == bu && int'(best_v) == bv && int'(best_sad) == bs,
          $sformatf("block %0d centre (%0d,%0d): got (%0d,%0d) %0d, model (%0d,%0d) %0d", b, icu, icv, best_u, best_v, best_sad, bu, bv, bs));
    check(t1 - t0 <= bound, $sformatf("%0d cycles, bound %0d", t1 - t0, bound));
    if (t1 - t0 < bound) ev_term++;
    if (bu != 2 * icu || bv != 2 * icv) ev_moved++;
  endtask

  initial begin
    #(10 * 500000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int x = 0; x < 48; x++) for (int y = 0; y < 48; y++)
      win[x][y] = 8'(128 + $rtoi(60.0 * $sin(x / 3.0) + 50.0 * $cos(y / 4.0)) + $urandom_range(0, 10));
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int su = $urandom_range(0, 20) - 10, sv = $urandom_range(0, 20) - 10, hx = $urandom_range(0, 1), hy = $urandom_range(0, 1);
      int b = $urandom_range(0, 4), icu, icv;
      // current block: the window at half-pixel displacement (2su+hx, 2sv+hy)
      for (int x = 0; x < 16; x++) for (int y = 0; y < 16; y++) begin
        int px = 16 + x + su, py = 16 + y + sv;
        int p = (int'(win[px][py]) + int'(win[px + hx][py]) + int'(win[px][py + hy]) + int'(win[px + hx][py + hy]) + 2) / 4
                + $urandom_range(0, 4) - 2;
        blk[x][y] = 8'(p < 0 ? 0 : (p > 255 ? 255 : p));
      end
      icu = su + $urandom_range(0, 2) - 1; icv = sv + $urandom_range(0, 2) - 1;
      if (t % 10 == 0) begin icu = (t % 20 == 0) ? -16 : 15; icv = (t % 40 == 0) ? 15 : -16; end
      run_one(b, icu, icv, $urandom_range(0, 8) - 4, $urandom_range(0, 8) - 4, $urandom_range(0, 3));
    end
    $display("terminated early %0d, moved %0d", ev_term, ev_moved);
    check(ev_term > 0, "halfway termination");
    check(ev_moved > 0, "refinement moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
