// Testbench of motion_estimator: four consecutive macroblocks of one row
// (columns 0..3) are coded, so the first loads the whole search window and
// the others reuse two strips and load one. Each current macroblock is a
// displaced copy of the reference with a little noise.
//  - FFS: the 16x16 cost must be the minimum over the whole -16..+15 range,
//    computed here exhaustively, and the reported SAD must be the SAD of the
//    reported vector; with this data the true displacement must be found.
//  - PDS: the vector must equal that of a diamond search model run here on
//    the same costs (same point order, first strictly smaller wins).
//  - 8x8: each block's cost must be the minimum over +-2 around the 16x16
//    vector. The macroblock pixel sum is checked too.
//  - half pixel: the refined 16x16 and 8x8 vectors and SADs must equal a
//    refinement model run here (eight neighbours in raster order, bilinear
//    interpolation rounded up); one macroblock is shifted by half a pixel so
//    that a half-pixel vector must be chosen.
// A PDS macroblock, loads included, must finish within 3367 cycles, the
// budget of 30 CIF frames/s (396 macroblocks) at 40 MHz. Halfway
// terminations, large-diamond moves, full and partial window loads,
// load-port stalls and half-pixel results are counted and must each happen.
module tb_motion_estimator;
  import me_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, ld_valid = 0, ld_ready, busy, done;
  me_mode_t mode; logic [4:0] mb_x; mv_t pred_u, pred_v, mv16_u, mv16_v; logic [3:0] lambda;
  logic [31:0] ld_data; logic [15:0] sad16, mb_sum; mv_t mv8_u [4], mv8_v [4]; logic [15:0] sad8 [4];
  logic [11:0] n_cands, n_terms; logic [5:0] n_moves;
  hmv_t hmv16_u, hmv16_v, hmv8_u [4], hmv8_v [4]; logic [15:0] hsad16, hsad8 [4];
  logic [7:0] img [96][48];     // reference area, [x][y]
  logic [7:0] cur [16][16];     // current macroblock, [x][y]
  int checks = 0, failures = 0, ev_half = 0, ev_full = 0, ev_reuse = 0, ev_term = 0, ev_move = 0, ev_stall = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  motion_estimator dut (.clk, .rst_n, .start, .mode, .mb_x, .pred_u, .pred_v, .lambda,
    .ld_valid, .ld_data, .ld_ready, .busy, .done, .mv16_u, .mv16_v, .sad16, .mv8_u, .mv8_v, .sad8,
    .hmv16_u, .hmv16_v, .hsad16, .hmv8_u, .hmv8_v, .hsad8, .mb_sum, .n_cands, .n_terms, .n_moves);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // SAD of block id (0 = 16x16) of macroblock column m at vector (u,v)
  function automatic int sad_of(int m, int id, int u, int v);
    int bx = (id == 2 || id == 4) ? 8 : 0, by = (id == 3 || id == 4) ? 8 : 0, n = (id == 0) ? 16 : 8, s = 0;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      int a = cur[bx + x][by + y], b = img[16*m + 16 + bx + x + u][16 + by + y + v];
      s += (a > b) ? a - b : b - a;
    end
    return s;
  endfunction
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  function automatic int cost_of(int m, int id, int u, int v, int pu, int pv, int lam);
    if (u < -16 || u > 15 || v < -16 || v > 15) return 1 << 30;
    return lam * (iabs(u - pu) + iabs(v - pv)) + sad_of(m, id, u, v);
  endfunction

  // SAD at a half-pixel vector (hu,hv), bilinear interpolation rounded up
  function automatic int hsad_of(int m, int id, int hu, int hv);
    int bx = (id == 2 || id == 4) ? 8 : 0, by = (id == 3 || id == 4) ? 8 : 0, n = (id == 0) ? 16 : 8, s = 0;
    int iu = hu >>> 1, iv = hv >>> 1, hx = hu & 1, hy = hv & 1;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++) begin
      int px = 16*m + 16 + bx + x + iu, py = 16 + by + y + iv;
      int p = (int'(img[px][py]) + int'(img[px + hx][py]) + int'(img[px][py + hy]) + int'(img[px + hx][py + hy]) + 2) / 4;
      int a = cur[bx + x][by + y];
      s += (a > p) ? a - p : p - a;
    end
    return s;
  endfunction
  // refinement model: eight neighbours in raster order, first strictly smaller wins
  task automatic hp_model(input int m, input int id, input int cu, input int cv, input int pu, input int pv, input int lam,
                          output int bu, output int bv, output int bs);
    int best;
    bu = 2 * cu; bv = 2 * cv; bs = sad_of(m, id, cu, cv);
    best = bs + lam * (iabs(bu - 2 * pu) + iabs(bv - 2 * pv));
    for (int dv = -1; dv <= 1; dv++) for (int dh = -1; dh <= 1; dh++) begin
      int hu = 2 * cu + dh, hv = 2 * cv + dv, c, sd;
      if ((dh == 0 && dv == 0) || hu < -32 || hu > 31 || hv < -32 || hv > 31) continue;
      sd = hsad_of(m, id, hu, hv);
      c = sd + lam * (iabs(hu - 2 * pu) + iabs(hv - 2 * pv));
      if (c < best) begin best = c; bu = hu; bv = hv; bs = sd; end
    end
  endtask

  // diamond search model
  task automatic pds_model(input int m, input int pu, input int pv, input int lam, output int bu, output int bv);
    int ldx [8] = '{0, 1, 2, 1, 0, -1, -2, -1}, ldy [8] = '{-2, -1, 0, 1, 2, 1, 0, -1};
    int sdx [4] = '{0, 1, 0, -1}, sdy [4] = '{-1, 0, 1, 0};
    int cu, cv, best, c; bit visited [int];
    cu = pu < -16 ? -16 : (pu > 15 ? 15 : pu); cv = pv < -16 ? -16 : (pv > 15 ? 15 : pv);
    bu = cu; bv = cv; best = cost_of(m, 0, cu, cv, pu, pv, lam); visited[(cu+64)*256+cv+64] = 1;
    forever begin
      int ou = cu, ov = cv;
      for (int i = 0; i < 8; i++) begin
        int x = cu + ldx[i], y = cv + ldy[i];
        if (visited.exists((x+64)*256+y+64)) continue;
        visited[(x+64)*256+y+64] = 1;
        c = cost_of(m, 0, x, y, pu, pv, lam);
        if (c < best) begin best = c; bu = x; bv = y; end
      end
      if (bu == ou && bv == ov) break;
      cu = bu; cv = bv;
    end
    for (int i = 0; i < 4; i++) begin
      c = cost_of(m, 0, cu + sdx[i], cv + sdy[i], pu, pv, lam);
      if (c < best) begin best = c; bu = cu + sdx[i]; bv = cv + sdy[i]; end
    end
  endtask

  task automatic send_word(input logic [31:0] w);
    ld_data = w;
    if ($urandom_range(0, 7) == 0) begin ld_valid = 0; ev_stall++; @(negedge clk); end
    ld_valid = 1;
    while (!ld_ready) @(negedge clk);
    @(negedge clk);
    ld_valid = 0;
  endtask

  task automatic code_mb(input int m, input me_mode_t md, input int du, input int dv,
                         input int pu, input int pv, input int lam, input int hxd);
    int t0, sum = 0, bu, bv, best, hu, hv, hs;
    for (int y = 0; y < 16; y++) for (int x = 0; x < 16; x++) begin
      int p = (int'(img[16*m + 16 + x + du][16 + y + dv]) + int'(img[16*m + 16 + x + du + hxd][16 + y + dv]) + 1) / 2
              + $urandom_range(0, 4) - 2;
      cur[x][y] = 8'(p < 0 ? 0 : (p > 255 ? 255 : p));
      sum += cur[x][y];
    end
    mode = md; mb_x = 5'(m); pred_u = mv_t'(pu); pred_v = mv_t'(pv); lambda = 4'(lam);
    @(negedge clk) start = 1; t0 = cyc; @(negedge clk) start = 0;
    // window strips: all three at the row start, else the new right-hand one
    for (int s = (m == 0 ? 0 : 2); s < 3; s++)
      for (int y = 0; y < 48; y++) for (int w = 0; w < 4; w++)
        send_word({img[16*(m+s) + 4*w + 3][y], img[16*(m+s) + 4*w + 2][y], img[16*(m+s) + 4*w + 1][y], img[16*(m+s) + 4*w][y]});
    if (m == 0) ev_full++; else ev_reuse++;
    for (int y = 0; y < 16; y++) for (int w = 0; w < 4; w++)
      send_word({cur[4*w + 3][y], cur[4*w + 2][y], cur[4*w + 1][y], cur[4*w][y]});
    while (!done) @(negedge clk);
    $display("MB %0d mode %s: mv16 (%0d,%0d) sad %0d, %0d candidates, %0d terminated, %0d moves, %0d cycles",
             m, md.name(), mv16_u, mv16_v, sad16, n_cands, n_terms, n_moves, cyc - t0);
    ev_term += n_terms; ev_move += n_moves;
    check(mb_sum == 16'(sum), "macroblock pixel sum");
    if (md == MODE_FFS) begin
      best = 1 << 30;
      for (int u = -16; u < 16; u++) for (int v = -16; v < 16; v++) begin
        int c = cost_of(m, 0, u, v, pu, pv, lam);
        if (c < best) best = c;
      end
      check(cost_of(m, 0, mv16_u, mv16_v, pu, pv, lam) == best, "FFS finds the minimum cost");
      check(int'(mv16_u) == du && int'(mv16_v) == dv, "FFS finds the true displacement");
    end else begin
      pds_model(m, pu, pv, lam, bu, bv);
      check(int'(mv16_u) == bu && int'(mv16_v) == bv, $sformatf("PDS vector, model (%0d,%0d)", bu, bv));
      check(cyc - t0 <= 3367, $sformatf("PDS macroblock in %0d cycles", cyc - t0));
    end
    check(int'(sad16) == sad_of(m, 0, mv16_u, mv16_v), "SAD of the 16x16 vector");
    hp_model(m, 0, mv16_u, mv16_v, pu, pv, lam, hu, hv, hs);
    check(int'(hmv16_u) == hu && int'(hmv16_v) == hv && int'(hsad16) == hs,
          $sformatf("16x16 half-pixel (%0d,%0d) sad %0d, model (%0d,%0d) sad %0d", hmv16_u, hmv16_v, hsad16, hu, hv, hs));
    if (hmv16_u[0] || hmv16_v[0]) ev_half++;
    for (int k = 1; k <= 4; k++) begin
      best = 1 << 30;
      for (int u = mv16_u - 2; u <= mv16_u + 2; u++) for (int v = mv16_v - 2; v <= mv16_v + 2; v++) begin
        int c = cost_of(m, k, u, v, pu, pv, lam);
        if (c < best) best = c;
      end
      check(cost_of(m, k, mv8_u[k-1], mv8_v[k-1], pu, pv, lam) == best, $sformatf("8x8 block %0d minimum", k));
      check(int'(sad8[k-1]) == sad_of(m, k, mv8_u[k-1], mv8_v[k-1]), "8x8 SAD");
      hp_model(m, k, mv8_u[k-1], mv8_v[k-1], pu, pv, lam, hu, hv, hs);
      check(int'(hmv8_u[k-1]) == hu && int'(hmv8_v[k-1]) == hv && int'(hsad8[k-1]) == hs,
            $sformatf("8x8 block %0d half-pixel (%0d,%0d), model (%0d,%0d)", k, hmv8_u[k-1], hmv8_v[k-1], hu, hv));
    end
  endtask

  initial begin
    #(10 * 400000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int x = 0; x < 96; x++) for (int y = 0; y < 48; y++) img[x][y] = 8'($urandom);
    repeat (2) @(negedge clk); rst_n = 1;
    code_mb(0, MODE_FFS, 3, -5, 0, 0, 2, 0);
    code_mb(1, MODE_PDS, -6, 4, -5, 3, 2, 1);
    code_mb(2, MODE_PDS, 6, 5, 0, 0, 1, 0);
    code_mb(3, MODE_FFS, -9, 11, 0, 0, 1, 0);
    check(ev_full > 0, "full window load");
    check(ev_reuse > 0, "window reuse load");
    check(ev_term > 0, "halfway termination");
    check(ev_move > 0, "large diamond move");
    check(ev_stall > 0, "load stall");
    check(ev_half > 0, "half-pixel vector chosen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
