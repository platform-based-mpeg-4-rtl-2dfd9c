// End-to-end testbench of encoder_top at its default (CIF) size. The
// testbench plays the controlling processor and the external memory: the
// memory holds a smooth random-textured reference frame (block-based,
// reconstructed) and a source frame that is the reference moved by (3,-2)
// plus noise (frame-based). Two macroblocks of row 1 are coded, the first at
// the left frame border (whole search window, padded) in FFS mode, the second
// (window reuse) in PDS mode from a zero predictor. For each macroblock:
//  - DMA loads the window and the macroblock into the motion estimator; the
//    16x16 result must be the exhaustive minimum over the padded window and
//    each 8x8 result the minimum over +-2;
//  - for each luminance block: DMA reads the 9x9 reference into MC (the last
//    block with half-pixel flags), MC writes the prediction into the share
//    memory, DMA feeds the source block to the texture engine, and the
//    reconstruction is burst-written to a second frame buffer. The levels,
//    read over the SHARE bus, are decoded here (dequantisation, exact IDCT,
//    prediction computed here from the reference frame) and must match the
//    written reconstruction within 1;
//  - the levels are sent as 12-bit codes to the bitstream packer, and the
//    flushed BITSTREAM words must equal the code string.
// The blocks are compensated with the estimator's half-pixel refined
// vectors; the refined 16x16 result must lie next to the integer one and
// not be worse.
// One extra intra block exercises AC/DC prediction against the rule
// evaluated here. Mechanisms counted (each must occur): full and reused
// window loads, border padding, halfway terminations, diamond moves,
// half-pixel compensation, inter and intra blocks, AC/DC prediction, memory
// grant stalls, bitstream flush.
module tb_encoder_top;
  import enc_pkg::*;
  import me_pkg::*;
  localparam int W = FRAME_W, H = FRAME_H;
  localparam int SRC_BASE = 0, REF_BASE = 32768, NEW_BASE = 65536;
  localparam int QP = 4;

  logic clk = 0, rst_n = 0;
  logic [1:0] dbus_sel = 0;
  logic [AW-1:0] src_base = AW'(SRC_BASE), rec_base = AW'(REF_BASE);
  logic dma_cmd_valid = 0, dma_cmd_ready, dma_busy; dma_cmd_t dma_cmd;
  logic me_start = 0, me_busy, me_done; me_mode_t me_mode = MODE_FFS; logic [4:0] me_mb_x = 0;
  mv_t me_pred_u = 0, me_pred_v = 0, me_mv16_u, me_mv16_v; logic [3:0] me_lambda = 1;
  logic [15:0] me_sad16, me_mb_sum; mv_t me_mv8_u [4], me_mv8_v [4]; logic [15:0] me_sad8 [4];
  logic [11:0] me_n_cands, me_n_terms; logic [5:0] me_n_moves;
  hmv_t me_hmv16_u, me_hmv16_v, me_hmv8_u [4], me_hmv8_v [4]; logic [15:0] me_hsad16, me_hsad8 [4];
  logic mc_start = 0, mc_hx = 0, mc_hy = 0, mc_rc = 0, mc_busy; logic [1:0] mc_xoff = 0; logic [8:0] mc_base = 0;
  logic tbe_start = 0, tbe_intra = 0, tbe_luma = 1, tbe_busy, tbe_done; logic [4:0] tbe_qp = 5'(QP);
  logic [8:0] tbe_pred_base = 0, tbe_lvl_base = 9'd64;
  logic acdc_avail_a = 1, acdc_avail_b = 1, acdc_avail_c = 1; logic [11:0] acdc_f_a = 0, acdc_f_b = 0, acdc_f_c = 0;
  logic signed [11:0] acdc_ac_a [7], acdc_ac_c [7];
  logic acdc_valid, acdc_from_above; logic signed [8:0] acdc_dc_diff; logic signed [12:0] acdc_ac_res [7];
  logic [14:0] acdc_s_orig, acdc_s_res; logic [11:0] tbe_rec_dc; logic signed [11:0] tbe_row_x [7], tbe_col_x [7];
  logic bts_valid = 0, bts_flush = 0, bts_ready; logic [23:0] bts_code = 0; logic [4:0] bts_len = 0; logic [31:0] bts_bit_count;
  logic bs_valid; logic [31:0] bs_word; logic [2:0] bs_bytes;
  logic sh_en = 0, sh_we = 0; logic [8:0] sh_addr = 0; word_t sh_wdata = 0, sh_rdata;
  logic mem_req, mem_we, mem_gnt, mem_rvalid = 0; logic [AW-1:0] mem_addr; word_t mem_wdata, mem_rdata;

  word_t mem [1 << AW];
  word_t rq [$];
  logic [7:0] reff [W][H], srcf [W][H];
  bit expbits [$], gotbits [$];
  int checks = 0, failures = 0;
  int ev_full = 0, ev_reuse = 0, ev_pad = 0, ev_term = 0, ev_move = 0, ev_half = 0, ev_inter = 0, ev_intra = 0,
      ev_acdc = 0, ev_gnt_stall = 0, ev_flush = 0;

  always #5 clk = ~clk;

  encoder_top dut (.*);

  // external memory: random grant, in-order read data after a random delay
  always @(negedge clk) mem_gnt = ($urandom_range(0, 4) != 0);
  always @(posedge clk) if (mem_req) begin
    if (!mem_gnt) ev_gnt_stall++;
    else if (mem_we) mem[mem_addr] <= mem_wdata;
    else rq.push_back(mem[mem_addr]);
  end
  always @(negedge clk) begin
    mem_rvalid = 0;
    if (rq.size() > 0 && $urandom_range(0, 3) != 0) begin mem_rvalid = 1; mem_rdata = rq.pop_front(); end
  end
  always @(posedge clk) if (bs_valid)
    for (int i = 0; i < 8 * int'(bs_bytes); i++) gotbits.push_back(bs_word[31 - i]);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  function automatic int clampi(int v, int lo, int hi); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int refp(int x, int y); return reff[clampi(x, 0, W - 1)][clampi(y, 0, H - 1)]; endfunction
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  function automatic real a_(int k); return k == 0 ? 1.0 / $sqrt(2.0) : 1.0; endfunction

  function automatic int cost(int mx, int my, int id, int u, int v, int pu, int pv, int lam);
    int bx = (id == 2 || id == 4) ? 8 : 0, by = (id == 3 || id == 4) ? 8 : 0, n = (id == 0) ? 16 : 8, s = 0;
    if (u < -16 || u > 15 || v < -16 || v > 15) return 1 << 30;
    for (int y = 0; y < n; y++) for (int x = 0; x < n; x++)
      s += iabs(int'(srcf[16*mx + bx + x][16*my + by + y]) - refp(16*mx + bx + x + u, 16*my + by + y + v));
    return s + lam * (iabs(u - pu) + iabs(v - pv));
  endfunction

  task automatic dma_run(input dma_kind_t k, input int x, input int y, input int fs, input bit mb16);
    dma_cmd = '{kind: k, x: 11'(x), y: 11'(y), first_strip: 2'(fs), mb16: mb16};
    @(negedge clk) dma_cmd_valid = 1;
    while (!dma_cmd_ready) @(negedge clk);
    @(negedge clk) dma_cmd_valid = 0;
    while (dma_busy) @(negedge clk);
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk) s = 1; @(negedge clk) s = 0;
  endtask

  // code one 8x8 block at pixel (bx,by) with motion (u,v) in half pixels
  task automatic code_block(input int bx, input int by, input bit intra, input int hu, input int hv);
    int pred [64], lv [64], rec [64];
    int iu = hu >>> 1, iv = hv >>> 1; bit hx = hu & 1, hy = hv & 1;
    if (!intra) begin
      // MC: 9x9 reference area at the integer part of the vector
      mc_xoff = 2'((bx + iu) & 3); mc_hx = hx; mc_hy = hy; mc_rc = 0;
      pulse(mc_start);
      dbus_sel = 1; rec_base = AW'(REF_BASE);
      dma_run(DMA_MC_REF, bx + iu, by + iv, 0, 0);
      while (mc_busy) @(negedge clk);
      if (hx || hy) ev_half++;
      ev_inter++;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
        int a = refp(bx + iu + x, by + iv + y), b = refp(bx + iu + x + 1, by + iv + y),
            c = refp(bx + iu + x, by + iv + y + 1), d = refp(bx + iu + x + 1, by + iv + y + 1);
        pred[8*y + x] = (!hx && !hy) ? a : (hx && !hy) ? (a + b + 1) / 2 : (!hx && hy) ? (a + c + 1) / 2 : (a + b + c + d + 2) / 4;
      end
    end else begin
      ev_intra++;
      for (int i = 0; i < 64; i++) pred[i] = 0;
    end
    tbe_intra = intra;
    pulse(tbe_start);
    dbus_sel = 2;
    dma_run(DMA_SRC, bx, by, 0, 0);
    rec_base = AW'(NEW_BASE);
    dma_run(DMA_REC_WR, bx, by, 0, 0);
    while (tbe_busy) @(negedge clk);
    rec_base = AW'(REF_BASE);
    // levels over the SHARE bus
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) sh_en = 1; sh_we = 0; sh_addr = 9'(64 + i);
      @(negedge clk) sh_en = 0; #1 lv[i] = int'(signed'(sh_rdata));
    end
    // decode here: dequantise, exact IDCT, add prediction
    for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++) begin
      real s = 0.0; int r, got;
      for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
        int l = lv[8*v + u], f;
        if (intra && u == 0 && v == 0) f = l * 8;   // dc_scaler 8 for qp 4
        else f = (l == 0) ? 0 : (l > 0 ? 1 : -1) * (QP * (2 * iabs(l) + 1) - ((QP % 2 == 0) ? 1 : 0));
        s += a_(u) * a_(v) * f * $cos((2*x + 1) * u * 3.14159265358979 / 16) * $cos((2*y + 1) * v * 3.14159265358979 / 16);
      end
      s = s / 4.0 + pred[8*y + x];
      r = clampi($rtoi(s >= 0 ? s + 0.5 : s - 0.5), 0, 255);
      got = mem[NEW_BASE + 16 * ((by + y) / 8 * (W / 8) + (bx + x) / 8) + 2 * ((by + y) % 8) + ((bx + x) % 8) / 4][8 * ((bx + x) % 4) +: 8];
      check(iabs(got - r) <= 1, $sformatf("block (%0d,%0d) reconstruction (%0d,%0d): %0d decoded %0d", bx, by, x, y, got, r));
      check(iabs(got - int'(srcf[bx + x][by + y])) <= 24, "reconstruction close to source");
    end
    // levels into the bitstream
    for (int i = 0; i < 64; i++) begin
      @(negedge clk) bts_valid = 1; bts_code = 24'(lv[i] & 12'hFFF); bts_len = 5'd12;
      for (int b = 11; b >= 0; b--) expbits.push_back(bts_code[b]);
    end
    @(negedge clk) bts_valid = 0;
    if (intra) begin
      int fa = $urandom_range(0, 2047), fb = $urandom_range(0, 2047), fc = $urandom_range(0, 2047), fp, pd; bit up;
      // neighbours are set before the engine finishes; re-run the evaluation with them
      acdc_f_a = 12'(fa); acdc_f_b = 12'(fb); acdc_f_c = 12'(fc);
      for (int i = 0; i < 7; i++) begin acdc_ac_a[i] = 12'($urandom_range(0, 20) - 10); acdc_ac_c[i] = 12'($urandom_range(0, 20) - 10); end
      pulse(tbe_start); dbus_sel = 2;            // same block again, now with neighbours in place
      dma_run(DMA_SRC, bx, by, 0, 0);
      rec_base = AW'(NEW_BASE);
      dma_run(DMA_REC_WR, bx, by, 0, 0);
      rec_base = AW'(REF_BASE);
      while (!acdc_valid) @(negedge clk);
      ev_acdc++;
      up = iabs(fa - fb) < iabs(fb - fc);
      fp = up ? fc : fa;
      pd = (fp + 4) / 8;
      check(acdc_from_above == up, "AC/DC direction");
      check(int'(acdc_dc_diff) == lv[0] - pd, $sformatf("DC difference %0d exp %0d", acdc_dc_diff, lv[0] - pd));
      for (int i = 0; i < 7; i++)
        check(int'(acdc_ac_res[i]) == (up ? lv[i + 1] - int'(acdc_ac_c[i]) : lv[8 * (i + 1)] - int'(acdc_ac_a[i])), "AC residual");
    end
  endtask

  task automatic code_mb(input int mx, input int my, input me_mode_t md, input int pu, input int pv);
    int best;
    me_mode = md; me_mb_x = 5'(mx); me_pred_u = mv_t'(pu); me_pred_v = mv_t'(pv); me_lambda = 1;
    pulse(me_start);
    dbus_sel = 0; rec_base = AW'(REF_BASE);
    dma_run(DMA_SW, 16*mx - 16, 16*my - 16, (mx == 0) ? 0 : 2, 0);
    if (mx == 0) ev_full++; else ev_reuse++;
    if (16*mx - 16 < 0 || 16*my - 16 < 0) ev_pad++;
    dma_run(DMA_SRC, 16*mx, 16*my, 0, 1);
    while (!me_done) @(negedge clk);
    $display("MB (%0d,%0d) %s: mv (%0d,%0d) sad %0d, %0d candidates, %0d terminated, %0d moves",
             mx, my, md.name(), me_mv16_u, me_mv16_v, me_sad16, me_n_cands, me_n_terms, me_n_moves);
    ev_term += me_n_terms; ev_move += me_n_moves;
    if (md == MODE_FFS) begin
      best = 1 << 30;
      for (int u = -16; u < 16; u++) for (int v = -16; v < 16; v++) begin
        int c = cost(mx, my, 0, u, v, pu, pv, 1); if (c < best) best = c;
      end
      check(cost(mx, my, 0, me_mv16_u, me_mv16_v, pu, pv, 1) == best, "FFS 16x16 minimum over the padded window");
    end
    check(int'(me_mv16_u) == 3 && int'(me_mv16_v) == -2, "true motion found");
    check(me_hsad16 <= me_sad16, "half-pixel refinement never worse");
    check(iabs(int'(me_hmv16_u) - 2 * int'(me_mv16_u)) <= 1 && iabs(int'(me_hmv16_v) - 2 * int'(me_mv16_v)) <= 1,
          "refined vector next to the integer vector");
    for (int k = 1; k <= 4; k++) begin
      best = 1 << 30;
      for (int u = me_mv16_u - 2; u <= me_mv16_u + 2; u++) for (int v = me_mv16_v - 2; v <= me_mv16_v + 2; v++) begin
        int c = cost(mx, my, k, u, v, pu, pv, 1); if (c < best) best = c;
      end
      check(cost(mx, my, k, me_mv8_u[k-1], me_mv8_v[k-1], pu, pv, 1) == best, "8x8 minimum");
    end
    for (int k = 0; k < 4; k++)
      // refined half-pixel vectors; the last block is forced to a half position
      code_block(16*mx + 8*(k % 2), 16*my + 8*(k / 2), 0, int'(me_hmv8_u[k]) | (k == 3 ? 1 : 0), int'(me_hmv8_v[k]) | (k == 3 ? 1 : 0));
  endtask

  initial begin
    #(10 * 2000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 7; i++) begin acdc_ac_a[i] = 0; acdc_ac_c[i] = 0; end
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++)
      reff[x][y] = 8'(clampi($rtoi(128.0 + 50.0 * $sin(x / 6.0) + 45.0 * $cos(y / 5.0) + 20.0 * $sin((x + y) / 3.0)) + $urandom_range(0, 6) - 3, 0, 255));
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++)
      srcf[x][y] = 8'(clampi(refp(x + 3, y - 2) + $urandom_range(0, 4) - 2, 0, 255));
    for (int y = 0; y < H; y++) for (int wx = 0; wx < W / 4; wx++) begin
      word_t ws, wr;
      for (int j = 0; j < 4; j++) begin ws[8*j +: 8] = srcf[4*wx + j][y]; wr[8*j +: 8] = reff[4*wx + j][y]; end
      mem[SRC_BASE + y * (W / 4) + wx] = ws;
      mem[REF_BASE + 16 * ((y / 8) * (W / 8) + wx / 2) + 2 * (y % 8) + wx % 2] = wr;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    code_mb(0, 1, MODE_FFS, 0, 0);
    code_mb(1, 1, MODE_PDS, 0, 0);
    code_block(48, 16, 1, 0, 0);
    @(negedge clk) bts_flush = 1; @(negedge clk) bts_flush = 0;
    begin int st = 8 - (expbits.size() % 8); expbits.push_back(0); for (int b = 1; b < st; b++) expbits.push_back(1); end
    while (!bts_ready) @(negedge clk);
    repeat (2) @(negedge clk);
    ev_flush++;
    check(gotbits.size() == expbits.size(), $sformatf("bitstream length %0d exp %0d", gotbits.size(), expbits.size()));
    for (int i = 0; i < expbits.size() && i < gotbits.size(); i++)
      if (gotbits[i] != expbits[i]) begin check(0, $sformatf("bitstream bit %0d", i)); break; end
    $display("events: full %0d reuse %0d pad %0d term %0d move %0d half %0d inter %0d intra %0d acdc %0d gnt_stall %0d flush %0d",
             ev_full, ev_reuse, ev_pad, ev_term, ev_move, ev_half, ev_inter, ev_intra, ev_acdc, ev_gnt_stall, ev_flush);
    check(ev_full > 0, "full window load"); check(ev_reuse > 0, "window reuse");
    check(ev_pad > 0, "border padding"); check(ev_term > 0, "halfway termination");
    check(ev_move > 0, "diamond move"); check(ev_half > 0, "half-pixel compensation");
    check(ev_inter > 0, "inter block"); check(ev_intra > 0, "intra block");
    check(ev_acdc > 0, "AC/DC prediction"); check(ev_gnt_stall > 0, "memory stall");
    check(ev_flush > 0, "bitstream flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
