// Workload testbench: motion estimation of one whole CIF macroblock row
// (22 macroblocks, row 5) through encoder_top at its default size, in PDS
// mode, as the real-time configuration runs it. The reference frame is a
// smooth random texture; the source frame moves it by a motion that changes
// every few macroblocks, plus noise. For each macroblock the processor's
// part is played here: start the estimator with the left neighbour's vector
// as predictor, load the search window (three strips for the first
// macroblock, one new strip after that) and the macroblock through the DMA,
// wait for the result. The memory answers every request at once, with read
// data two cycles later. Checked: each integer vector equals the true motion,
// each refined vector lies next to it, and the cycles from start to result,
// window and macroblock loading included, stay within 3367 on average, the
// budget of 396 macroblocks x 30 frames/s at 40 MHz. The right-border
// padding of the last macroblock, full and reused window loads are counted
// and must occur.
module tb_cif_row;
  import enc_pkg::*;
  import me_pkg::*;
  localparam int W = FRAME_W, H = FRAME_H, MBY = 5;
  localparam int SRC_BASE = 0, REF_BASE = 32768;

  logic clk = 0, rst_n = 0;
  logic [1:0] dbus_sel = 0;
  logic [AW-1:0] src_base = AW'(SRC_BASE), rec_base = AW'(REF_BASE);
  logic dma_cmd_valid = 0, dma_cmd_ready, dma_busy; dma_cmd_t dma_cmd;
  logic me_start = 0, me_busy, me_done; me_mode_t me_mode = MODE_PDS; logic [4:0] me_mb_x = 0;
  mv_t me_pred_u = 0, me_pred_v = 0, me_mv16_u, me_mv16_v; logic [3:0] me_lambda = 1;
  logic [15:0] me_sad16, me_mb_sum; mv_t me_mv8_u [4], me_mv8_v [4]; logic [15:0] me_sad8 [4];
  hmv_t me_hmv16_u, me_hmv16_v, me_hmv8_u [4], me_hmv8_v [4]; logic [15:0] me_hsad16, me_hsad8 [4];
  logic [11:0] me_n_cands, me_n_terms; logic [5:0] me_n_moves;
  logic mc_start = 0, mc_hx = 0, mc_hy = 0, mc_rc = 0, mc_busy; logic [1:0] mc_xoff = 0; logic [8:0] mc_base = 0;
  logic tbe_start = 0, tbe_intra = 0, tbe_luma = 1, tbe_busy, tbe_done; logic [4:0] tbe_qp = 5'd4;
  logic [8:0] tbe_pred_base = 0, tbe_lvl_base = 9'd64;
  logic acdc_avail_a = 0, acdc_avail_b = 0, acdc_avail_c = 0; logic [11:0] acdc_f_a = 0, acdc_f_b = 0, acdc_f_c = 0;
  logic signed [11:0] acdc_ac_a [7], acdc_ac_c [7];
  logic acdc_valid, acdc_from_above; logic signed [8:0] acdc_dc_diff; logic signed [12:0] acdc_ac_res [7];
  logic [14:0] acdc_s_orig, acdc_s_res; logic [11:0] tbe_rec_dc; logic signed [11:0] tbe_row_x [7], tbe_col_x [7];
  logic bts_valid = 0, bts_flush = 0, bts_ready; logic [23:0] bts_code = 0; logic [4:0] bts_len = 0; logic [31:0] bts_bit_count;
  logic bs_valid; logic [31:0] bs_word; logic [2:0] bs_bytes;
  logic sh_en = 0, sh_we = 0; logic [8:0] sh_addr = 0; word_t sh_wdata = 0, sh_rdata;
  logic mem_req, mem_we, mem_gnt = 1, mem_rvalid; logic [AW-1:0] mem_addr; word_t mem_wdata, mem_rdata;

  word_t mem [1 << AW];
  word_t p1, p2; logic v1 = 0, v2 = 0;
  logic [7:0] reff [W][H];
  int checks = 0, failures = 0, cyc = 0, ev_full = 0, ev_reuse = 0, ev_rpad = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  encoder_top dut (.*);

  // memory: always granted, read data two cycles later
  always @(posedge clk) begin
    v2 <= v1; p2 <= p1;
    v1 <= mem_req && !mem_we; p1 <= mem[mem_addr];
    if (mem_req && mem_we) mem[mem_addr] <= mem_wdata;
  end
  assign mem_rvalid = v2;
  assign mem_rdata  = p2;

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask
  function automatic int clampi(int v, int lo, int hi); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction

  task automatic dma_run(input dma_kind_t k, input int x, input int y, input int fs, input bit mb16);
    dma_cmd = '{kind: k, x: 11'(x), y: 11'(y), first_strip: 2'(fs), mb16: mb16};
    @(negedge clk) dma_cmd_valid = 1;
    while (!dma_cmd_ready) @(negedge clk);
    @(negedge clk) dma_cmd_valid = 0;
    while (dma_busy) @(negedge clk);
  endtask

  // true motion of macroblock column mx
  function automatic int mot_u(int mx); return (mx / 4) % 3 * 3 - 3; endfunction
  function automatic int mot_v(int mx); return 2 - (mx / 5) % 3 * 2; endfunction

  initial begin
    #(10 * 3000000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int total = 0, worst = 0, pu = 0, pv = 0;
    for (int i = 0; i < 7; i++) begin acdc_ac_a[i] = 0; acdc_ac_c[i] = 0; end
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++)
      reff[x][y] = 8'(clampi($rtoi(128.0 + 50.0 * $sin(x / 6.0) + 45.0 * $cos(y / 5.0) + 20.0 * $sin((x + y) / 3.0)) + $urandom_range(0, 6) - 3, 0, 255));
    for (int y = 0; y < H; y++) for (int wx = 0; wx < W / 4; wx++) begin
      word_t wr;
      for (int j = 0; j < 4; j++) wr[8*j +: 8] = reff[4*wx + j][y];
      mem[REF_BASE + 16 * ((y / 8) * (W / 8) + wx / 2) + 2 * (y % 8) + wx % 2] = wr;
    end
    // source rows of macroblock row MBY: each macroblock moved by its own motion
    for (int y = 16 * MBY; y < 16 * MBY + 16; y++) for (int wx = 0; wx < W / 4; wx++) begin
      word_t ws;
      for (int j = 0; j < 4; j++) begin
        int x, mx;
        x = 4 * wx + j; mx = x / 16;
        ws[8*j +: 8] = 8'(clampi(int'(reff[clampi(x + mot_u(mx), 0, W - 1)][clampi(y + mot_v(mx), 0, H - 1)]) + $urandom_range(0, 4) - 2, 0, 255));
      end
      mem[SRC_BASE + y * (W / 4) + wx] = ws;
    end
    repeat (3) @(negedge clk); rst_n = 1;
    for (int mx = 0; mx < W / 16; mx++) begin
      int t0;
      me_mode = MODE_PDS; me_mb_x = 5'(mx); me_pred_u = mv_t'(pu); me_pred_v = mv_t'(pv);
      @(negedge clk) me_start = 1; t0 = cyc; @(negedge clk) me_start = 0;
      dbus_sel = 0;
      dma_run(DMA_SW, 16 * mx - 16, 16 * MBY - 16, (mx == 0) ? 0 : 2, 0);
      if (mx == 0) ev_full++; else ev_reuse++;
      if (16 * mx + 32 >= W) ev_rpad++;
      dma_run(DMA_SRC, 16 * mx, 16 * MBY, 0, 1);
      while (!me_done) @(negedge clk);
      total += cyc - t0; if (cyc - t0 > worst) worst = cyc - t0;
      check(int'(me_mv16_u) == mot_u(mx) && int'(me_mv16_v) == mot_v(mx),
            $sformatf("MB %0d: vector (%0d,%0d), motion (%0d,%0d)", mx, me_mv16_u, me_mv16_v, mot_u(mx), mot_v(mx)));
      check(iabs(int'(me_hmv16_u) - 2 * mot_u(mx)) <= 1 && iabs(int'(me_hmv16_v) - 2 * mot_v(mx)) <= 1, "refined vector");
      pu = me_mv16_u; pv = me_mv16_v;
    end
    $display("row of %0d macroblocks: %0d cycles, average %0d, worst %0d (budget 3367)", W / 16, total, total / (W / 16), worst);
    check(total <= 3367 * (W / 16), $sformatf("average %0d cycles per macroblock", total / (W / 16)));
    check(worst <= 3367, $sformatf("worst macroblock %0d cycles", worst));
    check(ev_full == 1, "one full window load"); check(ev_reuse == W / 16 - 1, "window reuse");
    check(ev_rpad > 0, "right-border padding");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
