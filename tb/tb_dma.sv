// Testbench of dma: an external memory model holds a random source frame
// (frame-based) and a random reconstructed frame (block-based, 8x8 blocks of
// 16 words in raster order); it grants at random and answers reads in order
// after a random delay. Every access type is checked word by word against the
// pixels taken directly from the frames, with coordinates outside the frame
// clamped to the border (padding): whole and reused search windows at the
// left, right and top borders, 9x9 reference areas across a border and inside
// the frame, 16x16 and 8x8 source reads, and an 8x8 reconstructed block
// burst written and read back from the memory model. The DATA bus side is
// stalled at random.
module tb_dma;
  import enc_pkg::*;
  localparam int W = FRAME_W, H = FRAME_H, SRC_BASE = 0, REC_BASE = 32768;
  logic clk = 0, rst_n = 0, cmd_valid = 0, cmd_ready, busy, mem_req, mem_we, mem_gnt, mem_rvalid = 0;
  logic out_valid, out_ready, in_valid = 0, in_ready;
  dma_cmd_t cmd; logic [AW-1:0] mem_addr; word_t mem_wdata, mem_rdata, out_data, in_data;
  logic [7:0] srcf [W][H], recf [W][H];
  word_t mem [1 << AW];
  word_t rq [$]; int rdelay [$];
  int checks = 0, failures = 0, npad = 0, nstall = 0;
  always #5 clk = ~clk;

  dma dut (.clk, .rst_n, .src_base(AW'(SRC_BASE)), .rec_base(AW'(REC_BASE)), .cmd_valid, .cmd, .cmd_ready, .busy,
           .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
           .out_valid, .out_data, .out_ready, .in_valid, .in_data, .in_ready);

  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask

  // memory model
  always @(negedge clk) mem_gnt = ($urandom_range(0, 3) != 0);
  always @(posedge clk) begin
    if (mem_req && mem_gnt) begin
      if (mem_we) mem[mem_addr] <= mem_wdata;
      else rq.push_back(mem[mem_addr]);
    end
  end
  always @(negedge clk) begin
    mem_rvalid = 0;
    if (rq.size() > 0 && $urandom_range(0, 2) != 0) begin
      mem_rvalid = 1; mem_rdata = rq.pop_front();
    end
  end

  function automatic int clampi(int v, int lo, int hi); return v < lo ? lo : (v > hi ? hi : v); endfunction
  function automatic word_t pix4(bit from_src, int x, int y);
    word_t w;
    for (int j = 0; j < 4; j++) begin
      int xx = clampi(x + j, 0, W - 1), yy = clampi(y, 0, H - 1);
      w[8*j +: 8] = from_src ? srcf[xx][yy] : recf[xx][yy];
      if (x + j != xx || y != yy) npad++;
    end
    return w;
  endfunction

  task automatic run_read(input dma_kind_t k, input int x, input int y, input int fs, input bit mb16);
    word_t exp [$];
    if (k == DMA_SW)
      for (int s = fs; s < 3; s++) for (int r = 0; r < 48; r++) for (int w = 0; w < 4; w++)
        exp.push_back(pix4(0, x + 16*s + 4*w, y + r));
    else if (k == DMA_MC_REF)
      for (int cc = 0; cc < 3; cc++) for (int r = 0; r < 9; r++)
        exp.push_back(pix4(0, 4*(x >>> 2) + 4*cc, y + r));
    else
      for (int r = 0; r < (mb16 ? 16 : 8); r++) for (int w = 0; w < (mb16 ? 4 : 2); w++)
        exp.push_back(pix4(1, x + 4*w, y + r));
    cmd = '{kind: k, x: 11'(x), y: 11'(y), first_strip: 2'(fs), mb16: mb16};
    @(negedge clk) cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk) cmd_valid = 0;
    for (int i = 0; i < exp.size(); i++) begin
      int t = 0;
      out_ready = ($urandom_range(0, 4) != 0);
      if (!out_ready) nstall++;
      #1;
      while (!(out_valid && out_ready) && t < 100) begin
        @(negedge clk); out_ready = ($urandom_range(0, 4) != 0); #1; t++;
      end
      check(out_valid && out_data == exp[i], $sformatf("kind %0d (%0d,%0d) word %0d: %h exp %h", k, x, y, i, out_data, exp[i]));
      @(negedge clk);
    end
    out_ready = 0;
    repeat (5) @(negedge clk);
    check(!busy && !out_valid, "idle after the command, no extra words");
  endtask

  task automatic run_write(input int x, input int y);
    word_t blk [16];
    for (int i = 0; i < 16; i++) blk[i] = $urandom;
    cmd = '{kind: DMA_REC_WR, x: 11'(x), y: 11'(y), first_strip: 2'd0, mb16: 1'b0};
    @(negedge clk) cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk) cmd_valid = 0;
    for (int i = 0; i < 16; i++) begin
      in_valid = 1; in_data = blk[i];
      #1; while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (3) @(negedge clk);
    // the block must sit in 16 consecutive words at its block-based address
    for (int i = 0; i < 16; i++) begin
      int a = REC_BASE + ((y / 8) * (W / 8) + x / 8) * 16 + i;
      check(mem[a] == blk[i], $sformatf("burst write word %0d", i));
      for (int j = 0; j < 4; j++) recf[x + 4*(i % 2) + j][y + i / 2] = blk[i][8*j +: 8];
    end
  endtask

  initial begin
    #(10 * 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    out_ready = 0;
    for (int x = 0; x < W; x++) for (int y = 0; y < H; y++) begin
      srcf[x][y] = 8'($urandom); recf[x][y] = 8'($urandom);
    end
    // build the memory image: frame-based source, block-based reconstruction
    for (int y = 0; y < H; y++) for (int wx = 0; wx < W / 4; wx++) begin
      word_t ws, wr;
      for (int j = 0; j < 4; j++) begin ws[8*j +: 8] = srcf[4*wx + j][y]; wr[8*j +: 8] = recf[4*wx + j][y]; end
      mem[SRC_BASE + y * (W / 4) + wx] = ws;
      mem[REC_BASE + 16 * ((y / 8) * (W / 8) + wx / 2) + 2 * (y % 8) + wx % 2] = wr;
    end
    repeat (2) @(negedge clk); rst_n = 1;
    run_read(DMA_SW, -16, -16, 0, 0);        // top-left macroblock, whole window
    run_read(DMA_SW, 16*21 - 16, 32, 2, 0);  // right border, reused window
    run_read(DMA_SW, 16*5 - 16, 16*17 - 16, 2, 0); // bottom row
    run_read(DMA_MC_REF, -3, 283, 0, 0);     // 9x9 across left and bottom borders
    run_read(DMA_MC_REF, 101, 50, 0, 0);     // 9x9 inside, crossing blocks
    run_read(DMA_SRC, 48, 32, 0, 1);
    run_read(DMA_SRC, 344, 280, 0, 0);
    run_write(8, 16);
    run_read(DMA_MC_REF, 6, 12, 0, 0);       // reads back the written block
    check(npad > 0, "padding happened");
    check(nstall > 0, "DATA bus stall happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
