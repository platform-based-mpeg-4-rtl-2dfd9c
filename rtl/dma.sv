// dma: direct memory access unit between the external memory interface and
// the on-chip DATA bus. A command from the RISC names one of the four access
// types of the memory access scheme and the pixel position of the area; the
// DMA then generates the whole address sequence itself:
//  - DMA_SW: a 48x48 search window (three 16-pixel strips, or only the new
//    right-hand strip when the window is reused), strip by strip, rows top to
//    bottom, four words per strip row, from the block-based reconstructed
//    frame;
//  - DMA_MC_REF: the 9x9 reference area of half-pixel compensation as three
//    word columns of nine rows, read column by column (vertical direction);
//  - DMA_SRC: a 16x16 macroblock or an 8x8 block, row by row, from the
//    frame-based source frame;
//  - DMA_REC_WR: an 8x8 reconstructed block of 16 words taken from the DATA
//    bus and written as one burst into the block-based region.
// It converts 2-D pixel positions to 1-D word addresses: frame-based
// src_base + y*W/4 + x/4, block-based rec_base + 16*((y/8)*(W/8) + x/8) +
// 2*(y mod 8) + (x mod 8)/4. Positions outside the frame are padded from the
// boundary: rows are clamped, and a word left or right of the frame is
// replaced by four copies of the nearest boundary pixel.
// Memory port: request/grant, reads answered in order by rd_valid any number
// of cycles later; up to four reads are outstanding, and read data wait in a
// four-word buffer for the DATA bus (out_valid/out_ready).
// The access types, the address conversion, the padding and the 9x9 column
// reading follow the document; the block order inside the block-based region
// (blocks in raster order over the frame), the word order and the port
// protocols are this design's choices.
module dma
  import enc_pkg::*;
#(
  parameter int unsigned W = FRAME_W,
  parameter int unsigned H = FRAME_H
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration and command (RISC bus)
  input  logic [AW-1:0] src_base,
  input  logic [AW-1:0] rec_base,
  input  logic        cmd_valid,
  input  dma_cmd_t    cmd,
  output logic        cmd_ready,
  output logic        busy,
  // external memory interface
  output logic        mem_req,
  output logic        mem_we,
  output logic [AW-1:0] mem_addr,
  output word_t       mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata,
  // DATA bus: read data out, write data in
  output logic        out_valid,
  output word_t       out_data,
  input  logic        out_ready,
  input  logic        in_valid,
  input  word_t       in_data,
  output logic        in_ready
);
  localparam int unsigned WW = W / 4;   // words per frame row
  typedef enum logic [1:0] {PAD_NONE, PAD_LEFT, PAD_RIGHT} pad_t;

  dma_cmd_t   c;
  logic       active;
  logic [1:0] i_s;         // strip (SW) or word column (MC_REF) or word (SRC)
  logic [5:0] i_r;         // row
  logic [1:0] i_w;         // word inside a strip row (SW)
  logic [3:0] i_n;         // word counter (REC_WR)
  logic       last_item;

  // ---- current pixel position ----
  logic signed [11:0] px, py;
  always_comb begin
    px = 12'(c.x); py = 12'(c.y) + 12'(i_r);
    unique case (c.kind)
      DMA_SW:     px = 12'(c.x) + 12'(16 * i_s) + 12'(4 * i_w);
      DMA_MC_REF: px = 12'(4 * (c.x >>> 2)) + 12'(4 * i_s);
      DMA_SRC:    px = 12'(c.x) + 12'(4 * i_s);
      DMA_REC_WR: begin px = 12'(c.x) + 12'(4 * i_n[0]); py = 12'(c.y) + 12'(i_n[3:1]); end
    endcase
  end

  // ---- 2-D to 1-D with boundary padding ----
  logic signed [11:0] wc, yc;
  pad_t  pad;
  logic [AW-1:0] addr;
  always_comb begin
    wc = px >>> 2; yc = py; pad = PAD_NONE;
    if (wc < 0) begin wc = 0; pad = PAD_LEFT; end
    else if (wc > 12'(WW - 1)) begin wc = 12'(WW - 1); pad = PAD_RIGHT; end
    if (yc < 0) yc = 0;
    else if (yc > 12'(H - 1)) yc = 12'(H - 1);
    if (c.kind == DMA_SRC)
      addr = src_base + AW'(yc) * AW'(WW) + AW'(wc);
    else
      addr = rec_base + AW'(((yc >>> 3) * 12'(W / 8) + (wc >>> 1))) * AW'(16) + AW'(yc[2:0]) * AW'(2) + AW'(wc[0]);
  end

  // ---- sequencing ----
  always_comb begin
    unique case (c.kind)
      DMA_SW:     last_item = (i_s == 2'd2) && (i_r == 6'd47) && (i_w == 2'd3);
      DMA_MC_REF: last_item = (i_s == 2'd2) && (i_r == 6'd8);
      DMA_SRC:    last_item = c.mb16 ? (i_s == 2'd3 && i_r == 6'd15) : (i_s == 2'd1 && i_r == 6'd7);
      DMA_REC_WR: last_item = (i_n == 4'd15);
    endcase
  end

  // ---- read return path: pad info FIFO and data buffer ----
  logic [2:0]  outstanding;   // reads issued, data not yet taken from the buffer
  pad_t        padq [4];
  logic [1:0]  pq_wp, pq_rp;
  word_t       dbuf [4];
  logic [1:0]  db_wp, db_rp;
  logic [2:0]  db_cnt;
  logic        is_read, issue, out_fire;
  word_t       padded;

  assign is_read   = (c.kind != DMA_REC_WR);
  assign mem_req   = active && (is_read ? (outstanding < 3'd4) : in_valid);
  assign mem_we    = !is_read;
  assign mem_addr  = addr;
  assign mem_wdata = in_data;
  assign in_ready  = active && !is_read && mem_gnt;
  assign issue     = mem_req && mem_gnt;
  assign cmd_ready = !active;
  assign busy      = active || (outstanding != 3'd0);
  assign out_valid = (db_cnt != 3'd0);
  assign out_data  = dbuf[db_rp];
  assign out_fire  = out_valid && out_ready;

  always_comb begin
    padded = mem_rdata;
    unique case (padq[pq_rp])
      PAD_LEFT:  padded = {4{mem_rdata[7:0]}};
      PAD_RIGHT: padded = {4{mem_rdata[31:24]}};
      default:   padded = mem_rdata;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c <= '0; active <= 1'b0; i_s <= '0; i_r <= '0; i_w <= '0; i_n <= '0;
      outstanding <= '0; pq_wp <= '0; pq_rp <= '0; db_wp <= '0; db_rp <= '0; db_cnt <= '0;
    end else begin
      if (cmd_valid && cmd_ready) begin
        c      <= cmd;
        active <= 1'b1;
        i_s    <= (cmd.kind == DMA_SW) ? cmd.first_strip : 2'd0;
        i_r    <= '0; i_w <= '0; i_n <= '0;
      end else if (issue) begin
        if (last_item) active <= 1'b0;
        unique case (c.kind)
          DMA_SW: begin
            i_w <= i_w + 2'd1;
            if (i_w == 2'd3) begin
              i_r <= i_r + 6'd1;
              if (i_r == 6'd47) begin i_r <= '0; i_s <= i_s + 2'd1; end
            end
          end
          DMA_MC_REF: begin
            i_r <= i_r + 6'd1;
            if (i_r == 6'd8) begin i_r <= '0; i_s <= i_s + 2'd1; end
          end
          DMA_SRC: begin
            i_s <= i_s + 2'd1;
            if (i_s == (c.mb16 ? 2'd3 : 2'd1)) begin i_s <= '0; i_r <= i_r + 6'd1; end
          end
          DMA_REC_WR: i_n <= i_n + 4'd1;
        endcase
      end
      // pad info travels with each outstanding read
      if (issue && is_read) begin
        padq[pq_wp] <= pad;
        pq_wp <= pq_wp + 2'd1;
      end
      if (mem_rvalid) begin
        dbuf[db_wp] <= padded;
        db_wp <= db_wp + 2'd1;
        pq_rp <= pq_rp + 2'd1;
      end
      if (out_fire) db_rp <= db_rp + 2'd1;
      db_cnt      <= db_cnt + 3'(mem_rvalid) - 3'(out_fire);
      outstanding <= outstanding + 3'(issue && is_read) - 3'(out_fire);
    end
  end

  a_no_buffer_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(mem_rvalid && db_cnt == 3'd4 && !out_fire));
endmodule
