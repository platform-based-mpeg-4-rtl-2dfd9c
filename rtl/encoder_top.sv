// encoder_top: the platform of the MPEG-4 simple-profile video encoder.
// Hardware accelerators sit between three on-chip channels:
//  - the RISC bus, on which the controlling processor starts each unit and
//    reads back its side information (motion vectors, SADs, sums, AC/DC
//    prediction results). The processor itself is outside this RTL, so every
//    RISC-bus signal is a port of this module;
//  - the DATA bus, on which the DMA delivers source, search-window and
//    reference data read from the external memory to the motion estimator,
//    the motion compensator or the texture block engine (chosen by
//    `dbus_sel`), and takes the reconstructed blocks of the texture engine
//    back to the external memory;
//  - the share memory, a two-port RAM carrying compensated blocks from the
//    motion compensator to the texture engine (port A written by MC, port B
//    used by the engine) and quantised levels from the engine to the
//    bitstream side, reachable from outside through the SHARE bus (port A
//    when MC is not writing), also for test.
// The bitstream generator's packer takes the variable-length codes chosen by
// the processor and delivers 32-bit words on the BITSTREAM bus. AC/DC
// prediction is evaluated when the texture engine finishes a block, with the
// neighbouring blocks' values supplied over the RISC bus.
// The unit set and the bus structure follow the document's system
// architecture; the per-unit command ports stand for RISC-bus registers, and
// the DATA-bus routing by `dbus_sel` and the share-memory regions (MC block
// at `mc_base`, chosen per command) are this design's choices.
// Timing: every unit is started by a one-cycle pulse and reports `busy`/`done`;
// the DATA bus moves one 4-pixel word per cycle with valid/ready. The
// processor must keep `dbus_sel` and `rec_base` steady during a DMA command.
// The reset is asynchronous in all units; the assertion below also uses it as
// its disable condition, which lint reports as a mixed synchronous and
// asynchronous use of the reset. That use is only in the assertion.
module encoder_top
  import enc_pkg::*;
  import me_pkg::*;
#(
  parameter int unsigned W      = FRAME_W,
  parameter int unsigned H      = FRAME_H,
  parameter int unsigned SM_DEPTH = 512,
  localparam int unsigned SM_AW = $clog2(SM_DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  // ---- RISC bus: DATA-bus routing ----
  input  logic [1:0]  dbus_sel,      // 0: motion estimator, 1: motion compensator, 2: texture engine
  // ---- RISC bus: DMA ----
  input  logic [AW-1:0] src_base,
  input  logic [AW-1:0] rec_base,
  input  logic        dma_cmd_valid,
  input  dma_cmd_t    dma_cmd,
  output logic        dma_cmd_ready,
  output logic        dma_busy,
  // ---- RISC bus: motion estimator ----
  input  logic        me_start,
  input  me_mode_t    me_mode,
  input  logic [4:0]  me_mb_x,
  input  mv_t         me_pred_u,
  input  mv_t         me_pred_v,
  input  logic [3:0]  me_lambda,
  output logic        me_busy,
  output logic        me_done,
  output mv_t         me_mv16_u,
  output mv_t         me_mv16_v,
  output logic [15:0] me_sad16,
  output mv_t         me_mv8_u [4],
  output mv_t         me_mv8_v [4],
  output logic [15:0] me_sad8 [4],
  output hmv_t        me_hmv16_u,
  output hmv_t        me_hmv16_v,
  output logic [15:0] me_hsad16,
  output hmv_t        me_hmv8_u [4],
  output hmv_t        me_hmv8_v [4],
  output logic [15:0] me_hsad8 [4],
  output logic [15:0] me_mb_sum,
  output logic [11:0] me_n_cands,
  output logic [11:0] me_n_terms,
  output logic [5:0]  me_n_moves,
  // ---- RISC bus: motion compensator ----
  input  logic        mc_start,
  input  logic [1:0]  mc_xoff,
  input  logic        mc_hx,
  input  logic        mc_hy,
  input  logic        mc_rc,
  input  logic [SM_AW-1:0] mc_base,
  output logic        mc_busy,
  // ---- RISC bus: texture block engine ----
  input  logic        tbe_start,
  input  logic        tbe_intra,
  input  logic        tbe_luma,
  input  logic [4:0]  tbe_qp,
  input  logic [SM_AW-1:0] tbe_pred_base,
  input  logic [SM_AW-1:0] tbe_lvl_base,
  output logic        tbe_busy,
  output logic        tbe_done,
  // ---- RISC bus: AC/DC prediction neighbours and results ----
  input  logic        acdc_avail_a,
  input  logic        acdc_avail_b,
  input  logic        acdc_avail_c,
  input  logic [11:0] acdc_f_a,
  input  logic [11:0] acdc_f_b,
  input  logic [11:0] acdc_f_c,
  input  logic signed [11:0] acdc_ac_a [7],
  input  logic signed [11:0] acdc_ac_c [7],
  output logic        acdc_valid,
  output logic        acdc_from_above,
  output logic signed [8:0]  acdc_dc_diff,
  output logic signed [12:0] acdc_ac_res [7],
  output logic [14:0] acdc_s_orig,
  output logic [14:0] acdc_s_res,
  output logic [11:0] tbe_rec_dc,
  output logic signed [11:0] tbe_row_x [7],
  output logic signed [11:0] tbe_col_x [7],
  // ---- RISC bus: bitstream generator ----
  input  logic        bts_valid,
  input  logic [23:0] bts_code,
  input  logic [4:0]  bts_len,
  input  logic        bts_flush,
  output logic        bts_ready,
  output logic [31:0] bts_bit_count,
  // ---- BITSTREAM bus ----
  output logic        bs_valid,
  output logic [31:0] bs_word,
  output logic [2:0]  bs_bytes,
  // ---- SHARE bus ----
  input  logic        sh_en,
  input  logic        sh_we,
  input  logic [SM_AW-1:0] sh_addr,
  input  word_t       sh_wdata,
  output word_t       sh_rdata,
  // ---- external memory (DATA) ----
  output logic        mem_req,
  output logic        mem_we,
  output logic [AW-1:0] mem_addr,
  output word_t       mem_wdata,
  input  logic        mem_gnt,
  input  logic        mem_rvalid,
  input  word_t       mem_rdata
);
  // ---------------- DATA bus ----------------
  logic  d_out_valid, d_out_ready, d_in_valid, d_in_ready;
  word_t d_out_data, d_in_data;
  logic  me_ld_ready, mc_in_ready, tbe_in_ready, tbe_out_valid;
  word_t tbe_out_data;

  dma #(.W(W), .H(H)) u_dma (
    .clk, .rst_n, .src_base, .rec_base, .cmd_valid(dma_cmd_valid), .cmd(dma_cmd), .cmd_ready(dma_cmd_ready),
    .busy(dma_busy), .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_gnt, .mem_rvalid, .mem_rdata,
    .out_valid(d_out_valid), .out_data(d_out_data), .out_ready(d_out_ready),
    .in_valid(d_in_valid), .in_data(d_in_data), .in_ready(d_in_ready));

  always_comb begin
    unique case (dbus_sel)
      2'd0:    d_out_ready = me_ld_ready;
      2'd1:    d_out_ready = mc_in_ready;
      2'd2:    d_out_ready = tbe_in_ready;
      default: d_out_ready = 1'b0;
    endcase
  end
  assign d_in_valid = tbe_out_valid;
  assign d_in_data  = tbe_out_data;

  // ---------------- motion estimator ----------------
  motion_estimator u_me (
    .clk, .rst_n, .start(me_start), .mode(me_mode), .mb_x(me_mb_x), .pred_u(me_pred_u), .pred_v(me_pred_v),
    .lambda(me_lambda), .ld_valid(d_out_valid && dbus_sel == 2'd0), .ld_data(d_out_data), .ld_ready(me_ld_ready),
    .busy(me_busy), .done(me_done), .mv16_u(me_mv16_u), .mv16_v(me_mv16_v), .sad16(me_sad16),
    .mv8_u(me_mv8_u), .mv8_v(me_mv8_v), .sad8(me_sad8),
    .hmv16_u(me_hmv16_u), .hmv16_v(me_hmv16_v), .hsad16(me_hsad16), .hmv8_u(me_hmv8_u), .hmv8_v(me_hmv8_v),
    .hsad8(me_hsad8), .mb_sum(me_mb_sum),
    .n_cands(me_n_cands), .n_terms(me_n_terms), .n_moves(me_n_moves));

  // ---------------- motion compensator ----------------
  logic       mc_out_valid;
  logic [3:0] mc_out_idx;
  word_t      mc_out_data;
  mc u_mc (
    .clk, .rst_n, .start(mc_start), .xoff(mc_xoff), .hx(mc_hx), .hy(mc_hy), .rc(mc_rc),
    .in_valid(d_out_valid && dbus_sel == 2'd1), .in_data(d_out_data), .in_ready(mc_in_ready),
    .out_valid(mc_out_valid), .out_idx(mc_out_idx), .out_data(mc_out_data), .busy(mc_busy));

  // ---------------- share memory ----------------
  logic             b_en, b_we;
  logic [SM_AW-1:0] b_addr;
  word_t            b_wdata, a_rdata, b_rdata;
  share_mem #(.DEPTH(SM_DEPTH), .DW(32)) u_sm (
    .clk,
    .a_en(mc_out_valid || sh_en), .a_we(mc_out_valid || sh_we),
    .a_addr(mc_out_valid ? mc_base + SM_AW'(mc_out_idx) : sh_addr),
    .a_wdata(mc_out_valid ? mc_out_data : sh_wdata), .a_rdata,
    .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  assign sh_rdata = a_rdata;

  // ---------------- texture block engine ----------------
  logic [7:0]  qf_dc;
  logic [5:0]  dc_scaler;
  tbe #(.SM_AW(SM_AW)) u_tbe (
    .clk, .rst_n, .start(tbe_start), .intra(tbe_intra), .luma(tbe_luma), .qp(tbe_qp),
    .pred_base(tbe_pred_base), .lvl_base(tbe_lvl_base), .busy(tbe_busy), .done(tbe_done),
    .sm_en(b_en), .sm_we(b_we), .sm_addr(b_addr), .sm_wdata(b_wdata), .sm_rdata(b_rdata),
    .in_valid(d_out_valid && dbus_sel == 2'd2), .in_data(d_out_data), .in_ready(tbe_in_ready),
    .out_valid(tbe_out_valid), .out_data(tbe_out_data), .out_ready(d_in_ready),
    .qf_dc, .row_x(tbe_row_x), .col_x(tbe_col_x), .dc_scaler, .rec_dc(tbe_rec_dc));

  tbe_acdc u_acdc (
    .clk, .rst_n, .in_valid(tbe_done), .dc_scaler,
    .avail_a(acdc_avail_a), .avail_b(acdc_avail_b), .avail_c(acdc_avail_c),
    .f_a(acdc_f_a), .f_b(acdc_f_b), .f_c(acdc_f_c), .ac_a(acdc_ac_a), .ac_c(acdc_ac_c),
    .qf_dc, .row_x(tbe_row_x), .col_x(tbe_col_x),
    .out_valid(acdc_valid), .from_above(acdc_from_above), .dc_diff(acdc_dc_diff),
    .ac_res(acdc_ac_res), .s_orig(acdc_s_orig), .s_res(acdc_s_res));

  // ---------------- bitstream generator ----------------
  bts_packer u_bts (
    .clk, .rst_n, .in_valid(bts_valid), .code(bts_code), .len(bts_len), .flush(bts_flush),
    .out_valid(bs_valid), .out_word(bs_word), .out_bytes(bs_bytes), .bit_count(bts_bit_count),
    .ready(bts_ready));

  a_mc_share_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(mc_out_valid && sh_en));
endmodule
