// motion_estimator: hybrid motion estimator (pattern generation, candidate
// FIFO, distortion calculation) for 16x16 macroblocks and their four 8x8
// blocks, integer-pixel search range -16..+15.
//
// Operation for one macroblock, started by a `start` pulse:
//  1. Data loading: the search window is received on the load port, one
//     32-bit word (four pixels) per accepted beat. At the leftmost macroblock
//     of a row (mb_x = 0) all three 16-pixel strips are loaded (3x48x4 words);
//     otherwise only the new right-hand strip (48x4 words), the other two being
//     reused from the previous macroblock. Strips are sent top row first, four
//     words per row. Then the 16x16 current macroblock follows (16x4 words),
//     while its pixel sum is accumulated.
//  2. 16x16 search. FFS mode: spiral full search around (0,0) over the whole
//     range, with halfway termination (partial distortion elimination).
//     PDS mode: diamond search from the predictor (pred_u,pred_v): a large
//     diamond around the predictor, large-diamond steps while a neighbour is
//     better, then one small diamond around the best point.
//  3. Half-pixel refinement of the 16x16 vector: the eight half-pixel
//     neighbours, interpolated from the window (me_halfpel).
//  4. Local search of each 8x8 block: spiral over +-2 around the integer
//     16x16 vector, each followed by its own half-pixel refinement.
// Candidates flow from the spiral or diamond generator through the range
// checker into the FIFO; the distortion stage fetches them, reads eight
// pixel pairs per cycle, sums them in the adder tree and accumulates them with
// a rate bias lambda*(|u-pu|+|v-pv|) in the accumulator.
// Timing: a candidate costs 32 reads (16x16) or 8 reads (8x8) plus three
// cycles of pipeline and hand-over; terminated candidates cost less.
// The algorithm stages and the block structure follow the document; the word
// width and order of loading, the order of ring points, the bias formula and
// the control sequencing are this design's choices. The refinement unit
// shares the window and block read ports with the distortion stage, which is
// idle while it runs. Integer results (mv16, mv8) and refined results in
// half-pixel units (hmv16, hmv8) are both reported.
module motion_estimator
  import me_pkg::*;
#(
  parameter int unsigned FIFO_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // command from the RISC bus
  input  logic        start,
  input  me_mode_t    mode,
  input  logic [4:0]  mb_x,
  input  mv_t         pred_u,
  input  mv_t         pred_v,
  input  logic [3:0]  lambda,
  // data loading path (from the DATA bus)
  input  logic        ld_valid,
  input  logic [31:0] ld_data,
  output logic        ld_ready,
  // results (side information to the RISC)
  output logic        busy,
  output logic        done,
  output mv_t         mv16_u,
  output mv_t         mv16_v,
  output logic [15:0] sad16,
  output mv_t         mv8_u [4],
  output mv_t         mv8_v [4],
  output logic [15:0] sad8  [4],
  // half-pixel refined vectors (half-pixel units) and their SADs
  output hmv_t        hmv16_u,
  output hmv_t        hmv16_v,
  output logic [15:0] hsad16,
  output hmv_t        hmv8_u [4],
  output hmv_t        hmv8_v [4],
  output logic [15:0] hsad8  [4],
  output logic [15:0] mb_sum,
  // statistics of the last macroblock
  output logic [11:0] n_cands,
  output logic [11:0] n_terms,
  output logic [5:0]  n_moves
);
  typedef enum logic [3:0] {
    S_IDLE, S_LD_SW, S_LD_MB, S_GEN16, S_WAIT16, S_HP16, S_HPW16, S_GEN8, S_WAIT8, S_HP8, S_HPW8, S_DONE
  } ctl_state_t;

  ctl_state_t  st;
  me_mode_t    cmode;
  logic [1:0]  rot;
  logic [1:0]  ld_strip;   // logical strip being loaded
  logic [5:0]  ld_row;
  logic [1:0]  ld_word;
  logic [2:0]  blk;        // 8x8 block 1..4
  dp_phase_t   dphase;
  mv_t         cen_u, cen_v, pu, pv;
  logic [3:0]  lam;
  logic        phase_done;

  // ---------------- data loading path ----------------
  logic ld_fire;
  assign ld_ready = (st == S_LD_SW) || (st == S_LD_MB);
  assign ld_fire  = ld_valid && ld_ready;

  // ---------------- pattern generation ----------------
  logic  sp_start, dm_start;
  logic  sp_valid, dm_valid, sp_last, dm_last, sp_busy, dm_busy;
  cand_t sp_cand, dm_cand, pg_cand;
  logic  pg_valid, pg_last, pg_ready, rc_valid;
  logic  use_spiral;
  logic [2:0] dir;

  me_spiral_gen u_spiral (
    .clk, .rst_n, .start(sp_start),
    .center_u(cen_u), .center_v(cen_v),
    .rings((st == S_GEN8) ? 5'd2 : 5'(SR)), .id((st == S_GEN8) ? blk : 3'd0),
    .out_valid(sp_valid), .out_ready(pg_ready && use_spiral),
    .out_cand(sp_cand), .out_last(sp_last), .busy(sp_busy));

  me_diamond_gen u_diamond (
    .clk, .rst_n, .start(dm_start), .phase(dphase), .dir,
    .center_u(cen_u), .center_v(cen_v), .id(3'd0),
    .out_valid(dm_valid), .out_ready(pg_ready && !use_spiral),
    .out_cand(dm_cand), .out_last(dm_last), .busy(dm_busy));

  // MUX between the two generators
  assign pg_valid = use_spiral ? sp_valid : dm_valid;
  assign pg_last  = use_spiral ? sp_last  : dm_last;
  assign pg_cand  = use_spiral ? sp_cand  : dm_cand;

  me_range_check u_rc (.cand(pg_cand), .valid(rc_valid));

  // ---------------- candidate FIFO ----------------
  cand_ent_t fin, fout;
  logic      f_push, f_pop, f_full, f_empty;
  assign fin      = '{valid: rc_valid, last: pg_last, c: pg_cand};
  assign pg_ready = !f_full;
  assign f_push   = pg_valid && !f_full && (rc_valid || pg_last);

  me_fifo #(.T(cand_ent_t), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push(f_push), .din(fin), .pop(f_pop), .dout(fout),
    .full(f_full), .empty(f_empty));

  // ---------------- distortion calculation ----------------
  typedef enum logic {DC_IDLE, DC_RUN} dc_state_t;
  dc_state_t dst;
  logic      cur_last;
  logic      dc_start;
  logic      ag_rd, ag_last, ag_busy;
  logic [5:0] sw_x, sw_y;
  logic [3:0] mb_row;
  logic       mb_half;
  logic       term;
  logic [63:0] sw_q, mb_q;
  logic        rd_v1, rd_l1;
  logic        sad_v, sad_l;
  logic [10:0] sad;
  logic        acc_active, acc_done, acc_killed;
  logic [SADW-1:0] partial, min_cost, min_sad;
  mv_t         best_u, best_v;
  logic        acc_clear;

  assign f_pop    = (dst == DC_IDLE) && !f_empty;
  assign dc_start = f_pop && fout.valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dst <= DC_IDLE; cur_last <= 1'b0; phase_done <= 1'b0;
    end else begin
      phase_done <= 1'b0;
      unique case (dst)
        DC_IDLE: if (f_pop) begin
          if (fout.valid) begin
            dst      <= DC_RUN;
            cur_last <= fout.last;
          end else if (fout.last) phase_done <= 1'b1;
        end
        DC_RUN: if (acc_done) begin
          dst <= DC_IDLE;
          if (cur_last) phase_done <= 1'b1;
        end
      endcase
    end
  end

  me_ag u_ag (
    .clk, .rst_n, .start(dc_start), .cand(fout.c), .terminate(term),
    .rd_en(ag_rd), .rd_last(ag_last), .sw_x, .sw_y, .mb_row, .mb_half, .busy(ag_busy));

  // half-pixel refinement shares the window and block read ports
  logic        hp_start, hp_busy, hp_done, hp_rd, hp_mb_half;
  logic [5:0]  hp_sw_x, hp_sw_y;
  logic [3:0]  hp_mb_row;
  hmv_t        hp_u, hp_v;
  logic [SADW-1:0] hp_sad;
  logic        m_rd, m_mb_half;
  logic [5:0]  m_sw_x, m_sw_y;
  logic [3:0]  m_mb_row;
  assign m_rd      = hp_busy ? hp_rd      : ag_rd;
  assign m_sw_x    = hp_busy ? hp_sw_x    : sw_x;
  assign m_sw_y    = hp_busy ? hp_sw_y    : sw_y;
  assign m_mb_row  = hp_busy ? hp_mb_row  : mb_row;
  assign m_mb_half = hp_busy ? hp_mb_half : mb_half;

  me_halfpel u_hp (
    .clk, .rst_n, .start(hp_start), .id((st == S_HP16) ? 3'd0 : blk), .cu(best_u), .cv(best_v),
    .c_sad(min_sad), .pu, .pv, .lambda(lam),
    .rd_en(hp_rd), .sw_x(hp_sw_x), .sw_y(hp_sw_y), .mb_row(hp_mb_row), .mb_half(hp_mb_half),
    .sw_q, .mb_q, .busy(hp_busy), .done(hp_done), .best_u(hp_u), .best_v(hp_v), .best_sad(hp_sad));

  me_swmem u_swmem (
    .clk,
    .wr_en(ld_fire && st == S_LD_SW), .wr_strip(2'((ld_strip + rot) % 3)),
    .wr_row(ld_row), .wr_word(ld_word), .wr_data(ld_data),
    .rd_en(m_rd), .rd_x(m_sw_x), .rd_y(m_sw_y), .rot, .rd_data(sw_q));

  me_mbram u_mbram (
    .clk, .rst_n, .clear_sum(start && st == S_IDLE),
    .wr_en(ld_fire && st == S_LD_MB), .wr_row(ld_row[3:0]), .wr_word(ld_word), .wr_data(ld_data),
    .rd_en(m_rd), .rd_row(m_mb_row), .rd_half(m_mb_half), .rd_data(mb_q), .mb_sum);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_v1 <= 1'b0; rd_l1 <= 1'b0;
    end else begin
      rd_v1 <= ag_rd && !hp_busy; rd_l1 <= ag_rd && ag_last && !hp_busy;
    end
  end

  me_sad_tree u_tree (
    .clk, .rst_n, .in_valid(rd_v1), .in_last(rd_l1), .a(mb_q), .b(sw_q),
    .out_valid(sad_v), .out_last(sad_l), .sad);

  me_accum u_acc (
    .clk, .rst_n, .clear(acc_clear), .start(dc_start), .u(fout.c.u), .v(fout.c.v),
    .pu, .pv, .lambda(lam), .in_valid(sad_v), .in_last(sad_l), .sad, .terminate(term),
    .active(acc_active), .partial, .min_cost, .min_sad, .best_u, .best_v,
    .done(acc_done), .killed(acc_killed));

  me_term u_term (.active(acc_active), .partial, .min_cost, .terminate(term));

  // ---------------- controller ----------------
  function automatic logic [2:0] dir_of(input mv_t du, input mv_t dv);
    if (du == 0 && dv < 0)      return 3'd0;
    else if (du > 0 && dv < 0)  return 3'd1;
    else if (du > 0 && dv == 0) return 3'd2;
    else if (du > 0 && dv > 0)  return 3'd3;
    else if (du == 0 && dv > 0) return 3'd4;
    else if (du < 0 && dv > 0)  return 3'd5;
    else if (du < 0 && dv == 0) return 3'd6;
    else                        return 3'd7;
  endfunction

  function automatic mv_t clamp_mv(input mv_t x);
    if (x < -mv_t'(SR))      return -mv_t'(SR);
    else if (x > mv_t'(SR-1)) return mv_t'(SR-1);
    else                     return x;
  endfunction

  logic gen_fire;
  assign use_spiral = (cmode == MODE_FFS) || (st == S_GEN8) || (st == S_WAIT8);
  assign gen_fire   = (st == S_GEN16) || (st == S_GEN8);
  assign sp_start   = gen_fire && use_spiral;
  assign dm_start   = gen_fire && !use_spiral;
  assign acc_clear  = (st == S_LD_MB && ld_fire && ld_row == 6'd15 && ld_word == 2'd3) ||
                      (st == S_GEN8);
  assign hp_start   = (st == S_HP16) || (st == S_HP8);
  assign busy       = (st != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; cmode <= MODE_PDS; rot <= '0; ld_strip <= '0; ld_row <= '0; ld_word <= '0;
      blk <= '0; dphase <= DP_LARGE_FULL; dir <= '0; cen_u <= '0; cen_v <= '0;
      pu <= '0; pv <= '0; lam <= '0; done <= 1'b0;
      mv16_u <= '0; mv16_v <= '0; sad16 <= '0; hmv16_u <= '0; hmv16_v <= '0; hsad16 <= '0;
      for (int i = 0; i < 4; i++) begin hmv8_u[i] <= '0; hmv8_v[i] <= '0; hsad8[i] <= '0; end
      for (int i = 0; i < 4; i++) begin mv8_u[i] <= '0; mv8_v[i] <= '0; sad8[i] <= '0; end
      n_cands <= '0; n_terms <= '0; n_moves <= '0;
    end else begin
      done <= 1'b0;
      if (dc_start)   n_cands <= n_cands + 12'd1;
      if (acc_killed) n_terms <= n_terms + 12'd1;
      unique case (st)
        S_IDLE: if (start) begin
          cmode    <= mode;
          rot      <= 2'(mb_x % 3);
          ld_strip <= (mb_x == 5'd0) ? 2'd0 : 2'd2;
          ld_row   <= '0; ld_word <= '0;
          pu <= pred_u; pv <= pred_v; lam <= lambda;
          n_cands <= '0; n_terms <= '0; n_moves <= '0;
          st <= S_LD_SW;
        end
        S_LD_SW: if (ld_fire) begin
          ld_word <= ld_word + 2'd1;
          if (ld_word == 2'd3) begin
            ld_row <= ld_row + 6'd1;
            if (ld_row == 6'(SW_SIZE - 1)) begin
              ld_row <= '0;
              ld_strip <= ld_strip + 2'd1;
              if (ld_strip == 2'd2) st <= S_LD_MB;
            end
          end
        end
        S_LD_MB: if (ld_fire) begin
          ld_word <= ld_word + 2'd1;
          if (ld_word == 2'd3) begin
            ld_row <= ld_row + 6'd1;
            if (ld_row == 6'(MB_SIZE - 1)) begin
              ld_row <= '0;
              st     <= S_GEN16;
              dphase <= DP_LARGE_FULL;
              if (cmode == MODE_FFS) begin cen_u <= '0; cen_v <= '0; end
              else begin cen_u <= clamp_mv(pu); cen_v <= clamp_mv(pv); end
            end
          end
        end
        S_GEN16: st <= S_WAIT16;
        S_WAIT16: if (phase_done) begin
          if (cmode == MODE_FFS || dphase == DP_SMALL) begin
            mv16_u <= best_u; mv16_v <= best_v; sad16 <= 16'(min_sad);
            cen_u  <= best_u; cen_v  <= best_v;
            st     <= S_HP16;
          end else if (best_u == cen_u && best_v == cen_v) begin
            dphase <= DP_SMALL;
            st     <= S_GEN16;
          end else begin
            dphase  <= DP_LARGE_MOVE;
            dir     <= dir_of(best_u - cen_u, best_v - cen_v);
            cen_u   <= best_u; cen_v <= best_v;
            n_moves <= n_moves + 6'd1;
            st      <= S_GEN16;
          end
        end
        S_HP16: st <= S_HPW16;
        S_HPW16: if (hp_done) begin
          hmv16_u <= hp_u; hmv16_v <= hp_v; hsad16 <= 16'(hp_sad);
          blk     <= 3'd1;
          st      <= S_GEN8;
        end
        S_GEN8: st <= S_WAIT8;
        S_WAIT8: if (phase_done) begin
          mv8_u[blk - 3'd1] <= best_u;
          mv8_v[blk - 3'd1] <= best_v;
          sad8[blk - 3'd1]  <= 16'(min_sad);
          st <= S_HP8;
        end
        S_HP8: st <= S_HPW8;
        S_HPW8: if (hp_done) begin
          hmv8_u[blk - 3'd1] <= hp_u;
          hmv8_v[blk - 3'd1] <= hp_v;
          hsad8[blk - 3'd1]  <= 16'(hp_sad);
          if (blk == 3'd4) st <= S_DONE;
          else begin
            blk <= blk + 3'd1;
            st  <= S_GEN8;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end
endmodule
