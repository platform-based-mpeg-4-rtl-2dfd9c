// tbe: texture block engine. Codes one 8x8 block per command and produces
// both its quantised coefficients and its reconstruction:
//   1. prediction: for inter blocks the 16-word compensated block is read
//      from the share memory (written there by the motion compensator);
//      intra blocks are coded without prediction;
//   2. source: the 16-word source block arrives on the DATA bus;
//   3. forward DCT of source minus prediction, and quantisation of each
//      coefficient as it leaves the DCT; levels go to the share memory (one
//      level per word, raster order) for the bitstream generator, the
//      dequantised values to a coefficient buffer. The quantised DC and the
//      first row and column are kept for AC/DC prediction;
//   4. IDCT of the dequantised block on the same transform unit, prediction
//      added back and clipped to 0..255;
//   5. the 16-word reconstructed block leaves on the DATA bus (towards the
//      DMA's burst write into the block-based reconstructed frame).
// Words hold four pixels, leftmost in bits 7:0, two words per row. A block
// takes about 440 cycles, so the six blocks of a 4:2:0 macroblock fit the
// 3367-cycle macroblock period of 30 CIF frames/s at 40 MHz.
// The engine's functions (DCT, IDCT, Q, IQ, AC/DC prediction), the direct
// share-memory channels from MC and to the bitstream generator, and the use
// of one transform unit for both directions follow the document; the
// sequencing, buffers and addresses are this design's choices.
module tbe
  import enc_pkg::*;
#(
  parameter int unsigned SM_AW = 9
) (
  input  logic              clk,
  input  logic              rst_n,
  // command (RISC bus)
  input  logic              start,
  input  logic              intra,
  input  logic              luma,
  input  logic [4:0]        qp,
  input  logic [SM_AW-1:0]  pred_base,
  input  logic [SM_AW-1:0]  lvl_base,
  output logic              busy,
  output logic              done,
  // share memory port
  output logic              sm_en,
  output logic              sm_we,
  output logic [SM_AW-1:0]  sm_addr,
  output word_t             sm_wdata,
  input  word_t             sm_rdata,
  // DATA bus: source in, reconstruction out
  input  logic              in_valid,
  input  word_t             in_data,
  output logic              in_ready,
  output logic              out_valid,
  output word_t             out_data,
  input  logic              out_ready,
  // coded values kept for AC/DC prediction
  output logic [7:0]               qf_dc,
  output logic signed [11:0]       row_x [7],
  output logic signed [11:0]       col_x [7],
  output logic [5:0]               dc_scaler,
  output logic [11:0]              rec_dc
);
  typedef enum logic [2:0] {T_IDLE, T_PRED, T_SRC, T_FDCT, T_IDCT, T_OUT} tbe_state_t;
  tbe_state_t st;
  logic [7:0]  src  [64];
  logic [7:0]  pred [64];
  logic [7:0]  recp [64];
  logic signed [11:0] cbuf [64];
  logic [6:0]  i_in, i_out;     // samples fed / results received
  logic [4:0]  i_w;             // word counter
  logic        rd_pend;
  logic        cintra, cluma;
  logic [4:0]  cqp;
  logic        dstart;

  // transform unit shared by both directions
  logic signed [11:0] d_in, d_out;
  logic d_in_valid, d_in_ready, d_out_valid, d_busy;
  tbe_dct u_dct (.clk, .rst_n, .start(dstart), .inverse(st == T_IDCT), .in_valid(d_in_valid),
                 .in_data(d_in), .in_ready(d_in_ready), .out_valid(d_out_valid), .out_data(d_out), .busy(d_busy));

  // quantiser on the DCT output
  logic q_valid; logic signed [11:0] q_level, q_rec; logic [5:0] q_dcs;
  tbe_quant u_q (.clk, .rst_n, .in_valid(d_out_valid && st == T_FDCT), .coef(d_out),
                 .is_dc(i_in == 7'd64 && i_out == 7'd0 && d_out_valid && cintra), .intra(cintra), .luma(cluma), .qp(cqp),
                 .out_valid(q_valid), .level(q_level), .rec(q_rec), .dc_scaler(q_dcs));

  // the index of the coefficient leaving the quantiser
  logic [6:0] q_idx;

  assign d_in_valid = (st == T_FDCT || st == T_IDCT) && d_in_ready && (i_in < 7'd64);
  assign d_in       = (st == T_FDCT) ? 12'(signed'({4'b0, src[i_in[5:0]]}) - signed'({4'b0, pred[i_in[5:0]]}))
                                     : cbuf[i_in[5:0]];
  assign in_ready   = (st == T_SRC);
  assign out_valid  = (st == T_OUT);
  assign out_data   = {recp[{i_w[3:0], 2'd3}], recp[{i_w[3:0], 2'd2}], recp[{i_w[3:0], 2'd1}], recp[{i_w[3:0], 2'd0}]};
  assign busy       = (st != T_IDLE);

  always_comb begin
    sm_en = 1'b0; sm_we = 1'b0; sm_addr = '0; sm_wdata = '0;
    if (st == T_PRED && !i_w[4]) begin
      sm_en = 1'b1; sm_addr = pred_base + SM_AW'(i_w);
    end else if (q_valid) begin
      sm_en = 1'b1; sm_we = 1'b1; sm_addr = lvl_base + SM_AW'(q_idx);
      sm_wdata = 32'(signed'(q_level));
    end
  end

  // inverse transform output plus prediction, before clipping
  logic signed [12:0] rec_sum;
  assign rec_sum = 13'(d_out) + 13'(signed'({5'b0, pred[i_out[5:0]]}));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= T_IDLE; i_in <= '0; i_out <= '0; i_w <= '0; rd_pend <= 1'b0; done <= 1'b0;
      cintra <= 1'b0; cluma <= 1'b0; cqp <= '0; dstart <= 1'b0; q_idx <= '0;
      qf_dc <= '0; dc_scaler <= '0; rec_dc <= '0;
      for (int i = 0; i < 7; i++) begin row_x[i] <= '0; col_x[i] <= '0; end
    end else begin
      done   <= 1'b0;
      dstart <= 1'b0;
      // prediction words arrive one cycle after their read
      rd_pend <= (st == T_PRED) && !i_w[4];
      if (rd_pend) for (int j = 0; j < 4; j++) pred[{i_w[3:0] - 4'd1, 2'(j)}] <= sm_rdata[8*j +: 8];
      // quantiser results
      if (q_valid) begin
        cbuf[q_idx[5:0]] <= q_rec;
        q_idx <= q_idx + 7'd1;
        if (q_idx == 7'd0) begin qf_dc <= 8'(q_level); dc_scaler <= q_dcs; rec_dc <= 12'(q_rec); end
        if (q_idx >= 7'd1 && q_idx <= 7'd7) row_x[q_idx - 7'd1] <= q_level;
        if (q_idx[2:0] == 3'd0 && q_idx != 7'd0) col_x[q_idx[5:3] - 3'd1] <= q_level;
      end
      if (d_in_valid) i_in <= i_in + 7'd1;
      unique case (st)
        T_IDLE: if (start) begin
          cintra <= intra; cluma <= luma; cqp <= qp;
          i_w <= '0;
          if (intra) begin
            st <= T_SRC;
            for (int i = 0; i < 64; i++) pred[i] <= 8'd0;
          end else st <= T_PRED;
        end
        T_PRED: begin
          if (!i_w[4]) i_w <= i_w + 5'd1;
          else if (!rd_pend) begin st <= T_SRC; i_w <= '0; end
        end
        T_SRC: if (in_valid) begin
          for (int j = 0; j < 4; j++) src[{i_w[3:0], 2'(j)}] <= in_data[8*j +: 8];
          i_w <= i_w + 5'd1;
          if (i_w == 5'd15) begin
            st <= T_FDCT; dstart <= 1'b1; i_in <= '0; i_out <= '0; q_idx <= '0;
          end
        end
        T_FDCT: begin
          if (d_out_valid) i_out <= i_out + 7'd1;
          if (q_valid && q_idx == 7'd63) begin
            st <= T_IDCT; dstart <= 1'b1; i_in <= '0; i_out <= '0;
          end
        end
        T_IDCT: if (d_out_valid) begin
          recp[i_out[5:0]] <= (rec_sum < 0) ? 8'd0 : (rec_sum > 13'sd255) ? 8'd255 : 8'(rec_sum);
          i_out <= i_out + 7'd1;
          if (i_out == 7'd63) begin st <= T_OUT; i_w <= '0; end
        end
        T_OUT: if (out_ready) begin
          i_w <= i_w + 5'd1;
          if (i_w == 5'd15) begin st <= T_IDLE; done <= 1'b1; end
        end
        default: st <= T_IDLE;
      endcase
    end
  end
endmodule
