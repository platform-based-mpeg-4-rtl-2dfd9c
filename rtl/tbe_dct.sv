// tbe_dct: 8x8 two-dimensional DCT / IDCT of the texture block engine.
// One unit serves both directions: a row pass and a column pass of the same
// eight-tap matrix product, the inverse using the transposed matrix. The
// 64 input samples are taken row by row, one per cycle (64 cycles); the row
// pass then computes one intermediate value per cycle with eight
// multipliers (64 cycles), keeping three fraction bits; the column pass
// computes and delivers one output per cycle, row by row (64 cycles), so a
// block takes 192 cycles. Coefficients are cos(n*pi/16) in 12-bit fixed
// point, with the 1/sqrt(2) of the DC basis folded in; results are rounded
// and saturated to 12-bit signed.
//   forward:  F(v,u) = 1/4 a(u) a(v) sum_y sum_x f(y,x) cos((2x+1)u pi/16) cos((2y+1)v pi/16)
//   inverse:  the transpose, a(0) = 1/sqrt(2), a(k) = 1 otherwise.
// That the engine performs DCT and IDCT is from the document; the separable
// structure, the precision and the timing are this design's choices.
module tbe_dct (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               start,
  input  logic               inverse,
  input  logic               in_valid,
  input  logic signed [11:0] in_data,
  output logic               in_ready,
  output logic               out_valid,
  output logic signed [11:0] out_data,
  output logic               busy
);
  typedef enum logic [1:0] {D_IDLE, D_LOAD, D_ROW, D_COL} dct_state_t;
  dct_state_t st;
  logic signed [11:0] xbuf [8][8];
  logic signed [19:0] tbuf [8][8];
  logic [5:0] idx;
  logic       inv;

  // round(4096 * cos(n*pi/16)), n = 0..7
  function automatic int cos12(input int n);
    unique case (n)
      0: return 4096; 1: return 4017; 2: return 3784; 3: return 3406;
      4: return 2896; 5: return 2276; 6: return 1567; default: return 799;
    endcase
  endfunction

  // basis K(k,n) = 4096 * a(k) * cos((2n+1) k pi/16), a(0) = 1/sqrt(2)
  function automatic logic signed [13:0] kcoef(input int k, input int n);
    int a;
    if (k == 0) return 14'sd2896;
    a = ((2 * n + 1) * k) % 32;
    if (a <= 8)       return  14'(cos12(a == 8 ? 7 : a) * (a == 8 ? 0 : 1));
    else if (a < 16)  return -14'(cos12(16 - a));
    else if (a <= 24) return (a == 24) ? 14'sd0 : -14'(cos12(a - 16));
    else              return  14'(cos12(32 - a));
  endfunction

  logic [2:0] i_hi, i_lo;
  assign i_hi = idx[5:3];
  assign i_lo = idx[2:0];

  // one eight-tap product per cycle
  logic signed [39:0] acc;
  always_comb begin
    acc = '0;
    for (int t = 0; t < 8; t++) begin
      if (st == D_ROW)  // T(r,k): r = i_hi, k = i_lo
        acc += 40'(xbuf[i_hi][t]) * 40'(inv ? kcoef(t, int'(i_lo)) : kcoef(int'(i_lo), t));
      else              // out(k,u): k = i_hi, u = i_lo
        acc += 40'(tbuf[t][i_lo]) * 40'(inv ? kcoef(t, int'(i_hi)) : kcoef(int'(i_hi), t));
    end
  end

  logic signed [39:0] rowv, colv;
  assign rowv = (acc + 40'sd512) >>> 10;      // 8 * one-dimensional result
  assign colv = (acc + 40'sd32768) >>> 16;    // final result

  assign in_ready  = (st == D_LOAD);
  assign out_valid = (st == D_COL);
  assign out_data  = (colv > 40'sd2047) ? 12'sd2047 : (colv < -40'sd2048) ? -12'sd2048 : 12'(colv);
  assign busy      = (st != D_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_IDLE; idx <= '0; inv <= 1'b0;
    end else begin
      unique case (st)
        D_IDLE: if (start) begin st <= D_LOAD; idx <= '0; inv <= inverse; end
        D_LOAD: if (in_valid) begin
          xbuf[i_hi][i_lo] <= in_data;
          idx <= idx + 6'd1;
          if (idx == 6'd63) st <= D_ROW;
        end
        D_ROW: begin
          tbuf[i_hi][i_lo] <= 20'(rowv);
          idx <= idx + 6'd1;
          if (idx == 6'd63) st <= D_COL;
        end
        D_COL: begin
          idx <= idx + 6'd1;
          if (idx == 6'd63) st <= D_IDLE;
        end
      endcase
    end
  end
endmodule
