// mc: motion compensator. Interpolates an 8x8 prediction block from the 9x9
// reference area that the DMA reads for half-pixel compensation.
// The reference area arrives on the DATA bus as 27 words: three columns of
// four-pixel words, nine rows each, column by column (the DMA's vertical
// reading order). `xoff` is the horizontal position of the block inside the
// first word (x mod 4); hx/hy are the half-pixel flags of the motion vector.
// Prediction with the MPEG-4 bilinear rules and rounding control rc:
//   integer:      A
//   half x / y:   (A + B + 1 - rc) >> 1
//   half x and y: (A + B + C + D + 2 - rc) >> 2
// The 8x8 result leaves as 16 words, two per row, top row first, one per
// cycle with its index, towards the share memory channel to the texture
// engine. After `start`, the 27 words are accepted one per cycle; output
// follows immediately after the last one.
// The function (half-pixel interpolation of 9x9 areas into compensated
// blocks) is from the document; the interpolation rule is the MPEG-4 one, and
// the ports and buffering are this design's choices.
module mc
  import enc_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [1:0] xoff,
  input  logic       hx,
  input  logic       hy,
  input  logic       rc,
  input  logic       in_valid,
  input  word_t      in_data,
  output logic       in_ready,
  output logic       out_valid,
  output logic [3:0] out_idx,
  output word_t      out_data,
  output logic       busy
);
  typedef enum logic [1:0] {M_IDLE, M_LOAD, M_OUT} mc_state_t;
  mc_state_t  st;
  word_t      rbuf [3][9];
  logic [1:0] lc;     // load column
  logic [3:0] lr;     // load row
  logic [3:0] k;      // output word
  logic [1:0] cxo;
  logic       chx, chy, crc;

  function automatic logic [7:0] pel(input int px, input int r);
    return rbuf[px / 4][r][8*(px % 4) +: 8];
  endfunction

  always_comb begin
    out_data = '0;
    for (int j = 0; j < 4; j++) begin
      int px, r;
      logic [9:0] s;
      px = int'(cxo) + 4 * int'(k[0]) + j;
      r  = int'(k[3:1]);
      unique case ({chx, chy})
        2'b00: s = 10'(pel(px, r));
        2'b10: s = (10'(pel(px, r)) + 10'(pel(px + 1, r)) + 10'd1 - 10'(crc)) >> 1;
        2'b01: s = (10'(pel(px, r)) + 10'(pel(px, r + 1)) + 10'd1 - 10'(crc)) >> 1;
        2'b11: s = (10'(pel(px, r)) + 10'(pel(px + 1, r)) + 10'(pel(px, r + 1)) +
                    10'(pel(px + 1, r + 1)) + 10'd2 - 10'(crc)) >> 2;
      endcase
      out_data[8*j +: 8] = s[7:0];
    end
  end

  assign in_ready  = (st == M_LOAD);
  assign out_valid = (st == M_OUT);
  assign out_idx   = k;
  assign busy      = (st != M_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= M_IDLE; lc <= '0; lr <= '0; k <= '0; cxo <= '0; chx <= 1'b0; chy <= 1'b0; crc <= 1'b0;
    end else begin
      unique case (st)
        M_IDLE: if (start) begin
          st <= M_LOAD; lc <= '0; lr <= '0; k <= '0;
          cxo <= xoff; chx <= hx; chy <= hy; crc <= rc;
        end
        M_LOAD: if (in_valid) begin
          rbuf[lc][lr] <= in_data;
          if (lr == 4'd8) begin
            lr <= '0;
            lc <= lc + 2'd1;
            if (lc == 2'd2) st <= M_OUT;
          end else lr <= lr + 4'd1;
        end
        M_OUT: begin
          k <= k + 4'd1;
          if (k == 4'd15) st <= M_IDLE;
        end
        default: st <= M_IDLE;
      endcase
    end
  end
endmodule
