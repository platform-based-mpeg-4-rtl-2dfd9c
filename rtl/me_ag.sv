// me_ag: address generator (AG) of the distortion calculation stage.
// For one candidate (id,u,v) fetched from the candidate FIFO it issues one
// half-row read per cycle to the MB RAM and the search window memory:
// 32 reads (16 rows x 2 half rows) for the 16x16 macroblock, 8 reads for an
// 8x8 block. The block at offset (bx,by) inside the macroblock, displaced by
// (u,v), reads window pixel (16+bx+u+8h, 16+by+v+r), the window origin being
// 16 pixels up-left of the current macroblock. `terminate` from the
// termination detector stops the candidate before its last read (halfway
// termination). Row-by-row order is this design's choice.
module me_ag
  import me_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  cand_t      cand,
  input  logic       terminate,
  output logic       rd_en,
  output logic       rd_last,
  output logic [5:0] sw_x,
  output logic [5:0] sw_y,
  output logic [3:0] mb_row,
  output logic       mb_half,
  output logic       busy
);
  logic       active;
  logic [3:0] row;
  logic       half;
  logic [2:0] id;
  mv_t        u, v;
  logic [3:0] bx, by, nrow;
  logic       two_halves;

  always_comb begin
    two_halves = (id == 3'd0);
    nrow       = two_halves ? 4'd15 : 4'd7;
    bx         = (id == 3'd2 || id == 3'd4) ? 4'd8 : 4'd0;
    by         = (id == 3'd3 || id == 3'd4) ? 4'd8 : 4'd0;
  end

  assign rd_en   = active && !terminate;
  assign rd_last = (row == nrow) && (half || !two_halves);
  assign mb_row  = by + row;
  assign mb_half = bx[3] | half;
  assign sw_x    = 6'(7'sd16 + 7'(bx) + 7'(u) + (half ? 7'sd8 : 7'sd0));
  assign sw_y    = 6'(7'sd16 + 7'(by) + 7'(v) + 7'(row));
  assign busy    = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; row <= '0; half <= 1'b0; id <= '0; u <= '0; v <= '0;
    end else if (start) begin
      active <= 1'b1; row <= '0; half <= 1'b0;
      id <= cand.id; u <= cand.u; v <= cand.v;
    end else if (active) begin
      if (terminate || rd_last) active <= 1'b0;
      else if (two_halves && !half) half <= 1'b1;
      else begin
        half <= 1'b0;
        row  <= row + 4'd1;
      end
    end
  end
endmodule
