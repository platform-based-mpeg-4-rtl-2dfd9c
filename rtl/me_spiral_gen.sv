// me_spiral_gen: adjustable spiral pattern generator of the motion estimator.
// Emits candidate positions around a centre, ring by ring outwards, one per
// cycle: the centre first, then each ring r = 1..rings (8r points). The number
// of rings is set per search: 16 rings cover the -16..+15 full search of a
// 16x16 macroblock (points beyond the range are removed by the range checker),
// 2 rings give the +-2 local search of the 8x8 blocks. Spiral search from the
// centre outwards is from the document; the order inside a ring (start at the
// top-left corner, then right, down, left, up) is this design's choice.
// Interface: a start pulse loads centre, rings and block id; candidates leave
// on a valid/ready handshake, with `last` on the final one.
module me_spiral_gen
  import me_pkg::*;
#(
  parameter int unsigned MAX_RINGS = SR
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  mv_t        center_u,
  input  mv_t        center_v,
  input  logic [4:0] rings,
  input  logic [2:0] id,
  output logic       out_valid,
  input  logic       out_ready,
  output cand_t      out_cand,
  output logic       out_last,
  output logic       busy
);
  logic       active;
  logic [4:0] ring;       // current ring, 0 = centre
  logic [1:0] side;       // 0 top, 1 right, 2 bottom, 3 left
  logic [5:0] step;       // step along the side, 0 .. 2*ring-1
  mv_t        ox, oy;     // offset of the current point
  mv_t        cu, cv;
  logic [4:0] nrings;
  logic [2:0] cid;
  logic       ring_end;

  assign ring_end  = (ring == 5'd0) || (side == 2'd3 && step == {ring, 1'b0} - 6'd1);
  assign out_valid = active;
  assign out_last  = active && ring_end && (ring == nrings);
  assign out_cand  = '{id: cid, u: cu + ox, v: cv + oy};
  assign busy      = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0; ring <= '0; side <= '0; step <= '0;
      ox <= '0; oy <= '0; cu <= '0; cv <= '0; nrings <= '0; cid <= '0;
    end else if (start) begin
      active <= 1'b1; ring <= '0; side <= '0; step <= '0;
      ox <= '0; oy <= '0; cu <= center_u; cv <= center_v;
      nrings <= (rings > 5'(MAX_RINGS)) ? 5'(MAX_RINGS) : rings; cid <= id;
    end else if (active && out_ready) begin
      if (ring_end) begin
        if (ring == nrings) active <= 1'b0;
        else begin
          ring <= ring + 5'd1;
          side <= '0; step <= '0;
          ox <= -mv_t'(ring + 5'd1);
          oy <= -mv_t'(ring + 5'd1);
        end
      end else begin
        if (step == {ring, 1'b0} - 6'd1) begin
          step <= '0;
          side <= side + 2'd1;
        end else step <= step + 6'd1;
        unique case (side)
          2'd0: ox <= ox + mv_t'(1);
          2'd1: oy <= oy + mv_t'(1);
          2'd2: ox <= ox - mv_t'(1);
          2'd3: oy <= oy - mv_t'(1);
        endcase
      end
    end
  end
endmodule
