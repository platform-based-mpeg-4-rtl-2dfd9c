// me_diamond_gen: ROM-based diamond pattern generator of the motion estimator.
// A 13-entry offset ROM holds the centre, the eight points of the large
// diamond and the four points of the small diamond. A second ROM, indexed by
// the direction of the last move of the large diamond, holds which of the
// eight large-diamond points around the new centre have not been visited yet
// (five after a move along an axis, three after a diagonal move), so that no
// candidate is evaluated twice. Each phase is started with a pulse and the
// selected points leave one per cycle on a valid/ready handshake, with `last`
// on the final point of the phase.
// The three phases (initial, large-diamond refinement, small-diamond last
// phase) follow the document; the offsets are the usual diamond search
// patterns, and the ROM of unvisited points is this design's choice.
// Large diamond directions: 0 (0,-2) 1 (1,-1) 2 (2,0) 3 (1,1)
//                           4 (0,2)  5 (-1,1) 6 (-2,0) 7 (-1,-1)
module me_diamond_gen
  import me_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  dp_phase_t phase,
  input  logic [2:0] dir,       // last move, used by DP_LARGE_MOVE
  input  mv_t       center_u,
  input  mv_t       center_v,
  input  logic [2:0] id,
  output logic      out_valid,
  input  logic      out_ready,
  output cand_t     out_cand,
  output logic      out_last,
  output logic      busy
);
  localparam int NPTS = 13;

  function automatic mv_t rom_du(input logic [3:0] k);
    unique case (k)
      4'd0: return mv_t'(0);
      4'd1: return mv_t'(0);   4'd2: return mv_t'(1);  4'd3: return mv_t'(2);  4'd4: return mv_t'(1);
      4'd5: return mv_t'(0);   4'd6: return -mv_t'(1); 4'd7: return -mv_t'(2); 4'd8: return -mv_t'(1);
      4'd9: return mv_t'(0);   4'd10: return mv_t'(1); 4'd11: return mv_t'(0); 4'd12: return -mv_t'(1);
      default: return mv_t'(0);
    endcase
  endfunction

  function automatic mv_t rom_dv(input logic [3:0] k);
    unique case (k)
      4'd0: return mv_t'(0);
      4'd1: return -mv_t'(2);  4'd2: return -mv_t'(1); 4'd3: return mv_t'(0);  4'd4: return mv_t'(1);
      4'd5: return mv_t'(2);   4'd6: return mv_t'(1);  4'd7: return mv_t'(0);  4'd8: return -mv_t'(1);
      4'd9: return -mv_t'(1);  4'd10: return mv_t'(0); 4'd11: return mv_t'(1); 4'd12: return mv_t'(0);
      default: return mv_t'(0);
    endcase
  endfunction

  // unvisited large-diamond points after a move in direction d (bit i = point i)
  function automatic logic [7:0] rom_new(input logic [2:0] d);
    unique case (d)
      3'd0: return 8'hC7;
      3'd1: return 8'h07;
      3'd2: return 8'h1F;
      3'd3: return 8'h1C;
      3'd4: return 8'h7C;
      3'd5: return 8'h70;
      3'd6: return 8'hF1;
      3'd7: return 8'hC1;
    endcase
  endfunction

  logic [NPTS-1:0] pending;
  logic [3:0]      k;
  mv_t             cu, cv;
  logic [2:0]      cid;

  always_comb begin
    k = '0;
    for (int i = NPTS - 1; i >= 0; i--) if (pending[i]) k = 4'(i);
  end

  assign out_valid = |pending;
  assign busy      = |pending;
  assign out_last  = out_valid && ((pending & (pending - 13'd1)) == '0);
  assign out_cand  = '{id: cid, u: cu + rom_du(k), v: cv + rom_dv(k)};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= '0; cu <= '0; cv <= '0; cid <= '0;
    end else if (start) begin
      cu <= center_u; cv <= center_v; cid <= id;
      unique case (phase)
        DP_LARGE_FULL: pending <= 13'h01FF;
        DP_LARGE_MOVE: pending <= {4'h0, rom_new(dir), 1'b0};
        default:       pending <= 13'h1E00;
      endcase
    end else if (out_valid && out_ready) begin
      pending[k] <= 1'b0;
    end
  end
endmodule
