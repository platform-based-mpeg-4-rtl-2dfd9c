// me_pkg: types and constants shared by the motion estimator blocks.
// The search range of -16..+15 integer pixels, the 16x16 macroblock, the
// 48x48 search window and the eight-way interleaved window memory follow the
// published architecture. The candidate record (id,u,v) is the one passed from
// pattern generation to distortion calculation; id selects the block being
// matched (0 = whole 16x16 macroblock, 1..4 = 8x8 blocks in raster order), an
// encoding chosen for this design.
package me_pkg;
  localparam int unsigned MB_SIZE = 16;  // macroblock edge, pixels
  localparam int          SR      = 16;  // search range -SR .. SR-1
  localparam int unsigned SW_SIZE = 48;  // search window edge, pixels
  localparam int unsigned BANKS   = 8;   // interleaved window banks
  localparam int unsigned MVW     = 6;   // signed motion vector component width
  localparam int unsigned SADW    = 18;  // biased SAD width

  typedef logic signed [MVW-1:0] mv_t;
  typedef logic signed [MVW:0]   hmv_t;   // half-pixel vector component

  typedef struct packed {
    logic [2:0] id;  // 0: 16x16 MB, 1..4: 8x8 block
    mv_t        u;   // horizontal displacement
    mv_t        v;   // vertical displacement
  } cand_t;

  // Entry of the candidate FIFO: invalid entries are only kept when they close
  // a search phase, so that the phase end is always seen downstream.
  typedef struct packed {
    logic  valid;
    logic  last;
    cand_t c;
  } cand_ent_t;

  typedef enum logic {MODE_PDS = 1'b0, MODE_FFS = 1'b1} me_mode_t;

  // Diamond pattern phases
  typedef enum logic [1:0] {DP_LARGE_FULL = 2'd0, DP_LARGE_MOVE = 2'd1, DP_SMALL = 2'd2} dp_phase_t;
endpackage
