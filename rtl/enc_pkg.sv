// enc_pkg: types and constants shared by the encoder platform blocks outside
// the motion estimator: frame geometry, DMA commands and the external memory
// word. Off-chip memory is organised in 32-bit words of four pixels, as in
// the document; the CIF frame size is the document's target format.
package enc_pkg;
  localparam int unsigned FRAME_W = 352;   // CIF luminance width
  localparam int unsigned FRAME_H = 288;   // CIF luminance height
  localparam int unsigned AW      = 18;    // external word address width

  typedef logic [31:0] word_t;             // four pixels, leftmost in bits 7:0

  // DMA access types of the memory access scheme
  typedef enum logic [1:0] {
    DMA_SW     = 2'd0,   // search window for ME, block-based reconstructed frame
    DMA_MC_REF = 2'd1,   // 9x9 half-pel reference for MC, read column by column
    DMA_SRC    = 2'd2,   // source block, frame-based source frame
    DMA_REC_WR = 2'd3    // 8x8 reconstructed block, burst write, block-based
  } dma_kind_t;

  typedef struct packed {
    dma_kind_t          kind;
    logic signed [10:0] x;          // pixel x of the area's top-left corner
    logic signed [10:0] y;          // pixel y
    logic [1:0]         first_strip; // DMA_SW: 0 = whole window, 2 = new strip only
    logic               mb16;        // DMA_SRC: 1 = 16x16 macroblock, 0 = 8x8 block
  } dma_cmd_t;
endpackage
