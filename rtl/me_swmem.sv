// me_swmem: search window memory (SWMEM) of the motion estimator.
// Holds a 48x48 pixel search window in eight single-byte banks so that any
// eight horizontally neighbouring pixels (a half row) are read in one cycle
// without a bank collision. Pixel (x,y) of the window sits in bank x mod 8 at
// linear address 6*y + x div 8, as in the document's memory map; the window is
// split into three 16-pixel strips, and the strip of a reference-frame column
// is its column index mod 3, so that moving to the next macroblock only one
// strip (the new right-hand one) has to be reloaded. The `rot` input (the
// macroblock column mod 3) maps logical window strips to physical ones.
// A read of the half row starting at (x,y) fetches two consecutive addresses:
// banks at or right of x mod 8 read the first, the others the next one, and
// the result is rotated left by x mod 8.
// Timing: writes take effect at the clock edge; read data appear one cycle
// after rd_en. Writes are 32-bit words of four pixels (word w of a strip row
// covers pixels 4w..4w+3); the word width is this design's choice.
module me_swmem
  import me_pkg::*;
#(
  parameter int unsigned W     = SW_SIZE,
  parameter int unsigned H     = SW_SIZE,
  parameter int unsigned NB    = BANKS,
  parameter int unsigned STRIP = MB_SIZE
) (
  input  logic        clk,
  // write port (data loading path)
  input  logic        wr_en,
  input  logic [1:0]  wr_strip,  // physical strip 0..2
  input  logic [5:0]  wr_row,    // 0..H-1
  input  logic [1:0]  wr_word,   // 0..3 within the strip row
  input  logic [31:0] wr_data,   // pixel 4w+j in bits 8j+7:8j
  // read port (distortion calculation)
  input  logic        rd_en,
  input  logic [5:0]  rd_x,      // logical x of the first pixel, 0..W-8
  input  logic [5:0]  rd_y,
  input  logic [1:0]  rot,       // logical strip s is physical strip (s+rot) mod 3
  output logic [63:0] rd_data    // pixel x+i in bits 8i+7:8i
);
  localparam int unsigned HPR   = W / NB;        // half rows per window row (6)
  localparam int unsigned DEPTH = HPR * H;       // words per bank (288)
  localparam int unsigned AW    = $clog2(DEPTH);
  localparam int unsigned HPS   = STRIP / NB;    // half rows per strip (2)

  logic [7:0]    mem [NB][DEPTH];
  logic [AW-1:0] waddr;
  logic [AW-1:0] raddr [NB];
  logic [7:0]    q [NB];
  logic [2:0]    sh, sh_q;
  logic [2:0]    hx0;

  assign waddr = AW'(wr_row * HPR + wr_strip * HPS + wr_word[1]);
  assign sh    = rd_x[2:0];
  assign hx0   = rd_x[5:3];

  always_comb begin
    for (int b = 0; b < NB; b++) begin
      logic [2:0] hx;
      logic [1:0] ls, ps;
      hx = (3'(b) >= sh) ? hx0 : hx0 + 3'd1;
      if (hx > 3'(HPR - 1)) hx = 3'(HPR - 1);   // only when sh = 0: unused bank
      ls = 2'(hx / HPS);
      ps = 2'((ls + rot) % 3);
      raddr[b] = AW'(rd_y * HPR + ps * HPS + hx % HPS);
    end
  end

  for (genvar b = 0; b < NB; b++) begin : g_bank
    always_ff @(posedge clk) begin
      if (wr_en && (b / 4 == wr_word[0])) mem[b][waddr] <= wr_data[8*(b%4) +: 8];
      if (rd_en) q[b] <= mem[b][raddr[b]];
    end
  end

  always_ff @(posedge clk) if (rd_en) sh_q <= sh;

  always_comb
    for (int i = 0; i < NB; i++) rd_data[8*i +: 8] = q[(i + sh_q) % NB];
endmodule
