# MPEG-4 simple-profile video encoder platform (RTL)

This is the hardware side of an MPEG-4 Simple Profile video encoder. It targets
CIF video (352x288) at 30 frames/s with a 40 MHz clock. The design is a
platform. A small processor runs the per-macroblock schedule and makes
decisions such as coding mode and motion-vector prediction. Dedicated
accelerators do the heavy, regular work:

* motion estimation (ME),
* motion compensation (MC),
* the texture path: DCT, quantisation, inverse quantisation, IDCT and AC/DC
  prediction,
* bitstream packing.

A DMA engine feeds all of them from one external memory.

Much of the design is about memory traffic, so two ideas recur:

1. The external memory holds frames in different layouts. Source frames are
   raster ("frame-based"). Reconstructed frames are stored block by block
   ("block-based"). The DMA hides the difference and the edge padding, so the
   accelerators only see clean pixel streams.
2. The motion estimator keeps a 48x48 search window on chip. It reuses two
   thirds of that window from one macroblock to the next, so moving along a
   macroblock row needs only one new 16-pixel-wide strip.

This RTL does not contain the processor. Its instruction set is not available
in enough detail to build it. Every control register the processor would
write, and every result it would read, is therefore a port of `encoder_top`.
The testbench `tb_encoder_top` plays the processor's role.

## System view

```
          ext. memory port (req/gnt, in-order read data)
                     |
                   [dma] ---- DATA bus (one 32-bit word = 4 pixels per cycle)
                     |            |  dbus_sel: 0 ME, 1 MC, 2 TBE
        +------------+------------+-------------+
        |            |            |             |
 [motion_estimator] [mc]        [tbe] -> reconstructed block back to dma
                     |  port A    |  port B
                     +--[share_mem]--+
                        (also the SHARE bus)
                                  |
                          [tbe_acdc] results -> processor
 processor codes -> [bts_packer] -> BITSTREAM bus
```

* The **DATA bus** connects the DMA to one accelerator at a time. The
  processor sets `dbus_sel` before it issues a DMA command.
* The **share memory** is a two-port RAM. The motion compensator writes its
  predicted 8x8 block there. The texture engine reads that block and writes
  its quantised levels back. From outside, the SHARE bus reads or writes the
  same RAM, which is useful for testing.
* The **BITSTREAM bus** carries 32-bit words from the packer.

The units run one command at a time. The testbench issues commands one after
another and does not overlap units.

## Motion estimator

`motion_estimator` produces one 16x16 vector and four 8x8 vectors per
macroblock. Each is first found at integer precision and then refined to half
a pixel. The search range is -16..+15.5.

### Search algorithms

Two modes are available; choose one per macroblock with `mode`.

* **FFS** (fast full search) visits every position in a spiral, starting from
  (0,0). It uses *halfway termination*, also called partial distortion
  elimination. As soon as the running cost of a candidate reaches the best
  cost so far, the candidate is dropped. Because the spiral visits good
  candidates early, most candidates stop after a few rows. The result equals
  a full search, with ties going to the earlier candidate.
* **PDS** (predictive diamond search) starts at the predictor supplied by the
  processor.
  1. It evaluates a large diamond: the centre plus 8 points at city-block
     distance 2.
  2. It moves the centre to the best point and evaluates only the points it
     has not seen before. A ROM holds one "unvisited points" mask for each of
     the 8 move directions.
  3. When the centre wins, it ends with a small diamond: 4 points at
     distance 1.

  PDS is the mode that fits the real-time budget.
* After the 16x16 search, each 8x8 block gets a 2-ring spiral search (+-2)
  around the integer 16x16 vector. Each block starts with its own fresh
  minimum.
* **Half-pixel refinement** (`me_halfpel`) follows the 16x16 search and each
  8x8 search. It evaluates the eight half-pixel neighbours of the integer
  result in raster order. It interpolates the reference from the window
  already on chip: (a+b+1)/2 or (a+b+c+d+2)/4.
  * It reads each window row once per half column: one read per row, or two
    when the ninth pixel is needed. It keeps the previous row's horizontal
    sums for the vertical average.
  * It uses the same rate bias, in half-pixel units, and halfway
    termination, starting from the integer result's cost.
  * It borrows the window and block read ports while the main datapath is
    idle.
  * The refined vectors (`hmv16`, `hmv8`, in half pixels) and their SADs are
    reported next to the integer ones.

Every cost is SAD + `lambda` * (|u - pu| + |v - pv|), where (pu, pv) is the
predictor. This "rate bias" favours vectors that are cheap to code. The bias
is loaded into the accumulator before any SAD, so halfway termination also
compares biased costs.

### Pipeline

The estimator has three stages, the same structure in both modes:

* **Pattern generation.** `me_spiral_gen` or `me_diamond_gen` produces
  candidates (block id, u, v). `me_range_check` marks the ones outside the
  range as invalid.
* **`me_fifo`** decouples pattern generation from the datapath.
* **Distortion calculation.**
  * `me_ag` walks the half rows of a candidate: 32 reads for 16x16, 8 for
    8x8.
  * Each read fetches 8 window pixels and 8 macroblock pixels in one cycle.
  * `me_sad_tree` adds the 8 absolute differences.
  * `me_accum` accumulates the cost and keeps the minimum.
  * `me_term` raises `terminate` when the partial cost reaches the minimum.
    The address generator then stops the candidate at once.

A 16x16 candidate therefore costs at most 32 cycles plus a few cycles of
pipeline. The `n_cands`, `n_terms` and `n_moves` outputs count candidates,
early terminations and diamond moves for the processor.

### Search-window memory (`me_swmem`)

This memory is the hardest part to follow.

* **Layout.** The 48x48 window is split into three strips, each 16 pixels
  wide. Pixel x of a row goes to bank x mod 8, one of 8 byte-wide banks. Each
  bank address holds one "half row" of 8 pixels, at address
  6*y + x/8 (6 half rows per window row).
* **Reading.** To read 8 adjacent pixels starting at any x, banks at or after
  x mod 8 use half-row address x/8, and banks before it use the next half
  row. The 8 bytes come out in bank order and are rotated by x mod 8. This is
  one read per cycle with no bank conflicts.
* **Reuse across columns.** Strips are addressed logically: logical strip s
  (0 = left) lives in physical strip (s + rot) mod 3.
  * For the first macroblock of a row (`mb_x` = 0) all three strips are
    loaded.
  * For each later macroblock only the new right strip is loaded, into the
    physical strip that held the old left one, and `rot` advances.
  * This cuts window loading from 2304 to 768 bytes per macroblock.

`me_mbram` holds the current macroblock as two 32-bit banks, so one read
gives 8 pixels. It also sums the macroblock pixels while they load; the
processor uses the sum for the intra/inter decision.

### Loading

The DMA delivers the window first, then the macroblock, over the `ld_*`
handshake:

* the window as 48 rows of 4 words for each strip to load, strip by strip;
* then the macroblock as 16 rows of 4 words.

The search starts automatically after the last macroblock word arrives.

## DMA (`dma`)

One command moves one of four access shapes. Every access is in 4-pixel
words.

| kind | source / target | shape |
|---|---|---|
| `DMA_SW` | reconstructed frame, block-based | 1 or 3 strips of 16x48, for the window |
| `DMA_MC_REF` | reconstructed frame, block-based | 3 word columns x 9 rows, read column by column; the 9x9 area of an 8x8 block with half-pixel margin, starting at any pixel |
| `DMA_SRC` | source frame, frame-based | 16x16 or 8x8 source block |
| `DMA_REC_WR` | reconstructed frame, block-based | 8x8 block written as one burst of 16 words |

Addresses:

* **Frame-based:** `base + y*W/4 + x/4`.
* **Block-based:** `base + 16*((y/8)*(W/8) + x/8) + 2*(y mod 8) + (x mod 8)/4`.
  Every 8x8 block is 16 consecutive words.

Padding outside the frame:

* **Rows** are clamped to the frame.
* **Word columns** are clamped too. A clamped word is replaced by four copies
  of its edge pixel, so vectors pointing outside the picture see replicated
  border pixels.
* **Window coordinates** must be multiples of 4. The window x is 16*mb_x - 16,
  so this always holds.

Memory protocol:

* The external port is request/grant.
* Up to 4 reads can be outstanding, and read data returns in order.
* A 4-word buffer absorbs back-pressure from the DATA bus.

## Motion compensator (`mc`)

The motion compensator loads the 27-word reference area (3 columns x 9 rows).
It then outputs the 8x8 prediction as 16 words, one word per cycle, at word
offset `xoff` within the first column.

It uses MPEG-4 bilinear half-pixel interpolation with rounding control `rc`:

* (a + b + 1 - rc) / 2 for a half-pixel position in one direction;
* (a + b + c + d + 2 - rc) / 4 for a half-pixel position in both directions.

The words go to the share memory at `mc_base`.

## Texture block engine (`tbe`)

One 8x8 block moves through these steps:

1. Read the prediction: 16 words from the share memory. An intra block uses
   zero prediction.
2. Take the source block: 16 words from the DATA bus.
3. Forward DCT of the difference.
4. Quantise. The levels go to the share memory at `lvl_base`, in raster
   order, one 32-bit word per level.
5. Inverse quantise.
6. Inverse DCT.
7. Add the prediction, clip to 0..255, and send 16 words back out on the DATA
   bus.

The sub-blocks:

* **`tbe_dct`** does both transforms as a row pass and a column pass of 8-term
  products.
  * Cosines are 12-bit constants: round(4096*cos(k*pi/16)).
  * The row pass keeps extra fraction bits. Results are saturated to 12
    bits.
  * A block takes 64 load, 64 row and 64 column cycles.
  * Against an exact DCT the error is at most 1.
* **`tbe_quant`** implements H.263-style quantisation as used by MPEG-4:
  * inter level = (|c| - QP/2) / (2QP);
  * intra AC level = |c| / (2QP);
  * dequantised value = QP(2|l| + 1), minus 1 for even QP;
  * the intra DC is divided by the MPEG-4 `dc_scaler` of the QP, separately
    for luma and chroma, and clipped to 1..254.
* **`tbe_acdc`** does MPEG-4 intra AC/DC prediction.
  * Inputs: the DCs of the left (A), upper-left (B) and upper (C) blocks.
  * If |A - B| < |B - C| it predicts from C (above); otherwise from A
    (left). Missing neighbours count as DC 1024 with zero AC.
  * Outputs:
    * the DC difference;
    * the 7 AC residuals;
    * the sums of |AC| with and without prediction. The processor uses these
      to decide whether AC prediction pays off.
  * The neighbours' values are kept by the processor in external memory and
    supplied as inputs.

## Bitstream packer (`bts_packer`)

The packer takes codes of 0 to 24 bits, MSB first, and emits full 32-bit
words; the first bit is bit 31. On `flush` it appends MPEG-4 stuffing to the
next byte boundary and emits the last, partial word with its byte count:

* the stuffing is a 0 followed by 1s, 1 to 8 bits;
* `ready` drops for one cycle when a flush needs two words.

The variable-length code tables are not built. The processor chooses the
codes and sends them over the RISC bus.

## Parameters

Defaults match the target system:

| module | parameter | default | meaning |
|---|---|---|---|
| `encoder_top`, `dma` | `W`, `H` | 352, 288 | frame size |
| `encoder_top` | `SM_DEPTH` | 512 | share memory words |
| `me_pkg` | `SR`, `SW_SIZE`, `BANKS` | 16, 48, 8 | search range, window size, window banks |
| `motion_estimator` | `FIFO_DEPTH` | 8 | candidate FIFO depth |
| `enc_pkg` | `AW` | 18 | external memory word-address width |

## Where this RTL departs from the target system

* **Missing features:**
  * the processor, its cache and the external memory controller: the top
    exposes their connections as ports;
  * the VLC tables;
  * pads.
* **Own choices.** These are conventional choices, not specified by the
  target design:
  * the exact cost bias;
  * the diamond and spiral orders;
  * the DCT arithmetic;
  * the share memory size;
  * all handshakes.
* **Speed.**
  * PDS with all refinements took 1,700 to 3,200 cycles per macroblock in
    simulation on random texture, loads included. The budget at 40 MHz for
    CIF at 30 frames/s is 3,367 cycles, so the margin is thin on
    hard-to-search content.
  * Over a whole CIF macroblock row of smooth texture with changing motion,
    PDS averaged 1,965 cycles per macroblock, 2,749 at worst, loads included.
  * FFS took 10,500 to 21,800 cycles per macroblock. It gives full-search quality
    but not real time.
  * Window reuse brings search-window traffic to about 10 Mbytes/s at CIF 30
    frames/s; without reuse it would be about 27.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=M` and contains a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/enc_pkg.sv rtl/me_pkg.sv tb/tb_encoder_top.sv --top-module tb_encoder_top
./obj_dir/Vtb_encoder_top
```

Run it from the directory that contains `rtl/` and `tb/`.

`tb_encoder_top` runs the full CIF configuration. It builds a smooth textured
reference frame and a source frame that is the reference moved by (3,-2) plus
noise. It then codes two macroblocks of the second macroblock row:

* the first at the left border, in FFS mode, which exercises a full window
  load and padding;
* the next in PDS mode from a zero predictor, which exercises window reuse and
  diamond moves.

The blocks are compensated with the refined vectors. It checks:

* every integer vector against an exhaustive search;
* the refined vectors for sanity; `tb_motion_estimator` and `tb_me_halfpel`
  check them exactly against a model;
* every reconstructed block against its own decoder, which dequantises, runs
  an exact IDCT and adds a prediction computed from the frame;
* the bitstream bit by bit;
* one intra block with AC/DC prediction.

It also counts each mechanism and fails if any never happened: full and
reused window loads, padding, halfway terminations, diamond moves, half-pixel
compensation, inter and intra blocks, AC/DC prediction, memory stalls and
stuffing.

`tb_motion_estimator` checks the real-time cycle budget of the PDS mode.

`tb_cif_row` is the real-time workload. It runs motion estimation for all 22
macroblocks of one CIF macroblock row through `encoder_top` at its default
size. The processor's part is played by the testbench: it passes the left
neighbour's vector as the predictor and loads one new window strip per
macroblock. The motion changes every few macroblocks. The testbench checks:

* every vector against the true motion;
* the average and the worst cycle count per macroblock against the
  3,367-cycle budget;
* that a full window load, window reuse and right-border padding happened.
