// bts_packer: bit packing of the bitstream generator. The RISC (or the
// texture path) hands over variable-length codes as (code, length) pairs, one
// per cycle, right-aligned in `code`; the packer concatenates them most
// significant bit first into 32-bit words and emits each word as soon as it
// is full, so the bitstream is never stored bit by bit. `flush` ends the
// stream at a byte boundary with MPEG-4 stuffing (a 0 followed by 1s, one to
// eight bits) and emits the partly filled last word, left-aligned, with the
// number of valid bytes; when the stuffing spills into a second word, that
// word follows one cycle later, and `ready` is low meanwhile. Code length 0..24 bits.
// The hardware/software split of bitstream generation is from the document;
// this packer, its interface and the stuffing rule (taken from the MPEG-4
// syntax) are this design's choices. The VLC tables are not included.
module bts_packer (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic [23:0] code,
  input  logic [4:0]  len,
  input  logic        flush,
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic [2:0]  out_bytes,   // valid bytes of out_word (4 unless after flush)
  output logic [31:0] bit_count,
  output logic        ready        // low for one cycle while a flush emits its second word
);
  logic [55:0] acc;       // pending bits, left-aligned at bit 55
  logic [5:0]  fill;      // number of pending bits (< 32 between codes)
  logic [55:0] ins;
  logic [5:0]  nfill;
  logic [4:0]  l;
  logic [23:0] cd;
  logic [3:0]  stuff;
  logic        tail;      // flushed bits left for a second word

  assign ready = !tail;

  always_comb begin
    stuff = 4'(8 - (fill % 8));        // 1..8 stuffing bits
    if (flush) begin
      l  = 5'(stuff);
      cd = 24'((1 << (stuff - 1)) - 1); // 0 followed by stuff-1 ones
    end else begin
      l  = in_valid ? len : 5'd0;
      cd = code & 24'((1 << len) - 1);
    end
    ins   = (56'(cd) << (56 - int'(l))) >> fill;
    nfill = fill + 6'(l);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; fill <= '0; out_valid <= 1'b0; out_word <= '0; out_bytes <= '0; bit_count <= '0;
      tail <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (tail) begin
        out_valid <= 1'b1;
        out_word  <= acc[55:24];
        out_bytes <= 3'(fill / 8);
        acc  <= '0;
        fill <= '0;
        tail <= 1'b0;
      end else begin
      bit_count <= bit_count + 32'(l);
      if (flush) begin
        out_valid <= (nfill != 0);
        out_word  <= acc[55:24] | ins[55:24];
        out_bytes <= 3'(nfill / 8);
        acc  <= '0;
        fill <= '0;
        if (nfill > 6'd32) begin   // stream ends in a second word: emit the first now
          out_word  <= acc[55:24] | ins[55:24];
          out_bytes <= 3'd4;
          acc  <= (acc | ins) << 32;
          fill <= nfill - 6'd32;
          tail <= 1'b1;
        end
      end else if (nfill >= 6'd32) begin
        out_valid <= 1'b1;
        out_word  <= acc[55:24] | ins[55:24];
        out_bytes <= 3'd4;
        acc  <= (acc | ins) << 32;
        fill <= nfill - 6'd32;
      end else begin
        acc  <= acc | ins;
        fill <= nfill;
      end
      end
    end
  end
endmodule
