// share_mem: share memory of the platform. A two-port RAM that gives the
// direct channels between accelerators without using the DATA bus: the
// motion compensator writes compensated blocks that the texture block engine
// reads, and the texture engine writes quantised coefficients that the
// bitstream generator reads. Port A and port B each read or write one 32-bit
// word per cycle; reads return data on the next cycle. In test mode the SHARE
// bus reaches the same contents through port B. Size and word width are
// this design's choices (not given); a simultaneous write of one word from
// both ports keeps port B's data.
module share_mem #(
  parameter int unsigned DEPTH = 512,
  parameter int unsigned DW    = 32,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  logic [DW-1:0] a_wdata,
  output logic [DW-1:0] a_rdata,
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  logic [DW-1:0] b_wdata,
  output logic [DW-1:0] b_rdata
);
  logic [DW-1:0] mem [DEPTH];
  always_ff @(posedge clk) begin
    if (a_en && a_we) mem[a_addr] <= a_wdata;
    if (b_en && b_we) mem[b_addr] <= b_wdata;
    if (a_en && !a_we) a_rdata <= mem[a_addr];
    if (b_en && !b_we) b_rdata <= mem[b_addr];
  end
endmodule
