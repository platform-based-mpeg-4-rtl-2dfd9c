// me_sad_tree: adder tree of the distortion calculation stage.
// Takes a half row of eight current-macroblock pixels and the eight matching
// search-window pixels (64 bits each) and sums their eight absolute
// differences through a three-level adder tree. The result is registered, so
// it follows the operands by one cycle, together with its valid/first/last
// tags.
module me_sad_tree (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_last,
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic        out_valid,
  output logic        out_last,
  output logic [10:0] sad
);
  logic [7:0]  d  [8];
  logic [8:0]  s1 [4];
  logic [9:0]  s2 [2];
  logic [10:0] s3;

  always_comb begin
    for (int i = 0; i < 8; i++)
      d[i] = (a[8*i +: 8] > b[8*i +: 8]) ? a[8*i +: 8] - b[8*i +: 8] : b[8*i +: 8] - a[8*i +: 8];
    for (int i = 0; i < 4; i++) s1[i] = 9'(d[2*i]) + 9'(d[2*i+1]);
    for (int i = 0; i < 2; i++) s2[i] = 10'(s1[2*i]) + 10'(s1[2*i+1]);
    s3 = 11'(s2[0]) + 11'(s2[1]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; out_last <= 1'b0; sad <= '0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && in_last;
      sad       <= s3;
    end
  end
endmodule
