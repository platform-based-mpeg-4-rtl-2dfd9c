// tbe_acdc: AC/DC prediction of intra blocks in the texture block engine.
// For the block X being coded, with its left neighbour A, upper-left B and
// upper C, the gradient of the dequantised DC values chooses the direction:
// if |F_A - F_B| < |F_B - F_C| the prediction comes from above (C), otherwise
// from the left (A). A neighbour outside the VOP or not intra counts as DC
// 1024 and zero AC. Outputs, registered one cycle after `in_valid`:
//   dc_diff  = QF_X(0,0) - (F_P + dc_scaler/2) / dc_scaler
//   ac_res   = first row of X minus first row of C (from above), or first
//              column of X minus first column of A (from the left), seven
//              quantised AC values
//   s_orig / s_res: sums of the absolute values of those seven AC values
//              before and after prediction, from which the macroblock-level
//              AC prediction flag is decided (use it when s_res < s_orig
//              summed over the macroblock).
// The neighbouring AC values are taken as quantised with the same qp as X.
// The document names AC/DC prediction as a function of the engine; the
// rules are the MPEG-4 ones, and the interface is this design's choice.
module tbe_acdc (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [5:0]         dc_scaler,
  input  logic               avail_a,
  input  logic               avail_b,
  input  logic               avail_c,
  input  logic [11:0]        f_a,        // dequantised DC of A, B, C
  input  logic [11:0]        f_b,
  input  logic [11:0]        f_c,
  input  logic signed [11:0] ac_a [7],   // first column of A, rows 1..7
  input  logic signed [11:0] ac_c [7],   // first row of C, columns 1..7
  input  logic [7:0]         qf_dc,      // quantised DC of X
  input  logic signed [11:0] row_x [7],  // first row of X, columns 1..7
  input  logic signed [11:0] col_x [7],  // first column of X, rows 1..7
  output logic               out_valid,
  output logic               from_above,
  output logic signed [8:0]  dc_diff,
  output logic signed [12:0] ac_res [7],
  output logic [14:0]        s_orig,
  output logic [14:0]        s_res
);
  logic [11:0] fa, fb, fc, fp;
  logic [12:0] ga, gc;
  logic        vert;
  logic [8:0]  pdc;
  logic signed [12:0] res [7];
  logic [14:0] so, sr;

  function automatic logic [12:0] absdiff(input logic [11:0] p, input logic [11:0] q);
    return (p > q) ? 13'(p - q) : 13'(q - p);
  endfunction

  always_comb begin
    fa = avail_a ? f_a : 12'd1024;
    fb = avail_b ? f_b : 12'd1024;
    fc = avail_c ? f_c : 12'd1024;
    ga = absdiff(fa, fb);
    gc = absdiff(fb, fc);
    vert = (ga < gc);
    fp = vert ? fc : fa;
    pdc = 9'((13'(fp) + 13'(dc_scaler / 2)) / 13'(dc_scaler));
    so = '0; sr = '0;
    for (int i = 0; i < 7; i++) begin
      logic signed [11:0] cur, prd;
      cur = vert ? row_x[i] : col_x[i];
      prd = vert ? (avail_c ? ac_c[i] : 12'sd0) : (avail_a ? ac_a[i] : 12'sd0);
      res[i] = 13'(cur) - 13'(prd);
      so += 15'(cur[11] ? -cur : cur);
      sr += 15'(res[i][12] ? -res[i] : res[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; from_above <= 1'b0; dc_diff <= '0; s_orig <= '0; s_res <= '0;
      for (int i = 0; i < 7; i++) ac_res[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        from_above <= vert;
        dc_diff    <= 9'(signed'({1'b0, qf_dc})) - 9'(signed'({1'b0, pdc}));
        ac_res     <= res;
        s_orig     <= so;
        s_res      <= sr;
      end
    end
  end
endmodule
