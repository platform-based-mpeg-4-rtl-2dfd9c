// tbe_quant: quantiser and inverse quantiser (Q/IQ) of the texture block
// engine. Each cycle one DCT coefficient is quantised and, in the same
// pipeline stage, the resulting level is dequantised again for the
// reconstruction loop; both results are registered (one cycle latency, one
// coefficient per cycle). The rules are those of the MPEG-4 simple profile
// (H.263 quantisation method), quantiser scale qp = 1..31:
//   intra DC:  level = (coef + dc_scaler/2) / dc_scaler, 1..254;
//              rec = level * dc_scaler (saturated to 2047)
//   intra AC:  |level| = |coef| / (2 qp)
//   inter:     |level| = max(0, |coef| - qp/2) / (2 qp)
//   AC, inter: |rec| = qp (2|level| + 1) - (1 if qp even), 0 for level 0
// with |level| clipped to 2047 and rec saturated to 12-bit signed. The
// dc_scaler follows the MPEG-4 table (luminance: 8 up to qp 4, 2qp up to 8,
// qp+8 up to 24, then 2qp-16; chrominance: 8 up to 4, (qp+13)/2 up to 24,
// then qp-6). The document only names Q and IQ; the rules are the standard's.
module tbe_quant (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic signed [11:0] coef,
  input  logic               is_dc,     // first coefficient of an intra block
  input  logic               intra,
  input  logic               luma,
  input  logic [4:0]         qp,
  output logic               out_valid,
  output logic signed [11:0] level,
  output logic signed [11:0] rec,
  output logic [5:0]         dc_scaler
);
  logic [5:0]  dcs;
  logic [11:0] mag, lvl_mag;
  logic [12:0] num;
  logic [17:0] rmag;
  logic signed [11:0] lvl_n, rec_n;
  logic [16:0] dcq;

  always_comb begin
    dcq = '0;
    if (luma) begin
      if (qp <= 5'd4)       dcs = 6'd8;
      else if (qp <= 5'd8)  dcs = 6'(2 * qp);
      else if (qp <= 5'd24) dcs = 6'(qp + 5'd8);
      else                  dcs = 6'(2 * qp - 16);
    end else begin
      if (qp <= 5'd4)       dcs = 6'd8;
      else if (qp <= 5'd24) dcs = 6'((qp + 5'd13) / 2);
      else                  dcs = 6'(qp - 5'd6);
    end
    mag = coef[11] ? 12'(-coef) : 12'(coef);
    num = intra ? 13'(mag) : ((mag > 12'(qp / 2)) ? 13'(mag - 12'(qp / 2)) : 13'd0);
    lvl_mag = 12'(num / 13'(2 * qp));
    if (lvl_mag > 12'd2047) lvl_mag = 12'd2047;
    rmag = (lvl_mag == 0) ? 18'd0 : 18'(qp) * (18'(2) * 18'(lvl_mag) + 18'd1) - 18'(!qp[0]);
    if (rmag > 18'd2047) rmag = 18'd2047;
    if (intra && is_dc) begin
      dcq = 17'((coef[11] ? 12'd0 : 12'(coef)) + 12'(dcs / 2)) / 17'(dcs);
      if (dcq < 17'd1) dcq = 17'd1;
      if (dcq > 17'd254) dcq = 17'd254;
      lvl_n = 12'(dcq);
      rec_n = (dcq * 17'(dcs) > 17'd2047) ? 12'sd2047 : 12'(dcq * 17'(dcs));
    end else begin
      lvl_n = coef[11] ? -12'(lvl_mag) : 12'(lvl_mag);
      rec_n = coef[11] ? -12'(rmag) : 12'(rmag);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0; level <= '0; rec <= '0; dc_scaler <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        level <= lvl_n; rec <= rec_n; dc_scaler <= dcs;
      end
    end
  end
endmodule
