// Testbench of tbe_quant: random coefficients for every qp, intra and
// inter, luminance and chrominance, DC and AC; level and reconstructed value
// compared with the MPEG-4 (H.263 method) rules evaluated here, one
// coefficient per cycle with one cycle of latency.
module tb_tbe_quant;
  logic clk = 0, rst_n = 0, in_valid = 0, is_dc, intra, luma, out_valid;
  logic signed [11:0] coef, level, rec; logic [4:0] qp; logic [5:0] dc_scaler;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  tbe_quant dut (.clk, .rst_n, .in_valid, .coef, .is_dc, .intra, .luma, .qp, .out_valid, .level, .rec, .dc_scaler);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic int dcs_of(int q, bit y);
    if (y) return q <= 4 ? 8 : (q <= 8 ? 2*q : (q <= 24 ? q + 8 : 2*q - 16));
    return q <= 4 ? 8 : (q <= 24 ? (q + 13) / 2 : q - 6);
  endfunction
  initial begin
    #(10 * 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 20000; i++) begin
      int c, q, l, r, m, s;
      q = $urandom_range(1, 31); intra = 1'($urandom); luma = 1'($urandom); is_dc = ($urandom_range(0, 3) == 0);
      c = (is_dc && intra) ? $urandom_range(0, 2040) : $urandom_range(0, 4095) - 2048;
      if (i % 10 == 0) c = $urandom_range(0, 40) - 20;
      coef = 12'(c); qp = 5'(q); in_valid = 1;
      if (intra && is_dc) begin
        s = dcs_of(q, luma);
        l = (c + s / 2) / s; if (l < 1) l = 1; if (l > 254) l = 254;
        r = l * s; if (r > 2047) r = 2047;
      end else begin
        m = c < 0 ? -c : c;
        if (!intra) m = (m > q / 2) ? m - q / 2 : 0;
        l = m / (2 * q); if (l > 2047) l = 2047;
        r = (l == 0) ? 0 : q * (2 * l + 1) - ((q % 2 == 0) ? 1 : 0);
        if (r > 2047) r = 2047;
        if (c < 0) begin l = -l; r = -r; end
      end
      @(negedge clk);
      check(out_valid && int'(level) == l && int'(rec) == r && int'(dc_scaler) == dcs_of(q, luma),
            $sformatf("coef %0d qp %0d intra %0b dc %0b: %0d/%0d exp %0d/%0d", c, q, intra, is_dc, level, rec, l, r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
