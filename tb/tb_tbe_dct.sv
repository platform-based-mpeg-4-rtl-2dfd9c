// Testbench of tbe_dct: random residual blocks through the forward DCT and
// random coefficient blocks through the IDCT, each output compared with the
// transform computed here in floating point (tolerance 1); a forward then
// inverse round trip must give back the block within 1. The block must take
// 192 cycles from its first input to its last output.
module tb_tbe_dct;
  logic clk = 0, rst_n = 0, start = 0, inverse = 0, in_valid = 0, in_ready, out_valid, busy;
  logic signed [11:0] in_data, out_data;
  int checks = 0, failures = 0, cyc = 0;
  real pi = 3.14159265358979;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  tbe_dct dut (.clk, .rst_n, .start, .inverse, .in_valid, .in_data, .in_ready, .out_valid, .out_data, .busy);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic real a_(int k); return k == 0 ? 1.0 / $sqrt(2.0) : 1.0; endfunction
  task automatic xform(input bit inv, input int x [64], output int y [64], input bit check_ref);
    int t0, n = 0;
    inverse = inv;
    @(negedge clk) start = 1; @(negedge clk) start = 0;
    t0 = cyc;
    for (int i = 0; i < 64; i++) begin in_valid = 1; in_data = 12'(x[i]); @(negedge clk); end
    in_valid = 0;
    while (n < 64) begin
      #1;
      if (out_valid) begin y[n] = int'(out_data); n++; end
      @(negedge clk);
    end
    check(cyc - t0 == 192, $sformatf("block latency %0d cycles", cyc - t0));
    if (check_ref)
      for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
        real s = 0.0; int r;
        for (int yy = 0; yy < 8; yy++) for (int xx = 0; xx < 8; xx++)
          if (!inv) s += x[8*yy + xx] * $cos((2*xx + 1) * u * pi / 16) * $cos((2*yy + 1) * v * pi / 16);
          else      s += a_(xx) * a_(yy) * x[8*yy + xx] * $cos((2*u + 1) * xx * pi / 16) * $cos((2*v + 1) * yy * pi / 16);
        if (!inv) s = s * a_(u) * a_(v) / 4.0; else s = s / 4.0;
        r = $rtoi(s >= 0 ? s + 0.5 : s - 0.5);
        check(y[8*v + u] - r <= 1 && r - y[8*v + u] <= 1,
              $sformatf("%s (%0d,%0d): %0d exp %0d", inv ? "IDCT" : "DCT", v, u, y[8*v + u], r));
      end
  endtask
  initial begin
    #(10 * 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int x [64], y [64], z [64];
    repeat (2) @(negedge clk); rst_n = 1;
    for (int b = 0; b < 12; b++) begin
      for (int i = 0; i < 64; i++) x[i] = (b == 0) ? 255 : (b == 1 ? -255 : $urandom_range(0, 510) - 255);
      xform(0, x, y, 1);
      xform(1, y, z, 1);
      for (int i = 0; i < 64; i++) check(z[i] - x[i] <= 1 && x[i] - z[i] <= 1, "round trip");
    end
    for (int b = 0; b < 6; b++) begin
      for (int i = 0; i < 64; i++) x[i] = ($urandom_range(0, 3) == 0) ? $urandom_range(0, 400) - 200 : 0;
      xform(1, x, y, 1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
