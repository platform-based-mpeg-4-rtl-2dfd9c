// Testbench of tbe_acdc: random neighbour DC values (with and without
// availability), random AC rows and columns; direction, DC difference,
// seven AC residuals and both absolute sums compared with the MPEG-4
// gradient rule evaluated here. Both directions must occur.
module tb_tbe_acdc;
  logic clk = 0, rst_n = 0, in_valid = 0, avail_a, avail_b, avail_c, out_valid, from_above;
  logic [5:0] dc_scaler; logic [11:0] f_a, f_b, f_c; logic [7:0] qf_dc;
  logic signed [11:0] ac_a [7], ac_c [7], row_x [7], col_x [7];
  logic signed [8:0] dc_diff; logic signed [12:0] ac_res [7]; logic [14:0] s_orig, s_res;
  int checks = 0, failures = 0, n_above = 0, n_left = 0;
  always #5 clk = ~clk;
  tbe_acdc dut (.clk, .rst_n, .in_valid, .dc_scaler, .avail_a, .avail_b, .avail_c, .f_a, .f_b, .f_c,
                .ac_a, .ac_c, .qf_dc, .row_x, .col_x, .out_valid, .from_above, .dc_diff, .ac_res, .s_orig, .s_res);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic int iabs(int a); return a < 0 ? -a : a; endfunction
  initial begin
    #(10 * 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      int fa, fb, fc, fp, s, pd, so, sr, res [7]; bit up;
      so = 0; sr = 0;
      s = $urandom_range(8, 46); dc_scaler = 6'(s);
      avail_a = ($urandom_range(0, 3) != 0); avail_b = ($urandom_range(0, 3) != 0); avail_c = ($urandom_range(0, 3) != 0);
      f_a = 12'($urandom_range(0, 2047)); f_b = 12'($urandom_range(0, 2047)); f_c = 12'($urandom_range(0, 2047));
      qf_dc = 8'($urandom_range(1, 254));
      for (int i = 0; i < 7; i++) begin
        ac_a[i] = 12'($urandom_range(0, 200) - 100); ac_c[i] = 12'($urandom_range(0, 200) - 100);
        row_x[i] = 12'($urandom_range(0, 200) - 100); col_x[i] = 12'($urandom_range(0, 200) - 100);
      end
      fa = avail_a ? int'(f_a) : 1024; fb = avail_b ? int'(f_b) : 1024; fc = avail_c ? int'(f_c) : 1024;
      up = iabs(fa - fb) < iabs(fb - fc);
      fp = up ? fc : fa;
      pd = (fp + s / 2) / s;
      for (int i = 0; i < 7; i++) begin
        int cur, prd;
        cur = up ? int'(row_x[i]) : int'(col_x[i]);
        prd = up ? (avail_c ? int'(ac_c[i]) : 0) : (avail_a ? int'(ac_a[i]) : 0);
        res[i] = cur - prd; so += iabs(cur); sr += iabs(res[i]);
      end
      in_valid = 1;
      @(negedge clk);
      check(out_valid && from_above == up, "direction");
      check(int'(dc_diff) == int'(qf_dc) - pd, $sformatf("dc diff %0d exp %0d", dc_diff, int'(qf_dc) - pd));
      for (int i = 0; i < 7; i++) check(int'(ac_res[i]) == res[i], $sformatf("AC residual %0d: %0d exp %0d (cur %0d %0d)", i, ac_res[i], res[i], row_x[i], col_x[i]));
      check(int'(s_orig) == so && int'(s_res) == sr, "sums");
      if (up) n_above++; else n_left++;
    end
    check(n_above > 0 && n_left > 0, "both directions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
