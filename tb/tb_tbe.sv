// Testbench of tbe: intra and inter blocks with random source pixels and a
// random prediction (held in a share-memory model that answers reads one
// cycle later). Checks:
//  - the 64 levels written to the share memory are within 1 of the
//    quantisation (MPEG-4 H.263 rules) of the exact floating-point DCT of
//    source minus prediction computed here;
//  - the reconstructed block is the source within the quantisation error
//    (mean absolute error below qp, maximum below 4 qp + 4);
//  - the DC level and first row/column kept for AC/DC prediction equal the
//    levels written;
//  - a block takes at most 561 cycles (a sixth of the macroblock period of
//    30 CIF frames/s at 40 MHz).
module tb_tbe;
  import enc_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, intra, luma = 1, busy, done;
  logic [4:0] qp; logic sm_en, sm_we; logic [8:0] sm_addr; word_t sm_wdata, sm_rdata;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0; word_t in_data, out_data;
  logic [7:0] qf_dc; logic signed [11:0] row_x [7], col_x [7]; logic [5:0] dc_scaler; logic [11:0] rec_dc;
  word_t smem [512];
  int checks = 0, failures = 0, cyc = 0;
  real pi = 3.14159265358979;
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (sm_en) begin
    if (sm_we) smem[sm_addr] <= sm_wdata; else sm_rdata <= smem[sm_addr];
  end
  tbe dut (.clk, .rst_n, .start, .intra, .luma, .qp, .pred_base(9'd0), .lvl_base(9'd64), .busy, .done,
           .sm_en, .sm_we, .sm_addr, .sm_wdata, .sm_rdata, .in_valid, .in_data, .in_ready,
           .out_valid, .out_data, .out_ready, .qf_dc, .row_x, .col_x, .dc_scaler, .rec_dc);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  function automatic real a_(int k); return k == 0 ? 1.0 / $sqrt(2.0) : 1.0; endfunction
  function automatic int dcs_of(int q);
    return q <= 4 ? 8 : (q <= 8 ? 2*q : (q <= 24 ? q + 8 : 2*q - 16));
  endfunction
  task automatic run(input bit intr, input int q);
    int s [64], p [64], lv [64], t0, n = 0, tot = 0, mx = 0;
    intra = intr; qp = 5'(q);
    for (int i = 0; i < 64; i++) begin
      s[i] = $urandom_range(40, 215);
      p[i] = intr ? 0 : s[i] + $urandom_range(0, 40) - 20;
    end
    for (int w = 0; w < 16; w++) smem[w] = {8'(p[4*w+3]), 8'(p[4*w+2]), 8'(p[4*w+1]), 8'(p[4*w])};
    @(negedge clk) start = 1; t0 = cyc; @(negedge clk) start = 0;
    for (int w = 0; w < 16; w++) begin
      in_valid = 1; in_data = {8'(s[4*w+3]), 8'(s[4*w+2]), 8'(s[4*w+1]), 8'(s[4*w])};
      #1 while (!in_ready) begin @(negedge clk); #1; end
      @(negedge clk);
    end
    in_valid = 0; out_ready = 1;
    while (n < 16) begin
      #1;
      if (out_valid) begin
        for (int j = 0; j < 4; j++) begin
          int e = int'(out_data[8*j +: 8]) - s[4*n + j];
          e = e < 0 ? -e : e; tot += e; if (e > mx) mx = e;
        end
        n++;
      end
      @(negedge clk);
    end
    out_ready = 0;
    check(cyc - t0 <= 561, $sformatf("block in %0d cycles", cyc - t0));
    check(tot < q * 64 && mx <= 4 * q + 4, $sformatf("%s qp %0d reconstruction error: mean*64 %0d max %0d", intr ? "intra" : "inter", q, tot, mx));
    // levels against the exact transform
    for (int v = 0; v < 8; v++) for (int u = 0; u < 8; u++) begin
      real f = 0.0; int c, l, m, got;
      for (int y = 0; y < 8; y++) for (int x = 0; x < 8; x++)
        f += (s[8*y + x] - p[8*y + x]) * $cos((2*x + 1) * u * pi / 16) * $cos((2*y + 1) * v * pi / 16);
      f = f * a_(u) * a_(v) / 4.0;
      c = $rtoi(f >= 0 ? f + 0.5 : f - 0.5);
      if (intr && u == 0 && v == 0) l = (c + dcs_of(q) / 2) / dcs_of(q);
      else begin
        m = c < 0 ? -c : c;
        if (!intr) m = (m > q / 2) ? m - q / 2 : 0;
        l = m / (2 * q); if (c < 0) l = -l;
      end
      got = int'(signed'(smem[64 + 8*v + u]));
      lv[8*v + u] = got;
      check(got - l <= 1 && l - got <= 1, $sformatf("level (%0d,%0d) %0d exp %0d", v, u, got, l));
    end
    check(int'(qf_dc) == (lv[0] & 255), "kept DC level");
    for (int i = 0; i < 7; i++) check(int'(row_x[i]) == lv[i + 1] && int'(col_x[i]) == lv[8 * (i + 1)], "kept row/column");
  endtask
  initial begin
    #(10 * 100000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    run(1, 2); run(0, 2); run(1, 5); run(0, 4); run(0, 1); run(1, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
