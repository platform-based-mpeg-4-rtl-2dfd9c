// Testbench of bts_packer: random codes of 0..24 bits are packed; the
// emitted words, concatenated, must equal the bit string built here, and
// after each flush the stream must end on a byte boundary with the stuffing
// pattern 0 followed by ones. Bit count checked too.
module tb_bts_packer;
  logic clk = 0, rst_n = 0, in_valid = 0, flush = 0, out_valid, ready;
  logic [23:0] code; logic [4:0] len; logic [31:0] out_word, bit_count; logic [2:0] out_bytes;
  bit expbits [$], gotbits [$];
  int checks = 0, failures = 0, total = 0;
  always #5 clk = ~clk;
  bts_packer dut (.clk, .rst_n, .in_valid, .code, .len, .flush, .out_valid, .out_word, .out_bytes, .bit_count, .ready);
  always @(posedge clk) if (out_valid)
    for (int i = 0; i < 8 * int'(out_bytes); i++) gotbits.push_back(out_word[31 - i]);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", msg); end
  endtask
  initial begin
    #(10 * 200000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int seg = 0; seg < 40; seg++) begin
      int n, st;
      n = $urandom_range(1, 60);
      for (int i = 0; i < n; i++) begin
        int l;
        l = $urandom_range(0, 24);
        in_valid = 1; len = 5'(l); code = 24'($urandom);
        for (int b = l - 1; b >= 0; b--) expbits.push_back(code[b]);
        total += l;
        @(negedge clk);
      end
      in_valid = 0;
      st = 8 - (expbits.size() % 8);
      expbits.push_back(0);
      for (int b = 1; b < st; b++) expbits.push_back(1);
      total += st;
      flush = 1; @(negedge clk); flush = 0;
      while (!ready) @(negedge clk);
      @(negedge clk);
      check(gotbits.size() == expbits.size(), $sformatf("stream length %0d exp %0d", gotbits.size(), expbits.size()));
      for (int i = 0; i < expbits.size() && i < gotbits.size(); i++)
        if (gotbits[i] != expbits[i]) begin check(0, $sformatf("bit %0d", i)); break; end
      check(gotbits.size() % 8 == 0, "byte aligned");
      check(int'(bit_count) == total, "bit count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
