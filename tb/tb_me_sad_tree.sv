// Testbench of me_sad_tree: random and extreme operand pairs; the registered
// sum of absolute differences must match a direct computation one cycle later.
module tb_me_sad_tree;
  logic clk = 0, rst_n = 0, in_valid = 0, in_last = 0, out_valid, out_last;
  logic [63:0] a, b; logic [10:0] sad; int expv;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_sad_tree dut (.clk, .rst_n, .in_valid, .in_last, .a, .b, .out_valid, .out_last, .sad);
  initial begin
    #(10 * 5000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      a = {$urandom, $urandom}; b = {$urandom, $urandom};
      if (i == 0) begin a = '1; b = '0; end
      if (i == 1) begin a = '0; b = '1; end
      in_valid = 1; in_last = 1'(i % 2);
      expv = 0;
      for (int k = 0; k < 8; k++) expv += (a[8*k +: 8] > b[8*k +: 8]) ? a[8*k +: 8] - b[8*k +: 8] : b[8*k +: 8] - a[8*k +: 8];
      @(negedge clk);
      checks++;
      if (sad !== 11'(expv) || !out_valid || out_last !== 1'(i % 2)) begin
        failures++; $display("FAIL: sad %0d exp %0d", sad, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
