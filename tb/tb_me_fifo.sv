// Testbench of me_fifo: random pushes and pops compared with a queue model,
// including the full and empty flags.
module tb_me_fifo;
  logic clk = 0, rst_n = 0, push = 0, pop = 0, full, empty;
  logic [15:0] din, dout; logic [15:0] q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  me_fifo #(.T(logic [15:0]), .DEPTH(8)) dut (.clk, .rst_n, .push, .din, .pop, .dout, .full, .empty);
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  initial begin
    #(10 * 10000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(negedge clk); rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      check(empty == (q.size() == 0), "empty flag");
      check(full == (q.size() == 8), "full flag");
      if (q.size() > 0) check(dout == q[0], "head data");
      push = (i < 1500) ? ($urandom_range(0, 3) != 0) : ($urandom_range(0, 3) == 0);
      pop  = (i < 1500) ? ($urandom_range(0, 3) == 0) : ($urandom_range(0, 3) != 0);
      if (full) push = 0;
      if (empty) pop = 0;
      din = 16'($urandom);
      @(posedge clk); #1;
      if (pop) void'(q.pop_front());
      if (push) q.push_back(din);
      push = 0; pop = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
