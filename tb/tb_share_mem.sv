// Testbench of share_mem: random reads and writes from both ports against an
// array model, reads returning data one cycle later; a word written on one
// port must be readable on the other (the MC -> TBE and TBE -> BTS
// channels).
module tb_share_mem;
  logic clk = 0, a_en = 0, a_we = 0, b_en = 0, b_we = 0;
  logic [8:0] a_addr, b_addr; logic [31:0] a_wdata, b_wdata, a_rdata, b_rdata;
  logic [31:0] model [512];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  share_mem dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata, .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);
  initial begin
    #(10 * 50000); failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 512; i++) begin
      @(negedge clk); a_en = 1; a_we = 1; a_addr = 9'(i); a_wdata = $urandom; model[i] = a_wdata;
    end
    @(negedge clk); a_en = 0;
    for (int t = 0; t < 5000; t++) begin
      logic [31:0] ea, eb; bit ra, rb;
      @(negedge clk);
      a_en = 1; a_we = 1'($urandom); a_addr = 9'($urandom); a_wdata = $urandom;
      b_en = 1; b_we = 1'($urandom); b_addr = 9'($urandom); b_wdata = $urandom;
      if (a_we && b_we && a_addr == b_addr) a_we = 0;
      ra = !a_we; rb = !b_we; ea = model[a_addr]; eb = model[b_addr];
      if (a_we) model[a_addr] = a_wdata;
      if (b_we) model[b_addr] = b_wdata;
      @(negedge clk); a_en = 0; b_en = 0;
      if (ra) begin checks++; if (a_rdata !== ea) begin failures++; $display("FAIL: port A read"); end end
      if (rb) begin checks++; if (b_rdata !== eb) begin failures++; $display("FAIL: port B read"); end end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
