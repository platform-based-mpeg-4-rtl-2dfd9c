// Testbench of me_range_check: every vector with components in -32..31 is
// valid exactly when both components lie in -16..15.
module tb_me_range_check;
  import me_pkg::*;
  cand_t c; logic valid;
  int checks = 0, failures = 0;
  me_range_check dut (.cand(c), .valid);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int u = -32; u < 32; u++)
      for (int v = -32; v < 32; v++) begin
        c = '{id: 3'(u & 7), u: mv_t'(u), v: mv_t'(v)}; #1;
        checks++;
        if (valid !== (u >= -16 && u <= 15 && v >= -16 && v <= 15)) begin
          failures++; $display("FAIL: %0d,%0d -> %0b", u, v, valid);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
