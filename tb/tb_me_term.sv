// Testbench of me_term: terminate exactly when a candidate is active and its
// partial cost has reached the minimum so far, over random and boundary values.
module tb_me_term;
  import me_pkg::*;
  logic active, terminate; logic [SADW-1:0] partial, min_cost;
  int checks = 0, failures = 0;
  me_term dut (.active, .partial, .min_cost, .terminate);
  initial begin
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      active = 1'($urandom); min_cost = SADW'($urandom_range(0, 3000));
      unique case (i % 3)
        0: partial = min_cost;
        1: partial = min_cost - SADW'(1);
        default: partial = SADW'($urandom_range(0, 3000));
      endcase
      #1; checks++;
      if (terminate !== (active && partial >= min_cost)) begin failures++; $display("FAIL %0d %0d %0d", active, partial, min_cost); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
endmodule
