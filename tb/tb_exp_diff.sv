// tb_exp_diff: checks delta = max - exp, saturated at 2047, for random
// pairs with max >= exp, including gaps beyond the 11-bit range.
module tb_exp_diff;
  import dpu_pkg::*;
  exp_t mx, e;
  logic [10:0] delta;
  int d, checks = 0, failures = 0;

  exp_diff dut (.max_exp(mx), .exp_ab(e), .delta(delta));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      mx = exp_t'(int'($urandom % 4000) - 1000);
      e  = exp_t'(int'(mx) - int'($urandom % ((i % 2) ? 40 : 3000)));
      d  = int'(mx) - int'(e);
      if (d > 2047) d = 2047;
      #1;
      checks++;
      if (int'(delta) != d) begin
        failures++;
        if (failures < 10) $display("FAIL max=%0d e=%0d delta=%0d ref=%0d", mx, e, delta, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
