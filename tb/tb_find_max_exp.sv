// tb_find_max_exp: checks the maximum of ten signed exponents against a
// sequential scan, for random and for negative-only inputs.
module tb_find_max_exp;
  import dpu_pkg::*;
  exp_t e [N_MUL];
  exp_t mx, ref_mx;
  int checks = 0, failures = 0;

  find_max_exp dut (.exp_ab(e), .max_exp(mx));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      for (int k = 0; k < int'(N_MUL); k++)
        e[k] = (i % 4 == 0) ? -exp_t'(1 + $urandom % 3000) : exp_t'($urandom);
      ref_mx = e[0];
      for (int k = 1; k < int'(N_MUL); k++) if (e[k] > ref_mx) ref_mx = e[k];
      #1;
      checks++;
      if (mx !== ref_mx) begin
        failures++;
        if (failures < 10) $display("FAIL max=%0d ref=%0d", mx, ref_mx);
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
