// tb_exp_adder: checks exp_add = max + 106 - lza_cnt - K + bias with the
// per-precision constants K = 71, 185, 1127 (FP16, FP32, FP64) written out
// here from the window layout.
module tb_exp_adder;
  import dpu_pkg::*;
  prec_e prec;
  exp_t mx, ea;
  logic [6:0] cnt;
  int k, b, checks = 0, failures = 0;

  exp_adder dut (.prec(prec), .max_exp(mx), .lza_cnt(cnt), .exp_add(ea));

  initial begin
    for (int i = 0; i < 3000; i++) begin
      prec = prec_e'(i % 3);
      k = (i % 3 == 0) ? 71 : (i % 3 == 1) ? 185 : 1127;
      b = (i % 3 == 0) ? 15 : (i % 3 == 1) ? 127 : 1023;
      mx = exp_t'(int'($urandom % 3000) - 1000);
      cnt = 7'($urandom % 108);
      #1;
      checks++;
      if (int'(ea) != int'(mx) + 106 - int'(cnt) - k + b) begin
        failures++;
        if (failures < 10) $display("FAIL prec=%0d ea=%0d", prec, ea);
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
