// tb_fused_mul: checks the three modes of the fused Booth multiplier:
// A*C, A*C[4:0] + B*C[10:6] and A*C[4:0] + {C[4:0],B}*C[10:6], with random
// operands and all-ones corners.
module tb_fused_mul;
  import dpu_pkg::*;
  fmode_e      mode;
  logic [11:0] a, b, c;
  logic [23:0] p, exp_p;
  int checks = 0, failures = 0;

  fused_mul dut (.mode(mode), .a(a), .b(b), .c(c), .p(p));

  task automatic check();
    case (mode)
      FM_12X12:  exp_p = 24'(a) * 24'(c);
      FM_2X12X5: exp_p = 24'(a) * 24'(c[4:0]) + 24'(b) * 24'(c[10:6]);
      default:   exp_p = 24'(a) * 24'(c[4:0]) + 24'({c[4:0], b}) * 24'(c[10:6]);
    endcase
    #1;
    checks++;
    if (p !== exp_p) begin
      failures++;
      if (failures < 10) $display("FAIL mode=%0d a=%h b=%h c=%h p=%h exp=%h", mode, a, b, c, p, exp_p);
    end
  endtask

  initial begin
    for (int m = 0; m < 3; m++) begin
      mode = fmode_e'(m);
      a = '1; b = '1; c = (m == 0) ? 12'hfff : 12'b0_11111_0_11111;
      check();
      for (int i = 0; i < 10000; i++) begin
        a = 12'($urandom); b = 12'($urandom); c = 12'($urandom);
        if (m != 0) begin c[5] = 1'b0; c[11] = 1'b0; end
        check();
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
