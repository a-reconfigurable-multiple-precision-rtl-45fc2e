// tb_booth_mul: checks the 12x12 radix-4 Booth multiplier against the
// integer product for corner operands and 20000 random pairs.
module tb_booth_mul;
  import dpu_pkg::*;
  logic [11:0] a, c;
  logic [23:0] p;
  int checks = 0, failures = 0;

  booth_mul dut (.a(a), .c(c), .p(p));

  task automatic check();
    #1;
    checks++;
    if (p !== 24'(a) * 24'(c)) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h c=%h p=%h", a, c, p);
    end
  endtask

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = (i & 1) ? 12'hfff : 12'(i * 255); c = (i & 2) ? 12'hfff : 12'(i * 273);
      check();
    end
    for (int i = 0; i < 20000; i++) begin
      a = 12'($urandom); c = 12'($urandom);
      check();
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
