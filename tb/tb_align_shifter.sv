// tb_align_shifter: checks the aligned term against the value
// (+-) man_pp * 2^(36 - delta - seg_shift), truncated toward zero in
// magnitude, for random shifts in and beyond the 61-bit window.
module tb_align_shifter;
  import dpu_pkg::*;
  logic        s, neg;
  logic [23:0] pp;
  logic [10:0] delta;
  logic [6:0]  seg;
  logic [60:0] term;
  logic signed [127:0] v;
  int sh, checks = 0, failures = 0;

  align_shifter dut (.sign_ab(s), .negate(neg), .man_pp(pp), .delta(delta), .seg_shift(seg), .term(term));

  initial begin
    for (int i = 0; i < 10000; i++) begin
      s = 1'($urandom); neg = (i % 5 != 0); pp = 24'($urandom);
      delta = (i % 50 == 0) ? 11'($urandom) : 11'($urandom % 50);
      seg = 7'(12 * ($urandom % 4));
      sh = int'(delta) + int'(seg);
      if (sh <= 36) v = 128'(pp) <<< (36 - sh);
      else          v = 128'(pp) >>> (sh - 36);
      if (s && neg) v = -v;
      #1;
      checks++;
      if (term !== 61'(v)) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h sh=%0d term=%h", pp, sh, term);
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
