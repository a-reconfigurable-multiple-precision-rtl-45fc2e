// tb_rounding: checks roundTiesToAway rounding and packing against the
// reference model: random fractions, exact ties, all-ones fractions that
// carry into the exponent, overflow to infinity, underflow to zero and zero.
module tb_rounding;
  import dpu_pkg::*;
  import tb_ref_pkg::*;
  prec_e prec;
  logic [106:0] norm;
  exp_t ea;
  logic s, nz, so, en, ov, un;
  logic [10:0] eo;
  logic [51:0] mo;
  res_t r;
  int p, f, checks = 0, failures = 0;

  rounding dut (.prec(prec), .norm(norm), .exp_add(ea), .sign_res(s), .nonzero(nz),
                .sign_out(so), .exp_out(eo), .man_out(mo), .exp_norm(en),
                .overflow(ov), .underflow(un));

  initial begin
    for (int i = 0; i < 9000; i++) begin
      p = i % 3; f = fbits(p);
      prec = prec_e'(p);
      norm = {$urandom, $urandom, $urandom, $urandom};
      norm[106] = 1'b1;
      case ((i / 3) % 6)
        1: begin norm[105-f] = 1'b1; norm = norm & ~((107'(1) << (105 - f)) - 1); end  // tie
        2: norm[105 -: 53] = '1;                                                   // carry
        default: ;
      endcase
      ea = exp_t'(int'($urandom % 32'((1 << ebits(p)) + 4)) - 2);
      s  = 1'($urandom);
      nz = ((i / 3) % 50 != 7);
      if (!nz) norm = '0;
      r = round_ref(s, 512'(norm), int'(ea) - biasp(p) - 106, p);
      #1;
      checks++;
      if ({so, eo, mo} !== r) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d ea=%0d got %b %h %h ref %b %h %h", p, ea, so, eo, mo, r.s, r.e, r.m);
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
