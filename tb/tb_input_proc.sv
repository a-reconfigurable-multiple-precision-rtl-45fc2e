// tb_input_proc: checks the operand split of input processing. For each
// precision it rebuilds, from the lanes of both cycles, every significand
// product as sum(lane product << segment position) and compares it with the
// directly computed product; it also checks signs, exponents, and that each
// product uses the lanes the split assigns to it.
module tb_input_proc;
  import dpu_pkg::*;
  import tb_ref_pkg::*;
  logic [159:0] aw, bw;
  prec_e        prec;
  logic         phase;
  lane_t        lanes [N_MUL];
  lane_t        l0 [N_MUL], l1 [N_MUL];
  int checks = 0, failures = 0;
  logic [63:0]  va [10], vb [10];

  input_proc dut (.a_word(aw), .b_word(bw), .prec(prec), .phase(phase), .lanes(lanes));

  function automatic logic [127:0] lprod(lane_t l);
    case (l.fmode)
      FM_12X12:  return 128'(l.man_a) * 128'(l.man_c);
      FM_2X12X5: return 128'(l.man_a) * 128'(l.man_c[4:0]) + 128'(l.man_b) * 128'(l.man_c[10:6]);
      default:   return 128'(l.man_a) * 128'(l.man_c[4:0]) + 128'({l.man_c[4:0], l.man_b}) * 128'(l.man_c[10:6]);
    endcase
  endfunction

  task automatic chk(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    logic [127:0] acc;
    for (int it = 0; it < 3000; it++) begin
      int p;
      p = it % 3;
      prec = prec_e'(p);
      aw = '0; bw = '0;
      for (int k = 0; k < 10; k++) begin
        va[k] = rnd_val(p, (it % 7 == 0) ? 0 : 1, (1 << ebits(p)) - 2);
        vb[k] = rnd_val(p, 1, (1 << ebits(p)) - 2);
      end
      case (p)
        0: for (int k = 0; k < 10; k++) begin aw[16*k +: 16] = va[k][15:0]; bw[16*k +: 16] = vb[k][15:0]; end
        1: for (int k = 0; k < 5; k++)  begin aw[32*k +: 32] = va[k][31:0]; bw[32*k +: 32] = vb[k][31:0]; end
        default: begin aw[63:0] = va[0]; bw[63:0] = vb[0]; end
      endcase
      phase = 1'b0; #1; l0 = lanes;
      phase = 1'b1; #1; l1 = lanes;
      case (p)
        0: for (int k = 0; k < 10; k++) begin
             chk(lprod(l0[k]) == 128'(sig(0, va[k])) * 128'(sig(0, vb[k])), "fp16 product");
             chk(l0[k].seg_shift == 0 && int'(l0[k].exp_a) == eeff(0, va[k]) &&
                 int'(l0[k].exp_b) == eeff(0, vb[k]) && l0[k].sign_a == sgn(0, va[k]) &&
                 l0[k].sign_b == sgn(0, vb[k]), "fp16 fields");
           end
        1: for (int k = 0; k < 5; k++) begin
             acc = '0;
             for (int j = 2*k; j < 2*k + 2; j++) begin
               acc += lprod(l0[j]) << (24 - int'(l0[j].seg_shift));
               acc += lprod(l1[j]) << (24 - int'(l1[j].seg_shift));
               chk(int'(l0[j].exp_a) == eeff(1, va[k]) && int'(l1[j].exp_b) == eeff(1, vb[k]) &&
                   l1[j].sign_a == sgn(1, va[k]), "fp32 fields");
             end
             chk(acc == 128'(sig(1, va[k])) * 128'(sig(1, vb[k])), "fp32 product");
           end
        default: begin
          acc = '0;
          for (int j = 0; j < 10; j++) begin
            acc += lprod(l0[j]) << (36 - int'(l0[j].seg_shift));
            acc += lprod(l1[j]) << (48 + 36 - int'(l1[j].seg_shift));
          end
          chk(acc == 128'(sig(2, va[0])) * 128'(sig(2, vb[0])), "fp64 product");
          chk(l1[6].fmode == FM_2X12X5 && l1[9].fmode == FM_12X5_17X5 && l0[9].fmode == FM_12X12,
              "fp64 fused modes");
          chk(int'(l1[3].exp_a) == eeff(2, va[0]) && l0[7].sign_b == sgn(2, vb[0]), "fp64 fields");
        end
      endcase
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
