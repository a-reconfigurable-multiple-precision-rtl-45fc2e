// tb_fp_cal_mix: checks the fused multiplier lane: product sign (XOR), biased
// product exponent ea + eb - bias for each precision, and the significand
// product for random lanes.
module tb_fp_cal_mix;
  import dpu_pkg::*;
  prec_e       prec;
  lane_t       lane;
  logic        sign_ab;
  exp_t        exp_ab;
  logic [23:0] man_pp, exp_p;
  int checks = 0, failures = 0;
  int bias;

  fp_cal_mix dut (.prec(prec), .lane(lane), .sign_ab(sign_ab), .exp_ab(exp_ab), .man_pp(man_pp));

  initial begin
    for (int i = 0; i < 6000; i++) begin
      prec = prec_e'(i % 3);
      bias = (i % 3 == 0) ? 15 : (i % 3 == 1) ? 127 : 1023;
      lane = '0;
      lane.sign_a = 1'($urandom); lane.sign_b = 1'($urandom);
      lane.exp_a  = exp_t'(1 + $urandom % 32'(2 * bias));
      lane.exp_b  = exp_t'(1 + $urandom % 32'(2 * bias));
      lane.man_a  = 12'($urandom); lane.man_b = 12'($urandom); lane.man_c = 12'($urandom);
      lane.fmode  = fmode_e'($urandom % 3);
      if (lane.fmode != FM_12X12) begin lane.man_c[5] = 1'b0; lane.man_c[11] = 1'b0; end
      case (lane.fmode)
        FM_12X12:  exp_p = 24'(lane.man_a) * 24'(lane.man_c);
        FM_2X12X5: exp_p = 24'(lane.man_a) * 24'(lane.man_c[4:0]) + 24'(lane.man_b) * 24'(lane.man_c[10:6]);
        default:   exp_p = 24'(lane.man_a) * 24'(lane.man_c[4:0])
                           + 24'({lane.man_c[4:0], lane.man_b}) * 24'(lane.man_c[10:6]);
      endcase
      #1;
      checks++;
      if (sign_ab !== (lane.sign_a ^ lane.sign_b) ||
          int'(exp_ab) !== int'(lane.exp_a) + int'(lane.exp_b) - bias ||
          man_pp !== exp_p) begin
        failures++;
        if (failures < 10) $display("FAIL i=%0d s=%b e=%0d p=%h exp_p=%h", i, sign_ab, exp_ab, man_pp, exp_p);
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
