// fp_cal_mix: fused unit multiplier lane of the dot product unit.
//
// Same sign and exponent logic as fp_cal, with the mixed-precision fused
// multiplier (fused_mul) in place of the conventional one. lane.fmode picks
// one 12b x 12b product (FP16, FP32 and the first FP64 cycle), two summed
// 12b x 5b products, or a 12b x 5b plus a 17b x 5b product (second FP64
// cycle). Combinational.
module fp_cal_mix
  import dpu_pkg::*;
(
  input  prec_e           prec,
  input  lane_t           lane,
  output logic            sign_ab,
  output exp_t            exp_ab,
  output logic [PP_W-1:0] man_pp
);
  always_comb begin
    sign_ab = lane.sign_a ^ lane.sign_b;
    exp_ab  = lane.exp_a + lane.exp_b - exp_t'(bias_of(prec));
  end

  fused_mul u_mul (
    .mode(lane.fmode), .a(lane.man_a), .b(lane.man_b), .c(lane.man_c), .p(man_pp)
  );
endmodule
