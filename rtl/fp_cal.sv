// fp_cal: conventional unit multiplier lane of the dot product unit.
//
// For one pair of operand segments it forms the sign of the product (XOR of
// the operand signs), the biased product exponent ea + eb - bias of the active
// precision, and the 24-bit product of the two 12-bit significand segments
// (booth_mul). Operands arrive as one lane_t bundle from input processing;
// the multiplicand is man_a and the multiplicator man_c. Combinational.
module fp_cal
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

  booth_mul u_mul (.a(lane.man_a), .c(lane.man_c), .p(man_pp));
endmodule
