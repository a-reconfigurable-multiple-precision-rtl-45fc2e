// align_shifter: alignment shifter with signed conversion for one product.
//
// The 24-bit unit product is placed at the top of a 61-bit term as
// {sign, man_pp, 36'b0}; the 60 magnitude bits are shifted right by the
// exponent difference delta plus the segment offset seg_shift (bits pushed
// below bit 0 are dropped), and the term is then converted to two's
// complement when the product is negative. In FP64 mode all ten products
// belong to one positive partial sum, so the sign is applied at the output
// instead and the term stays positive (negate = 0). Combinational.
module align_shifter
  import dpu_pkg::*;
(
  input  logic               sign_ab,
  input  logic               negate,     // apply sign_ab (FP16/FP32)
  input  logic [PP_W-1:0]    man_pp,
  input  logic [DELTA_W-1:0] delta,
  input  logic [SHIFT_W-1:0] seg_shift,
  output logic [ALN_W-1:0]   term        // two's complement
);
  logic [DELTA_W:0]  sh;
  logic [ALN_W-2:0]  mag;
  always_comb begin
    sh  = (DELTA_W+1)'(delta) + (DELTA_W+1)'(seg_shift);
    mag = (sh >= (DELTA_W+1)'(ALN_W - 1)) ? '0 : ({man_pp, GUARD_W'(0)} >> sh);
    term = (sign_ab && negate) ? -{1'b0, mag} : {1'b0, mag};
  end
endmodule
