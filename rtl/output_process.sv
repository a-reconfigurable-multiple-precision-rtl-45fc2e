// output_process: turns the accumulated result into sign and magnitude on the
// 107-bit output vector.
//
// FP16/FP32: the 66-bit two's complement sum gives the sign; its absolute
// value lands in bits [64:0]. FP64: the 58-bit second-cycle sum (Sum2) and
// the 48-bit low part of the first-cycle sum (Sum1) are spliced into the
// exact 106-bit significand product {Sum2, Sum1}; the sign is the product
// sign. Combinational.
module output_process
  import dpu_pkg::*;
(
  input  prec_e               prec,
  input  logic [ACC_W-1:0]    acc,        // FP16/FP32 accumulated sum
  input  logic [TREE_W-1:0]   sum2,       // FP64 second-cycle tree sum
  input  logic [LOW64_W-1:0]  sum1_low,   // FP64 first-cycle low 48 bits
  input  logic                sign64,     // FP64 product sign
  output logic                sign_res,
  output logic [OUT_W-1:0]    mag
);
  logic [ACC_W-1:0] absv;
  always_comb begin
    absv = acc[ACC_W-1] ? -acc : acc;
    if (prec == PREC_FP64) begin
      sign_res = sign64;
      mag      = {1'b0, sum2[OUT_W-LOW64_W-2:0], sum1_low};
    end else begin
      sign_res = acc[ACC_W-1];
      mag      = OUT_W'(absv);
    end
  end
endmodule
