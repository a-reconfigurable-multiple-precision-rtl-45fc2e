// fused_mul: mixed-precision fused radix-4 Booth multiplier with three modes.
//
//   FM_12X12     : p = A * C                          (12b x 12b)
//   FM_2X12X5    : p = A * C[4:0] + B * C[10:6]       (two 12b x 5b)
//   FM_12X5_17X5 : p = A * C[4:0] + {C[4:0],B} * C[10:6]  (12b x 5b and 17b x 5b)
//
// It is the 12x12 Booth multiplier with one change: in the two split modes
// the second group of Booth rows (PP4..PP6) takes operand B (or the 17-bit
// splice {C[4:0], B}) as multiplicand and is shifted by 0, 2, 4 bits instead
// of 6, 8, 10. Bits C[5] and C[11] act as the zero sign bits of the two 5-bit
// multiplicators; this block forces them to zero in the split modes, so PP7
// is zero there and the two halves are independent. Compression (3:2 row for
// PP1..PP3, 4:2 rows for PP4..PP7 and the merge) and the final adder are
// shared by all modes. Every result is below 2^24, so 24-bit rows are exact.
// Combinational.
module fused_mul
  import dpu_pkg::*;
(
  input  fmode_e           mode,
  input  logic [SEG_W-1:0] a,  // first multiplicand
  input  logic [SEG_W-1:0] b,  // second multiplicand (split modes)
  input  logic [SEG_W-1:0] c,  // multiplicator(s)
  output logic [PP_W-1:0]  p
);
  logic [SEG_W-1:0] cm;
  logic [14:0]      ext;
  logic [16:0]      x_hi;      // multiplicand of PP4..PP6
  logic             split;
  logic [PP_W-1:0]  pp [7];
  logic [PP_W-1:0]  s13, c13, s47, c47, s, cy;

  always_comb begin
    split = (mode != FM_12X12);
    cm    = split ? {1'b0, c[10:6], 1'b0, c[4:0]} : c;
    ext   = {2'b00, cm, 1'b0};
    case (mode)
      FM_2X12X5:    x_hi = 17'(b);
      FM_12X5_17X5: x_hi = {cm[4:0], b};
      default:      x_hi = 17'(a);
    endcase
    for (int i = 0; i < 3; i++)
      pp[i] = booth_pp(ext[2*i +: 3], 17'(a)) << (2*i);
    for (int i = 3; i < 6; i++)
      pp[i] = booth_pp(ext[2*i +: 3], x_hi) << (split ? 2*(i-3) : 2*i);
    pp[6] = booth_pp(ext[12 +: 3], 17'(a)) << 12;
  end

  csa32 #(.W(PP_W)) u_pp13 (.x(pp[0]), .y(pp[1]), .z(pp[2]), .s(s13), .c(c13));
  csa42 #(.W(PP_W)) u_pp47 (.x(pp[3]), .y(pp[4]), .z(pp[5]), .w(pp[6]), .s(s47), .c(c47));
  csa42 #(.W(PP_W)) u_fin  (.x(s13), .y(c13), .z(s47), .w(c47), .s(s), .c(cy));

  assign p = s + cy;
endmodule
