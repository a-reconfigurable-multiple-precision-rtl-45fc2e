// booth_mul: conventional unsigned 12b x 12b radix-4 Booth multiplier, the
// unit multiplier of the dot product unit.
//
// Partial product generation: the multiplicator c, extended with a zero below
// its LSB and zeros above its MSB, is scanned in seven overlapping 3-bit
// groups; each group selects 0, +-a or +-2a, shifted by 0, 2, ..., 12 bits.
// Compression follows the published split: PP1..PP3 go through a 3:2 row,
// PP4..PP7 through a 4:2 row, the two sum/carry pairs through a final 4:2
// row, and a carry-propagate adder gives the 24-bit product. All rows are
// 24 bits wide and wrap modulo 2^24, which is exact because the product of two
// 12-bit numbers is below 2^24. Combinational; the unit registers around it.
module booth_mul
  import dpu_pkg::*;
(
  input  logic [SEG_W-1:0] a,  // multiplicand
  input  logic [SEG_W-1:0] c,  // multiplicator
  output logic [PP_W-1:0]  p   // a * c
);
  logic [14:0]     ext;        // {0, 0, c, 0}
  logic [PP_W-1:0] pp [7];
  logic [PP_W-1:0] s13, c13, s47, c47, s, cy;

  always_comb begin
    ext = {2'b00, c, 1'b0};
    for (int i = 0; i < 7; i++)
      pp[i] = booth_pp(ext[2*i +: 3], 17'(a)) << (2*i);
  end

  csa32 #(.W(PP_W)) u_pp13 (.x(pp[0]), .y(pp[1]), .z(pp[2]), .s(s13), .c(c13));
  csa42 #(.W(PP_W)) u_pp47 (.x(pp[3]), .y(pp[4]), .z(pp[5]), .w(pp[6]), .s(s47), .c(c47));
  csa42 #(.W(PP_W)) u_fin  (.x(s13), .y(c13), .z(s47), .w(c47), .s(s), .c(cy));

  assign p = s + cy;
endmodule
