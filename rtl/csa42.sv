// csa42: W-bit carry-save 4:2 compressor row, x + y + z + w == s + c modulo
// 2^W, with the carry vector c already shifted left by one bit.
//
// Each bit is one 4:2 cell with a lateral carry: the cell takes four bits of
// equal weight plus carry_in from the cell below and gives sum (weight 1),
// carry (weight 2, to the next level) and carry_out (weight 2, to the cell
// above). carry_out does not depend on carry_in, so the lateral chain is only
// one cell long. Cell equations (this design's choice of a common form):
//   t1 = x ^ y,  t = t1 ^ z ^ w
//   carry_out = t1 ? z : x        (majority of x, y, z)
//   sum       = t ^ carry_in
//   carry     = t ? carry_in : w  (majority of x^y^z, w, carry_in)
// The carry_out of the top bit is dropped (modulo 2^W). Combinational.
module csa42 #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  input  logic [W-1:0] w,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] t1, t, cout, cin, cy;
  always_comb begin
    t1   = x ^ y;
    t    = t1 ^ z ^ w;
    cout = (t1 & z) | (~t1 & x);
    cin  = {cout[W-2:0], 1'b0};
    s    = t ^ cin;
    cy   = (t & cin) | (~t & w);
    c    = {cy[W-2:0], 1'b0};
  end
endmodule
