// csa32: W-bit carry-save 3:2 compressor row. Three addends in, a sum vector
// and a carry vector out, with x + y + z == s + c modulo 2^W. The carry is
// already shifted left by one bit. Purely combinational.
module csa32 #(
  parameter int unsigned W = 24
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] maj;
  always_comb begin
    s   = x ^ y ^ z;
    maj = (x & y) | (x & z) | (y & z);
    c   = {maj[W-2:0], 1'b0};
  end
endmodule
