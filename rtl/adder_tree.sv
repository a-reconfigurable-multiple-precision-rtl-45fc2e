// adder_tree: reconfigurable 10-input adder tree (carry-save, three levels).
//
// Level 1: two 4:2 rows on inputs 0..3 and 4..7. Level 2: two 3:2 rows,
// each merging one level-1 sum/carry pair with input 8 or 9. Level 3: one
// 4:2 row. A carry-propagate adder gives the 65-bit two's complement sum.
// Inputs are 61-bit two's complement terms, sign-extended once to 65 bits
// here (instead of one or two bits per level); all rows wrap modulo 2^65,
// which is exact since ten 61-bit terms need at most 65 bits.
// An extra unsigned input, extra_in, enters through one more 3:2 row ahead
// of the adder: it carries the 16-bit upper part of the first-cycle FP64 sum
// into the second cycle (zero otherwise). Combinational.
module adder_tree
  import dpu_pkg::*;
(
  input  logic [ALN_W-1:0]   terms [N_MUL],
  input  logic [CARRY_W-1:0] extra_in,
  output logic [TREE_W-1:0]  sum
);
  logic [TREE_W-1:0] x [N_MUL];
  logic [TREE_W-1:0] s1a, c1a, s1b, c1b, s2a, c2a, s2b, c2b, s3, c3, s4, c4;

  always_comb
    for (int i = 0; i < int'(N_MUL); i++)
      x[i] = TREE_W'(signed'(terms[i]));

  csa42 #(.W(TREE_W)) u_l1a (.x(x[0]), .y(x[1]), .z(x[2]), .w(x[3]), .s(s1a), .c(c1a));
  csa42 #(.W(TREE_W)) u_l1b (.x(x[4]), .y(x[5]), .z(x[6]), .w(x[7]), .s(s1b), .c(c1b));
  csa32 #(.W(TREE_W)) u_l2a (.x(s1a), .y(c1a), .z(x[8]), .s(s2a), .c(c2a));
  csa32 #(.W(TREE_W)) u_l2b (.x(s1b), .y(c1b), .z(x[9]), .s(s2b), .c(c2b));
  csa42 #(.W(TREE_W)) u_l3  (.x(s2a), .y(c2a), .z(s2b), .w(c2b), .s(s3), .c(c3));
  csa32 #(.W(TREE_W)) u_ext (.x(s3), .y(c3), .z(TREE_W'(extra_in)), .s(s4), .c(c4));

  assign sum = s4 + c4;
endmodule
