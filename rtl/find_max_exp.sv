// find_max_exp: largest of the N product exponents (signed), found with a
// balanced comparison tree. Combinational. N defaults to the ten unit
// multipliers of one dot product unit.
module find_max_exp
  import dpu_pkg::*;
#(
  parameter int unsigned N = N_MUL
) (
  input  exp_t exp_ab [N],
  output exp_t max_exp
);
  // Level-by-level reduction over a padded power-of-two array
  localparam int unsigned LEVELS = $clog2(N);
  localparam int unsigned NP     = 1 << LEVELS;
  exp_t t [LEVELS+1][NP];

  always_comb begin
    t = '{default: '0};
    for (int i = 0; i < int'(NP); i++)
      t[0][i] = (i < int'(N)) ? exp_ab[i] : exp_ab[0];
    for (int l = 0; l < int'(LEVELS); l++)
      for (int i = 0; i < int'(NP >> (l + 1)); i++)
        t[l+1][i] = (t[l][2*i] > t[l][2*i+1]) ? t[l][2*i] : t[l][2*i+1];
    max_exp = t[LEVELS][0];
  end
endmodule
