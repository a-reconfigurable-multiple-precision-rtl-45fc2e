// exp_adder: biased exponent of the result before rounding. The output
// vector V is worth V * 2^(max_exp - K) with K fixed per precision
// (dpu_pkg::scale_k); its leading one sits at bit 106 - lza_cnt, so
//   exp_add = max_exp + 106 - lza_cnt - K + bias.
// Combinational.
module exp_adder
  import dpu_pkg::*;
(
  input  prec_e            prec,
  input  exp_t             max_exp,
  input  logic [LZC_W-1:0] lza_cnt,
  output exp_t             exp_add
);
  always_comb
    exp_add = max_exp + exp_t'(OUT_W - 1) - exp_t'(lza_cnt)
              - exp_t'(scale_k(prec)) + exp_t'(bias_of(prec));
endmodule
