// exp_diff: distance between the maximum product exponent and the exponent of
// one product, delta = max_exp - exp_ab, as an 11-bit unsigned value that
// saturates at its largest code (any delta past the 61-bit aligned window
// moves the whole product out of it anyway). Combinational.
module exp_diff
  import dpu_pkg::*;
(
  input  exp_t               max_exp,
  input  exp_t               exp_ab,
  output logic [DELTA_W-1:0] delta
);
  logic signed [EXP_W:0] d;
  always_comb begin
    d     = (EXP_W+1)'(max_exp) - (EXP_W+1)'(exp_ab);
    delta = (d > (EXP_W+1)'((1 << DELTA_W) - 1)) ? DELTA_W'((1 << DELTA_W) - 1)
                                                 : DELTA_W'(d);
  end
endmodule
