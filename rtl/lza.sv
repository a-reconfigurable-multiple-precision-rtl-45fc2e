// lza: leading-zero count of the 107-bit result magnitude (lza_cnt, 7 bits)
// and a flag that the magnitude is non-zero. This design counts the zeros of
// the finished sum with a priority search rather than anticipating them from
// the adder inputs; the count is therefore exact and needs no correction
// step. A zero magnitude gives lza_cnt = 107 and nonzero = 0. Combinational.
module lza
  import dpu_pkg::*;
(
  input  logic [OUT_W-1:0] mag,
  output logic [LZC_W-1:0] lza_cnt,
  output logic             nonzero
);
  always_comb begin
    lza_cnt = LZC_W'(OUT_W);
    nonzero = |mag;
    for (int i = 0; i < int'(OUT_W); i++)
      if (mag[i]) lza_cnt = LZC_W'(OUT_W - 1 - i);
  end
endmodule
