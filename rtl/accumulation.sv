// accumulation: adds the second-cycle adder-tree sum to the first-cycle sum
// held in the pipeline register, for FP16 and FP32 operations.
//
// Each cycle's sum is aligned to its own largest product exponent. In FP32
// both cycles use the same five operand pairs, so the two exponents are
// equal; in FP16 the two cycles carry different values, so the sum with the
// smaller exponent is first shifted right (arithmetic, low bits dropped) by
// the exponent gap. The result is a 66-bit two's complement sum and the
// exponent it is aligned to. Combinational.
module accumulation
  import dpu_pkg::*;
(
  input  logic [TREE_W-1:0] sum_now,   // second-cycle tree sum
  input  exp_t              max_now,
  input  logic [TREE_W-1:0] sum_prev,  // first-cycle tree sum (registered)
  input  exp_t              max_prev,
  output logic [ACC_W-1:0]  acc,
  output exp_t              acc_max,
  output logic              realigned  // the two sums had different exponents
);
  logic signed [ACC_W-1:0] a_now, a_prev;
  logic signed [EXP_W:0]   d;
  logic [6:0]              sh;
  always_comb begin
    a_now  = ACC_W'(signed'(sum_now));
    a_prev = ACC_W'(signed'(sum_prev));
    d      = (EXP_W+1)'(max_now) - (EXP_W+1)'(max_prev);
    realigned = (d != '0);
    if (d >= 0) begin
      sh      = (d > 127) ? 7'd127 : 7'(d);
      acc     = a_now + (a_prev >>> sh);
      acc_max = max_now;
    end else begin
      sh      = (-d > 127) ? 7'd127 : 7'(-d);
      acc     = (a_now >>> sh) + a_prev;
      acc_max = max_prev;
    end
  end
endmodule
