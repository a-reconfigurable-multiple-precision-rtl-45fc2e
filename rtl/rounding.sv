// rounding: rounds the normalized magnitude to the precision of the
// operation with roundTiesToAway and packs the result, including the exponent
// correction (exp_norm) when rounding carries out of the significand.
//
// The leading one is at bit 106; the next F bits are the fraction (F = 10,
// 23 or 52) and the bit after them decides: 1 rounds the magnitude up (this
// covers exact ties, which go away from zero), 0 truncates. This design's
// choices for the cases the rule does not cover: a zero sum gives +0; a
// biased exponent of zero or below flushes to a signed zero; an exponent at
// or above the all-ones code gives a signed infinity. Results are
// right-justified in the fields: FP16 uses exp_out[4:0] and man_out[9:0],
// FP32 exp_out[7:0] and man_out[22:0], FP64 all bits. Combinational.
module rounding
  import dpu_pkg::*;
(
  input  prec_e            prec,
  input  logic [OUT_W-1:0] norm,
  input  exp_t             exp_add,
  input  logic             sign_res,
  input  logic             nonzero,
  output logic             sign_out,
  output logic [10:0]      exp_out,
  output logic [51:0]      man_out,
  output logic             exp_norm,  // rounding carried into the exponent
  output logic             overflow,
  output logic             underflow
);
  logic [53:0] m;      // {carry, 1, fraction} after rounding, widest case
  logic        rbit;
  exp_t        e;
  exp_t        emax;

  always_comb begin
    case (prec)
      PREC_FP16: begin
        rbit = norm[OUT_W-2-10];
        m    = 54'({1'b1, norm[OUT_W-2 -: 10]}) + 54'(rbit);
        exp_norm = m[11];
        man_out  = 52'(m[9:0]);
        emax = exp_t'(31);
      end
      PREC_FP32: begin
        rbit = norm[OUT_W-2-23];
        m    = 54'({1'b1, norm[OUT_W-2 -: 23]}) + 54'(rbit);
        exp_norm = m[24];
        man_out  = 52'(m[22:0]);
        emax = exp_t'(255);
      end
      default: begin
        rbit = norm[OUT_W-2-52];
        m    = 54'({1'b1, norm[OUT_W-2 -: 52]}) + 54'(rbit);
        exp_norm = m[53];
        man_out  = m[51:0];
        emax = exp_t'(2047);
      end
    endcase
    // on a carry-out the rounded fraction bits are already all zero
    e         = exp_add + exp_t'(exp_norm);
    sign_out  = sign_res;
    exp_out   = 11'(e);
    overflow  = nonzero && (e >= emax);
    underflow = nonzero && (e <= 0);
    if (!nonzero) begin
      sign_out = 1'b0;
      exp_out  = '0;
      man_out  = '0;
    end else if (overflow) begin
      exp_out  = 11'(emax);
      man_out  = '0;
    end else if (underflow) begin
      exp_out  = '0;
      man_out  = '0;
    end
  end
endmodule
