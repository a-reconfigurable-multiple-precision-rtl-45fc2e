// dpu_pkg: shared types and constants of the reconfigurable multiple-precision
// floating-point dot product unit.
//
// The unit works on 12-bit unit multipliers (the width that leaves the fewest
// redundant bits across FP16, FP32 and FP64 significands). Ten of them run per
// clock: six conventional ones and four fused mixed-precision ones. An
// operation takes two successive cycles in every precision: 20 FP16 products,
// 5 FP32 products or 1 FP64 product are summed into one result.
//
// Widths that follow the published datapath: 160-bit operand words, 24-bit
// unit products, 61-bit aligned terms, 65-bit adder-tree sum, 66-bit
// accumulation, 107-bit output vector, 7-bit leading-zero count, 16-bit FP64
// carry, 48-bit FP64 low half. The 13-bit signed exponent width is this
// design's own choice (an FP64 product exponent does not fit in 11 bits).
package dpu_pkg;

  // Precision selection (2-bit PRECISION input)
  typedef enum logic [1:0] {
    PREC_FP16 = 2'd0,
    PREC_FP32 = 2'd1,
    PREC_FP64 = 2'd2
  } prec_e;

  // Modes of the fused multiplier
  typedef enum logic [1:0] {
    FM_12X12     = 2'd0,  // A x C
    FM_2X12X5    = 2'd1,  // A x C[4:0] + B x C[10:6]
    FM_12X5_17X5 = 2'd2   // A x C[4:0] + {C[4:0],B} x C[10:6]
  } fmode_e;

  localparam int unsigned N_MUL   = 10;   // unit multipliers per DPU
  localparam int unsigned N_CONV  = 6;    // conventional (fp_cal)
  localparam int unsigned N_MIX   = 4;    // fused (fp_cal_mix)
  localparam int unsigned IN_W    = 160;  // operand word width
  localparam int unsigned SEG_W   = 12;   // unit multiplier operand width
  localparam int unsigned PP_W    = 24;   // unit multiplier product width
  localparam int unsigned ALN_W   = 61;   // {sign, man_pp, 36'b0}
  localparam int unsigned GUARD_W = 36;   // zero bits below man_pp
  localparam int unsigned TREE_W  = 65;   // adder tree result
  localparam int unsigned ACC_W   = 66;   // accumulation result
  localparam int unsigned OUT_W   = 107;  // output process / norm shift width
  localparam int unsigned LZC_W   = 7;    // lza_cnt width
  localparam int unsigned DELTA_W = 11;   // exponent difference width
  localparam int unsigned SHIFT_W = 7;    // alignment shift amount (saturated)
  localparam int unsigned EXP_W   = 13;   // signed internal exponent
  localparam int unsigned LOW64_W = 48;   // FP64 first-cycle low sum (Sum1)
  localparam int unsigned CARRY_W = 16;   // FP64 carry into the second cycle

  typedef logic signed [EXP_W-1:0] exp_t;

  // Operands of one unit multiplier, as prepared by input processing
  typedef struct packed {
    logic                sign_a;
    logic                sign_b;
    exp_t                exp_a;     // unbiased-free: biased exponent, subnormal fixed to 1
    exp_t                exp_b;
    logic [SEG_W-1:0]    man_a;     // multiplicand (operand A)
    logic [SEG_W-1:0]    man_b;     // second multiplicand (operand B, fused only)
    logic [SEG_W-1:0]    man_c;     // multiplicator (operand C)
    fmode_e              fmode;     // fused multiplier mode (conventional: FM_12X12)
    logic [SHIFT_W-1:0]  seg_shift; // extra right shift from the segment position
  } lane_t;

  // Format constants per precision
  function automatic int unsigned frac_bits(prec_e p);
    case (p)
      PREC_FP16: return 10;
      PREC_FP32: return 23;
      default:   return 52;
    endcase
  endfunction

  function automatic int unsigned exp_bits(prec_e p);
    case (p)
      PREC_FP16: return 5;
      PREC_FP32: return 8;
      default:   return 11;
    endcase
  endfunction

  function automatic int signed bias_of(prec_e p);
    case (p)
      PREC_FP16: return 15;
      PREC_FP32: return 127;
      default:   return 1023;
    endcase
  endfunction

  // The value of the 107-bit output vector V is V * 2^(max_exp - scale_k),
  // where max_exp is the largest biased product exponent (ea + eb - bias).
  // FP16: product LSB sits at bit 36 of the window, 2 x 10 fraction bits.
  // FP32: full 48-bit product LSB at bit 12, 2 x 23 fraction bits.
  // FP64: exact 106-bit product at bit 0, 2 x 52 fraction bits.
  function automatic int signed scale_k(prec_e p);
    case (p)
      PREC_FP16: return 36 + 20 + 15;
      PREC_FP32: return 12 + 46 + 127;
      default:   return 0 + 104 + 1023;
    endcase
  endfunction

  // One radix-4 Booth partial product: group g = {c[2i+1], c[2i], c[2i-1]}
  // selects 0, +-X or +-2X; the result is a PP_W-bit two's complement row.
  function automatic logic [PP_W-1:0] booth_pp(logic [2:0] g, logic [16:0] x);
    logic [PP_W-1:0] xe;
    xe = PP_W'(x);
    case (g)
      3'b001, 3'b010: return xe;
      3'b011:         return xe << 1;
      3'b100:         return -(xe << 1);
      3'b101, 3'b110: return -xe;
      default:        return '0;
    endcase
  endfunction

endpackage
