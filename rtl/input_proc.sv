// input_proc: input processing of the dot product unit. It unpacks the two
// 160-bit operand words into the operand bundles (lane_t) of the ten unit
// multipliers, for the active precision and for the first (phase 0) or
// second (phase 1) cycle of an operation.
//
// Operand words: FP16 holds ten values per word (element k in bits
// [16k+15:16k]) and each of the two cycles brings a new word; FP32 holds five
// values ([32k+31:32k]) and FP64 one value ([63:0]), used in both cycles.
// Significands get their hidden bit (0 for a zero exponent field, whose
// exponent then counts as 1, so subnormal inputs are exact).
//
// Lanes 0..5 feed the conventional multipliers, lanes 6..9 the fused ones.
//  FP16: lane k multiplies element k of A by element k of B.
//  FP32: significands split into 12-bit halves a1:a0, b1:b0. Product p uses
//        lanes 2p and 2p+1: a0*b0 and a0*b1 in cycle 1, a1*b0 and a1*b1 in
//        cycle 2. seg_shift = 12*(2 - (i+j)) places a_i*b_j in the window.
//  FP64: 53-bit significands split 5:12:12:12:12 (a4..a0). Cycle 1 forms the
//        ten products with i+j <= 3; cycle 2 the rest, with the fused lanes
//        computing a0*b4+a4*b0, a1*b4+a4*b1, a2*b4+a4*b2 (two 12x5) and
//        a4*b3 + {a4,a3}*b4 (12x5 plus 17x5). seg_shift = 36 - 12*(i+j) in
//        cycle 1 and 36 - 12*(i+j-4) in cycle 2.
// Combinational.
module input_proc
  import dpu_pkg::*;
(
  input  logic [IN_W-1:0] a_word,
  input  logic [IN_W-1:0] b_word,
  input  prec_e           prec,
  input  logic            phase,
  output lane_t           lanes [N_MUL]
);
  // FP64 segment of a 53-bit significand
  function automatic logic [SEG_W-1:0] seg64(logic [52:0] m, int unsigned i);
    return (i == 4) ? SEG_W'(m[52:48]) : m[12*i +: 12];
  endfunction

  // Exponent of a value: a zero field (zero or subnormal) counts as 1
  function automatic exp_t eff_exp(logic [10:0] e);
    return (e == '0) ? exp_t'(1) : exp_t'(e);
  endfunction

  // One conventional-style lane: man_a = a_i, man_c = b_j
  function automatic lane_t mk(logic sa, logic sb, exp_t ea, exp_t eb,
                               logic [SEG_W-1:0] ma, logic [SEG_W-1:0] mc,
                               int unsigned sh);
    lane_t l;
    l.sign_a = sa;  l.sign_b = sb;
    l.exp_a  = ea;  l.exp_b  = eb;
    l.man_a  = ma;  l.man_b  = '0;  l.man_c = mc;
    l.fmode  = FM_12X12;
    l.seg_shift = SHIFT_W'(sh);
    return l;
  endfunction

  logic [15:0] ha, hb;
  logic [31:0] wa, wb;
  logic [52:0] ma64, mb64;
  logic [23:0] ma32, mb32;
  exp_t        ea, eb;
  logic        sa, sb;

  always_comb begin
    for (int k = 0; k < int'(N_MUL); k++) lanes[k] = '0;
    ha = '0; hb = '0; wa = '0; wb = '0;
    ma64 = '0; mb64 = '0; ma32 = '0; mb32 = '0;
    ea = '0; eb = '0; sa = 1'b0; sb = 1'b0;
    case (prec)
      PREC_FP16: begin
        for (int k = 0; k < int'(N_MUL); k++) begin
          ha = a_word[16*k +: 16];
          hb = b_word[16*k +: 16];
          lanes[k] = mk(ha[15], hb[15],
                        eff_exp(11'(ha[14:10])),
                        eff_exp(11'(hb[14:10])),
                        SEG_W'({|ha[14:10], ha[9:0]}),
                        SEG_W'({|hb[14:10], hb[9:0]}), 0);
        end
      end
      PREC_FP32: begin
        for (int p = 0; p < int'(N_MUL / 2); p++) begin
          wa   = a_word[32*p +: 32];
          wb   = b_word[32*p +: 32];
          ea   = eff_exp(11'(wa[30:23]));
          eb   = eff_exp(11'(wb[30:23]));
          ma32 = {|wa[30:23], wa[22:0]};
          mb32 = {|wb[30:23], wb[22:0]};
          if (!phase) begin
            lanes[2*p]   = mk(wa[31], wb[31], ea, eb, ma32[11:0],  mb32[11:0],  24);
            lanes[2*p+1] = mk(wa[31], wb[31], ea, eb, ma32[11:0],  mb32[23:12], 12);
          end else begin
            lanes[2*p]   = mk(wa[31], wb[31], ea, eb, ma32[23:12], mb32[11:0],  12);
            lanes[2*p+1] = mk(wa[31], wb[31], ea, eb, ma32[23:12], mb32[23:12], 0);
          end
        end
      end
      default: begin  // PREC_FP64
        sa   = a_word[63];
        sb   = b_word[63];
        ea   = eff_exp(a_word[62:52]);
        eb   = eff_exp(b_word[62:52]);
        ma64 = {|a_word[62:52], a_word[51:0]};
        mb64 = {|b_word[62:52], b_word[51:0]};
        if (!phase) begin
          lanes[0] = mk(sa, sb, ea, eb, seg64(ma64, 0), seg64(mb64, 0), 36);  // PP1
          lanes[1] = mk(sa, sb, ea, eb, seg64(ma64, 0), seg64(mb64, 1), 24);  // PP2
          lanes[2] = mk(sa, sb, ea, eb, seg64(ma64, 1), seg64(mb64, 0), 24);  // PP3
          lanes[3] = mk(sa, sb, ea, eb, seg64(ma64, 0), seg64(mb64, 2), 12);  // PP4
          lanes[4] = mk(sa, sb, ea, eb, seg64(ma64, 2), seg64(mb64, 0), 12);  // PP5
          lanes[5] = mk(sa, sb, ea, eb, seg64(ma64, 1), seg64(mb64, 1), 12);  // PP6
          lanes[6] = mk(sa, sb, ea, eb, seg64(ma64, 0), seg64(mb64, 3), 0);   // PP7
          lanes[7] = mk(sa, sb, ea, eb, seg64(ma64, 1), seg64(mb64, 2), 0);   // PP8
          lanes[8] = mk(sa, sb, ea, eb, seg64(ma64, 2), seg64(mb64, 1), 0);   // PP9
          lanes[9] = mk(sa, sb, ea, eb, seg64(ma64, 3), seg64(mb64, 0), 0);   // PP10
        end else begin
          lanes[0] = mk(sa, sb, ea, eb, seg64(ma64, 1), seg64(mb64, 3), 36);  // PP12
          lanes[1] = mk(sa, sb, ea, eb, seg64(ma64, 3), seg64(mb64, 1), 36);  // PP13
          lanes[2] = mk(sa, sb, ea, eb, seg64(ma64, 2), seg64(mb64, 2), 36);  // PP14
          lanes[3] = mk(sa, sb, ea, eb, seg64(ma64, 2), seg64(mb64, 3), 24);  // PP16
          lanes[4] = mk(sa, sb, ea, eb, seg64(ma64, 3), seg64(mb64, 2), 24);  // PP17
          lanes[5] = mk(sa, sb, ea, eb, seg64(ma64, 3), seg64(mb64, 3), 12);  // PP19
          // PP11: a0*b4 + a4*b0
          lanes[6] = mk(sa, sb, ea, eb, seg64(ma64, 0), {1'b0, ma64[52:48], 1'b0, mb64[52:48]}, 36);
          lanes[6].man_b = seg64(mb64, 0);
          lanes[6].fmode = FM_2X12X5;
          // PP15: a1*b4 + a4*b1
          lanes[7] = mk(sa, sb, ea, eb, seg64(ma64, 1), {1'b0, ma64[52:48], 1'b0, mb64[52:48]}, 24);
          lanes[7].man_b = seg64(mb64, 1);
          lanes[7].fmode = FM_2X12X5;
          // PP18: a2*b4 + a4*b2
          lanes[8] = mk(sa, sb, ea, eb, seg64(ma64, 2), {1'b0, ma64[52:48], 1'b0, mb64[52:48]}, 12);
          lanes[8].man_b = seg64(mb64, 2);
          lanes[8].fmode = FM_2X12X5;
          // PP20: b3*a4 + {a4,a3}*b4
          lanes[9] = mk(sa, sb, ea, eb, seg64(mb64, 3), {1'b0, mb64[52:48], 1'b0, ma64[52:48]}, 0);
          lanes[9].man_b = seg64(ma64, 3);
          lanes[9].fmode = FM_12X5_17X5;
        end
      end
    endcase
  end
endmodule
