// dpu: reconfigurable multiple-precision floating-point dot product unit.
//
// One operation takes two successive input beats and produces one rounded
// result in the precision of the operation:
//   FP16: sum of 20 products (10 operand pairs per beat, new data each beat)
//   FP32: sum of 5 products (5 operand pairs, given on the first beat)
//   FP64: one product, exact to 106 bits before rounding (first beat)
// All ten unit multipliers (six conventional, four fused) work in both beats
// in every precision. Higher precisions are split into 12-bit segments; the
// partial products are shifted by their exponent difference and segment
// offset, summed in a 10-input carry-save tree, and the two beats are
// combined: added (FP16/FP32), or spliced as {Sum2, Sum1} with the upper 16
// bits of the first FP64 sum fed back into the tree (FP64).
//
// Pipeline (registers as published): INPUT REGS -> input processing,
// multipliers, find_max_exp, exp_diff -> PIPELINE0 REGS -> alignment, adder
// tree, accumulation, output process, leading-zero count, exp_adder ->
// PIPELINE1 REGS -> norm_shift, rounding, exp_norm -> OUTPUT REGS.
// PIPELINE1 REGS also hold the first-beat sum for the second beat.
//
// Interface and timing (this design's own choices):
//  - in_valid high for exactly two successive cycles per operation (beat 0,
//    beat 1); operations may follow back to back, one every two cycles.
//  - in_prec is sampled on beat 0. in_a/in_b are sampled on both beats in
//    FP16 and only on beat 0 in FP32/FP64.
//  - out_valid pulses one cycle; the result appears 4 clock edges after
//    the edge that sampled beat 0 (3 after beat 1). out_prec tells its format.
//  - rst_n is an active-low synchronous reset of the control state.
module dpu
  import dpu_pkg::*;
(
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  prec_e           in_prec,
  input  logic [IN_W-1:0] in_a,
  input  logic [IN_W-1:0] in_b,
  output logic            out_valid,
  output prec_e           out_prec,
  output logic            sign_out,
  output logic [10:0]     exp_out,
  output logic [51:0]     man_out
);
  // ---------------- INPUT REGS ----------------
  logic            beat;               // 0: next valid beat is beat 0
  logic            r_v, r_ph;
  prec_e           r_prec;
  logic [IN_W-1:0] r_a, r_b;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      beat <= 1'b0;
      r_v  <= 1'b0;
      r_ph <= 1'b0;
    end else begin
      r_v  <= in_valid;
      r_ph <= beat;
      if (in_valid) beat <= ~beat;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && !beat) begin
      r_prec <= in_prec;
      r_a    <= in_a;
      r_b    <= in_b;
    end else if (in_valid && r_prec == PREC_FP16) begin
      r_a    <= in_a;
      r_b    <= in_b;
    end
  end

  // ---------------- stage 1: input processing, multipliers, exponents ----
  lane_t                lanes [N_MUL];
  logic                 s1_sign  [N_MUL];
  exp_t                 s1_exp   [N_MUL];
  logic [PP_W-1:0]      s1_pp    [N_MUL];
  logic [DELTA_W-1:0]   s1_delta [N_MUL];
  exp_t                 s1_max;

  input_proc u_inproc (
    .a_word(r_a), .b_word(r_b), .prec(r_prec), .phase(r_ph), .lanes(lanes)
  );

  for (genvar i = 0; i < N_CONV; i++) begin : g_cal
    fp_cal u_cal (
      .prec(r_prec), .lane(lanes[i]),
      .sign_ab(s1_sign[i]), .exp_ab(s1_exp[i]), .man_pp(s1_pp[i])
    );
  end
  for (genvar i = N_CONV; i < N_MUL; i++) begin : g_mix
    fp_cal_mix u_mix (
      .prec(r_prec), .lane(lanes[i]),
      .sign_ab(s1_sign[i]), .exp_ab(s1_exp[i]), .man_pp(s1_pp[i])
    );
  end

  find_max_exp #(.N(N_MUL)) u_max (.exp_ab(s1_exp), .max_exp(s1_max));

  for (genvar i = 0; i < N_MUL; i++) begin : g_diff
    exp_diff u_diff (.max_exp(s1_max), .exp_ab(s1_exp[i]), .delta(s1_delta[i]));
  end

  // ---------------- PIPELINE0 REGS ----------------
  logic               p0_v, p0_ph;
  prec_e              p0_prec;
  logic               p0_sign  [N_MUL];
  logic [PP_W-1:0]    p0_pp    [N_MUL];
  logic [DELTA_W-1:0] p0_delta [N_MUL];
  logic [SHIFT_W-1:0] p0_seg   [N_MUL];
  exp_t               p0_max;

  always_ff @(posedge clk) begin
    if (!rst_n) p0_v <= 1'b0;
    else        p0_v <= r_v;
  end

  always_ff @(posedge clk) begin
    p0_ph   <= r_ph;
    p0_prec <= r_prec;
    p0_max  <= s1_max;
    for (int i = 0; i < int'(N_MUL); i++) begin
      p0_sign[i]  <= s1_sign[i];
      p0_pp[i]    <= s1_pp[i];
      p0_delta[i] <= s1_delta[i];
      p0_seg[i]   <= lanes[i].seg_shift;
    end
  end

  // ---------------- stage 2: align, add, accumulate, count ----------------
  logic [ALN_W-1:0]   terms [N_MUL];
  logic [TREE_W-1:0]  tree_sum;
  logic [CARRY_W-1:0] carry_in;
  logic [ACC_W-1:0]   acc;
  exp_t               acc_max, s2_max;
  logic               realigned;
  logic               s2_sign;
  logic [OUT_W-1:0]   s2_mag;
  logic [LZC_W-1:0]   s2_cnt;
  logic               s2_nz;
  exp_t               s2_exp;

  // first-beat results kept in PIPELINE1 REGS
  logic [TREE_W-1:0]  p1_part;
  exp_t               p1_pmax;

  for (genvar i = 0; i < N_MUL; i++) begin : g_align
    align_shifter u_al (
      .sign_ab(p0_sign[i]), .negate(p0_prec != PREC_FP64), .man_pp(p0_pp[i]),
      .delta(p0_delta[i]), .seg_shift(p0_seg[i]), .term(terms[i])
    );
  end

  assign carry_in = (p0_prec == PREC_FP64 && p0_ph)
                    ? p1_part[LOW64_W +: CARRY_W] : '0;

  adder_tree u_tree (.terms(terms), .extra_in(carry_in), .sum(tree_sum));

  accumulation u_acc (
    .sum_now(tree_sum), .max_now(p0_max), .sum_prev(p1_part), .max_prev(p1_pmax),
    .acc(acc), .acc_max(acc_max), .realigned(realigned)
  );

  output_process u_outp (
    .prec(p0_prec), .acc(acc), .sum2(tree_sum), .sum1_low(p1_part[LOW64_W-1:0]),
    .sign64(p0_sign[0]), .sign_res(s2_sign), .mag(s2_mag)
  );

  lza u_lza (.mag(s2_mag), .lza_cnt(s2_cnt), .nonzero(s2_nz));

  assign s2_max = (p0_prec == PREC_FP64) ? p0_max : acc_max;

  exp_adder u_expadd (.prec(p0_prec), .max_exp(s2_max), .lza_cnt(s2_cnt), .exp_add(s2_exp));

  // ---------------- PIPELINE1 REGS ----------------
  logic             p1_v, p1_sign, p1_nz;
  prec_e            p1_prec;
  logic [OUT_W-1:0] p1_mag;
  logic [LZC_W-1:0] p1_cnt;
  exp_t             p1_exp;

  always_ff @(posedge clk) begin
    if (!rst_n) p1_v <= 1'b0;
    else        p1_v <= p0_v && p0_ph;
  end

  always_ff @(posedge clk) begin
    if (p0_v && !p0_ph) begin
      p1_part <= tree_sum;
      p1_pmax <= p0_max;
    end
    p1_prec <= p0_prec;
    p1_sign <= s2_sign;
    p1_mag  <= s2_mag;
    p1_cnt  <= s2_cnt;
    p1_nz   <= s2_nz;
    p1_exp  <= s2_exp;
  end

  // ---------------- stage 3: normalize and round ----------------
  logic [OUT_W-1:0] s3_norm;
  logic             s3_sign, s3_expn, s3_ovf, s3_unf;
  logic [10:0]      s3_exp;
  logic [51:0]      s3_man;

  norm_shift u_norm (.mag(p1_mag), .lza_cnt(p1_cnt), .norm(s3_norm));

  rounding u_rnd (
    .prec(p1_prec), .norm(s3_norm), .exp_add(p1_exp), .sign_res(p1_sign),
    .nonzero(p1_nz), .sign_out(s3_sign), .exp_out(s3_exp), .man_out(s3_man),
    .exp_norm(s3_expn), .overflow(s3_ovf), .underflow(s3_unf)
  );

  // ---------------- OUTPUT REGS ----------------
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_prec  <= PREC_FP16;
      sign_out  <= 1'b0;
      exp_out   <= '0;
      man_out   <= '0;
    end else begin
      out_valid <= p1_v;
      if (p1_v) begin
        out_prec <= p1_prec;
        sign_out <= s3_sign;
        exp_out  <= s3_exp;
        man_out  <= s3_man;
      end
    end
  end

  // Beat 1 must follow beat 0 in the next cycle.
  a_two_beats: assert property (@(posedge clk) disable iff (!rst_n) beat |-> in_valid)
    else $error("dpu: second beat of an operation missing");
endmodule
