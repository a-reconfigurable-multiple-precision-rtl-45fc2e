// tb_dpu_array: end-to-end test of the DPU array at its default size.
//
// Every operation broadcasts one precision to all units and gives each unit
// its own operands (random FP16 / FP32 / FP64 dot products, plus directed
// rounding-carry, cancellation, overflow and underflow cases). Each unit's
// result is compared with the exact reference rounded with roundTiesToAway
// and must appear 4 clock edges after the edge that sampled the first beat.
// Mechanisms of the datapath are counted in unit 0; the test fails if one of
// them never fired.
module tb_dpu_array;
  import dpu_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_OPS   = 300;
  localparam int LATENCY = 4;
  localparam int ND      = 4;     // must match the array's default size

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  prec_e in_prec = PREC_FP16;
  logic [159:0] in_a [ND], in_b [ND];
  logic out_valid;
  prec_e out_prec;
  logic sign_out [ND];
  logic [10:0] exp_out [ND];
  logic [51:0] man_out [ND];

  dpu_array dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { op_t o [ND]; int due; } pend_t;
  pend_t q [$];

  int n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up,
      n_exp_norm, n_ovf, n_unf, n_zero, n_switch, n_b2b;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (dut.g_dpu[0].u_dpu.r_v && dut.g_dpu[0].u_dpu.r_ph && dut.g_dpu[0].u_dpu.r_prec == PREC_FP64) begin
      if (dut.g_dpu[0].u_dpu.lanes[6].fmode == FM_2X12X5)    n_mix2++;
      if (dut.g_dpu[0].u_dpu.lanes[9].fmode == FM_12X5_17X5) n_mix3++;
    end
    if (dut.g_dpu[0].u_dpu.p0_v && dut.g_dpu[0].u_dpu.p0_ph &&
        dut.g_dpu[0].u_dpu.p0_prec == PREC_FP64 && dut.g_dpu[0].u_dpu.carry_in != '0) n_carry++;
    if (dut.g_dpu[0].u_dpu.p0_v && dut.g_dpu[0].u_dpu.p0_ph &&
        dut.g_dpu[0].u_dpu.p0_prec == PREC_FP16 && dut.g_dpu[0].u_dpu.realigned) n_realign++;
    if (dut.g_dpu[0].u_dpu.p1_v && dut.g_dpu[0].u_dpu.p1_nz && dut.g_dpu[0].u_dpu.u_rnd.rbit) n_rnd_up++;
    if (dut.g_dpu[0].u_dpu.p1_v && dut.g_dpu[0].u_dpu.p1_nz && dut.g_dpu[0].u_dpu.s3_expn) n_exp_norm++;
    if (dut.g_dpu[0].u_dpu.p1_v && dut.g_dpu[0].u_dpu.s3_ovf) n_ovf++;
    if (dut.g_dpu[0].u_dpu.p1_v && dut.g_dpu[0].u_dpu.s3_unf) n_unf++;
    if (dut.g_dpu[0].u_dpu.p1_v && !dut.g_dpu[0].u_dpu.p1_nz) n_zero++;
    if (out_valid) begin
      pend_t e;
      if (q.size() == 0) begin
        checks++; failures++;
        $display("FAIL unexpected result at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        for (int d = 0; d < ND; d++) begin
          checks++;
          if (cyc != e.due || out_prec != prec_e'(e.o[d].p) ||
              {sign_out[d], exp_out[d], man_out[d]} !== e.o[d].r) begin
            failures++;
            if (failures < 10)
              $display("FAIL unit %0d p=%0d cyc=%0d due=%0d got %b %h %h ref %b %h %h", d, e.o[d].p,
                       cyc, e.due, sign_out[d], exp_out[d], man_out[d], e.o[d].r.s, e.o[d].r.e, e.o[d].r.m);
          end
        end
      end
    end
  end

  initial begin
    int last_p, kind, p;
    pend_t e;
    int m [14];
    last_p = -1;
    for (int d = 0; d < ND; d++) begin in_a[d] = '0; in_b[d] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N_OPS; i++) begin
      // first nine operations: random FP16/FP32/FP64, then the directed cases
      kind = (i < 9) ? i : int'($urandom % 3);
      if (i >= 9 && i % 53 == 20) kind = 3 + int'($urandom % 4);
      for (int d = 0; d < ND; d++) e.o[d] = make_op(kind);
      p = e.o[0].p;
      case (p) 0: n_fp16++; 1: n_fp32++; default: n_fp64++; endcase
      if (last_p >= 0 && last_p != p) n_switch++;
      last_p = p;
      e.due = cyc + 1 + LATENCY;
      q.push_back(e);
      in_valid = 1'b1; in_prec = prec_e'(p);
      for (int d = 0; d < ND; d++) begin in_a[d] = e.o[d].a0; in_b[d] = e.o[d].b0; end
      @(negedge clk);
      for (int d = 0; d < ND; d++) begin in_a[d] = e.o[d].a1; in_b[d] = e.o[d].b1; end
      @(negedge clk);
      in_valid = 1'b0;
      if ($urandom % 4 == 0) repeat ($urandom % 3 + 1) @(negedge clk);
      else n_b2b++;
    end
    repeat (LATENCY + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("mechanisms: fp16=%0d fp32=%0d fp64=%0d fused_2x12x5=%0d fused_12x5_17x5=%0d fp64_carry=%0d realign=%0d round_up=%0d exp_norm=%0d overflow=%0d underflow=%0d zero=%0d mode_switch=%0d back_to_back=%0d",
             n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up, n_exp_norm,
             n_ovf, n_unf, n_zero, n_switch, n_b2b);
    m = '{n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up,
          n_exp_norm, n_ovf, n_unf, n_zero, n_switch, n_b2b};
    for (int k = 0; k < 14; k++) begin
      checks++;
      if (m[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
