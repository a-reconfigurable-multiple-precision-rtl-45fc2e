// tb_dpu: end-to-end test of one dot product unit.
//
// Runs random FP16 (20 products), FP32 (5 products) and FP64 (1 product)
// operations back to back with random idle gaps and precision switches, plus
// directed cases (rounding carry into the exponent, exact cancellation,
// overflow and underflow in FP16 and FP64). Each result is compared with the
// exact reference rounded with roundTiesToAway, and must appear exactly 4
// clock edges after its first beat was sampled. Beat-1 operand words of
// FP32/FP64 operations carry random junk that the unit must ignore.
// The test also counts how often each mechanism of the unit fired and fails
// if one never did.
module tb_dpu;
  import dpu_pkg::*;
  import tb_ref_pkg::*;

  localparam int N_OPS   = 600;
  localparam int LATENCY = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  prec_e in_prec = PREC_FP16;
  logic [159:0] in_a = '0, in_b = '0;
  logic out_valid, sign_out;
  prec_e out_prec;
  logic [10:0] exp_out;
  logic [51:0] man_out;

  dpu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cyc = 0;
  typedef struct { op_t o; int due; } exp_t_;
  exp_t_ q [$];

  // mechanism counters
  int n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up,
      n_exp_norm, n_ovf, n_unf, n_zero, n_switch, n_b2b;

  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    if (dut.r_v && dut.r_ph && dut.r_prec == PREC_FP64) begin
      if (dut.lanes[6].fmode == FM_2X12X5)    n_mix2++;
      if (dut.lanes[9].fmode == FM_12X5_17X5) n_mix3++;
    end
    if (dut.p0_v && dut.p0_ph && dut.p0_prec == PREC_FP64 && dut.carry_in != '0) n_carry++;
    if (dut.p0_v && dut.p0_ph && dut.p0_prec == PREC_FP16 && dut.realigned) n_realign++;
    if (dut.p1_v && dut.p1_nz && dut.u_rnd.rbit) n_rnd_up++;
    if (dut.p1_v && dut.p1_nz && dut.s3_expn)    n_exp_norm++;
    if (dut.p1_v && dut.s3_ovf) n_ovf++;
    if (dut.p1_v && dut.s3_unf) n_unf++;
    if (dut.p1_v && !dut.p1_nz) n_zero++;
    if (out_valid) begin
      exp_t_ e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected result at cycle %0d", cyc);
      end else begin
        e = q.pop_front();
        if (cyc != e.due || out_prec != prec_e'(e.o.p) ||
            {sign_out, exp_out, man_out} !== e.o.r) begin
          failures++;
          if (failures < 10)
            $display("FAIL p=%0d cyc=%0d due=%0d got %b %h %h ref %b %h %h", e.o.p, cyc, e.due,
                     sign_out, exp_out, man_out, e.o.r.s, e.o.r.e, e.o.r.m);
        end
      end
    end
  end

  task automatic run_op(op_t o);
    exp_t_ e;
    e.o = o;
    e.due = cyc + 1 + LATENCY;   // sampled at the next edge
    q.push_back(e);
    in_valid = 1'b1; in_prec = prec_e'(o.p); in_a = o.a0; in_b = o.b0;
    @(negedge clk);
    in_prec = prec_e'($urandom % 3);  // ignored on beat 1
    in_a = o.a1; in_b = o.b1;
    @(negedge clk);
    in_valid = 1'b0; in_a = {5{$urandom, $urandom}}; in_b = {5{$urandom, $urandom}};
  endtask

  initial begin
    int last_p, kind;
    op_t o;
    last_p = -1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < N_OPS; i++) begin
      kind = (i < 9) ? i : int'($urandom % 3);
      if (i % 97 == 50) kind = 3 + int'($urandom % 6);
      o = make_op(kind);
      case (o.p) 0: n_fp16++; 1: n_fp32++; default: n_fp64++; endcase
      if (last_p >= 0 && last_p != o.p) n_switch++;
      last_p = o.p;
      run_op(o);
      if ($urandom % 4 == 0) repeat ($urandom % 3 + 1) @(negedge clk);
      else n_b2b++;
    end
    repeat (LATENCY + 4) @(negedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d results missing", q.size()); end
    $display("mechanisms: fp16=%0d fp32=%0d fp64=%0d fused_2x12x5=%0d fused_12x5_17x5=%0d fp64_carry=%0d realign=%0d round_up=%0d exp_norm=%0d overflow=%0d underflow=%0d zero=%0d mode_switch=%0d back_to_back=%0d",
             n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up, n_exp_norm,
             n_ovf, n_unf, n_zero, n_switch, n_b2b);
    begin
      int m [14];
      m = '{n_fp16, n_fp32, n_fp64, n_mix2, n_mix3, n_carry, n_realign, n_rnd_up,
            n_exp_norm, n_ovf, n_unf, n_zero, n_switch, n_b2b};
      for (int k = 0; k < 14; k++) begin
        checks++;
        if (m[k] == 0) begin failures++; $display("FAIL mechanism %0d never happened", k); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
