// tb_mixed_workload: mixed-precision throughput workload on one dot product
// unit. For each pair of precisions (FP16/FP32, FP16/FP64, FP32/FP64) and
// each share of low-precision products (0, 20, 40, 60, 80, 100 % of 100
// products), it streams the products as back-to-back operations (20 FP16,
// 5 FP32 or 1 FP64 product per operation), checks every result against the
// exact reference, and measures the cycles from the first beat to the last
// result. The measured cycles must equal 2 per operation plus the pipeline
// latency. From them it reports the throughput relative to a fixed-precision
// unit of the higher precision that handles its own number of products per
// two cycles for either precision: 5 for FP32, 1 for FP64. At 100 % the
// ratios must be 4 (FP16 vs FP32), 20 (FP16 vs FP64) and 5 (FP32 vs FP64).
module tb_mixed_workload;
  import dpu_pkg::*;
  import tb_ref_pkg::*;

  localparam int LATENCY = 4;
  localparam int TOTAL   = 100;

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

  int checks = 0, failures = 0, cyc = 0, last_out = 0;
  op_t q [$];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n && out_valid) begin
    op_t o;
    checks++;
    last_out = cyc;
    if (q.size() == 0) begin failures++; $display("FAIL unexpected result"); end
    else begin
      o = q.pop_front();
      if ({sign_out, exp_out, man_out} !== o.r || out_prec != prec_e'(o.p)) begin
        failures++;
        if (failures < 10) $display("FAIL p=%0d", o.p);
      end
    end
  end

  // products per operation of precision p
  function automatic int per_op(int p);
    return (p == 0) ? 20 : (p == 1) ? 5 : 1;
  endfunction

  initial begin
    int lo, hi, fx, n_lo, n_hi, ops, start, cycles, rel_x100, exp_x100;
    int lo_p [4] = '{0, 0, 0, 1};
    int hi_p [4] = '{1, 1, 2, 2};
    int fx_p [4] = '{1, 2, 2, 2};   // precision of the fixed unit compared with
    op_t o;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int s = 0; s < 4; s++) begin
      lo = lo_p[s]; hi = hi_p[s]; fx = fx_p[s];
      for (int pct = 0; pct <= 100; pct += 20) begin
        n_lo = TOTAL * pct / 100;
        n_hi = TOTAL - n_lo;
        ops  = (n_lo + per_op(lo) - 1) / per_op(lo) + (n_hi + per_op(hi) - 1) / per_op(hi);
        start = cyc + 1;  // edge that samples the first beat
        for (int k = 0; k < ops; k++) begin
          int p;
          p = (k < (n_lo + per_op(lo) - 1) / per_op(lo)) ? lo : hi;
          o = make_op(p);
          q.push_back(o);
          in_valid = 1'b1; in_prec = prec_e'(p); in_a = o.a0; in_b = o.b0;
          @(negedge clk);
          in_a = o.a1; in_b = o.b1;
          @(negedge clk);
        end
        in_valid = 1'b0;
        repeat (LATENCY + 2) @(negedge clk);
        cycles = last_out - start;
        checks++;
        if (cycles != 2 * (ops - 1) + LATENCY || q.size() != 0) begin
          failures++;
          $display("FAIL %0d%% cycles=%0d ops=%0d", pct, cycles, ops);
        end
        // fixed unit: per_op(hi) products of either precision per two cycles
        rel_x100 = (100 * 2 * TOTAL / per_op(fx)) / (2 * ops);
        exp_x100 = (100 * TOTAL / per_op(fx)) /
                   ((n_lo + per_op(lo) - 1) / per_op(lo) + (n_hi + per_op(hi) - 1) / per_op(hi));
        checks++;
        if (rel_x100 != exp_x100) failures++;
        $display("FP%0d/FP%0d vs fixed FP%0d %0d%%/%0d%%: %0d operations, %0d cycles, relative throughput %0d.%02d",
                 16 << lo, 16 << hi, 16 << fx, pct, 100 - pct, ops, 2 * ops, rel_x100 / 100, rel_x100 % 100);
        if (pct == 100) begin
          checks++;
          if (rel_x100 != 100 * per_op(lo) / per_op(fx)) begin
            failures++;
            $display("FAIL peak ratio %0d", rel_x100);
          end
        end
      end
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
