// tb_accumulation: checks that the two cycle sums are combined at the larger
// of their two exponents, the other one shifted right arithmetically, and
// that the realignment flag marks differing exponents.
module tb_accumulation;
  import dpu_pkg::*;
  logic [64:0] sn, sp;
  exp_t mn, mp, amax;
  logic [65:0] acc;
  logic re;
  logic signed [65:0] r;
  int d, checks = 0, failures = 0;

  accumulation dut (.sum_now(sn), .max_now(mn), .sum_prev(sp), .max_prev(mp),
                    .acc(acc), .acc_max(amax), .realigned(re));

  initial begin
    for (int i = 0; i < 10000; i++) begin
      sn = {$urandom, $urandom, $urandom}; sp = {$urandom, $urandom, $urandom};
      sn = 65'(signed'(sn[62:0])); sp = 65'(signed'(sp[62:0]));
      mn = exp_t'(int'($urandom % 200) - 100);
      mp = (i % 3 == 0) ? mn : exp_t'(int'(mn) + int'($urandom % 90) - 45);
      d = int'(mn) - int'(mp);
      if (d >= 0) r = 66'(signed'(sn)) + (66'(signed'(sp)) >>> d);
      else        r = (66'(signed'(sn)) >>> (-d)) + 66'(signed'(sp));
      #1;
      checks++;
      if (acc !== r || amax !== ((d >= 0) ? mn : mp) || re !== (d != 0)) begin
        failures++;
        if (failures < 10) $display("FAIL d=%0d acc=%h ref=%h", d, acc, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
