// tb_output_process: checks sign/magnitude conversion of the 66-bit sum
// (FP16/FP32) and the FP64 splice {Sum2[57:0], Sum1[47:0]} with its sign.
module tb_output_process;
  import dpu_pkg::*;
  prec_e prec;
  logic [65:0] acc;
  logic [64:0] s2;
  logic [47:0] s1;
  logic s64, sres;
  logic [106:0] mag, rmag;
  logic signed [65:0] a;
  int checks = 0, failures = 0;

  output_process dut (.prec(prec), .acc(acc), .sum2(s2), .sum1_low(s1), .sign64(s64),
                      .sign_res(sres), .mag(mag));

  initial begin
    for (int i = 0; i < 6000; i++) begin
      prec = prec_e'(i % 3);
      acc = {$urandom, $urandom, $urandom}; acc = 66'(signed'(acc[63:0]));
      s2 = 65'({$urandom, $urandom} & 64'h03ff_ffff_ffff_ffff);
      s1 = 48'({$urandom, $urandom});
      s64 = 1'($urandom);
      a = signed'(acc);
      if (prec == PREC_FP64) rmag = 107'(s2) * (107'(1) << 48) + 107'(s1);
      else                   rmag = (a < 0) ? 107'(-a) : 107'(a);
      #1;
      checks++;
      if (mag !== rmag || sres !== ((prec == PREC_FP64) ? s64 : (a < 0))) begin
        failures++;
        if (failures < 10) $display("FAIL prec=%0d mag=%h ref=%h", prec, mag, rmag);
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
