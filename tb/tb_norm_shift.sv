// tb_norm_shift: checks that the shift by the leading-zero count brings the
// leading one to bit 106 and keeps the bits below it in order.
module tb_norm_shift;
  import dpu_pkg::*;
  logic [106:0] mag, norm, r;
  logic [6:0] cnt;
  int checks = 0, failures = 0;

  norm_shift dut (.mag(mag), .lza_cnt(cnt), .norm(norm));

  initial begin
    for (int i = 0; i < 5000; i++) begin
      int pos;
      pos = int'($urandom % 107);
      mag = {$urandom, $urandom, $urandom, $urandom};
      mag = mag & ((107'(1) << pos) - 1);
      mag[pos] = 1'b1;
      cnt = 7'(106 - pos);
      r = mag * (107'(1) << (106 - pos));
      #1;
      checks++;
      if (norm !== r || !norm[106]) begin
        failures++;
        if (failures < 10) $display("FAIL pos=%0d", pos);
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
