// tb_lza: checks the leading-zero count of the 107-bit magnitude for a
// leading one at every position (random bits below it) and for zero.
module tb_lza;
  import dpu_pkg::*;
  logic [106:0] mag;
  logic [6:0] cnt;
  logic nz;
  int checks = 0, failures = 0;

  lza dut (.mag(mag), .lza_cnt(cnt), .nonzero(nz));

  initial begin
    for (int r = 0; r < 20; r++)
      for (int pos = -1; pos < 107; pos++) begin
        mag = {$urandom, $urandom, $urandom, $urandom};
        if (pos < 0) mag = '0;
        else begin
          mag = mag & ((107'(1) << pos) - 1);
          mag[pos] = 1'b1;
        end
        #1;
        checks++;
        if (int'(cnt) != 106 - pos || nz !== (pos >= 0)) begin
          failures++;
          if (failures < 10) $display("FAIL pos=%0d cnt=%0d", pos, cnt);
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
