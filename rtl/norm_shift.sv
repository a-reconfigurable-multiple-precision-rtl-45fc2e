// norm_shift: normalization shifter. Shifts the 107-bit magnitude left by
// lza_cnt so that its leading one lands in bit 106. Combinational.
module norm_shift
  import dpu_pkg::*;
(
  input  logic [OUT_W-1:0] mag,
  input  logic [LZC_W-1:0] lza_cnt,
  output logic [OUT_W-1:0] norm
);
  assign norm = mag << lza_cnt;
endmodule
