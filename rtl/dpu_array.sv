// dpu_array: reconfigurable multiple-precision DPU array. N_DPU dot product
// units share one mode selection and one valid strobe (the instruction
// setup), each with its own pair of 160-bit operand words (the data loading
// path) and its own result. Every unit behaves and times exactly as dpu:
// two input beats per operation, result 4 clock edges after the edge that samples beat 0.
// The number of units is not fixed by the published design ("n"); 4 is this
// design's default.
module dpu_array
  import dpu_pkg::*;
#(
  parameter int unsigned N_DPU = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  prec_e           in_prec,
  input  logic [IN_W-1:0] in_a [N_DPU],
  input  logic [IN_W-1:0] in_b [N_DPU],
  output logic            out_valid,
  output prec_e           out_prec,
  output logic            sign_out [N_DPU],
  output logic [10:0]     exp_out  [N_DPU],
  output logic [51:0]     man_out  [N_DPU]
);
  logic  v   [N_DPU];
  prec_e prc [N_DPU];

  for (genvar d = 0; d < N_DPU; d++) begin : g_dpu
    dpu u_dpu (
      .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_prec(in_prec),
      .in_a(in_a[d]), .in_b(in_b[d]),
      .out_valid(v[d]), .out_prec(prc[d]),
      .sign_out(sign_out[d]), .exp_out(exp_out[d]), .man_out(man_out[d])
    );
  end

  // all units run in lock step; unit 0 speaks for the array
  assign out_valid = v[0];
  assign out_prec  = prc[0];
endmodule
