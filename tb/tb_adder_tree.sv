// tb_adder_tree: checks the 10-input carry-save tree plus its extra carry
// input against a plain signed sum, including all-maximum and all-minimum
// inputs.
module tb_adder_tree;
  import dpu_pkg::*;
  logic [60:0] t [N_MUL];
  logic [15:0] ex;
  logic [64:0] sum;
  logic signed [64:0] r;
  int checks = 0, failures = 0;

  adder_tree dut (.terms(t), .extra_in(ex), .sum(sum));

  initial begin
    for (int i = 0; i < 10000; i++) begin
      r = '0;
      ex = (i % 2) ? 16'($urandom) : '0;
      for (int k = 0; k < int'(N_MUL); k++) begin
        case (i)
          0:       t[k] = {1'b0, {60{1'b1}}};
          1:       t[k] = {1'b1, 60'b0};
          default: t[k] = {$urandom, $urandom};
        endcase
        r += 65'(signed'(t[k]));
      end
      r += 65'(ex);
      #1;
      checks++;
      if (sum !== r) begin
        failures++;
        if (failures < 10) $display("FAIL sum=%h ref=%h", sum, r);
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
