// tb_mvid_adder_tree: the 16-input 24-bit adder tree against a plain sum
// (modulo 2^24) of random inputs, including all-ones and single-input patterns.
module tb_mvid_adder_tree;
  import mvid_pkg::*;
  int checks = 0, failures = 0;
  logic [N_PAIRS-1:0][ACC_W-1:0] in_v;
  logic [ACC_W-1:0]              sum;

  mvid_adder_tree dut (.in_i(in_v), .sum_o(sum));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      logic [ACC_W-1:0] s;
      s = '0;
      for (int k = 0; k < N_PAIRS; k++) begin
        in_v[k] = (t == 0) ? '1 : (t < 17 ? ((k == t - 1) ? ACC_W'($urandom) : '0) : ACC_W'($urandom));
        s += in_v[k];
      end
      #1;
      checks++;
      if (sum !== s) begin
        failures++;
        if (failures < 5) $display("t=%0d sum %h exp %h", t, sum, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
