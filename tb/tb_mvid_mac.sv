// tb_mvid_mac: random sequences of (en, clr, w, x) against an integer model of the
// 12x12-bit signed MAC with a 24-bit wrapping accumulator; clr with en starts a new
// row with the current product, clr alone empties the accumulator.
module tb_mvid_mac;
  import mvid_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic en, clr;
  logic signed [DATA_W-1:0] w, x;
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  ref_acc;

  mvid_mac dut (.clk, .rst_n, .en_i(en), .clr_i(clr), .w_i(w), .x_i(x), .acc_o(acc));

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    en = 0; clr = 0; w = '0; x = '0; ref_acc = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      checks++;
      if (acc !== ref_acc) begin
        failures++;
        if (failures < 5) $display("t=%0d acc %0d exp %0d", t, acc, ref_acc);
      end
      en  = ($urandom_range(0, 3) != 0);
      clr = ($urandom_range(0, 9) == 0);
      w   = DATA_W'($urandom);
      x   = DATA_W'($urandom);
      if (en) ref_acc = (clr ? 24'sd0 : ref_acc) + ACC_W'(w * x);
      else if (clr) ref_acc = '0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
