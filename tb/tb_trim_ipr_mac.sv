// tb_trim_ipr_mac: the IPR multiply-add. Sum mode must give round(acc + data);
// weighted-sum mode round(acc + round(weight x data)) - the product is rounded to
// single before the add. Reference in double precision (tb_fp_pkg).
module tb_trim_ipr_mac;
  import tb_fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] acc, data, w, y;
  logic        wsum;
  trim_ipr_mac dut (.acc_i(acc), .data_i(data), .weight_i(w), .wsum_i(wsum), .y_o(y));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      logic [31:0] e;
      acc  = rnd32(110, 140);
      data = rnd32(110, 140);
      w    = rnd32(115, 135);
      wsum = t[0];
      e = wsum ? to32(f2r(acc) + f2r(to32(f2r(w) * f2r(data)))) : to32(f2r(acc) + f2r(data));
      #1;
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 8) $display("acc %h data %h w %h wsum %b: %h expected %h", acc, data, w, wsum, y, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
