// tb_trim_fp32_add: the fp32 adder against a double-precision reference rounded
// once to single (tb_fp_pkg). Random operands with close and distant exponents,
// exact cancellations, zeros, infinities and NaNs.
module tb_trim_fp32_add;
  import tb_fp_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] a, b, y;
  trim_fp32_add dut (.a_i(a), .b_i(b), .y_o(y));

  task automatic check(input logic [31:0] exp_v);
    #1;
    checks++;
    if (y !== exp_v) begin
      failures++;
      if (failures < 8) $display("%h + %h = %h, expected %h", a, b, y, exp_v);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 20000; t++) begin
      int ea;
      ea = $urandom_range(60, 190);
      a = rnd32(ea, ea);
      case (t % 4)
        0: b = rnd32(ea, ea);                                   // same exponent
        1: b = rnd32(ea - 3 > 40 ? ea - 3 : 40, ea + 3);        // close
        2: b = rnd32(ea - 26 > 40 ? ea - 26 : 40, ea + 26);     // distant
        default: b = {~a[31], a[30:0]} ^ 32'($urandom_range(0, 3));  // near cancellation
      endcase
      check(to32(f2r(a) + f2r(b)));
    end
    a = 32'h3F80_0000; b = 32'hBF80_0000; check(32'h0000_0000);   // 1 - 1 = +0
    a = 32'h0000_0000; b = 32'h4040_0000; check(32'h4040_0000);   // 0 + 3
    a = 32'h7F80_0000; b = 32'h4040_0000; check(32'h7F80_0000);   // inf + 3
    a = 32'h7F80_0000; b = 32'hFF80_0000; check(32'h7FC0_0000);   // inf - inf
    a = 32'h7FC0_1234; b = 32'h3F80_0000; check(32'h7FC0_0000);   // NaN
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; check(32'h7F80_0000);   // overflow
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
