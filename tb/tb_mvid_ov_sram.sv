// tb_mvid_ov_sram: checks the output-vector SRAM (one write and one synchronous
// read port) against a shadow array: random writes, then random reads, and a
// read of the address written in the same cycle (old data are returned).
module tb_mvid_ov_sram;
  import mvid_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic             we;
  logic [OVA_W-1:0] wa, ra;
  logic [ACC_W-1:0] wd, rd;
  logic [ACC_W-1:0] ref_mem [OV_DEPTH];

  mvid_ov_sram dut (.clk, .we_i(we), .waddr_i(wa), .wdata_i(wd), .raddr_i(ra), .rdata_o(rd));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 0; wa = '0; wd = '0; ra = '0;
    for (int a = 0; a < OV_DEPTH; a++) begin
      @(negedge clk);
      we = 1; wa = OVA_W'(a); wd = ACC_W'($urandom); ref_mem[a] = wd;
    end
    for (int t = 0; t < 2000; t++) begin
      logic [OVA_W-1:0] a;
      logic [ACC_W-1:0] exp_v;
      @(negedge clk);
      a = OVA_W'($urandom_range(0, OV_DEPTH - 1));
      ra = a;
      exp_v = ref_mem[a];
      we = ($urandom_range(0, 1) == 1);
      wa = (t % 5 == 0) ? a : OVA_W'($urandom_range(0, OV_DEPTH - 1));
      wd = ACC_W'($urandom);
      if (we) ref_mem[wa] = wd;
      @(posedge clk);
      #1;
      checks++;
      if (rd !== exp_v) begin
        failures++;
        if (failures < 5) $display("addr %0d got %h exp %h", a, rd, exp_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
