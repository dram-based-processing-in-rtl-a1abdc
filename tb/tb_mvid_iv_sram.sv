// tb_mvid_iv_sram: checks the input-vector SRAM of an MV-bank.
//
// Fills all 1,600 entries with 16-element burst writes (as WR-iv does), then reads
// 16 random addresses per cycle and compares with a shadow array one cycle later
// (synchronous read). Out-of-range addresses must read 0.
module tb_mvid_iv_sram;
  import mvid_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  logic                                we;
  logic [COL_W-1:0]                    waddr;
  logic [N_PAIRS-1:0][DATA_W-1:0]      wdata;
  logic [N_PAIRS-1:0][COL_W-1:0]       raddr;
  logic [N_PAIRS-1:0][DATA_W-1:0]      rdata;
  logic [DATA_W-1:0]                   ref_mem [IV_DEPTH];

  mvid_iv_sram dut (.clk, .we_i(we), .waddr_i(waddr), .wdata_i(wdata), .raddr_i(raddr), .rdata_o(rdata));

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N_PAIRS-1:0][COL_W-1:0] ra;
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    for (int a = 0; a < IV_DEPTH; a += N_PAIRS) begin
      @(negedge clk);
      we = 1;
      waddr = COL_W'(a);
      for (int k = 0; k < N_PAIRS; k++) begin
        wdata[k] = DATA_W'($urandom);
        ref_mem[a + k] = wdata[k];
      end
    end
    @(negedge clk);
    we = 0;
    for (int t = 0; t < 500; t++) begin
      for (int k = 0; k < N_PAIRS; k++) ra[k] = COL_W'($urandom_range(0, IV_DEPTH + 100));
      raddr = ra;
      @(negedge clk);
      for (int k = 0; k < N_PAIRS; k++) begin
        checks++;
        if (rdata[k] !== (int'(ra[k]) < IV_DEPTH ? ref_mem[ra[k]] : '0)) begin
          failures++;
          if (failures < 5) $display("addr %0d got %h", ra[k], rdata[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
