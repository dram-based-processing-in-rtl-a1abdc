// tb_mvid_mcu: MV-bank control unit with modelled MV-banks around it.
//
// The testbench plays the memory controller and the four MV-banks (busy, paused,
// complete, ACT requests, ov-SRAMs holding a known function of bank and address).
// It checks: CFG + WR-iv broadcast (every burst reaches the iv-SRAM port, the last
// one starts the configured MV-banks only); normal commands reach their bank 2
// cycles after acceptance when no MV-mul runs; with an MV-mul running the first one
// broadcasts slow-down and reaches the bank 2 cycles later than normal (3 tCK after
// decode), the next one is not delayed; s-PRE ends slow-down; p-PRE pauses the
// target MV-bank and slows the others, r-PRE resumes it and precharges; RD-ov polls
// answer busy / done; an RD-ov read returns the 10 right entries; ACT grants are
// round-robin and exactly tRRD apart (2 x tRRD while slowed down).
module tb_mvid_mcu;
  import mvid_pkg::*;
  localparam int T_RRD = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_cmd_t                       cmd;
  logic                            ready;
  bank_cmd_t [N_BANKS-1:0]         bcmd;
  rdov_rsp_t                       rdov;
  logic                            slow;
  logic [N_MVB-1:0]                pause, resume, start, busy, paused, complete, act_req, act_gnt;
  logic [N_MVB-1:0][ROW_W-1:0]     row_base;
  logic [N_MVB-1:0][15:0]          nreads;
  logic                            iv_we;
  logic [COL_W-1:0]                iv_waddr;
  logic [N_PAIRS-1:0][DATA_W-1:0]  iv_wdata;
  logic [OVA_W-1:0]                ov_raddr;
  logic [N_MVB-1:0][ACC_W-1:0]     ov_rdata;

  mvid_mcu dut (.clk, .rst_n, .cmd_i(cmd), .cmd_ready_o(ready), .host_bank_cmd_o(bcmd), .rdov_o(rdov),
    .slow_o(slow), .pause_o(pause), .resume_o(resume), .start_o(start), .row_base_o(row_base),
    .nreads_o(nreads), .busy_i(busy), .paused_i(paused), .complete_i(complete), .act_req_i(act_req),
    .act_gnt_o(act_gnt), .iv_we_o(iv_we), .iv_waddr_o(iv_waddr), .iv_wdata_o(iv_wdata),
    .ov_raddr_o(ov_raddr), .ov_rdata_i(ov_rdata));

  function automatic logic [ACC_W-1:0] ovf(input int b, input int a);
    return ACC_W'(b * 100003 + a * 7919 + 5);
  endfunction
  always_ff @(posedge clk)
    for (int b = 0; b < N_MVB; b++) ov_rdata[b] <= ovf(b, int'(ov_raddr));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, s);
  endtask
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) fail(s);
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one command; returns the cycle it was accepted in
  task automatic send(input host_cmd_t c, output int acc_cyc);
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c;
    @(posedge clk);
    acc_cyc = cyc;
    #1 cmd = '0;
  endtask
  function automatic host_cmd_t hc(input host_op_e op, input int bank, input int row = 0,
                                   input int col = 0, input int arg = 0, input bit flag = 0);
    host_cmd_t c;
    c = '0;
    c.op = op; c.bank = 3'(bank); c.row = ROW_W'(row); c.col = DCOL_W'(col);
    c.arg = 16'(arg); c.flag = flag;
    return c;
  endfunction
  // cycles from acceptance until the bank command shows up on bank b
  task automatic bank_lat(input int b, input bank_op_e op, input int acc_cyc, output int lat);
    lat = -1;
    for (int i = 0; i < 10; i++) begin
      if (bcmd[b].op == op) begin
        lat = cyc - acc_cyc;
        break;
      end
      @(posedge clk);
      #1;
    end
  endtask

  initial begin
    int a, lat, n_sd = 0, n_pause = 0, n_resume = 0, n_spre = 0;
    host_cmd_t c;
    cmd = '0; busy = '0; paused = '0; complete = '0; act_req = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- CFG and WR-iv broadcast
    send(hc(HC_CFG, 2, 100, 0, 50), a);
    send(hc(HC_CFG, 4, 300, 0, 70), a);
    for (int blk = 0; blk < 4; blk++) begin
      c = hc(HC_WRIV, 0, 0, 0, blk * 16, blk == 3);
      for (int k = 0; k < N_PAIRS; k++) c.wdata[16*k +: 16] = 16'(blk * 1000 + k);
      send(c, a);
      @(posedge clk);
      #1;
      chk(iv_we && iv_waddr == COL_W'(blk * 16) && iv_wdata[5] == DATA_W'(blk * 1000 + 5), "WR-iv burst");
      chk(start == ((blk == 3) ? 4'b0101 : 4'b0000), "start on last WR-iv");
      if (blk == 3) chk(row_base[0] == 100 && nreads[2] == 70, "CFG values");
    end

    // ---- normal command, no MV-mul
    send(hc(HC_ACT, 0, 55), a);
    bank_lat(0, BC_ACT, a, lat);
    chk(lat == 2 && !slow, $sformatf("normal latency %0d", lat));

    // ---- MV-mul running: slow-down broadcast on the first normal command
    busy = 4'b1111;
    send(hc(HC_RD, 1, 0, 3), a);
    bank_lat(1, BC_RD, a, lat);
    chk(lat == 4 && slow, $sformatf("SD latency %0d slow %b", lat, slow));
    if (slow) n_sd++;
    send(hc(HC_RD, 1, 0, 4), a);
    bank_lat(1, BC_RD, a, lat);
    chk(lat == 2, $sformatf("second normal latency %0d", lat));

    // ---- ACT grants while slowed down: 2 x tRRD
    begin
      int last = -1, n = 0, exp_i = -1;
      act_req = 4'b1111;
      for (int i = 0; i < 200; i++) begin
        @(posedge clk);
        #1;
        if (act_gnt != 0) begin
          chk($onehot(act_gnt), "one grant");
          if (last >= 0) chk(cyc - last == 2 * T_RRD, $sformatf("slow tRRD spacing %0d", cyc - last));
          if (exp_i >= 0) chk(act_gnt[exp_i], "round-robin");
          for (int k = 0; k < N_MVB; k++) if (act_gnt[k]) exp_i = (k + 1) % N_MVB;
          last = cyc;
          n++;
        end
      end
      chk(n >= 5, "grants given");
      act_req = '0;
    end

    // ---- s-PRE: speed up
    send(hc(HC_SPRE, 3), a);
    bank_lat(3, BC_PRE, a, lat);
    chk(lat == 2 && !slow, "s-PRE precharges and ends slow-down");
    if (!slow) n_spre++;

    // ---- ACT grants at full speed: tRRD
    begin
      int last = -1, n = 0;
      act_req = 4'b1011;
      for (int i = 0; i < 120; i++) begin
        @(posedge clk);
        #1;
        if (act_gnt != 0) begin
          if (last >= 0) chk(cyc - last == T_RRD, $sformatf("tRRD spacing %0d", cyc - last));
          chk(act_gnt != 4'b0100, "no grant without request");
          last = cyc;
          n++;
        end
      end
      chk(n >= 6, "grants at full speed");
      act_req = '0;
    end

    // ---- p-PRE / r-PRE
    send(hc(HC_PPRE, 3), a);
    @(posedge clk);
    #1;
    chk(pause == 4'b0010 && slow, "p-PRE pauses MV-bank 1 and slows the others");
    if (pause[1]) n_pause++;
    paused = 4'b0010;
    send(hc(HC_RPRE, 3), a);
    @(posedge clk);
    #1;
    chk(resume == 4'b0010 && bcmd[3].op == BC_PRE, "r-PRE resumes and precharges");
    if (resume[1]) n_resume++;
    paused = '0;

    // ---- RD-ov poll and read
    send(hc(HC_RDOV, 4, 0, 0, 0, 1), a);
    @(posedge clk);
    #1;
    chk(rdov.valid && rdov.data == RDOV_BUSY, "poll busy");
    complete = 4'b0100;
    send(hc(HC_RDOV, 4, 0, 0, 0, 1), a);
    @(posedge clk);
    #1;
    chk(rdov.valid && rdov.data == RDOV_DONE, "poll done");
    send(hc(HC_RDOV, 4, 0, 0, 37, 0), a);
    begin
      int w = 0;
      while (!rdov.valid && w < 40) begin
        @(posedge clk);
        #1;
        w++;
      end
      chk(rdov.valid, "RD-ov read answered");
      for (int k = 0; k < OV_PER_RD; k++)
        chk(rdov.data[ACC_W*k +: ACC_W] == ovf(2, 37 + k), $sformatf("RD-ov entry %0d", k));
    end
    chk(n_sd == 1 && n_pause == 1 && n_resume == 1 && n_spre == 1, "all mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
