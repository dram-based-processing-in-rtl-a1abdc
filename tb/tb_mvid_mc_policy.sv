// tb_mvid_mc_policy: slow-down / pause policy of the memory controller.
//
// A cycle-accurate reference of the document's rule runs next to the block: every
// tIV cycles the pending counts are added to num_req_nonMV and num_req_MV[n]; a
// sum reaching nTH pauses bank n (p-PRE, others slowed) or slows all MV-banks;
// a paused bank resumes (r-PRE) when nothing is pending for it, slow-down ends
// (s-PRE) when nothing is pending for normal banks and no bank is paused. Random
// queue counts drive both for many intervals, with MV-mul switching on and off;
// every output is compared each cycle and each mechanism must occur.
module tb_mvid_mc_policy;
  localparam int NMVB = 4, T_IV = 4, N_TH = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                 active;
  logic [5:0]           pnon;
  logic [NMVB-1:0][5:0] pmv;
  logic                 slow, spre, allow_non;
  logic [NMVB-1:0]      pause, ppre, rpre, allow_mv;

  mvid_mc_policy dut (.clk, .rst_n, .mv_active_i(active), .pend_nonmv_i(pnon), .pend_mv_i(pmv),
    .slow_o(slow), .pause_o(pause), .send_ppre_o(ppre), .send_spre_o(spre), .send_rpre_o(rpre),
    .allow_nonmv_o(allow_non), .allow_mv_o(allow_mv));

  // reference state
  int t = 0, nn = 0, nm [NMVB];
  bit r_slow = 0, r_spre = 0;
  bit [NMVB-1:0] r_pause = 0, r_ppre = 0, r_rpre = 0;
  int n_ppre = 0, n_rpre = 0, n_spre = 0, n_slow = 0;

  task automatic ref_step();
    bit issued;
    r_ppre = 0; r_rpre = 0; r_spre = 0;
    issued = 0;
    if (!active) begin
      t = 0; nn = 0; r_slow = 0; r_pause = 0;
      foreach (nm[n]) nm[n] = 0;
      return;
    end
    if (t == T_IV - 1) begin
      t = 0;
      nn += pnon;
      foreach (nm[n]) nm[n] += pmv[n];
      for (int n = 0; n < NMVB; n++)
        if (!issued && !r_pause[n] && nm[n] >= N_TH) begin
          r_ppre[n] = 1; r_pause[n] = 1; r_slow = 1; nm[n] = 0; issued = 1;
        end
      if (nn >= N_TH) begin
        if (!r_slow) n_slow++;
        r_slow = 1;
        nn = 0;
      end
    end else t++;
    for (int n = 0; n < NMVB; n++)
      if (!issued && r_pause[n] && pmv[n] == 0) begin
        r_rpre[n] = 1; r_pause[n] = 0; issued = 1;
      end
    if (!issued && r_slow && r_pause == 0 && pnon == 0 && nn < N_TH) begin
      r_spre = 1; r_slow = 0;
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (nm[n]) nm[n] = 0;
    active = 0; pnon = 0; pmv = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (c % 3000 == 0) active = (c % 6000 == 0);
      if (c % 3000 == 100) active = 1;
      pnon = ($urandom_range(0, 3) == 0) ? 6'($urandom_range(0, 2)) : 6'd0;
      for (int n = 0; n < NMVB; n++) pmv[n] = ($urandom_range(0, 5) == 0) ? 6'($urandom_range(0, 2)) : 6'd0;
      @(posedge clk);
      ref_step();
      #1;
      checks++;
      if (slow !== r_slow || pause !== r_pause || ppre !== r_ppre || rpre !== r_rpre || spre !== r_spre ||
          allow_non !== (!active || r_slow) || allow_mv !== (active ? r_pause : 4'hF)) begin
        failures++;
        if (failures < 5) $display("c=%0d slow %b/%b pause %b/%b ppre %b/%b rpre %b/%b spre %b/%b", c,
                                   slow, r_slow, pause, r_pause, ppre, r_ppre, rpre, r_rpre, spre, r_spre);
      end
      n_ppre += $countones(r_ppre);
      n_rpre += $countones(r_rpre);
      n_spre += r_spre;
    end
    checks++;
    if (n_ppre == 0 || n_rpre == 0 || n_spre == 0 || n_slow == 0) begin
      failures++;
      $display("missing mechanism: p-PRE %0d r-PRE %0d s-PRE %0d slow %0d", n_ppre, n_rpre, n_spre, n_slow);
    end
    $display("p-PRE %0d r-PRE %0d s-PRE %0d slow-downs %0d", n_ppre, n_rpre, n_spre, n_slow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
