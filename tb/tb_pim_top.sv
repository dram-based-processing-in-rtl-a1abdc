// tb_pim_top: end-to-end test of both designs in pim_top, at the top's default
// parameters (this is also the full-size test).
//
// MViD: a DS2-sized sparse matrix (ROWS rows per MV-bank x 1,600 columns, 75 %
// zeros, 12-bit weights, delta-encoded) is multiplied by a 1,600-element vector in
// the four MV-banks of the channel while the testbench, acting as the memory
// controller, uses a normal bank (slow-down, then s-PRE), pauses an MV-bank with
// p-PRE, uses it and resumes it with r-PRE, polls RD-ov and reads all results back.
// The controller-side policy block is fed with random queue counts while the
// MV-mul runs and must pause, resume, slow down and speed up.
// TRiM-G: trim_host_model runs NB batches of NLOOK lookups per GnR operation (four
// operations per batch) with vectors of NRD x 16 fp32 elements through the DIMM,
// one lookup reading a corrupted row; all reduced rows are checked.
// Both run at the same time. Each mechanism is counted and must have happened;
// both DRAM models check the DRAM timing of every command.
module tb_pim_top;
  import mvid_pkg::*;
  import trim_pkg::*;
  localparam int ROWS  = 400;           // matrix rows per MV-bank (1,600 in all)
  localparam int COLS  = IV_DEPTH;
  localparam int NB    = 2, NLOOK = 80, NRD = 16;
  localparam int NR    = 2, NC = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // MViD ports
  host_cmd_t                      cmd;
  logic                           ready;
  rdov_rsp_t                      rdov;
  bank_cmd_t [N_BANKS-1:0]        bcmd;
  logic [N_MVB-1:0]               rdv, paused, busy, complete, row_done;
  logic [N_MVB-1:0][RD_BITS-1:0]  rdd;
  logic                           slow;
  logic                           mc_active, mc_slow, mc_spre, mc_allow_non;
  logic [5:0]                     mc_pnon;
  logic [N_MVB-1:0][5:0]          mc_pmv;
  logic [N_MVB-1:0]               mc_pause, mc_ppre, mc_rpre, mc_allow_mv;
  // TRiM ports
  logic               fv, fr, ov, ol, terr, tbusy, tdone;
  cinstr_t            fi [FRAME];
  logic [2:0]         fn;
  dram_cmd_t          dcmd [NR][NC][N_BG];
  logic [N_BG-1:0]    trdv [NR][NC];
  logic [BURST_W-1:0] trdd [NR][NC][N_BG];
  logic [PAR_W-1:0]   trdp [NR][NC][N_BG];
  logic [1:0]         otag;
  logic [3:0]         orow;
  logic [NC*BURST_W-1:0] odata;

  pim_top dut (
    .clk, .rst_n,
    .mvid_cmd_i(cmd), .mvid_cmd_ready_o(ready), .mvid_rdov_o(rdov), .mvid_bank_cmd_o(bcmd),
    .mvid_rd_valid_i(rdv), .mvid_rd_data_i(rdd), .mvid_slow_o(slow), .mvid_paused_o(paused),
    .mvid_busy_o(busy), .mvid_complete_o(complete), .mvid_row_done_o(row_done),
    .mc_mv_active_i(mc_active), .mc_pend_nonmv_i(mc_pnon), .mc_pend_mv_i(mc_pmv),
    .mc_slow_o(mc_slow), .mc_pause_o(mc_pause), .mc_send_ppre_o(mc_ppre), .mc_send_spre_o(mc_spre),
    .mc_send_rpre_o(mc_rpre), .mc_allow_nonmv_o(mc_allow_non), .mc_allow_mv_o(mc_allow_mv),
    .trim_frame_valid_i(fv), .trim_frame_i(fi), .trim_frame_n_i(fn), .trim_frame_ready_o(fr),
    .trim_dram_cmd_o(dcmd), .trim_rd_valid_i(trdv), .trim_rd_data_i(trdd), .trim_rd_par_i(trdp),
    .trim_out_valid_o(ov), .trim_out_tag_o(otag), .trim_out_row_o(orow), .trim_out_data_o(odata),
    .trim_out_last_o(ol), .trim_err_o(terr), .trim_busy_o(tbusy)
  );
  mvid_dram_model u_dram (.clk, .rst_n, .cmd_i(bcmd), .rd_valid_o(rdv), .rd_data_o(rdd));
  trim_dram_model #(.N_RANK(NR), .N_CHIP(NC)) u_tdram (.clk, .rst_n, .cmd_i(dcmd), .rd_valid_o(trdv),
    .rd_data_o(trdd), .rd_par_o(trdp));
  trim_host_model #(.N_RANK(NR), .N_CHIP(NC), .NB(NB), .NLOOK(NLOOK), .NRD(NRD)) u_thost (.clk, .rst_n,
    .frame_valid_o(fv), .frame_o(fi), .frame_n_o(fn), .frame_ready_i(fr),
    .out_valid_i(ov), .out_tag_i(otag), .out_row_i(orow), .out_data_i(odata), .out_last_i(ol),
    .err_i(terr), .done_o(tdone));

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cyc, s);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host command helpers
  task automatic send(input host_cmd_t c);
    @(negedge clk);
    while (!ready) @(negedge clk);
    cmd = c;
    @(negedge clk);
    cmd = '0;
  endtask
  function automatic host_cmd_t hc(input host_op_e op, input int bank, input int row = 0,
                                   input int col = 0, input int arg = 0, input bit flag = 0);
    host_cmd_t c;
    c = '0;
    c.op = op; c.bank = 3'(bank); c.row = ROW_W'(row); c.col = DCOL_W'(col);
    c.arg = 16'(arg); c.flag = flag;
    return c;
  endfunction

  // ---------------- matrix, encoding
  logic signed [DATA_W-1:0] x [COLS];
  logic [ACC_W-1:0]         y [N_MVB][ROWS];
  int                       nreads [N_MVB];
  localparam int ROW_BASE [N_MVB] = '{100, 2000, 31000, 64000};

  task automatic encode(input int m);
    logic [RD_BITS-1:0] cur;
    int n, rd;
    cur = '0; n = 0; rd = 0;
    for (int r = 0; r < ROWS; r++) begin
      int prev;
      logic signed [ACC_W-1:0] s;
      prev = -1; s = '0;
      for (int c = 0; c < COLS; c++)
        if ($urandom_range(0, 3) == 0) begin
          logic signed [DATA_W-1:0] w;
          int gap;
          w = DATA_W'($urandom);
          gap = c - prev - 1;
          while (gap > 14) begin
            cur[16*n +: 16] = {12'h0, 4'hE}; n++; gap -= 15;
            if (n == N_PAIRS) begin u_dram.put(m, ROW_BASE[m] + rd / 64, rd % 64, cur); rd++; cur = '0; n = 0; end
          end
          cur[16*n +: 16] = {w, 4'(gap)}; n++;
          if (n == N_PAIRS) begin u_dram.put(m, ROW_BASE[m] + rd / 64, rd % 64, cur); rd++; cur = '0; n = 0; end
          s += ACC_W'(w * x[c]);
          prev = c;
        end
      cur[16*n +: 16] = {12'(r), EOR_IDX}; n++;
      for (int k = n; k < N_PAIRS; k++) cur[16*k +: 16] = {12'h0, EOR_IDX};
      u_dram.put(m, ROW_BASE[m] + rd / 64, rd % 64, cur); rd++; cur = '0; n = 0;
      y[m][r] = s;
    end
    nreads[m] = rd;
  endtask

  int n_sd = 0, n_spre = 0, n_pause = 0, n_resume = 0, n_poll_busy = 0, n_poll_done = 0, n_rdov = 0;
  int n_rows = 0;
  logic slow_q = 0;
  always @(posedge clk) begin
    slow_q <= slow;
    if (slow && !slow_q) n_sd++;
    if (rst_n) n_rows += $countones(row_done);
  end

  // memory-controller policy: random queue counts while the MV-mul runs
  int n_mc_ppre = 0, n_mc_rpre = 0, n_mc_spre = 0, n_mc_slow = 0;
  logic mc_slow_q = 0;
  always @(negedge clk) begin
    mc_active = rst_n && (busy != 0);
    mc_pnon = ($urandom_range(0, 3) == 0) ? 6'($urandom_range(0, 2)) : 6'd0;
    for (int n = 0; n < N_MVB; n++) mc_pmv[n] = ($urandom_range(0, 5) == 0) ? 6'($urandom_range(0, 2)) : 6'd0;
  end
  always @(posedge clk) if (rst_n) begin
    mc_slow_q <= mc_slow;
    if (mc_slow && !mc_slow_q) n_mc_slow++;
    n_mc_ppre += $countones(mc_ppre);
    n_mc_rpre += $countones(mc_rpre);
    n_mc_spre += mc_spre;
  end

  // TRiM mechanism counters
  int n_credit = 0, n_xfer = 0, n_overlap = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_trim.u_npr.look_ok && dut.u_trim.u_npr.ser_n[dut.u_trim.u_npr.h_rank] == 0 &&
        dut.u_trim.u_npr.cred[dut.u_trim.u_npr.h_rank][dut.u_trim.u_npr.h_bg] == 0) n_credit++;
    n_xfer += $countones(dut.u_trim.u_npr.sel_x);
    if (dut.u_trim.u_npr.gst != 0 && dut.u_trim.u_npr.sel_l != 0) n_overlap++;
  end

  task automatic mvid_flow();
    host_cmd_t c;
    for (int i = 0; i < COLS; i++) x[i] = DATA_W'($urandom);
    for (int m = 0; m < N_MVB; m++) encode(m);
    // configure and broadcast the input vector
    for (int m = 0; m < N_MVB; m++) send(hc(HC_CFG, 2 + m, ROW_BASE[m], 0, nreads[m]));
    for (int a = 0; a < COLS; a += N_PAIRS) begin
      c = hc(HC_WRIV, 0, 0, 0, a, a + N_PAIRS >= COLS);
      for (int k = 0; k < N_PAIRS; k++) c.wdata[16*k +: 16] = 16'(x[a + k]) & 16'h0FFF;
      send(c);
    end
    repeat (5) @(negedge clk);
    chk(busy == 4'hF, "all MV-banks busy after the last WR-iv");
    // normal bank traffic: slow-down, then speed-up with s-PRE
    repeat (300) @(negedge clk);
    send(hc(HC_ACT, 0, 5));
    repeat (40) @(negedge clk);
    chk(slow, "slow-down after a normal command");
    for (int k = 0; k < 4; k++) begin
      send(hc(HC_RD, 0, 5, k));
      repeat (10) @(negedge clk);
    end
    repeat (40) @(negedge clk);
    send(hc(HC_SPRE, 0, 5));
    repeat (3) @(negedge clk);
    chk(!slow, "speed-up after s-PRE");
    if (!slow) n_spre++;
    // pause MV-bank 1 (bank 3), use the bank, resume
    repeat (200) @(negedge clk);
    send(hc(HC_PPRE, 3));
    begin
      int w = 0;
      while (!paused[1] && w < 300) begin @(negedge clk); w++; end
    end
    chk(paused[1] && slow, "p-PRE pauses the MV-bank and slows the others");
    if (paused[1]) n_pause++;
    repeat (40) @(negedge clk);
    send(hc(HC_ACT, 3, 9000));
    repeat (40) @(negedge clk);
    send(hc(HC_RD, 3, 9000, 1));
    send(hc(HC_RD, 3, 9000, 2));
    repeat (40) @(negedge clk);
    send(hc(HC_RPRE, 3, 9000));
    repeat (3) @(negedge clk);
    chk(!paused[1], "r-PRE resumes");
    if (!paused[1]) n_resume++;
    send(hc(HC_SPRE, 0));
    // poll RD-ov until all MV-banks are done
    for (int m = 0; m < N_MVB; m++) begin
      bit done;
      done = 0;
      while (!done) begin
        send(hc(HC_RDOV, 2 + m, 0, 0, 0, 1));
        while (!rdov.valid) @(negedge clk);
        done = (rdov.data == RDOV_DONE);
        if (done) n_poll_done++; else n_poll_busy++;
        if (!done) repeat (500) @(negedge clk);
      end
      for (int r = 0; r < ROWS; r += OV_PER_RD) begin
        send(hc(HC_RDOV, 2 + m, 0, 0, r, 0));
        while (!rdov.valid) @(negedge clk);
        n_rdov++;
        for (int k = 0; k < OV_PER_RD && r + k < ROWS; k++)
          chk(rdov.data[ACC_W*k +: ACC_W] == y[m][r + k],
              $sformatf("bank %0d row %0d: %h expected %h", m, r + k, rdov.data[ACC_W*k +: ACC_W], y[m][r + k]));
      end
    end
  endtask

  initial begin
    cmd = '0;
    mc_active = 0; mc_pnon = '0; mc_pmv = '0;
    u_tdram.bad_row = 65000;
    for (int i = 0; i < COLS; i++) x[i] = DATA_W'($urandom);
    for (int m = 0; m < N_MVB; m++) encode(m);
    repeat (3) @(negedge clk);
    rst_n = 1;
    mvid_flow();
    $display("MViD: %0d reads per MV-bank, finished at cycle %0d", nreads[0], cyc);
    wait (tdone);
    repeat (20) @(posedge clk);
    $display("TRiM-G: finished at cycle %0d", cyc);
    chk(u_dram.errors == 0 && u_tdram.errors == 0, "DRAM timing / state violations");
    chk(n_rows == N_MVB * ROWS, $sformatf("row ends %0d", n_rows));
    chk(n_sd >= 1 && n_spre >= 1 && n_pause >= 1 && n_resume >= 1 && n_poll_busy >= 1 && n_poll_done == N_MVB,
        "MViD channel mechanisms");
    chk(n_mc_ppre >= 1 && n_mc_rpre >= 1 && n_mc_spre >= 1 && n_mc_slow >= 1, "MC policy mechanisms");
    chk(!tbusy, "TRiM idle at the end");
    chk(u_thost.n_frame_stall > 0 && n_credit > 0 && n_xfer > 0 && n_overlap > 0 && u_thost.n_wsum > 0 &&
        u_thost.n_sum > 0 && u_thost.n_err > 0, "TRiM mechanisms");
    checks += u_thost.checks;
    failures += u_thost.failures;
    $display("MViD: slow-downs %0d speed-ups %0d pauses %0d resumes %0d busy polls %0d done polls %0d RD-ov reads %0d",
             n_sd, n_spre, n_pause, n_resume, n_poll_busy, n_poll_done, n_rdov);
    $display("MC policy: p-PRE %0d r-PRE %0d s-PRE %0d slow-downs %0d", n_mc_ppre, n_mc_rpre, n_mc_spre, n_mc_slow);
    $display("TRiM-G: frames %0d (stalled %0d cycles), credit stalls %0d, transfers %0d, overlapped lookups %0d, weighted %0d plain %0d, DED errors %0d",
             u_thost.n_frames, u_thost.n_frame_stall, n_credit, n_xfer, n_overlap, u_thost.n_wsum, u_thost.n_sum, u_thost.n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
