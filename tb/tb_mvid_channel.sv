// tb_mvid_channel: one MViD channel running a sparse MV-mul while the host uses the
// DRAM, against a behavioural model of the banks (mvid_dram_model).
//
// A random 1,600-column sparse matrix (75 % zeros, 12-bit weights) is split by rows
// over the four MV-banks, delta-encoded one row per 256-bit read and stored from a
// per-bank start row. The testbench, acting as memory controller, configures the
// MV-banks (CFG), broadcasts the input vector (WR-iv, the last burst starts
// MV-mul), then during MV-mul: accesses a normal bank (slow-down broadcast), ends
// with s-PRE (speed-up), pauses an MV-bank with p-PRE, uses that bank itself and
// resumes it with r-PRE. It polls RD-ov until every MV-bank reports done and reads
// all output elements back 10 at a time, comparing them with the integer product.
// The bank model checks ACT/RD/PRE timing of every command; each mechanism is
// counted and must have happened.
module tb_mvid_channel;
  import mvid_pkg::*;
  localparam int ROWS = 24;              // matrix rows per MV-bank
  localparam int COLS = IV_DEPTH;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  host_cmd_t                      cmd;
  logic                           ready;
  rdov_rsp_t                      rdov;
  bank_cmd_t [N_BANKS-1:0]        bcmd;
  logic [N_MVB-1:0]               rdv, paused, busy, complete, row_done;
  logic [N_MVB-1:0][RD_BITS-1:0]  rdd;
  logic                           slow;

  mvid_channel dut (.clk, .rst_n, .cmd_i(cmd), .cmd_ready_o(ready), .rdov_o(rdov), .bank_cmd_o(bcmd),
    .mvb_rd_valid_i(rdv), .mvb_rd_data_i(rdd), .slow_o(slow), .paused_o(paused), .busy_o(busy),
    .complete_o(complete), .row_done_o(row_done));
  mvid_dram_model u_dram (.clk, .rst_n, .cmd_i(bcmd), .rd_valid_o(rdv), .rd_data_o(rdd));

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
    repeat (400000) @(posedge clk);
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
  logic slow_q = 0;
  always @(posedge clk) begin
    slow_q <= slow;
    if (slow && !slow_q) n_sd++;
  end

  initial begin
    host_cmd_t c;
    cmd = '0;
    for (int i = 0; i < COLS; i++) x[i] = DATA_W'($urandom);
    for (int m = 0; m < N_MVB; m++) encode(m);
    repeat (3) @(negedge clk);
    rst_n = 1;
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
    chk(u_dram.errors == 0, "DRAM timing / state violations");
    chk(n_sd >= 1 && n_spre >= 1 && n_pause >= 1 && n_resume >= 1 && n_poll_busy >= 1 && n_poll_done == N_MVB,
        "every mechanism happened");
    $display("reads per MV-bank %0d %0d %0d %0d, done at cycle %0d", nreads[0], nreads[1], nreads[2], nreads[3], cyc);
    $display("slow-downs %0d speed-ups %0d pauses %0d resumes %0d busy polls %0d done polls %0d RD-ov reads %0d",
             n_sd, n_spre, n_pause, n_resume, n_poll_busy, n_poll_done, n_rdov);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
