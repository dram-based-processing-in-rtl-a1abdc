// tb_mvid_cgu: command generator of an MV-bank.
//
// Runs MV-muls of a few DRAM rows and checks, for every command the CGU issues:
// the read addresses run through (row, column) in order from the start row; ACT to
// RD >= tRCD, ACT to PRE >= tRAS, PRE to ACT >= tRP; reads inside a row come
// exactly tCCD apart (the document's read rate), and exactly 2 x tCCD apart while
// slow-down is on. A pause in mid-row must close the row (PRE), raise paused and
// send nothing until resume; the MV-mul then goes on from the next column. ACT
// grants from the MCU are delayed at random. The final PRE must come with done.
module tb_mvid_cgu;
  import mvid_pkg::*;
  localparam int T_RCD = 29, T_RAS = 68, T_RP = 29, T_CCD = 8, RPR = 64;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic             start, slow, pause, resume, act_req, act_gnt, busy, paused, done;
  logic [ROW_W-1:0] row_base;
  logic [15:0]      nreads;
  bank_cmd_t        cmd;

  mvid_cgu dut (.clk, .rst_n, .start_i(start), .row_base_i(row_base), .nreads_i(nreads),
    .slow_i(slow), .pause_i(pause), .resume_i(resume), .act_req_o(act_req), .act_gnt_i(act_gnt),
    .cmd_o(cmd), .busy_o(busy), .paused_o(paused), .done_o(done));

  // command monitor
  int cyc = 0, t_act = -1000, t_rd = -1000, t_pre = -1000, nrd = 0, exp_row, exp_col;
  bit open_row = 0, last_slow = 0, after_pause = 0;
  int n_slow_rd = 0, n_norm_rd = 0, n_pause = 0, n_done = 0;
  task automatic fail(input string s);
    failures++;
    if (failures < 10) $display("cycle %0d: %s", cyc, s);
  endtask
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n) begin
      if (paused && cmd.op != BC_NOP && cmd.op != BC_PRE) fail("command while paused");
      case (cmd.op)
        BC_ACT: begin
          checks++;
          if (open_row || cyc - t_pre < T_RP) fail("ACT timing");
          if (cmd.row != ROW_W'(exp_row)) fail("ACT row");
          open_row = 1;
          t_act = cyc;
          t_rd = -1000;
        end
        BC_RD: begin
          checks += 2;
          if (!open_row || cyc - t_act < T_RCD) fail("RD before tRCD");
          if (t_rd > 0 && cyc - t_rd != (last_slow ? 2 * T_CCD : T_CCD))
            fail($sformatf("RD spacing %0d slow %0b", cyc - t_rd, last_slow));
          if (cmd.row != ROW_W'(exp_row) || cmd.col != DCOL_W'(exp_col)) fail("RD address");
          if (t_rd > 0) begin
            if (last_slow) n_slow_rd++; else n_norm_rd++;
          end
          t_rd = cyc;
          nrd++;
          exp_col++;
          if (exp_col == RPR) begin
            exp_col = 0;
            exp_row++;
          end
        end
        BC_PRE: begin
          checks++;
          if (!open_row || cyc - t_act < T_RAS) fail("PRE timing");
          open_row = 0;
          t_pre = cyc;
        end
        default: ;
      endcase
      if (done) begin
        n_done++;
        checks++;
        if (cmd.op != BC_PRE) fail("done without the final PRE");
      end
      last_slow = slow;
    end
  end

  // random ACT grant delay
  always @(negedge clk) act_gnt = act_req && ($urandom_range(0, 2) == 0);

  initial begin
    repeat (40000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int base, input int n, input bit do_slow, input bit do_pause);
    @(negedge clk);
    row_base = ROW_W'(base);
    nreads = 16'(n);
    start = 1;
    exp_row = base;
    exp_col = 0;
    nrd = 0;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy) fail("not busy after start");
    if (do_slow) begin
      wait (nrd == 10);
      @(negedge clk);
      slow = 1;
      wait (nrd == 40);
      @(negedge clk);
      slow = 0;
    end
    if (do_pause) begin
      int n0;
      wait (nrd == 70);
      @(negedge clk);
      pause = 1;
      @(negedge clk);
      pause = 0;
      wait (paused);
      repeat (2) @(negedge clk);
      n_pause++;
      checks++;
      if (open_row) fail("paused with a row open");
      n0 = nrd;
      repeat (200) @(negedge clk);
      checks++;
      if (nrd != n0) fail("reads while paused");
      resume = 1;
      @(negedge clk);
      resume = 0;
    end
    wait (!busy);
    checks++;
    if (nrd != n) fail($sformatf("%0d reads for %0d", nrd, n));
    repeat (5) @(negedge clk);
  endtask

  initial begin
    start = 0; slow = 0; pause = 0; resume = 0; row_base = '0; nreads = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run(100, 150, 0, 0);
    run(7, 130, 1, 1);
    run(3000, 1, 0, 0);
    checks++;
    if (n_done != 3 || n_pause != 1 || n_slow_rd == 0 || n_norm_rd == 0)
      fail($sformatf("events: done %0d pause %0d slow %0d normal %0d", n_done, n_pause, n_slow_rd, n_norm_rd));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
