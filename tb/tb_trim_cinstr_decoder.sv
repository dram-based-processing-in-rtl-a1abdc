// tb_trim_cinstr_decoder: self-checking test of the IPR's C-instr decoder.
//
// The testbench plays the IPR queue: it holds a list of C-instrs (random lookups
// to the four banks with random row, column, nRD, weight and skewed-cycle, and now
// and then a transfer command, some marked first-of-buffer), presents the oldest as
// the head with its arrival time and pops it when pop_o says so. drained_i follows
// a simple model of the MAC pipeline (low for tCL cycles after each RD), buf_free_i
// is dropped at random. Checks:
//  * every lookup gets exactly nRD reads, in order, to column + 16 i of its bank
//    and row, with its batch-tag, weight, opcode and last-of-batch flag;
//  * ACT not before arrival + skewed-cycle, nor while buf_free_i is low;
//  * DRAM timing per bank (tRCD, tRAS, tRP) and across banks (tCCD_L, tRRD_L);
//  * reads of one lookup run at the full rate, exactly tCCD_L apart;
//  * a first transfer only passes with no bank open and no read outstanding.
module tb_trim_cinstr_decoder;
  import trim_pkg::*;
  localparam int T_RCD = 40, T_RP = 40, T_RAS = 77, T_CCD_L = 12, T_RRD_L = 12, T_CL = 40;
  localparam int N = 400;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] now;
  logic        hv, pop, bfree, drained, barrier, xfer, rd, rd_wsum, rd_last, idle;
  cinstr_t     head;
  logic [15:0] harr;
  dram_cmd_t   cmd;
  logic [1:0]  rd_tag;
  logic [3:0]  rd_idx;
  logic [31:0] rd_w;

  trim_cinstr_decoder dut (.clk, .rst_n, .now_i(now), .head_valid_i(hv), .head_i(head), .head_arrival_i(harr),
    .pop_o(pop), .buf_free_i(bfree), .drained_i(drained), .barrier_o(barrier), .xfer_o(xfer), .cmd_o(cmd),
    .rd_o(rd), .rd_tag_o(rd_tag), .rd_idx_o(rd_idx), .rd_wsum_o(rd_wsum), .rd_weight_o(rd_w),
    .rd_last_o(rd_last), .idle_o(idle));

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
    repeat (200000) @(posedge clk);
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // stimulus list and the reads each lookup must produce
  cinstr_t ci [$];
  typedef struct { cinstr_t c; int i; } exp_rd_t;
  exp_rd_t  exp_q [$];     // expected reads, in activation order per bank
  exp_rd_t  open_q [N_BANK][$];
  int       arr [$];
  int       n_look = 0, n_xfer = 0, n_first = 0, n_skew_wait = 0, n_buf_wait = 0;

  initial begin
    for (int k = 0; k < N; k++) begin
      cinstr_t c;
      c = '0;
      if ($urandom_range(0, 9) == 0) begin
        c.opcode = OP_XFER;
        c.nrd    = 5'($urandom_range(0, 15));
        c.tag    = 4'($urandom_range(0, 3));
        c.skew   = {4'b0, 1'($urandom_range(0, 1)), 1'($urandom_range(0, 1))};
        c.vt     = 1'($urandom_range(0, 1));
      end else begin
        c.addr   = mk_addr(1'b0, 16'($urandom), 3'd0, 2'($urandom_range(0, 3)), 10'(16 * $urandom_range(0, 47)));
        c.weight = $urandom;
        c.nrd    = 5'($urandom_range(1, 16));
        c.tag    = 4'($urandom_range(0, 3));
        c.opcode = $urandom_range(0, 1) ? OP_WSUM : OP_SUM;
        c.skew   = 6'($urandom_range(0, 63));
        c.vt     = ($urandom_range(0, 7) == 0);
      end
      ci.push_back(c);
    end
  end

  // queue model: a new entry arrives every few cycles, the head is shown with its arrival time
  int nsent = 0;
  cinstr_t q [$];
  always @(posedge clk) begin
    if (!rst_n) now <= 16'd0;
    else now <= now + 16'd1;
  end
  always @(negedge clk) begin
    if (rst_n && nsent < N && q.size() < 8 && $urandom_range(0, 3) == 0) begin
      q.push_back(ci[nsent]);
      arr.push_back(int'(now));
      nsent++;
    end
    hv    = rst_n && q.size() > 0;
    head  = (q.size() > 0) ? q[0] : '0;
    harr  = (arr.size() > 0) ? 16'(arr[0]) : 16'd0;
    bfree = ($urandom_range(0, 7) != 0);
  end

  // MAC pipeline model for drained_i
  int last_rd = -1000;
  assign drained = (cyc - last_rd) > T_CL;

  // DRAM timing and expected-read checker
  int t_act [N_BANK], t_pre [N_BANK], t_rdb [N_BANK];
  int open_row [N_BANK];
  int last_act = -1000, prev_rd = -1000, min_gap_same = 1000;
  exp_rd_t last_e;
  bit had_last = 0;
  initial for (int b = 0; b < N_BANK; b++) begin t_act[b] = -1000; t_pre[b] = -1000; open_row[b] = -1; end

  always @(posedge clk) if (rst_n) begin
    // pops: head leaves the queue
    if (pop) begin
      cinstr_t c;
      c = q[0];
      chk(hv, "pop without head");
      if (c.opcode == OP_XFER) begin
        chk(xfer, "transfer popped without xfer_o");
        chk(barrier == c.skew[1], "barrier_o");
        if (c.skew[1]) begin
          chk(idle && drained, "first transfer passed with work outstanding");
          n_first++;
        end
        n_xfer++;
      end else begin
        chk(!xfer, "xfer_o on a lookup");
        chk(int'(now) - arr[0] >= int'(c.skew), "ACT before skewed-cycle passed");
        chk(bfree, "ACT while the buffer was not free");
        for (int i = 0; i < c.nrd; i++) open_q[a_bank(c.addr)].push_back('{c: c, i: i});
        n_look++;
      end
      void'(q.pop_front());
      void'(arr.pop_front());
    end else if (hv && q[0].opcode != OP_XFER) begin
      if (int'(now) - arr[0] < int'(q[0].skew)) n_skew_wait++;
      else if (!bfree) n_buf_wait++;
    end
    // DRAM commands (cmd_o registered: applies to this edge's value)
    case (cmd.op)
      DC_ACT: begin
        chk(open_row[cmd.bank] < 0, "ACT to an open bank");
        chk(cyc - t_pre[cmd.bank] >= T_RP, "tRP");
        chk(cyc - last_act >= T_RRD_L, "tRRD_L");
        open_row[cmd.bank] = int'(cmd.row);
        t_act[cmd.bank] = cyc;
        last_act = cyc;
      end
      DC_RD: begin
        exp_rd_t e;
        chk(rd, "rd_o low on RD");
        chk(open_row[cmd.bank] == int'(cmd.row), "RD to a closed bank or other row");
        chk(cyc - t_act[cmd.bank] >= T_RCD, "tRCD");
        chk(cyc - prev_rd >= T_CCD_L, "tCCD_L");
        if (open_q[cmd.bank].size() == 0) chk(0, "unexpected RD");
        else begin
          e = open_q[cmd.bank].pop_front();
          chk(cmd.col == a_col(e.c.addr) + 10'(16 * e.i), "RD column");
          chk(rd_idx == 4'(e.i) && rd_tag == e.c.tag[1:0] && rd_w == e.c.weight &&
              rd_wsum == (e.c.opcode == OP_WSUM), "RD tag/index/weight/opcode");
          chk(rd_last == (e.c.vt && e.i == int'(e.c.nrd) - 1), "rd_last_o");
          if (had_last && e.i > 0 && last_e.c == e.c && cyc - prev_rd < min_gap_same) min_gap_same = cyc - prev_rd;
          last_e = e;
          had_last = 1;
        end
        prev_rd = cyc;
        last_rd = cyc;
        t_rdb[cmd.bank] = cyc;
      end
      DC_PRE: begin
        chk(open_row[cmd.bank] >= 0, "PRE to a closed bank");
        chk(open_q[cmd.bank].size() == 0, "PRE before all reads");
        chk(cyc - t_act[cmd.bank] >= T_RAS, "tRAS");
        open_row[cmd.bank] = -1;
        t_pre[cmd.bank] = cyc;
      end
      default: chk(!rd, "rd_o without RD");
    endcase
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (nsent == N && q.size() == 0);
    repeat (T_RAS + T_RCD + N_BANK * 16 * T_CCD_L) @(posedge clk);
    for (int b = 0; b < N_BANK; b++) chk(open_q[b].size() == 0, "reads missing");
    chk(idle, "decoder idle at the end");
    chk(min_gap_same == T_CCD_L, $sformatf("reads of one lookup %0d cycles apart, expected %0d", min_gap_same, T_CCD_L));
    chk(n_skew_wait > 0 && n_buf_wait > 0 && n_first > 0, "skew wait, buffer wait and barrier all happened");
    $display("lookups %0d transfers %0d (first %0d), skew waits %0d, buffer waits %0d", n_look, n_xfer, n_first,
             n_skew_wait, n_buf_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
