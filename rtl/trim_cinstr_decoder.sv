// trim_cinstr_decoder: the C-instr decoder of an IPR.
//
// Turns the lookup C-instrs at the head of the IPR queue into DRAM commands for the
// four banks of its bank-group, keeping the banks interleaved:
//  * ACT  - the head C-instr is activated once skewed-cycle cycles have passed
//           since its arrival, its bank is closed and precharged for tRP, tRRD_L has
//           passed since the previous ACT and the accumulation buffer is free. It
//           then joins a list of up to four activated C-instrs and leaves the queue,
//           so the next lookup may open another bank while this one is read.
//  * RD   - the oldest activated C-instr gets its nRD reads, tRCD after its ACT and
//           tCCD_L apart (all reads share the bank-group bus); read i addresses
//           column + 16 i (one 16-byte x8 BL16 burst). Every RD is reported on
//           rd_o (batch-tag, read index, opcode, weight, last-of-batch) so the MACs
//           can reduce the data that return tCL later.
//  * PRE  - a bank whose reads are done is precharged once tRAS has passed.
// One command per cycle, RD before PRE before ACT. Transfer commands (OP_XFER)
// pass in queue order: the first one of a buffer waits until every earlier lookup
// has been read and its data reduced (drained_i), then raises barrier_o; all are
// handed to the IPR's transfer logic. tFAW across bank-groups is the host's
// business (it sets skewed-cycle). Timing defaults are DDR5-4800 values from the
// document (tRCD = tRP = 16.64 ns, tCCD_L = 12 tCK, tRAS = tRC - tRP); tRRD_L is
// this design's.
module trim_cinstr_decoder
  import trim_pkg::*;
#(
  parameter int unsigned T_RCD   = 40,
  parameter int unsigned T_RP    = 40,
  parameter int unsigned T_RAS   = 77,
  parameter int unsigned T_CCD_L = 12,
  parameter int unsigned T_RRD_L = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [15:0]  now_i,          // free-running cycle count
  input  logic         head_valid_i,
  input  cinstr_t      head_i,
  input  logic [15:0]  head_arrival_i,
  output logic         pop_o,
  input  logic         buf_free_i,     // accumulation buffer may take new lookups
  input  logic         drained_i,      // no read data outstanding in the IPR
  output logic         barrier_o,      // first transfer of a batch reached the head
  output logic         xfer_o,         // hand a transfer command to the IPR
  output dram_cmd_t    cmd_o,
  output logic         rd_o,           // an RD was issued (cmd_o.op == DC_RD)
  output logic [1:0]   rd_tag_o,
  output logic [3:0]   rd_idx_o,
  output logic         rd_wsum_o,
  output logic [31:0]  rd_weight_o,
  output logic         rd_last_o,      // last RD of the batch's vt C-instr
  output logic         idle_o          // nothing activated, nothing to precharge
);
  typedef struct packed {
    cinstr_t    ci;
    logic [4:0] done;     // reads issued
  } act_t;

  act_t              alist [N_BANK];
  logic [2:0]        acnt;
  logic [N_BANK-1:0] open_b, pre_pend;
  logic [7:0]        t_act [N_BANK];
  logic [7:0]        t_pre [N_BANK];
  logic [7:0]        t_rd, t_actany;

  wire       is_xfer  = head_valid_i && (head_i.opcode == OP_XFER);
  wire       is_look  = head_valid_i && (head_i.opcode != OP_XFER);
  wire [1:0] hb       = a_bank(head_i.addr);
  wire       skew_ok  = (now_i - head_arrival_i) >= 16'(head_i.skew);
  wire [1:0] ob       = a_bank(alist[0].ci.addr);

  assign idle_o = (acnt == 0) && (pre_pend == '0);

  // command selection
  logic              do_rd, do_pre, do_act;
  logic [1:0]        pre_b;
  always_comb begin
    do_rd  = (acnt != 0) && (t_act[ob] >= 8'(T_RCD)) && (t_rd >= 8'(T_CCD_L));
    do_pre = 1'b0;
    pre_b  = '0;
    for (int b = N_BANK - 1; b >= 0; b--)
      if (pre_pend[b] && t_act[b] >= 8'(T_RAS) && t_rd >= 8'(2)) begin
        do_pre = 1'b1;
        pre_b  = 2'(b);
      end
    do_pre = do_pre && !do_rd;
    do_act = is_look && skew_ok && buf_free_i && !open_b[hb] && !pre_pend[hb] &&
             (t_pre[hb] >= 8'(T_RP)) && (t_actany >= 8'(T_RRD_L)) &&
             (acnt < 3'(N_BANK)) && !do_rd && !do_pre;
  end

  wire xfer_go = is_xfer && (!head_i.skew[1] || (idle_o && drained_i && !rd_o));
  assign pop_o     = do_act || xfer_go;
  assign xfer_o    = xfer_go;
  assign barrier_o = xfer_go && head_i.skew[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acnt     <= '0;
      open_b   <= '0;
      pre_pend <= '0;
      t_rd     <= '1;
      t_actany <= '1;
      for (int b = 0; b < N_BANK; b++) begin
        t_act[b] <= '1;
        t_pre[b] <= '1;
      end
      cmd_o       <= '0;
      rd_o        <= 1'b0;
      rd_tag_o    <= '0;
      rd_idx_o    <= '0;
      rd_wsum_o   <= 1'b0;
      rd_weight_o <= '0;
      rd_last_o   <= 1'b0;
      for (int i = 0; i < N_BANK; i++) alist[i] <= '0;
    end else begin
      cmd_o <= '0;
      rd_o  <= 1'b0;
      rd_last_o <= 1'b0;
      if (t_rd != '1)     t_rd     <= t_rd + 8'd1;
      if (t_actany != '1) t_actany <= t_actany + 8'd1;
      for (int b = 0; b < N_BANK; b++) begin
        if (t_act[b] != '1) t_act[b] <= t_act[b] + 8'd1;
        if (t_pre[b] != '1) t_pre[b] <= t_pre[b] + 8'd1;
      end

      if (do_rd) begin
        cmd_o       <= '{op: DC_RD, bank: ob, row: a_row(alist[0].ci.addr),
                         col: a_col(alist[0].ci.addr) + 10'({alist[0].done, 4'b0000})};
        rd_o        <= 1'b1;
        rd_tag_o    <= alist[0].ci.tag[1:0];
        rd_idx_o    <= alist[0].done[3:0];
        rd_wsum_o   <= (alist[0].ci.opcode == OP_WSUM);
        rd_weight_o <= alist[0].ci.weight;
        t_rd        <= 8'd1;
        if (alist[0].done + 5'd1 >= alist[0].ci.nrd) begin
          rd_last_o    <= alist[0].ci.vt;
          pre_pend[ob] <= 1'b1;
          for (int i = 0; i < N_BANK - 1; i++) alist[i] <= alist[i+1];
          acnt <= acnt - 3'd1;
        end else begin
          alist[0].done <= alist[0].done + 5'd1;
        end
      end else if (do_pre) begin
        cmd_o           <= '{op: DC_PRE, bank: pre_b, row: '0, col: '0};
        pre_pend[pre_b] <= 1'b0;
        open_b[pre_b]   <= 1'b0;
        t_pre[pre_b]    <= 8'd1;
      end else if (do_act) begin
        cmd_o        <= '{op: DC_ACT, bank: hb, row: a_row(head_i.addr), col: '0};
        open_b[hb]   <= 1'b1;
        t_act[hb]    <= 8'd1;
        t_actany     <= 8'd1;
        alist[2'(acnt)] <= '{ci: head_i, done: '0};
        acnt         <= acnt + 3'd1;
      end
    end
  end

endmodule
