// mvid_mcu: MV-bank control unit, next to the channel I/O of an MViD device.
//
// Decodes each command from the memory controller in one cycle and then:
//  * ACT/RD/WR/PRE: forwards it to the target bank. If an MV-mul is running and
//    the MV-banks are not yet slowed down, it first broadcasts slow-down (SD) to all
//    CGUs, which delays the command by 2 more cycles (3 tCK in all, as in the
//    document); later normal commands pass after the 1-cycle decode.
//  * p-PRE: pauses the target MV-bank (the CGU closes its own row) and slows the
//    other MV-banks down; s-PRE leaves slow-down and precharges; r-PRE precharges
//    and lets the target MV-bank resume.
//  * WR-iv: writes 16 elements into every iv-SRAM at once (broadcast); the burst
//    marked last starts MV-mul in every MV-bank with a non-zero length.
//  * RD-ov: a poll answers RDOV_DONE when the target MV-bank has finished, else
//    RDOV_BUSY; a read returns 10 ov-SRAM entries (24 bits each, low bits first)
//    read one per cycle.
//  * CFG (an RFU command of this design): start row and number of reads of one
//    MV-bank's sub-matrix.
// It also grants the ACT requests of the CGUs round-robin, no closer than tRRD
// (2 x tRRD in slow-down) to the previous ACT of the channel. cmd_ready_o drops
// while a command is being delayed or an RD-ov read is being collected.
module mvid_mcu
  import mvid_pkg::*;
#(
  parameter int unsigned NMVB     = N_MVB,
  parameter int unsigned MVB_BASE = 2,       // first MV-bank (banks 2..5)
  parameter int unsigned T_RRD    = 16,
  parameter int unsigned SD_DELAY = 3
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  host_cmd_t                     cmd_i,
  output logic                          cmd_ready_o,
  output bank_cmd_t [N_BANKS-1:0]       host_bank_cmd_o,
  output rdov_rsp_t                     rdov_o,
  // MV-bank control
  output logic                          slow_o,
  output logic [NMVB-1:0]               pause_o,
  output logic [NMVB-1:0]               resume_o,
  output logic [NMVB-1:0]               start_o,
  output logic [NMVB-1:0][ROW_W-1:0]    row_base_o,
  output logic [NMVB-1:0][15:0]         nreads_o,
  input  logic [NMVB-1:0]               busy_i,
  input  logic [NMVB-1:0]               paused_i,
  input  logic [NMVB-1:0]               complete_i,
  input  logic [NMVB-1:0]               act_req_i,
  output logic [NMVB-1:0]               act_gnt_o,
  // iv-SRAM broadcast, ov-SRAM read
  output logic                          iv_we_o,
  output logic [COL_W-1:0]              iv_waddr_o,
  output logic [N_PAIRS-1:0][DATA_W-1:0] iv_wdata_o,
  output logic [OVA_W-1:0]              ov_raddr_o,
  input  logic [NMVB-1:0][ACC_W-1:0]    ov_rdata_i
);
  localparam int unsigned MI_W = (NMVB > 1) ? $clog2(NMVB) : 1;

  host_cmd_t         d;          // decoded command
  logic              d_v;
  logic [2:0]        d_wait;     // extra cycles before the command is applied
  logic [3:0]        ov_k;       // RD-ov read progress
  logic              ov_busy;
  logic              ov_cap;     // capture the entry read last cycle
  logic [MI_W-1:0]   ov_bank;
  logic [RD_BITS-1:0] ov_acc;
  logic [7:0]        t_act;
  logic [MI_W-1:0]   rr;
  logic [NMVB-1:0]   gnt;

  function automatic logic is_mvb(input logic [2:0] b);
    return (32'(b) >= MVB_BASE) && (32'(b) < MVB_BASE + NMVB);
  endfunction
  function automatic logic [MI_W-1:0] mvb_idx(input logic [2:0] b);
    return MI_W'(32'(b) - MVB_BASE);
  endfunction

  wire any_busy = |(busy_i & ~paused_i);
  wire is_normal = (cmd_i.op inside {HC_ACT, HC_RD, HC_WR, HC_PRE});
  assign cmd_ready_o = !d_v && !ov_busy;

  // ACT arbitration (round-robin, tRRD spacing)
  wire [7:0] rrd_eff = slow_o ? 8'(2 * T_RRD) : 8'(T_RRD);
  wire host_act = d_v && d_wait == 0 && d.op == HC_ACT;
  always_comb begin
    gnt = '0;
    if (t_act >= rrd_eff && !host_act)
      for (int i = 0; i < NMVB; i++)
        if (act_req_i[(32'(rr) + i) % NMVB] && gnt == '0) gnt[(32'(rr) + i) % NMVB] = 1'b1;
  end
  assign act_gnt_o = gnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_v             <= 1'b0;
      d               <= '0;
      d_wait          <= '0;
      slow_o          <= 1'b0;
      pause_o         <= '0;
      resume_o        <= '0;
      start_o         <= '0;
      row_base_o      <= '0;
      nreads_o        <= '0;
      host_bank_cmd_o <= '0;
      rdov_o          <= '0;
      iv_we_o         <= 1'b0;
      iv_waddr_o      <= '0;
      iv_wdata_o      <= '0;
      ov_raddr_o      <= '0;
      ov_k            <= '0;
      ov_busy         <= 1'b0;
      ov_cap          <= 1'b0;
      ov_bank         <= '0;
      ov_acc          <= '0;
      t_act           <= '1;
      rr              <= '0;
    end else begin
      host_bank_cmd_o <= '0;
      pause_o         <= '0;
      resume_o        <= '0;
      start_o         <= '0;
      iv_we_o         <= 1'b0;
      rdov_o          <= '0;
      if (t_act != '1) t_act <= t_act + 8'd1;
      if (|gnt) begin
        t_act <= 8'd1;
        for (int i = 0; i < NMVB; i++) if (gnt[i]) rr <= MI_W'((i + 1) % NMVB);
      end

      // ---- decode stage
      if (cmd_ready_o && cmd_i.op != HC_NOP) begin
        d   <= cmd_i;
        d_v <= 1'b1;
        d_wait <= '0;
        if (is_normal && any_busy && !slow_o) begin
          slow_o <= 1'b1;                          // SD broadcast
          d_wait <= 3'(SD_DELAY - 1);
        end
      end

      // ---- apply stage
      if (d_v && d_wait != 0) begin
        d_wait <= d_wait - 3'd1;
      end else if (d_v) begin
        d_v <= 1'b0;
        unique case (d.op)
          HC_ACT: begin
            host_bank_cmd_o[d.bank] <= '{op: BC_ACT, row: d.row, col: '0};
            t_act <= 8'd1;
          end
          HC_RD:  host_bank_cmd_o[d.bank] <= '{op: BC_RD,  row: d.row, col: d.col};
          HC_WR:  host_bank_cmd_o[d.bank] <= '{op: BC_WR,  row: d.row, col: d.col};
          HC_PRE: host_bank_cmd_o[d.bank] <= '{op: BC_PRE, row: d.row, col: '0};
          HC_PPRE: begin
            if (is_mvb(d.bank) && busy_i[mvb_idx(d.bank)] && !paused_i[mvb_idx(d.bank)]) begin
              pause_o[mvb_idx(d.bank)] <= 1'b1;
              slow_o <= 1'b1;
            end else begin
              host_bank_cmd_o[d.bank] <= '{op: BC_PRE, row: d.row, col: '0};
            end
          end
          HC_SPRE: begin
            slow_o <= 1'b0;
            host_bank_cmd_o[d.bank] <= '{op: BC_PRE, row: d.row, col: '0};
          end
          HC_RPRE: begin
            host_bank_cmd_o[d.bank] <= '{op: BC_PRE, row: d.row, col: '0};
            if (is_mvb(d.bank)) resume_o[mvb_idx(d.bank)] <= 1'b1;
          end
          HC_WRIV: begin
            iv_we_o    <= 1'b1;
            iv_waddr_o <= d.arg[COL_W-1:0];
            for (int k = 0; k < N_PAIRS; k++) iv_wdata_o[k] <= d.wdata[16*k +: DATA_W];
            if (d.flag)
              for (int i = 0; i < NMVB; i++) start_o[i] <= (nreads_o[i] != 0);
          end
          HC_CFG: if (is_mvb(d.bank)) begin
            row_base_o[mvb_idx(d.bank)] <= d.row;
            nreads_o[mvb_idx(d.bank)]   <= d.arg;
          end
          HC_RDOV: begin
            if (d.flag) begin
              rdov_o.valid <= 1'b1;
              rdov_o.data  <= (is_mvb(d.bank) && complete_i[mvb_idx(d.bank)]) ? RDOV_DONE : RDOV_BUSY;
            end else begin
              ov_busy    <= 1'b1;
              ov_k       <= '0;
              ov_bank    <= mvb_idx(d.bank);
              ov_raddr_o <= d.arg[OVA_W-1:0];
              ov_acc     <= '0;
            end
          end
          default: ;
        endcase
      end

      // ---- RD-ov read: one ov-SRAM entry per cycle
      ov_cap <= ov_busy && (32'(ov_k) < OV_PER_RD);
      if (ov_busy) begin
        if (32'(ov_k) < OV_PER_RD) begin
          ov_k <= ov_k + 4'd1;
          if (32'(ov_k) < OV_PER_RD - 1) ov_raddr_o <= ov_raddr_o + 1'b1;
        end
        if (ov_cap) ov_acc <= (ov_acc >> ACC_W) | (RD_BITS'(ov_rdata_i[ov_bank]) << (ACC_W * (OV_PER_RD - 1)));
        if (!ov_cap && 32'(ov_k) == OV_PER_RD) begin
          ov_busy      <= 1'b0;
          rdov_o.valid <= 1'b1;
          rdov_o.data  <= ov_acc;
        end
      end
    end
  end

endmodule
