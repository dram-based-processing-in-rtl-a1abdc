// mvid_cgu: command generator unit of one MV-bank.
//
// A single MV-mul (first DRAM row and number of 256-bit reads of the bank's
// sub-matrix) is expanded into the repeated sequence ACT, RD ... RD, PRE that
// streams the weights to the bank pipeline, row after row of the DRAM, obeying
// tRCD, tRAS, tRP and tCCD. ACTs are requested from the MCU, which spaces the ACTs
// of all MV-banks by tRRD. In slow-down (slow_i) reads are spaced by 2 x tCCD, as
// the document prescribes to stay within the DRAM power budget while the host is
// served. A pause (p-PRE) follows the document's preferred option: the row that is
// open or about to open still gets its planned ACT and at least one RD, then the
// CGU precharges and holds (paused_o) with the row closed, so the host may use the
// bank. resume_i (r-PRE) restarts from the next unread column after tRP. The
// LPDDR4 timing values in tCK are this design's (the document gives only tCCD =
// 5 ns); READS_PER_ROW is 64 (2 KB page of 32-byte reads).
module mvid_cgu
  import mvid_pkg::*;
#(
  parameter int unsigned T_RCD         = 29,
  parameter int unsigned T_RAS         = 68,
  parameter int unsigned T_RP          = 29,
  parameter int unsigned T_CCD         = 8,
  parameter int unsigned READS_PER_ROW = 64
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start_i,
  input  logic [ROW_W-1:0]  row_base_i,
  input  logic [15:0]       nreads_i,
  input  logic              slow_i,
  input  logic              pause_i,
  input  logic              resume_i,
  output logic              act_req_o,
  input  logic              act_gnt_i,
  output bank_cmd_t         cmd_o,
  output logic              busy_o,
  output logic              paused_o,
  output logic              done_o      // pulse: last PRE of the MV-mul issued
);
  typedef enum logic [2:0] {S_IDLE, S_ACT, S_RD, S_PRE, S_PAUSED} state_e;
  state_e state;

  logic [ROW_W-1:0]  row;
  logic [DCOL_W:0]   col;
  logic [15:0]       remaining;
  logic [7:0]        t_act, t_rd, t_pre;   // cycles since the last ACT / RD / PRE
  logic              pause_pend;
  logic [7:0]        ccd_eff;

  assign ccd_eff = slow_i ? 8'(2 * T_CCD) : 8'(T_CCD);

  wire rd_ok  = (t_act >= 8'(T_RCD)) && (t_rd >= ccd_eff);
  wire pre_ok = (t_act >= 8'(T_RAS)) && (t_rd >= 8'(T_CCD));
  wire act_ok = (t_pre >= 8'(T_RP));

  assign act_req_o = (state == S_ACT) && act_ok && !pause_pend;
  assign busy_o    = (state != S_IDLE);
  assign paused_o  = (state == S_PAUSED);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      row        <= '0;
      col        <= '0;
      remaining  <= '0;
      t_act      <= '1;
      t_rd       <= '1;
      t_pre      <= '1;
      pause_pend <= 1'b0;
      cmd_o      <= '0;
      done_o     <= 1'b0;
    end else begin
      cmd_o  <= '0;
      done_o <= 1'b0;
      if (t_act != '1) t_act <= t_act + 8'd1;
      if (t_rd  != '1) t_rd  <= t_rd  + 8'd1;
      if (t_pre != '1) t_pre <= t_pre + 8'd1;
      if (pause_i && state != S_IDLE && state != S_PAUSED) pause_pend <= 1'b1;

      unique case (state)
        S_IDLE: if (start_i && nreads_i != 0) begin
          row       <= row_base_i;
          col       <= '0;
          remaining <= nreads_i;
          state     <= S_ACT;
        end
        S_ACT: begin
          if (pause_pend || pause_i) begin
            // no row is open: pause at once
            state      <= S_PAUSED;
            pause_pend <= 1'b0;
          end else if (act_ok && act_gnt_i) begin
            cmd_o     <= '{op: BC_ACT, row: row, col: '0};
            t_act     <= 8'd1;
            state     <= S_RD;
          end
        end
        S_RD: if (rd_ok) begin
          cmd_o     <= '{op: BC_RD, row: row, col: col[DCOL_W-1:0]};
          t_rd      <= 8'd1;
          remaining <= remaining - 16'd1;
          if (col == (DCOL_W+1)'(READS_PER_ROW - 1)) begin
            col <= '0;
            row <= row + 1'b1;
          end else begin
            col <= col + 1'b1;
          end
          if (remaining == 16'd1 || col == (DCOL_W+1)'(READS_PER_ROW - 1) || pause_pend || pause_i)
            state <= S_PRE;
        end
        S_PRE: if (pre_ok) begin
          cmd_o <= '{op: BC_PRE, row: row, col: '0};
          t_pre <= 8'd1;
          if (remaining == 0) begin
            state  <= S_IDLE;
            done_o <= 1'b1;
            pause_pend <= 1'b0;
          end else if (pause_pend || pause_i) begin
            state      <= S_PAUSED;
            pause_pend <= 1'b0;
          end else begin
            state <= S_ACT;
          end
        end
        S_PAUSED: if (resume_i) begin
          t_pre <= 8'd1;          // the r-PRE precharges the bank
          state <= S_ACT;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
