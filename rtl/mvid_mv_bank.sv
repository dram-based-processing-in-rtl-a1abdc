// mvid_mv_bank: one MV-bank of MViD without its cell array: the CGU, the
// five-stage inner-product pipeline with its iv-SRAM and ov-SRAM, and the command
// multiplexer in front of the bank.
//
// While the CGU runs MV-mul it owns the bank; while it is idle or paused the host's
// commands pass. Reads come back from the array in order after a fixed latency, so
// a small FIFO remembers who issued each RD: only the CGU's reads enter the
// pipeline (the host's data leave the bank on the ordinary datapath, outside this
// block). complete_o rises when the last read of an MV-mul has left the pipeline
// and falls at the next start.
module mvid_mv_bank
  import mvid_pkg::*;
#(
  parameter int unsigned IVD           = IV_DEPTH,
  parameter int unsigned OVD           = OV_DEPTH,
  parameter int unsigned T_RCD         = 29,
  parameter int unsigned T_RAS         = 68,
  parameter int unsigned T_RP          = 29,
  parameter int unsigned T_CCD         = 8,
  parameter int unsigned READS_PER_ROW = 64
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // control from the MCU
  input  logic                           start_i,
  input  logic [ROW_W-1:0]               row_base_i,
  input  logic [15:0]                    nreads_i,
  input  logic                           slow_i,
  input  logic                           pause_i,
  input  logic                           resume_i,
  output logic                           act_req_o,
  input  logic                           act_gnt_i,
  output logic                           busy_o,
  output logic                           paused_o,
  output logic                           complete_o,
  input  bank_cmd_t                      host_cmd_i,
  input  logic                           iv_we_i,
  input  logic [COL_W-1:0]               iv_waddr_i,
  input  logic [N_PAIRS-1:0][DATA_W-1:0] iv_wdata_i,
  input  logic [OVA_W-1:0]               ov_raddr_i,
  output logic [ACC_W-1:0]               ov_rdata_o,
  output logic                           row_done_o,
  // cell array
  output bank_cmd_t                      bank_cmd_o,
  input  logic                           rd_valid_i,
  input  logic [RD_BITS-1:0]             rd_data_i
);
  bank_cmd_t cgu_cmd;
  logic      cgu_done, cgu_busy, dp_busy;
  logic [7:0] src_fifo;      // 1 = CGU read, oldest in bit 0
  logic [3:0] src_cnt;
  logic       running;

  mvid_cgu #(.T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP), .T_CCD(T_CCD),
             .READS_PER_ROW(READS_PER_ROW)) u_cgu (
    .clk(clk), .rst_n(rst_n), .start_i(start_i), .row_base_i(row_base_i), .nreads_i(nreads_i),
    .slow_i(slow_i), .pause_i(pause_i), .resume_i(resume_i), .act_req_o(act_req_o),
    .act_gnt_i(act_gnt_i), .cmd_o(cgu_cmd), .busy_o(cgu_busy), .paused_o(paused_o), .done_o(cgu_done)
  );
  assign busy_o = cgu_busy;

  wire host_owns = !cgu_busy || paused_o;
  always_comb begin
    bank_cmd_o = cgu_cmd;
    if (host_owns && host_cmd_i.op != BC_NOP) bank_cmd_o = host_cmd_i;
  end

  // read-source FIFO
  wire push = (bank_cmd_o.op == BC_RD);
  wire from_cgu = (cgu_cmd.op == BC_RD) && !(host_owns && host_cmd_i.op != BC_NOP);
  wire head = src_fifo[0];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      src_fifo <= '0;
      src_cnt  <= '0;
    end else begin
      logic [7:0] f;
      logic [3:0] c;
      f = src_fifo;
      c = src_cnt;
      if (rd_valid_i && c != 0) begin
        f = f >> 1;
        c = c - 4'd1;
      end
      if (push) begin
        f[c[2:0]] = from_cgu;
        c = c + 4'd1;
      end
      src_fifo <= f;
      src_cnt  <= c;
    end
  end

  mvid_datapath #(.IVD(IVD), .OVD(OVD)) u_dp (
    .clk(clk), .rst_n(rst_n),
    .rd_valid_i(rd_valid_i && src_cnt != 0 && head), .rd_data_i(rd_data_i),
    .iv_we_i(iv_we_i), .iv_waddr_i(iv_waddr_i), .iv_wdata_i(iv_wdata_i),
    .ov_raddr_i(ov_raddr_i), .ov_rdata_o(ov_rdata_o), .row_done_o(row_done_o), .busy_o(dp_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running    <= 1'b0;
      complete_o <= 1'b0;
    end else begin
      if (start_i) begin
        complete_o <= 1'b0;
        running    <= 1'b0;
      end
      if (cgu_done) running <= 1'b1;       // all RDs issued; wait for the data
      if (running && src_cnt == 0 && !dp_busy && !rd_valid_i) begin
        running    <= 1'b0;
        complete_o <= 1'b1;
      end
    end
  end

endmodule
