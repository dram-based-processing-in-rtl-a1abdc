// mvid_channel: one LPDDR4 channel of an MViD device.
//
// The MCU sits at the channel's command input and drives the eight banks; four of
// them (banks MVB_BASE .. MVB_BASE+3) are MV-banks, each with its own CGU, MAC
// pipeline, iv-SRAM and ov-SRAM. Four MV-banks is the most the LPDDR4 power budget
// allows to read concurrently, per the document. The cell arrays are outside: the
// channel emits one command per bank per cycle and takes back the 256-bit read
// data of the MV-banks (fixed latency, in order). Host reads of the other banks
// and host read data are not routed through this block.
module mvid_channel
  import mvid_pkg::*;
#(
  parameter int unsigned NMVB          = N_MVB,
  parameter int unsigned MVB_BASE      = 2,
  parameter int unsigned IVD           = IV_DEPTH,
  parameter int unsigned OVD           = OV_DEPTH,
  parameter int unsigned T_RCD         = 29,
  parameter int unsigned T_RAS         = 68,
  parameter int unsigned T_RP          = 29,
  parameter int unsigned T_CCD         = 8,
  parameter int unsigned T_RRD         = 16,
  parameter int unsigned READS_PER_ROW = 64
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  host_cmd_t                     cmd_i,
  output logic                          cmd_ready_o,
  output rdov_rsp_t                     rdov_o,
  output bank_cmd_t [N_BANKS-1:0]       bank_cmd_o,
  input  logic [NMVB-1:0]               mvb_rd_valid_i,
  input  logic [NMVB-1:0][RD_BITS-1:0]  mvb_rd_data_i,
  // status, for observation
  output logic                          slow_o,
  output logic [NMVB-1:0]               paused_o,
  output logic [NMVB-1:0]               busy_o,
  output logic [NMVB-1:0]               complete_o,
  output logic [NMVB-1:0]               row_done_o
);
  bank_cmd_t [N_BANKS-1:0]      host_bank_cmd;
  logic [NMVB-1:0]              pause, resume, start, act_req, act_gnt;
  logic [NMVB-1:0][ROW_W-1:0]   row_base;
  logic [NMVB-1:0][15:0]        nreads;
  logic                         iv_we;
  logic [COL_W-1:0]             iv_waddr;
  logic [N_PAIRS-1:0][DATA_W-1:0] iv_wdata;
  logic [OVA_W-1:0]             ov_raddr;
  logic [NMVB-1:0][ACC_W-1:0]   ov_rdata;
  bank_cmd_t [NMVB-1:0]         mvb_cmd;

  mvid_mcu #(.NMVB(NMVB), .MVB_BASE(MVB_BASE), .T_RRD(T_RRD)) u_mcu (
    .clk(clk), .rst_n(rst_n), .cmd_i(cmd_i), .cmd_ready_o(cmd_ready_o),
    .host_bank_cmd_o(host_bank_cmd), .rdov_o(rdov_o), .slow_o(slow_o),
    .pause_o(pause), .resume_o(resume), .start_o(start), .row_base_o(row_base), .nreads_o(nreads),
    .busy_i(busy_o), .paused_i(paused_o), .complete_i(complete_o), .act_req_i(act_req), .act_gnt_o(act_gnt),
    .iv_we_o(iv_we), .iv_waddr_o(iv_waddr), .iv_wdata_o(iv_wdata), .ov_raddr_o(ov_raddr), .ov_rdata_i(ov_rdata)
  );

  for (genvar i = 0; i < NMVB; i++) begin : g_mvb
    mvid_mv_bank #(.IVD(IVD), .OVD(OVD), .T_RCD(T_RCD), .T_RAS(T_RAS), .T_RP(T_RP),
                   .T_CCD(T_CCD), .READS_PER_ROW(READS_PER_ROW)) u_bank (
      .clk(clk), .rst_n(rst_n), .start_i(start[i]), .row_base_i(row_base[i]), .nreads_i(nreads[i]),
      .slow_i(slow_o), .pause_i(pause[i]), .resume_i(resume[i]), .act_req_o(act_req[i]), .act_gnt_i(act_gnt[i]),
      .busy_o(busy_o[i]), .paused_o(paused_o[i]), .complete_o(complete_o[i]),
      .host_cmd_i(host_bank_cmd[MVB_BASE + i]),
      .iv_we_i(iv_we), .iv_waddr_i(iv_waddr), .iv_wdata_i(iv_wdata),
      .ov_raddr_i(ov_raddr), .ov_rdata_o(ov_rdata[i]), .row_done_o(row_done_o[i]),
      .bank_cmd_o(mvb_cmd[i]), .rd_valid_i(mvb_rd_valid_i[i]), .rd_data_i(mvb_rd_data_i[i])
    );
  end

  always_comb begin
    bank_cmd_o = host_bank_cmd;
    for (int i = 0; i < NMVB; i++) bank_cmd_o[MVB_BASE + i] = mvb_cmd[i];
  end

endmodule
