// pim_top: the two processing-in-memory designs side by side.
//
//  * MViD: one LPDDR4 channel with four MV-banks (mvid_channel) that multiply a
//    delta-encoded sparse matrix stored in the banks by an input vector held in
//    each MV-bank's iv-SRAM, while the host keeps using the other banks; plus the
//    slow-down / pause policy block of the host memory controller
//    (mvid_mc_policy), whose inputs are the controller's queue counts. The host
//    memory controller itself and the DRAM cell arrays are outside: the channel's
//    command input and its per-bank command / MV-bank read-data ports are brought
//    out (mvid_*).
//  * TRiM-G: one DDR5 DIMM (trim_dimm) that performs embedding gather-and-reduce
//    with an NPR in the buffer chip and an IPR per bank-group of every DRAM chip.
//    The host sends C-instr frames and reads reduced vectors; the DRAM bank-group
//    command and read-data ports are brought out (trim_*).
// The two designs share only the clock and reset; nothing connects them.
module pim_top
  import mvid_pkg::*;
  import trim_pkg::*;
#(
  parameter int unsigned MVID_NMVB  = 4,
  parameter int unsigned TRIM_NRANK = 2,
  parameter int unsigned TRIM_NCHIP = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // ---------------- MViD channel ----------------
  input  host_cmd_t                     mvid_cmd_i,
  output logic                          mvid_cmd_ready_o,
  output rdov_rsp_t                     mvid_rdov_o,
  output bank_cmd_t [N_BANKS-1:0]       mvid_bank_cmd_o,
  input  logic [MVID_NMVB-1:0]          mvid_rd_valid_i,
  input  logic [MVID_NMVB-1:0][RD_BITS-1:0] mvid_rd_data_i,
  output logic                          mvid_slow_o,
  output logic [MVID_NMVB-1:0]          mvid_paused_o,
  output logic [MVID_NMVB-1:0]          mvid_busy_o,
  output logic [MVID_NMVB-1:0]          mvid_complete_o,
  output logic [MVID_NMVB-1:0]          mvid_row_done_o,
  // MViD memory-controller policy
  input  logic                          mc_mv_active_i,
  input  logic [5:0]                    mc_pend_nonmv_i,
  input  logic [MVID_NMVB-1:0][5:0]     mc_pend_mv_i,
  output logic                          mc_slow_o,
  output logic [MVID_NMVB-1:0]          mc_pause_o,
  output logic [MVID_NMVB-1:0]          mc_send_ppre_o,
  output logic                          mc_send_spre_o,
  output logic [MVID_NMVB-1:0]          mc_send_rpre_o,
  output logic                          mc_allow_nonmv_o,
  output logic [MVID_NMVB-1:0]          mc_allow_mv_o,
  // ---------------- TRiM-G DIMM ----------------
  input  logic                          trim_frame_valid_i,
  input  cinstr_t                       trim_frame_i [FRAME],
  input  logic [2:0]                    trim_frame_n_i,
  output logic                          trim_frame_ready_o,
  output dram_cmd_t                     trim_dram_cmd_o [TRIM_NRANK][TRIM_NCHIP][N_BG],
  input  logic [N_BG-1:0]               trim_rd_valid_i [TRIM_NRANK][TRIM_NCHIP],
  input  logic [BURST_W-1:0]            trim_rd_data_i  [TRIM_NRANK][TRIM_NCHIP][N_BG],
  input  logic [PAR_W-1:0]              trim_rd_par_i   [TRIM_NRANK][TRIM_NCHIP][N_BG],
  output logic                          trim_out_valid_o,
  output logic [1:0]                    trim_out_tag_o,
  output logic [3:0]                    trim_out_row_o,
  output logic [TRIM_NCHIP*BURST_W-1:0] trim_out_data_o,
  output logic                          trim_out_last_o,
  output logic                          trim_err_o,
  output logic                          trim_busy_o
);
  mvid_channel #(.NMVB(MVID_NMVB)) u_mvid (
    .clk, .rst_n,
    .cmd_i(mvid_cmd_i), .cmd_ready_o(mvid_cmd_ready_o), .rdov_o(mvid_rdov_o),
    .bank_cmd_o(mvid_bank_cmd_o), .mvb_rd_valid_i(mvid_rd_valid_i), .mvb_rd_data_i(mvid_rd_data_i),
    .slow_o(mvid_slow_o), .paused_o(mvid_paused_o), .busy_o(mvid_busy_o),
    .complete_o(mvid_complete_o), .row_done_o(mvid_row_done_o)
  );

  mvid_mc_policy #(.NMVB(MVID_NMVB)) u_policy (
    .clk, .rst_n,
    .mv_active_i(mc_mv_active_i), .pend_nonmv_i(mc_pend_nonmv_i), .pend_mv_i(mc_pend_mv_i),
    .slow_o(mc_slow_o), .pause_o(mc_pause_o), .send_ppre_o(mc_send_ppre_o),
    .send_spre_o(mc_send_spre_o), .send_rpre_o(mc_send_rpre_o),
    .allow_nonmv_o(mc_allow_nonmv_o), .allow_mv_o(mc_allow_mv_o)
  );

  trim_dimm #(.N_RANK(TRIM_NRANK), .N_CHIP(TRIM_NCHIP)) u_trim (
    .clk, .rst_n,
    .frame_valid_i(trim_frame_valid_i), .frame_i(trim_frame_i), .frame_n_i(trim_frame_n_i),
    .frame_ready_o(trim_frame_ready_o),
    .dram_cmd_o(trim_dram_cmd_o), .rd_valid_i(trim_rd_valid_i), .rd_data_i(trim_rd_data_i),
    .rd_par_i(trim_rd_par_i),
    .out_valid_o(trim_out_valid_o), .out_tag_o(trim_out_tag_o), .out_row_o(trim_out_row_o),
    .out_data_o(trim_out_data_o), .out_last_o(trim_out_last_o),
    .err_o(trim_err_o), .busy_o(trim_busy_o)
  );
endmodule
