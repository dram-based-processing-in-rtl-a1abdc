// trim_dimm: one TRiM-G DIMM - the NPR in the buffer chip plus N_RANK ranks of
// N_CHIP x8 DRAM chips, each chip with one IPR per bank-group.
//
// The host sends C-instr frames (frame_*) and reads the reduced vectors (out_*).
// The NPR drives one 14-bit C/A bus per rank; every chip of a rank listens to it.
// A rank's 512-bit response to a transfer is the four chips' 128-bit rows side by
// side (chip c in bits [128c +: 128]); the chips of a rank work in lock-step, so
// chip 0's valid, id and queue-pop pulses stand for the whole rank. The bank
// arrays are outside this RTL: each chip's per-bank-group command and read-data
// ports are brought out as arrays indexed [rank][chip][bank-group]. A cycle
// counter shared by all chips times the skewed-cycle field. err_o is the OR of
// all DED flags (a table entry read with a parity mismatch).
module trim_dimm
  import trim_pkg::*;
#(
  parameter int unsigned N_RANK  = 2,
  parameter int unsigned N_CHIP  = 4,
  parameter int unsigned NQ      = 32,
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned T_RCD   = 40,
  parameter int unsigned T_RP    = 40,
  parameter int unsigned T_RAS   = 77,
  parameter int unsigned T_CCD_S = 8,
  parameter int unsigned T_CCD_L = 12,
  parameter int unsigned T_RRD_L = 12
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       frame_valid_i,
  input  cinstr_t                    frame_i [FRAME],
  input  logic [2:0]                 frame_n_i,
  output logic                       frame_ready_o,
  output dram_cmd_t                  dram_cmd_o [N_RANK][N_CHIP][N_BG],
  input  logic [N_BG-1:0]            rd_valid_i [N_RANK][N_CHIP],
  input  logic [BURST_W-1:0]         rd_data_i  [N_RANK][N_CHIP][N_BG],
  input  logic [PAR_W-1:0]           rd_par_i   [N_RANK][N_CHIP][N_BG],
  output logic                       out_valid_o,
  output logic [1:0]                 out_tag_o,
  output logic [3:0]                 out_row_o,
  output logic [N_CHIP*BURST_W-1:0]  out_data_o,
  output logic                       out_last_o,
  output logic                       err_o,
  output logic                       busy_o
);
  logic [15:0] now;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) now <= '0;
    else        now <= now + 16'd1;

  logic [N_RANK-1:0]          ca_v;
  logic [CA_W-1:0]            ca [N_RANK];
  logic [N_BG-1:0]            pop [N_RANK];
  logic [N_RANK-1:0]          rv;
  logic [N_CHIP*BURST_W-1:0]  rdat [N_RANK];
  xfer_id_t                   rid [N_RANK];
  logic                       npr_busy;

  logic [N_BG-1:0]     c_pop  [N_RANK][N_CHIP];
  logic                c_rv   [N_RANK][N_CHIP];
  logic [BURST_W-1:0]  c_rd   [N_RANK][N_CHIP];
  xfer_id_t            c_id   [N_RANK][N_CHIP];
  logic [N_RANK*N_CHIP-1:0] c_err, c_busy;

  trim_npr #(.N_RANK(N_RANK), .N_CHIP(N_CHIP), .NQ(NQ), .QDEPTH(QDEPTH), .T_CCD_S(T_CCD_S)) u_npr (
    .clk, .rst_n,
    .frame_valid_i, .frame_i, .frame_n_i, .frame_ready_o,
    .ca_valid_o(ca_v), .ca_o(ca), .pop_i(pop),
    .resp_valid_i(rv), .resp_data_i(rdat), .resp_id_i(rid),
    .out_valid_o, .out_tag_o, .out_row_o, .out_data_o, .out_last_o, .busy_o(npr_busy)
  );

  for (genvar r = 0; r < N_RANK; r++) begin : g_rank
    for (genvar c = 0; c < N_CHIP; c++) begin : g_chip
      trim_chip #(
        .QDEPTH(QDEPTH), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS),
        .T_CCD_L(T_CCD_L), .T_RRD_L(T_RRD_L)
      ) u_chip (
        .clk, .rst_n, .now_i(now),
        .ca_valid_i(ca_v[r]), .ca_i(ca[r]), .ci_pop_o(c_pop[r][c]),
        .dram_cmd_o(dram_cmd_o[r][c]), .rd_valid_i(rd_valid_i[r][c]),
        .rd_data_i(rd_data_i[r][c]), .rd_par_i(rd_par_i[r][c]),
        .resp_valid_o(c_rv[r][c]), .resp_data_o(c_rd[r][c]), .resp_id_o(c_id[r][c]),
        .err_o(c_err[r*N_CHIP+c]), .busy_o(c_busy[r*N_CHIP+c])
      );
      assign rdat[r][BURST_W*c +: BURST_W] = c_rd[r][c];
    end
    assign pop[r] = c_pop[r][0];
    assign rv[r]  = c_rv[r][0];
    assign rid[r] = c_id[r][0];
  end

  assign err_o  = |c_err;
  assign busy_o = npr_busy || |c_busy;

  // chips other than chip 0 mirror it; their copies are not needed
  logic unused;
  always_comb begin
    unused = 1'b0;
    for (int r = 0; r < N_RANK; r++)
      for (int c = 1; c < N_CHIP; c++) unused = unused ^ ^c_pop[r][c] ^ c_rv[r][c] ^ ^c_id[r][c];
  end
endmodule
