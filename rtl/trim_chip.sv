// trim_chip: the processing side of one TRiM-G DRAM chip (x8, 8 bank-groups).
//
// The chip receives the C-instrs of its rank as 14-bit beats on the C/A pins, seven
// beats per 85-bit C-instr, least significant beat first (ca_valid_i marks each
// beat; the seven beats of a C-instr are sent back to back). The deserializer
// rebuilds the C-instr and hands it to the IPR of the bank-group in its address;
// every chip of a rank receives the same C-instr and works on its own 16-byte slice
// of each 64-byte vector piece. The chip holds one trim_ipr per bank-group. Their
// DRAM command and read-data ports are brought out (the DRAM arrays are not part
// of this RTL). Partial-sum rows leave through a fixed-priority arbiter onto the
// chip's data pins (resp_*); one queue-entry-freed pulse per IPR (ci_pop_o) lets the
// NPR keep count of free queue entries. err_o is the OR of the IPRs' DED flags.
// Fixed beat order, the arbiter and the credit pulses are this design's choices.
module trim_chip
  import trim_pkg::*;
#(
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned T_RCD   = 40,
  parameter int unsigned T_RP    = 40,
  parameter int unsigned T_RAS   = 77,
  parameter int unsigned T_CCD_L = 12,
  parameter int unsigned T_RRD_L = 12
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [15:0]         now_i,
  input  logic                ca_valid_i,
  input  logic [CA_W-1:0]     ca_i,
  output logic [N_BG-1:0]     ci_pop_o,
  output dram_cmd_t           dram_cmd_o [N_BG],
  input  logic [N_BG-1:0]     rd_valid_i,
  input  logic [BURST_W-1:0]  rd_data_i [N_BG],
  input  logic [PAR_W-1:0]    rd_par_i  [N_BG],
  output logic                resp_valid_o,
  output logic [BURST_W-1:0]  resp_data_o,
  output xfer_id_t            resp_id_o,
  output logic                err_o,
  output logic                busy_o
);
  localparam int unsigned SH_W = CA_W * CA_BEATS;   // 98

  // ---------------- C/A deserializer ----------------
  logic [SH_W-1:0] sh;
  logic [2:0]      beat;
  logic            ci_v;
  cinstr_t         ci;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh   <= '0;
      beat <= '0;
      ci_v <= 1'b0;
    end else begin
      ci_v <= 1'b0;
      if (ca_valid_i) begin
        sh <= {ca_i, sh[SH_W-1:CA_W]};
        if (beat == 3'(CA_BEATS - 1)) begin
          beat <= '0;
          ci_v <= 1'b1;
        end else begin
          beat <= beat + 3'd1;
        end
      end
    end
  end
  assign ci = cinstr_t'(sh[CI_W-1:0]);

  // ---------------- IPRs ----------------
  logic [N_BG-1:0]    xv, xr, ipr_err, ipr_busy;
  logic [BURST_W-1:0] xd [N_BG];
  xfer_id_t           xid [N_BG];
  for (genvar g = 0; g < N_BG; g++) begin : g_ipr
    trim_ipr #(
      .QDEPTH(QDEPTH), .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS),
      .T_CCD_L(T_CCD_L), .T_RRD_L(T_RRD_L), .BG_ID(3'(g))
    ) u_ipr (
      .clk, .rst_n, .now_i,
      .ci_valid_i(ci_v && a_bg(ci.addr) == 3'(g)), .ci_i(ci), .ci_pop_o(ci_pop_o[g]),
      .dram_cmd_o(dram_cmd_o[g]), .rd_valid_i(rd_valid_i[g]), .rd_data_i(rd_data_i[g]),
      .rd_par_i(rd_par_i[g]),
      .xfer_valid_o(xv[g]), .xfer_data_o(xd[g]), .xfer_id_o(xid[g]), .xfer_ready_i(xr[g]),
      .err_o(ipr_err[g]), .busy_o(ipr_busy[g])
    );
  end

  // ---------------- response arbiter ----------------
  always_comb begin
    xr = '0;
    for (int g = N_BG - 1; g >= 0; g--)
      if (xv[g]) xr = N_BG'(1) << g;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      resp_valid_o <= 1'b0;
      resp_data_o  <= '0;
      resp_id_o    <= '0;
      err_o        <= 1'b0;
    end else begin
      resp_valid_o <= |xv;
      err_o        <= |ipr_err;
      for (int g = 0; g < N_BG; g++)
        if (xr[g]) begin
          resp_data_o <= xd[g];
          resp_id_o   <= xid[g];
        end
    end
  end
  assign busy_o = |ipr_busy || ci_v || (beat != '0);

  logic unused;
  assign unused = ^sh[SH_W-1:CI_W];
endmodule
