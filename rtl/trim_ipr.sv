// trim_ipr: intra-chip processing resource, one per bank-group of a DRAM chip.
//
// An IPR sits where the bank-group's data path meets the chip's global I/O. It holds
//  * a C-instr queue, fed by the chip's C/A deserializer; each entry also keeps its
//    arrival cycle so the skewed-cycle field can be counted from arrival;
//  * the C-instr decoder (trim_cinstr_decoder), which issues ACT/RD/PRE to the four
//    banks of the bank-group on dram_cmd_o;
//  * four fp32 MACs, one per 32-bit lane of the 128-bit x8 BL16 burst; a returning
//    burst is added, or multiplied by the C-instr's weight and added, into one row
//    of the partial-sum register file;
//  * two register files of 1 KB each (4 batch-tags x 16 rows x 4 lanes x fp32), used
//    as a double buffer: lookups of batch k+1 accumulate in one while the partial
//    sums of batch k leave the other for the NPR;
//  * the parity check of the repurposed on-die ECC: every burst's 8 parity bits are
//    recomputed and compared with the stored ones; a mismatch is reported on err_o.
// Read data come back rd_valid_i some cycles after each RD (the DRAM's tCL); a
// small FIFO keeps the tag, read index, opcode and weight of each outstanding RD.
// A row that has not been written yet is read as +0 (per-row valid bits), so the
// first read of a tag needs no clearing pass.
// Transfer C-instrs (opcode OP_XFER) carry {buffer, first} in skew[1:0], the row in
// nrd[3:0], the tag and, in vt, "last of this buffer". The first of a batch closes
// the buffer being filled (after all its reads have been reduced) and switches to
// the other; each returns one 128-bit row on xfer_data_o with its id; the last one
// releases the buffer. The response is held until xfer_ready_i. The bank-group
// field of xfer_id_o is the constant BG_ID, so those three output bits never change.
// Queue depth (8) and the XFER framing are this design's; the structure (queue,
// decoder, MACs, two 1 KB RFs, DED check) follows the document.
module trim_ipr
  import trim_pkg::*;
#(
  parameter int unsigned QDEPTH  = 8,
  parameter int unsigned T_RCD   = 40,
  parameter int unsigned T_RP    = 40,
  parameter int unsigned T_RAS   = 77,
  parameter int unsigned T_CCD_L = 12,
  parameter int unsigned T_RRD_L = 12,
  parameter logic [2:0]  BG_ID   = 3'd0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [15:0]         now_i,
  // C-instrs from the C/A deserializer
  input  logic                ci_valid_i,
  input  cinstr_t             ci_i,
  output logic                ci_pop_o,      // one queue entry freed (credit back to the NPR)
  // DRAM bank-group
  output dram_cmd_t           dram_cmd_o,
  input  logic                rd_valid_i,
  input  logic [BURST_W-1:0]  rd_data_i,
  input  logic [PAR_W-1:0]    rd_par_i,
  // partial sums towards the NPR
  output logic                xfer_valid_o,
  output logic [BURST_W-1:0]  xfer_data_o,
  output xfer_id_t            xfer_id_o,
  input  logic                xfer_ready_i,
  // status
  output logic                err_o,         // DED mismatch on a burst (pulse)
  output logic                busy_o
);
  localparam int unsigned RFA = $clog2(RF_ROWS);   // 6

  // ---------------- queue ----------------
  logic [CI_W+15:0] q_dout;
  logic             q_empty, q_full;
  logic [$clog2(QDEPTH):0] q_cnt;
  logic             dec_pop;
  trim_cinstr_queue #(.W(CI_W + 16), .DEPTH(QDEPTH)) u_q (
    .clk, .rst_n,
    .push_i(ci_valid_i), .din_i({ci_i, now_i}),
    .pop_i(dec_pop), .dout_o(q_dout), .empty_o(q_empty), .full_o(q_full), .count_o(q_cnt)
  );
  cinstr_t head;
  assign head     = cinstr_t'(q_dout[CI_W+15:16]);
  assign ci_pop_o = dec_pop;

  // ---------------- buffers state ----------------
  logic       cur;                 // buffer being filled by lookups
  logic [1:0] full;                // buffer closed, waiting to be transferred
  logic [RF_ROWS-1:0] rf_v [2];
  logic [31:0] rf [2][RF_ROWS][LANES];

  // ---------------- outstanding reads ----------------
  typedef struct packed {
    logic [1:0]  tag;
    logic [3:0]  idx;
    logic        wsum;
    logic [31:0] weight;
  } rdtag_t;
  localparam int unsigned TQ = 16;
  rdtag_t      tq [TQ];
  logic [4:0]  tq_wp, tq_rp;
  wire         tq_empty = (tq_wp == tq_rp);

  // ---------------- decoder ----------------
  logic        barrier, xfer_go, dec_rd, dec_wsum, dec_last, dec_idle;
  logic [1:0]  dec_tag;
  logic [3:0]  dec_idx;
  logic [31:0] dec_w;
  trim_cinstr_decoder #(
    .T_RCD(T_RCD), .T_RP(T_RP), .T_RAS(T_RAS), .T_CCD_L(T_CCD_L), .T_RRD_L(T_RRD_L)
  ) u_dec (
    .clk, .rst_n, .now_i,
    .head_valid_i(!q_empty && !(xfer_valid_o && !xfer_ready_i)), .head_i(head),
    .head_arrival_i(q_dout[15:0]),
    .pop_o(dec_pop), .buf_free_i(!full[cur]), .drained_i(tq_empty && !rd_valid_i),
    .barrier_o(barrier), .xfer_o(xfer_go),
    .cmd_o(dram_cmd_o), .rd_o(dec_rd), .rd_tag_o(dec_tag), .rd_idx_o(dec_idx),
    .rd_wsum_o(dec_wsum), .rd_weight_o(dec_w), .rd_last_o(dec_last), .idle_o(dec_idle)
  );

  // ---------------- MACs ----------------
  rdtag_t            rt;
  logic [RFA-1:0]    ra;
  logic [31:0]       mac_y [LANES];
  assign rt = tq[tq_rp[3:0]];
  assign ra = {rt.tag, rt.idx};
  for (genvar l = 0; l < LANES; l++) begin : g_mac
    trim_ipr_mac u_mac (
      .acc_i(rf_v[cur][ra] ? rf[cur][ra][l] : 32'h0),
      .data_i(rd_data_i[32*l +: 32]),
      .weight_i(rt.weight), .wsum_i(rt.wsum), .y_o(mac_y[l])
    );
  end

  logic [PAR_W-1:0] par_calc;
  logic             par_err;
  trim_ecc_ded #(.DW(BURST_W), .PW(PAR_W)) u_ecc (
    .data_i(rd_data_i), .par_i(rd_par_i), .par_o(par_calc), .err_o(par_err)
  );

  // ---------------- transfer row read ----------------
  logic            xb;
  logic [RFA-1:0]  xa;
  assign xb = head.skew[0];
  assign xa = {head.tag[1:0], head.nrd[3:0]};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur   <= 1'b0;
      full  <= '0;
      rf_v[0] <= '0;
      rf_v[1] <= '0;
      tq_wp <= '0;
      tq_rp <= '0;
      err_o <= 1'b0;
      xfer_valid_o <= 1'b0;
      xfer_data_o  <= '0;
      xfer_id_o    <= '0;
    end else begin
      err_o <= 1'b0;
      if (dec_rd) tq_wp <= tq_wp + 5'd1;
      if (rd_valid_i) begin
        rf_v[cur][ra] <= 1'b1;
        tq_rp <= tq_rp + 5'd1;
        err_o <= par_err;
      end
      if (xfer_valid_o && xfer_ready_i) xfer_valid_o <= 1'b0;
      if (xfer_go) begin
        xfer_valid_o <= 1'b1;
        for (int l = 0; l < LANES; l++)
          xfer_data_o[32*l +: 32] <= rf_v[xb][xa] ? rf[xb][xa][l] : 32'h0;
        xfer_id_o <= '{tag: head.tag[1:0], row: head.nrd[3:0], bg: BG_ID};
        if (barrier) begin
          full[cur] <= 1'b1;
          cur       <= ~cur;
        end
        if (head.vt) begin
          full[xb] <= 1'b0;
          rf_v[xb] <= '0;
        end
      end
    end
  end

  // storage without reset: read only where a valid bit or the FIFO pointers allow
  always_ff @(posedge clk) begin
    if (dec_rd) tq[tq_wp[3:0]] <= '{tag: dec_tag, idx: dec_idx, wsum: dec_wsum, weight: dec_w};
    if (rd_valid_i)
      for (int l = 0; l < LANES; l++) rf[cur][ra][l] <= mac_y[l];
  end

  assign busy_o = !q_empty || !dec_idle || !tq_empty || (full != '0);

  a_tq_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
                                     !(dec_rd && (tq_wp - tq_rp) == 5'(TQ)));
  a_no_orphan_data: assert property (@(posedge clk) disable iff (!rst_n) !(rd_valid_i && tq_empty));
  // unused: queue count, last-read flag (kept on the decoder for observation)
  logic unused;
  assign unused = ^{q_cnt, q_full, dec_last, par_calc};
endmodule
