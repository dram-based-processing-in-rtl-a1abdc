// trim_npr: near-rank processing resource in the buffer chip of a TRiM-G DIMM.
//
// Instruction path (the two-stage C-instr transfer):
//  * Stage 1: the host writes C-instrs in frames of up to 7 over the data bus; a
//    frame takes 8 cycles, so a new frame is accepted at most every FRAME_CYC cycles
//    and only when the previous one has moved on. The frame drains one C-instr
//    per cycle into the NPR's C-instr queue (NQ entries).
//  * Stage 2: the queue head goes, in order, to the rank its address selects, over
//    that rank's 14-bit C/A pins as seven beats (least significant beat first),
//    while the other rank's pins carry other C-instrs. A C-instr is only sent
//    when the target IPR has a free queue entry: the NPR keeps one credit counter
//    per (rank, bank-group), spent on send and returned by the chips' queue-pop pulses.
// Reduction path:
//  * When the C-instr that closes a batch (vt = 1) has been sent, the NPR generates
//    transfer C-instrs for every rank: for each batch-tag t (0..3), partial-sum row i
//    (0..nRD-1) and bank-group b it asks IPR b of all chips of the rank for that
//    row. Transfers of one rank are at least tCCD_S apart (the bank-group
//    interleaved burst rate of the shared data pins). The first transfer to each
//    IPR (t = 0, i = 0) marks the batch boundary there and goes before any lookup of
//    the next batch; the others alternate with lookups of the next batch, so the
//    transfer of batch k overlaps the gathering of batch k+1 (double buffering).
//    Lookups of batch k+2 wait until batch k has been reduced.
//  * Each rank's 512-bit response (4 chips x 4 fp32 lanes) is added, lane by lane,
//    into that rank's accumulator row (tag, i) - the per-rank adders reduce across
//    bank-groups. When every rank has delivered all its rows, the cross-rank adders
//    sum the ranks row by row and the result leaves on out_* (one 16-lane row per
//    cycle, out_last_o on the final one).
// Following the document: frames of 7 C-instrs in 8 cycles, 7 C/A beats per C-instr,
// per-rank and cross-rank adders, interleaving of transfers with lookups. This
// design's own: credit counting, the transfer C-instr format, the loop order, the
// batch bookkeeping (at most two batches in flight) and the output stream.
module trim_npr
  import trim_pkg::*;
#(
  parameter int unsigned N_RANK  = 2,
  parameter int unsigned N_CHIP  = 4,
  parameter int unsigned NQ      = 32,
  parameter int unsigned QDEPTH  = 8,     // entries of each IPR queue
  parameter int unsigned T_CCD_S = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // stage 1: frames from the host
  input  logic                          frame_valid_i,
  input  cinstr_t                       frame_i [FRAME],
  input  logic [2:0]                    frame_n_i,      // C-instrs in the frame, 1..7
  output logic                          frame_ready_o,
  // stage 2: C/A pins of each rank
  output logic [N_RANK-1:0]             ca_valid_o,
  output logic [CA_W-1:0]               ca_o [N_RANK],
  input  logic [N_BG-1:0]               pop_i [N_RANK],
  // partial sums from each rank
  input  logic [N_RANK-1:0]             resp_valid_i,
  input  logic [N_CHIP*BURST_W-1:0]     resp_data_i [N_RANK],
  input  xfer_id_t                      resp_id_i [N_RANK],
  // reduced results
  output logic                          out_valid_o,
  output logic [1:0]                    out_tag_o,
  output logic [3:0]                    out_row_o,
  output logic [N_CHIP*BURST_W-1:0]     out_data_o,
  output logic                          out_last_o,
  output logic                          busy_o
);
  localparam int unsigned NL   = N_CHIP * LANES;        // fp32 lanes per rank row
  localparam int unsigned CW   = $clog2(QDEPTH + 1);
  localparam int unsigned SH_W = CA_W * CA_BEATS;
  localparam int unsigned RA   = $clog2(RF_ROWS);

  // ================= stage 1: frame buffer -> queue =================
  cinstr_t    fb [FRAME];
  logic [2:0] fb_n, fb_i;
  logic [3:0] f_tmr;
  logic       q_push, q_pop, q_empty, q_full;
  cinstr_t    q_head;
  logic [$clog2(NQ):0] q_cnt;
  logic [CI_W-1:0] q_dout;

  assign frame_ready_o = (fb_n == fb_i) && (f_tmr >= 4'(FRAME_CYC - 1));
  assign q_push        = (fb_i != fb_n) && !q_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fb_n  <= '0;
      fb_i  <= '0;
      f_tmr <= 4'(FRAME_CYC - 1);
      for (int k = 0; k < FRAME; k++) fb[k] <= '0;
    end else begin
      if (f_tmr != 4'(FRAME_CYC - 1)) f_tmr <= f_tmr + 4'd1;
      if (q_push) fb_i <= fb_i + 3'd1;
      if (frame_valid_i && frame_ready_o) begin
        fb    <= frame_i;
        fb_n  <= frame_n_i;
        fb_i  <= '0;
        f_tmr <= '0;
      end
    end
  end

  trim_cinstr_queue #(.W(CI_W), .DEPTH(NQ)) u_q (
    .clk, .rst_n, .push_i(q_push), .din_i(fb[fb_i]), .pop_i(q_pop),
    .dout_o(q_dout), .empty_o(q_empty), .full_o(q_full), .count_o(q_cnt)
  );
  assign q_head = cinstr_t'(q_dout);

  // ================= batch bookkeeping =================
  typedef enum logic [1:0] {G_IDLE, G_GEN, G_WAIT, G_COMB} gst_e;
  gst_e       gst;
  logic [4:0] pend_nrd [2];
  logic [1:0] pend_cnt;
  logic       gbuf;                      // buffer parity of the batch being reduced
  logic [4:0] gnrd;
  logic [N_RANK-1:0] g_fin, firsts_sent;
  logic [1:0] g_tag [N_RANK];
  logic [3:0] g_row [N_RANK];
  logic [2:0] g_bg  [N_RANK];
  logic [4:0] t_x   [N_RANK];
  logic [N_RANK-1:0] alt;

  // ================= stage 2: dispatch =================
  logic [CW-1:0]   cred [N_RANK][N_BG];
  logic [SH_W-1:0] ser [N_RANK];
  logic [2:0]      ser_n [N_RANK];
  logic [N_RANK-1:0] sel_x, sel_l;
  logic            h_rank;
  logic [2:0]      h_bg;
  logic            look_ok;

  assign h_rank = N_RANK > 1 ? a_rank(q_head.addr) : 1'b0;
  assign h_bg   = a_bg(q_head.addr);

  always_comb begin
    // lookups of a new batch wait for the boundary transfers of the batch before
    look_ok = !q_empty && (pend_cnt == 2'd0 || (pend_cnt == 2'd1 && firsts_sent[h_rank]));
    for (int r = 0; r < N_RANK; r++) begin
      logic lw, xw;
      lw = look_ok && (32'(h_rank) == r) && (ser_n[r] == '0) && (cred[r][h_bg] != '0);
      xw = (gst == G_GEN) && !g_fin[r] && (ser_n[r] == '0) && (cred[r][g_bg[r]] != '0) &&
           (t_x[r] >= 5'(T_CCD_S));
      sel_x[r] = xw && (!firsts_sent[r] || alt[r] || !lw);
      sel_l[r] = lw && !sel_x[r];
    end
  end
  assign q_pop = |sel_l;

  function automatic cinstr_t mk_xfer(input logic rank, input logic [2:0] bg, input logic [1:0] tag,
                                      input logic [3:0] row, input logic buf_, input logic last);
    cinstr_t c;
    c        = '0;
    c.addr   = mk_addr(rank, 16'h0, bg, 2'd0, 10'd0);
    c.nrd    = {1'b0, row};
    c.tag    = {2'b00, tag};
    c.opcode = OP_XFER;
    c.skew   = {4'b0000, (tag == 2'd0 && row == 4'd0), buf_};
    c.vt     = last;
    return c;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_RANK; r++) begin
        ser[r]   <= '0;
        ser_n[r] <= '0;
        ca_o[r]  <= '0;
        for (int g = 0; g < N_BG; g++) cred[r][g] <= CW'(QDEPTH);
      end
      ca_valid_o <= '0;
    end else begin
      for (int r = 0; r < N_RANK; r++) begin
        // credits
        for (int g = 0; g < N_BG; g++) begin
          cred[r][g] <= cred[r][g] + CW'(pop_i[r][g]) -
                        CW'((sel_x[r] && g_bg[r] == 3'(g)) || (sel_l[r] && h_bg == 3'(g)));
        end
        // serializer
        ca_valid_o[r] <= 1'b0;
        if (ser_n[r] != '0) begin
          ca_valid_o[r] <= 1'b1;
          ca_o[r]       <= ser[r][CA_W-1:0];
          ser[r]        <= ser[r] >> CA_W;
          ser_n[r]      <= ser_n[r] - 3'd1;
        end else if (sel_x[r] || sel_l[r]) begin
          ser[r]   <= SH_W'(sel_x[r] ? mk_xfer(1'(r), g_bg[r], g_tag[r], g_row[r], gbuf,
                                               g_tag[r] == 2'd3 && {1'b0, g_row[r]} == gnrd - 5'd1)
                                     : q_head);
          ser_n[r] <= 3'(CA_BEATS);
        end
      end
    end
  end

  // ================= transfer generation =================
  logic [9:0] r_cnt [N_RANK];
  logic [9:0] r_need;
  logic [1:0] c_tag;
  logic [3:0] c_row;
  assign r_need = 10'(gnrd) * 10'(N_BG * N_GNR);   // rows each rank returns

  logic all_in;                           // every rank has returned all its rows
  always_comb begin
    all_in = 1'b1;
    for (int r = 0; r < N_RANK; r++) if (r_cnt[r] != r_need) all_in = 1'b0;
  end

  logic vt_sent;
  assign vt_sent = |sel_l && q_head.vt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gst      <= G_IDLE;
      pend_cnt <= '0;
      pend_nrd[0] <= '0;
      pend_nrd[1] <= '0;
      gbuf     <= 1'b0;
      gnrd     <= '0;
      g_fin    <= '0;
      firsts_sent <= '0;
      alt      <= '0;
      c_tag    <= '0;
      c_row    <= '0;
      for (int r = 0; r < N_RANK; r++) begin
        g_tag[r] <= '0;
        g_row[r] <= '0;
        g_bg[r]  <= '0;
        t_x[r]   <= '1;
      end
    end else begin
      // pending batches
      if (vt_sent) pend_nrd[pend_cnt[0]] <= q_head.nrd;
      for (int r = 0; r < N_RANK; r++) begin
        if (t_x[r] != '1) t_x[r] <= t_x[r] + 5'd1;
        if (sel_l[r]) alt[r] <= 1'b1;
        if (sel_x[r]) begin
          alt[r] <= 1'b0;
          t_x[r] <= 5'd1;
          if (g_tag[r] == 2'd0 && g_row[r] == 4'd0 && g_bg[r] == 3'(N_BG - 1)) firsts_sent[r] <= 1'b1;
          if (g_bg[r] != 3'(N_BG - 1)) g_bg[r] <= g_bg[r] + 3'd1;
          else begin
            g_bg[r] <= '0;
            if ({1'b0, g_row[r]} != gnrd - 5'd1) g_row[r] <= g_row[r] + 4'd1;
            else begin
              g_row[r] <= '0;
              if (g_tag[r] != 2'(N_GNR - 1)) g_tag[r] <= g_tag[r] + 2'd1;
              else g_fin[r] <= 1'b1;
            end
          end
        end
      end
      unique case (gst)
        G_IDLE: if (pend_cnt != 0) begin
          gst   <= G_GEN;
          gnrd  <= pend_nrd[0];
          g_fin <= '0;
          for (int r = 0; r < N_RANK; r++) begin
            g_tag[r] <= '0;
            g_row[r] <= '0;
            g_bg[r]  <= '0;
          end
        end
        G_GEN:  if (g_fin == '1) gst <= G_WAIT;
        G_WAIT: begin
          if (all_in) begin
            gst   <= G_COMB;
            c_tag <= '0;
            c_row <= '0;
          end
        end
        G_COMB: begin
          if ({1'b0, c_row} != gnrd - 5'd1) c_row <= c_row + 4'd1;
          else begin
            c_row <= '0;
            if (c_tag != 2'(N_GNR - 1)) c_tag <= c_tag + 2'd1;
            else begin
              gst         <= G_IDLE;
              gbuf        <= ~gbuf;
              firsts_sent <= '0;
              pend_nrd[0] <= pend_nrd[1];
              if (vt_sent) pend_nrd[0] <= q_head.nrd;
            end
          end
        end
        default: gst <= G_IDLE;
      endcase
      pend_cnt <= pend_cnt + 2'(vt_sent) -
                  2'(gst == G_COMB && c_tag == 2'(N_GNR - 1) && {1'b0, c_row} == gnrd - 5'd1);
    end
  end

  // ================= per-rank accumulation =================
  logic [31:0]       acc   [N_RANK][RF_ROWS][NL];
  logic [RF_ROWS-1:0] acc_v [N_RANK];
  logic [31:0]       acc_y [N_RANK][NL];
  logic [RA-1:0]     r_a   [N_RANK];

  for (genvar r = 0; r < N_RANK; r++) begin : g_rank
    assign r_a[r] = {resp_id_i[r].tag, resp_id_i[r].row};
    for (genvar l = 0; l < NL; l++) begin : g_lane
      trim_fp32_add u_add (
        .a_i(acc_v[r][r_a[r]] ? acc[r][r_a[r]][l] : 32'h0),
        .b_i(resp_data_i[r][32*l +: 32]), .y_o(acc_y[r][l])
      );
    end
  end

  logic comb_last;
  assign comb_last = (gst == G_COMB) && c_tag == 2'(N_GNR - 1) && {1'b0, c_row} == gnrd - 5'd1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < N_RANK; r++) begin
        acc_v[r] <= '0;
        r_cnt[r] <= '0;
      end
    end else begin
      for (int r = 0; r < N_RANK; r++) begin
        if (resp_valid_i[r]) begin
          acc_v[r][r_a[r]] <= 1'b1;
          r_cnt[r]         <= r_cnt[r] + 10'd1;
        end
        if (comb_last) begin
          acc_v[r] <= '0;
          r_cnt[r] <= '0;
        end
      end
    end
  end
  always_ff @(posedge clk)
    for (int r = 0; r < N_RANK; r++)
      if (resp_valid_i[r])
        for (int l = 0; l < NL; l++) acc[r][r_a[r]][l] <= acc_y[r][l];

  // ================= cross-rank reduction =================
  // g_xr[r].s holds the sum of ranks 0..r of row (c_tag, c_row)
  logic [RA-1:0] c_a;
  assign c_a = {c_tag, c_row};
  for (genvar r = 0; r < N_RANK; r++) begin : g_xr
    logic [31:0] s [NL];
    for (genvar l = 0; l < NL; l++) begin : g_xl
      if (r == 0) begin : g_first
        assign s[l] = acc_v[0][c_a] ? acc[0][c_a][l] : 32'h0;
      end else begin : g_add
        trim_fp32_add u_xadd (
          .a_i(g_xr[r-1].s[l]), .b_i(acc_v[r][c_a] ? acc[r][c_a][l] : 32'h0), .y_o(s[l])
        );
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid_o <= 1'b0;
      out_tag_o   <= '0;
      out_row_o   <= '0;
      out_data_o  <= '0;
      out_last_o  <= 1'b0;
    end else begin
      out_valid_o <= (gst == G_COMB);
      out_last_o  <= comb_last;
      out_tag_o   <= c_tag;
      out_row_o   <= c_row;
      for (int l = 0; l < NL; l++) out_data_o[32*l +: 32] <= g_xr[N_RANK-1].s[l];
    end
  end

  always_comb begin
    busy_o = !q_empty || (fb_i != fb_n) || (pend_cnt != 0) || (gst != G_IDLE);
    for (int r = 0; r < N_RANK; r++) busy_o = busy_o || (ser_n[r] != '0);
  end

  a_credit_ok: assert property (@(posedge clk) disable iff (!rst_n)
                                !(sel_l[0] && cred[0][h_bg] == '0));
  logic unused;
  assign unused = ^{q_cnt, resp_id_i[0].bg};
endmodule
