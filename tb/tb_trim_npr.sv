// tb_trim_npr: self-checking test of the near-rank processing resource. The NPR is
// connected to two ranks of two trim_chip instances each (the chips are the
// environment here) and to the behavioural DRAM model.
//
// trim_host_model sends the C-instr frames and checks every reduced row (the sum
// across ranks of the partial sums); the DRAM model checks every ACT/RD/PRE. On the
// C/A bus of each rank the testbench reassembles the C-instrs itself and checks
// that the seven beats of one are back to back, that no IPR queue is sent more
// C-instrs than it has room for (depth 8), and that transfers of one rank are at
// least tCCD_S apart, and that first-stage frames are taken exactly every 8 cycles
// at best. The testbench also counts the
// mechanisms the design is built around and fails if one never happened: frame
// back-pressure, C-instrs held back for lack of IPR queue credits, lookups waiting
// for their skewed-cycle, partial-sum transfers, transfers overlapping the
// gathering of the next batch (double buffering), weighted and plain sums, and the
// DED error flag for the corrupted row.
module tb_trim_npr;
  import trim_pkg::*;
  localparam int NR = 2, NC = 2, T_CCD_S = 8, QD = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic               fv, fr, ov, ol, err, busy, done;
  cinstr_t            fi [FRAME];
  logic [2:0]         fn;
  dram_cmd_t          dcmd [NR][NC][N_BG];
  logic [N_BG-1:0]    rdv  [NR][NC];
  logic [BURST_W-1:0] rdd  [NR][NC][N_BG];
  logic [PAR_W-1:0]   rdp  [NR][NC][N_BG];
  logic [1:0]         otag;
  logic [3:0]         orow;
  logic [NC*BURST_W-1:0] odata;

  logic [15:0] now;
  always @(posedge clk) if (!rst_n) now <= '0; else now <= now + 16'd1;
  logic [NR-1:0]          ca_v;
  logic [CA_W-1:0]        ca [NR];
  logic [N_BG-1:0]        pop [NR];
  logic [NR-1:0]          rv;
  logic [NC*BURST_W-1:0]  rdat [NR];
  xfer_id_t               rid [NR];
  logic [N_BG-1:0]        c_pop [NR][NC];
  logic                   c_rv [NR][NC];
  logic [BURST_W-1:0]     c_rd [NR][NC];
  xfer_id_t               c_id [NR][NC];
  logic [NR*NC-1:0]       c_err, c_busy;
  logic                   npr_busy;

  trim_npr #(.N_RANK(NR), .N_CHIP(NC)) dut (.clk, .rst_n, .frame_valid_i(fv), .frame_i(fi), .frame_n_i(fn),
    .frame_ready_o(fr), .ca_valid_o(ca_v), .ca_o(ca), .pop_i(pop), .resp_valid_i(rv), .resp_data_i(rdat),
    .resp_id_i(rid), .out_valid_o(ov), .out_tag_o(otag), .out_row_o(orow), .out_data_o(odata), .out_last_o(ol),
    .busy_o(npr_busy));
  for (genvar r = 0; r < NR; r++) begin : g_rank
    for (genvar c = 0; c < NC; c++) begin : g_chip
      trim_chip u_chip (.clk, .rst_n, .now_i(now), .ca_valid_i(ca_v[r]), .ca_i(ca[r]), .ci_pop_o(c_pop[r][c]),
        .dram_cmd_o(dcmd[r][c]), .rd_valid_i(rdv[r][c]), .rd_data_i(rdd[r][c]), .rd_par_i(rdp[r][c]),
        .resp_valid_o(c_rv[r][c]), .resp_data_o(c_rd[r][c]), .resp_id_o(c_id[r][c]),
        .err_o(c_err[r*NC+c]), .busy_o(c_busy[r*NC+c]));
      assign rdat[r][BURST_W*c +: BURST_W] = c_rd[r][c];
    end
    assign pop[r] = c_pop[r][0];
    assign rv[r]  = c_rv[r][0];
    assign rid[r] = c_id[r][0];
  end
  assign err  = |c_err;
  assign busy = npr_busy || |c_busy;

  int n_credit = 0, n_skew = 0, n_xfer = 0, n_overlap = 0, cyc = 0;

  // first-stage frames: at most one per FRAME_CYC cycles, and at that rate when the queue has room
  int last_f = -1000, min_fgap = 1000;
  always @(posedge clk) if (rst_n && fv && fr) begin
    if (cyc - last_f < min_fgap) min_fgap = cyc - last_f;
    last_f = cyc;
  end

  // C/A bus monitor per rank
  int nbeat [NR], outst [NR][N_BG], last_x [NR], n_ca_err = 0, n_ci = 0, max_outst = 0;
  logic [CA_BEATS*CA_W-1:0] rsh [NR];
  initial for (int r = 0; r < NR; r++) begin
    nbeat[r] = 0; last_x[r] = -1000; rsh[r] = '0;
    for (int g = 0; g < N_BG; g++) outst[r][g] = 0;
  end
  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      for (int g = 0; g < N_BG; g++) if (pop[r][g]) outst[r][g]--;
      if (nbeat[r] != 0 && !ca_v[r]) n_ca_err++;          // beats of a C-instr back to back
      if (ca_v[r]) begin
        rsh[r] = {ca[r], rsh[r][CA_BEATS*CA_W-1:CA_W]};
        nbeat[r]++;
        if (nbeat[r] == CA_BEATS) begin
          cinstr_t c;
          int g;
          c = cinstr_t'(rsh[r][CI_W-1:0]);
          g = int'(a_bg(c.addr));
          nbeat[r] = 0;
          n_ci++;
          outst[r][g]++;
          if (outst[r][g] > max_outst) max_outst = outst[r][g];
          if (outst[r][g] > QD) n_ca_err++;               // more than the queue holds
          if (c.opcode == OP_XFER) begin
            if (cyc - last_x[r] < T_CCD_S) n_ca_err++;
            last_x[r] = cyc;
          end
        end
      end
    end
  end

  trim_dram_model #(.N_RANK(NR), .N_CHIP(NC)) u_dram (.clk, .rst_n, .cmd_i(dcmd), .rd_valid_o(rdv),
    .rd_data_o(rdd), .rd_par_o(rdp));
  trim_host_model #(.N_RANK(NR), .N_CHIP(NC), .NB(3), .NLOOK(8), .NRD(4)) u_host (.clk, .rst_n,
    .frame_valid_o(fv), .frame_o(fi), .frame_n_o(fn), .frame_ready_i(fr),
    .out_valid_i(ov), .out_tag_i(otag), .out_row_i(orow), .out_data_i(odata), .out_last_i(ol),
    .err_i(err), .done_o(done));

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.look_ok && dut.ser_n[dut.h_rank] == 0 &&
        dut.cred[dut.h_rank][dut.h_bg] == 0) n_credit++;
    if (g_rank[0].g_chip[0].u_chip.g_ipr[0].u_ipr.u_dec.is_look &&
        !g_rank[0].g_chip[0].u_chip.g_ipr[0].u_ipr.u_dec.skew_ok) n_skew++;
    n_xfer += $countones(dut.sel_x);
    if (dut.gst != 0 && dut.sel_l != 0) n_overlap++;
  end

  initial begin
    int checks, failures;
    u_dram.bad_row = 65000;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      wait (done);
      begin
        repeat (200000) @(posedge clk);
        $display("watchdog");
      end
    join_any
    repeat (10) @(posedge clk);
    checks = u_host.checks;
    failures = u_host.failures + (done ? 0 : 1);
    checks += 2;
    if (u_dram.errors != 0) failures++;
    if (busy) failures++;
    checks += 3;
    if (min_fgap != FRAME_CYC) failures++;
    if (n_ca_err != 0) failures++;
    if (max_outst != QD) failures++;
    checks++;
    if (u_host.n_frame_stall == 0 || n_credit == 0 || n_skew == 0 || n_xfer == 0 || n_overlap == 0 ||
        u_host.n_wsum == 0 || u_host.n_sum == 0 || u_host.n_err == 0) failures++;
    $display("frames %0d (stalled %0d cycles), credit stalls %0d, skew waits %0d, transfers %0d, overlapped lookups %0d",
             u_host.n_frames, u_host.n_frame_stall, n_credit, n_skew, n_xfer, n_overlap);
    $display("weighted %0d plain %0d, DED errors %0d, rows %0d, DRAM ACT %0d RD %0d, cycles %0d",
             u_host.n_wsum, u_host.n_sum, u_host.n_err, u_host.n_rows, u_dram.acts, u_dram.rds, cyc);
    $display("C-instrs on the C/A buses %0d, C/A rule violations %0d, fullest IPR queue %0d, closest frames %0d cycles",
             n_ci, n_ca_err, max_outst, min_fgap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
