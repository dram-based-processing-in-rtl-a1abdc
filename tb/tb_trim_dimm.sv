// tb_trim_dimm: a TRiM-G DIMM (NPR, 2 ranks x 4 chips x 8 IPRs) running several
// batches of embedding gather-and-reduce against the behavioural DRAM model.
//
// trim_host_model sends the C-instr frames and checks every reduced row; the DRAM
// model checks the timing of every ACT/RD/PRE. The testbench also counts the
// mechanisms the design is built around and fails if one never happened: frame
// back-pressure, C-instrs held back for lack of IPR queue credits, lookups waiting
// for their skewed-cycle, partial-sum transfers, transfers overlapping the
// gathering of the next batch (double buffering), weighted and plain sums, and the
// DED error flag for the corrupted row.
module tb_trim_dimm;
  import trim_pkg::*;
  localparam int NR = 2, NC = 4;
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

  trim_dimm dut (.clk, .rst_n, .frame_valid_i(fv), .frame_i(fi), .frame_n_i(fn), .frame_ready_o(fr),
    .dram_cmd_o(dcmd), .rd_valid_i(rdv), .rd_data_i(rdd), .rd_par_i(rdp),
    .out_valid_o(ov), .out_tag_o(otag), .out_row_o(orow), .out_data_o(odata), .out_last_o(ol),
    .err_o(err), .busy_o(busy));
  trim_dram_model #(.N_RANK(NR), .N_CHIP(NC)) u_dram (.clk, .rst_n, .cmd_i(dcmd), .rd_valid_o(rdv),
    .rd_data_o(rdd), .rd_par_o(rdp));
  trim_host_model #(.N_RANK(NR), .N_CHIP(NC), .NB(3), .NLOOK(8), .NRD(4)) u_host (.clk, .rst_n,
    .frame_valid_o(fv), .frame_o(fi), .frame_n_o(fn), .frame_ready_i(fr),
    .out_valid_i(ov), .out_tag_i(otag), .out_row_i(orow), .out_data_i(odata), .out_last_i(ol),
    .err_i(err), .done_o(done));

  int n_credit = 0, n_skew = 0, n_xfer = 0, n_overlap = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (dut.u_npr.look_ok && dut.u_npr.ser_n[dut.u_npr.h_rank] == 0 &&
        dut.u_npr.cred[dut.u_npr.h_rank][dut.u_npr.h_bg] == 0) n_credit++;
    if (dut.g_rank[0].g_chip[0].u_chip.g_ipr[0].u_ipr.u_dec.is_look &&
        !dut.g_rank[0].g_chip[0].u_chip.g_ipr[0].u_ipr.u_dec.skew_ok) n_skew++;
    n_xfer += $countones(dut.u_npr.sel_x);
    if (dut.u_npr.gst != 0 && dut.u_npr.sel_l != 0) n_overlap++;
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
    checks++;
    if (u_host.n_frame_stall == 0 || n_credit == 0 || n_skew == 0 || n_xfer == 0 || n_overlap == 0 ||
        u_host.n_wsum == 0 || u_host.n_sum == 0 || u_host.n_err == 0) failures++;
    $display("frames %0d (stalled %0d cycles), credit stalls %0d, skew waits %0d, transfers %0d, overlapped lookups %0d",
             u_host.n_frames, u_host.n_frame_stall, n_credit, n_skew, n_xfer, n_overlap);
    $display("weighted %0d plain %0d, DED errors %0d, rows %0d, DRAM ACT %0d RD %0d, cycles %0d",
             u_host.n_wsum, u_host.n_sum, u_host.n_err, u_host.n_rows, u_dram.acts, u_dram.rds, cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
