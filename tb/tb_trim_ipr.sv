// tb_trim_ipr: self-checking test of one intra-chip processing resource.
//
// The IPR drives bank-group 0 of a behavioural DRAM chip (trim_dram_model, one rank
// of one chip, tCL = 40). The testbench sends NB batches; each holds NLOOK lookup
// C-instrs spread over the four batch-tags (element-wise sum or weighted sum, random
// bank/row/column/skew) followed by the transfer C-instrs that ship every partial-sum
// row of the batch: {buffer, first} in skew[1:0], row in nrd, last in vt. C-instrs are
// sent only while the testbench holds a credit (queue depth 8, one credit back per
// ci_pop_o). xfer_ready_i is dropped at random. Checks: every transferred row equals
// the fp32 sum (or weighted sum) of its lookups, computed here from the DRAM model's
// element function; ids arrive in order; one lookup reads a row whose data has a
// flipped bit and must raise err_o on each of its NRD bursts; the DRAM model checks all command timing.
// Counted and required: queue-full stalls, ready back-pressure, lookups of batch k+1
// read while batch k is being transferred (double buffering), and DED errors.
module tb_trim_ipr;
  import trim_pkg::*;
  import tb_fp_pkg::*;
  localparam int NB = 4, NLOOK = 24, NRD = 6, BAD = 65000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] now;
  logic        civ, pop, xv, xr, err, busy;
  cinstr_t     ci;
  dram_cmd_t   dcmd;
  dram_cmd_t   mcmd [1][1][N_BG];
  logic [N_BG-1:0]    mrdv [1][1];
  logic [BURST_W-1:0] mrdd [1][1][N_BG];
  logic [PAR_W-1:0]   mrdp [1][1][N_BG];
  logic [BURST_W-1:0] xd;
  xfer_id_t    xid;

  trim_ipr dut (.clk, .rst_n, .now_i(now), .ci_valid_i(civ), .ci_i(ci), .ci_pop_o(pop), .dram_cmd_o(dcmd),
    .rd_valid_i(mrdv[0][0][0]), .rd_data_i(mrdd[0][0][0]), .rd_par_i(mrdp[0][0][0]), .xfer_valid_o(xv),
    .xfer_data_o(xd), .xfer_id_o(xid), .xfer_ready_i(xr), .err_o(err), .busy_o(busy));
  trim_dram_model #(.N_RANK(1), .N_CHIP(1)) u_dram (.clk, .rst_n, .cmd_i(mcmd), .rd_valid_o(mrdv),
    .rd_data_o(mrdd), .rd_par_o(mrdp));
  always_comb begin
    for (int g = 0; g < N_BG; g++) mcmd[0][0][g] = '0;
    mcmd[0][0][0] = dcmd;
  end

  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  always @(posedge clk) if (!rst_n) now <= '0; else now <= now + 16'd1;
  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("cycle %0d: %s", cyc, s);
    end
  endtask
  initial begin
    repeat (300000) @(posedge clk);
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // work list and expected rows
  cinstr_t  wl [$];
  cinstr_t  lq [NB][$], xq [NB][$];
  real      expv [NB][N_GNR][NRD][LANES];
  real      wtab [4] = '{0.5, 1.0, 2.0, -1.0};
  int       n_full = 0, n_bp = 0, n_err = 0, n_overlap = 0, n_rows = 0;
  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < N_GNR; t++)
        for (int i = 0; i < NRD; i++)
          for (int l = 0; l < LANES; l++) expv[b][t][i][l] = 0.0;
      for (int j = 0; j < NLOOK; j++) begin
        cinstr_t c;
        int t, row, bank, col;
        real w;
        bit ws, bad;
        bad  = (b == 2 && j == 3);
        t    = j % N_GNR;
        row  = bad ? BAD : $urandom_range(0, 60000);
        bank = $urandom_range(0, 3);
        col  = 16 * NRD * $urandom_range(0, 64 / NRD - 1);
        ws   = bad || $urandom_range(0, 1);
        w    = bad ? 0.0 : (ws ? wtab[$urandom_range(0, 3)] : 1.0);
        c = '0;
        c.addr   = mk_addr(1'b0, 16'(row), 3'd0, 2'(bank), 10'(col));
        c.weight = to32(w);
        c.nrd    = 5'(NRD);
        c.tag    = 4'(t);
        c.opcode = ws ? OP_WSUM : OP_SUM;
        c.skew   = 6'($urandom_range(0, 20));
        c.vt     = (j == NLOOK - 1);
        lq[b].push_back(c);
        for (int i = 0; i < NRD; i++)
          for (int l = 0; l < LANES; l++)
            expv[b][t][i][l] += w * real'(u_dram.value(0, row, 0, bank, col + 16 * i, 0, l));
      end
      for (int t = 0; t < N_GNR; t++)
        for (int i = 0; i < NRD; i++) begin
          cinstr_t c;
          c = '0;
          c.opcode = OP_XFER;
          c.tag    = 4'(t);
          c.nrd    = 5'(i);
          c.skew   = {4'b0, (t == 0 && i == 0), 1'(b % 2)};
          c.vt     = (t == N_GNR - 1 && i == NRD - 1);
          xq[b].push_back(c);
        end
    end
    // batch k+1's lookups are interleaved with batch k's transfers (after the first)
    for (int j = 0; j < NLOOK; j++) wl.push_back(lq[0][j]);
    for (int b = 0; b < NB; b++) begin
      wl.push_back(xq[b].pop_front());
      while (xq[b].size() > 0 || (b + 1 < NB && lq[b+1].size() > 0)) begin
        if (b + 1 < NB && lq[b+1].size() > 0) wl.push_back(lq[b+1].pop_front());
        if (xq[b].size() > 0) wl.push_back(xq[b].pop_front());
      end
    end
  end

  // sender with credits
  int cred = 8;
  always @(negedge clk) begin
    civ = 0;
    ci  = '0;
    if (rst_n && wl.size() > 0) begin
      if (cred > 0) begin
        civ = 1;
        ci  = wl[0];
      end else n_full++;
    end
    xr = ($urandom_range(0, 3) != 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (civ) begin
      void'(wl.pop_front());
      cred--;
    end
    if (pop) cred++;
  end

  // checker
  int cb = 0, ct = 0, ci_row = 0;
  bit in_xfer = 0;
  always @(posedge clk) if (rst_n) begin
    if (err) n_err++;
    if (xv && !xr) n_bp++;
    if (dcmd.op == DC_RD && in_xfer) n_overlap++;
    if (xv && xr && cb < NB) begin
      in_xfer = 1;
      n_rows++;
      chk(xid.bg == 3'd0 && xid.tag == 2'(ct) && xid.row == 4'(ci_row), "transfer id");
      for (int l = 0; l < LANES; l++)
        chk(xd[32*l +: 32] == to32(expv[cb][ct][ci_row][l]),
            $sformatf("batch %0d tag %0d row %0d lane %0d: %h expected %h", cb, ct, ci_row, l, xd[32*l +: 32],
                      to32(expv[cb][ct][ci_row][l])));
      if (ci_row == NRD - 1) begin
        ci_row = 0;
        if (ct == N_GNR - 1) begin
          ct = 0;
          cb++;
          in_xfer = 0;
        end else ct++;
      end else ci_row++;
    end
  end

  initial begin
    u_dram.bad_row = BAD;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (cb == NB);
    repeat (100) @(posedge clk);
    chk(u_dram.errors == 0, "DRAM timing violations");
    chk(n_rows == NB * N_GNR * NRD, "all rows transferred");
    chk(cred == 8 && !busy, "credits returned and IPR idle");
    chk(n_full > 0 && n_bp > 0 && n_overlap > 0 && n_err == NRD, "queue-full, back-pressure, overlap and DED all happened");
    $display("rows %0d, queue-full cycles %0d, back-pressure %0d, overlapped reads %0d, DED errors %0d",
             n_rows, n_full, n_bp, n_overlap, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
