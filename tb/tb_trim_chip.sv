// tb_trim_chip: self-checking test of one TRiM-G DRAM chip (C/A deserializer, eight
// IPRs and the response arbiter) against a behavioural DRAM chip (trim_dram_model,
// one rank of one chip, tCL = 40).
//
// The testbench plays the buffer chip: it serializes each 85-bit C-instr into seven
// 14-bit C/A beats, least significant beat first, and sends a C-instr only while it
// holds a credit for the target bank-group's queue (depth 8, one credit back per
// ci_pop_o bit). NB batches are sent; each holds NLOOK lookups to random bank-groups
// and banks over the four batch-tags, followed by the transfer C-instrs that ship every
// partial-sum row of every bank-group; the lookups of batch k+1 are interleaved with
// the transfers of batch k. Checks: every returned row equals the fp32 sum (or weighted
// sum) of its bank-group's lookups computed here from the DRAM model's element
// function; rows of each bank-group arrive in order with the right id; one lookup
// reads a corrupted row and must raise err_o on each burst; DRAM timing is checked by
// the model. Counted and required: credit stalls, an IPR response held back by the
// arbiter, overlapped lookups and DED errors.
module tb_trim_chip;
  import trim_pkg::*;
  import tb_fp_pkg::*;
  localparam int NB = 3, NLOOK = 96, NRD = 8, BAD = 65000;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] now;
  logic              cav, rv, err, busy;
  logic [CA_W-1:0]   ca;
  logic [N_BG-1:0]   pop;
  dram_cmd_t         mcmd [1][1][N_BG];
  logic [N_BG-1:0]    mrdv [1][1];
  logic [BURST_W-1:0] mrdd [1][1][N_BG];
  logic [PAR_W-1:0]   mrdp [1][1][N_BG];
  logic [BURST_W-1:0] rd;
  xfer_id_t    rid;

  trim_chip dut (.clk, .rst_n, .now_i(now), .ca_valid_i(cav), .ca_i(ca), .ci_pop_o(pop), .dram_cmd_o(mcmd[0][0]),
    .rd_valid_i(mrdv[0][0]), .rd_data_i(mrdd[0][0]), .rd_par_i(mrdp[0][0]), .resp_valid_o(rv),
    .resp_data_o(rd), .resp_id_o(rid), .err_o(err), .busy_o(busy));
  trim_dram_model #(.N_RANK(1), .N_CHIP(1)) u_dram (.clk, .rst_n, .cmd_i(mcmd), .rd_valid_o(mrdv),
    .rd_data_o(mrdd), .rd_par_o(mrdp));

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
    repeat (400000) @(posedge clk);
    chk(0, "watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // work list and expected rows
  cinstr_t  wl [$];
  cinstr_t  lq [NB][$], xq [NB][$];
  real      expv [NB][N_BG][N_GNR][NRD][LANES];
  real      wtab [4] = '{0.5, 1.0, 2.0, -1.0};
  int       n_full = 0, n_arb = 0, n_err = 0, n_overlap = 0, n_rows = 0;
  initial begin
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < N_GNR; t++)
        for (int i = 0; i < NRD; i++)
          for (int l = 0; l < LANES; l++)
            for (int g = 0; g < N_BG; g++) expv[b][g][t][i][l] = 0.0;
      for (int j = 0; j < NLOOK; j++) begin
        cinstr_t c;
        int t, row, bank, col, bg;
        real w;
        bit ws, bad;
        bad  = (b == 2 && j == 3);
        t    = j % N_GNR;
        row  = bad ? BAD : $urandom_range(0, 60000);
        bank = $urandom_range(0, 3);
        bg   = (j % 3 == 0) ? 2 : $urandom_range(0, N_BG - 1);
        col  = 16 * NRD * $urandom_range(0, 64 / NRD - 1);
        ws   = bad || $urandom_range(0, 1);
        w    = bad ? 0.0 : (ws ? wtab[$urandom_range(0, 3)] : 1.0);
        c = '0;
        c.addr   = mk_addr(1'b0, 16'(row), 3'(bg), 2'(bank), 10'(col));
        c.weight = to32(w);
        c.nrd    = 5'(NRD);
        c.tag    = 4'(t);
        c.opcode = ws ? OP_WSUM : OP_SUM;
        c.skew   = 6'($urandom_range(0, 20));
        c.vt     = (j == NLOOK - 1);
        lq[b].push_back(c);
        for (int i = 0; i < NRD; i++)
          for (int l = 0; l < LANES; l++)
            expv[b][bg][t][i][l] += w * real'(u_dram.value(0, row, bg, bank, col + 16 * i, 0, l));
      end
      for (int t = 0; t < N_GNR; t++)
        for (int i = 0; i < NRD; i++)
          for (int g = 0; g < N_BG; g++) begin
          cinstr_t c;
          c = '0;
          c.addr   = mk_addr(1'b0, 16'd0, 3'(g), 2'd0, 10'd0);
          c.opcode = OP_XFER;
          c.tag    = 4'(t);
          c.nrd    = 5'(i);
          c.skew   = {4'b0, (t == 0 && i == 0), 1'(b % 2)};
          c.vt     = (t == N_GNR - 1 && i == NRD - 1);
          xq[b].push_back(c);
        end
    end
    // batch k+1's lookups are interleaved with batch k's transfers (after the firsts)
    for (int j = 0; j < NLOOK; j++) wl.push_back(lq[0][j]);
    for (int b = 0; b < NB; b++) begin
      for (int g = 0; g < N_BG; g++) wl.push_back(xq[b].pop_front());   // the firsts
      while (xq[b].size() > 0 || (b + 1 < NB && lq[b+1].size() > 0)) begin
        if (b + 1 < NB && lq[b+1].size() > 0) wl.push_back(lq[b+1].pop_front());
        if (xq[b].size() > 0) wl.push_back(xq[b].pop_front());
      end
    end
  end

  // serializer with per-bank-group credits
  int cred [N_BG];
  int n_cstall = 0;
  initial begin
    for (int g = 0; g < N_BG; g++) cred[g] = 8;
    cav = 0;
    ca  = '0;
    @(posedge rst_n);
    while (wl.size() > 0) begin
      logic [CA_BEATS*CA_W-1:0] sh;
      int g;
      @(negedge clk);
      g = int'(a_bg(wl[0].addr));
      if (cred[g] == 0) begin
        n_cstall++;
        continue;
      end
      cred[g]--;
      sh = (CA_BEATS*CA_W)'(wl.pop_front());
      for (int k = 0; k < CA_BEATS; k++) begin
        cav = 1;
        ca  = sh[CA_W*k +: CA_W];
        @(negedge clk);
      end
      cav = 0;
    end
  end
  always @(posedge clk) if (rst_n) for (int g = 0; g < N_BG; g++) if (pop[g]) cred[g]++;

  // checker: rows of each bank-group in order
  int cb [N_BG], ct [N_BG], cr [N_BG];
  initial for (int g = 0; g < N_BG; g++) begin cb[g] = 0; ct[g] = 0; cr[g] = 0; end
  int done_bg = 0;
  bit in_xfer = 0;
  always @(posedge clk) if (rst_n) begin
    if (err) n_err++;
    if ((dut.xv & ~dut.xr) != 0) n_arb++;
    if (mcmd[0][0][2].op == DC_RD && cb[2] < NB && (ct[2] != 0 || cr[2] != 0)) n_overlap++;
    if (rv) begin
      int g;
      g = int'(rid.bg);
      n_rows++;
      if (cb[g] >= NB) chk(0, "extra row");
      else begin
        chk(rid.tag == 2'(ct[g]) && rid.row == 4'(cr[g]), $sformatf("bank-group %0d: id", g));
        for (int l = 0; l < LANES; l++)
          chk(rd[32*l +: 32] == to32(expv[cb[g]][g][ct[g]][cr[g]][l]),
              $sformatf("batch %0d bg %0d tag %0d row %0d lane %0d: %h expected %h", cb[g], g, ct[g], cr[g], l,
                        rd[32*l +: 32], to32(expv[cb[g]][g][ct[g]][cr[g]][l])));
        if (cr[g] == NRD - 1) begin
          cr[g] = 0;
          if (ct[g] == N_GNR - 1) begin
            ct[g] = 0;
            cb[g]++;
            if (cb[g] == NB) done_bg++;
          end else ct[g]++;
        end else cr[g]++;
      end
    end
  end

  initial begin
    u_dram.bad_row = BAD;
    repeat (3) @(negedge clk);
    rst_n = 1;
    wait (done_bg == N_BG);
    repeat (100) @(posedge clk);
    chk(u_dram.errors == 0, "DRAM timing violations");
    chk(n_rows == NB * N_BG * N_GNR * NRD, "all rows transferred");
    for (int g = 0; g < N_BG; g++) chk(cred[g] == 8, "credits returned");
    chk(!busy, "chip idle");
    chk(n_cstall > 0 && n_arb > 0 && n_overlap > 0 && n_err == NRD, "queue-full, back-pressure, overlap and DED all happened");
    $display("rows %0d, credit stalls %0d, arbitration conflicts %0d, overlapped reads %0d, DED errors %0d",
             n_rows, n_cstall, n_arb, n_overlap, n_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
