// trim_host_model: the host side of a TRiM-G DIMM in the testbenches - the run-time
// and memory-controller part that builds C-instrs, and the checker.
//
// It generates NB batches of gather-and-reduce work: each batch has N_GNR
// operations (batch-tags), each of NLOOK lookups of vectors of NRD x 16 fp32
// elements (NRD reads per chip), spread at random over ranks, bank-groups, banks,
// rows and columns, with a small random skewed-cycle and either plain sums or
// weighted sums (weights 0.5, 1, 2, -1, 3, so all sums stay exact). Every other
// lookup goes to rank 0, bank-group 0, so that IPR's queue fills up. The last
// lookup of a batch carries the vector-transfer bit. C-instrs go out in frames of
// up to 7. Batch 1 has one zero-weight lookup of DRAM row BAD_ROW, whose reads the
// DRAM model corrupts, so the DED check must fire without changing the result.
// The reduced rows coming back are compared with sums the checker computes from
// the DRAM model's value() function. done goes high when all batches are checked.
module trim_host_model
  import trim_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int N_RANK  = 2,
  parameter int N_CHIP  = 4,
  parameter int NB      = 3,
  parameter int NLOOK   = 8,
  parameter int NRD     = 4,
  parameter int BAD_ROW = 65000
) (
  input  logic                       clk,
  input  logic                       rst_n,
  output logic                       frame_valid_o,
  output cinstr_t                    frame_o [FRAME],
  output logic [2:0]                 frame_n_o,
  input  logic                       frame_ready_i,
  input  logic                       out_valid_i,
  input  logic [1:0]                 out_tag_i,
  input  logic [3:0]                 out_row_i,
  input  logic [N_CHIP*BURST_W-1:0]  out_data_i,
  input  logic                       out_last_i,
  input  logic                       err_i,
  output logic                       done_o
);
  int checks = 0, failures = 0;
  int n_frames = 0, n_frame_stall = 0, n_err = 0, n_rows = 0, n_wsum = 0, n_sum = 0;
  localparam int NL = N_CHIP * LANES;

  // same element function as trim_dram_model
  function automatic int value(input int rank, input int row, input int bg, input int bank,
                               input int col, input int chip, input int lane);
    return ((row * 7 + bg * 3 + bank * 5 + col + chip * 11 + lane * 13 + rank * 17) % 31) - 15;
  endfunction

  cinstr_t ci [$];
  real     expv [NB][N_GNR][16][NL];
  real     wtab [5] = '{0.5, 1.0, 2.0, -1.0, 3.0};

  task automatic chk(input bit ok, input string s);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 8) $display("trim host: %s", s);
    end
  endtask

  initial begin
    frame_valid_o = 0;
    frame_n_o = '0;
    done_o = 0;
    for (int k = 0; k < FRAME; k++) frame_o[k] = '0;
    // build the work
    for (int b = 0; b < NB; b++) begin
      for (int t = 0; t < N_GNR; t++)
        for (int i = 0; i < 16; i++)
          for (int e = 0; e < NL; e++) expv[b][t][i][e] = 0.0;
      for (int t = 0; t < N_GNR; t++)
        for (int j = 0; j < NLOOK; j++) begin
          cinstr_t c;
          int rank, row, bg, bank, col;
          real w;
          bit ws, bad;
          bad  = (b == 1 && t == 2 && j == 0);
          // half of the lookups crowd into rank 0, bank-group 0, to fill its IPR queue
          rank = (j % 2 == 0) ? 0 : $urandom_range(0, N_RANK - 1);
          row  = bad ? BAD_ROW : $urandom_range(0, 60000);
          bg   = (j % 2 == 0) ? 0 : $urandom_range(0, N_BG - 1);
          bank = $urandom_range(0, N_BANK - 1);
          col  = 16 * NRD * $urandom_range(0, 64 / NRD - 1);
          ws   = bad || ($urandom_range(0, 1) == 1);
          w    = bad ? 0.0 : (ws ? wtab[$urandom_range(0, 4)] : 1.0);
          if (ws) n_wsum++; else n_sum++;
          c = '0;
          c.addr   = mk_addr(1'(rank), 16'(row), 3'(bg), 2'(bank), 10'(col));
          c.weight = to32(w);
          c.nrd    = 5'(NRD);
          c.tag    = 4'(t);
          c.opcode = ws ? OP_WSUM : OP_SUM;
          c.skew   = 6'($urandom_range(0, 12));
          c.vt     = (t == N_GNR - 1 && j == NLOOK - 1);
          ci.push_back(c);
          for (int i = 0; i < NRD; i++)
            for (int e = 0; e < NL; e++)
              expv[b][t][i][e] += w * real'(value(rank, row, bg, bank, col + 16 * i, e / LANES, e % LANES));
        end
    end
  end

  // frame sender
  initial begin
    @(posedge rst_n);
    while (ci.size() > 0) begin
      int n;
      @(negedge clk);
      n = (ci.size() < FRAME) ? ci.size() : $urandom_range(1, FRAME);
      frame_valid_o = 1;
      frame_n_o = 3'(n);
      for (int k = 0; k < FRAME; k++) frame_o[k] = (k < n) ? ci[k] : '0;
      @(posedge clk);
      while (!frame_ready_i) begin
        n_frame_stall++;
        @(posedge clk);
      end
      n_frames++;
      for (int k = 0; k < n; k++) void'(ci.pop_front());
      #1 frame_valid_o = 0;
    end
  end

  // result checker
  int cur_b = 0;
  always @(posedge clk) begin
    if (rst_n && err_i) n_err++;
    if (rst_n && out_valid_i && cur_b < NB) begin
      n_rows++;
      for (int e = 0; e < NL; e++) begin
        logic [31:0] ev;
        ev = (int'(out_row_i) < NRD) ? to32(expv[cur_b][out_tag_i][out_row_i][e]) : 32'h0;
        chk(out_data_i[32*e +: 32] == ev,
            $sformatf("batch %0d tag %0d row %0d lane %0d: %h expected %h", cur_b, out_tag_i, out_row_i, e,
                      out_data_i[32*e +: 32], ev));
      end
      if (out_last_i) begin
        cur_b++;
        if (cur_b == NB) done_o <= 1;
      end
    end
  end
endmodule
