// trim_dram_model: behavioural model of the DRAM banks behind a TRiM-G DIMM, for
// the testbenches (the real arrays are analog macros).
//
// For every (rank, chip, bank-group) it tracks the four banks' state and checks
// tRCD, tRAS, tRP, tCCD_L and tRRD_L of the commands the IPRs send, counting
// violations in `errors`. A RD returns, T_CL cycles later, four fp32 lanes whose
// values are small integers given by value() (so that sums are exact), with the
// 8 stored parity bits of the (136,128) Hamming code. Reads of DRAM row bad_row
// come back with one data bit flipped (the stored parity is the clean one).
module trim_dram_model
  import trim_pkg::*;
  import tb_fp_pkg::*;
#(
  parameter int N_RANK  = 2,
  parameter int N_CHIP  = 4,
  parameter int T_CL    = 40,
  parameter int T_RCD   = 40,
  parameter int T_RAS   = 77,
  parameter int T_RP    = 40,
  parameter int T_CCD_L = 12,
  parameter int T_RRD_L = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  dram_cmd_t          cmd_i      [N_RANK][N_CHIP][N_BG],
  output logic [N_BG-1:0]    rd_valid_o [N_RANK][N_CHIP],
  output logic [BURST_W-1:0] rd_data_o  [N_RANK][N_CHIP][N_BG],
  output logic [PAR_W-1:0]   rd_par_o   [N_RANK][N_CHIP][N_BG]
);
  int errors = 0, acts = 0, rds = 0, pres = 0;
  int bad_row = -1;
  int cyc = 0;

  // element value of the embedding tables: a small integer
  function automatic int value(input int rank, input int row, input int bg, input int bank,
                               input int col, input int chip, input int lane);
    return ((row * 7 + bg * 3 + bank * 5 + col + chip * 11 + lane * 13 + rank * 17) % 31) - 15;
  endfunction

  function automatic logic [7:0] hpar(input logic [127:0] x);
    logic [7:0] r;
    int n;
    r = '0;
    n = 0;
    for (int q = 1; q <= 136; q++)
      if ((q & (q - 1)) != 0) begin
        for (int i = 0; i < 8; i++) if (q[i]) r[i] ^= x[n];
        n++;
      end
    return r;
  endfunction

  bit  open_b [N_RANK][N_CHIP][N_BG][N_BANK];
  int  orow   [N_RANK][N_CHIP][N_BG][N_BANK];
  int  t_act  [N_RANK][N_CHIP][N_BG][N_BANK];
  int  t_pre  [N_RANK][N_CHIP][N_BG][N_BANK];
  int  t_rd   [N_RANK][N_CHIP][N_BG];
  int  t_aa   [N_RANK][N_CHIP][N_BG];
  typedef struct { int due; int r; int c; int g; logic [127:0] d; logic [7:0] p; } pend_t;
  pend_t pend [$];

  function automatic void err(input string s);
    errors++;
    if (errors < 6) $display("trim dram model, cycle %0d: %s", cyc, s);
  endfunction

  initial begin
    for (int r = 0; r < N_RANK; r++)
      for (int c = 0; c < N_CHIP; c++)
        for (int g = 0; g < N_BG; g++) begin
          t_rd[r][c][g] = -1000;
          t_aa[r][c][g] = -1000;
          rd_valid_o[r][c] = '0;
          rd_data_o[r][c][g] = '0;
          rd_par_o[r][c][g] = '0;
          for (int b = 0; b < N_BANK; b++) begin
            open_b[r][c][g][b] = 0; orow[r][c][g][b] = 0;
            t_act[r][c][g][b] = -1000; t_pre[r][c][g][b] = -1000;
          end
        end
  end

  always @(posedge clk) begin
    cyc++;
    for (int r = 0; r < N_RANK; r++)
      for (int c = 0; c < N_CHIP; c++) rd_valid_o[r][c] <= '0;
    while (pend.size() > 0 && pend[0].due <= cyc) begin
      rd_valid_o[pend[0].r][pend[0].c][pend[0].g] <= 1'b1;
      rd_data_o[pend[0].r][pend[0].c][pend[0].g]  <= pend[0].d;
      rd_par_o[pend[0].r][pend[0].c][pend[0].g]   <= pend[0].p;
      void'(pend.pop_front());
    end
    if (rst_n)
      for (int r = 0; r < N_RANK; r++)
        for (int c = 0; c < N_CHIP; c++)
          for (int g = 0; g < N_BG; g++) begin
            dram_cmd_t k;
            int b;
            k = cmd_i[r][c][g];
            b = int'(k.bank);
            case (k.op)
              DC_ACT: begin
                if (open_b[r][c][g][b] || cyc - t_pre[r][c][g][b] < T_RP || cyc - t_aa[r][c][g] < T_RRD_L)
                  err($sformatf("ACT r%0d c%0d g%0d b%0d", r, c, g, b));
                open_b[r][c][g][b] = 1; orow[r][c][g][b] = int'(k.row);
                t_act[r][c][g][b] = cyc; t_aa[r][c][g] = cyc;
                acts++;
              end
              DC_RD: begin
                pend_t p;
                if (!open_b[r][c][g][b] || cyc - t_act[r][c][g][b] < T_RCD || cyc - t_rd[r][c][g] < T_CCD_L)
                  err($sformatf("RD r%0d c%0d g%0d b%0d", r, c, g, b));
                t_rd[r][c][g] = cyc;
                rds++;
                p.due = cyc + T_CL; p.r = r; p.c = c; p.g = g;
                for (int l = 0; l < LANES; l++)
                  p.d[32*l +: 32] = to32(real'(value(r, orow[r][c][g][b], g, b, int'(k.col), c, l)));
                p.p = hpar(p.d);
                if (orow[r][c][g][b] == bad_row) p.d[5] = ~p.d[5];
                pend.push_back(p);
              end
              DC_PRE: begin
                if (!open_b[r][c][g][b] || cyc - t_act[r][c][g][b] < T_RAS)
                  err($sformatf("PRE r%0d c%0d g%0d b%0d", r, c, g, b));
                open_b[r][c][g][b] = 0; t_pre[r][c][g][b] = cyc;
                pres++;
              end
              default: ;
            endcase
          end
  end
endmodule
