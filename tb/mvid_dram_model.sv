// mvid_dram_model: behavioural model of the eight banks of an LPDDR4 channel, for
// the MViD testbenches (not synthesizable; the real arrays are analog macros).
//
// Each bank follows ACT / RD / WR / PRE and flags timing or state violations
// (ACT to an open bank or before tRP, RD/WR to a closed bank or before tRCD, PRE
// before tRAS) in `errors`. A RD to one of the four MV-banks returns the stored
// 256-bit word (put() fills them; unwritten words read as end-of-row padding)
// on that MV-bank's read port RL cycles later. `acts` counts ACTs per bank.
module mvid_dram_model
  import mvid_pkg::*;
#(
  parameter int MVB_BASE = 2,
  parameter int RL       = 10,
  parameter int T_RCD    = 29,
  parameter int T_RAS    = 68,
  parameter int T_RP     = 29
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  bank_cmd_t [N_BANKS-1:0]       cmd_i,
  output logic [N_MVB-1:0]              rd_valid_o,
  output logic [N_MVB-1:0][RD_BITS-1:0] rd_data_o
);
  logic [RD_BITS-1:0] mem [N_MVB][int];
  int  errors = 0;
  int  acts [N_BANKS];
  int  rds  [N_BANKS];
  bit  open_b [N_BANKS];
  int  t_act [N_BANKS], t_pre [N_BANKS];
  int  cyc = 0;
  typedef struct { int due; int b; logic [RD_BITS-1:0] d; } pend_t;
  pend_t pend [$];

  function automatic int key(input int row, input int col);
    return row * 64 + col;
  endfunction
  function automatic void put(input int mvb, input int row, input int col, input logic [RD_BITS-1:0] d);
    mem[mvb][key(row, col)] = d;
  endfunction
  function automatic void err(input string s);
    errors++;
    if (errors < 5) $display("dram model, cycle %0d: %s", cyc, s);
  endfunction

  initial begin
    for (int b = 0; b < N_BANKS; b++) begin
      acts[b] = 0; rds[b] = 0; open_b[b] = 0; t_act[b] = -1000; t_pre[b] = -1000;
    end
  end

  always @(posedge clk) begin
    cyc++;
    rd_valid_o <= '0;
    while (pend.size() > 0 && pend[0].due <= cyc) begin
      rd_valid_o[pend[0].b] <= 1'b1;
      rd_data_o[pend[0].b]  <= pend[0].d;
      void'(pend.pop_front());
    end
    if (rst_n)
      for (int b = 0; b < N_BANKS; b++) begin
        case (cmd_i[b].op)
          BC_ACT: begin
            if (open_b[b] || cyc - t_pre[b] < T_RP) err($sformatf("ACT bank %0d", b));
            open_b[b] = 1; t_act[b] = cyc; acts[b]++;
          end
          BC_RD, BC_WR: begin
            if (!open_b[b] || cyc - t_act[b] < T_RCD) err($sformatf("RD/WR bank %0d", b));
            rds[b]++;
            if (cmd_i[b].op == BC_RD && b >= MVB_BASE && b < MVB_BASE + N_MVB) begin
              pend_t p;
              int m;
              m = b - MVB_BASE;
              p.due = cyc + RL;
              p.b = m;
              p.d = mem[m].exists(key(int'(cmd_i[b].row), int'(cmd_i[b].col))) ?
                    mem[m][key(int'(cmd_i[b].row), int'(cmd_i[b].col))] : {N_PAIRS{16'h000F}};
              pend.push_back(p);
            end
          end
          BC_PRE: begin
            if (open_b[b] && cyc - t_act[b] < T_RAS) err($sformatf("PRE bank %0d", b));
            open_b[b] = 0; t_pre[b] = cyc;
          end
          default: ;
        endcase
      end
  end
  initial begin
    rd_valid_o = '0;
    rd_data_o  = '0;
  end
endmodule
