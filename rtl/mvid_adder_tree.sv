// mvid_adder_tree: sums the partial sums of the sixteen MAC units of an MV-bank
// into one output-vector element. A balanced binary tree (log2 N levels),
// combinational; in the bank pipeline it fills the output-storing stage, one cycle
// (the document gives it 5 ns, one tCCD). Sums wrap at W bits.
module mvid_adder_tree
  import mvid_pkg::*;
#(
  parameter int unsigned N = N_PAIRS,   // power of two
  parameter int unsigned W = ACC_W
) (
  input  logic [N-1:0][W-1:0] in_i,
  output logic [W-1:0]        sum_o
);
  localparam int unsigned LV = $clog2(N);
  logic [LV:0][N-1:0][W-1:0] lvl;

  always_comb begin
    lvl = '0;
    lvl[0] = in_i;
    for (int l = 0; l < LV; l++)
      for (int k = 0; k < (N >> (l + 1)); k++)
        lvl[l+1][k] = lvl[l][2*k] + lvl[l][2*k+1];
    sum_o = lvl[LV][0];
  end

endmodule
