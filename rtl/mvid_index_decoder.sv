// mvid_index_decoder: index-decoding stage of an MV-bank.
//
// One 256-bit DRAM read carries 16 (data, index) pairs of one matrix row (the
// Single-Row-per-Read mapping). Each index is the column distance to the previous
// non-zero minus one, so the absolute column of pair k is
//   col[k] = col_base + sum_{j<=k} (idx[j] + 1) - 1,
// where col_base is the column just after the previous non-zero of the row (0 at
// the start of a row). The sum is a parallel prefix sum (a 4-level Kogge-Stone
// scan over the 16 terms; the document names a 6-level prefix-sum unit without
// drawing it). A 4-bit compare finds the end-of-row index 0xF; pairs from it on do
// not feed the MACs, and its data field is the row number. Purely combinational:
// the surrounding pipeline registers it.
module mvid_index_decoder
  import mvid_pkg::*;
#(
  parameter int unsigned NP = N_PAIRS
) (
  input  logic [NP-1:0][IDX_W-1:0]  idx_i,
  input  logic [NP-1:0][DATA_W-1:0] data_i,
  input  logic [COL_W-1:0]          col_base_i,
  output logic [NP-1:0][COL_W-1:0]  col_o,
  output logic [NP-1:0]             use_o,       // pair is a weight of this row
  output logic                      eor_o,       // read holds the row end
  output logic [DATA_W-1:0]         row_o,       // row number from the end pair
  output logic [COL_W-1:0]          col_next_o   // col_base of the next read
);
  localparam int unsigned LV = $clog2(NP);

  logic [NP-1:0]            is_eor;
  logic [NP-1:0]            before_eor;
  logic [LV:0][NP-1:0][COL_W-1:0] scan;

  always_comb begin
    for (int k = 0; k < NP; k++) is_eor[k] = (idx_i[k] == EOR_IDX);
    use_o = before_eor;
    eor_o = |is_eor;
    row_o = '0;
    for (int k = NP - 1; k >= 0; k--) if (is_eor[k]) row_o = data_i[k];
  end

  // pair k is used when no end marker sits at or before it
  assign before_eor[0] = ~is_eor[0];
  for (genvar k = 1; k < NP; k++) begin : g_use
    assign before_eor[k] = before_eor[k-1] & ~is_eor[k];
  end

  // Kogge-Stone inclusive scan of (idx+1) for used pairs (0 after the end marker)
  for (genvar k = 0; k < NP; k++) begin : g_scan0
    assign scan[0][k] = before_eor[k] ? COL_W'(idx_i[k]) + COL_W'(1) : '0;
  end
  for (genvar l = 0; l < LV; l++) begin : g_lvl
    for (genvar k = 0; k < NP; k++) begin : g_k
      if (k >= (1 << l)) begin : g_add
        assign scan[l+1][k] = scan[l][k] + scan[l][k - (1 << l)];
      end else begin : g_pass
        assign scan[l+1][k] = scan[l][k];
      end
    end
  end

  always_comb begin
    for (int k = 0; k < NP; k++) col_o[k] = col_base_i + scan[LV][k] - COL_W'(1);
    col_next_o = col_base_i + scan[LV][NP-1];
  end

endmodule
