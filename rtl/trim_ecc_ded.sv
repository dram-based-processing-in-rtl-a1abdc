// trim_ecc_ded: error detection for reads made by an IPR, reusing the DDR5
// on-die ECC.
//
// The on-die code is a single-error-correcting Hamming code; its minimum distance
// of 3 lets it detect every 1- and 2-bit error when nothing is corrected, which is
// enough because GnR only reads the embedding tables. The parity of the 128 data
// bits is recomputed as on a write and compared with the 8 stored parity bits; a
// mismatch raises err_o (the table entry is then reloaded by software). The code
// itself is this design's: the (136,128) Hamming code with parity bits at the
// power-of-two positions 1..128 and data bits, in order, at the other positions
// 3..136; parity bit i covers the positions whose binary index has bit i set.
// Combinational.
module trim_ecc_ded #(
  parameter int unsigned DW = 128,
  parameter int unsigned PW = 8
) (
  input  logic [DW-1:0] data_i,
  input  logic [PW-1:0] par_i,
  output logic [PW-1:0] par_o,
  output logic          err_o
);
  // data bits covered by parity bit i: data bit k sits at the k-th codeword position
  // (1-based) that is not a power of two; parity bit i covers the positions with bit i set
  function automatic logic [DW-1:0] pmask(input int unsigned i);
    logic [DW-1:0] m;
    int unsigned   n;
    m = '0;
    n = 0;
    for (int unsigned q = 1; q <= DW + PW; q++) begin
      if ((q & (q - 1)) != 0) begin
        if (((q >> i) & 1) != 0 && n < DW) m[n] = 1'b1;
        n++;
      end
    end
    return m;
  endfunction

  for (genvar i = 0; i < PW; i++) begin : g_par
    localparam logic [DW-1:0] M = pmask(i);
    assign par_o[i] = ^(data_i & M);
  end
  assign err_o = (par_o != par_i);

endmodule
