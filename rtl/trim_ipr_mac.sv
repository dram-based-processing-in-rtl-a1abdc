// trim_ipr_mac: one of the four 32-bit floating-point MAC units of an IPR.
//
// y = acc + data            (opcode SUM, element-wise sum as in SparseLengthsSum)
// y = acc + weight x data   (opcode WSUM, weighted sum; weight from the C-instr)
// The multiply and the add are separately rounded IEEE single-precision
// operations (a fused multiply-add is not asked for by the document).
// Combinational; the IPR registers the result into its partial-sum register file.
module trim_ipr_mac (
  input  logic [31:0] acc_i,
  input  logic [31:0] data_i,
  input  logic [31:0] weight_i,
  input  logic        wsum_i,
  output logic [31:0] y_o
);
  logic [31:0] prod, addend;

  trim_fp32_mul u_mul (.a_i(weight_i), .b_i(data_i), .y_o(prod));
  assign addend = wsum_i ? prod : data_i;
  trim_fp32_add u_add (.a_i(acc_i), .b_i(addend), .y_o(y_o));

endmodule
