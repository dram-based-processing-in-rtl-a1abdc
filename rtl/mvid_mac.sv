// mvid_mac: one of the sixteen MAC units of an MV-bank.
//
// Accumulates weight x input-element products of one matrix row. Operands are
// 12-bit two's complement (the quantised format the document settles on); the
// partial sum is 24 bits, the width of an output-vector entry, and wraps. With
// en_i the unit adds the product of this cycle; with clr_i as well it starts a new
// row from that product. Reset clears the partial sum.
module mvid_mac
  import mvid_pkg::*;
#(
  parameter int unsigned DW = DATA_W,
  parameter int unsigned AW = ACC_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en_i,
  input  logic                 clr_i,
  input  logic signed [DW-1:0] w_i,
  input  logic signed [DW-1:0] x_i,
  output logic signed [AW-1:0] acc_o
);
  logic signed [2*DW-1:0] prod;
  assign prod = w_i * x_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    acc_o <= '0;
    else if (en_i) acc_o <= (clr_i ? AW'(0) : acc_o) + AW'(prod);
    else if (clr_i) acc_o <= '0;
  end

endmodule
