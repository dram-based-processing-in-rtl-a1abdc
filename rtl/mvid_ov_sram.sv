// mvid_ov_sram: output-vector SRAM of one MV-bank (400 x 24 bit).
//
// The adder tree writes one entry at the end of every matrix row, at the row number
// carried by the end-of-row pair; RD-ov reads it back. One synchronous write port
// and one synchronous read port (read data one cycle after the address). Contents
// are not reset.
module mvid_ov_sram
  import mvid_pkg::*;
#(
  parameter int unsigned DEPTH = OV_DEPTH,
  parameter int unsigned W     = ACC_W,
  parameter int unsigned AW    = OVA_W
) (
  input  logic          clk,
  input  logic          we_i,
  input  logic [AW-1:0] waddr_i,
  input  logic [W-1:0]  wdata_i,
  input  logic [AW-1:0] raddr_i,
  output logic [W-1:0]  rdata_o
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i && 32'(waddr_i) < DEPTH) mem[waddr_i] <= wdata_i;
    rdata_o <= (32'(raddr_i) < DEPTH) ? mem[raddr_i] : '0;
  end

endmodule
