// mvid_iv_sram: input-vector SRAM of one MV-bank (1,600 x 12 bit).
//
// The input vector is written once per MV-mul by the WR-iv broadcast, 16 elements
// per burst starting at an element address, and then read at 16 independent
// addresses per read of the weight matrix (one per MAC). Reads are synchronous:
// the data of the addresses presented in one cycle appear in the next. The document
// realises the 16 reads per tCCD with two 2-port SRAMs cycled at 1.25 ns; this
// model is a register array with 16 read ports, which has the same behaviour at the
// pipeline's clock. Contents are not reset.
module mvid_iv_sram
  import mvid_pkg::*;
#(
  parameter int unsigned DEPTH = IV_DEPTH,
  parameter int unsigned W     = DATA_W,
  parameter int unsigned NRD   = N_PAIRS,
  parameter int unsigned NWR   = N_PAIRS,
  parameter int unsigned AW    = COL_W
) (
  input  logic                    clk,
  input  logic                    we_i,
  input  logic [AW-1:0]           waddr_i,   // first element of the burst
  input  logic [NWR-1:0][W-1:0]   wdata_i,
  input  logic [NRD-1:0][AW-1:0]  raddr_i,
  output logic [NRD-1:0][W-1:0]   rdata_o
);
  logic [W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we_i)
      for (int k = 0; k < NWR; k++)
        if (32'(waddr_i) + k < DEPTH) mem[32'(waddr_i) + k] <= wdata_i[k];
    for (int k = 0; k < NRD; k++)
      rdata_o[k] <= (32'(raddr_i[k]) < DEPTH) ? mem[raddr_i[k]] : '0;
  end

endmodule
