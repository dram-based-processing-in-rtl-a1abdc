// mvid_pkg: types and constants shared by the MViD (matrix-vector multiplication
// in mobile DRAM) blocks.
//
// MViD puts sixteen 12x12-bit MAC units, an input-vector SRAM and an output-vector
// SRAM next to the global-I/O sense amplifiers of four banks per LPDDR4 channel
// (the MV-banks). A weight matrix is stored in the MV-banks in a delta-encoded
// sparse format: 16 (12-bit data, 4-bit index) pairs per 256-bit DRAM read, where
// the index is the column distance to the previous non-zero minus one and the
// index value 0xF marks the end of a matrix row (its data field then holds the row
// number). All sizes below are the document's; the command encodings are this
// design's own modelling of the LPDDR4 command set with its reserved-for-future-use
// (RFU) commands, decoded to one command per clock.
package mvid_pkg;

  localparam int unsigned RD_BITS    = 256;  // one LPDDR4 read burst at the GIO SAs
  localparam int unsigned N_PAIRS    = 16;   // (data, index) pairs per read
  localparam int unsigned DATA_W     = 12;   // quantised weight / vector element
  localparam int unsigned IDX_W      = 4;    // delta index
  localparam int unsigned ACC_W      = 24;   // output element (ov-SRAM width)
  localparam int unsigned IV_DEPTH   = 1600; // input-vector entries
  localparam int unsigned OV_DEPTH   = 400;  // output-vector entries per MV-bank
  localparam int unsigned COL_W      = 11;   // input-vector address
  localparam int unsigned OVA_W      = 9;    // output-vector address
  localparam int unsigned ROW_W      = 16;   // DRAM row address
  localparam int unsigned DCOL_W     = 6;    // 256-bit column within a 2 KB page
  localparam int unsigned N_BANKS    = 8;    // banks per channel
  localparam int unsigned N_MVB      = 4;    // MV-banks per channel
  localparam int unsigned OV_PER_RD  = 10;   // 24-bit ov entries returned by one RD-ov
  localparam logic [IDX_W-1:0] EOR_IDX = '1; // end-of-row index value

  // Commands seen by one bank (cell array side).
  typedef enum logic [2:0] {
    BC_NOP = 3'd0,
    BC_ACT = 3'd1,
    BC_RD  = 3'd2,
    BC_WR  = 3'd3,
    BC_PRE = 3'd4
  } bank_op_e;

  typedef struct packed {
    bank_op_e              op;
    logic [ROW_W-1:0]      row;
    logic [DCOL_W-1:0]     col;
  } bank_cmd_t;

  // Commands arriving from the memory controller, after CA decoding.
  typedef enum logic [3:0] {
    HC_NOP  = 4'd0,
    HC_ACT  = 4'd1,
    HC_RD   = 4'd2,
    HC_WR   = 4'd3,
    HC_PRE  = 4'd4,
    HC_PPRE = 4'd5,   // pause PRE: pause the target MV-bank
    HC_SPRE = 4'd6,   // speed-up PRE: leave slow-down, then precharge the bank
    HC_RPRE = 4'd7,   // resume PRE: precharge, then the MV-bank resumes MV-mul
    HC_WRIV = 4'd8,   // write 16 input-vector elements to every iv-SRAM
    HC_RDOV = 4'd9,   // poll MV-mul status or read 10 output-vector elements
    HC_CFG  = 4'd10   // MV-mul start row and length of one MV-bank
  } host_op_e;

  typedef struct packed {
    host_op_e             op;
    logic [2:0]           bank;   // target bank (0..7)
    logic [ROW_W-1:0]     row;    // ACT row / CFG start row
    logic [DCOL_W-1:0]    col;    // RD/WR column
    logic [15:0]          arg;    // CFG: number of reads; WRIV/RDOV: element address
    logic                 flag;   // WRIV: last burst (starts MV-mul); RDOV: 1 = poll
    logic [RD_BITS-1:0]   wdata;  // WRIV: 16 elements in 16-bit lanes (low 12 bits used)
  } host_cmd_t;

  localparam logic [RD_BITS-1:0] RDOV_DONE = '1;  // poll answer: MV-mul over
  localparam logic [RD_BITS-1:0] RDOV_BUSY = '0;  // poll answer: still running

  typedef struct packed {
    logic               valid;
    logic [RD_BITS-1:0] data;
  } rdov_rsp_t;

endpackage
