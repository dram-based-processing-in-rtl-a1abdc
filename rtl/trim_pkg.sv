// trim_pkg: types and constants of TRiM-G (tensor reduction in memory, one
// reduction unit per DDR5 bank-group).
//
// A C-instr is the 85-bit compressed command of one embedding-vector lookup: the
// ACT, the nRD reads and the PRE of that lookup, plus the reduction to apply. Its
// fields and widths are the document's; their order in the 85-bit word (the order
// they are listed in, most significant first) and the layout of the 34-bit
// target address are this design's. The transfer command that asks an IPR for one
// row of its partial sums (an RFU command in the document) reuses the 85-bit frame
// with opcode OP_XFER.
package trim_pkg;

  localparam int unsigned CI_W    = 85;   // C-instr bits
  localparam int unsigned CA_W    = 14;   // DDR5 C/A pins
  localparam int unsigned CA_BEATS = (CI_W + CA_W - 1) / CA_W;  // 7 beats per C-instr
  localparam int unsigned N_BG    = 8;    // bank-groups per chip
  localparam int unsigned N_BANK  = 4;    // banks per bank-group
  localparam int unsigned LANES   = 4;    // fp32 per 128-bit x8 BL16 burst = MACs per IPR
  localparam int unsigned BURST_W = 32 * LANES;
  localparam int unsigned PAR_W   = 8;    // on-die ECC parity per burst
  localparam int unsigned N_GNR   = 4;    // GnR operations per batch
  localparam int unsigned MAX_NRD = 16;   // reads per vector and chip (v_len 256)
  localparam int unsigned RF_ROWS = N_GNR * MAX_NRD;   // 64 x 128 bit = 1 KB
  localparam int unsigned FRAME   = 7;    // C-instrs per first-stage frame
  localparam int unsigned FRAME_CYC = 8;  // cycles per first-stage frame

  typedef enum logic [2:0] {
    OP_SUM  = 3'd0,   // element-wise sum
    OP_WSUM = 3'd1,   // weighted sum
    OP_XFER = 3'd7    // send one partial-sum row to the NPR
  } op_e;

  typedef struct packed {
    logic [33:0] addr;     // target address: {rank, row[15:0], bg[2:0], bank[1:0], col[9:0], 2'b00}
    logic [31:0] weight;   // fp32 weight for the weighted sum
    logic [4:0]  nrd;      // reads per vector (XFER: partial-sum row)
    logic [3:0]  tag;      // batch-tag: GnR operation within the batch
    logic [2:0]  opcode;
    logic [5:0]  skew;     // cycles to wait after arrival (XFER: {first, buffer} in bits 1:0)
    logic        vt;       // vector-transfer: last C-instr of the batch (XFER: last of the buffer)
  } cinstr_t;

  function automatic logic       a_rank(input logic [33:0] a); return a[33];     endfunction
  function automatic logic [15:0] a_row(input logic [33:0] a); return a[32:17];  endfunction
  function automatic logic [2:0]  a_bg  (input logic [33:0] a); return a[16:14]; endfunction
  function automatic logic [1:0]  a_bank(input logic [33:0] a); return a[13:12]; endfunction
  function automatic logic [9:0]  a_col (input logic [33:0] a); return a[11:2];  endfunction
  function automatic logic [33:0] mk_addr(input logic rank, input logic [15:0] row, input logic [2:0] bg,
                                          input logic [1:0] bank, input logic [9:0] col);
    return {rank, row, bg, bank, col, 2'b00};
  endfunction

  typedef enum logic [1:0] {
    DC_NOP = 2'd0,
    DC_ACT = 2'd1,
    DC_RD  = 2'd2,
    DC_PRE = 2'd3
  } dram_op_e;

  typedef struct packed {
    dram_op_e    op;
    logic [1:0]  bank;
    logic [15:0] row;
    logic [9:0]  col;
  } dram_cmd_t;

  // identification of a partial-sum row on its way to the NPR
  typedef struct packed {
    logic [1:0]  tag;
    logic [3:0]  row;
    logic [2:0]  bg;
  } xfer_id_t;

endpackage
