// mvid_datapath: the inner-product pipeline of one MV-bank.
//
// Five stages, as in the document's Single-Row-per-Read organisation:
//   1 data reading    - a 256-bit read from the GIO sense amplifiers is latched;
//   2 index decoding  - the parallel prefix sum turns the 16 delta indices into
//                       absolute input-vector addresses, which address the
//                       iv-SRAM at the end of this stage;
//   3 input fetching  - the 16 input elements come out of the iv-SRAM;
//   4 MAC executing   - each of the 16 MACs adds weight x element (the first read of
//                       a row restarts the partial sums);
//   5 output storing  - if the read held the end of a row, the adder tree sums the
//                       16 partial sums into the ov-SRAM entry named by the row.
// Pair k of a read is bits [16k+15:16k]: data in the upper 12 bits, index in the
// lower 4 (the order the document's figures print, bit positions being this
// design's choice). Reads must be at least 4 cycles apart (the CGU spaces them by
// tCCD = 8 cycles or more). The column carry between reads of one row is kept in
// col_base and returns to 0 after a row end. iv-SRAM writes come from the WR-iv
// broadcast; the ov-SRAM read port serves RD-ov.
module mvid_datapath
  import mvid_pkg::*;
#(
  parameter int unsigned IVD = IV_DEPTH,
  parameter int unsigned OVD = OV_DEPTH
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // stage 1 input: read data from the bank
  input  logic                          rd_valid_i,
  input  logic [RD_BITS-1:0]            rd_data_i,
  // iv-SRAM broadcast write
  input  logic                          iv_we_i,
  input  logic [COL_W-1:0]              iv_waddr_i,
  input  logic [N_PAIRS-1:0][DATA_W-1:0] iv_wdata_i,
  // ov-SRAM read port
  input  logic [OVA_W-1:0]              ov_raddr_i,
  output logic [ACC_W-1:0]              ov_rdata_o,
  // status
  output logic                          row_done_o,   // pulse: one output element stored
  output logic                          busy_o        // a read is in the pipeline
);
  // ---------------- stage 1: data reading
  logic                                s1_v;
  logic [N_PAIRS-1:0][DATA_W-1:0]      s1_data;
  logic [N_PAIRS-1:0][IDX_W-1:0]       s1_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
    end else begin
      s1_v <= rd_valid_i;
    end
  end
  always_ff @(posedge clk) begin
    if (rd_valid_i)
      for (int k = 0; k < N_PAIRS; k++) begin
        s1_data[k] <= rd_data_i[16*k+4 +: DATA_W];
        s1_idx[k]  <= rd_data_i[16*k +: IDX_W];
      end
  end

  // ---------------- stage 2: index decoding
  logic [COL_W-1:0]                    col_base;
  logic [N_PAIRS-1:0][COL_W-1:0]       dec_col;
  logic [N_PAIRS-1:0]                  dec_use;
  logic                                dec_eor;
  logic [DATA_W-1:0]                   dec_row;
  logic [COL_W-1:0]                    dec_next;

  mvid_index_decoder u_dec (
    .idx_i(s1_idx), .data_i(s1_data), .col_base_i(col_base),
    .col_o(dec_col), .use_o(dec_use), .eor_o(dec_eor), .row_o(dec_row), .col_next_o(dec_next)
  );

  logic                                s2_v, s2_eor, s2_first;
  logic [N_PAIRS-1:0]                  s2_use;
  logic [N_PAIRS-1:0][DATA_W-1:0]      s2_w;
  logic [DATA_W-1:0]                   s2_row;
  logic                                row_start;   // next read begins a row

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_v      <= 1'b0;
      col_base  <= '0;
      row_start <= 1'b1;
    end else begin
      s2_v <= s1_v;
      if (s1_v) begin
        col_base  <= dec_eor ? '0 : dec_next;
        row_start <= dec_eor;
      end
    end
  end
  always_ff @(posedge clk) begin
    if (s1_v) begin
      s2_use   <= dec_use;
      s2_w     <= s1_data;
      s2_eor   <= dec_eor;
      s2_row   <= dec_row;
      s2_first <= row_start;
    end
  end

  // ---------------- stage 3: input-vector fetching
  logic [N_PAIRS-1:0][DATA_W-1:0]      iv_rdata;

  mvid_iv_sram #(.DEPTH(IVD)) u_iv (
    .clk(clk), .we_i(iv_we_i), .waddr_i(iv_waddr_i), .wdata_i(iv_wdata_i),
    .raddr_i(dec_col), .rdata_o(iv_rdata)
  );

  // ---------------- stage 4: MAC executing
  logic [N_PAIRS-1:0][ACC_W-1:0]       psum;
  logic                                s4_v, s4_eor;
  logic [OVA_W-1:0]                    s4_row;

  for (genvar k = 0; k < N_PAIRS; k++) begin : g_mac
    mvid_mac u_mac (
      .clk(clk), .rst_n(rst_n),
      .en_i (s2_v & s2_use[k]),
      .clr_i(s2_v & s2_first),
      .w_i  (s2_w[k]),
      .x_i  (iv_rdata[k]),
      .acc_o(psum[k])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s4_v   <= 1'b0;
      s4_eor <= 1'b0;
      s4_row <= '0;
    end else begin
      s4_v   <= s2_v;
      s4_eor <= s2_v & s2_eor;
      s4_row <= s2_row[OVA_W-1:0];
    end
  end

  // ---------------- stage 5: output storing
  logic [ACC_W-1:0]                    row_sum;

  mvid_adder_tree u_tree (.in_i(psum), .sum_o(row_sum));

  mvid_ov_sram #(.DEPTH(OVD)) u_ov (
    .clk(clk), .we_i(s4_eor), .waddr_i(s4_row), .wdata_i(row_sum),
    .raddr_i(ov_raddr_i), .rdata_o(ov_rdata_o)
  );

  assign row_done_o = s4_eor;
  assign busy_o     = s1_v | s2_v | s4_v;

endmodule
