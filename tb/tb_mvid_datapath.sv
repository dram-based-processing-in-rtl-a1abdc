// tb_mvid_datapath: one MV-bank pipeline running a sparse matrix-vector product.
//
// The testbench loads a random 1,600-element input vector through the WR-iv write
// port, delta-encodes a random sparse matrix (75 % zeros, 12-bit weights) into
// 256-bit reads (16 pairs of 12-bit data and 4-bit index, dummy pairs for gaps over
// 14, an end-of-row pair carrying the row number, one row per read) and streams
// the reads 4 to 8 cycles apart. It checks every ov-SRAM entry against the integer
// product (24-bit wrap), that row_done pulses exactly 3 cycles after the read that
// ends a row (pipeline latency), and that the number of row ends is right.
module tb_mvid_datapath;
  import mvid_pkg::*;
  localparam int unsigned NROWS = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic                           rd_valid;
  logic [RD_BITS-1:0]             rd_data;
  logic                           iv_we;
  logic [COL_W-1:0]               iv_waddr;
  logic [N_PAIRS-1:0][DATA_W-1:0] iv_wdata;
  logic [OVA_W-1:0]               ov_raddr;
  logic [ACC_W-1:0]               ov_rdata;
  logic                           row_done, busy;

  mvid_datapath dut (.clk, .rst_n, .rd_valid_i(rd_valid), .rd_data_i(rd_data),
    .iv_we_i(iv_we), .iv_waddr_i(iv_waddr), .iv_wdata_i(iv_wdata),
    .ov_raddr_i(ov_raddr), .ov_rdata_o(ov_rdata), .row_done_o(row_done), .busy_o(busy));

  logic signed [DATA_W-1:0] x [IV_DEPTH];
  logic [ACC_W-1:0]         y [NROWS];
  logic [RD_BITS-1:0]       reads [$];
  bit                       ends [$];
  int                       cyc = 0, eor_cycles [$], done_cnt = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && row_done) begin
      done_cnt++;
      checks++;
      if (eor_cycles.size() == 0 || cyc - eor_cycles.pop_front() != 3) begin
        failures++;
        $display("row_done at wrong cycle %0d", cyc);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put_pair(ref logic [RD_BITS-1:0] cur, ref int n, input logic [DATA_W-1:0] d,
                          input logic [IDX_W-1:0] i, input bit is_end);
    cur[16*n +: 16] = {d, i};
    n++;
    if (n == N_PAIRS || is_end) begin
      for (int k = n; k < N_PAIRS; k++) cur[16*k +: 16] = {12'h0, EOR_IDX};
      reads.push_back(cur);
      ends.push_back(is_end);
      cur = '0;
      n = 0;
    end
  endtask

  initial begin
    logic [RD_BITS-1:0] cur;
    int n;
    rd_valid = 0; rd_data = '0; iv_we = 0; iv_waddr = '0; iv_wdata = '0; ov_raddr = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // input vector
    for (int i = 0; i < IV_DEPTH; i++) x[i] = DATA_W'($urandom);
    for (int a = 0; a < IV_DEPTH; a += N_PAIRS) begin
      @(negedge clk);
      iv_we = 1;
      iv_waddr = COL_W'(a);
      for (int k = 0; k < N_PAIRS; k++) iv_wdata[k] = x[a + k];
    end
    @(negedge clk);
    iv_we = 0;
    // matrix rows, encoded
    cur = '0;
    n = 0;
    for (int r = 0; r < NROWS; r++) begin
      int prev;
      logic signed [ACC_W-1:0] s;
      prev = -1;
      s = '0;
      for (int c = 0; c < IV_DEPTH; c++) begin
        // rows 0 and 1 are empty and very sparse, to exercise the corner cases
        bit nz;
        nz = (r == 0) ? 0 : (r == 1) ? (c == 1599) : ($urandom_range(0, 3) == 0);
        if (nz) begin
          logic signed [DATA_W-1:0] w;
          int gap;
          w = DATA_W'($urandom);
          if (w == 0) w = 1;
          gap = c - prev - 1;
          while (gap > 14) begin
            put_pair(cur, n, '0, 4'hE, 0);
            gap -= 15;
          end
          put_pair(cur, n, w, IDX_W'(gap), 0);
          s += ACC_W'(w * x[c]);
          prev = c;
        end
      end
      put_pair(cur, n, DATA_W'(r), EOR_IDX, 1);
      y[r] = s;
    end
    // stream
    foreach (reads[i]) begin
      @(negedge clk);
      rd_valid = 1;
      rd_data  = reads[i];
      if (ends[i]) eor_cycles.push_back(cyc);
      @(negedge clk);
      rd_valid = 0;
      repeat ($urandom_range(2, 6)) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (done_cnt != NROWS || busy) begin
      failures++;
      $display("row ends %0d, busy %b", done_cnt, busy);
    end
    for (int r = 0; r < NROWS; r++) begin
      ov_raddr = OVA_W'(r);
      @(negedge clk);
      checks++;
      if (ov_rdata !== y[r]) begin
        failures++;
        if (failures < 6) $display("row %0d got %h exp %h", r, ov_rdata, y[r]);
      end
    end
    $display("reads %0d", reads.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
