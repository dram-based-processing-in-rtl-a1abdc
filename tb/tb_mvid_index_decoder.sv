// tb_mvid_index_decoder: random check of the delta-index decoder.
//
// Builds random 16-pair reads (deltas 0..14, end-of-row 0xF with a row number, a
// random column base) and compares every output with a reference that walks the
// pairs one by one: column = previous column + delta + 1, pairs after the end mark
// are not used, the row number is the data of the first end mark.
module tb_mvid_index_decoder;
  import mvid_pkg::*;
  int checks = 0, failures = 0;

  logic [N_PAIRS-1:0][IDX_W-1:0]  idx;
  logic [N_PAIRS-1:0][DATA_W-1:0] data;
  logic [COL_W-1:0]               base;
  logic [N_PAIRS-1:0][COL_W-1:0]  col;
  logic [N_PAIRS-1:0]             use_;
  logic                           eor;
  logic [DATA_W-1:0]              row;
  logic [COL_W-1:0]               cnext;

  mvid_index_decoder dut (.idx_i(idx), .data_i(data), .col_base_i(base), .col_o(col),
                          .use_o(use_), .eor_o(eor), .row_o(row), .col_next_o(cnext));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int c, e_at;
      logic [N_PAIRS-1:0][COL_W-1:0] rc;
      logic [N_PAIRS-1:0] ru;
      logic re;
      logic [DATA_W-1:0] rr;
      base = COL_W'($urandom_range(0, 900));
      e_at = (t % 3 == 0) ? -1 : int'($urandom_range(0, N_PAIRS - 1));
      for (int k = 0; k < N_PAIRS; k++) begin
        idx[k]  = IDX_W'($urandom_range(0, 14));
        data[k] = DATA_W'($urandom);
        if (k == e_at) idx[k] = EOR_IDX;
        if (k > e_at && e_at >= 0 && $urandom_range(0, 1) == 1) idx[k] = EOR_IDX;
      end
      // reference
      c = int'(base) - 1;
      re = 0;
      rr = '0;
      ru = '0;
      rc = '0;
      for (int k = 0; k < N_PAIRS; k++) begin
        if (!re && idx[k] == EOR_IDX) begin
          re = 1;
          rr = data[k];
        end else if (!re) begin
          c += int'(idx[k]) + 1;
          rc[k] = COL_W'(c);
          ru[k] = 1;
        end
      end
      #1;
      checks++;
      if (use_ !== ru || eor !== re || (re && row !== rr) || cnext !== COL_W'(c + 1)) begin
        failures++;
        if (failures < 5) $display("mismatch t=%0d use %h/%h eor %b/%b row %0d/%0d next %0d/%0d",
                                   t, use_, ru, eor, re, row, rr, cnext, c + 1);
      end
      for (int k = 0; k < N_PAIRS; k++)
        if (ru[k]) begin
          checks++;
          if (col[k] !== rc[k]) begin
            failures++;
            if (failures < 5) $display("col mismatch t=%0d k=%0d %0d/%0d", t, k, col[k], rc[k]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
