// tb_trim_ecc_ded: the repurposed on-die ECC check. The testbench computes the
// (136,128) Hamming parity of random bursts on its own (parity bit i = XOR of the
// data bits whose codeword position, skipping powers of two, has bit i set), then
// checks that a clean burst passes and that every single- and double-bit error in
// data or parity is detected.
module tb_trim_ecc_ded;
  int checks = 0, failures = 0;
  logic [127:0] d, dd;
  logic [7:0]   p, pp, par;
  logic         err;
  trim_ecc_ded dut (.data_i(dd), .par_i(pp), .par_o(par), .err_o(err));

  function automatic logic [7:0] ref_par(input logic [127:0] x);
    logic [7:0] r;
    int n;
    r = '0;
    n = 0;
    for (int q = 1; q <= 136; q++)
      if ((q & (q - 1)) != 0) begin
        for (int i = 0; i < 8; i++) if (q[i]) r[i] ^= x[n];
        n++;
      end
    return r;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int i, j;
      d = {$urandom, $urandom, $urandom, $urandom};
      p = ref_par(d);
      dd = d; pp = p;
      #1;
      checks++;
      if (err || par !== p) begin failures++; $display("clean burst flagged"); end
      // single and double errors over the 136 codeword bits
      i = $urandom_range(0, 135);
      j = (i + $urandom_range(1, 135)) % 136;
      dd = d; pp = p;
      if (i < 128) dd[i] = ~dd[i]; else pp[i-128] = ~pp[i-128];
      #1;
      checks++;
      if (!err) begin failures++; $display("single error %0d missed", i); end
      if (j < 128) dd[j] = ~dd[j]; else pp[j-128] = ~pp[j-128];
      #1;
      checks++;
      if (!err) begin failures++; $display("double error %0d %0d missed", i, j); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
