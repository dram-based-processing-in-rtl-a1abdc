// tb_fp_pkg: single-precision reference arithmetic for the TRiM testbenches.
//
// Values are carried as IEEE double (real); to32() rounds a double to the nearest
// single (ties to even) with the same flush-to-zero and overflow rules as the
// RTL, so a sum or product of two singles, computed exactly in double and then
// rounded once, is the correctly rounded single result.
package tb_fp_pkg;
  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'd0) return f[31] ? -0.0 : 0.0;
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to32(input real r);
    logic [63:0] d;
    int          e;
    logic [23:0] m;
    logic [28:0] rest;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    m = {1'b0, d[51:29]};
    rest = d[28:0];
    if (rest > 29'h1000_0000 || (rest == 29'h1000_0000 && m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = '0;
      e = e + 1;
    end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // random normal single with exponent in [emin, emax]
  function automatic logic [31:0] rnd32(input int emin, input int emax);
    return {1'($urandom), 8'($urandom_range(emin, emax)), 23'($urandom)};
  endfunction
endpackage
