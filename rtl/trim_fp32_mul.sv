// trim_fp32_mul: IEEE-754 single-precision multiplier, the multiply half of the
// IPR multiply-add (weighted-sum reduction).
//
// Combinational. Round to nearest, ties to even; subnormal inputs read as zero
// and subnormal results flushed to signed zero; NaN or inf x 0 gives 0x7FC00000;
// overflow gives signed infinity. These rules are this design's choice; the
// document fixes only the 32-bit floating-point format.
module trim_fp32_mul (
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] y_o
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  always_comb begin
    logic        sy;
    logic [7:0]  ea, eb;
    logic        za, zb, ia, ib, na, nb;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    logic [24:0] r;
    logic [9:0]  e;

    ea = a_i[30:23]; eb = b_i[30:23];
    sy = a_i[31] ^ b_i[31];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (a_i[22:0] == '0); ib = (eb == 8'hFF) && (b_i[22:0] == '0);
    na = (ea == 8'hFF) && (a_i[22:0] != '0); nb = (eb == 8'hFF) && (b_i[22:0] != '0);
    p = '0; m = '0; g = 1'b0; st = 1'b0; r = '0; e = '0;

    if (na || nb || (ia && zb) || (ib && za)) begin
      y_o = QNAN;
    end else if (ia || ib) begin
      y_o = {sy, 8'hFF, 23'd0};
    end else if (za || zb) begin
      y_o = {sy, 31'd0};
    end else begin
      p = {24'd0, 1'b1, a_i[22:0]} * {24'd0, 1'b1, b_i[22:0]};
      e = 10'(ea) + 10'(eb) - 10'd127;
      if (p[47]) begin
        m  = p[47:24];
        g  = p[23];
        st = |p[22:0];
        e  = e + 10'd1;
      end else begin
        m  = p[46:23];
        g  = p[22];
        st = |p[21:0];
      end
      r = {1'b0, m};
      if (g && (st || m[0])) r = r + 25'd1;
      if (r[24]) begin
        r = r >> 1;
        e = e + 10'd1;
      end
      if ($signed(e) <= 0)                  y_o = {sy, 31'd0};
      else if ($signed(e) >= $signed(10'd255)) y_o = {sy, 8'hFF, 23'd0};
      else                                  y_o = {sy, e[7:0], r[22:0]};
    end
  end

endmodule
