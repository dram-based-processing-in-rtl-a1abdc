// trim_fp32_add: IEEE-754 single-precision adder, the reduction adder of the NPR
// and the add half of the IPR multiply-add.
//
// Combinational. Round to nearest, ties to even. Subnormal inputs are read as zero
// and results that would be subnormal are flushed to zero (signed). NaN in, or
// +inf plus -inf, gives the quiet NaN 0x7FC00000; an infinite operand otherwise
// gives that infinity; overflow gives infinity. x + (-x) is +0. The document fixes
// only the 32-bit floating-point format; the rounding and special-value behaviour
// is this design's choice.
module trim_fp32_add (
  input  logic [31:0] a_i,
  input  logic [31:0] b_i,
  output logic [31:0] y_o
);
  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  always_comb begin
    logic        sa, sb, sy;
    logic [7:0]  ea, eb;
    logic [22:0] fa, fb;
    logic        za, zb, ia, ib, na, nb;
    logic [26:0] ma, mb;       // 1.23 mantissa followed by guard, round, sticky
    logic [27:0] s;
    logic [9:0]  e;
    logic [7:0]  d;
    logic        st;
    logic [24:0] r;
    int          lz;

    sa = a_i[31]; ea = a_i[30:23]; fa = a_i[22:0];
    sb = b_i[31]; eb = b_i[30:23]; fb = b_i[22:0];
    za = (ea == 8'd0); zb = (eb == 8'd0);
    ia = (ea == 8'hFF) && (fa == '0); ib = (eb == 8'hFF) && (fb == '0);
    na = (ea == 8'hFF) && (fa != '0); nb = (eb == 8'hFF) && (fb != '0);
    y_o = '0;
    s = '0; e = '0; d = '0; st = 1'b0; r = '0; lz = 0; sy = 1'b0; ma = '0; mb = '0;

    if (na || nb || (ia && ib && sa != sb)) begin
      y_o = QNAN;
    end else if (ia || ib) begin
      y_o = ia ? {sa, 8'hFF, 23'd0} : {sb, 8'hFF, 23'd0};
    end else if (za && zb) begin
      y_o = {sa & sb, 31'd0};
    end else if (za) begin
      y_o = b_i;
    end else if (zb) begin
      y_o = a_i;
    end else begin
      // order by magnitude: a becomes the larger
      if ({eb, fb} > {ea, fa}) begin
        {sa, ea, fa, sb, eb, fb} = {sb, eb, fb, sa, ea, fa};
      end
      sy = sa;
      ma = {1'b1, fa, 3'b000};
      mb = {1'b1, fb, 3'b000};
      d  = ea - eb;
      if (d >= 8'd27) begin
        mb = 27'd1;                       // only the sticky bit survives
      end else if (d != 8'd0) begin
        st = |(mb & ((27'd1 << d) - 27'd1));
        mb = (mb >> d) | {26'd0, st};
      end
      e = {2'b00, ea};
      if (sa == sb) begin
        s = {1'b0, ma} + {1'b0, mb};
        if (s[27]) begin
          s = {1'b0, s[27:2], s[1] | s[0]};
          e = e + 10'd1;
        end
      end else begin
        s = {1'b0, ma} - {1'b0, mb};
        lz = 0;
        for (int k = 26; k >= 0; k--) begin
          if (s[k]) break;
          lz++;
        end
        s = s << lz;
        e = e - 10'(lz);
      end
      if (s == '0) begin
        y_o = '0;
      end else begin
        // round to nearest even on bits [2:0]
        r = {1'b0, s[26:3]};
        if (s[2] && (s[1] || s[0] || s[3])) r = r + 25'd1;
        if (r[24]) begin
          r = r >> 1;
          e = e + 10'd1;
        end
        if ($signed(e) <= 0)       y_o = {sy, 31'd0};
        else if (e >= 10'd255)     y_o = {sy, 8'hFF, 23'd0};
        else                       y_o = {sy, e[7:0], r[22:0]};
      end
    end
  end

endmodule
