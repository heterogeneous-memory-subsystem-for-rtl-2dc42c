// fp64_add: IEEE-754 double-precision adder of the PISC ALU.
//
// PageRank and Betweenness Centrality update their vtxProp with a floating
// point add, so the PISC needs one; the design names it as the dominant part
// of the PISC's area. The internal structure is this implementation's: a
// single-cycle combinational adder with round-to-nearest-even, gradual
// underflow (subnormal inputs and outputs), infinities and NaN (any NaN
// result is the quiet NaN 0x7FF8000000000000). x + (-x) gives +0.
//
// Working format: 56-bit significands with the hidden bit at bit 55 and
// guard, round and sticky bits below; the smaller operand is aligned right
// with the shifted-out bits folded into sticky, the result is normalised
// (left shift limited so that it stops at the subnormal range) and rounded.
module fp64_add (
  input  logic [63:0] a,
  input  logic [63:0] b,
  output logic [63:0] y
);

  logic        sa, sb, sx, sy_;
  logic [10:0] ea, eb;
  logic [51:0] fa, fb;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [11:0] ex, ey;          // exponents of larger / smaller magnitude
  logic [55:0] mx, my;          // significands (hidden bit at 55)
  logic [11:0] d;
  logic [55:0] my_al;
  logic [56:0] sum;
  logic [55:0] sig;
  logic [11:0] e;
  logic [5:0]  lz;
  logic [11:0] sh;
  logic        rnd;
  logic [53:0] m53;
  logic [11:0] e_out;
  logic [55:0] lost_mask;

  function automatic logic [5:0] clz56(input logic [55:0] v);
    logic [5:0] n;
    n = 6'd56;
    for (int i = 0; i < 56; i++)
      if (v[i]) n = 6'(55 - i);
    return n;
  endfunction

  always_comb begin
    sa = a[63]; ea = a[62:52]; fa = a[51:0];
    sb = b[63]; eb = b[62:52]; fb = b[51:0];
    a_nan = (ea == 11'h7FF) && (fa != '0);
    b_nan = (eb == 11'h7FF) && (fb != '0);
    a_inf = (ea == 11'h7FF) && (fa == '0);
    b_inf = (eb == 11'h7FF) && (fb == '0);

    // order by magnitude
    if ({ea, fa} >= {eb, fb}) begin
      sx = sa; sy_ = sb;
      ex = (ea == '0) ? 12'd1 : {1'b0, ea};
      ey = (eb == '0) ? 12'd1 : {1'b0, eb};
      mx = {(ea != '0), fa, 3'b000};
      my = {(eb != '0), fb, 3'b000};
    end else begin
      sx = sb; sy_ = sa;
      ex = (eb == '0) ? 12'd1 : {1'b0, eb};
      ey = (ea == '0) ? 12'd1 : {1'b0, ea};
      mx = {(eb != '0), fb, 3'b000};
      my = {(ea != '0), fa, 3'b000};
    end

    // align the smaller operand, folding lost bits into sticky
    d = ex - ey;
    lost_mask = (56'd1 << d[5:0]) - 56'd1;
    sum = '0;
    if (d >= 12'd56) begin
      my_al = {55'd0, (my != '0)};
    end else begin
      my_al = (my >> d) | {55'd0, ((my & lost_mask) != '0)};
    end

    e   = ex;
    sig = '0;
    lz  = '0;
    sh  = '0;
    if (sx == sy_) begin
      sum = {1'b0, mx} + {1'b0, my_al};
      if (sum[56]) begin
        sig = {sum[56:2], sum[1] | sum[0]};
        e   = ex + 12'd1;
      end else begin
        sig = sum[55:0];
      end
    end else begin
      sum = {1'b0, mx} - {1'b0, my_al};
      lz  = clz56(sum[55:0]);
      sh  = ((12'(lz)) < (ex - 12'd1)) ? 12'(lz) : (ex - 12'd1);
      sig = sum[55:0] << sh;
      e   = ex - sh;
    end

    // round to nearest, ties to even
    rnd   = sig[2] && (sig[1] || sig[0] || sig[3]);
    m53   = {1'b0, sig[55:3]} + 54'(rnd);
    e_out = e;
    if (m53[53]) begin
      m53   = m53 >> 1;
      e_out = e + 12'd1;
    end

    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = 64'h7FF8_0000_0000_0000;
    end else if (a_inf || b_inf) begin
      y = {(a_inf ? sa : sb), 11'h7FF, 52'd0};
    end else if (m53 == '0) begin
      y = {(sa & sb), 63'd0};            // exact zero: -0 only for (-0)+(-0)
    end else if (e_out >= 12'h7FF) begin
      y = {sx, 11'h7FF, 52'd0};          // overflow to infinity
    end else begin
      y = {sx, (m53[52] ? e_out[10:0] : 11'd0), m53[51:0]};
    end
  end

endmodule
