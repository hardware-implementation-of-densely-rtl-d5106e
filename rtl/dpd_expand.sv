// dpd_expand: combinational decoder from one 10-bit Densely Packed Decimal
// declet to three BCD digits (12 bits).
//
// Bit v tells whether any digit is large (8 or 9). With v = 0 the three
// digits are 0pqr 0stu 0wxy. With v = 1, w and x (and s, t when w = x = 1)
// say which digits are large; a large digit is 100 followed by its LSB, and a
// small digit takes its upper bits from p q, s t or w x as the layout
// dictates. All 1024 input codes decode to valid BCD: the 24 codes that the
// encoder never produces (v w x = 111, s t = 11, p or q set) decode to 8xx/9xx
// digits as the equations dictate.
//
// The sum-of-products equations are the ones given for the decoder. Interface:
// dpd_i (10 bits, p = bit 9 ... y = bit 0) in, bcd_o (bcd3_t) out. No clock;
// zero latency.
module dpd_expand
  import dpd_pkg::*;
(
  input  dpd10_t dpd_i,
  output bcd3_t  bcd_o
);

  logic p, q, r, s, t, u, v, w, x, y;
  logic a, b, c, d, e, f, g, h, i, j, k, m;

  assign {p, q, r, s, t, u, v, w, x, y} = dpd_i;

  always_comb begin
    a = (v & w) & (~x | ~s | (s & t));
    b = p & (~v | ~w | (s & ~t & x));
    c = q & (~v | ~w | (s & ~t & x));
    d = r;
    e = v & ((~w & x) | ((~t | s) & w & x));
    f = (s & (~v | (~x & v))) | (p & ~s & t & v & w & x);
    g = (t & (~v | (~x & v))) | (q & ~s & t & v & w & x);
    h = u;
    i = v & ((~w & ~x) | (w & x & (s | t)));
    j = (~v & w) | (s & v & ~w & x) | (p & v & w & (~x | (~s & ~t)));
    k = (~v & x) | (t & v & ~w & x) | (q & v & w & (~x | (~s & ~t)));
    m = y;
  end

  assign bcd_o = '{hund: {a, b, c, d}, tens: {e, f, g, h}, units: {i, j, k, m}};

endmodule
