// dpd_compress: combinational encoder from three BCD digits (12 bits) to one
// 10-bit Densely Packed Decimal declet.
//
// Each digit is "small" (0-7, MSB 0, three significant bits) or "large" (8-9,
// MSB 1, one significant bit). The MSBs a, e, i of the three digits select
// one of eight layouts: when all three are small, v = 0 and the nine low bits
// are copied; otherwise v = 1 and w, x (and s, t when two or three digits are
// large) say which digits are large, while the remaining bits carry the
// significant bits of the digits. Bits r, u and y are always the LSBs d, h, m
// of the digits, and numbers 0..79 come out identical to their BCD form.
//
// The sum-of-products equations below are the ones given for the encoder,
// written with SystemVerilog operators. Interface: bcd_i (bcd3_t) in, dpd_o
// (10 bits, p = bit 9 ... y = bit 0) out. No clock; zero latency.
module dpd_compress
  import dpd_pkg::*;
(
  input  bcd3_t  bcd_i,
  output dpd10_t dpd_o
);

  logic a, b, c, d, e, f, g, h, i, j, k, m;
  logic p, q, r, s, t, u, v, w, x, y;

  assign {a, b, c, d} = bcd_i.hund;
  assign {e, f, g, h} = bcd_i.tens;
  assign {i, j, k, m} = bcd_i.units;

  always_comb begin
    p = (~a & b) | (a & j & ~i) | (a & f & i & ~e);
    q = (~a & c) | (a & k & ~i) | (a & g & i & ~e);
    r = d;
    s = (~e & f & ~(a & i)) | (~a & ~i & e & j) | (e & i);
    t = (~e & g & ~(a & i)) | (~a & ~i & e & k) | (a & i);
    u = h;
    v = a | e | i;
    w = a | (e & i) | (~e & j & ~i);
    x = e | (a & i) | (~a & k & ~i);
    y = m;
  end

  assign dpd_o = {p, q, r, s, t, u, v, w, x, y};

endmodule
