// dpd_ref_pkg: reference models used by the testbenches, written from the
// DPD layout table rather than from the Boolean equations of the RTL, and
// from plain integer arithmetic for the binary/BCD conversions.
//
// Encoding table (a, e, i are the MSBs of the hundreds, tens and units
// digits; p..y is the declet, bit 9 first):
//   aei  p q r  s t u  v  w x y
//   000  b c d  f g h  0  j k m
//   001  b c d  f g h  1  0 0 m
//   010  b c d  j k h  1  0 1 m
//   100  j k d  f g h  1  1 0 m
//   110  j k d  0 0 h  1  1 1 m
//   101  f g d  0 1 h  1  1 1 m
//   011  b c d  1 0 h  1  1 1 m
//   111  0 0 d  1 1 h  1  1 1 m
package dpd_ref_pkg;

  function automatic logic [11:0] ref_bin2bcd(int unsigned n);
    return {4'(n / 100), 4'((n / 10) % 10), 4'(n % 10)};
  endfunction

  function automatic int unsigned ref_bcd2bin(logic [11:0] b);
    return 100 * int'(b[11:8]) + 10 * int'(b[7:4]) + int'(b[3:0]);
  endfunction

  function automatic logic [9:0] ref_encode(logic [11:0] bcd);
    logic a, b, c, d, e, f, g, h, i, j, k, m;
    {a, b, c, d, e, f, g, h, i, j, k, m} = bcd;
    case ({a, e, i})
      3'b000: return {b, c, d, f, g, h, 1'b0, j, k, m};
      3'b001: return {b, c, d, f, g, h, 1'b1, 1'b0, 1'b0, m};
      3'b010: return {b, c, d, j, k, h, 1'b1, 1'b0, 1'b1, m};
      3'b100: return {j, k, d, f, g, h, 1'b1, 1'b1, 1'b0, m};
      3'b110: return {j, k, d, 1'b0, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      3'b101: return {f, g, d, 1'b0, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
      3'b011: return {b, c, d, 1'b1, 1'b0, h, 1'b1, 1'b1, 1'b1, m};
      default: return {1'b0, 1'b0, d, 1'b1, 1'b1, h, 1'b1, 1'b1, 1'b1, m};
    endcase
  endfunction

  // Decoding table; the "don't care" bits of the 111-11 layout (p, q) are
  // ignored, as a decoder must.
  function automatic logic [11:0] ref_decode(logic [9:0] dpd);
    logic p, q, r, s, t, u, v, w, x, y;
    {p, q, r, s, t, u, v, w, x, y} = dpd;
    if (!v) return {1'b0, p, q, r, 1'b0, s, t, u, 1'b0, w, x, y};
    case ({w, x})
      2'b00: return {1'b0, p, q, r, 1'b0, s, t, u, 3'b100, y};
      2'b01: return {1'b0, p, q, r, 3'b100, u, 1'b0, s, t, y};
      2'b10: return {3'b100, r, 1'b0, s, t, u, 1'b0, p, q, y};
      default:
        case ({s, t})
          2'b00: return {3'b100, r, 3'b100, u, 1'b0, p, q, y};
          2'b01: return {3'b100, r, 1'b0, p, q, u, 3'b100, y};
          2'b10: return {1'b0, p, q, r, 3'b100, u, 3'b100, y};
          default: return {3'b100, r, 3'b100, u, 3'b100, y};
        endcase
    endcase
  endfunction

endpackage
