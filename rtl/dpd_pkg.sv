// dpd_pkg: types shared by the Densely Packed Decimal (DPD) codec.
//
// A three-digit decimal number appears in three forms in this design:
//   * bin10_t  - plain binary, 10 bits (0..999 are the legal values),
//   * bcd3_t   - three 4-bit BCD digits, hundreds first (12 bits),
//   * dpd10_t  - the 10-bit DPD declet.
// The DPD bit names follow the usual lettering: BCD bits a b c d | e f g h |
// i j k m (a = MSB of the hundreds digit) and DPD bits p q r s t u v w x y
// (p = bit 9). The helper functions below only rename bits; they contain no
// logic.
package dpd_pkg;

  typedef logic [3:0] bcd_digit_t;

  typedef struct packed {
    bcd_digit_t hund;
    bcd_digit_t tens;
    bcd_digit_t units;
  } bcd3_t;

  typedef logic [9:0] dpd10_t;
  typedef logic [9:0] bin10_t;

endpackage
