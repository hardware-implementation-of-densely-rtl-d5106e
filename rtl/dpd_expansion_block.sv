// dpd_expansion_block: the expansion path of the DPD codec.
//
// A 10-bit DPD declet is unpacked into three BCD digits (dpd_expand), which
// are then turned back into a plain binary number N = 100H + 10T + O
// (bcd2bin). The BCD intermediate is brought out as well.
//
// Interface: dpd_i (10 bits) in; bcd_o (bcd3_t) and bin_o (10 bits) out.
// Purely combinational.
module dpd_expansion_block
  import dpd_pkg::*;
(
  input  dpd10_t dpd_i,
  output bcd3_t  bcd_o,
  output bin10_t bin_o
);

  dpd_expand u_expand  (.dpd_i(dpd_i), .bcd_o(bcd_o));
  bcd2bin    u_bcd2bin (.bcd_i(bcd_o), .bin_o(bin_o));

endmodule
