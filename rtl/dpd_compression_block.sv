// dpd_compression_block: the compression path of the DPD codec.
//
// A three-digit decimal number given in plain binary is first turned into
// three BCD digits by the shift-and-add-3 converter (bin2bcd), and those 12
// bits are then packed into a 10-bit DPD declet (dpd_compress). The BCD
// intermediate is brought out as well so that it can be observed.
//
// Interface: bin_i (10 bits, 0..999) in; bcd_o (bcd3_t) and dpd_o (10 bits)
// out. Purely combinational.
module dpd_compression_block
  import dpd_pkg::*;
(
  input  bin10_t bin_i,
  output bcd3_t  bcd_o,
  output dpd10_t dpd_o
);

  bin2bcd      u_bin2bcd  (.bin_i(bin_i), .bcd_o(bcd_o));
  dpd_compress u_compress (.bcd_i(bcd_o), .dpd_o(dpd_o));

endmodule
