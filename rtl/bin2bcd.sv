// bin2bcd: combinational 10-bit binary to three-digit BCD converter built as
// the shift-and-add-3 ("double dabble") array of twelve add3 cells C1..C12.
//
// The algorithm shifts the binary number left one bit at a time into a
// hundreds/tens/units register and, before each shift, adds 3 to every BCD
// column holding 5 or more. Unrolled, every shift is just wiring and every
// correction is an add3 cell:
//   after shifting in B9..B7 : C1  = units {0, B9, B8, B7}
//   after B6                 : C2  = units {C1[2:0], B6}
//   after B5                 : C3  = units {C2[2:0], B5}
//   after B4                 : C4  = units {C3[2:0], B4}
//                              C5  = tens  {0, C1[3], C2[3], C3[3]}
//   after B3                 : C6  = units {C4[2:0], B3}
//                              C7  = tens  {C5[2:0], C4[3]}
//   after B2                 : C8  = units {C6[2:0], B2}
//                              C9  = tens  {C7[2:0], C6[3]}
//   after B1                 : C10 = units {C8[2:0], B1}
//                              C11 = tens  {C9[2:0], C8[3]}
//                              C12 = hund  {0, C5[3], C7[3], C9[3]}
//   final shift of B0        : P = {C12[2:0], C11, C10, B0}
// The cell names and which input bit enters which row are those of the
// converter's block diagram. Inputs 0..999 give exact BCD; 1000..1023 do not
// fit three digits and give a meaningless result.
//
// Interface: bin_i (10 bits) in, bcd_o (bcd3_t) out. No clock; zero latency.
module bin2bcd
  import dpd_pkg::*;
(
  input  bin10_t bin_i,
  output bcd3_t  bcd_o
);

  logic [3:0] c1, c2, c3, c4, c5, c6, c7, c8, c9, c10, c11, c12;

  add3 u_c1  (.col_i({1'b0, bin_i[9], bin_i[8], bin_i[7]}), .col_o(c1));
  add3 u_c2  (.col_i({c1[2:0], bin_i[6]}),                  .col_o(c2));
  add3 u_c3  (.col_i({c2[2:0], bin_i[5]}),                  .col_o(c3));
  add3 u_c4  (.col_i({c3[2:0], bin_i[4]}),                  .col_o(c4));
  add3 u_c5  (.col_i({1'b0, c1[3], c2[3], c3[3]}),          .col_o(c5));
  add3 u_c6  (.col_i({c4[2:0], bin_i[3]}),                  .col_o(c6));
  add3 u_c7  (.col_i({c5[2:0], c4[3]}),                     .col_o(c7));
  add3 u_c8  (.col_i({c6[2:0], bin_i[2]}),                  .col_o(c8));
  add3 u_c9  (.col_i({c7[2:0], c6[3]}),                     .col_o(c9));
  add3 u_c10 (.col_i({c8[2:0], bin_i[1]}),                  .col_o(c10));
  add3 u_c11 (.col_i({c9[2:0], c8[3]}),                     .col_o(c11));
  add3 u_c12 (.col_i({1'b0, c5[3], c7[3], c9[3]}),          .col_o(c12));

  // Final shift: B0 drops straight into the units LSB (P0). The carry out of
  // the hundreds column, c12[3], is a thousands digit and is not an output:
  // it can only be set for inputs above 999.
  assign bcd_o.hund  = {c12[2:0], c11[3]};
  assign bcd_o.tens  = {c11[2:0], c10[3]};
  assign bcd_o.units = {c10[2:0], bin_i[0]};

endmodule
