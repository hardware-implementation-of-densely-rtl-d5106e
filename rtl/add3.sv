// add3: the correction cell of the shift-and-add-3 binary-to-BCD converter.
//
// A 4-bit BCD column value of 5 or more gets 3 added to it; smaller values
// pass unchanged. When the column is then shifted left one place (by the
// wiring of the next row), a value of 5..9 becomes 10..18 plus 6, which is
// exactly the decimal carry into the next column. Inputs 10..15 never occur in
// the converter; they are also given +3 (modulo 16), which is this design's
// choice, as is writing the cell as a comparator and adder rather than a
// truth table.
//
// Interface: col_i (4 bits) in, col_o (4 bits) out. Purely combinational.
module add3 (
  input  logic [3:0] col_i,
  output logic [3:0] col_o
);

  always_comb begin
    if (col_i >= 4'd5) col_o = col_i + 4'd3;
    else               col_o = col_i;
  end

endmodule
