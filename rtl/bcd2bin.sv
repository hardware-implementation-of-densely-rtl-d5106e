// bcd2bin: combinational converter from three BCD digits H, T, O to the
// 10-bit binary value N = 100H + 10T + O.
//
// Multiplication is done by shifts and adds only, in two identical steps:
// first 10H + T = (H << 3) + (H << 1) + T, then
// N = ((10H + T) << 3) + ((10H + T) << 1) + O. The intermediate 10H + T is
// at most 99 (7 bits); the final sum is at most 999 and fits 10 bits. Only
// valid BCD digits (0..9) are meaningful inputs.
//
// Interface: bcd_i (bcd3_t) in, bin_o (10 bits) out. No clock; zero latency.
module bcd2bin
  import dpd_pkg::*;
(
  input  bcd3_t  bcd_i,
  output bin10_t bin_o
);

  logic [6:0] ht;   // 10H + T
  logic [9:0] n;

  always_comb begin
    ht = ({3'b000, bcd_i.hund} << 3) + ({3'b000, bcd_i.hund} << 1) + {3'b000, bcd_i.tens};
    n  = ({3'b000, ht} << 3) + ({3'b000, ht} << 1) + {6'b0, bcd_i.units};
  end

  assign bin_o = n;

endmodule
