// dpd_system: top level of the Densely Packed Decimal codec as it is run on
// an FPGA board: a three-digit number in binary is compressed to a 10-bit DPD
// declet and that declet is expanded back to BCD and binary.
//
// Datapath: num_i -> [number register] -> dpd_compression_block -> DPD ->
// dpd_expansion_block -> BCD -> binary. The board's inputs are a clock, a
// reset, a load and an enable switch and the 10-bit number; those names come
// from the board's pin constraints and logic-analyzer capture. What load and
// enable do is this design's choice:
//   * load   - the number register takes num_i on the next rising clock edge;
//   * enable - the result registers (BCD in, DPD declet, BCD out, binary out)
//              take the codec's outputs on the next rising clock edge; with
//              enable low they hold their value.
// reset is synchronous and active high and clears every register.
//
// Timing: a number loaded on edge n is compressed and expanded
// combinationally during cycle n+1 and appears on all outputs after edge n+1
// if enable is high then (two edges from num_i to outputs; one if load and
// enable are both held high, since the result registers sample the number
// register). For 0..999, num_o equals the loaded number (the codec is
// lossless) and roundtrip_ok_o is high.
//
// Interface: clk, rst, load, enable, num_i[9:0]; outputs num_q_o (the number
// register), bcd_in_o, dpd_o, bcd_out_o, num_o and roundtrip_ok_o, all
// registered.
module dpd_system
  import dpd_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  logic   load,
  input  logic   enable,
  input  bin10_t num_i,
  output bin10_t num_q_o,
  output bcd3_t  bcd_in_o,
  output dpd10_t dpd_o,
  output bcd3_t  bcd_out_o,
  output bin10_t num_o,
  output logic   roundtrip_ok_o
);

  bin10_t num_q;
  bcd3_t  bcd_in, bcd_out;
  dpd10_t dpd;
  bin10_t num_back;

  always_ff @(posedge clk) begin
    if (rst)       num_q <= '0;
    else if (load) num_q <= num_i;
  end

  dpd_compression_block u_compression (
    .bin_i (num_q),
    .bcd_o (bcd_in),
    .dpd_o (dpd)
  );

  dpd_expansion_block u_expansion (
    .dpd_i (dpd),
    .bcd_o (bcd_out),
    .bin_o (num_back)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      bcd_in_o       <= '0;
      dpd_o          <= '0;
      bcd_out_o      <= '0;
      num_o          <= '0;
      roundtrip_ok_o <= 1'b0;
    end else if (enable) begin
      bcd_in_o       <= bcd_in;
      dpd_o          <= dpd;
      bcd_out_o      <= bcd_out;
      num_o          <= num_back;
      roundtrip_ok_o <= (num_back == num_q) && (bcd_out == bcd_in);
    end
  end

  assign num_q_o = num_q;

endmodule
