// tb_dpd_expand: checks the DPD decoder on all 1024 input codes against the
// layout table in dpd_ref_pkg, checks that every valid three-digit number
// survives encode (reference) then decode (DUT), and applies the vector of
// the decoder simulation (p..y = 1011010101 -> 0101 0101 0101).
module tb_dpd_expand;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  dpd10_t dpd_i;
  bcd3_t  bcd_o;
  int checks = 0, failures = 0;

  dpd_expand dut (.dpd_i(dpd_i), .bcd_o(bcd_o));

  task automatic check(logic [9:0] dpd, logic [11:0] exp, string what);
    dpd_i = dpd;
    #1;
    checks++;
    if (bcd_o !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: decode(%b) = %h, expected %h", what, dpd, bcd_o, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) check(10'(c), ref_decode(10'(c)), "table");
    for (int n = 0; n <= 999; n++) check(ref_encode(ref_bin2bcd(n)), ref_bin2bcd(n), "roundtrip");
    check(10'b1011010101, 12'b0101_0101_0101, "simulation vector");
    check(10'b001_111_1111, 12'h999, "example 999");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
