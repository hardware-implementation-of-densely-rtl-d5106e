// tb_dpd_compress: checks the DPD encoder on all 1000 valid BCD inputs
// against the layout table in dpd_ref_pkg, on the six worked examples of the
// encoding (005, 009, 055, 099, 555, 999) and on the 555 vector of the
// encoder simulation (p..y = 1011010101). It also checks that 0..79 encode
// to their own BCD bits.
module tb_dpd_compress;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  bcd3_t  bcd_i;
  dpd10_t dpd_o;
  int checks = 0, failures = 0;

  dpd_compress dut (.bcd_i(bcd_i), .dpd_o(dpd_o));

  task automatic check(logic [11:0] bcd, logic [9:0] exp, string what);
    bcd_i = bcd;
    #1;
    checks++;
    if (dpd_o !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: encode(%h) = %b, expected %b", what, bcd, dpd_o, exp);
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
    for (int n = 0; n <= 999; n++) check(ref_bin2bcd(n), ref_encode(ref_bin2bcd(n)), "table");
    check(12'h005, 10'b000_000_0101, "example 005");
    check(12'h009, 10'b000_000_1001, "example 009");
    check(12'h055, 10'b000_101_0101, "example 055");
    check(12'h099, 10'b000_101_1111, "example 099");
    check(12'h555, 10'b101_101_0101, "example 555");
    check(12'h999, 10'b001_111_1111, "example 999");
    check(12'b0101_0101_0101, 10'b1011010101, "simulation vector");
    for (int n = 0; n <= 79; n++) begin
      logic [11:0] b = ref_bin2bcd(n);
      check(b, b[9:0], "0..79 equal BCD");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
