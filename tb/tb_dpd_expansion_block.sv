// tb_dpd_expansion_block: drives all 1024 declets into the expansion path and
// checks the BCD intermediate against the reference decode table and the
// binary output against 100H + 10T + O. The declet of 80 must give back 80.
module tb_dpd_expansion_block;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  dpd10_t dpd_i;
  bcd3_t  bcd_o;
  bin10_t bin_o;
  int checks = 0, failures = 0;

  dpd_expansion_block dut (.dpd_i(dpd_i), .bcd_o(bcd_o), .bin_o(bin_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 1024; c++) begin
      dpd_i = 10'(c);
      #1;
      checks += 2;
      if (bcd_o !== ref_decode(10'(c))) begin
        failures++;
        if (failures < 10) $display("FAIL bcd of %b = %h", dpd_i, bcd_o);
      end
      if (int'(bin_o) != ref_bcd2bin(ref_decode(10'(c)))) begin
        failures++;
        if (failures < 10) $display("FAIL bin of %b = %0d", dpd_i, bin_o);
      end
    end
    dpd_i = 10'b000_000_1010;
    #1;
    checks++;
    if (bin_o != 10'd80) begin
      failures++;
      $display("FAIL declet of 80 gives %0d", bin_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
