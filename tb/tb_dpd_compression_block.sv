// tb_dpd_compression_block: drives every binary number 0..999 into the
// compression path and checks the BCD intermediate and the DPD declet
// against integer digit extraction and the reference layout table. The
// board example 80 (binary 0001010000) must give the declet 000 000 1010.
module tb_dpd_compression_block;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  bin10_t bin_i;
  bcd3_t  bcd_o;
  dpd10_t dpd_o;
  int checks = 0, failures = 0;

  dpd_compression_block dut (.bin_i(bin_i), .bcd_o(bcd_o), .dpd_o(dpd_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n <= 999; n++) begin
      bin_i = 10'(n);
      #1;
      checks += 2;
      if (bcd_o !== ref_bin2bcd(n)) begin
        failures++;
        if (failures < 10) $display("FAIL bcd of %0d = %h", n, bcd_o);
      end
      if (dpd_o !== ref_encode(ref_bin2bcd(n))) begin
        failures++;
        if (failures < 10) $display("FAIL dpd of %0d = %b", n, dpd_o);
      end
    end
    bin_i = 10'b0001010000;
    #1;
    checks++;
    if (dpd_o !== 10'b000_000_1010) begin
      failures++;
      $display("FAIL dpd of 80 = %b", dpd_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
