// tb_bin2bcd: exhaustive check of the binary to BCD converter over 0..999
// against digits computed with integer division.
module tb_bin2bcd;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  bin10_t bin_i;
  bcd3_t  bcd_o;
  int checks = 0, failures = 0;

  bin2bcd dut (.bin_i(bin_i), .bcd_o(bcd_o));

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
      checks++;
      if (bcd_o !== ref_bin2bcd(n)) begin
        failures++;
        if (failures < 10) $display("FAIL bin2bcd(%0d) = %h, expected %h", n, bcd_o, ref_bin2bcd(n));
      end
    end
    // The example of the BCD section: 127 -> 0001 0010 0111.
    bin_i = 10'd127;
    #1;
    checks++;
    if (bcd_o !== 12'b0001_0010_0111) begin
      failures++;
      $display("FAIL 127 -> %b", bcd_o);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
