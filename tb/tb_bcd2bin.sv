// tb_bcd2bin: exhaustive check of the BCD to binary converter over all 1000
// valid BCD inputs against 100H + 10T + O computed with integers.
module tb_bcd2bin;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;
  bcd3_t  bcd_i;
  bin10_t bin_o;
  int checks = 0, failures = 0;

  bcd2bin dut (.bcd_i(bcd_i), .bin_o(bin_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int h = 0; h < 10; h++)
      for (int t = 0; t < 10; t++)
        for (int o = 0; o < 10; o++) begin
          bcd_i = '{hund: 4'(h), tens: 4'(t), units: 4'(o)};
          #1;
          checks++;
          if (int'(bin_o) != 100 * h + 10 * t + o) begin
            failures++;
            if (failures < 10) $display("FAIL bcd2bin(%0d%0d%0d) = %0d", h, t, o, bin_o);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
