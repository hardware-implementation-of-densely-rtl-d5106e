// tb_add3: exhaustive check of the add-3 correction cell. All 16 input values
// are applied; the expected output is computed arithmetically (+3 for 5 and
// above, modulo 16).
module tb_add3;
  logic [3:0] col_i, col_o;
  int checks = 0, failures = 0;

  add3 dut (.col_i(col_i), .col_o(col_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic [3:0] exp;
      col_i = 4'(v);
      #1;
      exp = (v >= 5) ? 4'(v + 3) : 4'(v);
      checks++;
      if (col_o !== exp) begin
        failures++;
        $display("FAIL add3(%0d) = %0d, expected %0d", v, col_o, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
