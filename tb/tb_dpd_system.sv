// tb_dpd_system: end-to-end test of the board-level codec with its default
// configuration.
//
// Every number 0..999 is loaded with `load`, then `enable` is raised for one
// clock and the registered outputs are compared with reference values: the
// BCD digits, the DPD declet from the layout table, the expanded BCD and the
// recovered binary number (which must equal the number loaded). The latency
// is checked: outputs must be valid right after the first enabled edge that
// follows the loading edge, and not before. The test also exercises
// - hold: with enable low, a new load must not disturb the result registers;
// - reset: a synchronous reset clears every register;
// - the board example 80, which must give declet 000 000 1010;
// and counts how often each of the eight DPD layouts (which digits are
// large) was produced, failing if one never was.
module tb_dpd_system;
  import dpd_pkg::*;
  import dpd_ref_pkg::*;

  logic   clk = 1'b0;
  logic   rst, load, enable;
  bin10_t num_i, num_q_o, num_o;
  bcd3_t  bcd_in_o, bcd_out_o;
  dpd10_t dpd_o;
  logic   roundtrip_ok_o;

  int checks = 0, failures = 0;
  int cycles = 0;
  int n_load = 0, n_hold = 0, n_reset = 0;
  int layout_seen [8];

  dpd_system dut (
    .clk, .rst, .load, .enable, .num_i,
    .num_q_o, .bcd_in_o, .dpd_o, .bcd_out_o, .num_o, .roundtrip_ok_o
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  task automatic check_outputs(int n);
    logic [11:0] b = ref_bin2bcd(n);
    logic [9:0]  d = ref_encode(b);
    expect_eq(bcd_in_o  === b,       $sformatf("bcd_in of %0d", n));
    expect_eq(dpd_o     === d,       $sformatf("dpd of %0d", n));
    expect_eq(bcd_out_o === b,       $sformatf("bcd_out of %0d", n));
    expect_eq(int'(num_o) == n,      $sformatf("num_o of %0d", n));
    expect_eq(roundtrip_ok_o === 1'b1, $sformatf("roundtrip flag of %0d", n));
  endtask

  // Load n, then run one enabled cycle; checks the two-edge latency.
  task automatic run_number(int n);
    int t0;
    @(negedge clk);
    num_i = 10'(n); load = 1'b1; enable = 1'b0;
    @(posedge clk);
    n_load++;
    @(negedge clk);
    t0 = cycles;
    load = 1'b0; enable = 1'b1;
    expect_eq(int'(num_q_o) == n, $sformatf("number register holds %0d", n));
    @(posedge clk);
    @(negedge clk);
    enable = 1'b0;
    expect_eq(cycles - t0 == 1, "result one edge after load");
    check_outputs(n);
    layout_seen[{b_msb(n, 2), b_msb(n, 1), b_msb(n, 0)}]++;
  endtask

  function automatic logic b_msb(int n, int digit);
    logic [11:0] b = ref_bin2bcd(n);
    return b[4 * digit + 3];
  endfunction

  initial begin
    rst = 1'b1; load = 1'b0; enable = 1'b0; num_i = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n_reset++;
    expect_eq(num_q_o == '0 && dpd_o == '0 && num_o == '0, "reset clears registers");

    // Board example: 80.
    run_number(80);
    expect_eq(dpd_o === 10'b000_000_1010, "declet of 80");

    // Every three-digit number.
    for (int n = 0; n <= 999; n++) run_number(n);

    // Hold: load another number with enable low; results must not change.
    @(negedge clk);
    num_i = 10'd555; load = 1'b1; enable = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) load = 1'b0;
    n_hold++;
    check_outputs(999);
    expect_eq(int'(num_q_o) == 555, "number register loaded while results hold");

    // Load and enable together: results follow one edge after the number register.
    @(negedge clk) enable = 1'b1;
    @(posedge clk);
    @(negedge clk) enable = 1'b0;
    check_outputs(555);
    expect_eq(dpd_o === 10'b101_101_0101, "declet of 555");

    // Reset in the middle of operation.
    @(negedge clk) rst = 1'b1;
    @(posedge clk);
    @(negedge clk) rst = 1'b0;
    n_reset++;
    expect_eq(num_q_o == '0 && dpd_o == '0 && bcd_out_o == '0 && num_o == '0 &&
              roundtrip_ok_o == 1'b0, "reset clears registers after use");

    $display("loads=%0d holds=%0d resets=%0d", n_load, n_hold, n_reset);
    expect_eq(n_load > 0, "load happened");
    expect_eq(n_hold > 0, "hold happened");
    expect_eq(n_reset > 1, "reset happened");
    for (int l = 0; l < 8; l++) begin
      $display("layout aei=%03b seen %0d times", 3'(l), layout_seen[l]);
      expect_eq(layout_seen[l] > 0, $sformatf("layout %03b exercised", 3'(l)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
