// Self-checking testbench for ro_sensor (behavioural RO voltage sensor).
//
// Runs the sensor for 50 us windows at several supply voltages and counts the
// rising edges of its output. The expected count comes from the straight-line
// law the sensor is built on, 26,500 counts per 50 us at 1.0 V falling by
// 57.5 counts per mV, worked out here with real arithmetic; the model rounds
// its stage delay to whole picoseconds, so a 1% tolerance is allowed. Also
// checks that the count falls as the voltage falls and that a disabled ring
// holds its output at 1 without toggling.
`timescale 1ps/1ps
module tb_ro_sensor;
  logic        en = 1'b0;
  logic [15:0] vccint_mv = 16'd1000;
  logic        ro_out;
  int checks = 0, failures = 0;
  int edges = 0;

  ro_sensor dut (.en(en), .vccint_mv(vccint_mv), .ro_out(ro_out));

  always @(posedge ro_out) edges++;

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic window(input int mv, output int n);
    vccint_mv = 16'(mv);
    #10_000;
    edges = 0;
    en = 1'b1;
    #50_000_000;   // 50 us
    en = 1'b0;
    #10_000;
    n = edges;
  endtask

  int volts [5] = '{1000, 980, 950, 900, 800};
  int n, prev;
  real expect_c;

  initial begin
    // disabled ring is static
    edges = 0;
    #2_000_000;
    check(edges == 0 && ro_out == 1'b1, "disabled ring must not oscillate");
    prev = 1 << 30;
    foreach (volts[i]) begin
      window(volts[i], n);
      expect_c = 26500.0 - 57.5 * (1000 - volts[i]);
      $display("V=%0d mV  C_RO=%0d  expected~%0.0f", volts[i], n, expect_c);
      check(n > expect_c * 0.99 && n < expect_c * 1.01, $sformatf("count at %0d mV", volts[i]));
      check(n < prev, "count must fall with the supply");
      prev = n;
    end
    // frozen again after the last window
    edges = 0;
    #1_000_000;
    check(edges == 0 && ro_out == 1'b1, "ring stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
