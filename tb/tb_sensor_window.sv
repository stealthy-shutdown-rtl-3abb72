// Self-checking testbench for sensor_window.
//
// Three ro_counter instances are clocked by pulse generators of different
// periods that run only while sensor_en is high, as rings would. For each
// window the testbench counts the pulses it generated itself and checks that
// c_ro reports exactly those counts, that the count is close to
// WINDOW_CYCLES * 10 ns / period, that sensor_en stays high for exactly
// WINDOW_CYCLES cycles, that sensor_en and cnt_clr are never high together,
// and that c_ro_valid arrives every WINDOW_CYCLES + SETTLE_CYCLES + 3 cycles.
// Dropping `run` must stop the windows after the current one.
`timescale 1ps/1ps
module tb_sensor_window;
  localparam int NS = 3, W = 50, SETTLE = 4, PERIOD = W + SETTLE + 3;
  localparam int PER_PS [NS] = '{2000, 3300, 7100};

  logic clk = 1'b0, rst_n = 1'b0, run = 1'b0;
  logic [31:0] counts [NS];
  logic [31:0] c_ro   [NS];
  logic sensor_en, cnt_clr, c_ro_valid;
  logic ring [NS];
  int gen [NS];
  int checks = 0, failures = 0;
  int cycle = 0, last_valid = -1, en_len = 0, windows = 0;

  always #5000 clk = ~clk;   // 100 MHz
  always @(posedge clk) cycle++;

  sensor_window #(.NUM_SENSORS(NS), .WINDOW_CYCLES(W), .SETTLE_CYCLES(SETTLE)) dut (
    .clk, .rst_n, .run, .counts, .sensor_en, .cnt_clr, .c_ro, .c_ro_valid);

  for (genvar s = 0; s < NS; s++) begin : g_ring
    initial ring[s] = 1'b0;
    always begin
      #(PER_PS[s] / 2);
      if (sensor_en) ring[s] = ~ring[s];
      else if (ring[s]) ring[s] = 1'b0;
    end
    always @(posedge ring[s]) if (sensor_en) gen[s]++;
    always @(posedge sensor_en) gen[s] = 0;
    ro_counter u_cnt (.ro_clk(ring[s]), .clr(cnt_clr), .count(counts[s]));
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (sensor_en && cnt_clr) check(0, "sensor_en and cnt_clr together");
    if (sensor_en) en_len++;
    if (c_ro_valid) begin
      windows++;
      check(en_len == W, $sformatf("sensor_en high for %0d cycles", en_len));
      en_len = 0;
      if (last_valid >= 0) check(cycle - last_valid == PERIOD, $sformatf("window period %0d", cycle - last_valid));
      last_valid = cycle;
      for (int s = 0; s < NS; s++) begin
        check(c_ro[s] == 32'(gen[s]), $sformatf("sensor %0d: c_ro %0d vs %0d pulses", s, c_ro[s], gen[s]));
        check(int'(c_ro[s]) >= W * 10000 / PER_PS[s] - 1 && int'(c_ro[s]) <= W * 10000 / PER_PS[s] + 1,
              $sformatf("sensor %0d: count %0d near expected", s, c_ro[s]));
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    check(!sensor_en && !c_ro_valid, "idle after reset");
    run = 1'b1;
    wait (windows == 4);
    run = 1'b0;
    repeat (3 * PERIOD) @(posedge clk);
    check(windows == 5, $sformatf("windows stop after run drops (%0d)", windows));
    check(!sensor_en, "sensors stopped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
