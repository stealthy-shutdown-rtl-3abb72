// Full-size testbench for stealthy_shutdown_top (every parameter at its
// default: 41 sensors, 1268 power-wasting cells, 50 us windows at 100 MHz).
//
// One complete sweep operation against pdn_model, with the victim steady at
// 15% of the slices: the controller enables 380 cells (2.4% of an XC7A100T's
// 15,850 slices), then 760, then 1140, four windows each, and the board's
// supply must cut out at the first level whose total load reaches 22%
// (1140 cells, worked out below from the board model). Checks every window's
// period (5007 cycles) and all 41 sensors' C_RO against the sensor law for
// the supply in that window, that C_RO falls from step to step, and the level
// and step number at shutdown. (The attack mode needs 64 calibration windows
// before its first trigger; at full size that is too slow to simulate here,
// so it is covered at reduced size by tb_stealthy_shutdown_top.)
`timescale 1ps/1ps
module tb_stealthy_shutdown_top_full;
  import ssd_pkg::*;
  localparam int NS = 41, NC = 1268, W = 5000, PERIOD = W + 4 + 3;
  localparam int CELL_MBP = 10_000_000 / 15_850;
  localparam int VICTIM = 1500;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, halt = 1'b0, por_n = 1'b0;
  run_mode_e mode = MODE_SWEEP;
  logic [5:0]  sensor_sel = 6'd40;
  logic [15:0] vccint_mv, victim_bp;
  logic [31:0] c_ro [NS];
  logic        c_ro_valid;
  ctrl_state_e state;
  logic [31:0] threshold, cal_min, cal_max;
  logic [15:0] trials;
  logic [7:0]  sweep_step;
  logic [10:0] pw_level, pw_active_cells;
  logic [NC-1:0] pw_cell_en;
  logic        shutdown;
  int          load_bp;

  int checks = 0, failures = 0;
  int cycle = 0, last_valid = -1, wnum = 0, v_window = 0;
  int step_cro [int];
  int sd_level;

  always #5000 clk = ~clk;
  always @(posedge clk) cycle++;

  stealthy_shutdown_top dut (
    .clk, .rst_n, .start, .halt, .mode, .sensor_sel, .vccint_mv,
    .c_ro, .c_ro_valid, .state, .threshold, .cal_min, .cal_max, .trials, .sweep_step,
    .pw_level, .pw_active_cells, .pw_cell_en);

  pdn_model #(.N_CELLS(NC), .CELL_MBP(CELL_MBP)) u_pdn (
    .clk, .por_n, .victim_bp, .pw_cell_en, .vccint_mv, .shutdown, .load_bp);

  assign victim_bp = 16'(VICTIM);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  function automatic int expect_count(input int mv);
    return int'((longint'(530_000 - 1150 * (1000 - mv)) * W) / 100_000);
  endfunction

  always @(posedge dut.sensor_en) v_window = int'(vccint_mv);

  always @(posedge clk) if (rst_n && c_ro_valid && !shutdown) begin
    wnum <= wnum + 1;
    if (last_valid >= 0) check(cycle - last_valid == PERIOD, $sformatf("window period %0d", cycle - last_valid));
    last_valid = cycle;
    for (int s = 0; s < NS; s++) begin
      int e;
      e = expect_count(v_window);
      check(int'(c_ro[s]) * 1000 > e * 990 && int'(c_ro[s]) * 1000 < e * 1010,
            $sformatf("sensor %0d C_RO %0d, expected ~%0d at %0d mV", s, c_ro[s], e, v_window));
    end
    step_cro[int'(pw_active_cells)] = int'(c_ro[40]);
    $display("window %0d: %0d cells, %0d mV, C_RO %0d", wnum, pw_active_cells, v_window, c_ro[40]);
  end

  initial begin
    // first sweep level with 1500 + n * 0.0631 bp >= 2200 bp
    sd_level = 0;
    for (int l = 380, st = 1; l <= NC; l += (st < 5 ? 380 : 48), st++)
      if (sd_level == 0 && VICTIM + l * CELL_MBP / 1000 >= 2200) sd_level = l;
    repeat (3) @(posedge clk);
    por_n = 1'b1;
    rst_n = 1'b1;
    repeat (2) @(posedge clk);
    start <= 1'b1; @(posedge clk); start <= 1'b0;
    @(posedge clk);
    check(state == ST_SWEEP && pw_active_cells == 11'd380 && $countones(pw_cell_en) == 380, "first coarse step: 380 cells");
    wait (shutdown || state == ST_DONE);
    @(posedge clk);
    check(shutdown, "board shuts down during the sweep");
    check(int'(pw_active_cells) == sd_level && sd_level == 1140, $sformatf("shutdown at %0d cells, expected %0d", pw_active_cells, sd_level));
    check(sweep_step == 8'd3, "shutdown on the third coarse step");
    check(wnum == 8, $sformatf("two full steps of four windows before shutdown (%0d)", wnum));
    check(step_cro.exists(380) && step_cro.exists(760) && step_cro[760] + 100 < step_cro[380],
          "C_RO falls as the sweep adds cells");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2_000_000_000;   // 2 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
