// End-to-end testbench for stealthy_shutdown_top at reduced size.
//
// The attacker circuit (4 sensors, 40 power-wasting cells, 2 us windows, 16
// calibration windows) is closed in a loop with pdn_model: the board supply
// sags with the victim's load plus the enabled power-wasting cells, the
// sensors see that supply, and the supply cuts out for good at 0.91 V. The
// victim (a miner that works in bursts) is a load of 10% of the slices that
// rises to 17.4% for three windows out of every eight. Each of the 40 cells
// is 1/800 of the slices, so the whole array is 5%: enough to shut the board
// down only at a victim peak and only with every cell on.
//
// Phase 1, attack: calibration, monitoring, triggers at the victim's peaks,
// injections that fail and raise the level, the level saturating at the
// array size, and finally the shutdown while cells are injected at a victim
// peak. Phase 2, sweep with the victim steady at 15%: the coarse steps, the fine
// steps and DONE without shutdown; C_RO must fall as cells are added.
// (The victim runs at 15% here so that the cells move the supply visibly.)
// Phase 3, sweep with the victim at its peak: the board must shut down at the
// first level whose total load reaches 22% (38 cells here, worked out below).
// Throughout, each window's C_RO is compared with the count the sensor law
// predicts for the supply during that window, the window period is checked
// (WINDOW+SETTLE+3 cycles), and every mechanism must occur at least once.
`timescale 1ps/1ps
module tb_stealthy_shutdown_top;
  import ssd_pkg::*;
  localparam int NS = 4, NC = 40, W = 200, SETTLE = 4, CAL = 16, COARSE = 6, FINE = 4, STEPW = 2;
  localparam int SLICES = 800, CELL_MBP = 10_000_000 / SLICES;   // 12.5 bp per cell
  localparam int PERIOD = W + SETTLE + 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, halt = 1'b0, por_n = 1'b0;
  run_mode_e mode = MODE_ATTACK;
  logic [1:0]  sensor_sel = 2'd1;
  logic [15:0] vccint_mv, victim_bp;
  logic [31:0] c_ro [NS];
  logic        c_ro_valid;
  ctrl_state_e state;
  logic [31:0] threshold, cal_min, cal_max;
  logic [15:0] trials;
  logic [7:0]  sweep_step;
  logic [5:0]  pw_level, pw_active_cells;
  logic [NC-1:0] pw_cell_en;
  logic        shutdown;
  int          load_bp;

  int checks = 0, failures = 0;
  int cycle = 0, last_valid = -1, wnum = 0;
  int victim_mode = 0;          // 0 bursty, 1 idle, 2 constant peak
  int v_window = 0;             // supply during the running window
  int skip_win = 0;             // windows not to check after a halt
  ctrl_state_e prev_state = ST_IDLE;
  logic [5:0]  prev_level = '0;
  // mechanism counters
  int n_cal = 0, n_trigger = 0, n_fail = 0, n_sat = 0, n_shutdown_attack = 0,
      n_coarse = 0, n_fine = 0, n_done = 0, n_halt = 0, n_shutdown_sweep = 0;

  always #5000 clk = ~clk;
  always @(posedge clk) cycle++;

  stealthy_shutdown_top #(
    .NUM_SENSORS(NS), .NUM_PW_CELLS(NC), .WINDOW_CYCLES(W), .SETTLE_CYCLES(SETTLE),
    .CAL_WINDOWS(CAL), .THR_SHIFT(3), .INJECT_WINDOWS(1), .COARSE_STEPS(5),
    .COARSE_STEP_CELLS(COARSE), .FINE_STEP_CELLS(FINE), .STEP_WINDOWS(STEPW)
  ) dut (
    .clk, .rst_n, .start, .halt, .mode, .sensor_sel, .vccint_mv,
    .c_ro, .c_ro_valid, .state, .threshold, .cal_min, .cal_max, .trials, .sweep_step,
    .pw_level, .pw_active_cells, .pw_cell_en);

  pdn_model #(.N_CELLS(NC), .CELL_MBP(CELL_MBP)) u_pdn (
    .clk, .por_n, .victim_bp, .pw_cell_en, .vccint_mv, .shutdown, .load_bp);

  always_comb begin
    unique case (victim_mode)
      0:       victim_bp = ((wnum % 8) >= 5) ? 16'd1740 : 16'd1000;
      1:       victim_bp = 16'd1500;
      default: victim_bp = 16'd1740;
    endcase
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0d: %s", cycle, msg); end
  endtask

  // Expected count of one window from the sensor's straight-line law.
  function automatic int expect_count(input int mv);
    return int'((longint'(530_000 - 1150 * (1000 - mv)) * W) / 100_000);   // f[kHz] * W * 10 ns
  endfunction

  // Supply seen at the start of each window.
  always @(posedge dut.sensor_en) v_window = int'(vccint_mv);

  always @(posedge clk) if (rst_n && c_ro_valid) begin
    wnum <= wnum + 1;
    if (skip_win > 0) skip_win--;       // supply changed inside this window
    else if (!shutdown) begin
      if (last_valid >= 0) check(cycle - last_valid == PERIOD, $sformatf("window period %0d", cycle - last_valid));
      for (int s = 0; s < NS; s++) begin
        int e;
        e = expect_count(v_window);
        check(int'(c_ro[s]) * 1000 > e * 985 && int'(c_ro[s]) * 1000 < e * 1015,
              $sformatf("sensor %0d C_RO %0d, expected ~%0d at %0d mV", s, c_ro[s], e, v_window));
      end
    end
    last_valid = cycle;
  end

  always @(posedge clk) if (rst_n) begin
    if (prev_state == ST_CALIBRATE && state == ST_MONITOR) n_cal++;
    if (prev_state == ST_MONITOR && state == ST_INJECT) n_trigger++;
    if (prev_state == ST_INJECT && state == ST_MONITOR && !shutdown) begin
      n_fail++;
      if (int'(pw_level) == NC && int'(prev_level) == NC) n_sat++;
    end
    prev_level <= pw_level;
    if ((state == ST_CALIBRATE || state == ST_MONITOR) && pw_active_cells != 0)
      check(0, "cells on outside injection");
    prev_state <= state;
  end

  int sweep_cro [int];
  int exp_lvl, sd_level;

  initial begin
    repeat (3) @(posedge clk);
    por_n = 1'b1;
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // ---------------- phase 1: stealthy attack ----------------
    mode <= MODE_ATTACK; start <= 1'b1; @(posedge clk); start <= 1'b0;
    wait (shutdown || wnum > 400);
    @(posedge clk);
    check(shutdown, "attack shut the board down");
    if (shutdown) n_shutdown_attack++;
    check(state == ST_INJECT && pw_active_cells != 0, "shutdown happened during an injection");
    check(victim_bp == 16'd1740, "shutdown happened at a victim peak");
    check(n_fail >= 1, "at least one trial failed before success");
    check(int'(pw_active_cells) * CELL_MBP / 1000 < 1000, "attacker load below 10% of slices");
    check(threshold > cal_min && threshold < cal_max, "threshold inside the calibrated range");
    $display("attack: %0d trials, %0d cells at shutdown, threshold %0d (min %0d max %0d)",
             trials, pw_active_cells, threshold, cal_min, cal_max);

    // ---------------- phase 2: sweep, victim at 15% ----------------
    halt <= 1'b1; skip_win = 1; @(posedge clk); halt <= 1'b0; @(posedge clk);
    if (state == ST_IDLE && pw_active_cells == 0) n_halt++;
    repeat (2 * PERIOD) @(posedge clk);   // let the running window finish
    victim_mode = 1;
    rst_n = 1'b0; por_n = 1'b0; last_valid = -1;
    repeat (2) @(posedge clk);
    rst_n = 1'b1; por_n = 1'b1;
    @(posedge clk);
    mode <= MODE_SWEEP; start <= 1'b1; @(posedge clk); start <= 1'b0;
    exp_lvl = COARSE;
    while (state != ST_DONE && !shutdown && wnum < 2000) begin
      @(posedge clk);
      if (c_ro_valid && state == ST_SWEEP) begin
        check(int'(pw_active_cells) == exp_lvl, $sformatf("sweep level %0d expected %0d", pw_active_cells, exp_lvl));
        sweep_cro[int'(pw_active_cells)] = int'(c_ro[1]);
      end
      if (state == ST_SWEEP && int'(pw_active_cells) != exp_lvl) begin
        if (int'(pw_active_cells) - exp_lvl == COARSE) n_coarse++;
        if (int'(pw_active_cells) - exp_lvl == FINE)   n_fine++;
        exp_lvl = int'(pw_active_cells);
      end
    end
    @(posedge clk);
    check(!shutdown && state == ST_DONE && pw_active_cells == 6'(NC), "sweep without enough load reaches DONE");
    if (state == ST_DONE) n_done++;
    begin
      int prev = 1 << 30;
      foreach (sweep_cro[l]) begin
        check(sweep_cro[l] <= prev, $sformatf("C_RO does not rise as cells are added (%0d cells: %0d)", l, sweep_cro[l]));
        prev = sweep_cro[l];
      end
      check(sweep_cro[NC] + 50 < sweep_cro[COARSE], "all cells on lowers C_RO clearly");
    end

    // ---------------- phase 3: sweep, victim at peak ----------------
    // first sweep level whose load reaches 22% (2200 bp): 1740 + n * 12.5 >= 2200
    sd_level = 0;
    for (int l = COARSE, st = 1; l <= NC; l += (st < 5 ? COARSE : FINE), st++)
      if (sd_level == 0 && 1740 + l * CELL_MBP / 1000 >= 2200) sd_level = l;
    halt <= 1'b1; skip_win = 1; @(posedge clk); halt <= 1'b0; @(posedge clk);
    if (state == ST_IDLE && pw_active_cells == 0) n_halt++;
    repeat (2 * PERIOD) @(posedge clk);
    last_valid = -1;
    victim_mode = 2;
    @(posedge clk);
    mode <= MODE_SWEEP; start <= 1'b1; @(posedge clk); start <= 1'b0;
    wait (shutdown || state == ST_DONE);
    @(posedge clk);
    check(shutdown, "sweep with busy victim shuts down");
    if (shutdown) n_shutdown_sweep++;
    check(int'(pw_active_cells) == sd_level, $sformatf("shutdown at %0d cells, expected %0d", pw_active_cells, sd_level));

    $display("mechanisms: calibration=%0d trigger=%0d failed_trial=%0d level_saturated=%0d attack_shutdown=%0d",
             n_cal, n_trigger, n_fail, n_sat, n_shutdown_attack);
    $display("            sweep_coarse=%0d sweep_fine=%0d sweep_done=%0d halt=%0d sweep_shutdown=%0d",
             n_coarse, n_fine, n_done, n_halt, n_shutdown_sweep);
    check(n_cal > 0, "calibration completed");
    check(n_trigger > 0, "trigger happened");
    check(n_fail > 0, "failed trial happened");
    check(n_sat > 0, "level saturation happened");
    check(n_shutdown_attack > 0, "attack shutdown happened");
    check(n_coarse > 0, "coarse sweep step happened");
    check(n_fine > 0, "fine sweep step happened");
    check(n_done > 0, "sweep DONE happened");
    check(n_halt > 0, "halt happened");
    check(n_shutdown_sweep > 0, "sweep shutdown happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20_000_000_000;   // 20 ms
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
