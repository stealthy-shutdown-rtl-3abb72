// Self-checking testbench for attack_controller.
//
// Feeds hand-made C_RO windows to a small controller (4 sensors, 100 cells,
// 8 calibration windows, fine step 4, coarse step 15, 2 windows per sweep
// step) and checks, against values worked out here:
//   - calibration min/max of the selected sensor and the threshold
//     min + (max - min) / 8; the other sensors must not matter;
//   - no injection above the threshold, injection of the current level for
//     exactly one window when C_RO drops below it, level growth per trial and
//     saturation at the array size;
//   - halt from any state switching every cell off;
//   - in sweep mode, the level sequence 15, 30, 45, 60, 75 then +4 per step
//     up to 100, and the DONE state.
`timescale 1ps/1ps
module tb_attack_controller;
  import ssd_pkg::*;
  localparam int NS = 4, NC = 100, CAL = 8, FINE = 4, COARSE = 15, STEPW = 2;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, halt = 1'b0;
  run_mode_e mode = MODE_ATTACK;
  logic [1:0]  sensor_sel = 2'd2;
  logic [31:0] c_ro [NS];
  logic        c_ro_valid = 1'b0;
  logic        run;
  logic [6:0]  active_cells, level;
  ctrl_state_e state;
  logic [31:0] cal_min, cal_max, threshold;
  logic [15:0] trials;
  logic [7:0]  sweep_step;
  int checks = 0, failures = 0;

  always #5000 clk = ~clk;

  attack_controller #(.NUM_SENSORS(NS), .NUM_PW_CELLS(NC), .CAL_WINDOWS(CAL), .THR_SHIFT(3),
                      .INJECT_WINDOWS(1), .COARSE_STEPS(5), .COARSE_STEP_CELLS(COARSE),
                      .FINE_STEP_CELLS(FINE), .STEP_WINDOWS(STEPW)) dut (
    .clk, .rst_n, .start, .halt, .mode, .sensor_sel, .c_ro, .c_ro_valid, .run,
    .active_cells, .state, .cal_min, .cal_max, .threshold, .trials, .level, .sweep_step);

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // One window result: selected sensor gets v, the others get noise far away.
  task automatic window(input int v);
    repeat (3) @(posedge clk);
    c_ro[0] <= 32'(v - 500); c_ro[1] <= 32'(v + 700); c_ro[2] <= 32'(v); c_ro[3] <= 32'(5);
    c_ro_valid <= 1'b1;
    @(posedge clk);
    c_ro_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic pulse_start(input run_mode_e m);
    mode <= m; start <= 1'b1; @(posedge clk); start <= 1'b0; @(posedge clk);
  endtask

  int cal_vals [CAL] = '{1000, 1040, 980, 1100, 1010, 900, 1050, 1020};
  int exp_thr, exp_level, exp_trials, exp_active;

  initial begin
    foreach (c_ro[i]) c_ro[i] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    check(state == ST_IDLE && active_cells == 0 && !run, "idle after reset");

    // ---- attack mode ----
    pulse_start(MODE_ATTACK);
    check(state == ST_CALIBRATE && run, "calibrating");
    foreach (cal_vals[i]) begin
      window(cal_vals[i]);
      check(active_cells == 0, "cells off during calibration");
    end
    exp_thr = 900 + ((1100 - 900) >> 3);
    check(cal_min == 900 && cal_max == 1100, $sformatf("cal min/max %0d/%0d", cal_min, cal_max));
    check(threshold == 32'(exp_thr), $sformatf("threshold %0d expected %0d", threshold, exp_thr));
    check(state == ST_MONITOR, "monitoring after calibration");
    window(exp_thr);          // equal: no trigger
    window(950);
    check(state == ST_MONITOR && active_cells == 0, "no trigger above threshold");
    exp_level = FINE; exp_trials = 0;
    for (int t = 0; t < 30; t++) begin
      window(exp_thr - 1 - t);
      exp_trials++;
      check(state == ST_INJECT && int'(active_cells) == exp_level && int'(trials) == exp_trials,
            $sformatf("trial %0d injects %0d cells (got %0d)", t, exp_level, active_cells));
      window(exp_thr - 50);   // injection window ends regardless of value
      check(state == ST_MONITOR && active_cells == 0, "cells off after one injection window");
      exp_level = (exp_level + FINE > NC) ? NC : exp_level + FINE;
      check(int'(level) == exp_level, $sformatf("next level %0d expected %0d", level, exp_level));
      window(exp_thr + 10);   // quiet window
      check(state == ST_MONITOR, "back to monitor");
    end
    check(int'(level) == NC, "level saturates at the array size");
    window(0);
    check(state == ST_INJECT && int'(active_cells) == NC, "inject full array");
    halt <= 1'b1; @(posedge clk); halt <= 1'b0; @(posedge clk);
    check(state == ST_IDLE && active_cells == 0 && !run, "halt clears injection");

    // ---- sweep mode ----
    pulse_start(MODE_SWEEP);
    exp_active = COARSE;
    for (int step = 1; step < 40; step++) begin
      check(state == ST_SWEEP && int'(active_cells) == exp_active,
            $sformatf("sweep step %0d: %0d cells expected %0d", step, active_cells, exp_active));
      check(int'(sweep_step) == step, "sweep step counter");
      repeat (STEPW) window(1000);
      if (exp_active == NC) break;
      exp_active = exp_active + ((step < 5) ? COARSE : FINE);
      if (exp_active > NC) exp_active = NC;
    end
    check(state == ST_DONE && int'(active_cells) == NC && run, "sweep done with all cells on");
    halt <= 1'b1; @(posedge clk); halt <= 1'b0; @(posedge clk);
    check(state == ST_IDLE && active_cells == 0, "halt after sweep");
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
