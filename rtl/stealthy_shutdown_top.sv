// Stealthy-shutdown attacker circuit -- top level.
//
// A malicious tenant on a shared FPGA cannot draw enough power on its own to
// trip the board regulator without being noticed. It can, however, watch the
// shared core supply (VCCINT) with ring-oscillator sensors and add a small
// load exactly when the other tenants' work has already pulled the supply
// down near its critical point; the regulator's under-voltage protection then
// cuts power to the whole chip. This top level wires the parts of that
// circuit together:
//   NUM_SENSORS x (ro_sensor -> ro_counter)   RO voltage sensors, 32-bit counts
//   sensor_window                             50 us windows, C_RO capture
//   attack_controller                         calibrate / monitor / inject, or sweep
//   pw_array                                  NUM_PW_CELLS power-wasting cells
//
// Everything outside the attacker's region -- the board regulator and its
// output capacitors, the victim tenants -- is outside this module: the
// sensors' supply arrives on vccint_mv and the power-wasting enables leave on
// pw_cell_en, so a board model can close the loop. Sensor count (41) and
// counter width (32) follow the design; the other defaults are explained in
// the sub-blocks.
//
// Interface: clk/rst_n (system clock, active-low synchronous reset), start,
// halt, mode, sensor_sel (controller commands), vccint_mv (supply in mV);
// c_ro/c_ro_valid (every sensor's count per window), controller status
// (pw_level is the number of cells the next attack trial will enable), and
// pw_active_cells/pw_cell_en (the injected load). One window takes
// WINDOW_CYCLES + SETTLE_CYCLES + 3 clock cycles.
`timescale 1ps/1ps
module stealthy_shutdown_top
  import ssd_pkg::*;
#(
  parameter int unsigned NUM_SENSORS       = 41,
  parameter int unsigned NUM_PW_CELLS      = 1268,
  parameter int unsigned WINDOW_CYCLES     = 5000,
  parameter int unsigned SETTLE_CYCLES     = 4,
  parameter int unsigned CAL_WINDOWS       = 64,
  parameter int unsigned THR_SHIFT         = 3,
  parameter int unsigned INJECT_WINDOWS    = 1,
  parameter int unsigned COARSE_STEPS      = 5,
  parameter int unsigned COARSE_STEP_CELLS = 380,
  parameter int unsigned FINE_STEP_CELLS   = 48,
  parameter int unsigned STEP_WINDOWS      = 4,
  localparam int unsigned LVL_W            = $clog2(NUM_PW_CELLS + 1),
  localparam int unsigned SEL_W            = (NUM_SENSORS > 1) ? $clog2(NUM_SENSORS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              halt,
  input  run_mode_e         mode,
  input  logic [SEL_W-1:0]  sensor_sel,
  input  logic [15:0]       vccint_mv,
  output logic [CRO_W-1:0]  c_ro [NUM_SENSORS],
  output logic              c_ro_valid,
  output ctrl_state_e       state,
  output logic [CRO_W-1:0]  threshold,
  output logic [CRO_W-1:0]  cal_min,
  output logic [CRO_W-1:0]  cal_max,
  output logic [15:0]       trials,
  output logic [7:0]        sweep_step,
  output logic [LVL_W-1:0]  pw_level,
  output logic [LVL_W-1:0]  pw_active_cells,
  output logic [NUM_PW_CELLS-1:0] pw_cell_en
);

  logic             sensor_en, cnt_clr, run;
  logic             ro_out [NUM_SENSORS];
  logic [CRO_W-1:0] counts [NUM_SENSORS];

  for (genvar s = 0; s < NUM_SENSORS; s++) begin : g_sensor
    ro_sensor  u_ro  (.en(sensor_en), .vccint_mv(vccint_mv), .ro_out(ro_out[s]));
    ro_counter #(.CNT_W(CRO_W)) u_cnt (.ro_clk(ro_out[s]), .clr(cnt_clr), .count(counts[s]));
  end

  sensor_window #(
    .NUM_SENSORS(NUM_SENSORS), .CNT_W(CRO_W),
    .WINDOW_CYCLES(WINDOW_CYCLES), .SETTLE_CYCLES(SETTLE_CYCLES)
  ) u_window (
    .clk, .rst_n, .run, .counts,
    .sensor_en, .cnt_clr, .c_ro, .c_ro_valid
  );

  attack_controller #(
    .NUM_SENSORS(NUM_SENSORS), .NUM_PW_CELLS(NUM_PW_CELLS), .CNT_W(CRO_W),
    .CAL_WINDOWS(CAL_WINDOWS), .THR_SHIFT(THR_SHIFT), .INJECT_WINDOWS(INJECT_WINDOWS),
    .COARSE_STEPS(COARSE_STEPS), .COARSE_STEP_CELLS(COARSE_STEP_CELLS),
    .FINE_STEP_CELLS(FINE_STEP_CELLS), .STEP_WINDOWS(STEP_WINDOWS)
  ) u_ctrl (
    .clk, .rst_n, .start, .halt, .mode, .sensor_sel, .c_ro, .c_ro_valid,
    .run, .active_cells(pw_active_cells), .state, .cal_min, .cal_max, .threshold,
    .trials, .level(pw_level), .sweep_step
  );

  pw_array #(.NUM_CELLS(NUM_PW_CELLS)) u_pw (
    .active_cells(pw_active_cells), .cell_en(pw_cell_en)
  );

endmodule
