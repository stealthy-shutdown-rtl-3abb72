// Shared types and constants of the stealthy-shutdown attack circuit.
//
// The attack circuit measures the core supply with ring-oscillator sensors and
// switches on power-wasting ring oscillators when the supply is already low.
// This package holds the counter width of a sensor (32 bits, as in the
// DSP-based counter the design is built around), the controller's run modes
// and the states of its finite-state machine.
`timescale 1ps/1ps
package ssd_pkg;

  // Width of one RO oscillation counter (C_RO).
  localparam int unsigned CRO_W = 32;

  // Run mode of the attack controller.
  typedef enum logic {
    MODE_ATTACK = 1'b0,   // calibrate, monitor, inject on a low C_RO
    MODE_SWEEP  = 1'b1    // step the active power-wasting cells up, coarse then fine
  } run_mode_e;

  // States of the attack controller.
  typedef enum logic [2:0] {
    ST_IDLE      = 3'd0,  // nothing enabled, waiting for start
    ST_CALIBRATE = 3'd1,  // cells off, profiling min/max of C_RO
    ST_MONITOR   = 3'd2,  // cells off, comparing C_RO with the threshold
    ST_INJECT    = 3'd3,  // cells on for the injection windows
    ST_SWEEP     = 3'd4,  // sweep mode: cells stepped up every few windows
    ST_DONE      = 3'd5   // sweep finished, all cells stay on
  } ctrl_state_e;

endpackage
