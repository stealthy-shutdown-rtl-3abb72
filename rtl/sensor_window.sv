// Measurement-window sequencer for the RO sensors.
//
// C_RO is the number of ring oscillations counted in a fixed window of 50 us.
// This block produces that window for all sensors at once and brings the
// counts into the system clock domain. One window runs through four phases:
//   CLEAR   2 cycles      cnt_clr=1, rings stopped: every counter goes to 0
//   RUN     WINDOW_CYCLES sensor_en=1: rings oscillate, counters count
//   SETTLE  SETTLE_CYCLES sensor_en=0: last ring edges die out
//   CAPTURE 1 cycle       counts copied to c_ro, c_ro_valid pulses
// and starts again while `run` is high. sensor_en and cnt_clr are driven by
// flip-flops so that the asynchronous clear of the counters cannot glitch;
// a lint tool reports cnt_clr as used both synchronously and asynchronously,
// which is exactly this arrangement. A new c_ro therefore arrives every
// WINDOW_CYCLES+SETTLE_CYCLES+3 cycles. The counters are read only while
// their rings are stopped, so the values are static and need no synchroniser
// or Gray code -- this design's choice for the clock-domain crossing, paid
// for with a short gap between windows. The 50 us window length follows the
// design; the 5000-cycle default assumes a 100 MHz system clock.
//
// Interface: clk, rst_n (active-low synchronous reset), run, counts[i] from
// the counters; sensor_en, cnt_clr to the sensors and counters; c_ro[i] and
// the one-cycle c_ro_valid strobe to the controller.
`timescale 1ps/1ps
module sensor_window #(
  parameter int unsigned NUM_SENSORS   = 41,
  parameter int unsigned CNT_W         = ssd_pkg::CRO_W,
  parameter int unsigned WINDOW_CYCLES = 5000,
  parameter int unsigned SETTLE_CYCLES = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             run,
  input  logic [CNT_W-1:0] counts [NUM_SENSORS],
  output logic             sensor_en,
  output logic             cnt_clr,
  output logic [CNT_W-1:0] c_ro   [NUM_SENSORS],
  output logic             c_ro_valid
);

  localparam int unsigned CLEAR_CYCLES = 2;
  localparam int unsigned TMR_W = $clog2(WINDOW_CYCLES + SETTLE_CYCLES + CLEAR_CYCLES + 1);

  typedef enum logic [2:0] {W_IDLE, W_CLEAR, W_RUN, W_SETTLE, W_CAPTURE} win_state_e;

  win_state_e       state;
  logic [TMR_W-1:0] timer;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state      <= W_IDLE;
      timer      <= '0;
      sensor_en  <= 1'b0;
      cnt_clr    <= 1'b1;
      c_ro_valid <= 1'b0;
      for (int i = 0; i < NUM_SENSORS; i++) c_ro[i] <= '0;
    end else begin
      c_ro_valid <= 1'b0;
      unique case (state)
        W_IDLE: if (run) begin
          state <= W_CLEAR;
          timer <= TMR_W'(CLEAR_CYCLES - 1);
        end
        W_CLEAR: if (timer == 0) begin
          state     <= W_RUN;
          sensor_en <= 1'b1;
          cnt_clr   <= 1'b0;
          timer <= TMR_W'(WINDOW_CYCLES - 1);
        end else timer <= timer - 1'b1;
        W_RUN: if (timer == 0) begin
          state     <= W_SETTLE;
          sensor_en <= 1'b0;
          timer <= TMR_W'(SETTLE_CYCLES - 1);
        end else timer <= timer - 1'b1;
        W_SETTLE: if (timer == 0) state <= W_CAPTURE;
                  else            timer <= timer - 1'b1;
        W_CAPTURE: begin
          for (int i = 0; i < NUM_SENSORS; i++) c_ro[i] <= counts[i];
          c_ro_valid <= 1'b1;
          cnt_clr    <= 1'b1;
          if (run) begin
            state <= W_CLEAR;
            timer <= TMR_W'(CLEAR_CYCLES - 1);
          end else state <= W_IDLE;
        end
        default: state <= W_IDLE;
      endcase
    end
  end


  initial begin
    assert (WINDOW_CYCLES >= 1 && SETTLE_CYCLES >= 1)
      else $error("sensor_window: WINDOW_CYCLES and SETTLE_CYCLES must be at least 1");
  end

endmodule
