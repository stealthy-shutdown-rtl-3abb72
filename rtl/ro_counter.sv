// Oscillation counter of one RO sensor (C_RO).
//
// A CNT_W-bit binary up-counter clocked directly by the ring-oscillator
// output; one count per rising edge of the ring. The design places it in the
// DSP block nearest to its sensor, 32 bits wide; here it is plain logic that
// synthesis may map onto a DSP.
//
// Interface: ro_clk (ring output), clr (asynchronous clear, active high),
// count (current value). The clear is asynchronous because the window
// sequencer clears the counter while the ring is stopped, when there is no
// clock to clear it with; that, and wrap-around at 2^CNT_W, are this design's
// choices.
`timescale 1ps/1ps
module ro_counter #(
  parameter int unsigned CNT_W = ssd_pkg::CRO_W
) (
  input  logic             ro_clk,
  input  logic             clr,
  output logic [CNT_W-1:0] count
);

  always_ff @(posedge ro_clk or posedge clr) begin
    if (clr) count <= '0;
    else     count <= count + 1'b1;
  end

endmodule
