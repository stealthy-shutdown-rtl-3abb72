// Ring-oscillator voltage sensor -- behavioural model.
//
// A four-stage ring (three inverters and one buffer) fits in one FPGA slice.
// Its frequency depends on the core supply, so the number of oscillations a
// counter records in a fixed window tracks VCCINT. This model is not
// synthesizable: the real sensor is a combinational loop placed by hand, and
// its delay comes from the silicon. The model gives each stage a delay
// computed from the supply input, so the ring runs at
//   f = F_REF_KHZ - SLOPE_KHZ_PER_MV * (V_REF_MV - vccint_mv)   [kHz],
// a straight line, as measured for these sensors at constant temperature.
// The default line passes through about 26,500 counts per 50 us at 1.0 V and
// 15,000 at 0.8 V. Temperature effects are not modelled.
//
// The first inverter is a NAND gated by `en` (this design's choice; the ring
// itself has no enable pin in its usual drawing). With en low every node is
// static: n0=1, n1=0, n2=1, n3=1 and ro_out stays 1.
//
// Interface: en (start/stop), vccint_mv (supply in mV, sampled at every stage
// transition), ro_out (ring output, used as the counter clock). The stage
// delay is computed at run time and is never zero (the frequency is clamped
// to at least 1 MHz), although a lint tool cannot prove that statically. Period is
// 8 stage delays; a change of vccint_mv takes effect on the next transition.
`timescale 1ps/1ps
module ro_sensor #(
  parameter int unsigned F_REF_KHZ        = 530_000,
  parameter int unsigned SLOPE_KHZ_PER_MV = 1_150,
  parameter int unsigned V_REF_MV         = 1_000
) (
  input  logic        en,
  input  logic [15:0] vccint_mv,
  output logic        ro_out
);

  logic n0, n1, n2, n3;
  initial begin n0 = 1'b1; n1 = 1'b0; n2 = 1'b1; n3 = 1'b1; end
  int unsigned stage_ps;

  // Stage delay in ps from the linear frequency law: period = 8 stages.
  function automatic int unsigned delay_ps(input logic [15:0] mv);
    longint f_khz;
    f_khz = longint'(F_REF_KHZ) - longint'(SLOPE_KHZ_PER_MV) * (longint'(V_REF_MV) - longint'(mv));
    if (f_khz < 1000) f_khz = 1000;               // below ~1 MHz the ring is treated as 1 MHz
    return 32'(longint'(1_000_000_000) / (8 * f_khz));
  endfunction

  always_comb stage_ps = delay_ps(vccint_mv);

  always @(en, n3) n0 <= #(stage_ps) ~(en & n3);   // inverter 1 (gated)
  always @(n0)     n1 <= #(stage_ps) ~n0;          // inverter 2
  always @(n1)     n2 <= #(stage_ps) ~n1;          // inverter 3
  always @(n2)     n3 <= #(stage_ps) n2;           // buffer

  assign ro_out = n3;

endmodule
