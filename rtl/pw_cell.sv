// Power-wasting cell -- behavioural model.
//
// One FPGA slice holding four LUTs, each configured as a two-input NAND whose
// output is fed back to its own input A2, with the shared Enable on input A1.
// With Enable=0 every NAND outputs 1 and nothing moves; with Enable=1 each
// NAND inverts its own output and oscillates, burning dynamic power from the
// core supply. The NAND truth table is the usual one (A1=0 -> 1; A1=1,A2=0 ->
// 1; A1=1,A2=1 -> 0). This is a combinational loop and cannot be written as
// synthesizable RTL; in a real device it is placed as LUT primitives with the
// loop check waived. The gate delay, HALF_PERIOD_PS, is this model's
// assumption (1 ns, i.e. 500 MHz per LUT).
//
// Interface: enable (LUT input A1 of all four LUTs), osc[3:0] (the four NAND
// outputs). Each output toggles every HALF_PERIOD_PS while enable is high.
`timescale 1ps/1ps
module pw_cell #(
  parameter int unsigned LUTS           = 4,
  parameter int unsigned HALF_PERIOD_PS = 1000
) (
  input  logic            enable,
  output logic [LUTS-1:0] osc
);

  logic [LUTS-1:0] q;
  initial q = '1;
  // LUT g is NAND(A1 = enable, A2 = its own output); all four evaluate together.
  always @(enable, q) q <= #(HALF_PERIOD_PS) ~({LUTS{enable}} & q);
  assign osc = q;

endmodule
