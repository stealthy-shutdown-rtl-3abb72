// Board power-delivery model for the testbenches (not part of the design).
//
// Stands in for the board's VCCINT regulator, its output capacitors and the
// other tenants. The load on the supply is expressed as a share of the
// device's slices, in basis points (1% = 100 bp): the victim's share arrives
// on victim_bp, and each enabled power-wasting cell adds CELL_MBP
// thousandths of a basis point. The supply follows two straight lines, as
// measured on an Artix-7 board with a feedback regulator:
//   load <= CRIT_BP : V = V_NOM_MV - (V_NOM_MV - V_CRIT_MV) * load / CRIT_BP
//   load >  CRIT_BP : V = V_CRIT_MV - (V_CRIT_MV - V_SD_MV) * (load - CRIT_BP) / (SD_BP - CRIT_BP)
// (1.002 V unloaded, critical point 0.99 V at 17%, shutdown 0.91 V at 22%).
// When the voltage reaches V_SD_MV at a clock edge the regulator's
// under-voltage protection latches off and vccint_mv drops to 0 until
// por_n (the board being power-cycled) is pulled low.
`timescale 1ps/1ps
module pdn_model #(
  parameter int N_CELLS   = 48,
  parameter int CELL_MBP  = 11111,
  parameter int V_NOM_MV  = 1002,
  parameter int V_CRIT_MV = 990,
  parameter int CRIT_BP   = 1700,
  parameter int V_SD_MV   = 910,
  parameter int SD_BP     = 2200
) (
  input  logic               clk,
  input  logic               por_n,
  input  logic [15:0]        victim_bp,
  input  logic [N_CELLS-1:0] pw_cell_en,
  output logic [15:0]        vccint_mv,
  output logic               shutdown,
  output int                 load_bp
);
  int v_on;

  always_comb begin
    load_bp = int'(victim_bp) + ($countones(pw_cell_en) * CELL_MBP) / 1000;
    if (load_bp <= CRIT_BP) v_on = V_NOM_MV - ((V_NOM_MV - V_CRIT_MV) * load_bp) / CRIT_BP;
    else                    v_on = V_CRIT_MV - ((V_CRIT_MV - V_SD_MV) * (load_bp - CRIT_BP)) / (SD_BP - CRIT_BP);
    if (v_on < 0) v_on = 0;
    vccint_mv = shutdown ? 16'd0 : 16'(v_on);
  end

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n)                shutdown <= 1'b0;
    else if (v_on <= V_SD_MV)  shutdown <= 1'b1;
  end
endmodule
