// Array of power-wasting cells with a thermometer-coded enable.
//
// The attack adds load to the shared core supply by switching on a chosen
// number of power-wasting cells. The controller gives that number,
// active_cells; this block turns it into one enable per cell, cell i being on
// when i < active_cells, so cells are always added and removed from the top
// of the list (the order is this design's choice). The enables are
// combinational from active_cells, which the controller registers.
//
// Interface: active_cells (0..NUM_CELLS), cell_en[NUM_CELLS] (the enables,
// brought out so that a board model can see the load). The LUT outputs of the
// cells carry no data and stay inside (g_cell[i].osc); a simulator may drop
// them as unused, which does not change the enables. Default NUM_CELLS = 1268, 8% of the 15,850 slices of an
// XC7A100T, the largest share the attack needed on any of the boards.
`timescale 1ps/1ps
module pw_array #(
  parameter int unsigned NUM_CELLS = 1268,
  localparam int unsigned CNT_W    = $clog2(NUM_CELLS + 1)
) (
  input  logic [CNT_W-1:0] active_cells,
  output logic [NUM_CELLS-1:0] cell_en
);

  for (genvar c = 0; c < NUM_CELLS; c++) begin : g_cell
    assign cell_en[c] = (CNT_W'(c) < active_cells);
    logic [3:0] osc;   // the four LUT outputs: load only, no data
    pw_cell #(.LUTS(4)) u_cell (.enable(cell_en[c]), .osc(osc));
  end

endmodule
