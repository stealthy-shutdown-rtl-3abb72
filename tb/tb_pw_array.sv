// Self-checking testbench for pw_array.
//
// For several requested counts on a 20-cell array, checks that exactly the
// cells 0..n-1 are enabled and that those cells oscillate while the others
// stay quiet (the LUT outputs are read inside the array).
`timescale 1ps/1ps
module tb_pw_array;
  localparam int N = 20;
  logic [4:0]   active_cells = '0;
  logic [N-1:0] cell_en;
  int checks = 0, failures = 0;
  int toggles [N];
  logic [3:0] oscv [N];   // LUT outputs of each cell, read inside the array

  pw_array #(.NUM_CELLS(N)) dut (.active_cells(active_cells), .cell_en(cell_en));

  for (genvar c = 0; c < N; c++) begin : g_mon
    assign oscv[c] = dut.g_cell[c].osc;
    always @(oscv[c][0]) toggles[c]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  int req [5] = '{0, 1, 7, 20, 3};

  initial begin
    #2000;
    foreach (req[k]) begin
      active_cells = 5'(req[k]);
      #5000;
      foreach (toggles[c]) toggles[c] = 0;
      #20_000;
      for (int c = 0; c < N; c++) begin
        check(cell_en[c] == (c < req[k]), $sformatf("enable of cell %0d for n=%0d", c, req[k]));
        if (c < req[k]) check(toggles[c] >= 19, $sformatf("cell %0d oscillates (n=%0d)", c, req[k]));
        else            check(toggles[c] == 0 && oscv[c] == 4'hF, $sformatf("cell %0d quiet (n=%0d)", c, req[k]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
