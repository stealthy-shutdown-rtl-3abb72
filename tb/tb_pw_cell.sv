// Self-checking testbench for pw_cell (behavioural power-wasting cell).
//
// With Enable low all four NAND outputs must sit at 1. With Enable high each
// output must toggle once per gate delay (1 ns by default): 100 toggles per
// output in 100 ns, give or take one. After Enable falls the outputs must
// return to 1 and stay there.
`timescale 1ps/1ps
module tb_pw_cell;
  logic       enable = 1'b0;
  logic [3:0] osc;
  int checks = 0, failures = 0;
  int toggles [4];

  pw_cell dut (.enable(enable), .osc(osc));

  for (genvar g = 0; g < 4; g++) begin : g_mon
    always @(osc[g]) toggles[g]++;
  end

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #5000;
    foreach (toggles[i]) toggles[i] = 0;
    #20_000;
    check(osc == 4'hF, "outputs are 1 when disabled");
    foreach (toggles[i]) check(toggles[i] == 0, "no toggles when disabled");
    enable = 1'b1;
    #100_000;                 // 100 ns
    foreach (toggles[i]) check(toggles[i] >= 99 && toggles[i] <= 101,
                               $sformatf("LUT %0d toggled %0d times in 100 ns", i, toggles[i]));
    enable = 1'b0;
    #3000;
    check(osc == 4'hF, "outputs return to 1 when disabled");
    foreach (toggles[i]) toggles[i] = 0;
    #20_000;
    foreach (toggles[i]) check(toggles[i] == 0, "quiet after disable");
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
