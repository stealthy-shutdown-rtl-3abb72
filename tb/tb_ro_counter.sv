// Self-checking testbench for ro_counter.
//
// Feeds bursts of clock pulses (standing in for a ring oscillator) and checks
// the count, the asynchronous clear (which must act with no clock running),
// and wrap-around on a second, 8-bit instance.
`timescale 1ps/1ps
module tb_ro_counter;
  logic        ro_clk = 1'b0, clr = 1'b0;
  logic [31:0] count;
  logic [7:0]  count8;
  int checks = 0, failures = 0;

  ro_counter                dut  (.ro_clk(ro_clk), .clr(clr), .count(count));
  ro_counter #(.CNT_W(8))   dut8 (.ro_clk(ro_clk), .clr(clr), .count(count8));

  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic pulses(input int n);
    repeat (n) begin #900 ro_clk = 1'b1; #900 ro_clk = 1'b0; end
  endtask

  initial begin
    #500 clr = 1'b1;
    #500;
    check(count == 0 && count8 == 0, "clear while asserted");
    clr = 1'b0;
    #1000;
    pulses(1000);
    #100;
    check(count == 32'd1000, $sformatf("count after 1000 pulses = %0d", count));
    check(count8 == 8'(1000 % 256), $sformatf("8-bit wrap: %0d", count8));
    clr = 1'b1;            // asynchronous: no clock edge needed
    #10;
    check(count == 0 && count8 == 0, "asynchronous clear");
    clr = 1'b0;
    #100;
    pulses(37);
    #100;
    check(count == 32'd37, $sformatf("count after 37 pulses = %0d", count));
    pulses(219);
    #100;
    check(count == 32'd256 && count8 == 8'd0, "count 256 and 8-bit wrap to 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
