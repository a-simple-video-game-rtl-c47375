// tb_clock_divider: checks that the pixel-rate enable is a single-cycle pulse
// every DIV system clocks, for the default DIV = 2 and for DIV = 5.
`timescale 1ns/1ps
module tb_clock_divider;
  logic clk = 1'b0, rst = 1'b1;
  logic ce2, ce5;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  clock_divider           dut2 (.clk, .rst, .pix_ce(ce2));
  clock_divider #(.DIV(5)) dut5 (.clk, .rst, .pix_ce(ce5));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n2 = 0, n5 = 0, last2 = -1, last5 = -1;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 1000; t++) begin
      @(posedge clk); #1;
      if (ce2) begin
        if (last2 >= 0) check(t - last2 == 2, $sformatf("DIV=2 period %0d", t - last2));
        last2 = t; n2++;
      end
      if (ce5) begin
        if (last5 >= 0) check(t - last5 == 5, $sformatf("DIV=5 period %0d", t - last5));
        last5 = t; n5++;
      end
    end
    check(n2 == 500, $sformatf("DIV=2 pulses %0d", n2));
    check(n5 == 200, $sformatf("DIV=5 pulses %0d", n5));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
