// tb_ps2_data_enable: checks that each falling edge of the keyboard clock is
// followed by exactly one sample strobe 1250 system clocks (25 us at 50 MHz)
// later, that a new falling edge restarts the delay, and that rising edges and
// a steady clock give no strobe.
`timescale 1ns/1ps
module tb_ps2_data_enable;
  logic clk = 1'b0, rst = 1'b1, ps2_clk = 1'b1;
  logic data_en;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  ps2_data_enable dut (.clk, .rst, .ps2_clk, .data_en);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Drop the clock, then count edges until the strobe; total run 'len' cycles.
  task automatic fall_and_measure(int high_after, int len, int expect_at);
    int at = -1, n = 0;
    @(negedge clk) ps2_clk = 1'b0;
    for (int t = 1; t <= len; t++) begin
      @(posedge clk); #1;
      if (t == high_after) ps2_clk = 1'b1;
      if (data_en) begin n++; at = t; end
    end
    check(n == (expect_at > 0 ? 1 : 0), $sformatf("%0d strobes", n));
    check(at == expect_at, $sformatf("strobe after %0d clocks, exp %0d", at, expect_at));
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    repeat (5) @(posedge clk);
    // clock low 2000 cycles, high after
    fall_and_measure(2000, 4000, 1250);
    // short low pulse: the strobe still comes 1250 after the fall
    fall_and_measure(10, 3000, 1250);
    // second fall 600 cycles after the first: only one strobe, 1250 after it
    @(negedge clk) ps2_clk = 1'b0;
    repeat (300) @(posedge clk);
    @(negedge clk) ps2_clk = 1'b1;
    repeat (300) @(posedge clk);
    #1 check(!data_en, "no strobe yet");
    fall_and_measure(2000, 4000, 1250);
    // nothing happens while the clock stays high
    begin
      int n = 0;
      repeat (5000) begin @(posedge clk); #1; if (data_en) n++; end
      check(n == 0, "strobe with idle clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
