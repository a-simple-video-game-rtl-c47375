// tb_h_counter: runs the horizontal counter at full default size (800-pixel
// lines) with the enable high every other cycle and compares count, line end
// and sync with a reference built from the 640x480 line timing
// (640 visible, 16 front porch, 96 sync, 48 back porch).
`timescale 1ns/1ps
module tb_h_counter;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic [9:0] hcount;
  logic line_end, hsync;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  h_counter dut (.clk, .rst, .ce, .hcount, .line_end, .hsync);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x = 0, lines = 0, sync_low = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // 3 lines, enable every other cycle
    for (int t = 0; t < 2 * 800 * 3; t++) begin
      ce <= t[0];
      @(posedge clk); #1;
      if (ce) begin
        x = (x == 799) ? 0 : x + 1;
        if (x == 0) lines++;
      end
      check(hcount == 10'(x), $sformatf("hcount %0d exp %0d", hcount, x));
      check(line_end == (x == 799), "line_end");
      check(hsync == !(x >= 656 && x < 752), $sformatf("hsync at %0d", x));
      if (!hsync && ce) sync_low++;
    end
    check(lines == 3, $sformatf("lines %0d", lines));
    check(sync_low == 3 * 96, $sformatf("sync low pixels %0d", sync_low));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
