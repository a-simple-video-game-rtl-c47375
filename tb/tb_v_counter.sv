// tb_v_counter: drives the vertical counter with line-end pulses over two full
// 525-line frames and compares count, frame end and sync with the 640x480
// frame timing (480 visible, 10 front porch, 2 sync, 33 back porch).
`timescale 1ns/1ps
module tb_v_counter;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, line_end = 1'b0;
  logic [9:0] vcount;
  logic frame_end, vsync;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  v_counter dut (.clk, .rst, .ce, .line_end, .vcount, .frame_end, .vsync);

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
    int y = 0, frames = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int t = 0; t < 2 * 525 * 2 + 7; t++) begin
      // line_end without ce, ce without line_end, then both
      ce       <= (t % 4 != 1);
      line_end <= (t % 4 >= 1);
      @(posedge clk); #1;
      if (ce && line_end) begin
        y = (y == 524) ? 0 : y + 1;
        if (y == 0) frames++;
      end
      check(vcount == 10'(y), $sformatf("vcount %0d exp %0d", vcount, y));
      check(vsync == !(y == 490 || y == 491), $sformatf("vsync at %0d", y));
      check(frame_end == (line_end && y == 524), "frame_end");
    end
    check(frames == 2, $sformatf("frames %0d", frames));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
