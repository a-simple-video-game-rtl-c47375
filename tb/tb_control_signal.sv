// tb_control_signal: holds chip select for writes and reads of varying length
// (as a bus attachment does until it sees the acknowledge) and checks one write
// or read strobe in the first cycle and one acknowledge in the next.
`timescale 1ns/1ps
module tb_control_signal;
  logic clk = 1'b0, rst = 1'b1, cs = 1'b0, rnw = 1'b0;
  logic we, re, wr_ack, rd_ack;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  control_signal dut (.clk, .rst, .cs, .rnw, .we, .re, .wr_ack, .rd_ack);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One access: chip select rises at a falling clock edge and stays high until
  // the acknowledge has been seen; the strobe must come at once, the
  // acknowledge one cycle later, and neither twice.
  task automatic access(bit read, int gap);
    @(negedge clk);
    cs = 1'b1; rnw = read;
    #1;
    check((read ? re : we) && !(read ? we : re), "strobe in first cycle");
    check(!wr_ack && !rd_ack, "no acknowledge in first cycle");
    @(posedge clk); #1;
    check((read ? rd_ack : wr_ack) && !(read ? wr_ack : rd_ack), "acknowledge in second cycle");
    check(!we && !re, "no second strobe");
    @(negedge clk);
    if (gap > 0) begin
      cs = 1'b0;
      @(posedge clk); #1;
      check(!wr_ack && !rd_ack, "acknowledge lasts one cycle");
      repeat (gap - 1) @(posedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    @(posedge clk);
    #1 check(!we && !re && !wr_ack && !rd_ack, "idle after reset");
    access(1'b0, 1);
    access(1'b1, 1);
    access(1'b0, 0);
    access(1'b0, 0);
    access(1'b1, 3);
    for (int i = 0; i < 40; i++) access(1'($urandom_range(1)), $urandom_range(2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
