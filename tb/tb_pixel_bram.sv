// tb_pixel_bram: checks the 3072 x 2-bit frame memory against a reference
// array: cleared at start, random writes, reads with a one-cycle latency on the
// other port (including a read of the word being written, which returns the
// old value), writes beyond the last word ignored and reads beyond it 0.
`timescale 1ns/1ps
module tb_pixel_bram;
  logic clk = 1'b0, we = 1'b0;
  logic [11:0] waddr = '0, raddr = '0;
  logic [1:0]  wdata = '0, rdata;
  logic [1:0]  ref_mem [3072];
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  pixel_bram dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

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

  initial begin
    logic [1:0] expect_q;
    foreach (ref_mem[i]) ref_mem[i] = 2'd0;
    // cleared at start
    for (int a = 0; a < 3072; a++) begin
      @(negedge clk); raddr = 12'(a);
      @(posedge clk); #1;
      check(rdata == 2'd0, $sformatf("initial word %0d = %0d", a, rdata));
    end
    // random traffic on both ports
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk);
      we    = 1'($urandom_range(1));
      waddr = 12'($urandom_range(4095));
      wdata = 2'($urandom_range(3));
      raddr = (i % 5 == 0) ? waddr : 12'($urandom_range(3071));
      expect_q = (raddr < 12'd3072) ? ref_mem[raddr] : 2'd0;
      @(posedge clk); #1;
      if (we && waddr < 12'd3072) ref_mem[waddr] = wdata;
      check(rdata == expect_q, $sformatf("read %0d = %0d exp %0d", raddr, rdata, expect_q));
    end
    we = 1'b0;
    for (int a = 0; a < 3072; a++) begin
      @(negedge clk); raddr = 12'(a);
      @(posedge clk); #1;
      check(rdata == ref_mem[a], $sformatf("final word %0d", a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
