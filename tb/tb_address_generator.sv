// tb_address_generator: feeds the address generator with a full 800 x 525
// frame scan (enable every other cycle, window flags computed in the
// testbench) and checks, for every window pixel, that the 18-bit address is
// row * 512 + column and the BRAM address is (row / 8) * 64 + column / 8.
`timescale 1ns/1ps
module tb_address_generator;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0;
  logic pix_en, v_in;
  logic [17:0] addr;
  logic [11:0] bram_addr;
  int   checks = 0, failures = 0;
  int   x = 0, y = 0;

  always #10 clk = ~clk;

  address_generator dut (.clk, .rst, .ce, .pix_en, .v_in, .addr, .bram_addr);

  assign v_in   = (y >= 48 && y < 432);
  assign pix_en = v_in && (x >= 64 && x < 576);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int seen = 0, max_bram = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    // two frames; the first starts mid-way through the window
    x = 0; y = 200;
    for (int t = 0; t < 2 * 800 * (325 + 2 * 525); t++) begin
      ce <= t[0];
      @(posedge clk); #1;
      if (ce) begin
        x = (x == 799) ? 0 : x + 1;
        if (x == 0) y = (y == 524) ? 0 : y + 1;
      end
      #1;  // let the window flags follow the new position
      if (ce && pix_en && t > 800 * 330 * 2) begin
        check(addr == 18'((y - 48) * 512 + (x - 64)),
              $sformatf("addr %0d at %0d,%0d", addr, x, y));
        check(bram_addr == 12'(((y - 48) / 8) * 64 + (x - 64) / 8),
              $sformatf("bram_addr %0d at %0d,%0d", bram_addr, x, y));
        if (int'(bram_addr) > max_bram) max_bram = int'(bram_addr);
        seen++;
      end
    end
    check(seen == 2 * 512 * 384, $sformatf("window pixels %0d", seen));
    check(max_bram == 3071, $sformatf("highest BRAM address %0d", max_bram));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
