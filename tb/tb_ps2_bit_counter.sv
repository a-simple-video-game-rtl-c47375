// tb_ps2_bit_counter: gives the counter sample strobes for five 11-bit frames,
// with idle cycles between strobes, and checks the position, the store strobe
// on bits 1 .. 8 only and the done strobe on bit 10.
`timescale 1ns/1ps
module tb_ps2_bit_counter;
  logic clk = 1'b0, rst = 1'b1, data_en = 1'b0;
  logic [3:0] bit_cnt;
  logic store, done;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  ps2_bit_counter dut (.clk, .rst, .data_en, .bit_cnt, .store, .done);

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

  initial begin
    int n_store = 0, n_done = 0;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int f = 0; f < 5; f++) begin
      for (int b = 0; b < 11; b++) begin
        @(negedge clk);
        data_en = 1'b1;
        #1;
        check(bit_cnt == 4'(b), $sformatf("position %0d exp %0d", bit_cnt, b));
        check(store == (b >= 1 && b <= 8), $sformatf("store at bit %0d", b));
        check(done == (b == 10), $sformatf("done at bit %0d", b));
        if (store) n_store++;
        if (done) n_done++;
        @(negedge clk);
        data_en = 1'b0;
        #1;
        check(!store && !done, "strobes only with data_en");
        repeat (b % 3) @(posedge clk);
      end
    end
    check(n_store == 40 && n_done == 5, $sformatf("%0d stores %0d dones", n_store, n_done));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
