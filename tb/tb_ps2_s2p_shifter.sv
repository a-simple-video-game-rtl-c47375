// tb_ps2_s2p_shifter: shifts in random bytes least significant bit first,
// hands them over with load, and checks the bus word {new, code}, that a read
// clears the new flag, and that nothing is driven without a read.
`timescale 1ns/1ps
module tb_ps2_s2p_shifter;
  logic clk = 1'b0, rst = 1'b1;
  logic store = 1'b0, load = 1'b0, data_in = 1'b0, read_en = 1'b0, read_ack = 1'b0;
  logic [7:0]  code;
  logic        code_new;
  logic [31:0] data_out;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  ps2_s2p_shifter dut (.clk, .rst, .store, .load, .data_in, .read_en, .read_ack,
                       .code, .code_new, .data_out);

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

  task automatic bus_read(logic [31:0] expect_word);
    @(negedge clk) read_en = 1'b1;
    #1 check(data_out == expect_word, $sformatf("read %h exp %h", data_out, expect_word));
    @(negedge clk) read_ack = 1'b1;
    #1 check(data_out == expect_word, "data held in acknowledge cycle");
    @(negedge clk) begin read_en = 1'b0; read_ack = 1'b0; end
    #1 check(data_out == 32'd0, "no data without read");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    bus_read(32'd0);
    for (int k = 0; k < 200; k++) begin
      logic [7:0] b;
      b = 8'($urandom_range(255));
      for (int i = 0; i < 8; i++) begin
        @(negedge clk) begin store = 1'b1; data_in = b[i]; end
        @(negedge clk) begin store = 1'b0; data_in = ~b[i]; end
      end
      // parity-like noise on the data line without store
      @(negedge clk) load = 1'b1;
      @(negedge clk) load = 1'b0;
      #1 check(code == b && code_new, $sformatf("code %h exp %h", code, b));
      bus_read({23'd0, 1'b1, b});
      bus_read({23'd0, 1'b0, b});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
