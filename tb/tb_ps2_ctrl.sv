// tb_ps2_ctrl: end-to-end test of the keyboard controller at its default
// 1250-cycle sampling point.
//
// A keyboard model sends the W, A, S, D make codes and the F0 break prefix
// plus random bytes; the testbench polls the controller over the bus the way
// the game software does and checks that every byte arrives once, in order,
// with the new flag, within a few clocks of the 25 us sampling point after the
// frame's last clock edge. Also checks the read acknowledge timing and that
// writes are acknowledged.
`timescale 1ns/1ps
module tb_ps2_ctrl;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ipif_req_t req;
  ipif_rsp_t rsp;
  logic kbd_clk, kbd_data;
  int   checks = 0, failures = 0;
  int   cycle = 0, fall_count = 0, last_stop_cycle = -1;

  always #10 clk = ~clk;
  always @(posedge clk) cycle++;
  always @(negedge kbd_clk) begin
    fall_count++;
    if (fall_count % 11 == 0) last_stop_cycle = cycle;
  end

  ps2_keyboard kbd (.kbd_clk, .kbd_data);

  ps2_ctrl dut (.clk, .rst, .bus_req(req), .bus_rsp(rsp), .ps2_clk(kbd_clk), .ps2_data(kbd_data));

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #200ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic bus_read(output logic [31:0] word);
    int n = 0;
    @(negedge clk);
    req = '{cs: 1'b1, rnw: 1'b1, addr: 32'h0, data: 32'h0};
    do begin @(posedge clk); #1; n++; end while (!rsp.rd_ack && n < 16);
    check(n == 1, $sformatf("read acknowledge after %0d cycles", n));
    word = rsp.data;
    @(negedge clk);
    req.cs = 1'b0;
  endtask

  task automatic bus_write();
    int n = 0;
    @(negedge clk);
    req = '{cs: 1'b1, rnw: 1'b0, addr: 32'h0, data: 32'hFFFF_FFFF};
    do begin @(posedge clk); #1; n++; end while (!rsp.wr_ack && n < 16);
    check(n == 1, $sformatf("write acknowledge after %0d cycles", n));
    @(negedge clk);
    req.cs = 1'b0;
  endtask

  // Poll until a new code arrives; check it and its arrival time.
  task automatic expect_code(logic [7:0] b);
    logic [31:0] w;
    int polls = 0;
    do begin bus_read(w); polls++; end while (!w[8] && polls < 50000);
    check(w == {23'd0, 1'b1, b}, $sformatf("code %h exp %h", w[8:0], b));
    check(cycle - last_stop_cycle >= 1250 && cycle - last_stop_cycle <= 1260,
          $sformatf("code ready %0d clocks after the last clock edge", cycle - last_stop_cycle));
    bus_read(w);
    check(w[8] == 1'b0, "new flag cleared by the read");
  endtask

  logic [7:0] seq [$];

  initial begin
    req = '0;
    seq = '{8'h1D, 8'hF0, 8'h1D, 8'h1C, 8'hF0, 8'h1C, 8'h1B, 8'hF0, 8'h1B, 8'h23, 8'hF0, 8'h23};
    for (int i = 0; i < 8; i++) seq.push_back(8'($urandom_range(255)));
    repeat (4) @(posedge clk);
    rst = 1'b0;
    bus_write();
    begin
      logic [31:0] w;
      bus_read(w);
      check(w == 32'd0, "nothing received after reset");
    end
    foreach (seq[i]) begin
      fork
        kbd.send_byte(seq[i]);
        expect_code(seq[i]);
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
