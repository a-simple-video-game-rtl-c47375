// tb_vga_ctrl: end-to-end test of the VGA controller at its default sizes.
//
// Fills all 3072 words of the frame memory with random pixel codes through the
// bus port (checking the write acknowledge of each access), makes one bus read
// (checking its acknowledge), then watches two complete 640x480 frames with
// vga_checker: every pixel's colour, hsync and vsync, the 1600-clock line
// period (25 MHz pixels from the 50 MHz clock) and the 525-line frame. Then
// rewrites part of the memory during the scan and checks a third frame.
`timescale 1ns/1ps
module tb_vga_ctrl;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ipif_req_t req;
  ipif_rsp_t rsp;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic hsync, vsync;
  logic [1:0] ref_mem [3072];
  logic active = 1'b0;
  int   checks = 0, failures = 0;
  int   m_checks, m_failures, m_frames, m_hs, m_blank;
  int   m_colour [4];

  always #10 clk = ~clk;

  vga_ctrl dut (
    .clk, .rst, .bus_req(req), .bus_rsp(rsp),
    .vga_red(red), .vga_green(green), .vga_blue(blue), .vga_hsync(hsync), .vga_vsync(vsync)
  );

  vga_checker mon (
    .clk, .active, .red, .green, .blue, .hsync, .vsync, .ref_mem,
    .checks(m_checks), .failures(m_failures), .frames(m_frames),
    .hsync_pulses(m_hs), .blank_pixels(m_blank), .colour_seen(m_colour)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic finish_tb();
    checks += m_checks;
    failures += m_failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (4 * 1600 * 525 + 100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  // One bus access; returns the number of cycles to the acknowledge.
  task automatic bus_access(bit read, logic [31:0] addr, logic [31:0] data);
    int wait_cycles = 0;
    @(negedge clk);
    req = '{cs: 1'b1, rnw: read, addr: addr, data: data};
    do begin
      @(posedge clk); #1;
      wait_cycles++;
    end while (!(read ? rsp.rd_ack : rsp.wr_ack) && wait_cycles < 16);
    check(wait_cycles == 1, $sformatf("acknowledge after %0d cycles", wait_cycles));
    if (read) check(rsp.data == 32'd0, "read data");
    @(negedge clk);
    req.cs = 1'b0;
  endtask

  task automatic write_word(int a, logic [1:0] code);
    // upper data bits are set to show that only bits 1:0 are stored
    bus_access(1'b0, 32'(a) << 2, {30'h2AAAAAAA, code});
    ref_mem[a] = code;
  endtask

  initial begin
    req = '0;
    foreach (ref_mem[i]) ref_mem[i] = 2'd0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    for (int a = 0; a < 3072; a++) write_word(a, 2'($urandom_range(3)));
    bus_access(1'b1, 32'h0, 32'h0);
    // a write beyond the memory changes nothing
    bus_access(1'b0, 32'(3072) << 2, 32'h3);
    active = 1'b1;
    wait (m_frames == 2);
    // frame 2 has just ended at the vsync edge: change blocks during the
    // vertical blanking that follows
    for (int a = 0; a < 64; a++) write_word(a * 48, 2'($urandom_range(3)));
    wait (m_frames == 3);
    check(m_hs >= 3 * 525 - 1, $sformatf("hsync pulses %0d", m_hs));
    for (int i = 0; i < 4; i++) check(m_colour[i] > 0, $sformatf("colour %0d never shown", i));
    check(m_blank > 0, "no blanked pixels");
    finish_tb();
  end
endmodule
