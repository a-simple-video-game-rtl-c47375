// vga_checker: testbench monitor for the VGA outputs.
//
// Locks onto the first falling edge of vsync and from then on knows, from the
// number of system clocks elapsed, which screen pixel is being sent: with two
// clocks per pixel, 800 pixels per line and 525 lines per frame, vsync falls at
// the start of line 490. Every cycle it checks hsync (low for pixels
// 656 .. 751), vsync (low on lines 490 and 491) and the colour: black outside
// the centred 512 x 384 window, otherwise the colour of the reference word
// ref_mem[(y - 48) / 8 * 64 + (x - 64) / 8]. It counts what it has seen so a
// testbench can tell that every case occurred.
`timescale 1ns/1ps
module vga_checker (
  input  logic       clk,
  input  logic       active,        // check only while high
  input  logic [2:0] red,
  input  logic [2:0] green,
  input  logic [1:0] blue,
  input  logic       hsync,
  input  logic       vsync,
  input  logic [1:0] ref_mem [3072],
  output int         checks,
  output int         failures,
  output int         frames,        // complete frames checked
  output int         hsync_pulses,
  output int         blank_pixels,  // pixel clocks outside the window
  output int         colour_seen [4] // window pixel clocks per code
);

  localparam int CLK_PER_PIX = 2;
  localparam int LINE_CLKS   = 800 * CLK_PER_PIX;
  localparam int FRAME_CLKS  = 525 * LINE_CLKS;

  logic locked = 1'b0;
  logic vs_q = 1'b1, hs_q = 1'b1;
  int   c = 0;
  int   last_hs_fall = -1;
  int   clk_count = 0;

  initial begin
    checks = 0; failures = 0; frames = 0; hsync_pulses = 0; blank_pixels = 0;
    foreach (colour_seen[i]) colour_seen[i] = 0;
  end

  function automatic logic [7:0] colour_of(logic [1:0] code);
    case (code)
      2'd0:    return 8'b000_000_00;
      2'd1:    return 8'b111_111_00;
      2'd2:    return 8'b000_000_11;
      default: return 8'b111_000_00;
    endcase
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  always @(posedge clk) begin
    #1;
    clk_count++;
    if (active) begin
      if (!locked && vs_q && !vsync) begin
        locked = 1'b1;
        c = 0;
      end else if (locked) begin
        c++;
        if (c == FRAME_CLKS) begin
          c = 0;
          frames++;
        end
      end
      if (locked) begin
        int y, x;
        logic [7:0] exp_rgb;
        y = (490 + c / LINE_CLKS) % 525;
        x = (c % LINE_CLKS) / CLK_PER_PIX;
        if (x >= 64 && x < 576 && y >= 48 && y < 432) begin
          logic [1:0] code;
          code = ref_mem[((y - 48) / 8) * 64 + (x - 64) / 8];
          exp_rgb = colour_of(code);
          colour_seen[code]++;
        end else begin
          exp_rgb = 8'd0;
          blank_pixels++;
        end
        check({red, green, blue} == exp_rgb,
              $sformatf("colour %h exp %h at x=%0d y=%0d", {red, green, blue}, exp_rgb, x, y));
        check(hsync == !(x >= 656 && x < 752), $sformatf("hsync at x=%0d y=%0d", x, y));
        check(vsync == !(y == 490 || y == 491), $sformatf("vsync at x=%0d y=%0d", x, y));
        if (hs_q && !hsync) begin
          if (last_hs_fall >= 0)
            check(clk_count - last_hs_fall == LINE_CLKS,
                  $sformatf("line period %0d clocks", clk_count - last_hs_fall));
          last_hs_fall = clk_count;
          hsync_pulses++;
        end
      end
    end
    vs_q = vsync;
    hs_q = hsync;
  end

endmodule
