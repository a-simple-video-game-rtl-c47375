// h_counter: horizontal counter of the VGA timing generator.
//
// Counts pixel periods 0 .. H_TOTAL-1 along one scan line (one step per pix_ce)
// and drives VGA_hsync. A line is H_VISIBLE displayed pixels followed by the
// front porch, the sync pulse and the back porch. Count 0 is the leftmost
// displayed pixel. hsync is low (active) during the sync pulse. line_end is high
// while the count is at its last value, so a pix_ce in that state ends the line
// and advances the vertical counter.
//
// The 640-pixel line at a 25 MHz pixel rate follows the original design; the
// porch and pulse widths (16/96/48, 800 in all) and the negative sync polarity
// are the usual 640x480 at 60 Hz values, taken as this design's defaults.
//
// Timing: hcount and hsync are registered and change in the cycle after pix_ce;
// hsync is a function of the new count (no extra delay).
module h_counter #(
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,        // pixel-rate enable
  output logic [9:0] hcount,    // current pixel position in the line
  output logic       line_end,  // hcount is the last position of the line
  output logic       hsync      // active-low horizontal sync
);

  localparam int unsigned H_TOTAL      = H_VISIBLE + H_FRONT + H_SYNC + H_BACK;
  localparam int unsigned H_SYNC_START = H_VISIBLE + H_FRONT;
  localparam int unsigned H_SYNC_END   = H_SYNC_START + H_SYNC;

  always_ff @(posedge clk) begin
    if (rst) begin
      hcount <= '0;
    end else if (ce) begin
      hcount <= line_end ? '0 : hcount + 1'b1;
    end
  end

  assign line_end = (hcount == 10'(H_TOTAL - 1));
  assign hsync    = !((hcount >= 10'(H_SYNC_START)) && (hcount < 10'(H_SYNC_END)));

endmodule
