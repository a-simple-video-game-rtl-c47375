// v_counter: vertical counter of the VGA timing generator.
//
// Counts scan lines 0 .. V_TOTAL-1, stepping when a pixel-rate enable falls on
// the last pixel of a line (ce & line_end from the horizontal counter), and
// drives VGA_vsync. A frame is V_VISIBLE displayed lines followed by the front
// porch, the sync pulse and the back porch. vsync is low (active) during the
// sync pulse. frame_end is high on the last pixel of the last line.
//
// The 480 displayed lines follow the original design; the porch and pulse
// heights (10/2/33, 525 in all) and the negative polarity are the usual
// 640x480 at 60 Hz values, taken as this design's defaults.
//
// Timing: vcount and vsync change in the same cycle as the horizontal counter
// wraps to 0.
module v_counter #(
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,         // pixel-rate enable
  input  logic       line_end,   // horizontal counter is on its last pixel
  output logic [9:0] vcount,     // current line
  output logic       frame_end,  // last pixel of the last line
  output logic       vsync       // active-low vertical sync
);

  localparam int unsigned V_TOTAL      = V_VISIBLE + V_FRONT + V_SYNC + V_BACK;
  localparam int unsigned V_SYNC_START = V_VISIBLE + V_FRONT;
  localparam int unsigned V_SYNC_END   = V_SYNC_START + V_SYNC;

  logic last_line;
  assign last_line = (vcount == 10'(V_TOTAL - 1));

  always_ff @(posedge clk) begin
    if (rst) begin
      vcount <= '0;
    end else if (ce && line_end) begin
      vcount <= last_line ? '0 : vcount + 1'b1;
    end
  end

  assign frame_end = line_end && last_line;
  assign vsync     = !((vcount >= 10'(V_SYNC_START)) && (vcount < 10'(V_SYNC_END)));

endmodule
