// pixel_enable: marks the pixels that belong to the game display area.
//
// Only a 512 x 384 window of the 640 x 480 screen shows the game. This block
// compares the horizontal and vertical counts against the window and raises
// pix_en for pixels inside it; v_in is high on every line that crosses the
// window, which the address generator uses to restart its count between frames.
// Outside the window the screen is blanked to black.
//
// The 512 x 384 window size follows the original design. Where the window sits
// on the screen is not given; this design centres it (64 pixels left and right,
// 48 lines above and below) by default.
//
// Timing: purely combinational from the counts.
module pixel_enable #(
  parameter int unsigned H_START = 64,   // first window column
  parameter int unsigned V_START = 48,   // first window line
  parameter int unsigned AREA_W  = 512,  // window width in pixels
  parameter int unsigned AREA_H  = 384   // window height in lines
) (
  input  logic [9:0] hcount,
  input  logic [9:0] vcount,
  output logic       v_in,    // current line is inside the window
  output logic       pix_en   // current pixel is inside the window
);

  logic h_in;

  assign h_in   = (hcount >= 10'(H_START)) && (hcount < 10'(H_START + AREA_W));
  assign v_in   = (vcount >= 10'(V_START)) && (vcount < 10'(V_START + AREA_H));
  assign pix_en = h_in && v_in;

endmodule
