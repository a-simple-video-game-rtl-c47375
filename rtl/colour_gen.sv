// colour_gen: turns the 2-bit pixel code into the 8-bit VGA colour.
//
// A four-entry look-up table of 8-bit colours (3 bits red, 3 green, 2 blue):
// background black, wall yellow, snake blue, food red. Pixels outside the game
// window (pix_en low) are sent black so that nothing is driven during blanking.
//
// A 4 x 8-bit table, the 3/3/2 split of the colour pins and the four game
// colours follow the original design; which code selects which colour is this
// design's choice (snake_pkg::pix_code_t).
//
// Timing: the colour is registered on the pixel-rate enable, so it appears
// one pixel period after the code and pix_en it was made from.
module colour_gen
  import snake_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ce,      // pixel-rate enable
  input  logic       pix_en,  // pixel is inside the game window
  input  logic [1:0] code,    // pixel code read from the BRAM
  output rgb_t       rgb
);

  localparam rgb_t RGB_BLACK  = '{red: 3'd0, green: 3'd0, blue: 2'd0};
  localparam rgb_t RGB_YELLOW = '{red: 3'd7, green: 3'd7, blue: 2'd0};
  localparam rgb_t RGB_BLUE   = '{red: 3'd0, green: 3'd0, blue: 2'd3};
  localparam rgb_t RGB_RED    = '{red: 3'd7, green: 3'd0, blue: 2'd0};

  rgb_t lut;

  always_comb begin
    unique case (pix_code_t'(code))
      PIX_BACKGROUND: lut = RGB_BLACK;
      PIX_WALL:       lut = RGB_YELLOW;
      PIX_SNAKE:      lut = RGB_BLUE;
      PIX_FOOD:       lut = RGB_RED;
      default:        lut = RGB_BLACK;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)     rgb <= RGB_BLACK;
    else if (ce) rgb <= pix_en ? lut : RGB_BLACK;
  end

endmodule
