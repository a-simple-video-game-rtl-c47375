// address_generator: produces the read address of the pixel BRAM.
//
// An 18-bit counter walks the 512 x 384 game window pixel by pixel: it steps on
// every pixel-rate enable that falls inside the window (pix_en) and is cleared
// on lines outside the window, so it starts each frame at 0 and ends at
// 512*384-1. Because a window row is exactly 512 pixels, bits 8:0 of the count
// are the column in the window and bits 17:9 the row.
//
// One BRAM word covers an 8 x 8 block of screen pixels (the BRAM holds 64 x 48
// words for the 512 x 384 window). The BRAM address is therefore formed from
// count bits 17:12 (row / 8) as the upper six bits and bits 8:3 (column / 8) as
// the lower six; bits 11:9 and 2:0 are dropped. Address = column8 + 64 * row8,
// the same layout the processor uses when it writes a block.
//
// The counter, its width and the bit selection follow the original design.
//
// Timing: addr is registered and holds the address of the pixel the counters
// currently point at; bram_addr is a wire selection of it.
module address_generator (
  input  logic        clk,
  input  logic        rst,
  input  logic        ce,        // pixel-rate enable from the clock divider
  input  logic        pix_en,    // current pixel is inside the window
  input  logic        v_in,      // current line is inside the window
  output logic [17:0] addr,      // {row[8:0], column[8:0]} in the window
  output logic [11:0] bram_addr  // {row[8:3], column[8:3]}
);

  always_ff @(posedge clk) begin
    if (rst) begin
      addr <= '0;
    end else if (ce) begin
      if (!v_in)       addr <= '0;
      else if (pix_en) addr <= addr + 18'd1;
    end
  end

  assign bram_addr = {addr[17:12], addr[8:3]};

endmodule
