// pixel_bram: the frame memory of the game screen.
//
// 3072 words of 2 bits (64 x 48 blocks of 8 x 8 screen pixels, 6144 bits), with
// one write port for the processor bus and one read port for the VGA scan.
// Written as an array so that synthesis maps it onto one dual-port block RAM.
// Word address = column + 64 * row; each word is a pixel code (see snake_pkg).
//
// Size, width and the dual-port arrangement follow the original design.
// Writes to addresses at or above DEPTH are ignored (this design's choice).
// The memory is cleared to 0 (background) at start-up, as FPGA block RAM is.
//
// Timing: both ports on clk. A write takes effect at the clock edge; a read
// returns the word one clock after raddr (registered output). Reading and
// writing the same word in one cycle returns the old word.
module pixel_bram #(
  parameter int unsigned DEPTH = 3072,  // 64 x 48
  parameter int unsigned WIDTH = 2,
  parameter int unsigned AW    = 12
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  initial begin
    for (int i = 0; i < int'(DEPTH); i++) mem[i] = '0;
  end

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < int'(DEPTH))) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    rdata <= (int'(raddr) < int'(DEPTH)) ? mem[raddr] : '0;
  end

endmodule
