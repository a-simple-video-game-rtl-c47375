// snake_pkg: types and constants shared by the VGA and PS2 keyboard peripherals
// of the Snake game hardware.
//
// Both peripherals sit behind a simple slave-side bus attachment that presents
// each processor access as a chip select, a read-not-write flag, an address and
// write data (Bus2IP_*), and expects an acknowledge and read data back
// (IP2Bus_*). The two structs below bundle those signals. Bit numbering is
// little-endian ([31:0]); bit 0 is the least significant bit.
//
// Pixel codes: each 2-bit BRAM word selects one of four colours. The game uses
// a black background, a yellow border wall, a blue snake and red food; which
// code stands for which colour is this design's choice.
package snake_pkg;

  // Bus data and address width of the processor bus.
  localparam int unsigned BUS_DW = 32;
  localparam int unsigned BUS_AW = 32;

  // Bus to peripheral: one access, held until acknowledged.
  typedef struct packed {
    logic              cs;    // Bus2IP_CS: the access targets this peripheral
    logic              rnw;   // Bus2IP_RNW: 1 = read, 0 = write
    logic [BUS_AW-1:0] addr;  // Bus2IP_Addr: byte address
    logic [BUS_DW-1:0] data;  // Bus2IP_Data: write data
  } ipif_req_t;

  // Peripheral to bus.
  typedef struct packed {
    logic              rd_ack; // IP2Bus_RdAck: read data valid, access done
    logic              wr_ack; // IP2Bus_WrAck: write taken, access done
    logic [BUS_DW-1:0] data;   // IP2Bus_Data: read data
  } ipif_rsp_t;

  // The four pixel codes stored in the pixel BRAM.
  typedef enum logic [1:0] {
    PIX_BACKGROUND = 2'd0,
    PIX_WALL       = 2'd1,
    PIX_SNAKE      = 2'd2,
    PIX_FOOD       = 2'd3
  } pix_code_t;

  // 8-bit VGA colour as wired on the board: 3 bits red, 3 green, 2 blue.
  typedef struct packed {
    logic [2:0] red;
    logic [2:0] green;
    logic [1:0] blue;
  } rgb_t;

endpackage
