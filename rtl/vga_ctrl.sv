// vga_ctrl: VGA controller peripheral of the Snake game.
//
// The processor draws the game by writing 2-bit pixel codes into a 64 x 48
// frame memory over the bus; this block scans that memory and paints a 640 x
// 480 VGA screen at 25 MHz. The game occupies a 512 x 384 window in the middle
// of the screen, in which each memory word fills an 8 x 8 block of pixels.
//
// Inside:
//   clock_divider      50 MHz -> one pixel-rate enable every DIV clocks
//   h_counter          pixel counter, VGA_hsync
//   v_counter          line counter, VGA_vsync
//   pixel_enable       window detection (pix_en, v_in)
//   address_generator  18-bit window pixel count -> 12-bit BRAM read address
//   control_signal     bus chip select / read-not-write -> BRAM write, acknowledges
//   pixel_bram         3072 x 2-bit dual-port memory
//   colour_gen         2-bit code -> 3/3/2-bit RGB, black outside the window
//
// Bus: a write to byte address A stores Bus2IP_Data[1:0] into word
// A[ADDR_LSB+11:ADDR_LSB] (word address = column + 64 * row); it is
// acknowledged with IP2Bus_WrAck one cycle later. Reads are acknowledged with
// IP2Bus_RdAck and return 0: the memory has no read path to the bus.
//
// Timing: the colour and both sync outputs are registered together on the
// pixel-rate enable, one pixel period after the counters; the BRAM read fits
// between two enables, which needs DIV >= 2.
//
// The block structure, the sizes and the address bit selection follow the
// original design; the sync timing numbers, the window position, the code to
// colour mapping and the bus word addressing are this design's choices.
module vga_ctrl
  import snake_pkg::*;
#(
  parameter int unsigned DIV       = 2,    // system clocks per pixel
  parameter int unsigned H_VISIBLE = 640,
  parameter int unsigned H_FRONT   = 16,
  parameter int unsigned H_SYNC    = 96,
  parameter int unsigned H_BACK    = 48,
  parameter int unsigned V_VISIBLE = 480,
  parameter int unsigned V_FRONT   = 10,
  parameter int unsigned V_SYNC    = 2,
  parameter int unsigned V_BACK    = 33,
  parameter int unsigned H_START   = 64,   // left edge of the game window
  parameter int unsigned V_START   = 48,   // top edge of the game window
  parameter int unsigned ADDR_LSB  = 2     // byte address bit of word 0 bit 0
) (
  input  logic       clk,        // Bus2IP_Clk, 50 MHz
  input  logic       rst,        // Bus2IP_Reset, synchronous, active high
  input  ipif_req_t  bus_req,
  output ipif_rsp_t  bus_rsp,
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       vga_hsync,
  output logic       vga_vsync
);

  localparam int unsigned AREA_W = 512;
  localparam int unsigned AREA_H = 384;

  logic        pix_ce;
  logic [9:0]  hcount, vcount;
  logic        line_end, frame_end, hsync_c, vsync_c;
  logic        pix_en, v_in;
  logic [17:0] pix_addr;
  logic [11:0] rd_addr;
  logic [1:0]  rd_code;
  logic        we, re;
  rgb_t        rgb;

  clock_divider #(.DIV(DIV)) u_clock_divider (
    .clk, .rst, .pix_ce
  );

  h_counter #(
    .H_VISIBLE(H_VISIBLE), .H_FRONT(H_FRONT), .H_SYNC(H_SYNC), .H_BACK(H_BACK)
  ) u_h_counter (
    .clk, .rst, .ce(pix_ce), .hcount, .line_end, .hsync(hsync_c)
  );

  v_counter #(
    .V_VISIBLE(V_VISIBLE), .V_FRONT(V_FRONT), .V_SYNC(V_SYNC), .V_BACK(V_BACK)
  ) u_v_counter (
    .clk, .rst, .ce(pix_ce), .line_end, .vcount, .frame_end, .vsync(vsync_c)
  );

  pixel_enable #(
    .H_START(H_START), .V_START(V_START), .AREA_W(AREA_W), .AREA_H(AREA_H)
  ) u_pixel_enable (
    .hcount, .vcount, .v_in, .pix_en
  );

  address_generator u_address_generator (
    .clk, .rst, .ce(pix_ce), .pix_en, .v_in, .addr(pix_addr), .bram_addr(rd_addr)
  );

  control_signal u_control_signal (
    .clk, .rst, .cs(bus_req.cs), .rnw(bus_req.rnw),
    .we, .re, .wr_ack(bus_rsp.wr_ack), .rd_ack(bus_rsp.rd_ack)
  );

  pixel_bram #(.DEPTH(3072), .WIDTH(2), .AW(12)) u_pixel_bram (
    .clk,
    .we,
    .waddr(bus_req.addr[ADDR_LSB +: 12]),
    .wdata(bus_req.data[1:0]),
    .raddr(rd_addr),
    .rdata(rd_code)
  );

  colour_gen u_colour_gen (
    .clk, .rst, .ce(pix_ce), .pix_en, .code(rd_code), .rgb
  );

  // Syncs delayed by the same pixel period as the colour.
  always_ff @(posedge clk) begin
    if (rst) begin
      vga_hsync <= 1'b1;
      vga_vsync <= 1'b1;
    end else if (pix_ce) begin
      vga_hsync <= hsync_c;
      vga_vsync <= vsync_c;
    end
  end

  assign vga_red   = rgb.red;
  assign vga_green = rgb.green;
  assign vga_blue  = rgb.blue;
  assign bus_rsp.data = '0;

  // The game window must lie inside the displayed area.
  initial begin
    assert (DIV >= 2) else $error("vga_ctrl: DIV must be at least 2");
    assert (H_START + AREA_W <= H_VISIBLE && V_START + AREA_H <= V_VISIBLE)
      else $error("vga_ctrl: game window outside the visible area");
  end

  // The low nine bits of the window count are the column inside the window.
  property p_column_tracks_count;
    @(posedge clk) disable iff (rst)
      (pix_ce && pix_en) |-> (pix_addr[8:0] == 9'(hcount - 10'(H_START)));
  endproperty
  a_column_tracks_count: assert property (p_column_tracks_count);

  logic unused;
  assign unused = ^{re, frame_end, bus_req.addr[31:ADDR_LSB+12], bus_req.addr[ADDR_LSB-1:0],
                   bus_req.data[31:2], pix_addr[17:9], pix_addr[2:0]};

endmodule
