// snake_top: the user hardware of the Snake game system.
//
// A processor runs the game and reaches two peripherals over its bus: the VGA
// controller, whose 64 x 48 frame memory it fills with 2-bit pixel codes, and
// the PS2 keyboard controller, whose scan-code register it polls for the W/A/S/D
// keys. The processor, its bus and the bus-to-peripheral attachments are
// standard library parts and are not part of this RTL: each peripheral's
// slave-side bus signals (chip select, read-not-write, address, data,
// acknowledges, read data) are ports of this top, one set per peripheral, so a
// bus attachment or a testbench can drive them directly.
//
// Ports: clk is the 50 MHz system clock and rst the synchronous active-high
// reset. vga_* go to the VGA connector (3/3/2-bit colour, active-low syncs,
// 640 x 480 at 60 Hz with the game in a centred 512 x 384 window); ps2_clk and
// ps2_data come from the keyboard.
module snake_top
  import snake_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  // VGA controller slave port
  input  ipif_req_t  vga_bus_req,
  output ipif_rsp_t  vga_bus_rsp,
  // PS2 controller slave port
  input  ipif_req_t  ps2_bus_req,
  output ipif_rsp_t  ps2_bus_rsp,
  // VGA connector
  output logic [2:0] vga_red,
  output logic [2:0] vga_green,
  output logic [1:0] vga_blue,
  output logic       vga_hsync,
  output logic       vga_vsync,
  // Keyboard connector
  input  logic       ps2_clk,
  input  logic       ps2_data
);

  vga_ctrl u_vga_ctrl (
    .clk, .rst,
    .bus_req(vga_bus_req), .bus_rsp(vga_bus_rsp),
    .vga_red, .vga_green, .vga_blue, .vga_hsync, .vga_vsync
  );

  ps2_ctrl u_ps2_ctrl (
    .clk, .rst,
    .bus_req(ps2_bus_req), .bus_rsp(ps2_bus_rsp),
    .ps2_clk, .ps2_data
  );

endmodule
