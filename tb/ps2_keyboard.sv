// ps2_keyboard: testbench model of a PS2 keyboard sending to the host.
//
// send_byte() sends one 11-bit frame: start bit 0, eight data bits least
// significant first, odd parity, stop bit 1. The clock runs at 12.5 kHz
// (40 us high, 40 us low); the data line changes 20 us into the high phase,
// so it is stable for the whole low phase in which the host samples it.
// Both lines idle high.
`timescale 1ns/1ps
module ps2_keyboard #(
  parameter int HALF_NS = 40_000  // half a keyboard clock period, ns
) (
  output logic kbd_clk,
  output logic kbd_data
);

  initial begin
    kbd_clk  = 1'b1;
    kbd_data = 1'b1;
  end

  task automatic send_byte(logic [7:0] b);
    logic [10:0] frame;
    frame = {1'b1, ~^b, b, 1'b0};  // stop, parity, data, start (LSB first)
    for (int i = 0; i < 11; i++) begin
      #(HALF_NS / 2);
      kbd_data = frame[i];
      #(HALF_NS / 2);
      kbd_clk = 1'b0;
      #(HALF_NS);
      kbd_clk = 1'b1;
    end
    kbd_data = 1'b1;
    #(HALF_NS * 2);
  endtask

endmodule
