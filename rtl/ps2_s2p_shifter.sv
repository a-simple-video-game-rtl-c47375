// ps2_s2p_shifter: collects the serial keyboard bits into a parallel scan code.
//
// An 8-bit shift register takes the data line on each store strobe, shifting
// right so that the first (least significant) bit ends in bit 0 after eight
// strobes. When the frame's stop bit arrives (load), the byte is copied into the
// output register and a "new code" flag is set. The bus reads the register as
// {23'b0, new, code[7:0]}; a read (read_en) clears the flag, so the processor
// can poll the register and see each key event once.
//
// The serial-to-parallel shifting, the hand over at the stop bit and the bus
// read enable follow the original design. The held copy and the new-code flag
// in bit 8 are this design's choice.
//
// Timing: the code and flag change in the cycle after load; data_out is
// combinational from read_en and the held register.
module ps2_s2p_shifter (
  input  logic        clk,
  input  logic        rst,
  input  logic        store,     // shift data_in in
  input  logic        load,      // stop bit: hand the byte over
  input  logic        data_in,   // keyboard data line, synchronised
  input  logic        read_en,   // bus read of this register
  input  logic        read_ack,  // the read completes this cycle: clear the flag
  output logic [7:0]  code,      // last complete scan code
  output logic        code_new,  // code not yet read
  output logic [31:0] data_out   // IP2Bus_Data
);

  logic [7:0] shift;

  always_ff @(posedge clk) begin
    if (rst) begin
      shift    <= '0;
      code     <= '0;
      code_new <= 1'b0;
    end else begin
      if (store) shift <= {data_in, shift[7:1]};
      if (load) begin
        code     <= shift;
        code_new <= 1'b1;
      end else if (read_ack) begin
        code_new <= 1'b0;
      end
    end
  end

  assign data_out = read_en ? {23'd0, code_new, code} : 32'd0;

endmodule
