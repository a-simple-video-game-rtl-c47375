// ps2_bit_counter: keeps track of the position inside an 11-bit keyboard frame.
//
// A keyboard frame is a start bit (0), eight data bits sent least significant
// first, an odd parity bit and a stop bit (1). The counter steps 0 .. 10 on
// each sample strobe (one per keyboard clock cycle) and wraps to 0. Count 0 is
// the start bit; for counts 1 .. 8 it raises store so the shift register takes
// the data bit; at count 10, the stop bit, it raises done so the received byte
// is handed to the bus. The parity bit (count 9) is ignored.
//
// Counting 0 .. 10 on the keyboard clock, store for bits 1 .. 8 and the hand
// over at the stop bit follow the original design. The counter does not check
// the start or stop bit values and has no time-out: a lost clock pulse shifts
// the framing until the keyboard is reset (as in the original).
//
// Timing: store and done are combinational, high in the same cycle as the
// sample strobe that falls on the matching bit.
module ps2_bit_counter (
  input  logic       clk,
  input  logic       rst,
  input  logic       data_en,  // sample strobe, one per keyboard clock cycle
  output logic [3:0] bit_cnt,  // position in the frame, 0 .. 10
  output logic       store,    // sample is a data bit
  output logic       done      // sample is the stop bit
);

  localparam logic [3:0] LAST = 4'd10;

  always_ff @(posedge clk) begin
    if (rst) begin
      bit_cnt <= '0;
    end else if (data_en) begin
      bit_cnt <= (bit_cnt == LAST) ? '0 : bit_cnt + 1'b1;
    end
  end

  assign store = data_en && (bit_cnt >= 4'd1) && (bit_cnt <= 4'd8);
  assign done  = data_en && (bit_cnt == LAST);

endmodule
