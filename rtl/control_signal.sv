// control_signal: bus handshake of a peripheral's slave port.
//
// The bus attachment holds Bus2IP_CS high for one access until it sees an
// acknowledge. This block answers each access with a single-cycle acknowledge:
// IP2Bus_WrAck for a write (Bus2IP_RNW low), IP2Bus_RdAck for a read. It also
// gives the write strobe for the pixel BRAM (we), high in the first cycle of a
// write only, and the read strobe (re), high in the first cycle of a read.
//
// The block's name, its Bus2IP_CS / Bus2IP_RNW inputs, IP2Bus_RdAck output and
// the BRAM read/write control follow the original design. The write
// acknowledge and the exact one-cycle protocol are this design's choice.
//
// Timing: we and re are combinational in the first cycle of the access; the
// acknowledge is registered and high in the cycle after. A new access may start
// in the cycle after the acknowledge.
module control_signal (
  input  logic clk,
  input  logic rst,
  input  logic cs,      // Bus2IP_CS
  input  logic rnw,     // Bus2IP_RNW
  output logic we,      // write strobe, first cycle of a write
  output logic re,      // read strobe, first cycle of a read
  output logic wr_ack,  // IP2Bus_WrAck
  output logic rd_ack   // IP2Bus_RdAck
);

  logic busy;  // an acknowledge is being given this cycle

  assign we = cs && !rnw && !busy;
  assign re = cs &&  rnw && !busy;

  always_ff @(posedge clk) begin
    if (rst) begin
      busy   <= 1'b0;
      wr_ack <= 1'b0;
      rd_ack <= 1'b0;
    end else begin
      busy   <= we || re;
      wr_ack <= we;
      rd_ack <= re;
    end
  end

endmodule
