// ps2_ctrl: PS2 keyboard controller peripheral of the Snake game.
//
// The keyboard sends each key event as 11-bit frames on its own clock (start
// bit, eight data bits least significant first, parity, stop). This block
// brings both keyboard lines into the system clock domain, samples the data
// line in the middle of every bit cell and assembles the scan code, which the
// processor then polls over the bus.
//
// Inside:
//   two-flop synchronisers on PS2_Clk and PS2_Data
//   ps2_data_enable   sample strobe SAMPLE_DELAY clocks after each clock fall
//   ps2_bit_counter   frame position 0 .. 10, store for data bits, done at stop
//   ps2_s2p_shifter   shift register and held scan code with a new-code flag
//   control_signal    one-cycle acknowledge of each bus access
//
// Bus: a read at any address returns {23'b0, new, code[7:0]} with IP2Bus_RdAck
// one cycle after the access starts, and clears "new". Writes are acknowledged
// and ignored. The processor sees make codes and the F0 break prefix as they
// come; decoding them (W/A/S/D) is left to software, as in the original.
//
// The three sub-blocks and the 25 us sampling point follow the original design.
// The synchronisers, the new-code flag and the acknowledge are this design's
// additions; the parity bit is ignored, as in the original.
module ps2_ctrl
  import snake_pkg::*;
#(
  parameter int unsigned SAMPLE_DELAY = 1250  // 25 us at 50 MHz
) (
  input  logic      clk,       // Bus2IP_Clk, 50 MHz
  input  logic      rst,       // Bus2IP_Reset, synchronous, active high
  input  ipif_req_t bus_req,
  output ipif_rsp_t bus_rsp,
  input  logic      ps2_clk,   // PS2_Clk from the keyboard
  input  logic      ps2_data   // PS2_Data from the keyboard
);

  logic [1:0] clk_sync, data_sync;
  logic       data_en, store, done;
  logic [3:0] bit_cnt;
  logic [7:0] code;
  logic       code_new;
  logic       we, re;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_sync  <= 2'b11;
      data_sync <= 2'b11;
    end else begin
      clk_sync  <= {clk_sync[0], ps2_clk};
      data_sync <= {data_sync[0], ps2_data};
    end
  end

  ps2_data_enable #(.SAMPLE_DELAY(SAMPLE_DELAY)) u_data_enable (
    .clk, .rst, .ps2_clk(clk_sync[1]), .data_en
  );

  ps2_bit_counter u_bit_counter (
    .clk, .rst, .data_en, .bit_cnt, .store, .done
  );

  control_signal u_control_signal (
    .clk, .rst, .cs(bus_req.cs), .rnw(bus_req.rnw),
    .we, .re, .wr_ack(bus_rsp.wr_ack), .rd_ack(bus_rsp.rd_ack)
  );

  ps2_s2p_shifter u_s2p_shifter (
    .clk, .rst, .store, .load(done), .data_in(data_sync[1]),
    .read_en(bus_req.cs && bus_req.rnw), .read_ack(bus_rsp.rd_ack),
    .code, .code_new, .data_out(bus_rsp.data)
  );

  logic unused;
  assign unused = ^{we, re, bit_cnt, code, code_new, bus_req.addr, bus_req.data};

endmodule
