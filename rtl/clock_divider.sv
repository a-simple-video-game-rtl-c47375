// clock_divider: derives the 25 MHz VGA pixel rate from the 50 MHz system clock.
//
// The pixel logic stays on the system clock; instead of a second clock this
// block produces a one-cycle clock-enable pulse, pix_ce, once every DIV system
// clocks (every other cycle for DIV = 2). Everything that works at pixel rate
// advances only in cycles where pix_ce is high. The divide ratio 50 MHz / 25 MHz
// follows the original design; using an enable rather than a divided clock net
// is this design's choice.
//
// Timing: after reset pix_ce is low for DIV-1 cycles, then high for one cycle,
// and repeats with period DIV.
module clock_divider #(
  parameter int unsigned DIV = 2  // system clocks per pixel (50 MHz / 25 MHz)
) (
  input  logic clk,
  input  logic rst,     // synchronous, active high
  output logic pix_ce   // one-cycle pulse per pixel period
);

  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt    <= '0;
      pix_ce <= 1'b0;
    end else begin
      if (cnt == CW'(DIV - 1)) begin
        cnt    <= '0;
        pix_ce <= 1'b1;
      end else begin
        cnt    <= cnt + 1'b1;
        pix_ce <= 1'b0;
      end
    end
  end

endmodule
