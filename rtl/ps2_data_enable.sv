// ps2_data_enable: tells the bit counter when to sample the keyboard data line.
//
// The keyboard clock runs at 10 - 16.7 kHz and each bit cell is stable well
// after the clock falls. On every falling edge of the (already synchronised)
// keyboard clock this block starts a delay of SAMPLE_DELAY system clocks, and
// when it runs out raises data_en for one cycle: the middle of the bit cell.
// A new falling edge restarts the delay.
//
// The sampling point, 25 us after the falling edge, i.e. 1250 cycles of the
// 50 MHz clock, follows the original design.
//
// Timing: data_en is a one-cycle registered pulse SAMPLE_DELAY cycles after the
// cycle in which the falling edge is seen on ps2_clk.
module ps2_data_enable #(
  parameter int unsigned SAMPLE_DELAY = 1250  // 25 us at 50 MHz
) (
  input  logic clk,
  input  logic rst,
  input  logic ps2_clk,  // keyboard clock, synchronised to clk
  output logic data_en   // one-cycle sample strobe
);

  localparam int unsigned CW = $clog2(SAMPLE_DELAY + 1);

  logic          clk_q;
  logic          running;
  logic [CW-1:0] cnt;
  logic          fall;

  assign fall = clk_q && !ps2_clk;

  always_ff @(posedge clk) begin
    if (rst) begin
      clk_q   <= 1'b1;
      running <= 1'b0;
      cnt     <= '0;
      data_en <= 1'b0;
    end else begin
      clk_q   <= ps2_clk;
      data_en <= 1'b0;
      if (fall) begin
        running <= 1'b1;
        cnt     <= CW'(1);
      end else if (running) begin
        if (cnt == CW'(SAMPLE_DELAY - 1)) begin
          running <= 1'b0;
          data_en <= 1'b1;
        end
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule
