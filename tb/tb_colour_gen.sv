// tb_colour_gen: checks the four colours (background black, wall yellow,
// snake blue, food red as 3/3/2-bit RGB), blanking outside the window and that
// the output only changes on the pixel-rate enable.
`timescale 1ns/1ps
module tb_colour_gen;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1, ce = 1'b0, pix_en = 1'b0;
  logic [1:0] code = '0;
  rgb_t rgb;
  int   checks = 0, failures = 0;

  always #10 clk = ~clk;

  colour_gen dut (.clk, .rst, .ce, .pix_en, .code, .rgb);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected {red, green, blue} as an 8-bit value
  function automatic logic [7:0] expected(logic [1:0] c, logic en);
    if (!en) return 8'b000_000_00;
    case (c)
      2'd0:    return 8'b000_000_00;  // black
      2'd1:    return 8'b111_111_00;  // yellow
      2'd2:    return 8'b000_000_11;  // blue
      default: return 8'b111_000_00;  // red
    endcase
  endfunction

  initial begin
    logic [7:0] prev;
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      prev   = rgb;
      code   = 2'(i % 4);
      pix_en = (i % 9 != 3);
      ce     = (i % 3 != 2);
      @(posedge clk); #1;
      if (ce) check(rgb == expected(code, pix_en),
                    $sformatf("code %0d en %0b -> %h", code, pix_en, rgb));
      else    check(rgb == prev, "output held without enable");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
