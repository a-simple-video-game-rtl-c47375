// tb_pixel_enable: sweeps every (hcount, vcount) of an 800 x 525 frame and
// checks the game window flags against a centred 512 x 384 window
// (columns 64 .. 575, lines 48 .. 431).
`timescale 1ns/1ps
module tb_pixel_enable;
  logic [9:0] hcount, vcount;
  logic v_in, pix_en;
  int   checks = 0, failures = 0;

  pixel_enable dut (.hcount, .vcount, .v_in, .pix_en);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #100ms;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_inside = 0;
    for (int y = 0; y < 525; y++) begin
      for (int x = 0; x < 800; x++) begin
        hcount = 10'(x); vcount = 10'(y);
        #1;
        check(pix_en == (x >= 64 && x <= 575 && y >= 48 && y <= 431),
              $sformatf("pix_en at %0d,%0d", x, y));
        if (x == 0) check(v_in == (y >= 48 && y <= 431), $sformatf("v_in at %0d", y));
        if (pix_en) n_inside++;
      end
    end
    check(n_inside == 512 * 384, $sformatf("n_inside %0d", n_inside));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
