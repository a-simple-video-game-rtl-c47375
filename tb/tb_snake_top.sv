// tb_snake_top: end-to-end test of the Snake game hardware at its default
// sizes, with the testbench playing the part of the game processor.
//
// The "processor" draws a game screen through the VGA controller's bus port:
// black background, a yellow wall two blocks wide around a 40 x 30 playing
// area, a five-block blue snake and a red food block. A keyboard model presses
// and releases S (make 1B, break F0 1B); the processor polls the keyboard
// controller, turns the snake downwards and moves it once per frame the way the
// game software does: blank the tail block, shift the body, paint the new head.
// vga_checker compares every pixel clock of three frames with the blocks the
// processor wrote.
//
// Counted, and each must happen at least once: bus writes and reads with their
// acknowledges, key codes received, break prefixes, polls that found no new
// code, snake moves, hsync pulses, complete frames, blanked pixels, and each of
// the four colours on screen.
`timescale 1ns/1ps
module tb_snake_top;
  import snake_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ipif_req_t vga_req, ps2_req;
  ipif_rsp_t vga_rsp, ps2_rsp;
  logic [2:0] red, green;
  logic [1:0] blue;
  logic hsync, vsync;
  logic kbd_clk, kbd_data;
  logic [1:0] ref_mem [3072];
  logic active = 1'b0;
  int   checks = 0, failures = 0;
  int   m_checks, m_failures, m_frames, m_hs, m_blank;
  int   m_colour [4];
  int   n_writes = 0, n_reads = 0, n_codes = 0, n_breaks = 0, n_empty = 0, n_moves = 0;

  always #10 clk = ~clk;

  snake_top dut (
    .clk, .rst,
    .vga_bus_req(vga_req), .vga_bus_rsp(vga_rsp),
    .ps2_bus_req(ps2_req), .ps2_bus_rsp(ps2_rsp),
    .vga_red(red), .vga_green(green), .vga_blue(blue), .vga_hsync(hsync), .vga_vsync(vsync),
    .ps2_clk(kbd_clk), .ps2_data(kbd_data)
  );

  ps2_keyboard kbd (.kbd_clk, .kbd_data);

  vga_checker mon (
    .clk, .active, .red, .green, .blue, .hsync, .vsync, .ref_mem,
    .checks(m_checks), .failures(m_failures), .frames(m_frames),
    .hsync_pulses(m_hs), .blank_pixels(m_blank), .colour_seen(m_colour)
  );

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic finish_tb();
    checks += m_checks;
    failures += m_failures;
    $display("frames=%0d hsync=%0d blank=%0d colours=%0d/%0d/%0d/%0d writes=%0d reads=%0d codes=%0d breaks=%0d empty_polls=%0d moves=%0d",
             m_frames, m_hs, m_blank, m_colour[0], m_colour[1], m_colour[2], m_colour[3],
             n_writes, n_reads, n_codes, n_breaks, n_empty, n_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (5 * 1600 * 525) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  // ---- processor side -------------------------------------------------------
  // Bus accesses of the two peripherals share one processor, so they are
  // serialised with a semaphore.
  semaphore bus_lock = new(1);

  task automatic vga_write(int a, pix_code_t code);
    int n = 0;
    bus_lock.get();
    @(negedge clk);
    vga_req = '{cs: 1'b1, rnw: 1'b0, addr: 32'(a) << 2, data: 32'(code)};
    do begin @(posedge clk); #1; n++; end while (!vga_rsp.wr_ack && n < 16);
    check(n == 1, "VGA write acknowledge");
    ref_mem[a] = code;
    n_writes++;
    @(negedge clk);
    vga_req.cs = 1'b0;
    bus_lock.put();
  endtask

  task automatic ps2_read(output logic [31:0] w);
    int n = 0;
    bus_lock.get();
    @(negedge clk);
    ps2_req = '{cs: 1'b1, rnw: 1'b1, addr: 32'h0, data: 32'h0};
    do begin @(posedge clk); #1; n++; end while (!ps2_rsp.rd_ack && n < 16);
    check(n == 1, "keyboard read acknowledge");
    w = ps2_rsp.data;
    n_reads++;
    @(negedge clk);
    ps2_req.cs = 1'b0;
    bus_lock.put();
  endtask

  // Block address as the game software forms it: column + 64 * row.
  function automatic int blk(int col, int row);
    return col + 64 * row;
  endfunction

  // snake body, head first, as block addresses
  int snake [$];
  int dir_dc = 1, dir_dr = 0;   // moving right
  logic break_pending = 1'b0;

  task automatic draw_screen();
    for (int a = 0; a < 3072; a++) vga_write(a, PIX_BACKGROUND);
    // wall two blocks wide around a 40 x 30 playing area
    for (int r = 0; r < 34; r++)
      for (int c = 0; c < 44; c++)
        if (c < 2 || c >= 42 || r < 2 || r >= 32) vga_write(blk(c, r), PIX_WALL);
    snake = {};
    for (int i = 0; i < 5; i++) begin
      snake.push_back(blk(20 - i, 15));
      vga_write(blk(20 - i, 15), PIX_SNAKE);
    end
    vga_write(blk(30, 20), PIX_FOOD);
  endtask

  // Keyboard handling of the game: W/A/S/D turn the snake, a code after the
  // F0 break prefix is a key release and is ignored.
  task automatic poll_keyboard();
    logic [31:0] w;
    ps2_read(w);
    if (!w[8]) begin n_empty++; return; end
    n_codes++;
    if (break_pending) begin break_pending = 1'b0; return; end
    case (w[7:0])
      8'hF0: begin break_pending = 1'b1; n_breaks++; end
      8'h1D: begin dir_dc = 0;  dir_dr = -1; end  // W
      8'h1C: begin dir_dc = -1; dir_dr = 0;  end  // A
      8'h1B: begin dir_dc = 0;  dir_dr = 1;  end  // S
      8'h23: begin dir_dc = 1;  dir_dr = 0;  end  // D
      default: ;
    endcase
  endtask

  task automatic move_snake();
    int head_c, head_r, new_head;
    head_c = snake[0] % 64;
    head_r = snake[0] / 64;
    new_head = blk(head_c + dir_dc, head_r + dir_dr);
    vga_write(snake[$], PIX_BACKGROUND);   // blank the tail
    void'(snake.pop_back());               // body follows
    snake.push_front(new_head);
    vga_write(new_head, PIX_SNAKE);        // paint the new head
    n_moves++;
  endtask

  initial begin
    vga_req = '0;
    ps2_req = '0;
    foreach (ref_mem[i]) ref_mem[i] = 2'd0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    draw_screen();
    active = 1'b1;
    fork
      begin
        #1ms;
        kbd.send_byte(8'h1B);
        kbd.send_byte(8'hF0);
        kbd.send_byte(8'h1B);
      end
      begin
        // game loop: poll the keyboard, move once at the start of each
        // vertical blanking, until three frames have been checked
        int moved_at = 0;
        while (m_frames < 3) begin
          poll_keyboard();
          if (!vsync && m_frames != moved_at) begin
            moved_at = m_frames;
            move_snake();
          end
          repeat (50) @(posedge clk);
        end
      end
    join
    check(m_frames >= 3, "three frames checked");
    check(m_hs > 0, "hsync pulses");
    check(m_blank > 0, "blanked pixels");
    for (int i = 0; i < 4; i++) check(m_colour[i] > 0, $sformatf("colour %0d shown", i));
    check(n_writes > 3072 && n_reads > 0, "bus writes and reads");
    check(n_codes == 3, $sformatf("%0d key codes received", n_codes));
    check(n_breaks == 1, "break prefix seen");
    check(n_empty > 0, "polls with no new code");
    check(n_moves >= 2, "snake moves");
    check(dir_dr == 1 && dir_dc == 0, "snake turned down by the S key");
    // the head has moved down from its start after the key press
    check(snake[0] / 64 > 15, $sformatf("head row %0d", snake[0] / 64));
    finish_tb();
  end
endmodule
