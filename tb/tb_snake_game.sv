// tb_snake_game: plays a short game of Snake on the full-size hardware, with
// the testbench acting as the game processor, and checks the screen of every
// frame pixel by pixel.
//
// Game rules as the game software applies them: a 40 x 30 playing area inside
// a wall two blocks wide; the snake moves one block per step (blank the tail,
// shift the body, paint the new head); eating food adds one node and places new
// food at a pseudo-random free block (x = ((x + 34213) * 71411 - 34267) * 59,
// position = x % range + low); the snake passes through the wall to the far
// side; hitting its own body ends the game and a new one is drawn. W/A/S/D
// turn the snake; a key opposite to the current direction is ignored. Moves
// are made only during vertical blanking so that every frame shows one
// consistent picture.
//
// Script: frame 1 - three steps right, eating the food; frame 2 - S, one step
// down; frame 3 - A, one step left; frame 4 - W, one step up into the body:
// game over and restart; frame 5 - D, thirty steps right through the wall.
// Each of these events is counted and must occur.
`timescale 1ns/1ps
module tb_snake_game;
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
  int   n_eaten = 0, n_wraps = 0, n_game_over = 0, n_turns = 0, n_keys = 0, n_moves = 0;

  localparam int FIRST = 2, LAST_COL = 41, LAST_ROW = 31;  // playing area blocks

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
    $display("frames=%0d eaten=%0d wraps=%0d game_over=%0d turns=%0d keys=%0d moves=%0d",
             m_frames, n_eaten, n_wraps, n_game_over, n_turns, n_keys, n_moves);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  initial begin : watchdog
    repeat (8 * 1600 * 525) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    finish_tb();
  end

  // ---- processor side -------------------------------------------------------
  semaphore bus_lock = new(1);

  task automatic vga_write(int a, pix_code_t code);
    int n = 0;
    bus_lock.get();
    @(negedge clk);
    vga_req = '{cs: 1'b1, rnw: 1'b0, addr: 32'(a) << 2, data: 32'(code)};
    do begin @(posedge clk); #1; n++; end while (!vga_rsp.wr_ack && n < 16);
    check(n == 1, "VGA write acknowledge");
    ref_mem[a] = code;
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
    @(negedge clk);
    ps2_req.cs = 1'b0;
    bus_lock.put();
  endtask

  function automatic int blk(int col, int row);
    return col + 64 * row;
  endfunction

  // ---- game state -----------------------------------------------------------
  int snake [$];              // block addresses, head first
  int dir_dc, dir_dr;
  int food;
  logic break_pending = 1'b0;
  int unsigned rnd_x = 32'd12345;  // seed; the original takes it from a timer

  function automatic int my_rand(int lo, int hi);
    rnd_x = ((rnd_x + 32'd34213) * 32'd71411 - 32'd34267) * 32'd59;
    return int'(rnd_x % 32'(hi - lo)) + lo;
  endfunction

  function automatic bit on_snake(int a);
    foreach (snake[i]) if (snake[i] == a) return 1'b1;
    return 1'b0;
  endfunction

  task automatic place_food(int a);
    food = a;
    vga_write(food, PIX_FOOD);
  endtask

  task automatic new_game();
    for (int a = 0; a < 3072; a++) vga_write(a, PIX_BACKGROUND);
    for (int r = 0; r < 34; r++)
      for (int c = 0; c < 44; c++)
        if (c < FIRST || c > LAST_COL || r < FIRST || r > LAST_ROW) vga_write(blk(c, r), PIX_WALL);
    snake = {};
    for (int i = 0; i < 5; i++) begin
      snake.push_back(blk(20 - i, 15));
      vga_write(blk(20 - i, 15), PIX_SNAKE);
    end
    dir_dc = 1; dir_dr = 0;
    place_food(blk(22, 15));
  endtask

  task automatic poll_keyboard();
    logic [31:0] w;
    int dc, dr;
    ps2_read(w);
    if (!w[8]) return;
    if (break_pending) begin break_pending = 1'b0; return; end
    dc = dir_dc; dr = dir_dr;
    case (w[7:0])
      8'hF0: begin break_pending = 1'b1; return; end
      8'h1D: begin dc = 0;  dr = -1; end  // W
      8'h1C: begin dc = -1; dr = 0;  end  // A
      8'h1B: begin dc = 0;  dr = 1;  end  // S
      8'h23: begin dc = 1;  dr = 0;  end  // D
      default: return;
    endcase
    n_keys++;
    if (dc == -dir_dc && dr == -dir_dr) return;  // no reversing
    if (dc != dir_dc || dr != dir_dr) n_turns++;
    dir_dc = dc; dir_dr = dr;
  endtask

  // One step. Returns 1 if the game ended.
  task automatic step(output bit over);
    int c, r, head;
    c = snake[0] % 64 + dir_dc;
    r = snake[0] / 64 + dir_dr;
    if (c > LAST_COL) begin c = FIRST; n_wraps++; end
    if (c < FIRST)    begin c = LAST_COL; n_wraps++; end
    if (r > LAST_ROW) begin r = FIRST; n_wraps++; end
    if (r < FIRST)    begin r = LAST_ROW; n_wraps++; end
    head = blk(c, r);
    n_moves++;
    // moving: blank the tail and drop it, unless the snake eats and grows
    if (head != food) begin
      vga_write(snake[$], PIX_BACKGROUND);
      void'(snake.pop_back());
    end
    over = on_snake(head);
    snake.push_front(head);
    vga_write(head, PIX_SNAKE);
    if (head == food) begin
      int f;
      n_eaten++;
      do f = blk(my_rand(FIRST, LAST_COL + 1), my_rand(FIRST, LAST_ROW + 1));
      while (on_snake(f));
      place_food(f);
    end
    if (over) n_game_over++;
  endtask

  int steps_for_frame [6] = '{0, 3, 1, 1, 1, 30};
  logic [7:0] key_for_frame [6] = '{8'h00, 8'h1B, 8'h1C, 8'h1D, 8'h23, 8'h00};

  initial begin
    vga_req = '0;
    ps2_req = '0;
    foreach (ref_mem[i]) ref_mem[i] = 2'd0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    new_game();
    active = 1'b1;
    fork
      begin
        // keyboard: one key press and release during each listed frame
        for (int f = 1; f < 5; f++) begin
          wait (m_frames == f);
          #2ms;
          kbd.send_byte(key_for_frame[f]);
          kbd.send_byte(8'hF0);
          kbd.send_byte(key_for_frame[f]);
        end
      end
      begin
        // game: poll all the time, step only in the blanking after a frame
        int done_frame = 0;
        while (m_frames < 6) begin
          poll_keyboard();
          if (m_frames != done_frame && m_frames < 6) begin
            done_frame = m_frames;
            for (int s = 0; s < steps_for_frame[m_frames]; s++) begin
              bit over;
              poll_keyboard();
              step(over);
              if (over) begin
                new_game();
                break;
              end
            end
          end
          repeat (20) @(posedge clk);
        end
      end
    join
    check(m_frames == 6, "six frames checked");
    check(n_eaten >= 2, $sformatf("food eaten %0d times", n_eaten));
    check(n_wraps >= 1, "snake passed through the wall");
    check(n_game_over == 1, $sformatf("%0d game overs", n_game_over));
    check(n_keys == 4, $sformatf("%0d direction keys", n_keys));
    check(n_turns == 3, $sformatf("%0d turns", n_turns));
    check(snake.size() == 6, $sformatf("final length %0d", snake.size()));
    for (int i = 0; i < 4; i++) check(m_colour[i] > 0, $sformatf("colour %0d shown", i));
    finish_tb();
  end
endmodule
