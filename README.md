# Snake game hardware: a block-mapped VGA controller and a PS2 keyboard receiver

A Snake game runs as software on a small soft processor. The hardware in this
repository is what that processor needs to show the game and to read the
keyboard. It has two bus peripherals:

* a **VGA controller**. The processor draws the screen as a 64 x 48 map of
  2-bit "blocks". Each block is one of four colours: background, wall, snake or
  food. The controller scales every block to 8 x 8 screen pixels. The result is
  a 512 x 384 game window on a standard 640 x 480 VGA screen. The whole picture
  is held in 6144 bits of block RAM.
* a **PS2 keyboard controller**. It receives the keyboard's serial frames and
  holds the latest scan code for the processor to poll. The game uses W/A/S/D to
  steer.

The processor, its bus, the bus-attachment logic and a timer come from a vendor
library and are not part of this RTL. Each peripheral's slave-side bus signals
are ports of the top level, `snake_top`, so you can connect your own bus bridge
or drive them from a testbench.

## The screen: a 64 x 48 map behind a 512 x 384 window

This is the central idea of the design and the least obvious part of it.

The game needs only four colours and coarse positions. So the frame memory
holds one 2-bit code per 8 x 8 block instead of one per pixel:

| | |
|---|---|
| memory | 3072 words x 2 bits (64 columns x 48 rows) |
| word address | `column + 64 * row` |
| word value | 0 background (black), 1 wall (yellow), 2 snake (blue), 3 food (red) |

The processor paints one block with one bus write. Moving the snake therefore
costs two writes: blank the tail block, then paint the new head block.

Turning the scan position into a memory address needs no multiplier:

1. `address_generator` keeps one 18-bit counter. It adds 1 for every pixel
   inside the game window and clears on lines outside the window.
2. A window row is exactly 512 = 2^9 pixels wide. So the plain count already
   splits into fields: bits 8:0 are the column in the window and bits 17:9 are
   the row.
3. Dividing both by 8 is just dropping their three low bits. The memory address
   is therefore `{count[17:12], count[8:3]}`:

```
 count bit  17 ........ 12 | 11 .. 9 | 8 ......... 3 | 2 .. 0
            row / 8 (6 b)  | ignored | column / 8 (6b)| ignored
```

That gives the 12-bit address `row8 * 64 + col8`. It matches the way the
software computes a block address.

The window is centred on the screen: columns 64..575 and lines 48..431. Pixels
outside it are sent black.

## Scan timing and the pixel pipeline

All logic runs on the 50 MHz system clock. `clock_divider` does not make a
25 MHz clock. Instead it makes a one-cycle enable, `pix_ce`, on every second
clock. Everything that runs at pixel rate steps only on that enable.

Line and frame timing is standard 640 x 480 at 60 Hz:

| | visible | front porch | sync | back porch | total |
|---|---|---|---|---|---|
| horizontal (pixels) | 640 | 16 | 96 | 48 | 800 |
| vertical (lines) | 480 | 10 | 2 | 33 | 525 |

Both syncs are active low. With 2 clocks per pixel, one line lasts 1600 clocks
and one frame lasts 840 000 clocks.

Pipeline, with counts taken at the enable edge E0:

* E0: `h_counter`, `v_counter` and the address counter move to pixel *p*.
  `pixel_enable` decodes the window from the counts without a register.
* E0 + 1 clock: `pixel_bram` registers the block code for *p*.
* Next enable: `colour_gen` registers the colour for *p*, or black outside the
  window. In the same clock `vga_ctrl` registers hsync and vsync for *p*.

So colour and syncs leave together, one pixel period after the counters. This
depends on at least one clock between enables, so the divider ratio `DIV` must
be 2 or more. An assertion checks this at the start of simulation.

## Keyboard receiver

A PS2 keyboard drives its own clock, at 10 to 16.7 kHz. Each key event is one or
more 11-bit frames:

* a start bit (0);
* eight data bits, least significant first;
* an odd-parity bit;
* a stop bit (1).

The receiver works like this:

* Two-flop synchronisers bring `PS2_Clk` and `PS2_Data` into the system clock
  domain.
* `ps2_data_enable` watches for each falling edge of the keyboard clock. It then
  waits 1250 system clocks (25 µs) and gives one sample strobe. That puts the
  sample inside the clock-low phase of the bit cell.
* `ps2_bit_counter` counts the strobes 0..10. Count 0 is the start bit. For
  counts 1..8 it raises `store`, and `ps2_s2p_shifter` shifts the data bit in
  from the top. At count 10, the stop bit, it raises `done`.
* On `done` the shifter copies the byte into a held register and sets a
  **new-code flag**.
* The parity bit is ignored, and so are the values of the start and stop bits.

The keyboard sends a make code when a key is pressed. On release it sends `F0`
and then the make code again. The game software tells these apart. The keys are
W = `1D`, A = `1C`, S = `1B` and D = `23`.

Limit: there is no time-out. If a keyboard clock edge is lost, the framing stays
shifted until the keyboard is reset.

## Bus ports and registers

Each peripheral has one slave port, using the structs in `snake_pkg`:

* `ipif_req_t` holds `cs`, `rnw`, `addr[31:0]` and `data[31:0]`;
* `ipif_rsp_t` holds `rd_ack`, `wr_ack` and `data[31:0]`.

The protocol:

* The master raises `cs` and holds it until it sees the acknowledge.
* `control_signal` answers every access with a one-cycle `wr_ack` or `rd_ack`
  in the clock after `cs` rises.
* The master must drop `cs` in the clock after the acknowledge. Otherwise a
  second access begins.

| peripheral | access | effect |
|---|---|---|
| VGA | write to byte address `A` | block word `A[13:2]` ← `data[1:0]`. Word addresses 3072..4095 are ignored. |
| VGA | read | acknowledged, returns 0 (the frame memory has no read path to the bus) |
| keyboard | read, any address | returns `{23'b0, new, code[7:0]}` and clears `new` |
| keyboard | write | acknowledged, ignored |

Software polls the keyboard register until `new` is 1. A code counts as read in
the acknowledge cycle. If a new code arrives in that same cycle, the flag stays
set.

## What this RTL does and does not cover

The top contains the VGA controller and the keyboard controller. The following
parts of the complete system are outside it:

* the soft processor and its local memories;
* the processor bus and the generated bus-attachment logic;
* the timer whose count seeds the game's random food placement;
* the debug module, UART, clock generator and reset block;
* the game itself.

The game is software. It moves the snake, checks for food and self-collision,
wraps the snake through the wall and ends the game at 100 nodes. The end-to-end
testbench acts the way that software does, but only as much as the hardware
needs.

The following choices are this design's own:

* the sync porch and pulse widths, and the negative sync polarity (standard
  640 x 480 at 60 Hz);
* centring the 512 x 384 window on the screen;
* which 2-bit code selects which colour;
* byte-to-word bus addressing, with `ADDR_LSB = 2` (32-bit words);
* the single-cycle acknowledge, the write acknowledge and the zero read data of
  the VGA port;
* using a pixel enable instead of a divided clock;
* the keyboard synchronisers, the new-code flag and its clear-on-read;
* a one-clock read latency for the frame memory, with contents starting at 0.

## Files

`rtl/`: one module or package per file.

| file | role |
|---|---|
| `snake_pkg.sv` | bus request/response structs, pixel code enum, RGB struct |
| `snake_top.sv` | both peripherals side by side |
| `vga_ctrl.sv` | VGA peripheral: wires the blocks below |
| `clock_divider.sv` | pixel-rate enable (`DIV = 2`) |
| `h_counter.sv`, `v_counter.sv` | scan counters, hsync/vsync |
| `pixel_enable.sv` | game-window decode |
| `address_generator.sv` | 18-bit window count → 12-bit block address |
| `control_signal.sv` | bus strobes and acknowledges (shared by both peripherals) |
| `pixel_bram.sv` | 3072 x 2 dual-port frame memory |
| `colour_gen.sv` | 4-entry colour table, 3/3/2-bit RGB |
| `ps2_ctrl.sv` | keyboard peripheral: synchronisers and the blocks below |
| `ps2_data_enable.sv` | 25 µs sample strobe after each clock fall |
| `ps2_bit_counter.sv` | frame position, `store`, `done` |
| `ps2_s2p_shifter.sv` | shift register, held code, new flag, bus read data |

`tb/`: each module has a self-checking testbench `tb_<module>.sv`. There are
also two helpers and a game test:

* `ps2_keyboard.sv`: a keyboard model that sends frames at 12.5 kHz;
* `vga_checker.sv`: a screen monitor. It locks to vsync and checks every clock
  of colour, hsync and vsync against a reference block map.
* `tb_snake_game.sv`: plays a short game on the full-size hardware. The
  testbench applies the game rules as the processor would. The snake eats food
  and grows. New food goes to a pseudo-random free block. The snake turns on
  S, A and W, runs into itself, and the game restarts. Then it passes through
  the wall to the far side. Moves happen only in vertical blanking. Six frames
  are checked pixel by pixel.
* `tb_snake_top.sv`: the whole-system test at default sizes. It draws a game
  screen (wall around a 40 x 30 playing area, snake, food) and presses and
  releases S. It polls the keyboard, turns the snake and moves it once per
  frame. It checks three full frames pixel by pixel. It also counts that every
  mechanism happened: acknowledges, key codes, the break prefix, empty polls,
  moves, sync pulses, blanking and each colour.

## Simulating

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and ends with
`$finish`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/snake_pkg.sv \
          tb/tb_snake_top.sv --top-module tb_snake_top -Mdir obj_top -o sim
./obj_top/sim
```

Replace `tb_snake_top` with any other `tb_<module>` or with `tb_snake_game`.
The full system test covers about 2.6 million clocks and runs in a few seconds.
The game test covers about 5 million clocks. `tb_vga_ctrl` fills the
whole frame memory with random codes and checks three frames. `tb_ps2_ctrl`
checks that each code is ready 1250 to 1260 clocks after the frame's last
keyboard clock edge.

Parameters worth changing:

* `vga_ctrl`: `DIV`, the porch and sync widths, and `H_START`/`V_START` to move
  the window.
* `ps2_ctrl`: `SAMPLE_DELAY`, which must be scaled with the system clock
  (25 µs × f_clk).

The 512 x 384 window and the 64 x 48 map are fixed, because the address bit
selection depends on them.

## Size

After generic synthesis, the whole top comes to:

* about 140 word-level cells;
* 95 flip-flops;
* one 6144-bit memory.

The frame memory maps onto a single FPGA block RAM. Of the top's output bits,
the VGA port's 32-bit read data is constant 0 and the keyboard port's upper 23
read-data bits are constant 0.
