# Frame-perfect two-player Tetris on an FPGA

This is the RTL for a Tetris game that runs entirely in FPGA logic. Two
boards play against each other over a small parallel cable. The design has
one main goal: a button press must show up on the very next video frame.
To get there, the game logic evaluates all the moves the player could make
next before the player makes one. The video path draws every pixel straight
from the game state, with no frame buffer. The link to the other board is
sized so that both players' boards are exchanged once per frame.

Each board contains:

* **Controller interface**: eight active-low arcade buttons. It filters them
  and turns them into one-cycle actions, with delayed auto-shift.
* **Game logic**: the screens, the Tetris rules (SRS rotation, 7-bag
  randomizer, hold, lock delay, T-spins, garbage) and the game clock.
* **Graphics**: 800x600 at 72 Hz SVGA, made of independent pixel drivers
  and a one-hot colour multiplexer.
* **TSPIN link**: a 4-bit parallel, stop-and-wait link with its own
  handshake line in each direction, plus a clock line from the master board.
* **Music**: Korobeiniki as two square waves, mixed for an external 8-bit
  DAC at 50 kHz.
* **Latency counter**: measures the time from each input to the vertical
  sync that ends the frame showing it.

Everything runs from one 50 MHz clock, with an active-low asynchronous
reset.

## Top level (`tetris_top`)

```
btn_n[7:0] -> controller_if -> act --> game_logic --> field, hold, preview, clock, counters
                                 |         ^  |                     |
                                 |         |  +-- attack ---------+ |
                                 v         |                      v v
                          latency_counter  +-- opp garbage <-- net_stack <==> TSPIN pins
                                 ^                                  |
                                 |                      opp field/hold/preview
                                 +--- frame_start/vsync --- graphics <--+
                                                               |
                                                     VGA pins (RGB 8:8:8, HS, VS)
music --> dac_data[7:0], dac_clk
```

Once per frame, at the start of vertical sync, the game state is handed to
`net_stack`. That state is the visible 10x20 field with the falling piece,
the hold piece and the six preview pieces. The opponent's state comes back
the same way and is drawn next to the player's field. Garbage lines earned
by a clear travel in the same packet.

Parameters of `tetris_top` are all real-time values; their defaults are
the real ones. Override them only to shorten simulations:

| Parameter | Default | Meaning |
|---|---|---|
| `IS_MASTER` | 1 | this board drives the TSPIN clock |
| `HOLD_MIN` | 63 | clocks a button must be stable to count |
| `DAS_CYCLES` / `ARR_CYCLES` | 8.5 M / 2.5 M | auto-shift delay (170 ms) and repeat (50 ms) |
| `LOCK_CYCLES` | 25 M | lock delay, 0.5 s |
| `GRAVITY_CYCLES` | 50 M | one row per second |
| `GARBAGE_DELAY` | 50 M | incoming garbage waits 1 s |
| `CYC_PER_MS` | 50 000 | game clock |
| `NET_DIV` | 500 | TSPIN bit time, 100 kHz |
| `SLOT_CYCLES` | 10 M | one eighth-note of music, 0.2 s |

## Buttons and input conditioning

| Button | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| Action | Hold | Spin L | Spin R | Hold | Right | Soft drop | Left | Hard drop |

Each action has an `input_handler`:
1. A two-flop synchronizer.
2. A 63-cycle stability filter, which rejects glitches.
3. An auto-repeat state machine. The first pulse comes 66 clocks after a
   clean press. Moves, rotations and soft drop then repeat after
   `DAS_CYCLES`, and every `ARR_CYCLES` after that. Hold and hard drop fire
   once per press.

On top of this, `controller_if` blocks every button for 15 clocks after any
action. Cross-talk that shows up on a neighbouring pin right after a press
cannot register. On the menus, Hard drop starts a 40-line sprint and Hold
enters battle mode. Hard drop also leaves the won and lost screens.

## Game logic: how an input becomes visible in tens of cycles

`game_core` is the hardest part of the design.
* It keeps the locked field, 10 columns by 24 rows. Rows 20 to 23 are an
  invisible spawn buffer, and row 0 is the bottom.
* It keeps the falling piece as `{kind, rotation, x, y}`, where x and y
  are the corner of its SRS bounding box.

While a piece falls, the core keeps three candidate results ready, each
built by its own `piece_checker`:

* **Clockwise rotation**: the five SRS kick positions are checked one per
  clock, and the first that fits is kept.
* **Counter-clockwise rotation**: the same, with the other kick table.
* **Shift and drop**: left, right and down one row, checked one per clock.

A `piece_checker` checks in one cycle that the four minos are inside the
field and do not overlap anything. After any change of the piece, five
clocks re-evaluate everything. Once the evaluation is done, an action only
selects a precomputed result, and `applied` pulses on the next clock. The
worst case from a clean button press to a changed game state is about 66 +
6 clocks. One frame is 692 640 clocks.

The other rules:

* **Lock down**: a grounded piece locks after 0.5 s. Every successful move
  or rotation while grounded restarts the timer, at most 15 times per
  piece. Hard drop locks at once.
* **Hold**: allowed once per piece.
* **Randomizer**: `seven_bag` builds a 3-bit value from three 31-bit LFSRs.
  The value is accepted if it names one of the seven pieces that is still
  left in the current bag. The pieces go into a 6-entry preview queue.
* **Locking**: the core writes the piece, clears full rows, and reports
  `{lines, tspin, mini, all_clear}`. Pending garbage rows are then pushed
  in from below, grey, with one random gap. A piece that cannot spawn, or
  that locks wholly above the visible field, tops the player out.
* **T-spins** (`tspin_detect`): the three-corner rule. A T-spin is "mini"
  unless both front corners are filled or the last rotation used the fifth
  kick.
* **Attack** (`garbage_calc`):

  | Clear | Lines sent |
  |---|---|
  | Single / Double / Triple / Tetris | 0 / 1 / 2 / 4 |
  | T-spin Single / Double / Triple | 2 / 4 / 6 |
  | Mini T-spin Single / Double | 0 / 1 |

  Combo bonuses for combo 0 to 10+ are 0, 1, 1, 2, 2, 3, 3, 4, 4, 4, 5.
  Back-to-back adds 1 and an all clear adds 4. The sum saturates at 15.
* **Incoming garbage** (`garbage_queue`): waits in a pending queue of up to
  12 lines. It becomes ready after `GARBAGE_DELAY`.

`system_fsm` holds the screen state:

```
START_SCREEN -> SPRINT_MODE -> GAME_WON / GAME_LOST
             -> MP_READY -> MP_MODE -> GAME_WON / GAME_LOST
```

A sprint is won at 40 lines. A battle is won when the other board reports
a game end. `game_timer` counts h:mm:ss.mmm during a game.

## Graphics

`vga_controller` generates 800x600 at 72 Hz: 1040 x 666 clocks per frame,
or 72.19 Hz at 50 MHz. Its porch and sync widths are the VESA values for
this mode.

Each screen element is a pixel driver. A driver looks at the current
(x, y) and returns a colour and an "active" bit:
* the two playfields: `playfield_driver`, 24-pixel tiles;
* hold and next pieces: `hold_driver` and `next_driver`, half-size tiles;
* timer, line counters and frame counter: `timer_driver`, `lines_driver`
  and `frames_driver`;
* menu texts and the end screen: `menu_driver` and `game_end_driver`.

`pixel_mux` picks the active driver's colour. The outputs are registered
once.

Text is drawn by `char_render`. It uses a 6x6 font (`font_pkg`) at a
power-of-two scale, and `text_line` strings characters together. The frame
counter overlay is switched by `sw_frames`. Tile colours are the usual
guideline colours, and garbage is grey.

## TSPIN link

There are 11 signal pins per board:
* the clock line, driven by the master and read by the slave;
* four data lines and one handshake line in each direction.

The bit rate is 100 kHz. The slave re-aligns its bit timing to the master's
clock edges (`net_clock`).

**Line code.** Every packet on every line starts with the sync word
`11111111`. The payload is zero-stuffed so that eight ones cannot appear in
it:
* data lines get a 0 after every 7 bits;
* handshake headers get a 0 after every 2 bits.

A receiver (`serial_rx`) hunts for the sync word and then shifts in the
fixed encoded length of its line. `stuff_decode` removes the stuffing and
flags a stuffed position that is not 0. As on the original link, there is
no error correction. Such errors are counted, but the data is still used.

**Data packet.** The packet is 836 bits: `{SN[3:0], GBG[3:0], HLD[3:0],
PQ[23:0], PFD[799:0]}`. PFD is the 20 visible rows of 10 tiles, 4 bits per
tile. The packet is cut into four chunks:

| Line | Bits | Payload | After stuffing | With sync |
|---|---|---|---|---|
| 0 | 835..628 | 208 | 237 | 245 |
| 1 | 627..420 | 208 | 237 | 245 |
| 2 | 419..212 | 208 | 237 | 245 |
| 3 | 211..0 | 212 | 242 | 250 |

A packet therefore takes 250 bit times, or 2.5 ms. A 72 Hz frame has room
for about five sends.

**Handshake packet.** An 8-bit header `{SN, PID}`, with PID 1 = ACK (also
used as "game start") and PID 0 = game end. After stuffing it is 12 bits,
plus the sync word.

**Stop-and-wait.** The `data_sender` sends a fresh snapshot once per frame.
An ACK whose sequence number is the next one (SN + 1) completes the send.
Without that ACK, the same packet goes out again after 64 bit times of
silence. The `data_receiver` ACKs every packet it receives in full. It
delivers a packet only if its sequence number is the expected one, so a
repeat caused by a lost ACK is dropped.

**Start and end of a battle** (`net_control`):

```
IDLE -> GAME_READY -> IN_GAME -> GAME_LOST -> GAME_LOST_TO -> IDLE
                         \-> GAME_WON -> IDLE
```

* In GAME_READY the board streams ACKs. An ACK from the other board starts
  the game on both.
* A top-out moves to GAME_LOST, which streams game-end packets until the
  winner ACKs.
* The board that receives a game end goes to GAME_WON, answers with ACKs,
  and shows the win screen.
* GAME_LOST_TO and GAME_WON last 200 bit times before returning to IDLE.

## Music and latency measurement

`music` plays a 64-slot song ROM of eighth notes. Each slot is a melody
MIDI note and a bass MIDI note, with 0 for a rest; the song loops.
`note_lut` holds the half-period of each MIDI note n in clocks:
round(50e6 / (2 * 440 * 2^((n-69)/12))). `wave_gen` toggles a square wave
at that period. The DAC sample is 160 when the melody wave is high, plus 95
when the bass wave is high. It is updated every 1000 clocks (50 kHz), with
`dac_clk` as the strobe.

`latency_counter` starts on any action. It stops at the start of the
vertical sync that closes the first frame whose visible area began after
the input. The last value, the worst value and the number of measurements
come out on `lat_last`, `lat_worst` and `lat_count`.

## Where this design makes its own choices

These points are not fixed by the original design:

* The DAS and ARR times.
* The gravity speed and the garbage delay.
* The screen layout and the prompt texts.
* The font glyphs.
* The LFSR polynomial (x^31 + x^28 + 1).
* The zero-stuffing line code and its run lengths.
* The 64-bit resend timeout and the 200-bit end-of-game timeout.
* The exact end point of the latency measurement.
* The song arrangement and the mix weights.

Outgoing attacks do not cancel pending garbage. Garbage beyond 12 pending
lines is dropped.

The following are not included: the start-screen logo, the win and lose
photos, and the QR code.

## Simulating

Every testbench is self-checking. Each ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog. Compile with the
three packages first, for example:

```
verilator --binary --timing -Wno-fatal rtl/tetris_pkg.sv rtl/net_pkg.sv rtl/font_pkg.sv \
    -y rtl -y tb tb/tb_tetris_top.sv --top-module tb_tetris_top
obj_dir/Vtb_tetris_top
```

Run from the directory that contains `rtl/`, because the ROM files
`rtl/note_halfperiod.hex` and `rtl/korobeiniki.hex` are loaded by that
relative path.

* `tb_tetris_top` is the main end-to-end test, about 2 minutes. It uses two
  boards, cross-connected pin to pin, with timings scaled down except the
  video. A built-in placement planner plays through buttons only. The test
  plays a full 40-line sprint, then a battle with garbage both ways. One
  data cable is cut for a moment, which forces a resend, and the battle is
  played until one side tops out. Every mechanism is counted, and one that
  never happens fails the test.
* `tb_tetris_top_full` is the full-size test, about 20 seconds. It runs one
  board with every parameter at its default for five frames. It checks the
  VGA timing, the sprint start, the piece being drawn, and the move latency
  from a button press. It also checks on-chip latency of at most two
  frames, the 50 kHz DAC clock and the 100 kHz link clock.
* One unit testbench per block, such as `tb_game_core`, `tb_garbage_calc`,
  `tb_net_packets` and `tb_music`. Some testbenches cover a group of
  blocks:
  * `tb_stuff_codec`: the stuffing encoder and decoder;
  * `tb_serial_link`: the serial sender and receiver;
  * `tb_net_packets`: the packet senders and receivers.

Measured at default timing, the worst latency from input to the vsync that
ends the displaying frame was 1.95 frame times. That means the input
appeared on the first frame drawn after it.
