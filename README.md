# Beat Saber on FPGAs — SystemVerilog implementation

This is an RTL version of the augmented-reality Beat Saber game from the
"Beat Saber Final Project Report". The player holds a blue-LED saber and wears
a red-LED hat. Two cameras track both of them. Note blocks fly towards the
player, and a hit note plays when a block is cut in the right direction. The
original design spans three boards: a camera board, a game/render board and a
music board. Here they are one top module, `beat_saber_top`. The serial wires
between boards are top-level ports, and the board wiring loops them back.

## What is built

| Part | Modules | Clock |
|---|---|---|
| Camera tracking | `camera_interface`, `camera_top_level`, `rgb_to_ycrcb`, `color_threshold`, `center_of_mass` (+ `divider`), `transmitter_camera_2`, `receiver_camera_1` | 65 MHz |
| Serial link (8N1, 115200 baud) | `baud_gen`, `uart_tx`, `uart_rx`, `sync_2ff` | 65 MHz |
| Game logic | `game_logic_and_renderer`, `game_state`, `block_loader` (+ `bram_readonly`), `block_positions`, `saber_history`, `state_processor` | 65 MHz |
| Display | `three_dim_renderer` (+ `bram_readwrite`), `vga` (1024x768) | 65 MHz |
| Game-to-music commands | `music_link_tx` | 65 MHz |
| Music player | `music_interface`, `serial_parse`, `sd_read_state_control`, `audio_fifo`, `sample_reader`, `play_hit_note`, `audio_pwm` | 65 / 100 / 25 MHz |

Shared types (block record, 3D vector) are in `beat_saber_pkg`. The demo
song's block map is `rtl/beat_map.mem`. It holds 32 blocks, one every 0.5 s:
block i sits at x = 120 + 80·(i mod 4), y = 160 + 96·((i div 4) mod 3), hits
at tick 100 + 50·i, has colour i mod 2 and direction i mod 4 (up, left, right,
down), and an all-ones word ends the song.

### How it works

- **Cameras.** Each camera's RGB565 pixels are converted to YCrCb. The
  converted pixels are masked with Cr/Cb windows: one for the blue saber and
  one for the red hat. Each mask feeds a centre-of-mass unit.
- **Camera 2 link.** Camera 2 sends its centroids as a repeating 9-byte frame
  that starts with `FF FF FF`. The data bytes are packed so that three FF
  bytes in a row cannot occur inside the data.
- **Camera 1 receiver.** Camera 1 keeps the last nine bytes. When the first
  three are FF, it latches the coordinates.
- **3D position.** The saber and head positions are (y1, x1, x2): the row and
  column from camera 1, and the column from camera 2.
- **Game time.** Game time advances every 10 ms (`TICK_CYCLES` = 650000).
- **Block window.** The block loader streams the song's blocks from ROM into
  a 12-entry window. Entry 0 is always the next block to be hit.
- **Depth and visibility.** `block_positions` gives each block a depth of
  8 × (ticks until its hit time). A block is visible from 2 s before its hit.
- **Slices.** `state_processor` tests only entry 0. A block counts as sliced
  when all of these hold:
  - it is within 10 ticks of its hit time;
  - the saber is within 64 units of it in X and Y;
  - the saber moved at least 16 units in the block's arrow direction over the
    last 5 ticks (`saber_history`).
- **Misses.** A block more than 10 ticks late counts as missed and costs one
  health point.
- **Display.** The framebuffer is 512x384 pixels of 12 bits each. The
  raycaster writes it and the 1024x768 VGA scan reads it at 2x scale.
- **Music commands.** After `start_game`, `music_link_tx` sends the start byte
  `FF` 100 times, then one `01` byte per slice.
- **Music player.**
  - It waits for the start byte, then reads the WAV header to find the data
    length (the 4 bytes after `data`).
  - It streams 512-byte reads from byte 512 into a 16384-entry FIFO.
  - It stops asking for reads while the FIFO holds more than 1536 bytes.
  - It plays one byte every 568 clocks of 25 MHz (44 kHz).
  - When a hit byte arrives, it switches the output to a 740 Hz square wave
    for 0.1 s.
  - Samples cross into 100 MHz through a two-flop synchroniser and drive
    `audio_pwm`.

## What is not built

- **Raycasting renderer.** These modules are not built:
  - `three_dim_block_selector`, `get_intersecting_block`, `eye_to_pixel`
  - `does_ray_block_intersect`, `get_pixel_rgb_formatted`, `should_draw_arrow`
  - `get_pixel_color` and the 3D vector operations

  The report describes what they do, but not their maths constants, geometry
  or pipeline timing. They also run on ten vendor floating-point cores. The top
  gives the raycaster what it needs: the block window (`block_arr`), the saber
  and head positions, and a framebuffer write port (`rc_x`, `rc_y`, `rc_rgb`,
  `rc_valid`).
- **Vendor and course modules.** Four modules stay outside the design:
  - The floating-point cores and the clocking wizard. The three clocks are top
    inputs.
  - The SPI SD card controller. Its byte interface is a set of top ports.
  - The camera capture. Pixel streams are top inputs.

  The vendor FIFO is replaced by my own `audio_fifo`.
- **Beat detection.** The report does this offline in Python, so it is out of
  scope here. A fixed demo map stands in for its output.

## Choices where the report is unclear

- **Baud rate.** The baud generator adds 29 to a 14-bit accumulator at
  65 MHz. That gives 115051 baud, 0.13 % slow, which both ends of a link
  share.
- **FIFO halt point.** The report gives the halt point in two ways: "less than
  1536 empty entries" and "more than 1536 entries". I follow the second.
- **Not given in the report.** These values are my own:
  - the hit byte value (`01`);
  - the slice radius, speed and time window;
  - the miss timeout;
  - health (10 points);
  - the visibility window and depth scale;
  - the colour thresholds;
  - the note's PWM levels (0x40 and 0xC0);
  - the VGA porches.

  Each one is a module parameter.

## Tests

Every module except `divider` (tested inside `center_of_mass`) has a
self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M` and has a watchdog timer. The testbenches run
under Verilator 5. Run them from the repository root, because the map files
are read by paths relative to it (`rtl/beat_map.mem`, `tb/tb_top_map.mem`):

```
verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/beat_saber_pkg.sv \
    tb/tb_beat_saber_top.sv --top-module tb_beat_saber_top
./obj_dir/Vtb_beat_saber_top
```

- **`tb_beat_saber_top`** runs the whole system with a 1 ms game tick and a
  two-block song.
  - It loops back both serial wires and uses an SD card model
    (`tb_sd_card_model`) that serves a WAV file.
  - It moves the saber's LED in camera 1 so that the saber cuts the first
    block.
  - It checks that each of these happens: camera → serial → 3D update, slice,
    miss, score and health, the start command arriving, SD streaming, an SD
    halt on a full FIFO, audio samples, the hit note, speaker PWM, song end, and
    a red square written to the framebuffer appearing as 64 pixels on every VGA
    frame.
- **`tb_beat_saber_top_full`** runs the same checks, except song end, with
  no parameter overrides. That means a 10 ms tick, the 32-block demo song and a 0.1 s hit
  note. It plays the first 1.65 s of the song and takes about 4 minutes to
  simulate.

## Files

- `rtl/`: synthesizable SystemVerilog, one module or package per file, and the
  demo map.
- `tb/`: testbenches, bus models (`tb_serial_source`, `tb_serial_sink`,
  `tb_sd_card_model`) and the short test map `tb_top_map.mem`.
