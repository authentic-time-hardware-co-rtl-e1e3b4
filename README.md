# Real-time Sobel edge detector: serial camera in, VGA out

This design takes live video from a small serial camera, finds the edges in every frame and shows the edge image on a standard 640 x 480 VGA monitor. It is written for a low-cost FPGA board with a 50 MHz oscillator.

Edges are found with the 3x3 Sobel operator. It is applied separately to the red, green and blue planes, and each plane has its own threshold. The thresholds adapt to the picture. For each colour, the mean gradient magnitude of the previous frame is the threshold *seed*. A factor set by the user on a rotary knob scales the seed. A busy picture therefore gets a higher threshold, which keeps its edge image uncluttered. A plain picture gets a lower one, so soft colour changes still show.

The camera works at low speed and column by column. The monitor wants fast pixels row by row. Most of the design sits between those two ends.

## System at a glance

```
            cam_tx  <- uart_tx <- cam_cmd            ("DF\r" after reset and after every frame)
 camera                                  ^ frame_done
            cam_rx  -> uart_rx -> cam_parser --token req/gnt--> sobel_engine --write--> frame_buffer
                        bytes      pixels+row/col                |  ^  thresholds         | read
                                   frame-end token     gradients v  |                     v
                                                   adaptive_threshold x3 <- factor   vga_controller -> VGA
                                                                            ^                 (RGB444, HS, VS)
                                                        rotary_encoder -----+---> led
                                                                            +---> lcd_controller -> character LCD
```

| Module | Role |
|---|---|
| `edge_pkg` | Shared types: RGB24/RGB12 structs, the parser-to-Sobel token, and the stream marker values. |
| `uart_rx`, `uart_tx` | RS-232 link to the camera, 115,200 baud 8N1 (434 clocks per bit at 50 MHz). |
| `cam_cmd` | Sends the camera's dump-frame command `D F <CR>` after reset and again after every frame end, so video keeps flowing. |
| `cam_parser` | Decodes the camera's frame dump into pixels with their column and row. It trims each 143-pixel column to 120 rows. |
| `sobel_engine` | Holds the two-column input buffer and the 3x3 window. Computes the three gradient magnitudes, makes the edge decision and writes the frame buffer. |
| `sobel_grad` | Combinational \|Gx\| + \|Gy\| for one 8-bit plane. It is used three times. |
| `adaptive_threshold` | Per plane: sums the gradients of a frame, divides by their count and scales the result by the user factor. |
| `rotary_encoder` | Debounced quadrature decoder. It produces the 8-bit user factor. |
| `lcd_controller` | Writes the knob instructions and the current factor to a 2 x 16 character LCD. |
| `frame_buffer` | 9600 x 12-bit dual-port RAM holding the 80 x 120 edge image. |
| `vga_controller` | 640 x 480 at 60 Hz with a 25 MHz pixel rate. Shows each image pixel as an 8 x 4 block. |
| `edge_detector_top` | Wires all of the above together. |

## The camera stream

The camera delivers 80 columns of 143 pixels. Each pixel is three bytes: red, green and blue, each in the range 16 to 240. Three byte values below 16 act as markers:

```
1  2 r g b r g b ...  2 r g b ...  ...  3
^  ^ first column     ^ next column     ^ frame end
frame start
```

`cam_parser` counts columns (`2`) and pixels within a column, and joins three bytes into a pixel. It ignores everything outside a frame, such as the camera's `ACK` reply and its `:` prompt.

The 80 x 143 image is cut down to 80 x 120 so that it has the 4:3 shape of the screen. The parser keeps rows `TRIM_TOP` to `TRIM_TOP+119` of each column. With the default `TRIM_TOP` = 11 this is a centre crop. Columns past `COLS` are dropped.

Each kept pixel becomes a token `{kind, row, col, rgb}`. The frame end becomes a token of its own. Because the frame end travels in the same ordered stream as the pixels, the threshold units see it only after the last gradient of the frame.

## Sobel on a column-ordered stream

This is the part that needs the most care. A 3x3 mask needs three neighbouring columns, but the pixels arrive one column at a time. The chip has too little RAM for a whole 24-bit input frame, so the input buffer keeps only the last two columns. It is one `ROWS`-deep RAM whose word `r` holds `{P(r,c-1), P(r,c-2)}` (48 bits).

For each arriving pixel `P(r,c)` the engine does four steps:

1. **Grant.** It grants the token. The parser holds `tok_req` and the token until `tok_gnt`.
2. **Read.** It reads word `r` of the column RAM.
3. **Shift and write back.** It shifts the 3x3 window up by one row and loads the bottom row with `P(r,c-2)`, `P(r,c-1)` and `P(r,c)`. Then it writes `{P(r,c), P(r,c-1)}` back to word `r`. The buffer is then ready for column `c+1`.
4. **Compute.** The window is now centred on `(r-1, c-1)`, so the mask slides *down* the column. For each plane `sobel_grad` forms

   ```
   Gx = (right column, weights 1 2 1) - (left column, weights 1 2 1)
   Gy = (top row,      weights 1 2 1) - (bottom row,  weights 1 2 1)
   |G| = |Gx| + |Gy|                  (0 .. 2040, 11 bits)
   ```

   A plane has an edge when `|G|` is greater than that plane's threshold. One clock later the engine writes the RGB444 pixel to the frame buffer at `(r-1)*COLS + (c-1)`. Each 4-bit channel is `F` if its plane has an edge and `0` if not. At the same time the engine hands the three magnitudes to the threshold units.

A window exists only for `r >= 2` and `c >= 2`, so the one-pixel border of the image is never computed. The display shows that border black.

A pixel costs 4 clocks, and its result appears 4 clocks after the grant. At 115,200 baud a pixel arrives only every 3 x 10 x 434 = 13,020 clocks. The engine is therefore idle almost all the time, and the parser's `overrun` flag marks a fault rather than a load condition.

## Adaptive threshold

Each `adaptive_threshold` instance adds up the magnitudes of one plane over a frame and counts them. On the frame-end strobe it hands both to a restoring divider. The divider produces one quotient bit per clock, 25 clocks in all. The quotient is the mean `|G|` of the frame just finished. It becomes the seed for the next frame.

The threshold is `thr = (seed * factor) >> 4`. `factor` has 4 fraction bits, so 16 means 1.0.

While a divider is busy, `sobel_engine` grants no token. This keeps the first pixels of a new frame from using a half-updated threshold. At camera speed the next pixel comes thousands of clocks later, so this wait never actually holds anything up.

After reset the seed is 0. The first frame therefore marks every non-zero gradient as an edge. A frame without gradients leaves the seed unchanged.

## Frame buffer and display

The processed image is 80 x 120 x 12 bits, or 115,200 bits. The Sobel process writes it column by column. `vga_controller` reads it row by row.

The controller walks the usual 800 x 525 raster: 640/16/96/48 pixels across and 480/10/2/33 lines down, with both syncs active low. It takes one pixel step every second clock of the 50 MHz clock, which gives 25 MHz and about 59.5 frames per second.

Replication counters turn the screen position into an image position. Each image pixel covers 8 pixels along a line and 4 lines. Of the factor 8, a factor 2 corrects the camera's narrow pixels and a factor 4 is the magnification. The row start address `row*80` is kept as a running sum, so no multiplier is needed.

The image border and everything outside the active area are black. All outputs are registered and lag the counters by one pixel. `frame_start` marks the first active pixel.

## User controls and status

`rotary_encoder` synchronises the knob's A and B lines and its push-button, and debounces them: a level must be stable for `DEBOUNCE` clocks, 1 ms by default. Each debounced rising edge of A is one step of the factor. The factor goes up when B is low and down when B is high. It stays between 1 and 255. Pressing the knob sets it back to 16 (1.0).

`led` shows the factor. `thr_r`, `thr_g` and `thr_b` carry the three thresholds in use, for debugging.

`lcd_controller` tells the user what the knob does on the board's 2 x 16 character LCD, an HD44780-type module driven over a 4-bit, write-only bus (`lcd_e`, `lcd_rs`, `lcd_d`; `lcd_rw` stays low). After the power-on wait it sends the wake-up nibbles 3, 3, 3, 2, then 0x28, 0x06, 0x0C and 0x01. After that it rewrites both lines in a loop, about every 1.4 ms:

```
TURN KNOB: LEVEL
PUSH=RESET F=hh
```

`hh` is the factor in hex (10 = 1.0). It is sampled at the start of each pass, so a knob step shows within two passes. Each nibble has 40 ns of set-up and a 240 ns enable pulse. A byte's two nibbles are 1 us apart. The rest after a byte is 40 us, or 1.64 ms after the clear command. All these waits are parameters.

## Clocks, reset and handshakes

Everything runs from one 50 MHz clock. The 25 MHz VGA rate is a clock enable, not a second clock domain. `rst` is synchronous and active high. It clears every control register but not the RAM contents.

Two process pairs use request/grant:

- **parser to Sobel:** `tok_req`, `tok` and `tok_gnt`;
- **command sender to UART:** `tx_req`, `tx_data` and `tx_gnt`.

The requester keeps its request and data stable until the grant arrives. Assertions in `cam_parser` and `cam_cmd` state this rule. All other links are one-clock strobes.

## Parameters (top level)

| Parameter | Default | Meaning |
|---|---|---|
| `CLKS_PER_BIT` | 434 | 50 MHz / 115,200 baud |
| `COLS` | 80 | image columns |
| `ROWS` | 120 | image rows after trimming |
| `CAM_ROWS` | 143 | pixels per camera column |
| `TRIM_TOP` | 11 | first camera row kept |
| `HREP`, `VREP` | 8, 4 | screen pixels per image pixel, across and down |
| `DEBOUNCE` | 50000 | knob debounce time in clocks |
| `LCD_POWERON_CLKS`, `LCD_INIT_CLKS` | 750000, 205000 | LCD waits after power-on and after each wake-up nibble (15 ms, 4.1 ms) |
| `LCD_CMD_CLKS`, `LCD_CLEAR_CLKS` | 2000, 82000 | LCD rest after a byte and after the clear command (40 us, 1.64 ms) |

The package fixes the field widths: up to 255 rows and 127 columns, and a 14-bit frame-buffer address.

## How far it follows the described system, and where it is its own

These parts follow the system it implements:

- camera, link speed and stream format;
- the 80 x 120 trim;
- the 8 x 4 replication onto 640 x 480;
- 24-bit processing with 12-bit output;
- a column-written, row-read frame buffer;
- an input buffer that holds only part of the image, with the mask applied along columns;
- per-plane Sobel with `|G| = |Gx| + |Gy|`;
- per-plane thresholds from the mean gradient of the last frame, scaled by a knob;
- request/grant between processes.

These are this design's own choices:

- which 120 rows are kept (a centre crop);
- the two-column buffer layout and the 4-clock schedule;
- the strict `>` in the edge test;
- the output colouring (a plane's channel is full on at an edge);
- the black border;
- exact integer mean, the 4-fraction-bit factor and a seed of 0 after reset;
- the knob's step, limits, press action and debounce;
- the LCD text, its 4-bit HD44780 protocol and its refresh loop;
- the VGA porch values;
- single-clock operation with a pixel enable;
- re-sending `DF` after each frame.

Outside this RTL:

- **Camera register set-up.** No commands for clock speed, brightness or contrast are sent. The camera runs with its power-on settings.
- **Co-simulation link.** The vendor tool flow's co-simulation interface (JTAG or Ethernet between a simulation host and the board) is a verification set-up, not part of the detector.

### Link rate

A rate of 4,800 pixels per second is often quoted for this link. That figure is 115,200 divided by 24 bits, which leaves out the start and stop bits. With 8N1 framing a pixel takes 30 bit times, so the link carries 3,840 pixels per second. A full 80 x 143 frame then takes about 3 s. The Sobel process could keep up with a link thousands of times faster.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing `TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_sobel_grad` | 5,000 random windows plus the step cases, against an integer model of both masks |
| `tb_uart_rx` | random bytes with ±3 % baud error; `valid` latency; framing error; glitch rejection |
| `tb_uart_tx` | frames decoded at mid-bit; start and stop bits; no grant while busy |
| `tb_cam_cmd` | `D F CR` after reset; one command per frame end, including one that arrives mid-command; requests held until granted |
| `tb_cam_parser` | trimming, positions, colours, frame-end token, ignored text, and `overrun` when grants stop |
| `tb_sobel_engine` | every frame-buffer write and gradient against a reference; border skipped; 4 clocks per pixel; no grant during `hold` |
| `tb_adaptive_threshold` | seed equals the integer mean (including full 9,204-gradient frames); `thr` for several factors; divider time; empty frame |
| `tb_rotary_encoder` | bounce filtering, both directions, both limits, press |
| `tb_frame_buffer` | column-order writes with concurrent row-order reads at 80 x 120 |
| `tb_lcd_controller` | the whole nibble stream (init, set-up, three refreshes) against text built in the testbench; the factor shown follows changes; enable width, set-up, data held while enable is high, every minimum rest |
| `tb_vga_controller` | two full frames pixel by pixel (colour, replication, border, HS, VS); 840,000-clock frame period |
| `tb_edge_detector_top` | the whole chain at reduced size (10 x 12 camera image, 8 clocks per bit), over three frames |
| `tb_edge_detector_full` | the whole chain with every parameter at its default (80 x 143 frames at 115,200 baud), over two frames |

The two end-to-end tests (`tb/edge_tb_body.svh`) use a camera model that answers the `DF` command with a frame of tiled colours. They:

- check the thresholds after each frame against a model;
- check one whole VGA frame pixel by pixel against the expected edge image;
- turn the knob before the last frame;
- rebuild the LCD text from its bus and check both lines, with the final factor on line 2;
- count how often each mechanism occurred: command sent, text ignored, rows trimmed, thresholds recomputed, edge and flat pixels, factor changes, LCD refreshes.

The token hold during threshold recomputation cannot occur at camera speed. Only `tb_sobel_engine` exercises it.

The full-size test simulates about 300 million clocks. It takes a few minutes.

To run a testbench with Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_sobel_engine \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/edge_pkg.sv tb/tb_sobel_engine.sv
./obj_dir/Vtb_sobel_engine
```

Replace the module name to run another testbench. For the end-to-end tests, `-Itb` lets the shared body be included.
