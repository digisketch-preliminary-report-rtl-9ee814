# DigiSketch: a two-player Etch-a-Sketch with SD card storage

DigiSketch turns an FPGA board into an Etch-a-Sketch. Each player turns two
rotary encoders to move a cursor over a 640 x 360 canvas and paints with one
of 16 colors and 8 stroke widths. The canvas is shown at 1280 x 720 over
HDMI. Two boards joined by a single differential wire pair share one
picture: each board sends its brush to the other once per video frame, and
both brushes paint on both canvases. When a player switches drawing off, the
canvas is saved to an SD card. Saved pictures can be played back as a slide
show, either automatically or one per button press. A picture that is being
shown can be drawn on and saved as a new picture, so it works as a template.

This repository holds synthesizable SystemVerilog for all of the logic. It
also holds a self-checking testbench for every block and two end-to-end
testbenches that run two complete boards against each other.

## The pieces

```
 encoders / switches ─► user_input ──local brush──┬──────────────► frame_buffer ──► video_mux ─► tmds_encoder x3
                                                  │                  ▲   ▲  (canvas,     ▲
                                                  ▼                  │   │   palette)    │
 other board ◄─► [diff. buffer] ◄─► comm_module ──remote brush──────┘   │               gui_sprite
                                                                         │
 SD card ◄─► [SD controller] ◄─► sd_interface ◄──── port A when draw is off
 video_sig_gen ─► scale ─► frame_buffer scan position;  new_frame ─► comm_module
```

| Module | Role |
|---|---|
| `digisketch_pkg` | Canvas size, the 26-bit brush packet `brush_t`, and the SD FSM state type |
| `user_input` | Debounces the encoders and buttons, then updates cursor x/y, color and width |
| `debouncer`, `synchronizer` | Input conditioning |
| `frame_buffer`, `fb_bram`, `color_palette` | Canvas memory, brush painting, and 4-bit to 24-bit color |
| `scale` | Maps a 1280 x 720 screen position to the canvas (divide by 2) |
| `video_sig_gen` | 720p timing generator |
| `gui_sprite`, `video_mux` | Color and width indicator, and the final pixel selection |
| `tmds_encoder` | DVI 8b/10b encoder, one per color channel |
| `sd_interface` | The 11-state FSM that saves, loads and plays the slide show |
| `comm_module`, `diff_io`, `diff_tx`, `diff_rx`, `packet_cdc` | The link between boards |
| `digisketch_top` | Wires the above into one board |

Four things are left outside the top module and appear as its ports:

- the 10:1 TMDS serializers and HDMI output buffers;
- the bidirectional differential I/O buffer and its pull resistors;
- the global clock buffer;
- the SD card controller.

All four are vendor primitives or existing IP.

## Clocks and reset

- Video, user input, the frame buffer and the SD interface run on `clk_pixel`. It is 74.25 MHz for standard 1280 x 720 at 60 Hz.
- The link runs on `clk_link`, a 100 MHz clock that is already buffered.
- Packets cross between the two clocks in `packet_cdc`. It is a toggle handshake: the sender holds the data stable, flips a request bit, and the receiver captures the data two flops later.
- `rst` is synchronous to `clk_pixel`. It reaches the link domain through two flops that power up asserted.

## Drawing: how the brush reaches the canvas

The canvas is a 230,400 x 4-bit true dual-port RAM. Its address is `y*640 + x`.

The design never computes a brush outline. Instead it paints while the raster passes:

- As `video_sig_gen` sweeps the screen, `scale` turns each screen pixel into a canvas pixel.
- In every cycle, `frame_buffer` tests whether that pixel lies inside the local brush.
- The test is `dx² + dy² ≤ r²`, where `r` is the 3-bit stroke width. Width 0 paints a single pixel.
- If the pixel is inside, the brush color is written through port A.
- The remote brush is tested the same way and written through port B.
- Port B also reads the same pixel for display. The read takes two cycles, after which `color_palette` expands it to 24-bit RGB.
- Each canvas pixel is covered by four screen pixels, so it is written up to four times per frame with the same value.

The rules for sharing the RAM:

- Painting happens only while `draw` is on.
- While `draw` is off, port A belongs to `sd_interface`, which saves or loads pictures through it.
- If both brushes hit the same pixel in the same cycle, the local brush wins.
- The remote brush paints only after a first packet has arrived from the other board.

The palette is the classic 16-color text-mode set. Color 0 (black) is the empty canvas, so drawing in black erases.

The video path has a fixed latency:

- The raster coordinates are delayed two cycles so the GUI sprite lines up with the canvas read.
- `video_mux` puts the sprite over the canvas, blanks outside the active area, and registers the result.
- `rgb`, `hsync`, `vsync` and `active_out` trail the timing generator by three cycles.
- The TMDS words trail it by four. Blue carries `{vsync, hsync}` as control bits.

The sprite sits at the left edge of the screen. It shows two tiles:

- a 48 x 48 swatch of the current color inside a white frame;
- a gray tile with a disc whose radius, 2·width + 1 screen pixels, matches the brush size on screen.

## User input

The pins of the two encoders (CLK, DT, SW) arrive on `pmodb`:

- encoder A: `[3]`, `[2]`, `[5]`;
- encoder B: `[7]`, `[6]`, `[4]`.

Every input passes through a debouncer. The default settle time is 74,250 cycles, which is 1 ms.

Each encoder detent is taken on the falling edge of CLK. DT gives the direction (1 means up).

| Action | Effect |
|---|---|
| Turn A | Move x by 4 canvas pixels |
| Turn B | Move y by 4 canvas pixels |
| Press and turn A | Step the stroke width (0..7, wrapping) |
| Press and turn B | Step the color (0..15, wrapping) |

The cursor is clamped to the canvas.

With `use_switches` high, the encoders are ignored:

- `dir_sw = {up, down, left, right}` moves the cursor one pixel per video frame.
- `btn_width` and `btn_color` each step their value by one.

After reset the brush is at the canvas centre (320, 180), with color 15 (white) and width 1.

## The SD card interface

**Card layout.**

- Sector 0, bytes 0..3, holds the slot index where the next picture will go, most significant byte first.
- Picture *k* fills the 450 sectors that start at sector 1 + 450·k.
- Each pixel is one byte, `{4'h0, color}`, in row-major order.
- A 512-byte sector holds 512 pixels, so a picture is exactly 230,400 bytes.
- At most `MAX_IMAGES` = 9320 slots are used. That is what a 2 GB card holds: 1 + 9320·450 sectors = 2,147,328,512 bytes ≤ 2³¹.

**The FSM (`sd_interface`):**

- **START_SEC_ADDR_READ → READ_ADDR**
  - At power-up, read sector 0 and take the index.
  - If a slide-show switch is on and the card holds a picture, go on to the slide show.
  - Otherwise go to IDLE.
- **IDLE**
  - Wait for `draw`, a slide-show switch, or a rising edge of `reset_sd_card`.
- **DRAWING**
  - Wait while the players draw.
  - When `draw` falls, save the canvas.
- **FINISHED_SAVING_SECTOR ↔ SAVING_SECTOR**
  - Write the canvas to slot *index*, one sector at a time.
- **START_SEC_ADDR_WRITE → OVERWRITE_ADDR**
  - Rewrite sector 0 with index + 1 after a save, or with 0 after `reset_sd_card`.
  - Resetting the index to 0 is a lazy delete: old pictures stay on the card until they are overwritten.
- **SLIDE_SHOW_NEW_SECTOR ↔ SLIDE_SHOW_SECTOR**
  - Read one picture into the canvas, one sector at a time, starting from slot 0.
- **SLIDE_SHOW_NEXT_IMAGE**
  - Hold the picture for `DWELL_CYCLES` (about 1 s).
  - In manual mode, wait for a rising edge of `next_image` instead.
  - Then load the next picture.
  - Go to IDLE after the last picture, or once both slide-show switches are off. Either way the canvas keeps the picture that was on screen.
  - If `draw` comes on here, go straight to DRAWING. The picture on screen becomes a template, and the result is saved to a new slot.

Some rules keep the FSM well-behaved:

- A finished slide show does not restart until both slide-show switches have been turned off.
- The switches are checked only between pictures, so a sector transfer is never cut short.
- Saving stops once all 9320 slots are used.

**Controller handshake.** The SD controller is not part of this design, so `sd_interface` assumes the following interface:

- Requests:
  - `sd_rd` and `sd_wr` are one-cycle requests.
  - They are issued only while `sd_ready` is high.
  - `sd_addr` is the byte address of a 512-byte sector.
- Reads:
  - A read delivers 512 bytes.
  - Each byte comes on `sd_dout` with a one-cycle `sd_byte_available`.
- Writes:
  - The controller samples `sd_din` in each cycle it pulses `sd_ready_for_next_byte`.
  - Those pulses must be at least 4 cycles apart, to cover the two-cycle frame buffer read.

If your controller differs, only the sector loops in `sd_interface` need to change.

## The link between boards

**Packet.** The 26-bit packet, `brush_t`, has four fields:

| Bits | Field | Range |
|---|---|---|
| [25:16] | x | 0..639 |
| [15:7] | y | 0..359 |
| [6:3] | color | 0..15 |
| [2:0] | width | 0..7 |

The packet is sent on every `new_frame`.

**Line code.** The line idles high, held there by pull resistors on the pair. Every symbol lasts `PERIOD` = 20 link cycles, starts low, and encodes its value in how long it stays low:

| Symbol | Low time | Low cycles |
|---|---|---|
| Sync | half the period | 10 |
| 0 | a quarter of the period | 5 |
| 1 | three quarters of the period | 15 |

A message is sent in this order:

1. an opening sync;
2. the 26 bits, most significant first;
3. a closing sync: 10 cycles low, after which the line is released.

The closing sync is what gives the last bit a clear end. The whole message takes 20 + 26·20 + 10 = 550 cycles, which is 5.5 µs at 100 MHz.

**Receiver (`diff_rx`).**

- It measures every low and high stretch and accepts it if it is within `MARGIN` = 3 cycles of 1/4, 1/2 or 3/4 of the period.
- Its states are:
  - SL and SH for the sync halves;
  - DL for a bit's low part;
  - DH0 and DH1 for the high part of a 0 or a 1;
  - DONE after the closing sync.
- Any stretch out of range, or a level held longer than `PERIOD + MARGIN`, sends it back to IDLE and drops the message.
- DONE waits for the line to return high.

**Sharing the pair (`diff_io`).** Both boards drive the same wire pair, so a major FSM with three states, IDLE, RECV and TRANS, decides who drives it:

- By default the board listens.
- A send request that arrives while the line is quiet starts TRANS at once.
- A request that arrives during a reception sets `message_waiting`. The packet goes out as soon as the reception ends.
- A newer request replaces an older one that is still waiting.
- During TRANS the receiver is fed the idle level, so a board never decodes its own message.
- In the worst case a packet reaches the other board about 11 µs after its frame starts, far inside a 16.7 ms frame.

`io_sel` high means "drive the line"; the buffer's enable polarity may need inverting on your board.

## Parameters

| Parameter (top) | Default | Meaning |
|---|---|---|
| `DEBOUNCE_CYCLES` | 74,250 | Input settle time (1 ms at 74.25 MHz) |
| `MOVE_STEP` | 4 | Canvas pixels per encoder detent |
| `DWELL_CYCLES` | 74,250,000 | Slide-show hold time (1 s) |
| `LINK_PERIOD` | 20 | Link symbol length in `clk_link` cycles |
| `LINK_MARGIN` | 3 | Receiver timing tolerance in cycles |

The canvas size is fixed in `digisketch_pkg`. The canvas RAM needs 921,600 bits, about a third of the block RAM on the original target board.

## Where this design fills gaps or departs from its source description

The original description gives the architecture, the state names of the FSMs, the packet format and the duty-cycle line code. The choices below are this design's own:

- **Clocking.**
  - The original names only a 100 MHz link clock.
  - This design uses a separate 74.25 MHz pixel clock with a handshake crossing. It uses standard 720p60 timing, where the original quotes 30 frames per second.
- **Bit order.**
  - The description says bits go out MSB first. Its transmitter diagram indexes the packet from bit 0.
  - This design sends MSB first.
- **Closing sync.**
  - The transmitter has an explicit END state for the closing sync, which the description requires.
  - Its length (half a period, then release) was chosen so a message is the quoted 550 cycles.
- **Receiver error handling.** The return-to-idle conditions and the DONE exit are this design's own.
- **End of a slide show.** The FSM diagram suggests the index is rewritten when a slide show ends. The text says the module simply goes idle. This design follows the text, so only a save or a reset rewrites sector 0.
- **Brush shape.**
  - Disc radius equals the width index.
  - The original only says pixels "within the stroke width's radius" are painted.
- **Other choices.** These are all unspecified in the original:
  - the palette colors;
  - the sprite layout;
  - the encoder-to-axis assignment;
  - step size, debounce time and reset position;
  - the SD card byte order and slot placement;
  - the SD controller handshake.
- **Video alignment.** The canvas read is aligned to the raster with fixed delays. The original notes its frame buffer was unpipelined.
- **Not included.**
  - The HDMI serializers, the differential I/O and clock buffers, and the SD controller are not included (see above).
  - Error checking on the link (a CRC) was only considered in the original, and is not built.

## Verification

Every module in `tb/` has a self-checking testbench `tb_<module>.sv`:

- Each one prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
- Each one has a watchdog.
- The expected values are computed independently of the module under test.

Some of the checks:

- the exact 550-cycle message length and symbol timing (`tb_diff_tx`);
- receiver rejection of mistimed symbols (`tb_diff_rx`);
- collision handling and `message_waiting` (`tb_diff_io`);
- TMDS words decoded back to the byte, with the running disparity kept within bounds (`tb_tmds_encoder`);
- a full 720p frame of timing (`tb_video_sig_gen`);
- SD save, index update, slide show, template drawing and reset against a card model (`tb_sd_interface`).

`tb_sd_capacity` runs the SD interface at its default sizes:

- It starts from a card whose index is 9319 and saves a full canvas into the last slot.
- It checks that the slot ends at byte 2,147,328,511, inside a 2³¹-byte card, and that the index becomes 9320.
- It checks that a further save writes nothing.
- It starts the automatic slide show and checks that the first picture is held for exactly the default 74,250,000 cycles (1 s) before the next one is fetched. This takes about 45 s in Verilator.

`tb/sd_card_model.sv` is a behavioural stand-in for the SD controller and card. It stores sectors sparsely and follows the handshake above.

There are two end-to-end testbenches. Each runs two complete boards, with their link wires joined and each board given its own card model:

- **`tb_digisketch_top`** uses short debounce and dwell times. It counts how often each mechanism happened and fails any that never did:
  - encoder moves, width and color changes, switch moves and buttons;
  - local and remote painting, and the sprite;
  - TMDS control periods;
  - link transmissions, receptions and waiting messages on both boards;
  - saves, index writes, loads, manual next, and drawing on a template.
- **`tb_digisketch_top_full`** uses every default parameter. It runs:
  - encoder turns;
  - both players drawing, with each canvas checked against a reference;
  - a save;
  - a reload through the manual slide show.

  It takes under a minute in Verilator.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/digisketch_pkg.sv tb/tb_diff_tx.sv --top-module tb_diff_tx
./obj_dir/Vtb_diff_tx +verilator+rand+reset+2
```

The `+verilator+rand+reset+2` option starts every flop at a random value. The design resets everything it reads, so the results do not depend on the seed.
