# Real-time video effects processor

This design takes live NTSC video in CCIR656 form (a 10-bit stream at 27 MHz) and adds effects to it one sample per clock. It then sends it back out as CCIR656. The user runs the effects from a mouse-and-keyboard GUI on a separate 1024x768 VGA screen. The effects are:

- **Frame grab:** captures one full frame into external ZBT SRAM.
- **Blue screen:** a chroma key that swaps a calibrated background colour for the grabbed frame.
- **Digital zoom:** 2x, 3x or 4x around a chosen point, using a second ZBT SRAM as a field store.
- **Overlay:** freehand drawing, two lines of typed text, a mouse cursor, and the grabbed frame. The frame is shown either full screen or as a picture-in-picture.

Everything is synthesizable SystemVerilog. The chips around the FPGA are not part of the RTL; their signals are plain ports on the top module `vfx_top`. These chips are:

- the video decoder and encoder chips
- two 512K x 36 ZBT SRAMs
- the font ROMs
- the PS/2 mouse and keyboard interfaces
- the VGA DAC
- the 65 MHz clock generator

## The video path

```
tv_in ─► ccir656_decoder ─► bluescreen ─► zoom ─► overlay ─► video_encoder ─► tv_out
                 │              ▲                    ▲
                 ▼              │ (read, when keying)│ (read, otherwise)
             framegrab ◄────────┴────────────────────┘      ZBT bank 0
                                   zoom ◄──► ZBT bank 1
```

Each stage passes on a 30-bit pixel `{Y, Cr, Cb}` (10 bits each, type `pixel_t` in `vfx_pkg`). With it goes a 3-bit `{field, vsync, hsync}` word (`fvh_t`). Each effect stage is one register deep. When an effect is off, the stage still delays the video by one clock, so the stream timing does not change when effects are switched.

### Where is a pixel? (`video_position`)

Every stage needs the pixel's row and column, so they all use one counter module with the same conventions:

- `h` falls on the first active sample of a line. The sample counter restarts there.
- Column = sample / 2. The decoder gives each pixel two clocks, Cb/Y and Cr/Y.
- The field line count is held at 0 while `v` is high. It advances on the rise of `h`, but only if the line just ended had active samples.
- Frame row = `{field line, field}`. So rows 0..479 interleave the two fields the way they appear on screen.
- Addresses into the frame store are `{row[9:0], col[9:0]}`.

The line numbering depends on that "had active samples" gate. Without it, the first visible line would be numbered 1 or 0 depending on how the source places the edge of `v`.

### Prefetch and latencies

Memory reads are issued ahead of the pixel that needs them:

| Read | Latency | Issued ahead by |
|---|---|---|
| ZBT read | 2 clocks | 3 samples (counting the framegrab address register) |
| Overlay bit buffers | 1 clock | 1 sample |
| Font ROM | 1 clock | handled in the render pipeline |

Blue screen, zoom and the overlay all compute a future address from the position counter. The data then lands exactly on the pixel it belongs to.

### CCIR656 decoder and encoder

**Decoder.** It looks for the timing reference `3FF 000 000 XY`, where XY carries F, V and H. Any first word of 3FC..3FF is accepted, since 8-bit sources send 3FC. It then splits the `Cb Y Cr Y` groups into two pixels that share their chroma.

**Encoder.** It works in reverse. It locks a 1716-sample counter to the falling edge of `h` and outputs active samples 0..1439. It inserts EAV at 1440..1443, blanking (200h/040h), and SAV at 1712..1715. The protection bits in the XY word are computed. The output lags the input by four clocks, so the SAV code can go out before the first active sample.

### Frame grab (`framegrab`)

A small FSM captures one whole frame into ZBT bank 0 after a trigger pulse:

1. Wait for the field signal to go from high to low (start of field 0).
2. Write field 0.
3. Write field 1.
4. Go back to idle.

Each pixel takes one 36-bit word. Only 30 bits are used; bits 35:30 are written as 0. The word address is `frame_row * 720 + column`, so one frame is 345,600 of the 524,288 words. When not capturing, the module serves reads for one of two clients. A 2:1 mux picks the read address:

- the blue screen while keying is on;
- the overlay otherwise.

The control logic turns the framegrab overlay off while the blue screen is on, so the two never compete. Read data appears 3 clocks after the address.

### Blue screen (`bluescreen`)

**Calibrating.** The user puts the background in front of the camera and clicks calibrate. For one frame, starting at the next field edge, six registers track the minimum and maximum of Y, Cr and Cb. They only look at a 20-pixel by 40-line box in the middle of the picture. The first sample in the box loads both the minimum and the maximum.

**Keying.** Afterwards, with keying enabled, any pixel whose three components all lie inside their calibrated ranges is replaced. The replacement is the grabbed-frame pixel at the same position.

### Zoom (`zoom`)

The zoom has to show a window of size 720/M x 240/M (per field) at M times its size. The steps are:

1. Each field, the centre of the window is taken from `zoom_pos` and clamped so the window stays inside the picture. This happens at the field edge.
2. The pixels of the window are written into one half of ZBT bank 1.
3. At the same time, the other half, filled during the previous field, is read back. Each output pixel is read from (row/M, col/M) within the window.
4. The halves swap on every field transition. They start at word 0 and word 65,536.

Writes use even samples and reads use odd samples, so the single-port ZBT keeps up. Each output pixel holds its value for M columns and M lines; this is the sample-and-hold filter. For 3x, the divide by 3 comes from a ROM (`div3_rom`) that is filled at elaboration time with floor(i/3).

### Overlay (`overlay`)

The overlay holds three bit-mapped memories:

| Memory | Size | Addressing |
|---|---|---|
| Trace (freehand drawing) | 240 x 720 bits | frame row / 2 |
| Text 1 | 24 x 720 bits | at a programmable top-left position |
| Text 2 | 24 x 720 bits | at a programmable top-left position |

A set bit paints the pixel white. The mouse cursor is a small cross, also drawn in white. The grabbed frame can be shown in one of two ways:

- full screen, replacing the video;
- as a 240 x 360 picture-in-picture at a programmable position, using every second row and column.

Priority, from highest: cursor, trace, text 1, text 2, grabbed frame, live video.

The overlay is programmed through a small bus with a 3-bit `select`, 21-bit `data` and a write strobe:

| select | data[19:0] | data[20] |
|---|---|---|
| 000 | text 1 address `{row, col}` | pixel value |
| 001 | text 1 position `{row, col}` | – |
| 010 | text 2 address | pixel value |
| 011 | text 2 position | – |
| 100 | picture-in-picture position | – |
| 110 | trace address `{row, col}` | pixel value |

Codes 101 and 111 are ignored, and so are buffer writes whose address falls outside the buffer. A `clear` pulse wipes the trace memory one bit per clock. That takes 172,800 clocks; `ready` is low until it finishes, and bus writes are ignored meanwhile.

## The control GUI (`control`)

`control` draws the GUI on the VGA screen and drives every enable and bus write of the video path.

### Screen layout

The screen holds:

- 21 widgets (`gui_widget`): check boxes, option buttons and push buttons;
- 24 text labels (`text_display`);
- a line showing what has been typed on the keyboard;
- a 720 x 525 drawing surface at (304, 0).

Check boxes are red when off and green when on. Option buttons choose the zoom factor. The surface maps one to one onto the TV picture, and the mouse position on it also drives the TV cursor.

The DRAW button and the four SET POSITION buttons choose what a click on the surface does. Clicking one puts the surface into a mode that stays until another of them is clicked:

| Mode | A click (or drag) on the surface |
|---|---|
| Zoom centre | sets `zoom_pos` |
| DRAW | writes trace bits |
| Text 1 or text 2 position | sets that text's position |
| Picture-in-picture position | sets the window position |

Each of these becomes a bus write to the overlay, except the zoom centre, which is a register in `control`. The trace-buffer CLEAR button pulses `clear`.

### Typed text

The keyboard buffer (`keyboard_buffer`) collects up to 48 characters:

- Backspace deletes the last character.
- Return ends the entry.

On Return, if one of the two ENTER TEXT buttons was pressed, the text is rendered into that text buffer:

1. A small FSM (`font_load_fsm`) waits for the overlay to be ready.
2. It steps a 24 x 720 address counter.
3. `overlay_font_render` turns each address into a font ROM lookup and a pixel. Characters are 8x12 glyphs doubled to 16x24.
4. Each pixel becomes a bus write.

Text writes take priority over drawing writes.

### Clock domains

All widget state and the whole video path run on the 27 MHz video clock. Only the drawing of the GUI runs on the 65 MHz VGA clock:

- Each widget brings its state into the VGA domain through a two-flop synchroniser.
- The VGA reset is a synchronised copy of the main reset.
- The typed-text register is read from the VGA domain without synchronisation. It changes only on key strokes, so a torn character is at worst shown for one frame.

### VGA drawing pipeline

`xvga` makes 1024x768 timing. Each widget and label makes a 3-bit pixel. The pixels are ORed together in two register stages, and the syncs are delayed to match. The labels fetch font rows 16 pixels ahead of the character they draw. Their font ROM addresses are ORed too (a label outputs 0 when idle), and that OR is registered.

## Ports of `vfx_top`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk_tv`, `clk_vga` | in | 1 | 27 MHz video clock, 65 MHz VGA clock |
| `rst` | in | 1 | synchronous reset (video domain) |
| `tv_in`, `tv_out` | in/out | 10 | CCIR656 streams |
| `mouse_xy`, `mouse_click` | in | 20, 1 | `{y, x}` position on the GUI, left button |
| `kb_ascii`, `kb_ready` | in | 8, 1 | key code and its strobe |
| `vga_hsync`, `vga_vsync`, `vga_blank`, `vga_rgb` | out | 1,1,1,3 | VGA (syncs active low) |
| `vga_font_addr/byte`, `tv_font_addr/byte` | out/in | 11/8 | two font ROM ports, one per clock; data 1 clock after the address |
| `ram0_*`, `ram1_*` | | 19 addr, 36 data | ZBT banks for framegrab and zoom; read data 2 clocks after the address |
| `fg_state`, `bs_calibrating`, `overlay_ready`, `text_busy` | out | 2,1,1,1 | status for LEDs and testing |

Font ROM layout: byte `code*12 + row`, bit 7 is the leftmost pixel, and a set bit 7 of the character code inverts it.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each prints `TB_RESULT checks=N failures=M` at the end. The testbench support files are:

- `tb/video_source.sv` and `tb/ccir656_source.sv`: video sources, a moving test pattern as pixels or as CCIR656.
- `tb/zbt_model.sv`: a 2-clock ZBT model.
- `tb/font_rom_model.sv`: a font ROM with synthetic glyphs.

With Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vfx_pkg.sv tb/tb_vid_pkg.sv tb/tb_vfx_top.sv --top-module tb_vfx_top
./obj_dir/Vtb_vfx_top
```

Swap in another testbench name to run a single block.

The end-to-end tests drive the top with CCIR656 and mouse/keyboard activity. They parse `tv_out` and compare each frame with a reference model:

- **`tb_vfx_top`** uses a shortened picture (150 lines per field).
- **`tb_vfx_top_full`** uses the full 244-line NTSC field. It runs in about half a minute.

Both tests go through passthrough, frame grab, full-screen and picture-in-picture still frames, blue-screen calibration and keying, 2x and 3x zoom, drawing, text entry and trace clearing. The last includes the stall while text waits for a clear to finish. They also check that the VGA output is drawn. Each mechanism is counted, and one that never happens is a failure.

## Where this design departs from its source description

- **Clock edge.** All video-domain flops use the rising edge of the 27 MHz clock. The original clocked on the falling edge of the decoder's line-locked clock.
- **Overlay prefetch.** The overlay prefetches, so overlays line up with the pixel they belong to. The original fetched late and drew everything one pixel to the right.
- **Zoom filter.** Only the sample-and-hold filter is built. The original also began a bilinear filter (three line buffers) but did not finish it, so it is absent here.
- **Overlay bus widths.** These follow the prose: a 3-bit select and 30-bit framegrab data. A block diagram of the original showed a 4-bit select, a 24-bit data path and text-length registers, which are not implemented.
- **ZBT address map.** The map (`row*720 + col`), the zoom buffer bases, the zoom window clamping and the picture-in-picture size and decimation are this design's own. The original leaves them open.
- **Blue-screen box.** The calibration box placement is assumed: 20 wide x 40 lines, at column 350, field line 100.
- **VGA timing.** The porch and sync widths are the usual 1024x768 at 60 Hz values (24/136/160 and 3/6/29). The original gives only the resolution and the 65 MHz clock.
- **GUI label positions.** Three positions (DRAW, both ENTER TEXT) are inferred from the neighbouring labels: one pixel right and two down from their button.
- **Font.** The font glyphs are not part of the design. Any 8x12 ROM with the layout above works.
- **Keyboard.** Backspace and Return handling is this design's own. At 16 pixels per character only 45 of the 48 typed characters fit across the 720-pixel text buffer; the rest are clipped.
- **Added behaviour.** The zoom centre resets to the middle of the frame. The status outputs are additions.
- **Not built.** The PS/2 interfaces, the chip initialisation and the clock generation are outside this RTL.

## Lint notes

The remaining Verilator warnings are all of two kinds:

- Unused constants in `vfx_pkg`.
- Unused input bits. Examples: the upper 6 ZBT data bits, which are never written, and bits of positions that are only used divided down.

Each module lists its own cases in its opening comment.
