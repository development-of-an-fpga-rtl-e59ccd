# Sobel edge detection core for streamed video frames

This RTL finds edges in grey-level video frames. Each pixel is replaced by the
magnitude of its Sobel gradient. It is a small pipelined processor that sits
behind a camera interface. A frame comes in as a raster of 8-bit pixels with
sync pulses. It is stored in an on-chip frame buffer. It is read back three
rows at a time through small row caches and pushed through a three-stage
pipeline at one pixel per clock. The result frame goes out in the same signal
format.

Around the core there are two models that stand in for a camera and a display.
Both speak a plain-text image format ("hex-image"), so a frame can be prepared
and inspected as text. All three parts are synthesizable SystemVerilog and
share one clock.

```
 hex-image text     composite video            composite video      hex-image text
 ──────────────► hex_camera ──────► sobel_edge_core ──────► hex_display ──────►
 1 char / clock                                                     ≤ 2 chars / clock
```

`edge_system` is this chain. `sobel_edge_core` is the processor on its own.

## Signal formats

**Hex-image text.** Every pixel is written as two hexadecimal digits, high
nibble first (`08`, `FF`). A `,` follows every row and a `*` follows the frame.
So a 3×2 frame is `A2A0A2,A4A09F,*`. The camera model reads one character per
clock (`cam_char`, `cam_char_valid`). It accepts lower-case digits and skips
any other character, such as spaces or line breaks. The display model always
writes upper case.

**Composite video** (`sobel_pkg::video_t`). This is an 8-bit `data` with three
flags:

| flag    | meaning |
|---------|---------|
| `valid` | `data` is a pixel this clock. Pixels of a row arrive left to right, in any clocks. |
| `hsync` | One clock at the end of every row. `valid` is low. |
| `vsync` | One clock at the end of the frame, after the last row's `hsync`. `valid` is low. |

The camera model produces a pixel every second clock, because it reads two
characters per pixel. The core itself accepts up to one pixel per clock, and
its output runs at exactly one pixel per clock.

## What the core computes

For every interior pixel, with rows above (`r-1`) and below (`r+1`):

```
Dx = (p[r-1][c+1] + 2·p[r][c+1] + p[r+1][c+1]) − (p[r-1][c-1] + 2·p[r][c-1] + p[r+1][c-1])
Dy = (p[r+1][c-1] + 2·p[r+1][c] + p[r+1][c+1]) − (p[r-1][c-1] + 2·p[r-1][c] + p[r-1][c+1])
out = min(|Dx| + |Dy|, 255)
```

`|Dx| + |Dy|` replaces `sqrt(Dx² + Dy²)`. It grows whenever the true magnitude
grows, and needs no multiplier or square root. The factor 2 is a left shift
and the minus signs are negations, so the core has no multipliers. Each
partial sum fits in 11 signed bits (|sum| ≤ 4·255 = 1020). The one-pixel
border of the output frame (first and last row, first and last column) is 0.
The output is the raw clipped magnitude. No threshold is applied.

## Inside the core

```
 vin ─► buffering ─► input frame buffer ══3 words══► row caches (prev/present/next)
        section       (4-pixel words,     ▲                   │ 1 column / clock
                       3 read ports)      │                   ▼
                                   indexing section     sobel_pipeline
                                   base + n, + COLS/4,   window → Dx,Dy → |D|
                                   + 2·COLS/4                 │
                                          ▲                   ▼
                                     sobel_ctrl ────────► result_cache ─► result frame
                                                          (stage 3)       buffer
                                                                            │
                                                              vout ◄── video_out
```

**Buffering section** (`buffering_section`, `frame_buffer`). Each valid pixel
is written into byte lane `c mod 4` of word `r·COLS/4 + c/4`. The buffer holds
words of four pixels and has a write enable per byte lane. `hsync` advances the
row and `vsync` marks the frame complete. The first pixel of the next frame
restarts the counters at row 0 and pulses `frame_start`. `rows_done` (complete
rows so far) is what the sequencer waits on.

**Indexing section** (`index_gen`). A base register and a word counter.
Output `p` is `base + counter + p·COLS/4`. For result row `r` the base is the
first word of input row `r-1`. The three outputs then address the same four
columns in the previous, present and next rows, and one read fetches all
twelve pixels. The counter advances one word (four pixels) per read. A
one-output copy of the same circuit walks the result frame buffer on the
output side.

**Row caches** (`row_cache`). Three 4-pixel registers, one per row. Each is
loaded with a word and emptied one pixel per clock, lowest column first. Every
shift hands one column of three pixels to the pipeline.

**Pipeline** (`sobel_pipeline`, `result_cache`). These form three stages after
the 3×3 window registers:

1. `Dx` and `Dy` in parallel, into 11-bit registers.
2. `|Dx| + |Dy|`, clipped to 8 bits.
3. The result cache places the pixel in its lane. It writes a 4-pixel word to
   the result frame buffer when the word is full.

A result leaves stage 2 two clocks after the column that completed its window.
The window keeps a fill count that `row_start` resets. The first two columns
of a row therefore only refill the window. A result never mixes two rows.

**Output driver** (`video_out`). It reads the result frame buffer through its
own row cache and sends the frame as composite video, with `hsync` and `vsync`
in the places described above. Border rows are sent as 0. The sequencer
reports how many result rows are complete (`rows_out`). The driver reads a
row only once it is complete, so the result streams out row by row while the
frame is still being processed. When the next row is not ready, the output
pauses between rows; otherwise it runs at one pixel per clock.

### The sequencer: how a row streams

This is the part that sets the throughput. `sobel_ctrl` handles result rows
`1 … ROWS-2` in order. For row `r`:

| clocks | what happens |
|--------|--------------|
| wait   | Until `rows_done ≥ r+2`, so that input rows `r-1 … r+1` are stored. `row_stall` is high meanwhile. The first row therefore starts right after the third `hsync`. |
| 1      | Load the indexing base (row `r-1`) and the result-cache base (row `r`). |
| 1      | Read word 0 of the three rows. |
| 1      | Load the three row caches. |
| COLS   | Shift one column per clock into the window. The next word is read when the caches still hold two pixels. It is loaded in the same clock as the last pixel leaves, so there is no gap between words. |
| 4      | Flush: let the last column's result pass stages 1–3 before the next row's result base is loaded. |

So a row costs `COLS + 7` clocks once its input is there. The input costs
`COLS + 1` clocks per row at full rate. Processing therefore runs behind the
arrival of the frame by a growing but small margin: about 2,900 clocks at
640×480. With the two-clocks-per-pixel camera model, the core is always
waiting for input and finishes a few rows after the frame's `vsync`.
`video_out` starts when the sequencer accepts the frame. It sends row 0 (all
border) at once and then follows the sequencer one row behind. If the whole
frame is already processed, the frame leaves in `ROWS·(COLS+1) + 1` clocks.
`busy` stays high from the first pixel until `frame_done`.

**One frame at a time.** The next frame should start arriving after
`frame_done`. The input buffer is overwritten by a new frame, and a new frame
is only accepted when `video_out` is idle. The core takes one frame at a time
and has no double buffering.

## Measured timing

All of these are from the testbenches. Time is at a 10 MHz clock.

| run | frame in (clocks) | `*` to last output (clocks) | total |
|-----|------------------|------------------------------|-------|
| 256×256 through camera model, core, display | 131,332 | 782 | 132,114 = 13.2 ms |
| 640×480 through camera model, core, display | 614,884 | 1,934 | 616,818 = 61.7 ms |

The hex-image text costs two clocks per pixel, so the input dominates. At
256×256 one frame fits into the 20 ms budget of 50 frames/s at 10 MHz. At
640×480 it does not: even at one pixel per clock the input alone takes
307,680 clocks, which is 30.8 ms at 10 MHz.

Latency, from the first input character to the first computed output
character (row 1, since row 0 is border), is 1,809 clocks (0.18 ms) at
256×256. This is the time for three input rows plus one processed row. The
design target was under 9 ms. Without the row-by-row release the first
output would wait for the whole frame (13 ms here).

## Parameters

| module | parameter | default | note |
|--------|-----------|---------|------|
| `edge_system`, `sobel_edge_core` and below | `COLS` | 640 | Frame width. Must be a multiple of 4. |
|  | `ROWS` | 480 | Frame height, ≥ 3. |
| `frame_buffer` | `WORDS`, `NRD` | 76,800, 3 | Words of 4 pixels and number of read ports. The core derives both. |
| `sobel_ctrl` | `FLUSH` | 4 | Flush clocks after each row. Must be ≥ 3. |
| `row_cache` | `N_PIX` | 4 | Pixels per cache word. The core uses the package constant. |

At the defaults the two frame buffers hold 2 × 307,200 bytes.

## Interpretation and departures

Several details of the original description are missing or inconsistent. The
RTL resolves them as follows:

- **Mask coefficients.** The standard Sobel pair above is used, applied with
  shifts and negations. The original also mentions holding the coefficients in
  a register bank. Here they are fixed in the logic.
- **Clipping and borders.** Clipping `|D|` to 255 and a zero border are this
  design's choices.
- **Window and cache sizes.** The description quotes 12 bytes of pipeline
  registers and, in one place, 32-byte caches. The RTL uses a 3×3 window
  (9 bytes) and 4-byte caches.
- **Sync pulses.** Both `hsync` and `vsync` last one clock. The original camera
  model gives `hsync` a half-clock width.
- **Clock.** The original quotes both 10 MHz and a 100 ns half period (5 MHz).
  The RTL has one external clock, and the budgets above assume 10 MHz.
- **Output timing.** The result is sent row by row, as soon as each row has
  been written to the result frame buffer. The frame buffers are on-chip
  arrays. No external DDR memory or embedded
  processor is involved, so the frame base address is 0.
- **Not built.** A per-frame adaptive threshold, and drawing edges in white,
  are stated as goals. No method is given for them, so neither is built.
- **Frame size.** The default size, 640 columns by 480 rows, is read as the
  target resolution. 256×256 is the size of the reported experiment.

## Simulating

Every testbench in `tb/` checks itself. Each ends with a line of the form
`TB_RESULT checks=N failures=M` and has a watchdog. Build and run one with
Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/sobel_pkg.sv tb/sobel_ref_pkg.sv tb/tb_edge_system.sv --top-module tb_edge_system
./obj_dir/Vtb_edge_system
```

| testbench | what it covers |
|-----------|----------------|
| `tb_edge_system` | Text in, text out, two 32×16 frames. Covers row stalls, flushes, cache reloads, clipping, borders and ignored characters. |
| `tb_edge_system_full` | One 640×480 frame with the top at its default parameters. About 0.62 M clocks, a few seconds. |
| `tb_edge_system_256` | One 256×256 frame, checked against the 200,000-clock frame budget (50 frames/s at 10 MHz) and the 90,000-clock (9 ms) latency limit. |
| `tb_sobel_edge_core` | The core alone: two frames at full and at random input rate, output rate, flush and reload counts. |
| `tb_sobel_pipeline`, `tb_sobel_ctrl`, `tb_result_cache`, `tb_buffering_section`, `tb_video_out`, `tb_row_cache`, `tb_index_gen`, `tb_frame_buffer`, `tb_hex_camera`, `tb_hex_display` | One module each. |

`tb/sobel_ref_pkg.sv` holds the reference model. It builds test images (ramps,
a bright rectangle with sharp edges, and a noise band) and computes the
expected image straight from the formula above. The simulator has two states,
so every register that is read is reset. The frame memories are not reset
because only written words are read.

## Files

- `rtl/sobel_pkg.sv`: pixel and word types, `video_t`, constants.
- `rtl/edge_system.sv`: top. Camera model, core and display model.
- `rtl/sobel_edge_core.sv`: the edge processor.
- `rtl/buffering_section.sv`, `rtl/frame_buffer.sv`, `rtl/index_gen.sv`,
  `rtl/row_cache.sv`, `rtl/sobel_ctrl.sv`, `rtl/sobel_pipeline.sv`,
  `rtl/result_cache.sv`, `rtl/video_out.sv`: the core's sections.
- `rtl/hex_camera.sv`, `rtl/hex_display.sv`: text-to-video and video-to-text
  models.
- `tb/`: the testbenches above and the reference package.
