# Photomosaica: real-time photomosaic video in SystemVerilog

A photomosaic is a picture built out of many small photographs, each placed
where its colour matches the part of the picture it stands in for. This
design does that live, for every video frame: a 320x240 camera picture is cut
into 5x5-pixel chunks, and on a 1280x720 HDMI display each chunk is replaced
by a 16x16-pixel photograph from an image library held in DDR3 memory. The
result is a 64x45-tile (1024x720) mosaic at the top left of the screen, with
the unprocessed camera picture shown in the upper right corner. The library
is loaded from an SD card into DDR3 at start-up. A switch selects one of two
libraries, and a second switch freezes the mosaic.

The RTL follows the system described in the Photomosaica report, an FPGA
project built on a Spartan-7 board with an OV7670 camera. The report
describes the blocks, the memory state machine and the buffer sizes. It does
not give the display mode, the exact interfaces, the byte order or the reset
behaviour; the sections below say where this design made those choices.

## The key idea: the library is a colour space

Finding the best of 65536 photographs for each of 3072 chunks, thirty times a
second, would be expensive. The library avoids the search. It is prepared
offline and holds exactly one 16x16 image for every RGB565 colour: 2^16
images of 512 bytes each. For each colour, the chosen image is the one with
that average colour and the least colour spread. Matching a chunk is
therefore only averaging. The red, green and blue averages of the 25 pixels,
packed as RGB565, *are* the image number, and the image sits at DDR byte
address `number * 512`.

Everything else in the design moves pixels: into the matcher at the camera's
pace, and out of DDR3 at the display's pace.

## Data flow

```
 OV7670 ──> camera_capture ──┬──> input_line_buffer (10 lines) ──> chunk_reader ──> image_matcher ──> frame_buffer
                             │                                       (25 px/chunk)    (3 dividers)     (64x48 image numbers)
                             └──> camera_feed_buffer (320x240)                                             │
                                                │                                                          v
 video_timing ──> output_generator <────────────┼──────────── read image number per tile ─────────────────┘
                   │  32 reads per image        │
                   v                            v
            memory_controller ──> DDR3     video_compositor <── output_line_buffer (2 x 16 lines)
             ^  (SD -> DDR3 load,             │  (mosaic / corner overlay / black, 16->24 bit)
             |   then reads)                  v
          SD card                      3 x tmds_encoder ──> 10:1 serialisers (outside)
```

There are three clock domains:

| clock     | frequency  | what runs on it                                            |
|-----------|------------|------------------------------------------------------------|
| clk_pixel | 74.25 MHz  | the whole graphics pipeline, camera sampling, HDMI encoding |
| clk_ui    | 81.25 MHz  | memory arbitration, synchronous with the DDR3 interface    |
| clk_sd    | 25 MHz     | the SD card controller side                                |

Only the memory controller crosses domains. It does so through four
Gray-pointer asynchronous FIFOs (`async_fifo`).

## Camera side: from pixels to image numbers

**camera_capture** samples the camera's PCLK, HREF, VSYNC and data through
two-flop synchronisers in the pixel clock and detects PCLK rising edges. The
pixel clock must therefore be at least three times PCLK. Each pixel arrives
as two bytes, high byte first, and comes out with its x and y.

**input_line_buffer** stores camera line `y` in slot `y mod 10`, so the ten
lines form two halves of five. When the last pixel of a line with
`y mod 5 == 4` arrives, one half holds a complete row of 5x5 chunks. It
pulses `half_ready` with the half and the chunk row `y/5`. While the camera
fills the other half, **chunk_reader** walks the 64 chunks of the full half.
For each chunk it waits until the matcher is idle, then reads the 25 pixels
row by row, one per clock. The first pixel carries `start` and the chunk's
frame-buffer index (`chunk_row*64 + column`).

**image_matcher** is a four-state machine:

| state  | action                                                                 |
|--------|------------------------------------------------------------------------|
| IDLE   | wait for `start`                                                       |
| ACCUM  | add 25 pixels on 25 consecutive clocks into three channel sums          |
| DIVIDE | divide each sum by 25 in three parallel `divider`s                      |
| WRITE  | copy the quotients into a separate result register; write the frame buffer |

The **divider** subtracts repeatedly, so it takes quotient+1 clocks (at most
64 for green). A whole chunk takes about 25 + 64 + 3 clocks, and a row of 64
chunks takes well under the time the camera needs for five lines. Averages
are truncated. While `sw[1]` (pause) is high, the WRITE state writes
nothing. The frame buffer, and with it the mosaic, freezes, while camera
capture and the display carry on.

**frame_buffer** holds 64x48 16-bit image numbers. Only 45 of the 48 rows fit
on a 720-line screen.

## Display side: fetching photographs just in time

This is the part that needs the most care. The mosaic is never stored as
pixels. Each row of 16x16 photographs is fetched from DDR3 shortly before the
display reaches it.

**output_line_buffer** holds 32 lines of 1024 pixels: two halves of 16 lines,
one tile row each. Tile row `r` lives in half `r mod 2`. A word is 128 bits
(eight pixels, one DDR word), so each DDR response is a single write. The
display side reads one pixel per clock: it reads word `x/8` and selects pixel
`x mod 8` a clock later.

**output_generator** watches the raster. At `hcount == 0` on every line that
is a multiple of 16, the row shown before has been scanned out completely.
Its half is therefore free and gets the *next* row:

* line `16k` with `k+1 < 45`: fetch row `k+1` into half `(k+1) mod 2`;
* line 720 (vertical blanking): fetch row 0 of the next frame into half 0;
* line 704: nothing (row 45 does not exist).

A row has 16 lines, 26400 pixel clocks, to arrive. It needs 64 images x 32
reads = 2048 DDR reads.

Two state machines share the work, one per direction:

* The **request side** reads the image number from the frame buffer. It then
  issues 32 read requests at `number*512 + 16*k` to the memory controller.
* The **data side** writes response `k` to line `k/2` of the tile, pixels
  `8*(k mod 2)` to `+7`.

When either side has finished an image, it waits for the other; both then
move on to the next image together. Responses come back in order, so no tags
are needed. At most 32 reads are ever outstanding, which is what sizes the
64-word read-data FIFO: the DDR3 interface cannot be stalled on read data.
If a line trigger arrives while a row is still being fetched, the trigger is
ignored and `overrun` pulses. This happens only while the library is being
loaded and reads are held back.

**video_timing** produces standard 1280x720 at 60 Hz timing (1650x750 raster,
active-high syncs). **video_compositor** shows the camera picture at
x 960..1279, y 0..239, the mosaic at x < 1024, and black elsewhere; the
camera picture wins where the two overlap. It widens RGB565 to 8 bits per
channel by appending zero bits, and delays syncs and data enable by the same
clock as the pixel. Three **tmds_encoder**s apply the standard DVI 8b/10b
encoding, with control symbols carrying hsync and vsync on the blue channel.
The 10:1 serialisers and differential output buffers are FPGA primitives
and lie outside this RTL.

## Memory controller: loading the library, then serving reads

`memory_controller` runs on the DDR3 interface's user clock. Its state
machine keeps the numbering of the original design:

| # | state      | action                                                                                   |
|---|------------|------------------------------------------------------------------------------------------|
| 0 | reset      | latch the library switch, go to 6                                                         |
| 6 | SD request | ask the SD controller for 512-byte block `image` (byte address `lib_base + 512*image`)     |
| 7 | SD wait    | gather 16 bytes into `saved_write_data` (byte j -> bits 8j+7:8j)                          |
| 1 | write data | offer `saved_write_data` to the write-data FIFO until accepted                           |
| 2 | write cmd  | issue the write at `512*image + 16*chunk`; then 7 (image not done), 6 (more images) or 3 |
| 3 | idle       | take a read request from the graphics side; reload if the library switch changed          |
| 4 | read cmd   | issue the read; back to 3                                                                 |
| 5 | unused     |                                                                                          |

Library 0 starts at SD byte address 0 and library 1 at `NUM_IMAGES*512`
(32 MB). Flipping `sw[0]` in either direction reloads the whole library.
The reload starts from state 3, so no accepted read is lost. Read requests
from the graphics side wait in their FIFO during a load, so the mosaic shows
stale or random tiles until the load completes. A full load copies 32 MB
through an 8-bit SD byte stream at 25 MHz, at least 1.3 s. LEDs 4-15 form a
thermometer of the images loaded; all twelve lit means done. LEDs 0-3 show
frame-buffer writes, output-generator activity, read data arriving and
"loading".

The DDR3 side uses the common native user interface of the vendor memory
controller. A command is taken on `app_en && app_rdy`, and write data on
`app_wdf_wren && app_wdf_rdy` (one 128-bit beat, `app_wdf_end` with it).
Read data arrive in order on `app_rd_data_valid`. Addresses are 28-bit byte
addresses (256 MB). The SD side is a valid/ready block request with a 32-bit
byte address, answered by a valid/ready byte stream.

## Data formats

* Pixel: RGB565, `{r[4:0], g[5:0], b[4:0]}` (`photomosaica_pkg::rgb565_t`).
* Library image: 16 rows of 16 pixels, row-major, two bytes per pixel,
  little-endian (low byte first). The 32 DDR words of an image are
  consecutive, and word `k` holds pixels `8*(k mod 2)..+7` of row `k/2`,
  with pixel `p` of a word in bits `[16p+15:16p]`.
* SD card: library `L`, image `n` at byte address `L*NUM_IMAGES*512 + n*512`.

## Top-level interface (`photomosaica_top`)

| group   | ports                                                                   |
|---------|-------------------------------------------------------------------------|
| clocks  | `clk_pixel`, `clk_ui`, `clk_sd`, each with its own synchronous active-high reset (`rst_pixel`, `rst_ui`, `rst_sd`); assert all three together |
| camera  | `cam_pclk`, `cam_href`, `cam_vsync`, `cam_data[7:0]`                     |
| user    | `sw[1:0]` (0: library, 1: pause), `led[15:0]`                          |
| SD      | `sd_req_valid/ready/addr[31:0]`, `sd_byte_valid/ready`, `sd_byte[7:0]`   |
| DDR3 UI | `app_en`, `app_cmd[2:0]`, `app_addr[27:0]`, `app_rdy`, `app_wdf_data[127:0]`, `app_wdf_wren`, `app_wdf_end`, `app_wdf_rdy`, `app_rd_data[127:0]`, `app_rd_data_valid` |
| video   | `tmds_red/green/blue[9:0]` (to the serialisers), and `video_rgb[23:0]`, `video_hsync`, `video_vsync`, `video_de` |

Parameters: `NUM_IMAGES` (65536), `CAM_W`/`CAM_H` (320/240) and the eight
video timing values (720p60). The mosaic geometry follows from them: 64
tiles across, 45 rows shown.

## Not included

* the SD card controller: only its byte-stream interface is defined here;
* the vendor DDR3 memory interface and the DDR3 chip;
* the clock generator (an MMCM producing the three clocks from 100 MHz);
* the TMDS serialisers and HDMI output buffers;
* the camera and its register set-up.

The testbenches contain behavioural models of the SD card with its
controller, the DDR3 user interface with its memory, and the camera.

## Departures and choices to be aware of

* **Display mode.** The report gives only the 74.25 MHz pixel clock. 1280x720
  at 60 Hz is the standard mode for that clock. The 64-tile mosaic is
  therefore 1024 pixels wide, and only 45 of the 48 chunk rows are shown.
* **Overlay placement.** "Upper right corner" is read as x 960..1279,
  y 0..239, drawn over the mosaic's last 64 columns.
* **Colour padding** appends zero bits; **averages truncate**.
* **Pause** uses `sw[1]`. The report names the feature but not the control.
* **DDR3 interface.** The report describes a write-data FIFO plus AXI-style
  command and read buses. The native user-interface signals are used here.
* **Async FIFOs** are written in plain RTL rather than vendor primitives.
  Their depths are choices: 4 SD requests, 32 SD bytes, 8 read requests and
  64 read words.
* **State 2's "more bytes" target.** The description of state 2 does not
  fully survive; after a write with bytes of the image left, this design
  returns to state 7 to gather the next 16 bytes.
* **Camera sampling** in the pixel clock domain is a choice. A real 24 MHz
  PCLK is close to the 3x limit; running the capture on its own PCLK domain
  with a FIFO would be more robust.

## Simulation

Each block has a self-checking testbench `tb/tb_<block>.sv` that ends by
printing `TB_RESULT checks=N failures=M`. Shared test code is in
`tb/tb_photomosaica_pkg.sv`: the SD content hash, the camera test pictures
and an independent reference for chunk averages and library pixels. The
models are `tb/sd_card_model.sv`, `tb/mig_model.sv` and `tb/ov7670_model.sv`.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_photomosaica_top \
    -y rtl -y tb +libext+.sv -Irtl -Itb \
    rtl/photomosaica_pkg.sv tb/tb_photomosaica_pkg.sv tb/tb_photomosaica_top.sv
./obj_dir/Vtb_photomosaica_top
```

Replace the top-module name and file for any other testbench.

* `tb_photomosaica_top` is the end-to-end run, with a 256-image library and
  everything else at full size. It loads library 0. It then compares a whole
  displayed frame, pixel by pixel, with the reference. Next it pauses,
  changes the camera picture and checks that the mosaic holds while the
  corner overlay follows. It resumes and checks the new mosaic. Finally it
  switches library and checks the frame drawn from library 1. It counts that
  fetches waited for a load, that DDR3 back-pressure occurred, and that rows
  were refilled. It runs in about 40 s.
* `tb_photomosaica_full` runs the top with no parameter changed. It loads
  the complete 65536-image, 32 MB library at the 25 MHz SD rate (1.43 s of
  simulated time). It then checks one full frame of a camera picture whose
  image numbers span the whole library. It runs in about 4 minutes and needs
  about 150 MB of memory.
* The block testbenches cover the divider's data-dependent latency, the
  matcher's averages and pause, chunk order and indices, line-buffer
  hand-over, the output generator's row refill against the raster (two
  frames, random DDR latency and back-pressure), the memory controller's
  load, read service and library switch across three clocks, TMDS
  decodability and DC balance, and the video timing.

The memories (`frame_buffer`, `input_line_buffer`, `camera_feed_buffer`,
`output_line_buffer`) are written as plain arrays with one registered read
port, in the form FPGA tools map to block RAM. They are not reset.
