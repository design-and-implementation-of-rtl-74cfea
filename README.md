# DPI display sniffer

Small embedded displays are often driven over a display parallel interface
(DPI). The lines are a pixel clock, data enable (DE), horizontal and vertical
sync, and up to 24 colour lines. To test the firmware that draws on such a
display, you want the exact pixels it receives, not a camera photo of the
glass. This design is the FPGA part of a *display sniffer*:

- It sits on the DPI lines between a display controller and its display, and
  only listens.
- It checks what display is connected and at what resolution and clock.
- It writes complete frames into the system memory of a Zynq-class SoC, where
  software picks them up.

The RTL follows the architecture of the thesis "Design and Implementation of
Display Sniffer on Embedded Targets" (PYNQ-Z2 board). The thesis describes
what each block does; how each block works inside was designed here.
[Departures and limits](#departures-from-the-thesis-and-limits) lists where
this design differs.

```
 DPI pins ──► dpi_input_sync ──► dpi_timing_corr ──► dpi_to_axis ──► vdma_s2mm ──► AXI4 (64-bit)
 (async)      oversample,        wait a delay after   DE→tvalid       pack 64-bit    write master
              find clock edge    each edge, capture   HSYNC→tuser     words, AXI4    to memory
                    │                  ▲              VSYNC→tlast     bursts
                    ▼                  │ delay        FIFO                ▲
              clk_freq_meter ── period ┘                                  │ regs
                    │                                                     │
                    └──────────► disp_check ◄──── regs ── axil_interconnect ◄── AXI4-Lite
                                 resolution, clock,                          (processing system)
                                 errors, DTC controls
```

Everything runs on one system clock, `clk`. The DPI pixel clock is never used
as a clock. It is sampled like any other input.

## Sampling a DPI bus with a faster clock

The sniffer samples all DPI lines with a clock at least five times faster
than the pixel clock. The thesis measured that ratio as the lowest at which
the pixel clock is still identified reliably. A 200 MHz system clock, the
PYNQ-Z2 fabric limit, therefore allows pixel clocks up to 40 MHz.

`dpi_input_sync` passes the pixel clock, DE, both syncs and the 24 colour
lines through the same two-flip-flop synchroniser. The lines therefore keep
their relative timing. It then turns the syncs into active-high signals, with
active-low as the default, and emits `pclk_edge` in the cycle where the
sampled pixel clock went from 0 to 1. DPI data are valid on the rising edge.

## Timing correction (DTC)

This is the part that most needs explaining. A real display controller
changes its colour lines some time *after* its clock edge. The delay can be a
large fraction of a pixel period. If the sniffer takes the colour lines at the
cycle where it sees the edge, it gets the previous pixel or a value still
changing. The result is a torn or shifted image.

`dpi_timing_corr` therefore waits after each detected edge before it takes
the sample. The wait, in system clock cycles, is:

```
delay = (dyn_en && period_valid ? period / 2 : 0) + user_delay      (saturated to DELAY_W bits)
```

- `period` is the pixel clock period measured by `clk_freq_meter`, averaged
  over 16 periods.
- The dynamic part puts the capture half-way between two edges, whatever the
  display's clock.
- The user delay, a register, adds a fixed amount for displays whose data lag
  even more.

The delay is latched at each edge. The sample goes out as `pix_valid`/`pix`
exactly `delay + 1` cycles after `pclk_edge`, one sample per pixel clock. If
the next edge comes before the pending capture was taken, the capture is
dropped and `miss` pulses. This happens when the total delay is too long.
The display check block records the miss as an error.

At reset the dynamic part is enabled and the user delay is 0. For example, at
a ratio of 6 the dynamic delay is 3 cycles. That is the fixed wait of three
clocks the thesis draws for its first version of the fix.

## From pixels to an AXI4-Stream video stream

`dpi_to_axis` maps the DPI lines onto AXI4-Stream video:

| DPI   | stream            | meaning                  |
|-------|-------------------|--------------------------|
| DE    | tvalid            | a pixel is present       |
| HSYNC | tuser             | this pixel ends a line   |
| VSYNC | tlast (and tuser) | this pixel ends a frame  |
| R,G,B | tdata             | the pixel                |

A sync pulse arrives *after* the last pixel it closes. The converter
therefore holds one pixel back:

- When the next DE pixel comes, the held pixel is sent. It is marked as a line
  end if an HSYNC came in between.
- When a VSYNC comes, the held pixel is sent as the frame end.

As a result, every line's last beat carries `tuser` and every frame's last
beat carries `tuser` and `tlast`.

The colour format is fixed when the design is built, by the `COLOR_FMT`
parameter:

| format | tdata layout                         | bytes per pixel |
|--------|--------------------------------------|-----------------|
| RGB888 | `{R[7:0],G[7:0],B[7:0]}`             | 3               |
| RGB666 | `{R[7:2],G[7:2],B[7:2]}`             | 3               |
| RGB565 | `{R[7:3],G[7:2],B[7:3]}`             | 2               |

The narrower formats take the upper bits of each colour, so wire a narrow
panel to the top bits of each colour byte. The DPI side cannot be stalled. A
FIFO (`FIFO_DEPTH`, 512 beats) absorbs memory hold-ups. When it is full, beats
are dropped and `overflow` pulses. The frame writer then sees a malformed
frame and repairs it, as described next.

## Frame writer (`vdma_s2mm`)

This block is the stream-to-memory half of a video DMA. Software gives it:

- a buffer address;
- the line length in bytes (`HSIZE`, e.g. width × 3 for RGB888);
- the number of lines (`VSIZE`);
- the distance between line starts (`STRIDE`).

Software then sets `RUN`. The block waits for a frame boundary, which is the
beat after one with `tlast`. After reset, the frame already in progress is
skipped. Between frames, and
while stopped, it drains the stream so the FIFO never backs up. A capture
starts only when the first beat of the new frame is present. The sizes are
latched at that moment. Clearing `RUN` lets the frame in progress finish.

**One buffer or many frames.** With `NFRAMES = 0`, frame after frame goes to
the same buffer while `RUN` stays set. With `NFRAMES = N > 0`, setting `RUN`
captures `N` consecutive frames into one long buffer. Frame `k` starts at
`START_ADDR + k × FRAME_STRIDE`. After the `N`th frame, `RUN` clears itself.
This is the thesis's multiple-frames request: it grabs frames as fast as the
display sends them, and processes them afterwards.

**Packing.** Each beat carries one pixel. The low `BPP` bytes of `tdata` are
appended to a byte accumulator, and every 8 bytes form one 64-bit memory word.
The thesis found a 64-bit memory data width to be the correct setting. An
RGB888 pixel therefore lands in memory as B, G, R at increasing addresses.
This is the byte order of a BMP pixel. A line occupies `ceil(HSIZE/8)` words,
and the tail of the last word is zero.

**Never outside the buffer.** The thesis warns that a mishandled DMA
overwrites memory and crashes the system. So, whatever the stream does, a
frame writes exactly `VSIZE` lines of `ceil(HSIZE/8)` words at
`START + i*STRIDE`:

| stream does                          | writer does                         | sticky error bit  |
|--------------------------------------|-------------------------------------|-------------------|
| line ends (tuser) before HSIZE bytes | pads the line with zeros            | 8 `LINE_SHORT`    |
| line goes on past HSIZE bytes        | drops pixels up to the line end     | 9 `LINE_LONG`     |
| frame ends (tlast) before VSIZE lines| writes the remaining lines as zeros | 10 `FRAME_SHORT`  |
| frame goes on past VSIZE lines       | drops the rest up to tlast          | none              |
| memory answers an error              | carries on                          | 11 `BRESP`        |

**Bursts.** A word FIFO (32 words) separates packing from writing. The writer
issues AXI4 INCR bursts of 8-byte beats, one burst in flight at a time. Each
burst is at most `BURST_MAX` (16) beats, stays inside the current line, and
never crosses a 4 KiB boundary. The address is sent only once the whole burst
is in the FIFO, so WVALID never stalls inside a burst. Assertions check that
AW and W are stable while stalled and that no burst crosses 4 KiB.

`START_ADDR` and `STRIDE` are used as multiples of 8. Their low three bits are
ignored.

## Display check (`disp_check`)

This block lets software find out what is connected before it programs the
writer. It measures on the corrected samples:

- **clock**: present or not, the last period, and the sum of 16 periods. The
  sum has four extra bits of precision, and period = sum / 16.
- **resolution**:
  - `H_ACTIVE`: DE pixels per line.
  - `V_ACTIVE`: lines holding DE per frame.
  - `H_TOTAL`: pixel clocks from one HSYNC start to the next, which includes
    the porches and the sync.
  - `V_TOTAL`: HSYNC starts from one VSYNC start to the next.
  - `STATUS[1]` (resolution valid) is set once a whole frame has been
    measured, and cleared when the clock is lost.
- **frames**: VSYNC starts seen.
- **errors**, sticky until written with 1:
  - bit 0: timing-correction miss;
  - bit 1: stream FIFO overflow;
  - bit 2: an active line whose length differs from the line before;
  - bit 3: pixel clock lost (no edge for `CLK_TIMEOUT` = 4096 cycles).

It also holds the timing correction controls.

## Register map

Display check, at `AXIL_BASE + 0x000`:

| offset | name        | access | contents                                        |
|--------|-------------|--------|-------------------------------------------------|
| 0x000  | STATUS      | R      | [0] clock present, [1] resolution valid         |
| 0x004  | CLK_PERIOD  | R      | last pixel clock period, system cycles          |
| 0x008  | CLK_AVG     | R      | sum of the last 16 periods                      |
| 0x00C  | H_ACTIVE    | R      | pixels per line                                 |
| 0x010  | V_ACTIVE    | R      | lines per frame                                 |
| 0x014  | H_TOTAL     | R      | pixel clocks per line, porches and sync included|
| 0x018  | V_TOTAL     | R      | lines per frame, porches and sync included      |
| 0x01C  | FRAME_CNT   | R      | frames seen                                     |
| 0x020  | ERRORS      | R/W1C  | [0] DTC miss [1] FIFO overflow [2] line length [3] clock lost |
| 0x024  | DTC_CTRL    | R/W    | [0] dynamic delay enable (reset 1), [15:8] user delay (reset 0) |
| 0x028  | DTC_DELAY   | R      | delay in use, system cycles                     |

Frame writer, at `AXIL_BASE + 0x1000`:

| offset | name        | access | contents                                        |
|--------|-------------|--------|-------------------------------------------------|
| 0x000  | CTRL        | R/W    | [0] RUN                                         |
| 0x004  | STATUS      | R, W1C | [0] halted, [1] busy, [11:8] errors (see table above) |
| 0x008  | START_ADDR  | R/W    | buffer address (8-byte aligned)                 |
| 0x00C  | HSIZE       | R/W    | bytes per line                                  |
| 0x010  | VSIZE       | R/W    | lines per frame                                 |
| 0x014  | STRIDE      | R/W    | bytes between line starts (multiple of 8)       |
| 0x018  | FRAME_CNT   | R      | frames written                                  |
| 0x01C  | NFRAMES     | R/W    | frames per run, 0 = until `RUN` is cleared      |
| 0x020  | FRAME_STRIDE| R/W    | bytes between frame starts (multiple of 8)      |

Any other address in the two 4 KiB windows reads 0. An address outside both
windows gets a DECERR response from `axil_interconnect`.

A typical software sequence is:

1. Wait for `STATUS = 3`.
2. Read `H_ACTIVE` and `V_ACTIVE`.
3. Write `START_ADDR`, `HSIZE = H_ACTIVE * bytes per pixel`,
   `VSIZE = V_ACTIVE` and `STRIDE`. `STRIDE` is at least `HSIZE`, rounded up
   to a multiple of 8. A 100-pixel RGB888 line (300 bytes), for example,
   needs a stride of 304.
4. Set `RUN`, wait for `FRAME_CNT` to move, then clear `RUN`. Alternatively,
   set `NFRAMES` and `FRAME_STRIDE` first, and wait for `RUN` to clear
   itself.
5. Read the buffer.

## Top level and parameters

`dsniff_top` has these ports:

- `clk` and `rst_n` (asynchronous, active low);
- the DPI pins;
- `s_axil_req`/`s_axil_rsp`, the AXI4-Lite register port;
- `m_axi_req`/`m_axi_rsp`, the AXI4 write-only master towards memory;
- `frame_done`.

The AXI channels are packed structs defined in `dsniff_pkg`.

| parameter          | default     | meaning                                    |
|--------------------|-------------|--------------------------------------------|
| `COLOR_FMT`        | `CF_RGB888` | colour format of stream and memory         |
| `SYNC_STAGES`      | 2           | synchroniser depth                         |
| `HSYNC_ACTIVE_LOW`, `VSYNC_ACTIVE_LOW` | 1 | sync polarity                   |
| `CNT_W`            | 16          | width of period, size and position counters|
| `AVG_LOG2`         | 4           | periods averaged = 2^AVG_LOG2              |
| `CLK_TIMEOUT`      | 4096        | cycles without an edge before clock lost   |
| `DELAY_W`          | 8           | width of the capture delay                 |
| `FIFO_DEPTH`       | 512         | stream FIFO depth (power of two)           |
| `BURST_MAX`        | 16          | longest AXI burst in beats                 |
| `AXIL_BASE`        | 0           | base of the register windows               |

With 16-bit counters the design handles lines up to 65535 bytes and pixel
clocks, and pixel periods up to 65535 system cycles. Every resolution the
thesis evaluates (100×100 up to 1280×720) fits easily.

Helper modules:

- `sync_fifo`: a single-clock FIFO with a show-ahead read.
- `axil_reg_if`: turns AXI4-Lite into register strobes for the two register
  blocks.

## Simulating

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The models in `tb/` stand
in for the parts outside the FPGA:

- `dpi_source_model`: a display controller with porches and syncs. Its colour
  lines settle `DATA_LAG` after each clock edge.
- `axi_mem_model`: the memory. It stalls at random, can be forced to stall or
  to answer errors, and checks the AXI rules.
- `axil_master_model`: the software.

The main testbenches are:

- `tb_dsniff_top`: end to end, at the default parameters on a 16×6 display.
  It makes every mechanism happen and counts each one: resolution, clock
  measurement, capture, 4 KiB split, the need for timing correction (without
  it the colours are wrong), dynamic and user delay, miss, memory stall, FIFO
  overflow and recovery, line-length error, short frame, stop, clock loss and
  recovery, DECERR, and two frames into one long buffer. A mechanism that
  never happened is a failure.
- `tb_dsniff_full`: one full capture of a 320×240 RGB888 frame, the size of
  the real display the thesis tests with, at the default parameters.
- `tb_dsniff_resolutions`: the default design on the display sizes of the
  thesis's measurements, 100×100, 200×200, 500×400, 600×400 and 960×544,
  side by side. Each size is identified, programmed from the registers read
  and captured, and every byte of the frame is checked. It runs in about half
  a minute.
- `tb_dsniff_formats`: the whole design built for RGB565 and for RGB666,
  side by side. It captures one frame from each build and checks every byte
  against the pixel reduced to the format.

Example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/dsniff_pkg.sv tb/tb_dsniff_top.sv --top-module tb_dsniff_top -Mdir obj
./obj/Vtb_dsniff_top
```

Replace `tb_dsniff_top` with any other testbench name, for example
`tb_vdma_s2mm` or `tb_dpi_timing_corr`. All testbenches are self-contained
and use `$urandom` only. The full 320×240 run takes a few seconds.

## Departures from the thesis and limits

- **Active pixels only.** The thesis's software sets the frame size with the
  front and top porch included, and crops them afterwards. Here DE alone marks
  valid stream data, following the thesis's own DPI-to-stream table. The
  memory therefore holds active pixels only. `H_TOTAL` and `V_TOTAL` are still
  measured and reported.
- **Own frame writer.** The thesis uses the FPGA vendor's VDMA and video input
  IP. Here they are replaced by the blocks above. Their register maps, the
  padding rules and the burst policy are this design's own. So are the
  `NFRAMES` and `FRAME_STRIDE` registers, which carry out the thesis's
  multiple-frames request in hardware.
- **Dynamic delay rule.** The thesis says the correction follows the measured
  display frequency, plus a user delay. Half a period is this design's rule.
- **Sync polarity** defaults to active low, as the thesis's waveforms draw
  them. Change it by parameter.
- **Not included.** The processing system, its memory, the server software
  and the vendor test-pattern generator are not part of the FPGA logic.
- **Unchecked timing.** No timing closure was done. The AXI4-Lite and AXI4
  ports are single-clock and must be in the `clk` domain. The DPI inputs are
  treated as asynchronous.
