# 4K colour bars over V-by-One, re-driven as 8-port LVDS

A 3840 x 2160 panel at 60 Hz needs 594 million 30-bit pixels per second.
V-by-One HS carries that on 8 high-speed lanes, but many 4K panels
still take LVDS: 8 ports, one pixel each per clock, with 5 data pairs and 1
clock pair per port. This RTL is the FPGA logic at the two ends of such a bench set-up:

* a **source** that generates a 4 x 4 colour-bar test picture with its
  hsync, vsync and data-enable timing, 8 pixels per 74.25 MHz clock. On the
  bench it feeds an external LVDS-to-V-by-One transmitter chip.
* a **receiver datapath** that takes the video recovered from the V-by-One
  link, passes it through a ping-pong line buffer of 8 block RAMs and
  serializes it 7:1 onto 8 LVDS ports for the panel.

The V-by-One link itself is not part of this RTL. That covers the
transmitter chip, the receiver's multi-gigabit transceivers, the
HTPDN/LOCKN handshake, the clock manager and the differential pads. In simulation the
source's outputs are wired straight into the receiver's inputs.

## The raster

The whole design counts in *clocks*, where one clock carries 8 horizontally
adjacent pixels (pixel 0 is the leftmost). 4400 x 2250 x 60 Hz = 594 MHz
pixel rate, divided by 8 = 74.25 MHz.

| quantity | value (clocks or lines) | in pixels |
|---|---|---|
| clocks per line (`H_TOTAL`) | 550, counts 0..549 | 4400 |
| active clocks | 70..549 (480) | 3840 |
| hsync high | counts 23..32 (`22 < count < 33`) | |
| lines per frame (`V_TOTAL`) | 2250, lines 0..2249 | |
| active lines | 90..2249 (2160) | |
| vsync high | lines 3..12 (`2 < line < 13`) | |
| frame period | 1,237,500 clocks = 16.67 ms | |

Hsync and vsync are active high. A pixel is `{r, g, b}`, 10 bits each, red in
the top bits (`vbo_lvds_pkg::pixel_t`).

## Colour-bar generator (`sync_colorbar_gen`)

Two counters (pixel count in clocks, line count) produce the timing above.
During data enable all 8 pixels of a clock take one colour from a 4 x 4
grid, so bar edges fall on clock boundaries. The column breaks are at clock
counts 190, 310 and 430, and the row breaks at lines 630, 1170 and 1710:

| rows \ columns | 70-189 | 190-309 | 310-429 | 430-549 |
|---|---|---|---|---|
| lines 90-629 | red | green | blue | cyan |
| lines 630-1169 | blue | cyan | red | green |
| lines 1170-1709 | green | blue | cyan | red |
| lines 1710-2249 | cyan | red | green | cyan |

Colours are full-scale (`0x3FF`) primaries; cyan is green + blue. Blanking
pixels are black. All outputs are registered: `pixel_cnt`/`line_cnt` show
which raster position the other outputs belong to.

## Ping-pong line buffer (`pingpong_line_buffer`)

This is the part of the design whose timing needs the most care.

**Storage.** There are two banks. Each bank holds one active line: 480 clocks x 8 pixels =
3840 pixels. A bank is four `block_ram`s of 480 x 60 bits. RAM *r* holds pixels
2r and 2r+1 of every clock, i.e. 960 pixels = 28,800 bits, which fits one
36 Kbit FPGA block RAM. Eight RAMs in total.

**Writing and reading at once.** A single counter counts the clocks of
`in_de` within the line and addresses both banks:

* the *write bank* stores the incoming 8 pixels at that address;
* the *read bank* is read at the same address. Its data comes back one clock
  later.

**One-clock sync FIFO.** `in_hsync`, `in_vsync` and `in_de` go through
`sync_delay_fifo` (one stage). The delayed data enable then lines up exactly
with the RAM read data, and the delayed signals leave the block as
`out_hsync/out_vsync/out_de`.

**Bank swap and OLB.** The rising edge of the *delayed* hsync is the single
reference point for both sides:

* If anything was written since the previous swap, the banks swap, and the
  **OLB** ("output logic block") flag goes high. OLB high means the bank now
  being read holds a complete line.
* If nothing was written (a vertical-blanking line), the banks stay put and
  OLB goes low.

Output pixels are the read data while `out_de && olb`, and black otherwise.

**Consequence: a one-line shift.** In output line *N* the pixels of input
line *N-1* are sent, at the same horizontal position. The first active line
of every frame (line 90) goes out black, because line 89 was blanking. The
last active line (2249) is stored but never shown, because the line after
it is blanking. The picture is therefore shifted down by one line. The
sync signals are delayed by only one clock, not by a line. A panel sees a
normal raster in which the top active line is black.

An assertion (`a_line_fits`) fires if an input line has more active clocks
than a bank holds. Such extra clocks are not written.

## LVDS serialization (`lvds_port`, `oserdes_7to1`)

Each of the 8 ports takes one pixel per clock. The pixel is widened to 35
bits with five unused zero bits on top and cut into five 7-bit words:

| data line | bits of `{5'b0, r[9:0], g[9:0], b[9:0]}` | content, MSB first |
|---|---|---|
| 0 | 6..0 | b[6:0] |
| 1 | 13..7 | g[3:0], b[9:7] |
| 2 | 20..14 | r[0], g[9:4] |
| 3 | 27..21 | r[7:1] |
| 4 | 34..28 | 00000, r[9:8] |

The clock line repeats the
word `1100011`. The five unused bits carry no hsync, vsync or data enable. A
panel that needs data enable must get it by other means, for example by
putting `out_de` in one of the spare bits.

`oserdes_7to1` is a plain-logic 7:1 serializer. It needs two clocks:

* `pix_clk`: 74.25 MHz
* `ser_clk`: exactly 7x `pix_clk` (519.75 MHz, single data rate), with rising
  edges aligned to `pix_clk`, as a clock manager would produce them.

The serializer works as follows. The pixel-clock side registers the word and flips a toggle bit.
The first `ser_clk` edge that sees the toggle changed loads the word into a
shift register. The next six edges shift it out. Because the clocks are related and
aligned, this is a synchronous hand-over, not an asynchronous crossing. On an
FPGA you would normally replace this module with the vendor's serializer
primitive in its 7:1 mode. The port's ports would stay the same.

Latency, from receiver input to the serial lines: 1 clock (sync FIFO and RAM read), then 1 clock (serializer input
register), then 1 `ser_clk` to the first serial bit. On top of that comes the one-line
delay of the ping-pong buffer.

## Top level (`vbyone_lvds_top`)

The top holds the two halves side by side, each with its own clock and reset:

* `src_clk, src_rst` drive the generator. Its outputs are `src_hsync`,
  `src_vsync`, `src_de` and `src_pixels[8]`, with `src_pixel_cnt` and
  `src_line_cnt` giving their raster position.
* `pix_clk, ser_clk, rst` drive the receiver. The inputs `rx_hsync`,
  `rx_vsync`, `rx_de` and `rx_pixels[8]` are the video recovered from the link.
* The outputs are `lvds_data[8][5]` and `lvds_clk[8]`, the single-ended values for the
  differential output buffers. Alongside them come the delayed timing
  (`out_hsync/out_vsync/out_de`) and the status bits `olb` and `wr_bank`.

Port *p* carries pixel *p* of each clock. All resets are synchronous and
active high. Hold `rst` for at least one `pix_clk` cycle.

The generator's parameters are on the top (`H_TOTAL`, `H_ACT_START`,
`HS_AFTER`, `HS_BEFORE`, `V_TOTAL`, `V_ACT_START`, `VS_AFTER`, `VS_BEFORE`,
`COL_B1..3` and `ROW_B1..3`). The line-buffer depth follows from them as
`H_TOTAL - H_ACT_START`. Pixel width, pixels per clock and LVDS lane counts
are in `vbo_lvds_pkg`.

## Design choices and departures

These follow the source description:

* the raster numbers;
* the hsync rule;
* the colour grid;
* 8 pixels of 30 bits per clock;
* 2 x 4 block RAMs of 960 pixels;
* swapping on the one-clock-delayed hsync, and the OLB flag;
* 8 ports of 5 data lines plus 1 clock line, 7 bits each, with 5 of 35 bits unused;
* two phase-aligned clocks for the serializers.

These are this design's own choices:

* **Vsync window** (lines 3..12): no numbers were available.
* **Vertical active start**: the active region starts at line 90, giving 2160 lines. A stricter
  reading of the flow chart (`90 < line`) would give 2159.
* **Counter range**: the pixel counter runs 0..549. This gives 550 clocks per line, matching the
  74.25 MHz arithmetic.
* **Blanking lines**: the buffer does not swap banks on a line with no active video.
  This produces the one-line shift described above.
* **Bit mapping and clock word**: the LVDS bit mapping, the clock-line word, MSB-first order and
  the single-data-rate 7x serial clock.
* **Colour codes**: full-scale primaries and black blanking.
* **Vsync in the buffer**: vsync is delayed along with hsync and data enable.

The source board's own LVDS output toward the V-by-One transmitter is not
included; its format was not specified.

## Simulation

All testbenches are self-checking and end with a line
`TB_RESULT checks=N failures=M`. Each has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --timescale 1ns/1ps \
    -y rtl -y tb +libext+.sv -Irtl -Itb rtl/vbo_lvds_pkg.sv \
    tb/tb_vbyone_lvds_top.sv --top-module tb_vbyone_lvds_top -o sim
./obj_dir/sim
```

| testbench | what it checks | size |
|---|---|---|
| `tb_sync_colorbar_gen` | every output on every clock against a counter-based reference; frame period 1,237,500 clocks; 480 x 2160 active clocks; area of each colour | full frame |
| `tb_sync_delay_fifo` | delay of 1 and 4 clocks on random data; reset to zero | - |
| `tb_block_ram` | fill and read back all 480 words; random mixed traffic; read-during-write returns old data | full |
| `tb_pingpong_line_buffer` | random pixels, 3 frames; delayed sync, OLB, previous-line data, black first line, swap count, both banks used | 16-clock lines |
| `tb_oserdes_7to1` | 300 random words reassembled from the serial line, one word per pixel clock, fixed latency | - |
| `tb_lvds_port` | 400 random pixels decoded by a behavioural LVDS receiver (`tb/lvds_rx_model.sv`); bit mapping of lines 0 and 4; spare bits zero | - |
| `tb_vbyone_lvds_top` | whole chain at full size: one 3840 x 2160 frame plus 100 lines, every decoded LVDS word and every delayed sync value; counts bank swaps, full-bank lines, black lines, sync pulses, all four colours and the frame wrap | defaults, ~5 s |
| `tb_vbyone_lvds_top_random` | receiver half with a different random value in every pixel (so that each pixel must reach its own port); 3 frames of a 40 x 12 raster | reduced |

Time in the testbenches is nominal: `pix_clk` is 13.468 ns and `ser_clk`
1.924 ns in the top-level benches, and rounder numbers in the unit benches.
The logic depends only on the 1:7 ratio and on aligned edges.

## Capacity

At the default parameters the line buffer uses 230,400 RAM bits, one 60-bit word per RAM per
clock. Each LVDS line runs at 7 x 74.25 MHz = 519.75 Mbit/s, under the
~675 Mbit/s usually quoted for LVDS. The 594 Mpixel/s raster is sustained with one
clock of 8 pixels per cycle and no back-pressure anywhere.
