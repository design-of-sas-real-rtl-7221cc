# FPGA display core for a real-time synthetic-aperture sonar image

A synthetic-aperture sonar produces a fan-shaped image: 167 echo lines,
150° wide in total, with 675 range samples on each line. In the system this
core belongs to, a TI TMS320F28335 DSP collects the echo data. It resamples
the polar data onto a 1280x720 Cartesian grid by R-Theta interpolation and
writes the finished pixels to a Cyclone IV FPGA over its external memory bus
(XINTF). The FPGA buffers the pixels and sends them as a 16-bit RGB stream,
with display timing, to an SSD2828 bridge. The bridge turns the stream into a
4-lane MIPI link to a 1280x720 phone screen.

This repository is the FPGA's RTL. The DSP's interpolation is software and
is not here. The DSP, the bridge, the PLL and the screen are outside
components. The core does three things:

* it turns asynchronous XINTF write cycles into FIFO pushes (`xintf_wr_buf`);
* it moves the words from the bus clock to the pixel clock through a
  16-bit x 256-word dual-clock FIFO (`trans_fifo`);
* it scans the screen and puts one FIFO word on the RGB bus for every
  visible pixel (`lcd_con`).

A second consumer, `xintf_rd_buf`, lets the DSP read the FIFO back over the
same bus. A control bit chooses between the two consumers. The original
system had this read-back path for testing the DSP-FPGA link.

## Data path

```
            clk domain                        |            pclk domain
XINTF ──> xintf_wr_buf ──push──> trans_fifo ──┼──> lcd_con ──> lcd_den/hsync/vsync/data ──> SSD2828
 pins        │  outreg[0] (mode) ──sync───────┼──> select
             └─ fifo_busy, fifo_overflow       └──> xintf_rd_buf ──> XINTF read data, dsp_int_n
```

`sas_display_top` wires the blocks together:

| Block | File | Role |
|---|---|---|
| `xintf_wr_buf` | `rtl/xintf_wr_buf.sv` | XINTF write cycles → FIFO pushes; control register; nearly-full flag |
| `trans_fifo` | `rtl/trans_fifo.sv` | 16 x 256 Gray-pointer dual-clock FIFO, show-ahead read |
| `xintf_rd_buf` | `rtl/xintf_rd_buf.sv` | DSP read-back of FIFO words, status word, active-low interrupt |
| `lcd_con` | `rtl/lcd_con.sv` | 1280x720 display timing; one FIFO word per visible pixel |
| `sync_ff`, `rst_sync` | `rtl/` | two-flop synchroniser; reset synchroniser, one per clock domain |
| `sas_pkg` | `rtl/sas_pkg.sv` | bus widths, FIFO depth, register map, RGB565 type |

## The XINTF side: catching an asynchronous bus

The XINTF is an asynchronous SRAM-style bus. It has 19 address lines, 16 data
lines and active-low chip select (`cs_n`), write (`wr_n`) and read (`rd_n`)
strobes. The FPGA has no clock in common with the DSP, so every strobe passes
through a two-flop synchroniser. Address and data pass through two plain
register stages, so they stay aligned with the synchronised strobes.

**Writes.** While the synchronised `cs_n` and `wr_n` are both low, the block
keeps copying the aligned address and data. In the clock cycle where it sees
the strobe end, it commits the last copy:

* to the FIFO data port (address 0): one push, unless the FIFO is full;
* to the control register (address 1): `outreg` is loaded;
* to any other address: ignored.

`fifo_wr` rises on the third `clk` edge after `wr_n` rises at the pins. For
this to work, the strobe must stay low for at least two `clk` cycles, and
stay high for at least two between writes. At the 400 MHz the FPGA is rated
for, that is 5 ns each. A word that arrives while the FIFO is full is
dropped. It sets the sticky `fifo_overflow` flag, which the next
control-register write clears.

**Back-pressure.** `fifo_busy` is high when the FIFO's write-side level
reaches `HIGH_WATER` (default 240 of 256), or when the FIFO is full. The DSP
should stop writing while it is high, or treat it as an interrupt. The
headroom covers the words that are still in the synchroniser pipeline.

**Reads.** The bus needs read data within the strobe, so the read data
(`xintf_data_o`) and its drive enable (`xintf_data_oe`) are combinational from
the pins:

* the FIFO port returns the FIFO's head word, which a show-ahead FIFO keeps
  steady for the whole strobe;
* any other address returns the status word
  `{6'b0, read-back enabled, FIFO empty, 8-bit level}`.

In read-back mode, the end of a read cycle of the FIFO port pops one word.
This happens in the pixel-clock domain. The DSP must therefore hold `rd_n`
low for at least two `pclk` cycles, and high for at least four between two
FIFO reads. `dsp_int_n` is low while read-back mode is on and the FIFO holds
data.

Register map (word addresses inside the FPGA's chip-select zone, see
`sas_pkg`):

| Address | Write | Read |
|---|---|---|
| 0 | push pixel word | pop word (read-back mode) |
| 1 | control register; bit 0 = read-back mode; clears overflow | status word |
| other | ignored | status word |

## The FIFO and the clock crossing

`trans_fifo` is the standard asynchronous FIFO design:

* each side has a binary pointer, one bit wider than the address, and a Gray
  copy of it;
* each Gray pointer reaches the other side through two flops;
* full: the write pointer equals the synchronised read pointer with its top
  two bits inverted;
* empty: the two Gray pointers are equal.

The flags are pessimistic, never optimistic. `wrusedw` and `rdusedw` are the
level modulo 256, as in the vendor FIFO that this block replaces. They read
0 when the FIFO is full, so `wrfull` is what tells full from empty.
The read side is show-ahead: `q` holds the oldest word and `rdreq`
acknowledges it. A word written at a `clk` edge appears on `q` within three
`pclk` edges. Both resets must be applied together. The top uses one board
reset, synchronised into each domain.

## Display timing

`lcd_con` counts `h` from 0 to `H_TOTAL-1` and `v` from 0 to `V_TOTAL-1`. The
visible area comes first in each line and each frame, followed by the front
porch, the sync pulse and the back porch. So a frame starts with pixel (0,0),
and `vsync` comes after the last visible line.

The defaults are the usual 1280x720 at 60 Hz timing: 1650x750 total,
74.25 MHz pixel clock, syncs active high. In every visible cycle the
controller takes the FIFO head word, if there is one, and puts it on
`lcd_data` with `den` high. If the FIFO is empty, it shows `BLANK` (black)
and pulses `display_underflow`. `den`, `hsync`, `vsync` and `lcd_data` are
registered, one `pclk` after the scan position they belong to.

The pixel format is RGB565 (`sas_pkg::rgb565_t`). The bridge has to be set
up for the same 16-bit format and sync polarity. Configuring the SSD2828
registers over its SPI port is not part of this RTL.

**What streaming implies.** There is no frame store. The DSP has to deliver
the pixels in raster order, starting at the first pixel of a frame, and fast
enough that the FIFO never runs dry inside a visible line. An underflow
shifts the rest of that frame. At 74.25 MHz that is on average 55.3 Mwords/s
for 60 frames/s. Each line has 370 blanking cycles in which the FIFO can
refill, and 256 words let the source fall up to 256 pixels behind within a
line. In simulation, with a 400 MHz `clk` and a 5-cycle write
cycle, a whole 1280x720 frame arrives intact with no underflow. Slower
sources have to lower the pixel clock or the refresh rate (the porch
parameters).

## Read-back mode

Writing 1 to bit 0 of the control register hands the FIFO output to
`xintf_rd_buf`. The bit crosses into `pclk` through a synchroniser. The
screen then shows `BLANK` in its visible area and takes nothing. The DSP can
write a block, wait for `dsp_int_n`, and read it back to test the bus link.
Writing 0 hands the FIFO back to the display. Any words still in the FIFO go
to whichever consumer is selected when they are popped.

## What comes from the original design and what is assumed

The following come from the system this core was written for:

* the 19-bit/16-bit XINTF;
* the two bus buffers around a 16 x 256 show-ahead FIFO, and their port
  names;
* the interrupt output to the DSP;
* the 1280x720 screen and the 16-bit RGB data to the SSD2828;
* the PLL-made pixel clock and the reset shared with the bridge.

These are this design's own choices:

* the register map and the control/status words;
* the meaning of the write block's `out` pin (here `fifo_busy`);
* the interrupt rule;
* the overflow and underflow flags;
* the porch and sync values;
* the RGB565 packing;
* the synchroniser-based bus timing;
* feeding the display straight from the FIFO. The original system does not
  describe a frame store inside the FPGA. It has an SDRAM, but says nothing
  of its use.

The original system draws both FIFO clocks on one net. Here the read side
runs on the pixel clock.

Not part of this RTL:

* the R-Theta interpolation, which runs on the DSP;
* the PLL: `pclk` is an input and is forwarded as `lcd_pclk`;
* the SSD2828 and its configuration;
* the SDRAM and SRAM. The SRAM shares the XINTF bus. The FPGA could copy
  data out of it while the DSP is not using it, but this core has no
  logic for that;
* any "data validation" beyond the flags.

`lcd_pclk` and `lcd_reset` are plain wires from `pclk` and `rst`.

## Parameters

| Module | Parameter | Default | Note |
|---|---|---|---|
| `sas_display_top`, `lcd_con` | `H_ACTIVE`, `V_ACTIVE` | 1280, 720 | screen size |
| | `H_FP`, `H_SYNC`, `H_BP` | 110, 40, 220 | assumed 720p60 timing |
| | `V_FP`, `V_SYNC`, `V_BP` | 5, 5, 20 | assumed 720p60 timing |
| `lcd_con` | `SYNC_POL`, `BLANK` | 1, 16'h0000 | |
| `sas_display_top`, `xintf_wr_buf` | `HIGH_WATER` | 240 | `fifo_busy` threshold |
| `trans_fifo` | `DATA_W`, `AW` | 16, 8 | 16 x 256 words |
| `xintf_*` | `ADDR_W`, `DATA_W`, `USEDW_W` | 19, 16, 8 | bus and level widths |

## Simulating

Every testbench in `tb/` checks its own results. Each one prints
`TB_RESULT checks=N failures=M` at the end, and has a watchdog. Build and
run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl rtl/sas_pkg.sv rtl/*.sv \
    tb/tb_sas_display_top.sv --top-module tb_sas_display_top -Mdir obj_top
./obj_top/Vtb_sas_display_top
```

| Testbench | What it covers |
|---|---|
| `tb_trans_fifo` | write-to-read latency, exactly 256 words to full, in-order drain, random two-clock traffic against a queue model |
| `tb_xintf_wr_buf` | a bus model of XINTF writes: one push per write, push latency, control register, writes into a full FIFO, `out` threshold |
| `tb_xintf_rd_buf` | a bus model of reads: data and drive enable, one pop per read, status word, interrupt, disabled mode |
| `tb_lcd_con` | small screen (8x4): sync and `den` positions against a reference scan, pixel order, underflow, frame period, `en` low |
| `tb_sas_display_top` | 16x6 screen: start-up underflow, four streamed frames checked pixel by pixel with back-pressure, overflow, read-back of 256 words with interrupt and status, both mode switches |
| `tb_sas_display_full` | all defaults (1280x720), the sonar workload: a model of the DSP software turns a synthetic 167-line x 675-sample echo set into a 150° fan image by R-Theta bilinear interpolation, writes the whole frame over the XINTF bus, and the screen output is checked pixel by pixel, with line count and no underflow; about 10 s of simulation |

The testbenches drive clocks with `#` delays and use `$urandom`. They need
no plusargs or data files.
