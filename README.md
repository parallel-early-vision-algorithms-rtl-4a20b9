# Colour histograms of a Bayer camera stream, built on the fly

A small mobile robot can recognise places by their colour histograms: how
many pixels of a camera frame fall into each colour range. Computing them in
software means moving a whole 640 x 480 frame (300 kB) through a small
processor. This RTL computes them in the FPGA that sits between the camera
and the robot, while the frame is still arriving, and hands on only the
histograms: with 16 bins per colour and 19-bit counts that is 48 words, or
114 bytes, per frame. The histograms of a frame are complete 14 clock cycles
after its last pixel has been received.

The camera sends raw Bayer data: one 8-bit sample per pixel, and each pixel
sees only red, green or blue. The pipeline therefore does three things per
2x2 group of samples: it gathers the four samples, interpolates them into four
full RGB pixels, and adds the twelve colour values to the histograms.

## Data path

```
cam_* ─> pixel_counter ─> address_gen ─┬─> line_ram 0 (G11) ─┐
                                       ├─> line_ram 1 (R12) ─┤
                                       ├─> line_ram 2 (B21) ─┼─> bayer_interp ─> bin_calc x4
                                       └─> line_ram 3 (G22) ─┘                     │
                     ┌─────────────────────────────────────────────────────────────┘
                     ├─> bin_buffer (red)   ─> hist_unit (red)   ─┐
                     ├─> bin_buffer (green) ─> hist_unit (green) ─┼─> readout_ctrl ─> out_*
                     └─> bin_buffer (blue)  ─> hist_unit (blue)  ─┘
```

All stages work at the same time on different parts of the stream.

**Bayer tiles.** The sensor's colour filters repeat in 2x2 tiles:

```
      even column  odd column
even line  G11        R12
odd line   B21        G22
```

`pixel_counter` gives every sample its row and column. `address_gen` writes
each sample into the line RAM of its tile position (G11, R12, B21 or G22), at
address column/2. All four samples of a tile therefore end up at the same
address in four different RAMs. When the G22 sample, the last of the tile,
has been written, all four RAMs are read at that address in one cycle. An
even line only fills RAMs 0 and 1. The tile is completed during the odd line
that follows. Each RAM is 512 x 8 and holds the 320 tiles of a line. Tiles do
not overlap: each tile gives exactly four output pixels.

**Interpolation** (`bayer_interp`). The tile's single red sample and single
blue sample are copied to all four pixels. Each green site keeps its own
green. The red and blue sites get the mean of the two greens, rounded down:

| pixel at | R   | G                 | B   |
|----------|-----|-------------------|-----|
| G11      | R12 | G11               | B21 |
| R12      | R12 | (G11 + G22) / 2   | B21 |
| B21      | R12 | (G11 + G22) / 2   | B21 |
| G22      | R12 | G22               | B21 |

A 2x2 window keeps storage to a single line and the arithmetic to one add.
The histogram's coarse bins would hide the extra accuracy of a larger window
anyway.

**Bin numbers** (`bin_calc`, one per pixel). With 2^n equal bins per colour,
the n most significant bits of a component are its bin number. For the 3-D
histogram the three n-bit numbers are concatenated, red in the top bits and
blue in the bottom bits, giving one of 2^(3n) bins.

## Counting: the part that needs care

A tile produces four bin numbers per histogram in one cycle. A RAM, though,
can add to only one count per cycle. `bin_buffer` is a small FIFO of four-bin
groups that feeds the counter one bin per cycle, so a group takes four
cycles. At the camera's rate a new tile comes every eight clocks, and only
during odd lines. The FIFO therefore normally holds at most one group. Its
default depth of four groups absorbs bursts. Overload sets in when pixels
arrive faster than one every two clocks. A group that finds the FIFO full is
dropped and `buf_overflow` pulses.

`hist_unit` holds two histogram RAMs, 2^n (or 2^(3n)) words of 19 bits each,
and uses them **ping-pong**:

* The *write bank* counts the frame now arriving. Each bin runs through a
  three-stage read-modify-write pipeline (read the count, add one, write it
  back) at one bin per cycle.
* Neighbouring pixels often fall into the same bin. For example, all four
  pixels of a tile share one red value. A bin may still be in the write stage,
  or may have been written only in the previous cycle, when the same bin is
  read again. The RAM then returns a stale count. The pipeline detects this
  and uses the newer count from the later stage instead (forwarding).
* The *read bank* holds the previous frame's histogram. Each count is cleared
  in the same cycle in which it is read out. A bank is therefore empty again
  by the time it becomes the write bank. After reset, both banks are cleared
  first: `ready` stays low for 2^(address bits) cycles, and pixels sent during
  that time are not counted.

`readout_ctrl` waits for the pulse saying that the frame's last bin has been
written (`frame_done`). It then toggles `wbank` to swap the banks of all
histograms, and streams the new read bank out: histogram 0 (red) bins 0 to
N-1, then green, then blue. Each word waits on `out_valid` until `out_ready`
accepts it. `out_last` marks the frame's final word. The stream goes to the
board's SRAM, from where other logic or the robot's processor takes it. A
word takes two cycles, so 48 words take about 100 clocks, against a frame
time of 1.2 million clocks. If a frame nevertheless ends while the previous
read-out is still running, the banks are not swapped and `readout_overrun`
pulses. The next histogram read out then covers both frames.

The next frame cannot disturb the swap. Its first tile needs more than a
whole line of samples, while the last bin of the current frame is written
within 14 cycles.

## Timing

With a 50 MHz clock and the camera's 12.5 MHz pixel rate, one sample arrives
every four clocks. A 640 x 480 frame thus takes 1 228 800 clocks, or 24.6 ms,
to arrive. The latency from the strobe of a frame's last sample to
`frame_done` is 14 clocks (280 ns). It is made up as follows:

| stage                                          | clocks |
|------------------------------------------------|--------|
| pixel counter register                         | 1      |
| line RAM write, read request register          | 1      |
| line RAM read with output register             | 2      |
| interpolation register                         | 1      |
| bin number register                            | 1      |
| buffer (push, then registered output)          | 2      |
| four bins, one per clock: the last one is      | +3     |
| counter: RAM read                              | 1      |
| counter: add one, register the new count       | 1      |
| counter: write back, `done` register           | 1      |
| **total**                                      | **14** |

The same 14 clocks also separate any tile's G22 sample from the moment its
last bin is counted. The stage boundaries are a choice of this design, made
to meet that latency. The 14 cycles themselves are the specification's
figure.

## Configuration

`colour_hist_top` parameters (defaults in `vision_pkg`):

| parameter   | default    | meaning |
|-------------|------------|---------|
| `MODE`      | `HIST_RGB` | `HIST_RGB`: three separate histograms; `HIST_3D`: one 3-D histogram |
| `N_BITS`    | 4          | n; 2^n bins per colour (1..8) |
| `IMG_W`     | 640        | samples per line (at most 1024, as a line RAM holds 512 tiles) |
| `IMG_H`     | 480        | lines per frame |
| `COUNT_W`   | 19         | bits per count (307200 < 2^19) |
| `BUF_DEPTH` | 4          | FIFO depth in four-bin groups (power of two) |

The default is 16 bins per colour, separate RGB. Other configurations of
interest are 256 bins per colour (`N_BITS=8`, 768 bins, 3 x 2 RAMs of
256 x 19) and 8 bins per colour in 3-D (`MODE=HIST_3D, N_BITS=3`, 512 bins).
These were the largest configurations the original FPGA (32 Block RAMs of
512 bytes) could hold. In 3-D mode there is one buffer and one `hist_unit`,
and `out_hist` is always 0.

## Ports of `colour_hist_top`

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `cam_valid`, `cam_data[7:0]` | in | one Bayer sample per strobe, line after line |
| `cam_sof` | in | set with the first sample of a frame; re-aligns the row/column counters |
| `ready` | out | histogram RAMs cleared after reset |
| `out_valid`, `out_ready` | out, in | read-out handshake |
| `out_hist[1:0]`, `out_bin`, `out_count` | out | histogram (0 R, 1 G, 2 B), bin, count |
| `out_last` | out | last word of a frame |
| `frame_done` | out | pulse: the frame's histograms are complete |
| `wbank` | out | bank being written |
| `buf_overflow`, `readout_overrun` | out | error pulses (see above) |
| `fwd_event` | out | pulse when the counter forwarded a count (for observation) |

## Departures from the specification and choices made here

* Follows the specification: the stage structure (pixel counter, address
  generator, four line Block RAMs, interpolation, bin calculation, one buffer
  per colour, double-buffered histogram memory that is read out to SRAM); the
  2x2 interpolation; the bin-number formulas; the 640 x 480 x 8-bit frame;
  the 512-byte line RAMs; the 19-bit counts; the 14-cycle latency; and the
  pixel and clock rates.
* Choices of this design, where the specification says nothing: the
  camera strobe and start-of-frame signals; the valid/ready read-out stream
  in place of an SRAM interface; the buffer as a FIFO, with its overflow
  policy; the counter pipeline with forwarding; clear-on-read and clearing
  after reset; the overrun policy; rounding the green mean down; and the
  mapping of tile sites to RAMs.
* The specification draws twelve bin-calculation units, four per colour.
  Here there is one `bin_calc` per pixel, each doing the three colours: the
  same twelve computations.
* The specification quotes 26.6 ms to process a frame. The samples alone
  take 24.6 ms at 12.5 MHz, and this design needs no time beyond the 14-clock
  latency. The difference is presumably camera blanking, which is not
  modelled.
* The camera, the board SRAM, the RS232/USB/K-Bus/Bluetooth links and the
  robot's processor lie outside this RTL.

## Files

`rtl/`: `vision_pkg` (constants, `rgb_t`, `bayer_win_t`, `hist_mode_e`),
`pixel_counter`, `address_gen`, `line_ram`, `bayer_interp`, `bin_calc`,
`bin_buffer`, `hist_ram`, `hist_unit`, `readout_ctrl` and the top level
`colour_hist_top`. Each file opens with a description of its interface and
timing.

`tb/`: each testbench is self-checking, computes its expected values
independently of the RTL, and prints `TB_RESULT checks=N failures=M`.

* `tb_<module>` tests one module.
* `tb_colour_hist_top` runs a 16-bin RGB pipeline and a 64-bin 3-D pipeline
  side by side on 16 x 8 frames. Against a reference model it checks every
  count, the read-out order, and the 14-clock latency. It also makes forwarding,
  back-pressure, bank swaps, start-of-frame re-alignment, buffer overflow and
  read-out overrun each happen (the last two in overload frames sent at one
  pixel per clock).
* `tb_colour_hist_workloads` runs three further configurations side by side
  on two full 640 x 480 frames: 256 bins per colour RGB, 8 bins per colour
  RGB and the 512-bin 3-D histogram. Each pipeline is checked against its own
  reference model (`hist_config_checker`).
* `tb_colour_hist_full` sends two complete 640 x 480 frames through the
  default configuration at the camera rate. It checks every count, that
  each histogram sums to 307200, and the 14-clock latency.

## How far it has been checked

Every testbench above passes in Verilator. Each unit testbench also fails
against a deliberately broken copy of its module. The full-size and workload
runs compare every histogram bin of complete frames with a reference model.
The RTL has not been run on an FPGA, and no timing closure at 50 MHz has been
attempted. The critical path is expected in the counter's add-and-forward
stage, a 19-bit increment behind a two-way compare.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vision_pkg.sv tb/tb_colour_hist_full.sv --top-module tb_colour_hist_full
./obj_dir/Vtb_colour_hist_full
```

Replace the testbench name to run any other. The full-size run simulates
about 2.5 million clocks and takes a few seconds. The RTL is plain
synthesizable SystemVerilog: the RAMs are inferred arrays with synchronous
reads, and there are no vendor primitives.
