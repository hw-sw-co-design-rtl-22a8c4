# Streaming skin segmentation accelerator for an in-car drowsiness camera

A driver-monitoring camera decides whether the driver is drowsy by measuring
how often the eyes are closed (the PERCLOS measure: the share of frames, over a
few minutes, in which the eyes are closed; above 25 % the driver is flagged as
tired). Finding the eyes with a Viola–Jones/AdaBoost cascade is expensive, and
its cost grows with the area searched, so the search is restricted to the face.
The face is found by first marking every pixel whose colour is skin-like, then
taking the biggest connected skin region.

That first step, **skin segmentation**, is the part moved from the ARM
processors of a Zynq-7000 device into the programmable logic, and it is what
this RTL implements. It is a pure streaming block: an RGB frame flows in, a
binary frame (0xFF = skin, 0x00 = background) flows out, one pixel per clock,
and no frame is ever stored inside the block. Everything after it (contour
grouping, morphological closing, eye classifiers, PERCLOS) stays in software.

The design follows the article *HW/SW Co-design and Prototyping Approach for
Embedded Smart Camera: ADAS Case Study*, which gives the structure of the
accelerator and its system context but not its internal numbers. The section
[What is taken from the source and what is chosen here](#what-is-taken-from-the-source-and-what-is-chosen-here)
lists every point where this RTL had to decide for itself.

## Where the block sits

```
 camera ─► DDR frame buffer ─► AXI VDMA (read, MM2S) ─► skin_segmentation ─► AXI VDMA (write, S2MM) ─► DDR ─► software
                                   ▲                          ▲     │
                                   └─── ARM (AXI4-Lite GP0) ──┘     └─ interrupt
```

The processor writes the frame size, starts the block through a small
AXI4-Lite register window, and points the video DMA at the input and output
frame buffers. The DMA turns the stored frame into an AXI4-Stream, the block
converts it, and the DMA writes the result back. The accelerator's DMA
traffic has a high-performance memory port of its own, separate from the
display output's, so that neither disturbs the other. The processing system,
the DMA, the AXI interconnect and the display path used for debugging are
vendor blocks and are not part of this RTL; the top level brings out their
connection points as ports.

## The pixel path

Each pixel goes through two steps.

**Colour conversion** (`rgb2ycrcb`). RGB is converted to YCrCb, which puts
brightness in Y and colour in Cr and Cb, so the skin test becomes mostly
independent of lighting. The transform is ITU-R BT.601, full range:

```
Y  = 0.299 R + 0.587 G + 0.114 B
Cr = 0.713 (R − Y) + 128
Cb = 0.564 (B − Y) + 128
```

It is computed in 14-bit fixed point, each coefficient being the real value
times 2^14 rounded (4899, 9617, 1868, 11682, 9241). Every result is rounded to
nearest (add 2^13 before the shift), and Cr and Cb are clamped to 0..255.
This is the integer form used by common vision libraries, so the hardware
output can be compared bit for bit with a software run. The pipeline has two
stages: Y in the first, Cr and Cb (which need Y) in the second. It uses five
multipliers, which map onto DSP slices on an FPGA.

**Skin test** (`skin_threshold`). A pixel is skin when both chrominance values
fall in a box:

```
CR_MIN (133) <= Cr <= CR_MAX (173)   and   CB_MIN (77) <= Cb <= CB_MAX (127)
```

Y is ignored. The four bounds are parameters of the top. The output pixel is
8 bits: 0xFF for skin, 0x00 for background.

## Framing: how a stream becomes a frame and back

Getting the frame boundaries right is the most subtle part of the design,
because the block never sees a frame as a whole, only a stream of beats.

On the input (`axivideo2mat`), AXI4-Stream video marks the first pixel of a
frame with TUSER and the last pixel of each line with TLAST. The pixel is
packed as `TDATA[23:0] = {R, G, B}`. The block is told the frame size by the
ROWS and COLS registers. It trusts its own pixel count and uses the flags
only to resynchronise:

* After a start, beats are dropped until one carries TUSER. That beat is
  pixel (0,0). A DMA that was started late, or a stream that was cut
  mid-frame, can therefore not shift the image.
* When a line reaches COLS pixels and that beat does not carry TLAST, the
  line is longer than expected. Further beats are dropped up to and
  including the next TLAST, so the next line starts aligned.
* A TLAST that comes before column COLS−1 is reported (a pulse on
  `ev_eol_early`), but the pixel count still decides where the line ends. The
  block always produces exactly ROWS × COLS pixels per frame.

On the output (`mat2axivideo`), the counters are rebuilt from ROWS and COLS.
TUSER goes on the first beat of the frame and TLAST on the last beat of every
line, which is what the DMA write channel needs in order to place the lines
in memory.

## Flow control and timing

The three tasks (stream reader, pixel processing, stream writer) run
concurrently as a dataflow pipeline, linked by two small FIFO channels
(`stream_fifo`, 2 entries each):

```
axivideo2mat ─► stream_fifo ─► rgb2ycrcb ─► skin_threshold ─► stream_fifo ─► mat2axivideo
  (0 clk)         (1 clk)        (2 clk)        (1 clk)          (1 clk)         (1 clk)
```

* **Throughput:** one pixel per clock when the source has data and the sink
  accepts it.
* **Latency:** a pixel accepted on the input leaves the output 6 clocks later.
* **Frame time:** from the internal start to the last output beat, a frame
  takes ROWS × COLS + 6 clocks. A 750 × 450 frame takes 337 506 clocks, or
  about 3.4 ms at a 100 MHz fabric clock (the clock frequency is not given
  by the source).
* **Backpressure:** when the sink drops TREADY, the conversion and skin
  stages stall as one unit (each advances only when its output is empty or
  being taken). The FIFOs fill, and TREADY on the input stream falls, all
  without losing a pixel.
* Ready is combinational along the whole chain. TREADY of the output
  stream reaches TREADY of the input stream through a few gates per stage:
  a full FIFO still accepts a word in the cycle one leaves. The reader adds
  no register, so input TVALID and TDATA feed the first FIFO directly. If
  this path limits the clock, make `stream_fifo` accept only when not full.
  At depth 2 that still gives one word per clock when nothing stalls.

Only one frame is in flight at a time: a new frame starts when the previous
one has completely left the block. Under auto_restart this costs 7 idle clocks between
frames: back-to-back frames take ROWS × COLS + 7 clocks each.

## Control registers

32-bit registers in a 32-byte window (5 address bits), AXI4-Lite, always
OKAY responses. Unmapped offsets read as zero.

| Offset | Name | Bits |
|---|---|---|
| 0x00 | CTRL | [0] ap_start: write 1 to start. It clears when the input side has taken the whole frame, unless auto_restart is set. [1] ap_done: the frame has left; clears when CTRL is read. [2] ap_idle: no frame in flight. [3] ap_ready: the input side has taken the frame; clears when CTRL is read. [7] auto_restart, R/W |
| 0x04 | GIE | [0] global interrupt enable |
| 0x08 | IER | [0] done interrupt enable, [1] ready interrupt enable |
| 0x0C | ISR | [0] done status, [1] ready status; writing 1 toggles the bit |
| 0x10 | ROWS | frame height in lines (reset 450) |
| 0x18 | COLS | frame width in pixels (reset 750) |

`interrupt` is high while GIE is set and any ISR bit is set.

A driver typically runs this sequence:

1. Write ROWS and COLS.
2. Write IER = 1 and GIE = 1.
3. Start the two DMA channels.
4. Write CTRL = 1.
5. On the interrupt, read CTRL, then write ISR = 1 to acknowledge.

For continuous video, write CTRL = 0x81 instead of 1. The block then starts
each new frame by itself as soon as the previous one has left. Clearing bit 7
lets the current frame finish and stops there.

## Modules

| File | Role |
|---|---|
| `rtl/skinseg_pkg.sv` | pixel structs `rgb_t`/`ycrcb_t`, conversion coefficients, register offsets |
| `rtl/skin_segmentation.sv` | top level: wires the pipeline and the register block |
| `rtl/skinseg_ctrl.sv` | AXI4-Lite registers, start/done/ready protocol, interrupt |
| `rtl/axivideo2mat.sv` | AXI4-Stream video reader with TUSER/TLAST resynchronisation |
| `rtl/stream_fifo.sv` | valid/ready FIFO used as a dataflow channel |
| `rtl/rgb2ycrcb.sv` | two-stage fixed-point RGB→YCrCb |
| `rtl/skin_threshold.sv` | Cr/Cb box test, binary output |
| `rtl/mat2axivideo.sv` | AXI4-Stream video writer |

Top-level parameters:

| Parameter | Default | Meaning |
|---|---|---|
| `DIM_W` | 12 | width of the size counters; frames up to 4095 × 4095 |
| `IN_FIFO_DEPTH` | 2 | depth of the input dataflow FIFO |
| `OUT_FIFO_DEPTH` | 2 | depth of the output dataflow FIFO |
| `CR_MIN`, `CR_MAX` | 133, 173 | Cr skin bounds |
| `CB_MIN`, `CB_MAX` | 77, 127 | Cb skin bounds |
| `DEF_ROWS`, `DEF_COLS` | 450, 750 | reset values of ROWS and COLS |

Reset is the active-low `ap_rst_n`, synchronous to `ap_clk`. The block uses a
single clock. After generic synthesis the design is about 280 word-level
cells, 214 flip-flops, 64 bits of FIFO memory and 5 multipliers. That is the
same order as the figure reported for the original prototype: about 3 % of
the LUTs, 1 % of the flip-flops and 3 % of the DSP slices of a Zynq-7020.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.
`tb/skinseg_ref_pkg.sv` holds the reference model. It computes the colour
conversion and skin test in floating point, independently of the RTL's
integer datapath. It also generates the test image: a skin-toned ellipse on a
varied background.

| Testbench | What it checks |
|---|---|
| `tb_stream_fifo` | order and occupancy under random valid/ready; one word per clock; a full FIFO accepts a word while one leaves |
| `tb_rgb2ycrcb` | corner colours and random pixels against the reference, under random gaps and stalls; hand-worked values (pure red gives Y=76, Cr=255, Cb=85); 2-clock latency; one pixel per clock |
| `tb_skin_threshold` | all combinations of values one below, on and one above each bound, plus random values |
| `tb_axivideo2mat` | stray beats before TUSER, an over-long line, a stray TLAST; expected pixels and event counts from a sequence-level model; frame time |
| `tb_mat2axivideo` | data, TUSER and TLAST placement and done timing under random stalls; frame time |
| `tb_skinseg_ctrl` | reset values, byte strobes, the start/ready/done/idle sequence, clear-on-read, interrupt enable/status/toggle, auto_restart |
| `tb_skin_segmentation` | the whole block at its default parameters, driven like the real system (see below) |
| `tb_workload_series` | three different 750 × 450 frames back to back under auto_restart, every pixel checked; the series takes 3 × 337 500 + 20 clocks |

The top-level test works in two parts:

* **Small frames**, with random source gaps and sink stalls, through the
  register interface: one interrupt-driven frame, then three back-to-back
  frames under auto_restart. These frames include stray beats, an over-long
  line and a stray TLAST.
* **One full 750 × 450 frame** at full rate. It checks the 6-clock latency
  and the 337 506-clock frame time.

Every output pixel and flag is compared with the reference. The test also
counts that each mechanism happened at least once: output stalls, input gaps,
start-of-frame skips, early and late line ends, a full FIFO, the interrupt
and automatic restarts. It runs in seconds.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/skinseg_pkg.sv tb/skinseg_ref_pkg.sv tb/tb_skin_segmentation.sv \
    --top-module tb_skin_segmentation -o sim
./obj_dir/sim
```

To run another test, put its name in place of `tb_skin_segmentation`. The
RTL contains simple assertions for the stream and AXI handshake rules: a beat
may not be withdrawn before it is accepted, and a response may not be dropped
before it is taken. The FIFOs also assert that their occupancy stays in
range.

## What is taken from the source and what is chosen here

Taken from the published description:

* The partition: only skin segmentation is in hardware.
* The method: convert to YCrCb, then classify each pixel on Cr and Cb alone.
* The binary output image.
* Streaming from and to a video DMA, with separate stages that convert
  AXI4-Stream to pixels and back.
* Dataflow channels between tasks.
* An AXI4-Lite control slave with 5 address bits and 32 data bits.
* An interrupt line to the processor.
* The 750 × 450 test image size, used as the reset frame size.

Chosen here, where the source gives no detail:

* **Conversion arithmetic.** BT.601 full range in 14-bit fixed point, as
  described above. The source states only that the hardware result matches
  the software library result.
* **Skin bounds.** 133..173 for Cr and 77..127 for Cb, the commonly used box.
  The source's own bounds are not known. Change them with the four
  parameters.
* **Register map.** The layout follows the usual high-level-synthesis
  block-level control convention, which fits the 32-byte window.
* **Data packing.** `{R,G,B}` on the input and 8-bit 0x00/0xFF on the output.
* **Recovery policy.** The handling of a missing TUSER or a misplaced TLAST,
  as described above.
* **Pipeline and FIFOs.** The pipeline depth (6 clocks) and the FIFO depth
  (2). FIFOs are used rather than ping-pong buffers.
* **One frame in flight.** Frames do not overlap; the next frame begins only
  after the previous one has drained.

Not included: the morphological closing, contour search, eye classifiers and
PERCLOS decision, all of which run in software; and the vendor blocks named
above. The source does not give the camera frame rate or the fabric clock
frequency, so whether a given video rate is met has to be checked against
one pixel per clock at the clock you choose.
