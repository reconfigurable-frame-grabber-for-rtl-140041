# Reconfigurable frame-grabber for texture inspection: histograms on the fly

Inspecting textured surfaces on a fast production line, such as webs, paper or
sheet metal, usually means computing statistics such as energy, entropy or
moments. These come from histograms of pixel features taken over small square
sub-windows of every frame. Computing those histograms is plain integer work on
every pixel. Computing statistics from them and classifying is floating-point
work on a few numbers per sub-window.

This design moves the integer part into the frame-grabber. While a frame is
still arriving from a line-scan camera, the frame-grabber builds, for every
S x S sub-window:

- one or more histograms of a pixel feature (grey level, difference, sum,
  cooccurrence pair or convolution output), in external SRAM;
- a processed (filtered) copy of the frame, in another SRAM bank.

The host then reads histograms instead of raw pixels. Two sets of SRAM banks
alternate every frame, so the frame-grabber fills one set while the host reads
the other. Acquisition, pre-processing and histogram building therefore overlap
with the host's statistics on the previous frame.

The default configuration has these sizes:

- 1024 x 1024 frames of 8-bit pixels;
- a 3 x 3 window;
- one 256-bin histogram of 32-bit bins per 64 x 64 sub-window, which makes
  256 windows and 256 KB of bins per frame;
- a 1 MB processed image;
- four 2 MB asynchronous SRAM banks.

The design sustains one pixel every 2 clock cycles.

## Pipeline

```
camera ─► camera_data_if ─► line_fifos ─► preproc ─┬─► address_gen[i] ─► incrementer[i] ─┐
          (line/column       (K-1 line    (N_HIST   │   (bin address in   (read, +1, write)  │
           numbering, FIFO)   FIFOs, KxK   features │    sub-window i)                       ├─► bank_arbiter ─► SRAM banks
                              window)      + image) └─► image_writer ─────────────────────────┘        ▲
                                                                                                      host port
rcfg_ctrl: host registers, stage bit (which bank set is whose), frame interrupt
```

| Module | Role |
|---|---|
| `rcfg_pkg` | Shared types: operation codes, channel configuration, SRAM request struct, register map |
| `camera_data_if` | Numbers pixels by column and line (a frame is R lines after enable). A 16-entry FIFO absorbs bursts; dropped pixels are flagged |
| `line_fifos` | K-1 line buffers of C pixels, chained, plus a KxK register window. One window per accepted pixel once K-1 lines are stored |
| `feature_unit` | One pre-processing channel (see below) |
| `preproc` | N_HIST feature channels and one image channel on the same window, one register stage |
| `address_gen` | Word address of the bin to increment, in the histogram of the pixel's sub-window |
| `incrementer` | Read-modify-write of that bin over the SRAM data bus |
| `image_writer` | Processed pixel to byte address row*C+col, using a byte-lane write |
| `bank_arbiter` | Gives one bank set to the frame-grabber and the other to the host; refuses host accesses to busy banks |
| `rcfg_ctrl` | Configuration registers; flips the stage at the end of each frame; status flags |
| `rcfg_top` | Wires all of the above together |

## Timing: why 2 cycles per pixel

Every feature channel needs one SRAM read and one SRAM write per pixel. The
banks are asynchronous SRAM: the read data of a cycle is back before that cycle
ends. `incrementer` uses this:

1. In the cycle after it accepts a request, it drives the address with output
   enable and registers `bin + 1`.
2. In the next cycle, it drives the write.
3. During that write cycle it accepts the next request.

That gives exactly one increment every 2 cycles, with no read-after-write hazard
because each write completes before the next read starts. All histogram channels
run in step: a window is released to them only when all of them are ready. The
image write goes to a different bank and never stalls.

Upstream of this stage, handshakes are valid/ready and one beat per cycle. The
only place the pipeline waits is the histogram stage. The camera may therefore
deliver at most one pixel per 2 cycles on average. Bursts within a line are held
in the camera FIFO, and a pixel that finds the FIFO full is dropped and flagged.

Latency from a window's last pixel to its bin being written is about 5 cycles.
At full size, a frame fed at 1 pixel per 2 cycles with 2-cycle line gaps
completes its last bin 2,098,182 cycles after its first pixel. That is the
camera time plus a few cycles.

## Windows and borders

`line_fifos` emits a window only when the window lies entirely inside the
frame. Processing begins when the third line (K-1 = 2 lines stored) starts to
arrive. The outermost row and column of pixels on each side belong to no window.
The sub-windows at the frame border therefore count (S-1) x S or (S-1) x (S-1)
pixels instead of S x S, and those border bytes of the processed image are never
written.

Window elements are numbered a1..a9, row by row. a1 is the top-left pixel (the
oldest line and the oldest column), and a5 is the centre.

## Pre-processing operations

Each channel has an operation, a neighbour index `nbr` (0..8, 0 = a1) and a right
shift. c is the centre pixel, n the selected neighbour, and results saturate at
the channel's width.

| Code | Operation | Result | Typical measure |
|---|---|---|---|
| 0 | IDENT | `c >> shift` | grey-level histogram (GLH) |
| 1 | ADD | `(c + n) >> shift` | sum histogram (GLSH) |
| 2 | SUB | `(c - n + 255) >> shift` | difference histogram (GLDH), offset binary |
| 3 | ABSDIFF | `abs(c - n) >> shift` | DIFFX (n = a6), DIFFY (n = a2) |
| 4 | CONCAT | `{c >> shift, n >> shift}` | cooccurrence pair with G = 256 >> shift levels |
| 5 | CONV | `abs(sum kernel[i] * a_i) >> shift` | edginess, using any 3 x 3 kernel of 8-bit signed coefficients |

For distance 1, the neighbours for 0, 45, 90 and 135 degrees are a6, a3, a2 and
a1. A rotation-invariant cooccurrence measure uses four CONCAT channels with
these four neighbours. ADD and SUB span 511 values, so with 256 bins use
shift = 1, or build with `BIN_W = 9`.

The sum of several directions in one histogram (DIFF2, DIFF4) is not built. The
host obtains it by adding the per-direction histograms.

## Histogram memory and the two bank sets

Histogram i of a frame lives in its own bank. The sub-window index and the bin's
word address are:

```
win  = (row >> log2s) * ceil(C / S) + (col >> log2s)      S = 2^log2s
addr = win * 2^BIN_W + bin                                 one 32-bit word per bin
```

An address beyond the bank's 512K words sets the address-error flag, and that
increment is dropped. The most common case is 16 x 16 windows on a 1024-pixel
frame with 256 bins.

The banks form two sets of `1 + N_HIST` banks: an image bank followed by the
histogram banks. With the default single histogram, the stages are:

| Stage | Frame-grabber writes | Host owns |
|---|---|---|
| A (stage = 0) | image to bank 0, histograms to bank 1 | banks 2 and 3 |
| B (stage = 1) | image to bank 2, histograms to bank 3 | banks 0 and 1 |

The stage flips when the last bin of a frame has been written, and `irq_frame`
pulses at that moment.

### Host protocol

1. On `irq_frame`, optionally write the configuration for the next frame. It
   must be written before that frame's third line starts; about 2 lines of time
   are available.
2. Read `STATUS` to learn the stage. The host now owns the set the frame-grabber
   has just left.
3. Read the histogram bins and the image through the host port.
4. Write every histogram bin back to zero. The frame-grabber only increments, so
   bins must start each frame at zero.
5. Write `HOST_DONE`.

A frame that ends before `HOST_DONE` sets the sticky overrun flag. A host access
to a bank the frame-grabber owns is not carried out: `host_grant` is low and a
conflict is flagged.

## Registers

The register port has an 8-bit address. Writes take effect on `reg_we`, and reads
are combinational.

| Address | Name | Contents |
|---|---|---|
| 0x00 | CTRL | [0] capture enable, [6:4] log2 of S (reset value 6, i.e. S = 64) |
| 0x01 | STATUS | [0] stage, [1] overrun, [2] camera overflow, [3] address error, [4] host conflict, [31:16] frame count. Write 1 to clear bits [4:1] |
| 0x02 | HOST_DONE | write: the host has released its banks |
| 0x10 + ch | FCFG | channel ch: op [2:0], nbr [7:4], shift [11:8]. Channel N_HIST is the image channel |
| 0x40 + ch*9 + i | KERN | coefficient i of channel ch, 8-bit two's complement |

## Parameters

| Parameter | Default | Meaning |
|---|---|---|
| `R`, `C` | 1024, 1024 | lines per frame, pixels per line |
| `K` | 3 | window size. The testbench reference model covers only K = 3 |
| `N_HIST` | 1 | histograms per sub-window; uses 2*(1+N_HIST) banks |
| `BIN_W` | 8 | log2 of the number of bins per histogram |
| `CAM_FIFO_DEPTH` | 16 | camera input FIFO depth |
| `DATA_W`, `BANK_AW` (package) | 32, 19 | bin width and bank word address: 2 MB banks |

## What the design fixes and what it chooses

These points follow the original architecture:

- the processing stages, and the split between integer work in the
  frame-grabber and floating-point work on the host;
- K-1 line FIFOs feeding a KxK window, with processing starting after K-1
  lines;
- several features per window, one address generator and one incrementer per
  histogram buffer;
- read, +1, write back over the SRAM data bus at 2 cycles per pixel;
- the operation set (identity, add, subtract, absolute value, concatenation,
  convolution);
- the prototype's sizes;
- the stage A/B bank swap with exclusive bank ownership.

These points are choices of this RTL:

- the handshakes, encodings and register map;
- border handling (interior windows only);
- the histogram memory layout;
- the SUB offset, the shifts and saturation, including saturating bins;
- host-side clearing of bins and the HOST_DONE/overrun protocol;
- dropping out-of-bank increments;
- camera framing (R lines after enable) and the camera FIFO;
- a single clock domain;
- the image channel as an extra, separately configured channel.

These points depart from the prototype:

- The prototype holds its lines in six on-chip 1024 x 8 RAMs used alternately on
  odd and even lines. Here the two line buffers of a plain K-1 FIFO chain do the
  same job, at one pixel per cycle.
- `N_HIST > 1` generalises the four-bank board by adding one bank per extra
  histogram to each set.

Not included:

- the camera control path;
- the PCI bridge and host software;
- LVDS receivers;
- the SRAM chips themselves. `tb/sram_model.sv` is a cycle-level model of them.

## Simulating

Each `tb/tb_<module>.sv` is self-checking and ends with a `TB_RESULT` line. For
example:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_rcfg_top -y rtl -y tb +libext+.sv \
  rtl/rcfg_pkg.sv tb/rcfg_ref_pkg.sv tb/tb_rcfg_top.sv
obj_dir/Vtb_rcfg_top
```

`tb/rcfg_ref_pkg.sv` holds an independent integer model of the six operations.

`tb_rcfg_top` runs four 32 x 32 frames with two histograms and six banks. Along
the way it covers:

- all six operations;
- window sizes 8 and 16;
- four bank swaps;
- a late host release (overrun);
- a full-rate camera line that overflows the FIFO and stalls the pipeline;
- a host access to a busy bank.

It checks every bin and every interior image byte, the 900 windows per frame and
the 2-cycle spacing of increments.

`tb_rcfg_full` runs the default-size design (about 6.3 M cycles, a few seconds
in Verilator) over three frames:

1. the prototype's grey-level histograms on 64 x 64 windows, with a Sobel image;
2. cooccurrence histograms on 32 x 32 windows;
3. 16 x 16 windows, which must raise the address-error flag.

It checks every bin, every interior image byte, that no pixel is lost and the
frame time.

`tb_workloads` runs each measure from the settings table on 256 x 256 frames
with `N_HIST = 4` (ten banks), one measure per frame:

- rotation-invariant cooccurrence: four angles, 16 levels, S = 32;
- four-direction absolute differences, S = 16;
- sum and difference histograms, S = 64;
- edginess: Sobel x and y, S = 32.

It checks every bin and every image byte at 2 cycles per pixel.

## Capacity at default size

| Measure | Needs | Has |
|---|---|---|
| GLH, S = 64 | 256 KB of bins per frame | 2 MB bank |
| GLCH, S = 32, G = 16 | 1 MB per histogram | 2 MB bank |
| Any 256-bin histogram with S = 16 | 4 MB | 2 MB bank, so it does not fit |
| Rotation-invariant GLCH (N = 4) | 4 histogram banks per set | 1 (`N_HIST = 1`), so it needs `N_HIST = 4` and 10 banks |

A 2048-pixel line at 12 kHz is about 24.6 Mpixel/s. At 2 cycles per pixel this
needs a clock above about 50 MHz. The RTL has not been timed on any FPGA.
