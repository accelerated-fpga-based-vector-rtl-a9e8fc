# Vector Directional Filter coprocessor

Impulsive noise in a colour image (dead or saturated pixels, single channels
flipped to 0 or 255) is best removed by a filter that treats each pixel as a
vector in RGB space instead of filtering R, G and B separately. The
**Vector Directional Filter (VDF)** works on the *direction* of those vectors.
For each pixel it looks at the 3x3 neighbourhood x1..x9 and does three things:

* it computes the angle between every pair of pixels,
  `A(xi, xj) = arccos( xi·xj / (|xi| |xj|) )`;
* it gives each pixel an angular distance, the sum of its angles to all nine,
  `alpha_i = Σj A(xi, xj)`;
* it outputs the pixel with the smallest `alpha_i`.

The output is always one of the nine input pixels, and it is the one whose
chromaticity agrees best with its neighbours. Outliers have unusual directions,
so they are never chosen. Colour is preserved better than with a vector median,
which ranks pixels by Euclidean distance.

This repository holds a synthesizable SystemVerilog implementation of a VDF
coprocessor. The architecture is a published FPGA design: a filter core fed with
three image lines in parallel by three DMA engines, with the restored image held
in on-chip memory and returned through the first DMA. The published core was
generated by high-level synthesis and computes in floating point. This RTL is
written by hand, computes in fixed point, and is checked against a
double-precision model.

Default size: 256x256 images, 24-bit RGB. At 100 MHz a 256x256 image takes
6,068,066 clocks (60.7 ms) from the first input word to the last output word.

## How an image enters: three line streams

The coprocessor has three AXI-Stream slave inputs, `s_axis_*[0..2]`, one per
DMA read channel. All three read the same image from memory, one row apart:

| stream | fed by | carries image rows |
|---|---|---|
| `s_axis_*[0]` | DMA1 | 0 .. H-3 |
| `s_axis_*[1]` | DMA2 | 1 .. H-2 |
| `s_axis_*[2]` | DMA3 | 2 .. H-1 |

Each stream carries `(H-2)*W` words in row-major order. Software sets this up by
starting the three DMAs at the image base address plus 0, 1 and 2 line lengths,
all with the same transfer length. At any moment the three stream heads are
therefore three vertically adjacent pixels of one column: a **window column**.
A word is one pixel: R in bits 23:16, G in 15:8, B in 7:0.

`vdf_line_join` pops the three streams only in a clock in which all three have
a word, so the streams can never drift apart, whatever gaps the DMAs leave. The
column goes into a one-entry register in front of the filter core. The register
is refilled in the clock in which the core takes its column, so while the core
works on a pixel the next column is already waiting. Only the first column of
an image pays the extra clock.

## The window and the filter loop (`vdf_filter_core`)

`vdf_window` holds the nine pixels x1..x9 in row order: x1 x2 x3 on top,
x4 x5 x6 in the middle, x7 x8 x9 at the bottom, with x5 at the centre. It is a
small memory, not a shift register. There are three banks, one per window row,
and each bank has three words, one per window column. A new column is written
in one clock, one pixel per bank, over the oldest column. A rotating pointer
then makes it the newest, so no pixel is ever moved. Moving to the next pixel
therefore costs three new pixels, not nine. Window position
`(row, column)` lives in bank `row`, slot `(oldest + column) mod 3`.

The window has two read ports with combinational reads, like a distributed
memory. During the pair loop they deliver x_i and x_j together, one pair per
clock. At other times port a reads the new column for the border copies and
then the chosen output pixel.

The controller processes one column at a time. For window-top row r and column
c it runs these states:

| state | clocks | what happens |
|---|---|---|
| TAKE | 1 | accept the column, write it into the window |
| BORDER | 3 | copy border pixels that this column carries (see below) |
| ISSUE | 81 | only if c ≥ 2: send pair (x_i, x_j), i,j = 1..9, to the angle unit, one per clock |
| DRAIN | 7 | wait for the last angles; the accumulators add each angle as it arrives |
| WRITE | 1 | write the argmin pixel to the image memory at (r+1, c-1) |

A filtered pixel costs 93 clocks. A column that fills the window but produces no
output (c = 0, 1) costs 5. The whole image costs

    93*(H-2)*(W-2) + 10*(H-2)   clocks of filtering
    + 1                         the column register in the line join
    + 2                         hand-over to the output stream
    + W*H                       clocks to stream the image out (if never stalled)

The pair loop is the one that dominates, and it is the only loop that is
pipelined. The angle unit accepts a new pair every clock. The outer loops over
pixels run one after the other.

All 81 ordered pairs are computed, including `A(xi, xi) = 0` and both
`A(xi, xj)` and `A(xj, xi)`. This is the definition taken literally. Using the
symmetry would need only 36 angles per pixel and is the obvious next speed-up.

**Borders.** The first and last image row and column have no full window. This
design passes them through unchanged. The BORDER steps write:

* the top row, from the first stream, while r = 0;
* the bottom row, from the third stream, while r = H-3;
* the first and last pixel of row r+1, from the middle stream.

Every memory address is written exactly once per image.

**Hand-over.** After the last column the core spends one clock in DONE. That
clock starts the output stream. While the output stream is busy, the core takes
no new column, so the next image cannot overwrite the one being sent.

## Computing an angle without floating point (`vdf_angle_unit`)

This is the least obvious part of the design. The published core used
single-precision floating point. Here the arithmetic is exact integer math
followed by a few fixed-point steps, in a 6-stage pipeline that takes one pair
per clock:

1. `dot = xi·xj`, `ni2 = |xi|²`, `nj2 = |xj|²`. These are exact 18-bit integers.
2. `num = dot²`, `den = ni2·nj2`. These are exact 36-bit integers.
3. `cos² = num / den` in Q0.48. This is a single integer division. By
   Cauchy-Schwarz `num ≤ den`, so the result is at most 1.
4. `c = sqrt(cos²)` in Q0.24. This is an integer square root, bit by bit.
5. `s = sqrt(1 - c)` and `p(c) = a0 + a1·c + a2·c² + a3·c³` in Q.24.
6. `angle = s · p(c)`, rounded to Q1.16 radians.

Steps 5 and 6 are the Abramowitz & Stegun approximation 4.4.45:
`arccos(c) ≈ sqrt(1-c)·(1.5707288 - 0.2121144c + 0.0742610c² - 0.0187293c³)`.
Its error is below 7e-5 rad. It is valid only for c in [0, 1], and that always
holds here: RGB components are non-negative, so two pixels are never more than
90° apart. The coefficients are computed from these real constants when the
design is elaborated. There is no table.

Squaring before the division removes one of the two square roots that
`|xi|·|xj|` would need. Twenty-four fractional bits in the cosine match a float
mantissa. So, as in a float implementation, small angles are the least accurate:
near c = 1 a cosine step of 2^-24 is worth about 3.5e-4 rad. Over 200,000 random
and near-parallel pixel pairs, the largest error against double precision is
3.2e-4 rad.

**Clock rate.** Stages 3, 4 and 5 each contain a complete wide operation in
one clock: an 84-by-36-bit division, or a 32-step square root. These are the
critical paths. The design has not been through FPGA place and route, so
100 MHz is a target here, not a result. Splitting these stages adds pipeline
depth and needs no other change: the controller waits for 81 returned angles,
not for a fixed latency. Each extra stage adds one clock to the cost of a pixel.

**Black pixels.** A black pixel (0,0,0) has no direction. Any pair that contains
one is given an angle of π/2, the largest possible. A black impulse therefore
gets a large `alpha` and is never chosen over a coloured pixel. This is a choice
of this design; the floating-point original would divide 0 by 0 here.

## Choosing the output (`vdf_alpha_acc`, `vdf_argmin`)

Angles leave the pipeline tagged with their index i and are added to one of nine
21-bit accumulators. Nine angles of at most π/2 fit with room to spare. When the
last of the 81 angles has arrived, a combinational scan picks the smallest
`alpha_i`. On a tie the lowest index wins, in the order x1..x9, which is what a
sequential loop with a strict `<` does. Rounding can make the fixed-point and
double-precision sums order two nearly equal alphas differently. Where that
happens, the two candidates' alphas are within about 0.01 rad of each other.

## Image memory and output (`vdf_image_ram`, `vdf_out_stream`)

The restored image goes into a `W*H` x 24-bit simple dual-port memory. It is
written as an array so that FPGA tools infer block RAM; at 256x256 that is
1.5 Mbit. Once the core signals that the image is complete, `vdf_out_stream`
reads the memory in address order and sends one AXI-Stream packet of `W*H`
pixels on `m_axis_*`, with TLAST on the last pixel. This is the DMA1 write
channel. The memory's read data register holds its value while no read is
issued. The stream's valid and data therefore simply stay put under
back-pressure, and without stalls the stream runs at one pixel per clock. An
assertion checks the AXI-Stream rule that data offered must stay until it is
taken.

## Control and status

There are no registers. The coprocessor starts as soon as the line streams
deliver data. `busy` is high from the first accepted column until the last
output pixel has been taken. A new image may follow immediately. The published
system has an AXI4-Lite link to the processor, but it defines no coprocessor
registers on it, so none are provided. Reset (`rst_n`) is synchronous and active
low.

## Performance against the published numbers

| image | clocks | at 100 MHz | published (whole hardware/software run) |
|---|---|---|---|
| 256x256 | 6,068,066 | 60.7 ms | 72 ms |
| 176x144 (`IMG_W=176, IMG_H=144`) | 2,324,610 | 23.2 ms | 31 ms |
| 512x512 (`IMG_W=IMG_H=512`) | 24,456,546 | 244.6 ms | 226 ms |

The first two rows are measured in simulation. The published times include DMA
and software overhead, and they report no clock count for the core alone.

At 512x512 this design is slower than the published figure. Its memory would
also need 6.3 Mbit, more than the whole published design uses. The published
system must therefore handle large images in parts, and that scheme is not
described. The image size is a pair of elaboration parameters. An image of
another size needs a rebuilt core; it cannot be streamed into the default
256x256 build.

## Where this departs from the published design

* **Fixed point** instead of single-precision floating point (see above). The
  chosen pixel is the same except between near-equal alphas.
* **Window memory layout.** The window is a memory, as in the published
  configuration. The three-bank layout, the rotating pointer and the two
  combinational read ports are this design's own.
* **Border pixels are copied unfiltered.** Border handling is not specified.
* **Black pixels** are at π/2 from everything. This case is not specified.
* **Stream and packet format** (24-bit words, one packet per image, TLAST) and
  the **ready/valid joining** of the three lines, with its column register, are
  this design's own choices.
* The processor, DDR, DMA engines and file I/O of the published system are not
  part of this RTL. The testbenches play the role of the DMAs.

## Verifying and simulating

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`. `tb/vdf_ref_pkg.sv` holds the shared reference:
a double-precision VDF, a test-image generator (a smooth image with 3%
salt-and-pepper impulses, Gaussian noise of σ = 5, or both) and a PSNR function.
A filtered pixel counts as correct when it is one of the nine window pixels and
its double-precision alpha is within 0.01 rad of the smallest.

| testbench | what it shows |
|---|---|
| `tb_vdf_angle_unit` | 4,008 angles within 1.5e-3 rad of `$acos`, 6-clock latency, tag carried |
| `tb_vdf_line_join` | columns complete, aligned and in order under random gaps; column register against a model; one column per clock without gaps |
| `tb_vdf_window` | column order after many updates, both read ports |
| `tb_vdf_alpha_acc` | sums, clear priority, no overflow |
| `tb_vdf_argmin` | minimum and first-index tie-breaking |
| `tb_vdf_filter_core` | each address written once, border copies, 93/5-clock column times, hand-over |
| `tb_vdf_image_ram` | read latency, data held without a read |
| `tb_vdf_out_stream` | order, TLAST, full rate without stalls, back-pressure |
| `tb_vdf_top` | three 12x9 frames back to back, random stream gaps and back-pressure, exact latency |
| `tb_vdf_top_workloads` | 176x144, impulsive and Gaussian noise, clock count, PSNR |
| `tb_vdf_top_full` | one 256x256 image at the default build, every pixel, clock count, PSNR |

Typical results: on a 256x256 image with mixed noise the PSNR against the clean
image rises from 21.7 dB to 37.5 dB. On 176x144 it rises from 22.1 dB to 36.0 dB
with impulsive noise and from 34.9 dB to 36.7 dB with Gaussian noise.

Any testbench runs with plain Verilator 5:

    verilator --binary --timing --assert -y rtl -y tb \
        rtl/vdf_pkg.sv tb/vdf_ref_pkg.sv tb/tb_vdf_top.sv --top-module tb_vdf_top
    ./obj_dir/Vtb_vdf_top

Replace `tb_vdf_top` with another testbench name to run it. The full-size run
takes about 10 seconds.

## Files

| file | contents |
|---|---|
| `rtl/vdf_pkg.sv` | pixel type, number formats, integer square root |
| `rtl/vdf_top.sv` | the coprocessor: join, core, memory, output |
| `rtl/vdf_line_join.sv` | three line streams into a registered window column |
| `rtl/vdf_filter_core.sv` | loop controller; contains window, angle unit, accumulators, argmin |
| `rtl/vdf_window.sv` | 3x3 window memory |
| `rtl/vdf_angle_unit.sv` | pipelined pixel-pair angle |
| `rtl/vdf_alpha_acc.sv` | nine angular-distance accumulators |
| `rtl/vdf_argmin.sv` | minimum-alpha selection |
| `rtl/vdf_image_ram.sv` | restored-image memory |
| `rtl/vdf_out_stream.sv` | memory to AXI-Stream |

Parameters: `IMG_W` and `IMG_H` on `vdf_top` and `vdf_filter_core`. Number
formats are set in `vdf_pkg`. `ANGLE_FRAC`/`ANGLE_W` set the angle precision, and
`ALPHA_W` must stay four bits wider than `ANGLE_W`. The core's controller assumes
the angle unit's latency of 6 only through its count of returned angles. A
deeper angle pipeline therefore needs no other change.
