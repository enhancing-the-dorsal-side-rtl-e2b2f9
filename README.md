# Histogram-equalisation engine for finger-knuckle images

Finger-knuckle-print recognition needs the fine creases on the back of a
finger to stand out. Pictures from a cheap webcam are usually low in
contrast: all the pixels sit in a narrow band of grey levels. Histogram
equalisation fixes this. It moves each grey level to a new level in
proportion to how many pixels lie at or below it. The result spreads the
image over the whole 0..255 range. Levels that many pixels share end up far
apart, and levels that few pixels use are packed together.

This repository is a small FPGA engine that equalises one 8-bit greyscale
image held in on-chip RAM. The default image is 151 x 133 pixels (20083
bytes), the size of the knuckle region of interest the engine was made for.
For every grey level k the engine computes

    map[k] = round( 255 * C(k) / N )

and then replaces each pixel p by map[p]. Here C(k) is the number of pixels
with a level of k or below, and N is the number of pixels.

## The five phases

The engine makes five passes over its memories, one after another. Each
phase has an enable set, a group of read/write enables named after the
memory the phase reads and the memory it fills. `he_ctrl` steps through the
phases and shows the current set on the `strobes` output. The phases run
either all in a row after one `start` pulse, or one at a time. In the second
case the host applies a phase's enable set together with a `step` pulse.

| phase | module      | enables   | what it does                                   | clocks (from its start pulse to done) |
|-------|-------------|-----------|------------------------------------------------|-----------------------------|
| move  | `he_move`   | wr        | copy RAM1 into ram2, one pixel per clock        | N + 2                       |
| count | `he_hist`   | rd, wr1   | clear 256 bins, then histogram ram2             | 256 + N + 4                 |
| cum   | `he_cumsum` | rd1, wr2  | cum[k] = hist[0] + ... + hist[k]                | 256 + 2                     |
| cdf   | `he_cdf`    | rd2, wr3  | map[k] = round(255 * cum[k] / N)                | 256 * (CW + 11) + 1         |
| map   | `he_map`    | rd, rd3   | ram2[i] = map[ram2[i]], written back in place   | N + 3                       |

`CW = $clog2(N+1)` is the width of a bin counter (15 bits by default). Each
phase starts one clock after the previous one reports done. A whole run
therefore takes

    3N + 2*256 + 256*(CW + 11) + 18 clocks  =  67435 clocks for 151 x 133

which is about 1.35 ms at 50 MHz. Nearly all of the time goes to the three
passes over the image. The rest is the CDF phase, which divides serially.

## Memories

All storage is one module, `he_ram`. It is a simple dual-port synchronous
RAM with one write port, one read port and one clock of read latency. When
a read and a write hit the same address in one clock, the read returns the
old word, which is how FPGA block RAM behaves. This latency shapes every
unit: each unit's write address trails its read address by one or two
clocks.

| instance           | size        | contents                                        |
|--------------------|-------------|-------------------------------------------------|
| `u_ram1`           | N x 8       | input image, written only by the host           |
| `u_ram2`           | N x 8       | working copy; holds the equalised image at the end |
| `u_hist.u_tbl`     | 256 x CW    | histogram                                       |
| `u_cum.u_tbl`      | 256 x CW    | cumulative histogram                            |
| `u_cdf.u_tbl`      | 256 x 8     | mapping table                                   |

At the default size this is 331056 memory bits in total. The top level
steers ram2's two ports by the enable set. Under `wr` the move unit
writes. Under `wr1` the count unit reads. Under `rd3` the map unit both
reads and writes. At all other times the host reads.

## The histogram pipeline

`he_hist` is the only unit with a hazard. It takes one pixel per clock, and
each pixel is a read-modify-write of the bin for its grey level in a RAM:

    A  image address presented to ram2
    B  pixel value arrives and becomes the read address of the bin table
    C  bin value arrives; bin + 1 is written back to the same bin

Suppose two neighbouring pixels have the same level. The second one reads
its bin in stage B in the same clock that the first one writes it. Because
the RAM reads before it writes, the second read gets the old count. Stage C
fixes this: when its bin matches the bin written one clock earlier, it uses
the value it just wrote instead of the RAM data. Pixels two or more apart
need no forwarding, because their write has landed before the read. The
`fwd_count` output counts the forwarded increments of the last run. Smooth
regions of an image produce thousands of them.

Before it counts, the unit spends 256 clocks writing zero into every bin.
This lets runs follow one another without a reset.

## The CDF and its rounding

`he_cdf` handles one grey level at a time. It reads cum[k], then forms
`255*cum[k] + floor(N/2)`. It divides that by N in `he_divider`, a
restoring divider that produces one quotient bit per clock. The quotient is
written to map[k]. Adding N/2 before the division rounds the result to the
nearest level. Because cum[k] <= N, the result never exceeds 255, and an
assertion checks this. The brightest level present in the image always maps
to 255.

This is the plain textbook transfer function. There is no `cdf_min` offset,
so the darkest level present in the image maps to round(255*hist[min]/N)
rather than to 0. The mapping rule is all in `he_cdf.sv`. To change the
rule, edit the `dividend` expression there.

The divider takes CW + 8 = 23 clocks per level. The CDF phase costs
256 * 26 clocks, about 10 % of a run. A pipelined divider would remove most
of that if it matters.

## Using the engine

Ports of `he_top` (all synchronous to `clk`; `rst_n` is an asynchronous
active-low reset):

* Load the image into RAM1 with `host_we`, `host_waddr` and `host_wdata`.
  Pixel (x, y) of a row-major image goes to address y*151 + x.
* Pulse `start` for one clock. `busy` stays high until the run ends. Then
  `done` pulses for one clock. `phase` and `strobes` show progress. A start
  pulse during a run is ignored.
* Or run the phases one at a time (manual mode). Pulse `step` for one clock
  while `req` carries a phase's enable set, for example `rd`+`wr1` for the
  count phase. Only that phase runs, `manual` is high while it runs, and
  `done` pulses at its end. The five sets must be applied in the order of
  the table above. A set that matches no phase is ignored. If `start` and
  `step` arrive together, `start` wins.
* Read the result from ram2: present `host_raddr`, and the pixel appears on
  `host_rdata` one clock later. The host owns this port only while `phase`
  is `PH_IDLE`, `PH_CUM` or `PH_CDF`.

RAM1 is never modified, so the same image can be processed again without
reloading it.

### Changing the image size

The one parameter is `PIXELS`, the pixel count. It defaults to
`he_pkg::PIXELS` = 151 * 133. All address and counter widths follow from
it. The grey-level depth is fixed at 8 bits (`he_pkg::PIX_W`), and the
tables have 256 entries.

## Where this design makes its own choices

The following come from the original design: the two image RAMs (an input
RAM loaded from the host and a second working RAM), the copy that cancels
the RAM latency, the order of the phases, the enable set of each phase, and
the 151 x 133 8-bit image. The following are this design's own choices:

* **Automatic sequencing.** Originally the phases were started one by one
  by applying each enable set by hand. The manual mode keeps that way of
  working. The automatic mode, in which `he_ctrl` runs all five phases after
  a single `start`, is an addition.
* **In-place output.** The map phase writes its result back into ram2, and
  the host reads it from there.
* **Mapping rule.** `round(255*C(k)/N)` with no minimum-CDF offset. Another
  common convention would give slightly different pixel values.
* **Tables in RAM** (`he_ram` with 256 entries), one bin or one pixel per
  clock, a clearing pass before counting, and a bit-serial divider.
* **Handshakes and reset.** Every unit has a `start` pulse and `busy`/`done`
  outputs. Reset is asynchronous and active low.

The host port stands in for a JTAG memory-editor path on the FPGA board.
The camera, the region-of-interest cropping, the conversion to hex and the
MSE/PSNR quality figures all belong to the host software. None of them is
part of this RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each one compares the
module's results with values worked out independently, checks the cycle
counts given above, and ends by printing
`TB_RESULT checks=<n> failures=<n>`.

| testbench        | what it covers |
|------------------|----------------|
| `he_ram_tb`      | contents, read latency, read-before-write collision, out-of-range write |
| `he_move_tb`     | pixel-exact copy and latency, two images |
| `he_hist_tb`     | histogram with long runs, alternating pairs and random pixels; forwarding count; clearing between three runs |
| `he_cumsum_tb`   | running sum with empty and very large bins |
| `he_divider_tb`  | corner cases and 400 random divisions against `/` and `%` |
| `he_cdf_tb`      | mapping table against a floating-point rounding reference, full image size |
| `he_map_tb`      | in-place remapping through a random table |
| `he_ctrl_tb`     | phase order, one-clock go pulses, enable decode, stray start ignored, manual steps, unknown enable sets |
| `he_top_tb`      | end to end at the default size: ten synthetic 151 x 133 knuckle images in automatic mode and one in manual mode |

`he_top_tb` runs the top level with every parameter at its default. For
each image it checks all 20083 output pixels, the 67435-clock run length,
that every phase ran, that forwarding happened, and that the output reaches
255 with a wider range than the input. It also prints the normalised MSE and
PSNR between input and output. For these synthetic images these come out
around 0.06 and 12 dB. The eleventh image is run in manual mode, one step
per phase, after a step with an unknown enable set that must be ignored.
The test fails if either control mode was never used. The whole test takes
about ten seconds.

To run a testbench with Verilator:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
        rtl/he_pkg.sv tb/he_top_tb.sv --top-module he_top_tb
    ./obj_dir/Vhe_top_tb

Replace `he_top_tb` with any other testbench name. When a module is linted alone, `verilator --lint-only -Wall` notes the
package constants that this module does not use. Beyond those it reports
only two warnings on the RTL:

* the divider's `remainder` pin, which is left open on purpose;
* `rst_n` being used both as the asynchronous reset and in the
  `disable iff` of the assertions.

In `he_move` and `he_map` some outputs are RAM read data passed straight
through to the next address or data port. This is intended: the pipeline
registers sit on the addresses.
