# Red-cyan anaglyph with RGB-to-YCbCr conversion

Two cameras a few centimetres apart see the same scene from slightly
different positions. Putting the red channel of the left view and the green
and blue channels of the right view into one picture gives a red-cyan
*anaglyph*: through glasses with a red and a cyan filter, each eye sees only
its own view, and the brain fuses them into depth. This RTL builds that
picture from two live pixel streams and converts every anaglyph pixel from
RGB to YCbCr (one luma and two colour-difference components), the form in
which video is usually stored and transmitted.

The design is a short streaming pipeline: one pixel per clock, no frame
store, four clock cycles from input to output.

```
 left camera  --l_valid/l_ready/l_rgb-->+------------------+   +-------------+
                                        | anaglyph_compose |-->|  ycbcr_csc  |--> out_rgb   (anaglyph)
 right camera --r_valid/r_ready/r_rgb-->|  pair + R|G|B     |   | 3-stage MAC |--> out_ycbcr
                                        +------------------+   +-------------+
                                          1 cycle                 3 cycles
```

## The colour conversion

`ycbcr_csc` evaluates, for 8-bit R, G, B:

```
Y  =  0.299 R + 0.587 G + 0.114 B +  16
Cb = -0.169 R - 0.331 G + 0.500 B + 128
Cr =  0.500 R - 0.419 G - 0.081 B + 128
```

These weights and offsets are the conversion that this design implements.
Be aware that they mix two conventions. The luma weights are the full-range
ones (they sum to 1), but the +16 offset belongs to studio-range video.
As a result Y runs from 16 to 271 rather than 16 to 235 or 0 to 255. The
converter clamps it, so every input with 0.299 R + 0.587 G + 0.114 B ≥ 239.5
gives Y = 255. Cb and Cr run from 0.5 to 255.5, so pure blue gives
Cb = 255 and pure red gives Cr = 255, both after clamping. If you need
standard BT.601 studio range (weights 0.257/0.504/0.098, and so on) or
full-range JPEG YCbCr (Y offset 0), change `K_MILLI` and `OFFSET` in
`csc_pkg.sv`. Nothing else depends on them.

How it is computed:

* **Constants.** `csc_pkg::K_MILLI` holds the nine weights in thousandths,
  exactly as written above. `fix_coef()` turns each one into a signed
  fixed-point integer with `FRAC_W` fraction bits (default 14), rounded to
  nearest. It is evaluated at elaboration, so the hardware holds only the
  constants. With 14 bits, each weight is within 3·10⁻⁵ of its decimal value.
  A sum of three such weights times 255 is therefore within about 0.025 of
  the exact result.
* **Stage 1:** the nine products of weight × channel. Each multiplier has
  one constant operand.
* **Stage 2:** three sums. Each sum adds the offset, shifted into the
  fixed-point format, and half an LSB for rounding.
* **Stage 3:** an arithmetic shift right by `FRAC_W` (round half up), then a
  clamp to 0..255.

The result is the exact value rounded to the nearest integer and clamped.
It can differ by one only when the exact value lies within about 0.025 of
a half.

Every pixel keeps all three components (4:4:4). There is no chroma
subsampling.

## Pairing the two views

The two cameras deliver pixels on separate valid/ready streams in raster
order. `anaglyph_compose` acts as a join: it takes a left pixel and a right
pixel only in the same cycle, so the n-th left pixel is always combined with
the n-th right pixel. Either camera can pause or run ahead, and the other
simply waits (`l_ready` is low until `r_valid` is high, and the reverse). The
output register then holds `{left.r, right.g, right.b}`. The left view's G and
B and the right view's R are discarded. Verilator reports those input bits as
unused, and that is expected.

Pairing is by arrival order only. There is no start-of-frame or
end-of-line signal. The two streams must therefore start on the same pixel
and carry the same number of pixels. The horizontal offset between the
views, which creates the depth, is whatever the cameras deliver. The design
does not shift or align the images.

## Interface and timing

`anaglyph_csc_top` ports (`rgb_t` and `ycbcr_t` are packed structs from
`csc_pkg`, 3 × 8 bits, first field in the top byte):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `l_valid`, `l_ready`, `l_rgb` | in, out, in | 1, 1, 24 | left-camera stream |
| `r_valid`, `r_ready`, `r_rgb` | in, out, in | 1, 1, 24 | right-camera stream |
| `out_valid`, `out_ready` | out, in | 1 | result stream handshake |
| `out_rgb` | out | 24 | anaglyph pixel `{R, G, B}` |
| `out_ycbcr` | out | 24 | `{Y, Cb, Cr}` of that pixel |

* A transfer happens on a rising edge where valid and ready are both high.
  An output that is not taken stays unchanged; assertions in both blocks
  check this.
* Latency: a pair that is accepted in the cycle it is presented appears on
  `out_valid` 4 cycles later.
* Throughput: one pixel per clock while both cameras are valid and the sink
  is ready.
* Backpressure: the converter stalls as a whole. When `out_ready` is low and
  a result is waiting, every stage holds. Both input `ready`s drop in the same
  cycle, because the chain is combinational back to the inputs. There is no
  skid buffer.
* Reset clears only the valid bits. The data registers are not reset.

Resources: 9 constant multipliers, 3 three-input adders, about 350
pipeline flip-flops, and no memory. A W × H frame takes W·H + 4 cycles
when nothing stalls.

## Parameters

| name | where | default | meaning |
|---|---|---|---|
| `FRAC_W` | `ycbcr_csc`, `anaglyph_csc_top` | 14 | fraction bits of the conversion weights |
| `PIX_W` | `csc_pkg` | 8 | bits per colour channel; the offsets 16 and 128 assume 8 |

## Files

* `rtl/csc_pkg.sv`: pixel types, weights, offsets and `fix_coef()`.
* `rtl/anaglyph_compose.sv`: stereo join and red-cyan channel selection.
* `rtl/ycbcr_csc.sv`: the three-stage RGB-to-YCbCr pipeline.
* `rtl/anaglyph_csc_top.sv`: the two blocks chained together.
* `tb/*_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` at the end.

## Verification

The expected values in every bench come from a real-number model that has
the weights typed in as decimals. They are not taken from the package
constants the design uses.

* `ycbcr_csc_tb` checks:
  * the 3-cycle latency;
  * 64 back-to-back pixels in 67 cycles;
  * black, white, the primaries and secondaries, and grey;
  * 5000 random pixels with random input gaps and output stalls.
* `anaglyph_compose_tb` checks:
  * the 1-cycle latency and full rate;
  * 4000 pairs with independent random gaps on each side and random
    backpressure;
  * that left-waits-for-right, right-waits-for-left and output stall all
    occur, and that no pixel is lost or duplicated.
* `anaglyph_csc_top_tb` runs the top at its default parameters. It checks
  the 4-cycle latency and the rate on a 16-pixel burst. It then streams one
  full 320 × 240 stereo pair: a tiled test scene, with the right view
  shifted by 4 pixels. Both cameras have random gaps and the sink has random
  backpressure. The bench checks every anaglyph pixel and every Y/Cb/Cr
  value. It also requires that each camera waited on the other, that the
  output stalled, and that Y, Cb and Cr were each clamped at 255 at least
  once.

To run a bench with plain Verilator (about a second each):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/csc_pkg.sv rtl/anaglyph_compose.sv rtl/ycbcr_csc.sv rtl/anaglyph_csc_top.sv \
    tb/anaglyph_csc_top_tb.sv --top-module anaglyph_csc_top_tb
./obj_dir/Vanaglyph_csc_top_tb
```

Replace the last file and the top-module name to run another bench.

## What is this design's own

The design fixes the following:

* the channel selection of the red-cyan anaglyph;
* the conversion weights and offsets;
* anaglyph composition first, then conversion.

The rest are this implementation's choices:

* 8-bit channels;
* the valid/ready interfaces and the pairing of the two views by arrival
  order;
* 14-bit fixed-point weights, round half up, and clamping;
* the split into 1 + 3 pipeline stages;
* the synchronous reset.

The design was originally prototyped in a model-based FPGA flow. The
tool-generated parts of that flow are not reproduced here: the
simulation-to-hardware boundary blocks and the JTAG link that streams test
images between a PC and the board. Any pixel source and sink that speaks
valid/ready can take their place. The streams in the testbenches play that
role here.
