# MDeMAS: a LUT-based approximate adder without a carry chain, in a 3x3 Gaussian filter

An exact ripple adder on an FPGA is as slow as its carry chain is long.
MDeMAS cuts that chain. It splits the operands into 2-bit blocks. Each block
*guesses* its own carry out from its own four operand bits, ignoring the
carry that arrives from below. The guess is the carry that `A + B` would give
with a carry-in of 0. The next block takes that guess as its carry-in. No
carry depends on another carry, so an adder of any width is two LUT levels
deep: one LUT4 for the predicted carry, then one LUT6_2 for the two sum bits.

The adder is used here where such adders are meant to go: in an
error-tolerant image filter. The filter is a 3x3 Gaussian smoothing filter
(sigma = 1) on an 8-bit grey pixel stream, and every addition in it is an
8-bit MDeMAS adder.

## The 2-bit block and its error

A block has operand bits `A1 A0`, `B1 B0` and a carry-in `Cin`. It produces:

* **Predicted carry** (`mdemas_carry_pred`):
  `cout = A1&B1 | (A1^B1)&A0&B0`, that is `A + B >= 4`. As a LUT4 indexed
  `{A1,A0,B1,B0}` its INIT is `16'hEC80`.
* **Sum** (`mdemas_cell`): the exact sum `A + B + Cin` can disagree with the
  predicted carry in only one case: `A + B = 3` with `Cin = 1`. The true
  result is then 4, but the predicted carry is 0. In that case the block
  outputs `S = 2'b11` (3), the value nearest 4 that it can give without a
  carry. In every other case `S` is the exact low two bits. As LUTs indexed
  `{A1,A0,B1,B0,Cin}`, `S1` is `32'hE38F3EF8` and `S0` is `32'h9B6EB9E6`.

Of the 32 input states, 4 are wrong, each by exactly 1. For comparison, the
DeMAS 2-bit LUT block that this one refines simply uses `A1` as its carry
out. Its error magnitudes add up to 28 over the same 32 states.
The hardware passes
`pred` into the sum cell as a port, so that one predictor drives both the
block's carry out and the next block's carry-in. On an FPGA the sum remains a
function of the five block inputs.

## The N-bit adder (`mdemas_adder`)

There are `N/2` blocks. The carry-in of block `i` is the predicted carry of
block `i-1`. The `cin` port feeds block 0, and the adder's `cout` is the
top block's predicted carry. All bits are approximate: there is no exact
upper section.

What makes the tree below safe: **the result never exceeds the exact sum.**
A block's output `S + 4*pred` is never more than `A_i + B_i + Cin_i`. Summed
over the blocks with their weights, the carries telescope away, leaving
`approx <= a + b + cin`. So an addition whose exact result fits in N bits
never overflows. Over all 2^17 inputs of the 8-bit adder, the testbench
checks both this bound and the result itself.

Block size is fixed at 2. The structure is defined only for that size, and 2
is the size that suits 6-input LUTs.

## The filter

```
in_pix ──► gauss_window ──────────────► gauss_adder_tree ──► reg ──► out_pix
           (2 line buffers,  win[3][3]   (9 shifted terms,
            3x3 register window,          8 MDeMAS adders)
            row/column counters)
```

* **`line_buffer`**: a circular memory, `IMG_W` words deep, with
  asynchronous read (LUT RAM on an FPGA). On each enable it shows the word
  written one row earlier and stores the new one in its place.
* **`gauss_window`**: two cascaded line buffers supply, for an incoming
  pixel `p(r,c)`, the pixels `p(r-1,c)` and `p(r-2,c)` in the same cycle.
  That column of three shifts into a 3x3 register window. The window is
  valid when `r >= 2` and `c >= 2`, and it is then centred on `(r-1, c-1)`.
  Border pixels produce no output, so a `W x H` frame yields `(W-2) x (H-2)`
  pixels. Row and column counters wrap at the end of a frame, so frames can
  follow each other without a gap.
* **`gauss_adder_tree`**: the kernel is `[1 2 1; 2 4 2; 1 2 1] / 16`, the
  power-of-two form of a sigma = 1 Gaussian. Each pixel is scaled before it
  is added: corners `>> 4`, edges `>> 3`, centre `>> 2`. Every term and
  every partial sum then fits in 8 bits (the largest is
  4·15 + 4·31 + 63 = 247), so all eight adders are 8-bit. Seven adders form
  a balanced tree over the eight outer terms, and the eighth adds the centre
  term. By the bound above, no adder's carry out can be set; an assertion
  checks this.
* **`gauss_mdemas_top`**: the window and the tree, with an output register.

### Interface and timing of `gauss_mdemas_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`, `in_pix` | in | 1, 8 | raster-order pixel stream; gaps allowed; no back-pressure |
| `out_valid`, `out_pix` | out | 1, 8 | smoothed pixel, raster order of the frame's interior |
| `out_last` | out | 1 | marks the last output pixel of a frame |

Parameters: `IMG_W = 512` and `IMG_H = 512`. Throughput is one pixel per
clock. Latency is 2 cycles: a pixel presented in cycle `n` that completes
a window (it is the window's bottom-right pixel) gives `out_valid` in
cycle `n+2`. The adder tree is combinational between the window registers
and the output register.

Storage at the default size is two line buffers of 512 × 8 bits
(8192 bits), plus about 100 flip-flops.

## Accuracy seen in simulation

On a synthetic 512×512 frame (a ramp plus noise), the approximate filter
differed from the same filter built with exact adders in about two thirds of
the output pixels. It was never above the exact result, and the PSNR against
the exact filter was about 26 dB. This figure compares approximate with exact
arithmetic in the same filter. It is not a quality figure against the
unfiltered image.

## What follows the published design and what is this design's own

Following the published design:

* the block's carry predictor, and its sum rule (checked bit for bit against
  the published truth table);
* block size 2, with all bits approximate and no carry chain between blocks;
* 8-bit adders;
* a 3x3 Gaussian filter with sigma = 1, and a 512×512 frame.

This design's own choices:

* the integer kernel and the pre-shifting of the pixels;
* the tree shape;
* the line-buffer and window structure;
* border handling (borders produce no output);
* the stream interface and reset;
* the two pipeline registers;
* tying the lowest block's carry-in to 0 inside the filter.

Not included: the exact and approximate adders that the MDeMAS adder was
compared with (a carry-speculative adder, and the DeMAS LUT adders with an
exact upper part). They are comparison points, not part of the design.
No FPGA primitives are instantiated. The LUT functions are written as logic,
each small enough for one LUT4 (carry) and one LUT6_2 (sum) per block.

## Files and simulation

`rtl/`: `gauss_pkg` (pixel and window types, kernel shifts),
`mdemas_carry_pred`, `mdemas_cell`, `mdemas_adder`, `line_buffer`,
`gauss_window`, `gauss_adder_tree`, `gauss_mdemas_top`.

`tb/`: one self-checking testbench per module, named `tb_<module>`, and
`tb_mdemas_ref_pkg`. That package is the reference model built from the
LUT INIT values above, not from the RTL. `tb_gauss_mdemas_top` runs three
16×12 frames with random input gaps. `tb_gauss_mdemas_top_full` runs one
512×512 frame at the default parameters in a few seconds. Both check every
output pixel, its cycle of arrival and `out_last`. They also count input
gaps, border pixels, approximated outputs and frame ends, and fail if any
count is zero. Each testbench ends with
`TB_RESULT checks=<n> failures=<n>`.

```
verilator --binary --timing --assert --top-module tb_gauss_mdemas_top \
  -y rtl -y tb +libext+.sv rtl/gauss_pkg.sv tb/tb_mdemas_ref_pkg.sv \
  tb/tb_gauss_mdemas_top.sv
./obj_dir/Vtb_gauss_mdemas_top
```

Swap in the name of any other testbench to run it. To change the frame
size, set `IMG_W` and `IMG_H` on `gauss_mdemas_top`. The line buffers
follow `IMG_W`.
