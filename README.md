# Multirate convolution + pooling layer

A convolution layer followed by pooling with stride M computes a full-resolution feature map
and then throws away all but one sample in M×M. This design never computes the samples that
would be thrown away. It treats "separable convolution + stride-M pooling" as a 2-D
decimating FIR filter and moves the decimator in front of the filter. Each direction's taps
are regrouped into *time-varying weights* that act on whole blocks of M samples. As a result:

- all multiply-adds run at the decimated rate Fs/M. With a 27 MHz pixel clock the filter
  arithmetic works at 13.5 MHz;
- the vertical filter's scan-line memories are indexed by the decimated column, so a line
  holds IMG_W/M words instead of IMG_W;
- the output map is (IMG_W/M)×(IMG_H/M), a quarter of the full map for M = 2.

The output is bit-identical to "convolve at full rate, then decimate". The end-to-end
testbench checks exactly that.

The default configuration is a first CNN stage for digit recognition: a 28×28 8-bit image,
a separable edge filter with taps {-3.9, 0, 4, 0} in both directions, pooling stride 2, ReLU,
and a 14×14 output map.

## The time-varying weight

Take a 1-D FIR of order N-1, H(z) = Σ a_j z^-j, followed by keeping every M-th output. Write
N = M·L and group the taps in runs of M:

    H(z) = (a0 + a1 z^-1 + … + a_{M-1} z^-(M-1))
         + (a_M + … + a_{2M-1} z^-(M-1)) z^-M + …

Define Z = z^M, the delay of one *block* of M input samples. Each bracket is then one weight
A_i = Σ_k a_{iM+k} z^-k, and

    H(Z) = A_0 + A_1 Z^-1 + … + A_{L-1} Z^-(L-1)

This has the shape of an L-tap filter running at Fs/M. Each "coefficient" A_i is really a
small M-tap filter across the M samples of one block. Seen from the block rate, it is a
weight that changes with the phase of the sample it meets. For the default M = 2, L = 2:

    A_0 = a0 + a1 z^-1,   A_1 = a2 + a3 z^-1          (horizontal)
    A_10 = a10 + a11 z1^-1, A_11 = a12 + a13 z1^-1    (vertical, z1^-1 = one scan line)

`mr_decim_1d` implements this directly:

1. **Decimator in front.** Each incoming sample has a phase k, its distance from the last
   sample of its block. Samples with k ≠ 0 are only stored, M-1 of them per position.
2. **Block evaluation.** At the phase-0 sample the block is complete. Every A_i is applied to
   it in parallel: u_i = Σ_k a_{iM+k}·x_k, which takes N multipliers, each used once per
   block.
3. **Block-rate delays.** The L results pass through a transposed chain of L-1 delays Z^-1:
   t_i = u_i + t_{i+1}(previous block), and the output is t_0. One partial sum per stage is
   stored per position.

The same module filters in both directions. Its `DEPTH` parameter is the number of
independent positions that share the arithmetic:

- With `DEPTH = 1` it filters along a line. The "memories" are single registers.
- With `DEPTH = IMG_W/M` it filters down the columns. Each stored sample or partial sum
  becomes a scan-line memory (`line_mem`) addressed by the decimated column.

The vertical filter sees one horizontal result every M pixels, so it too works at Fs/M. It
computes only on lines whose vertical phase is 0; on the other lines it only stores.

### Alignment and edges

Blocks end at samples 0, M, 2M, … in each direction. Block 0 is the lone first sample. Block
b ≥ 1 holds samples bM-M+1 … bM. History before the image edge is zero: `in_first` forces the
stored samples and partial sums to read as zero. No memory is ever cleared. Output (r, c) is
therefore

    y[r][c] = Σ_i Σ_j a1_i · a_j · x[M·r - i][M·c - j],   x = 0 outside the image

For W = 28 and M = 2 the output columns are 0, 2, …, 26, which gives 14 of them. The last
pixel of each line (column 27) has phase 1, so it is stored but never used. The same holds
for line 27.

## Memory

With the defaults (M = 2, L = 2, 28-pixel lines), the vertical filter stores two lines of 14
words:

- one line of phase-1 samples (23 bits each);
- one line of partial sums A_11·(block) (37 bits each).

A conventional order-2 vertical filter at full rate needs two lines of 28 pixels. So the
design stores half as many words, though the words are wider because they hold exact
intermediate results. The feature-map memory holds 14×14 = 196 words instead of 784. In
general the vertical store is (M-1) + (L-1) lines of ⌈IMG_W/M⌉ words.

## Blocks

| module | role |
|---|---|
| `mr_conv_pool` | top: rate control → horizontal filter → vertical filter → ReLU → feature map |
| `mr_decim_1d` | 1-D decimating FIR with time-varying weights (used twice) |
| `line_mem` | scan-line memory: write port plus asynchronous read-before-write read port |
| `rate_ctrl` | raster counters; phase and block number in each direction; Fs/M enables |
| `relu_act` | registered ReLU with bypass and a "clamped" flag |
| `fmap_mem` | 14×14 output feature map, registered read, `frame_done` pulse |
| `mr_pkg` | widths, default sizes, the edge-filter weights |

There is one clock. The rate change is done with enables (`h_out`, phase 0) rather than a
divided clock. Everything after the input commutator does useful work only once per M
pixels.

## Interface and timing of `mr_conv_pool`

- `pix`, `pix_valid`: unsigned pixels in raster order, one per clock at most. Any number of
  idle clocks may come between pixels. There is no back-pressure and no frame-start signal:
  the first pixel after reset is (0,0), and frames follow each other directly.
- `out_valid`, `out_data`, `out_row`, `out_col`: result (r, c). It comes exactly 3 clocks
  after the pixel at line M·r, column M·c. Two results are never on consecutive clocks.
- `out_clamped`: high with a result that ReLU forced to zero.
- `relu_en`: 1 applies ReLU; 0 passes the signed filter result unchanged. It is sampled
  with each result.
- `fm_rrow`, `fm_rcol` → `fm_rdata`: read the stored map, one clock of latency.
  `frame_done` pulses once the last position of a map has been written.

Number formats:

- Pixels are 8-bit unsigned, made signed internally as 9 bits.
- Weights are 12-bit two's complement with 8 fraction bits. -3.9 becomes -998/256 =
  -3.8984; 4 becomes 1024.
- No result is rounded. The horizontal result is 23 bits with 8 fraction bits. The layer
  output is 37 bits, signed, with 16 fraction bits. A next layer would pick its own scaling.

Parameters: `IMG_W`, `IMG_H`, `M`, `L`, `PIX_W`, `COEF_W`, `H_COEF`, `V_COEF`. Element j
of `H_COEF`/`V_COEF` is tap a_j. M = 1 (no pooling) has not been tested.

## Where this departs from, or adds to, the method

- **Pooling is decimation.** Pooling means keeping every M-th sample (strided
  subsampling). Max and average pooling are not linear and do not fit the decimating-filter
  view, so they are not built.
- **Four taps, effectively three.** The edge-filter example lists four taps per direction,
  but a1 = a3 = 0, so it is an order-2 (3×3-class) kernel. The design keeps N = M·L = 4.
- **ReLU position.** ReLU comes after the decimating filter. With decimation as the pooling
  operation, ReLU before or after pooling gives the same result. The bypass input is an
  addition.
- **No bias adder.** The bias is taken to be folded into the weights.
- **Own choices.** The fixed-point formats, full-precision arithmetic, stream interface,
  latency, the transposed arrangement of the block delays, the register-array memories and
  the feature-map port are all choices of this design.
- **Rest of the network not built.** Later convolution and fully-connected layers of a
  digit-recognition CNN are not part of this RTL.
- **Timing.** Timing closure at 27 MHz and power have not been evaluated. Only functional
  equivalence and the cycle behaviour are verified.

## Verification

Each testbench in `tb/` checks itself and ends with `TB_RESULT checks=N failures=F`:

- **`tb_mr_conv_pool`** is the whole layer at its default parameters. It runs five 28×28
  frames: a digit-like stroke image, random images with ReLU on and off, a saturated image,
  random idle clocks, and two frames back to back. The reference is the conventional layer:
  full-rate 2-D convolution, then decimation, then ReLU. The test checks every output's
  value, its coordinates and its 3-clock latency, and reads back the whole feature map after
  each frame. It also counts ReLU clamps, ReLU bypasses of negative values, idle clocks,
  zero-padded edge outputs, outputs that used the scan-line memories, back-to-back frames
  and `frame_done` pulses, and fails if any of these never happened.
- **`tb_mr_decim_1d`** compares the filter with the direct FIR-then-decimate formula. It uses
  random and extreme weights and samples, and covers three configurations: M=2/L=2
  horizontal, M=2/L=2 over 5 columns, and M=3/L=3 over 4 positions. It checks the 1-clock
  output latency.
- **`tb_mr_conv_pool_cfg`** runs the whole layer with random weights at other sizes, against
  the same reference. It covers a 9×7 image with M = 3, L = 2 (odd sizes and incomplete last
  blocks), a 29×10 image with M = 2, L = 3, and 512-pixel lines with 256-word scan-line
  memories, the line length of high-resolution segmentation networks.
- **`tb_rate_ctrl`**, **`tb_line_mem`**, **`tb_relu_act`** and **`tb_fmap_mem`** check their
  blocks against arithmetic or shadow models.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb rtl/mr_pkg.sv \
        tb/tb_mr_conv_pool.sv --top-module tb_mr_conv_pool
    ./obj_dir/Vtb_mr_conv_pool

The full-size test takes well under a second.
