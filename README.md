# Overclockable convolution accelerator with checksum-based error detection

Running an FPGA accelerator faster than static timing analysis allows ("overclocking" or
timing speculation) can buy a large throughput gain. The cost is that, past some unknown and
board-dependent frequency, long combinational paths start to latch wrong values. Those errors
are not confined to low-order bits. The safe limit moves with temperature, voltage, board and
input data, so it cannot be fixed at design time.

This design makes overclocking safe to use by checking every unit of work, a *tile*, as it
is computed. A convolution layer is linear, so the sum of all its outputs can be predicted
from the inputs and weights, at a tiny fraction of the layer's cost. The accelerator computes
this prediction (the **input-checksum**, rho) while the tile streams in. It also sums the
outputs the kernel actually produced (the **output-checksum**, sigma) while they stream out.
Each tile gets a verdict `rho != sigma`. A controller uses the verdicts to retune the
accelerator clock at run time: it raises the frequency while tiles come out clean and backs
off when one does not. The host may re-send any tile that was flagged.

The RTL implements the technique for the fifth convolution layer of AlexNet by default
(192 input channels, 128 output channels, 13x13 outputs, 3x3 kernel, unit stride, 16-bit
words).

## The checksum identity

A unit-stride convolution layer computes

    y[m][r][c] = sum_{n<N} sum_{i<K} sum_{j<K} x[n][r+i][c+j] * w[m][n][i][j]

The sum of all outputs of a tile, over its output channels `m`, rows `r < R` and columns
`c < C`, can be reordered so that the weights come out of the spatial sums:

    sigma = sum_{m,r,c} y[m][r][c]
          = sum_{n,i,j} X[n][i][j] * Ws[n][i][j]                = rho

    Ws[n][i][j] = sum_m w[m][n][i][j]               (weights summed over output channels)
    X[n][i][j]  = sum_{r<R, c<C} x[n][r+i][c+j]     ("input group" of weight position i,j)

This is where the savings come from:

* **Multiplications.** Computing rho takes N*K*K multiplications (1728 for the default layer).
  A tile of the layer itself takes TM*N*K*K*R*C of them.
* **Additions.** Each input group X[n][i][j] is the sum over an R x C window shifted by
  (i, j). Neighbouring windows share all but one row or one column. So only X[n][0][0] is
  summed in full, and every other group is derived from a neighbour:

      X[n][0][0] = sum over rows 0..R-1, columns 0..C-1
      X[n][0][j] = X[n][0][j-1] + colsum(C-1+j) - colsum(j-1)          rows 0..R-1
      X[n][i][j] = X[n][i-1][j] + rowsum(R-1+i, j) - rowsum(i-1, j)    columns j..j+C-1

  The only partial sums needed are, per input channel:
  * the core sum;
  * for each of the 2(K-1) *edge rows* (rows 0..K-2 and R..R+K-2), the K windowed row sums;
  * for each of the 2(K-1) *edge columns* (columns 0..K-2 and C..C+K-2), the column sum over
    rows 0..R-1.

  All of these can be accumulated while the input streams past, one word per cycle.

**Modular arithmetic.** All data, products, outputs and checksums are W-bit words with
two's-complement wrap-around. The identity therefore holds *exactly* modulo 2^W, so any
single wrong output word always changes sigma and is always caught. Several wrong words can
cancel, with a probability of about 2^-W. A wrong value inside the checksum units themselves
gives a false alarm (a clean tile flagged). Those units are far shallower than the kernel,
so they fail at much higher frequencies. Outputs are the raw modulo-2^W accumulations:
fixed-point scaling, rounding and saturation are left to whatever consumes them, since any
of these would break the linear identity.

## Data path

```
 system clock domain   |            accelerator clock domain (acc_clk, retuned)           |  system
                       |                                                                   |
 in ──► async_fifo ────┼─► input_checksum ─► stream_fifo ─► conv_kernel ─► stream_fifo ─►  |
                       |        │ rho                                   output_checksum ──┼─► async_fifo ─► out
                       |   stream_fifo (rho queue) ─► checksum_compare ◄────── sigma       |
                       |                          │ verdict                                |
 tile_done/tile_error ◄┼──── async_fifo ◄─────────┘                                        |
        freq_scaler ◄──┘                                                                    |
        freq, freq_update ──► (external clock manager) ──► acc_clk
```

Everything in the accelerator clock domain may be overclocked. All traffic across the
domain boundary goes through dual-clock FIFOs, so the system side never sees the varying
clock. The checksum units sit between the kernel and the boundary FIFOs, in the stream, and
add no latency to it.

Tiles are macro-pipelined. While the kernel computes tile t, tile t+1 streams in through the
input-checksum and tile t-1 streams out through the output-checksum. The kernel keeps two
banks of input buffers and two of output buffers. The input-checksum keeps two banks of
partial sums, so the post phase of one tile runs while the next tile streams in. Several rho
values can therefore be ready before the matching sigma; they wait in order in a small queue.

### Tile stream format

A tile covers TM output channels, all N input channels and the full R x C output. The host
sends one stream of W-bit words per tile:

1. **Weights**: the tile's TM*N*K*K weights w[m][n][i][j], with j the fastest-changing index,
   then i, n and m.
2. **Inputs**: the N*(R+K-1)*(C+K-1) inputs x[n][row][col], with col fastest.

It receives TM*R*C outputs y[m][r][c] (c fastest). Later, on the system clock, it receives
one pulse on `tile_done`, with `tile_error` high if the tile's checksums differed. A full
layer of M output channels is M/TM tiles that share the same input. Each tile is independent,
so a flagged tile can be re-sent at any time.

### Blocks

| module | role |
|---|---|
| `conv_kernel` | Loads a tile into one of its two weight/input buffer banks. It then computes with TM adder trees of TN multipliers each: TN-way unrolling over input channels, TM-way replication over output channels, so TM*TN MACs per cycle. A 3-stage pipeline (fetch, multiply, tree+accumulate) handles one output position per cycle. Finally it streams the output buffer out. Load, compute and drain run as a three-stage macro-pipeline over two input banks and two output banks. |
| `input_checksum` | Passes the tile stream through. In the *stream* phase it sums weights over m and builds the per-channel core, edge-row and edge-column sums. In the *post* phase it rebuilds X by the recurrence above, one (n,i,j) per cycle, and multiply-accumulates rho. It then offers rho. Partial sums are kept in two banks; the stream stalls only when both banks are waiting. |
| `output_checksum` | Passes the output stream through and accumulates sigma. After TM*R*C words it offers sigma. |
| `checksum_compare` | Pairs one rho with one sigma and registers a verdict `error = rho != sigma`. |
| `stream_fifo` | Synchronous valid/ready FIFO, first-word fall-through. |
| `async_fifo` | Dual-clock FIFO with Gray-coded pointers and two-flop synchronisers. DEPTH is a power of two, at least 4. |
| `freq_scaler` | Frequency-scaling policy (below). |
| `aled_conv_top` | Wires it all together, with three async FIFOs (tile in, outputs out, verdicts out) and a rho queue. |
| `aled_pkg` | Default layer geometry, word length, parallelism and scaling constants; the verdict type. |

All ports are valid/ready handshakes except the verdict and frequency outputs, which are
one-cycle pulses. Resets are asynchronous and active-low. Each clock domain has its own
reset (`sys_rst_n`, `acc_rst_n`). Buffers are not reset: they are always written before they
are read.

## Frequency scaling

`freq_scaler` runs on the system clock and sees one verdict per tile. Its parameters are the
step `G` (default 1 MHz) and the interval `I` (default 100 tiles):

* **Ramp.** Starting from `F_START` (100 MHz), every clean tile raises the target by G.
* **First error.** The first flagged tile lowers the target by G and ends the ramp.
* **Steady state.** Every flagged tile lowers the target by G and restarts the count. Every
  I consecutive clean tiles raise it by G.
* **Limits.** The target is clamped to [F_MIN, F_MAX] (100 and 400 MHz).

Each change pulses `freq_update` with the new target on `freq`, in MHz. The clock manager
that turns this into `acc_clk` (an FPGA MMCM/PLL with dynamic reconfiguration) is not part of
the RTL. A short I raises the frequency aggressively and tolerates more flagged tiles. A long
I keeps the error rate, and with it the re-execution cost, very low.

`tb_freq_scaling_run` shows the policy on a model board. There, a tile run at f MHz fails
with probability 4^(f-232), so the error rate spans six decades over 10 MHz. From 100 MHz the
target ramps up for 132 tiles and then settles between 226 and 232 MHz. Over 4000 tiles the
mean is 226 MHz, with 33 flagged tiles (0.8%).

Recovery cost follows a simple model. Take N tiles, mean overclock factor O, tile error rate
E, and S pipeline stages that must be redone per failure (S = 1 for this single-engine
arrangement). Then time = N/O + S*N*E, and overclocking pays off while E < (O-1)/S.

## Timing

At the default size one tile takes, with no stalls:

* **Load:** TM*N*K*K + N*(R+K-1)*(C+K-1) = 55296 + 43200 cycles. One word per cycle; the
  system-side clock also limits this.
* **Compute:** ceil(N/TN)*K*K*R*C + 4 = 39*9*169 + 4 = 59323 cycles. 160 MACs are issued per
  cycle. The last group of input channels uses 2 of its 5 lanes.
* **Drain:** TM*R*C = 5408 cycles.

With an idle kernel, the first output is valid ceil(N/TN)*K*K*R*C + 5 cycles after the last
input word. The three phases overlap across tiles, so in steady state a tile costs the
longest phase. At this layer size that is the load: 98496 cycles per tile, 4 tiles per layer.

The input-checksum post phase takes N*K*K+4 = 1732 cycles after the last input word. This is
well inside the kernel's compute phase, so detection adds nothing to a tile's latency.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N`, `R`, `C`, `K` | 192, 13, 13, 3 | input channels, output rows/columns, kernel size (AlexNet conv5) |
| `TM`, `TN` | 32, 5 | output channels per tile (trees), input channels per cycle (lanes per tree) |
| `W` | 16 | word length of data, weights, outputs, checksums; 8, 4, 2 and 1 also work |
| `AF_DEPTH`, `SF_DEPTH`, `RQ_DEPTH` | 16, 16, 4 | async / sync FIFO depths, rho queue depth (powers of two) |
| `F_START`, `F_MIN`, `F_MAX`, `G`, `I`, `FW` | 100, 100, 400, 1, 100, 12 | frequency scaling (MHz, tiles, bits) |

Constraints: `R >= K-1` and `C >= K-1`. Unit stride only.

## What follows the published technique and what is this design's own

These follow the published technique:

* the checksum identity and its factorisation;
* reuse of rows and columns between input groups;
* the split of the input-checksum into group sums while streaming, with the rest overlapped
  with the kernel;
* the overlap of the next tile's transfer with the current computation and the previous
  tile's output transfer;
* the placement of the checksum units between the kernel and its FIFOs;
* the asynchronous FIFOs around a separately clocked accelerator;
* the scaling policy with G = 1 MHz and I = 100;
* the AlexNet conv5 geometry and the 16-bit word length.

These are this design's own choices:

* **Parallelism.** TM x TN = 32 x 5 = 160 multipliers. The published throughput figures imply
  160 MACs per cycle, but the split into TM and TN is a choice.
* **Tile shape.** TM output channels, all input channels, the full output plane.
* **Stream order** and word formats, the valid/ready handshakes, FIFO depths and pipeline
  depths.
* **Arithmetic.** Wrap-around modulo 2^W throughout.
* **Buffering.** The two-bank buffering and its hand-over flags, and the rho queue.
* **Verdict crossing.** A third async FIFO carries the verdict to the system side.
* **Scaler in hardware.** The published prototype runs the scaling policy as host software;
  here it is a hardware block.
* **Clamp limits** on the frequency.

Known departure:

* **Unit stride only.** Strided layers (for example AlexNet conv1, stride 4) are not
  supported.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/aled_pkg.sv tb/tb_conv_kernel.sv \
          --top-module tb_conv_kernel -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_conv_kernel` | random tiles against a direct convolution (with a partial last lane group); compute latency; load/compute and drain/compute overlap |
| `tb_input_checksum` | rho of back-to-back tiles against the sum of a directly computed convolution; pass-through; latency; two-bank stall |
| `tb_output_checksum` | sigma, pass-through, hold-off |
| `tb_checksum_compare` | verdicts for 200 equal/unequal pairs in order |
| `tb_stream_fifo`, `tb_async_fifo` | ordering, full/empty, back-pressure; the async one changes the read clock mid-run |
| `tb_freq_scaler` | the policy against a reference model, including both clamp limits |
| `tb_aled_conv_top` | end to end at a small size (see below) |
| `tb_aled_conv_full` | the full default-size layer (see below) |
| `tb_aled_conv_wordlen` | the full layer at 8, 4, 2 and 1-bit words, one corrupted tile each |
| `tb_freq_scaling_run` | the scaler at its defaults over 4000 tiles (1000 images), against an error model (below) |

**`tb_aled_conv_top`** runs end to end at a small size over 40 tiles, sent back to back. A model of the clock
manager follows `freq`, and timing errors are emulated by flipping one bit of one kernel
output word in some tiles. Every corrupted tile must be flagged and every other tile must be
clean and exact. Flagged tiles are re-sent. The testbench counts and requires: ramp steps,
decreases, steady-state increases, detections, re-runs, output back-pressure, input stalls,
clock retunes, loading and draining during computation, and queued rho values.

**`tb_aled_conv_full`** runs the complete default-size layer: 4 tiles, one of them corrupted
once and queued again. Every output word is checked against a direct convolution. It runs in well
under a minute.
