# Streaming 2D stencil accelerator (binary32 convolution)

This is an FPGA accelerator for one operation: the 2D convolution of a square
single-precision image with a square window of coefficients, the kind of
operation that dominates the convolution layers of a CNN. The host streams the
coefficients and then the image, one 32-bit word at a time, into a FIFO. Results
come back one per clock cycle through a second FIFO. The accelerator never
stores the image. A line buffer of shift registers holds just enough of the most
recent rows for the whole W x W window to be available every cycle. Then W*W
floating-point multipliers and a tree of W*W - 1 floating-point adders turn each
window into one output element.

The design is the hardware half of a software/hardware co-tuning study. In that
study, an application decides which of its convolution sizes deserves the single
FPGA accelerator it can have, and runs the rest as tuned software. The
accelerator has to give the same results as the software it replaces, so it
works in IEEE-754 binary32 rather than fixed point. That choice comes from the
study.

Default build: a 9 x 9 window over 512 x 512 images (`W = 9`, `I = 512`).

## What the host sends and receives

A convolution is one burst on the inbound stream:

1. `W*W` coefficients, row-major. Coefficient `(i, j)` multiplies the image
   element `i` rows below and `j` columns right of the window's top-left
   corner.
2. `I*I` image elements, row-major.

The outbound stream then carries `I*I` result elements, row-major. Output
`(r, c)` is

    out[r][c] = sum over i, j in 0..W-1 of coef[i][j] * img[r-h+i][c-h+j],   h = (W-1)/2

Each window is centred on its output element. Window positions outside the
image are ignored, so the output image has the same size as the input. New
coefficients must be sent before every image, even if they have not changed.
The next burst may follow immediately: while the last results of one image are
still draining, the accelerator already accepts the coefficients of the next.

## The line buffer (`stencil_window`, `row_shift_reg`)

The image arrives one element per cycle in row-major order, so vertically
adjacent elements are exactly `I` stream positions apart. The line buffer is a
chain of `W` rows. Each row has `W` tap registers, whose outputs form one row of
the window. Between the last tap of row `r` and the first tap of row `r+1` sits
a long shift register (`row_shift_reg`) of depth `I - W`, so each row adds
exactly `I` cycles of delay. The last row has only its taps. After the shift
that brought in stream element `k`:

    win[dr][dc] = element k - dr*I - dc        (dr, dc = 0 .. W-1)

`win[0][0]` is the newest element. The element that coefficient `(i, j)` needs
is `win[W-1-i][W-1-j]`, and `stencil_core` wires it that way.

`row_shift_reg` behaves exactly like a shift register of `LEN` stages. It is
built as a circular buffer of `LEN - 1` words plus an output register, which
lets synthesis map it onto block RAM. With the defaults the line buffer holds
8 x 503 words = 16 KB. Every image element is read from the host once and
reused `W*W` times.

## Borders and the padding phase (`stencil_ctrl`)

A plain line buffer wraps around: near the left edge of the image, its window
holds the right-hand end of the previous row. Near the top, it holds data left
over from the previous image. The controller therefore computes, for each
window, the `(row, col)` of the output it belongs to. From that it derives a
`W*W`-bit mask of the positions that lie inside the image. The multiplier of a
masked position gets +0 instead of the pixel, so the sum covers only the part of
the window inside the image. Every element, border or not, takes the same one
cycle.

The window centred on output element `n` is complete only once element
`n + h*I + h` has arrived. So the last `h*I + h` outputs need input that does
not exist. After the last image element, the controller makes `h*I + h` more
shifts with a padding word (masked anyway) and no input. The controller's three
phases are therefore:

| phase (`stencil_state_e`) | shifts per image | input accepted |
|---|---|---|
| `ST_COEF` (0) | none: W*W words go to the coefficient chain | yes |
| `ST_IMAGE` (1) | I*I | yes |
| `ST_FLUSH` (2) | h*I + h | no |

Outputs exist from shift `h*I + h` on: exactly `I*I` per image.

## Arithmetic (`fp32_mul`, `fp32_add`, `fp32_add_tree`, `stencil_mul_array`)

Both units implement binary32 with round-to-nearest-even, with these
simplifications:

- subnormal inputs count as zero, and results below the normal range become a
  signed zero (flush to zero);
- every NaN result is the quiet NaN `0x7FC00000`;
- overflow gives infinity.

Each unit has one register stage.

Floating-point addition is not associative, so the order of the sum is part of
the result. The adder tree pairs operands `2k` and `2k+1` at every level, where
the products are indexed `n = i*W + j`. An odd operand at the end of a level
passes through a register. For `W = 9` that is 81 operands, 80 adders and 7
levels. A software reference that sums the products in a plain loop differs in
the last bits. The testbenches use the same pairwise order and match bit for
bit.

## Flow control and timing

The pipeline behind the line buffer (the multiplier stage, then the tree levels)
moves as one:

    adv   = !m_valid || m_ready            // advance the arithmetic pipeline
    shift = adv && (input word available in ST_IMAGE, or ST_FLUSH)

If the outbound FIFO is full, the whole accelerator stops, and in time the
inbound FIFO fills up and pushes back on the host. If the inbound FIFO runs
dry, only the line buffer waits: the window in flight finishes and bubbles
follow it. Assertions check two handshake rules: an output held under
back-pressure does not disappear, and a FIFO is never written when full or read
when empty.

Latency and throughput with no stalls, measured at the core:

- The output for the window completed by input shift `k` leaves
  `1 + 1 + ceil(log2(W*W))` cycles later (line buffer register, multiplier
  stage, tree levels). For `W = 9` that is 9 cycles.
- One convolution takes `W*W + I*I + h*I + h + 1 + 1 + ceil(log2 W*W)` cycles
  from the first coefficient to the last result. At the defaults that is 264,286
  cycles, and the full-size testbench measures exactly this.
- One element per cycle, whatever W is. A larger W only adds line-buffer rows
  and tree depth, so it adds latency but costs no throughput.

## Running smaller windows on a larger build

Because positions outside the image are ignored, a `w x w` convolution (odd
`w < W`) can run on a `W x W` build. Send its coefficients centred in a `W x W`
block, with a ring of zeros around them. The results are the `w x w`
convolution except for summation order, which can change the last bit. The
default 9 x 9, 512 x 512 build thus serves all four layer types (3, 5, 7, 9) of
a CNN whose layers keep the image at 512 x 512. This removes the
one-accelerator-per-application restriction, at the cost of the full 9 x 9
multiplier count. The image side, however, is fixed per build: a 512 build
accepts only 512 x 512 images.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `stencil_accel_top`, `stencil_core`, `stencil_window`, `stencil_ctrl` | `I` | 512 | image side (elements) |
| same | `W` | 9 | window side, odd, `I >= W + 2` |
| `stencil_accel_top` | `FIFO_DEPTH` | 512 | words per stream FIFO, power of two |
| `stream_fifo` | `FWFT` | 0 | 1: head word always on `dout`; 0: `dout` the cycle after `rd_en` |

At the defaults a generic (technology-independent) coarse synthesis of
`stencil_accel_top` gives about 13,000 word-level cells. It has 10,755
flip-flop bits: window taps, coefficients and pipeline registers. It has
161,280 memory bits: 128,512 in the line buffer and 32,768 in the two FIFOs.

The sizes the accelerator was evaluated at are I = 32 to 2048 (powers of two)
and W = 3, 5, 7, 9. Any of them is a parameter change. At I = 2048 the line
buffer grows to 64 KB.

## Modules

| file | role |
|---|---|
| `stencil_pkg.sv` | `fp32_t`, field struct, phase enum, tree-size functions |
| `stencil_accel_top.sv` | inbound FIFO, core, outbound FIFO; ports face the host-link IP core |
| `stream_fifo.sv` | synchronous FIFO, `wr_en/din/full` and `rd_en/dout/empty` |
| `stencil_core.sv` | line buffer + coefficients + multipliers + adder tree + controller |
| `stencil_ctrl.sv` | phases, counters, border masks, valid pipeline, stall |
| `stencil_window.sv` | W rows of tap registers and row delays |
| `row_shift_reg.sv` | one row delay (circular buffer) |
| `stencil_coeffs.sv` | W*W coefficient register chain |
| `stencil_mul_array.sv` | W*W masked multipliers |
| `fp32_add_tree.sv` | pipelined W*W-operand adder tree |
| `fp32_mul.sv`, `fp32_add.sv` | binary32 units |

Top-level ports of `stencil_accel_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous active-high reset |
| `in_wr_en`, `in_din`, `in_full` | in/in/out | 1/32/1 | inbound stream |
| `out_rd_en`, `out_dout`, `out_empty` | in/out/out | 1/32/1 | outbound stream (data the cycle after `out_rd_en`) |
| `phase` | out | 2 | controller phase |
| `image_done` | out | 1 | last result of an image entered the outbound FIFO |

## Outside this RTL

The host link is not part of this RTL: the streaming IP core, the SoC bus and
the processor with its device-file driver. The top's FIFO ports are where that
core connects. On the host, a zero-length write after the coefficients and the
image asks that core to pass on what it has buffered, so the last words of a burst do
not wait in host buffers.

## Simulating

The testbenches are in `tb/`. They print `TB_RESULT checks=N failures=M` and
`$finish`. Each one compares against reference binary32 arithmetic that is
computed in double precision and rounded once (`tb/fp32_ref_pkg.sv`). With
plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/stencil_pkg.sv tb/fp32_ref_pkg.sv tb/tb_stencil_accel_top.sv \
        --top-module tb_stencil_accel_top -o sim
    ./obj_dir/sim

| testbench | what it shows |
|---|---|
| `tb_fp32_mul`, `tb_fp32_add` | 40-60 k random and special-case operations, bit-exact |
| `tb_fp32_add_tree` | 81- and 9-operand trees, one vector per enabled cycle, exact latency |
| `tb_row_shift_reg`, `tb_stencil_window` | delays and window geometry with random gaps |
| `tb_stencil_coeffs`, `tb_stencil_mul_array` | coefficient order; masking |
| `tb_stencil_ctrl` | shift counts per phase, every border mask, last-output flag, stall hold |
| `tb_stencil_core` | full convolutions at 3x3/8x8, 5x5/12x12 (random stalls) and 9x9/16x16, with cycle-exact first/last output |
| `tb_stream_fifo` | both read modes against a queue model |
| `tb_stencil_accel_top` | four back-to-back convolutions at 5x5/16x16: embedded 3x3 window, host starving the input, host not reading (outbound full, then inbound full); counts each mechanism |
| `tb_cnn_workloads` | the trial-CNN layer types: 7x7/256, 5x5/128, 3x3/64 and 9x9/32 builds, and 7x7, 5x5, 3x3 windows embedded in the default 9x9/512 build; every output checked, one element per cycle (about 3 min) |
| `tb_stencil_accel_full` | one 9x9 convolution of a 512x512 image at default parameters, all 262,144 outputs checked, exact cycle count (about 30 s) |

## How far to trust it, and where it departs

All testbenches pass, and each one fails against a deliberately broken copy of
its module. The convolutions are bit-exact against an independent reference
that uses the same summation order.

The following are this design's own choices, not part of the original
description:

- the border policy and padding phase;
- the coefficient order on the stream;
- rounding and flush-to-zero;
- the pairing order in the adder tree;
- one register per arithmetic unit;
- FIFO depth and read modes;
- reset behaviour;
- the `phase` and `image_done` status outputs.

The original drawing labels the long shift register of each row `I - W + 1`.
Here it is `I - W`, which makes the total delay per row exactly `I` with `W`
taps per row, as a square window requires.

Not verified:

- the rounding of sums and products that land in the subnormal range, beyond the
  flush-to-zero convention shared with the reference;
- timing closure or resource use on an actual FPGA. Eighty-one binary32
  multipliers may need more DSP slices than a small device has; the
  multipliers then fall back to fabric logic.
