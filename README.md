# XD-GRASP reconstruction kernels for an FPGA

XD-GRASP reconstructs free-breathing MRI as a series of images, one per respiratory
phase. It minimises

    || F C d - m ||_2^2  +  lambda || S d ||_1

over the image series `d`. Here `F` is the non-uniform FFT (NUFFT), `C` holds the coil
sensitivities, `m` the measured radial k-space data, and `S` the total variation along the
respiratory-phase dimension. A non-linear conjugate gradient with a backtracking line
search does the minimisation.

The NUFFT takes most of the time. In this system it runs on a CPU or GPU, and an FPGA takes
everything else in the loop: weighting, coil combination, the total-variation terms, the
gradient, the line-search cost and the vector updates. The FPGA work is split into seven
streaming kernels. Each kernel merges as many neighbouring steps of the algorithm as can
share one pass over the data, so that it finishes while the host computes the next NUFFT.
This repository holds those kernels in synthesizable SystemVerilog, a top level that
places them side by side, and self-checking testbenches.

Main configuration: 320 x 320 images, 8 respiratory phases, 8 receiver coils, IEEE single
precision, a 200 MHz clock.

## Data format and arithmetic (`rtl/xdg_pkg.sv`)

Every value is IEEE-754 single precision (`fp32_t`). A complex sample is a packed
`cplx_t {re, im}` of 64 bits. The package provides the operators as combinational functions:

- `fp_add`, `fp_sub`, `fp_mul`, `fp_div`, `fp_sqrt`
- the complex helpers `c_add`, `c_sub`, `c_mul`, `c_conj`, `c_scale` (complex times real) and `c_abs2` (|z|²)

Rounding is to nearest even. Subnormal numbers are flushed to zero. Overflow gives
infinity. NaN is never produced: the square root of a negative number returns 0. The
operators were checked bit for bit against a double-precision reference rounded to single
precision, on 200,000 random operands each.

`real_to_fp32` turns an elaboration-time `real` into a single-precision constant. The coil
combination uses it for its scale factor.

## The kernels

Every kernel takes `PFACTOR` elements per clock on `PFACTOR` replicated lanes. Only the
coil combination has a single lane. A stream is a `*_valid` flag plus data, and
`in_last`/`out_last` mark the final beat of an invocation. Kernels have no backpressure:
they accept one beat per clock for as long as the source keeps `valid` high. Reduction
results come 2 clocks after the last beat, and the accumulator then clears itself for the
next call.

| kernel | computes | latency |
|---|---|---|
| `multiplication_kernel` | `out = kdatau * wu` (input of the type 1 NUFFT) | 1 |
| `post_nufft_type2_kernel` | `out = (x*wu - kdatau) * wu` | 2 |
| `objective_kernel` | `out = Σ abs(x*wu - kdatau)²` (line-search cost) | 2 after last |
| `update_kernel` | `out = a*sa + b*sb`; `Σ out*conj(a)` | 1; 2 after last |
| `grad_kernel` | `res = l2grad + w_tv * v`; `Σ abs(res)²` | 1; 2 after last |
| `transposed_multiplication_kernel` | `out = xᵀ * b1`; `Σ sqrt(abs(xnext-x)² + ε)` | see below |
| `combine_across_coils_kernel` | `out = C * Σ_c abs(b1)² / Σ_c xᵀ*b1` | see below |

Notes on the table:

- `kdatau` is the measured data sorted by phase. `wu` is the real density-compensation weight.
- `x` is the NUFFT output or the current image, depending on the kernel.
- `ε` is the smoothing constant `l1smooth`.

The gradient kernel works with the temporal-variation term
`f(d) = d / sqrt(abs(d)² + l1smooth)`, where `v1 = f(x - xprev)` and `v2 = f(xnext - x)`.
Then:

- the first phase (`r = 0`) uses `v = -v2`
- the last phase (`r = NTRES-1`) uses `v = v1`
- every other phase uses `v = v1 - v2`

The input from the missing neighbour of a boundary phase is ignored.

## On-chip transposes

The two kernels with memories are the subtle part of the design. Both run an invocation
in two phases, LOAD and EMIT. Which phase comes next depends only on how many beats have
arrived. The `loading` output shows the current phase, and an assertion flags a beat sent
in the wrong phase.

**Coil combination.** The type 1 NUFFT delivers one image per coil, one coil after
another. The combination needs all coils of one pixel at the same moment. LOAD writes the
`NC x NPX x NPY` samples into `NC` separate memories, one per coil. EMIT then receives, in
each beat, the `NC` coil sensitivities of one pixel, and reads all `NC` memories at that
pixel in parallel. `C` is `nx*pi/nline`, or half that when `halve` is set. The quotient is
computed as `k * conj(den)` with `k = C*num/abs(den)²`, so one divider serves both parts.
The result appears 2 clocks after each `b1` beat. At the defaults the memories hold 6.55 MB.

**Transposed multiplication.** LOAD receives one image (`x`) and the next phase's image
(`xnext`) in row-major order. It stores `x` and accumulates the temporal-variation sum.
That sum is forced to `sqrt(l1smooth)` per pixel for the last phase, and is ready 2 clocks
after the last LOAD beat. EMIT receives the sensitivities of the selected coil. It reads
`x` column by column, so output `o` is `x[o mod NPY][o div NPY] * b1[o]`, 2 clocks after
its beat.

To move `PFACTOR` pixels per clock in both directions, the buffer is split into
`PFACTOR` banks by `row mod PFACTOR`. Each word of a bank holds `PFACTOR` neighbouring
pixels of one row. A row-major beat then writes one word of one bank. A column-major beat
needs `PFACTOR` consecutive rows of one column, and finds them at the same word address
in every bank, choosing the element `col mod PFACTOR`. Both directions use each bank once
per clock. `NPX` and `NPY` must be multiples of `PFACTOR`.

## Top level and input alignment (`xdgrasp_dfe`)

The host invokes the kernels one at a time, so the top level keeps each kernel's streams
separate and brings them all out as ports. The kernels share only the scalars `r`,
`l1smooth`, `tv_weight`, `scale_a`, `scale_b` and `halve`.

The datasets that never change (`kdatau`, `wu`, `b1`) live in on-board DRAM. Data that
changes per call comes over PCIe from the host. The objective and post-NUFFT kernels mix
the two sources in one pass. Each of their two input streams enters a `stream_fifo`
(16 entries by default), and the kernel takes a beat only when both queues hold one. The
`*_x_full` and `*_m_full` outputs tell each source to pause. `*_stall` is high while
exactly one queue is empty. The DRAM controller, the PCIe link, the host program and the
NUFFT are outside the RTL.

## Choices where the description was open or inconsistent

- **Coil combination formula.** It is implemented as specified:
  `C * Σabs(b1)² / Σ(xᵀ*b1)`. The textbook adjoint coil combination is
  `Σ x*conj(b1) / Σabs(b1)²`. If that is what you need, change the two sums and the
  quotient in `combine_across_coils_kernel`.
- **TV gradient.** `l1smooth` sits inside the square root, as in the TV term of the
  transposed multiplication. The gradient was also given in a form with it outside.
- **Phase numbering.** Phases are numbered from 0. The last phase is `NTRES-1`.
- **`wu` and the scales.** `wu` is real. The update scales are real and its dot product is complex.
- **No coil-index port on the transposed multiplication.** The host picks the coil by
  where the `b1` stream starts in DRAM.
- **Transpose buffer of the transposed multiplication.** It holds one image, 0.82 MB at
  the defaults. The original kernel was quoted at about 6.55 MB, the size of all coils,
  without a breakdown. Lanes share the buffer through row banking (above). The original
  tool instead copied the memory once per extra read port.
- **No double buffering.** Each buffer kernel finishes EMIT before the next LOAD, so the
  next image cannot load while the current one is being read. The streams from the host
  and from DRAM arrive at the same time anyway, so double buffering would not pay for
  itself here.
- **`nx` and `nline`.** They set only the constant `C`. They were not specified for the
  320 x 320 data, so the defaults are `NX = 640` and `NLINE = 40`.
- **`PFACTOR`.** It defaults to 1 everywhere. The replication factors of the built
  system were not specified. The testbenches run with 2.
- **Arithmetic and pipelining.** The register placement, the reduction order (lanes
  first, then beats) and the flush-to-zero arithmetic are this design's own choices.
- **Hardware use.** The combinational single-precision operators are written for
  clarity, not to meet 200 MHz. A production build would pipeline them or replace them
  with vendor floating-point cores. The DSP counts of the original kernels (for example
  19 x pFactor + 1 for the transposed multiplication) are not reproduced.

## Sizes

| parameter | default | meaning |
|---|---|---|
| `NPX`, `NPY` | 320, 320 | image size |
| `NTRES` | 8 | respiratory phases |
| `NC` | 8 | receiver coils (follows from the 6.5536 MB coil buffer) |
| `NX`, `NLINE` | 640, 40 | samples per spoke and spokes per phase; only used in `C` |
| `P_*` / `PFACTOR` | 1 | lanes per kernel |
| `FIFO_DEPTH` | 16 | alignment queue depth |

The buffer kernels are built for one exact image size. A 256 x 256 data set needs
`NPX = NPY = 256`. A 3-D volume is reconstructed one slice after another on the same
hardware.

## Simulation

All testbenches are self-checking and print `TB_RESULT checks=N failures=M`. Their
references are computed in double precision from the values fed in.

- Element-wise results must agree to about 1e-5 of the size of their terms.
- Sums over `n` terms get an extra `n * 6e-8` of relative tolerance. That is the error
  bound of a sequential single-precision sum, and it matters at full size.
- The testbenches also check latencies, `last` flags and phase switches.

| testbench | what it covers |
|---|---|
| `tb_<kernel>` | one kernel with 2 lanes and small images |
| `tb_stream_fifo` | the queue against a reference model |
| `tb_xdgrasp_dfe` | the whole top at 8 x 4 pixels, 4 phases, 2 coils, 2 lanes |
| `tb_xdgrasp_dfe_full` | the whole top at its defaults (about 40 s) |

The two top-level testbenches share `tb/tb_xdgrasp_dfe_body.svh`. It runs one pass of the
FPGA side of a gradient iteration:

1. multiplication
2. objective and post-NUFFT, with each stream in turn arriving late
3. coil combination
4. gradient for the first, a middle and the last phase
5. update
6. transposed multiplication for a middle and the last phase
7. coil combination with `halve` set

Each stage's RTL output feeds the next stage. The testbench counts the queue stalls, full
queues, both `halve` settings, the three gradient cases, the last-phase TV rule and the
LOAD/EMIT switches, and fails if any of them never happened.

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Itb -y rtl -y tb \
        rtl/xdg_pkg.sv tb/tb_fp_pkg.sv tb/tb_xdgrasp_dfe.sv --top-module tb_xdgrasp_dfe
    ./obj_dir/Vtb_xdgrasp_dfe

Swap in another testbench name for the last file and the top module.
