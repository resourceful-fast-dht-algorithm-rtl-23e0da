# Split-radix 32-point Hartley transform engine

This is a fully parallel, pipelined engine for the discrete Hartley
transform (DHT) of 32 real samples:

    X(k) = sum_{n=0}^{N-1} x(n) cas(2*pi*n*k/N),   cas(t) = cos(t) + sin(t)

The DHT maps real data to real data and is its own inverse up to a factor
1/N, so one engine computes both the forward and the inverse transform. The
engine takes a whole frame of 32 samples in parallel and returns all 32
coefficients in parallel, in natural order. A new frame can enter every
frame clock.

The design rests on two ideas:

1. **Split-radix decomposition.** An N-point DHT is split into one
   N/2-point DHT and two N/4-point DHTs. The rule is applied recursively:
   32 → 16 + 8 + 8, down to 2-point add/subtract butterflies.
2. **Shared constant multipliers.** Every multiplication is by a fixed
   constant. Products that use the same constant share one multiplier,
   which serves four operands in turn through a multiplexer and a
   demultiplexer. Each constant multiplier is an adder network of shifts,
   or optionally a set of lookup tables.

## The decomposition

Let M = N/4. Define a(n) = x(n) − x(n+N/2) for n = 0..N/2−1, then
A_n = a(n) and B_n = a(n+M). The rule is:

    X(2k)   = DHT_{N/2}[ x(n) + x(n+N/2) ]
    X(4k+1) = DHT_{M}[ f1(n) ],
        f1(n) = (A_n + A_{M-n}) cos(2πn/N)  − (B_n − B_{M-n}) sin(2πn/N)
    X(4k+3) = DHT_{M}[ f3(n) ],
        f3(n) = (A_n − A_{M-n}) cos(2π3n/N) + (B_n + B_{M-n}) sin(2π3n/N)

At n = 0 the sine is 0 and the cosine is 1, so f1(0) = a(0) + a(M) and
f3(0) = a(0) − a(M), with no multiplication. The reversed indices M−n cost
nothing in hardware: they are a permutation of wires. So is the final
interleaving of the three sub-results into X(2k), X(4k+1), X(4k+3).

Why the multipliers can be shared: a level of length N multiplies only by
±cos(2πj/N) for j = 1..M−1. This holds because every sine or cosine of a
multiple of 2π/N reduces to one of these magnitudes. Each magnitude occurs
in exactly four of the 4(M−1) products, two in each odd branch. At N = 32
there are 28 products and 7 constants; at N = 16, 12 products and 3
constants; at N = 8, 4 products and 1 constant; at N = 4, none. With four-way
sharing the whole 32-point engine has **13 constant multipliers**:

- 7 at the top level
- 3 for the 16-point sub-transform
- 1 for each of the three 8-point sub-transforms

A direct implementation needs 52.

## Pipeline and timing

There are two clocks in the sense of the design:

- `clk` is the fast clock that drives the shared multipliers.
- The frame clock is a clock enable (`in_ready`, internally `tick`) that is
  high one cycle in `SHARE`.

`phase_ctrl` counts 0..SHARE−1. With SHARE = 4 its two bits are the
interleaving clocks clk/2 and clk/4 that steer the multiplexers.

Every register of the datapath loads only on the frame tick, so a frame
advances one stage per frame clock. The stages of one level of length N are:

| stage | block | work |
|---|---|---|
| 1 | `dht_addsub` | x(n) ± x(n+N/2) |
| 2 | `sr_preadd` (odd branch) | the four bracketed sums of f1, f3 |
| 3 | `mul_block` (odd branch, N ≥ 8) | products; combining adders after its registers |
| … | `sr_dht` N/2 (even), 2 × `sr_dht` N/4 (odd) | recursive |

Whichever branch is shorter is delayed by `frame_delay` registers, so both
finish in the same frame. The latency in frames is

    L(1) = 0, L(2) = 1,
    L(N) = 1 + max( L(N/2), 1 + [N/4 > 1] + L(N/4) ),

which gives L(32) = 7 (L(4) = 2, L(8) = 4, L(16) = 5). At SHARE = 4 that is
28 fast cycles.

**Inside a shared multiplier** (`shared_const_mul`), the operands are held
in the previous stage's registers for a whole frame. In phase k the
multiplexer gives operand k to the multiplier and the product goes to
staging register k. On the tick, all products are copied to the output bank
at once; the last product comes straight from the multiplier. The output
then stays stable for the next frame. The block therefore adds exactly one
frame of latency, whatever SHARE is.

**Throughput.** The engine takes 32 samples per frame clock. At SHARE = 4
that is 8 samples per fast cycle. With SHARE = 1 the multipliers are
dedicated (52 of them) and the engine takes 32 samples every fast cycle.

## Interface (`dht_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | fast clock |
| `rst_n` | in | 1 | synchronous, active low |
| `in_valid` | in | 1 | a frame is offered |
| `in_ready` | out | 1 | frame tick: `x_in` is taken in this cycle if `in_valid` |
| `x_in` | in | N × DW | samples x(0..N−1), signed |
| `out_valid` | out | 1 | one-cycle strobe in the last cycle of the frame in which `y_out` holds a result |
| `y_out` | out | N × W | X(0..N−1), signed, unscaled |
| `phase` | out | log2(SHARE) | multiplexer phase, for observation |

`y_out` is stable for the whole frame that ends with the `out_valid`
strobe. Frames may be offered back to back, and bubbles (`in_valid` low)
simply produce no strobe. The engine does not stall: there is no
back-pressure.

| parameter | default | meaning |
|---|---|---|
| `N` | 32 | transform length, a power of two ≥ 2 |
| `DW` | 16 | input width |
| `W` | DW + 7 | internal and output width |
| `CW` | 16 | fractional bits of the constants |
| `SHARE` | 4 | operands per multiplier (1 = no sharing) |
| `MUL_STYLE` | 0 | 0 = adder-network multipliers, 1 = lookup tables |

## Number format and accuracy

Values are two's complement integers and no scaling is applied anywhere. The
output is the exact transform plus rounding error.

- **Headroom.** The DHT gain is at most N·√2 < 64, so 6 bits of growth cover
  the outputs. W = DW + 7 adds one more bit for the intermediate values of
  the split-radix branches.
- **Constants.** C_j = cos(2πj/N) is rounded to CW = 16 fractional bits.
  This is computed with `$cos` when the design elaborates, so there is no
  table file.
- **Products.** Each product is rounded half up to an integer.

Measured against a double-precision transform, full-scale 16-bit frames
(random data and the worst-case sign patterns) come out within 5 LSB. The
testbenches allow 12.

## Constant multipliers

`csd_const_mul` (MUL_STYLE 0) recodes the constant into canonical signed
digits (digits −1, 0, 1, no two nonzero digits adjacent) while the design
elaborates. It then adds one shifted copy of the operand per nonzero digit.
Digit pairs 1 0 1 and 1 0 −1 are common in these constants. The two
subexpressions they stand for, 5x and 3x, are built once and reused at every
such pair. Summed over the 11 twiddle constants of the 32-, 16- and 8-point
levels, this brings the adder count from 55 to about 44. Sharing is only within one constant, not
across constants.

`lut_const_mul` (MUL_STYLE 1) stores precomputed partial products. The
operand is cut into LB-bit slices (default 4), and each slice addresses a
2^LB-word table of slice × C. The top slice is signed, so its table holds
signed values. The shifted table outputs are then added. LB = W would be the
single-table form, with 2^W words per multiplier. Both styles give
bit-identical results.

## Where this departs from the design it is based on

- **The U-block architecture is not reproduced.** The reference
  architecture is built from "U" input blocks, "XCH" exchange wiring, MUL
  blocks and a final adder that sums two sections. The arithmetic of the U
  blocks is not available, so this engine implements the split-radix
  equations directly. It computes the same transform with the same kind of
  building blocks: add/subtract layers, exchange wiring, and shared constant
  multipliers. It has no U blocks and no final two-section adder.
- **MUL blocks.** In the reference a MUL block holds four multipliers, with
  16 multipliers in total. Here one `mul_block` per level holds one shared
  multiplier per distinct constant: 7 + 3 + 1 + 1 + 1 = 13.
- **Throughput.** The reference quotes 32 samples per clock. Here that
  holds per frame clock; per fast clock it holds only with SHARE = 1.
- **Chosen here** (not specified by the reference): the widths, the
  rounding, the pipeline stage boundaries, the `in_valid`/`in_ready`/
  `out_valid` handshake, and synchronous reset of every register.
- The transform is the standard DHT defined at the top of this page; the
  type-III variant of the Hartley transform is not implemented.
- The two-dimensional DHT and the Fourier/Hartley conversion formulas are
  background only and are not built.

## Files

- `rtl/dht_pkg.sv`: twiddle index reduction, constant quantisation, latency
  function.
- `rtl/dht_top.sv`: the engine.
- `rtl/sr_dht.sv`: the recursive split-radix core.
- `rtl/dht_addsub.sv`, `rtl/sr_preadd.sv`, `rtl/mul_block.sv`,
  `rtl/frame_delay.sv`: one level's stages.
- `rtl/shared_const_mul.sv`, `rtl/csd_const_mul.sv`,
  `rtl/lut_const_mul.sv`: the multipliers.
- `rtl/phase_ctrl.sv`: phase counter and frame tick.

When linted with `sr_dht` itself as the top module, Verilator reports the
outputs of its self-instances as undriven. Linting through `dht_top`, or
simulating, elaborates the recursion fully.

## Simulation

Every testbench is self-checking and ends with a line
`TB_RESULT checks=<n> failures=<m>`. For example:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/dht_pkg.sv tb/tb_dht_top.sv --top-module tb_dht_top -o sim
    ./obj_dir/sim

| testbench | what it checks |
|---|---|
| `tb_dht_top` | end-to-end, three engines side by side (default, lookup-table multipliers, SHARE = 1). Bubbles, overlapping frames, every multiplexer phase, exact latency in cycles; values against a double-precision DHT. |
| `tb_dht_full` | the engine at its default parameters, 24 frames |
| `tb_dht_inverse` | forward then inverse through the same engine: 12 round trips reproduce the input within 8 LSB |
| `tb_sr_dht` | the core at N = 2, 4, 8, 16 and 32, with different sharing |
| `tb_mul_block` | the twiddle stage at N = 32, 16 and 8 |
| `tb_shared_const_mul` | multiplexing, staging, and the one-frame latency |
| `tb_csd_const_mul`, `tb_lut_const_mul` | bit-exact against 64-bit integer products |
| `tb_dht_addsub`, `tb_sr_preadd`, `tb_phase_ctrl` | the remaining stages and the control |

`dht_checker.sv`, `mul_block_harness.sv` and `sr_dht_harness.sv` in `tb/`
are reusable stimulus and scoreboard modules that the testbenches
instantiate. Each test runs in well under a second.
