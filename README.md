# Polyphase bit-serial convolver

This convolver computes

    Y_k = sum_{i=0}^{N-1} W_i * X_{k-N+1+i}

on a stream of samples that arrive **bit-serially, back to back, on a
single wire**. Each weight is held in parallel form, and each output word
leaves bit-serially.

The difficulty is bandwidth. A sample takes `n_x` clock cycles, but one
result `Y_k` is `n_y = n_x + n_w + n'` bits long, with `n' = ceil(log2 N)`
headroom bits for the accumulation. A single serial output would fall behind
the input. The design therefore has several output ports, called **phases**:

    P = ceil(n_y / n_tx)        n_tx = n_x + n_px  (sampling period)

Phase `r` emits every `Y_k` with `k mod P = r`. So each phase has `P * n_tx`
cycles for each word. Between words there are `n_pym = P*n_tx - n_y` idle
bits. This phase count is the smallest any serial-in, serial-out convolver
can have, because the input delivers `n_tx` bits per sample and the outputs
must carry `n_y` bits per sample.

With the default sizes (`n_x = 2`, `n_w = 4`, `N = 9`, `n_px = 0`) you get
`n' = 4`, `n_y = 10` and `P = 5` phases. There are no idle bits, and a new
2-bit sample arrives every 2 cycles.

## Structure

```
x_in ──► sample_distributor ──► X-bus (P lines: bit, active, LSB strobe; word clock)
                                   │
weight_regs (W_0..W_{N-1}) ────────┤
                                   ▼
             shared_phase r=0 ─► const_adder ─► y[0], y_start[0]
             shared_phase r=1 ─► const_adder ─► y[1], y_start[1]
             ...                                 (P phases)
shared_phase = chain of phase_sector (n_tx stages each), optional buffer_slice
phase_sector = n_tx × mult_stage (gates → OR → full adder, sum FF, carry FF)
```

| file | role |
|---|---|
| `rtl/pc_pkg.sv` | sizing functions: `n'`, `n_y`, `P`, `n_pym`, overlap count, output constant |
| `rtl/polyphase_convolver.sv` | top level |
| `rtl/sample_distributor.sv` | deals sample `k` onto bus line `k mod P` |
| `rtl/weight_regs.sv` | static weight registers with a write port |
| `rtl/shared_phase.sv` | one phase: a continuous full-adder array |
| `rtl/phase_sector.sv` | `n_tx`-stage sector of a phase; rotates the bus by one line |
| `rtl/mult_stage.sv` | one bit-slice: gates, OR, full adder, two flip-flops |
| `rtl/buffer_slice.sv` | flip-flop-only slice for re-timing long arrays |
| `rtl/convolver_sector.sv` | the same sector of all phases, with row-to-row permutation |
| `rtl/sector_array.sv` | all phases as one chain of convolver sectors (`SLICED = 1`) |
| `rtl/const_adder.sv` | serial adder for the two's-complement correction constant |

## How a phase works

This is the core of the design, and the part that needs the most care to follow.

**One array, many multiplications.** A phase is a row of
`L = (N-1)*n_tx + n_w` stages. Each stage has one full adder, a sum
flip-flop and a carry flip-flop. The sum flip-flops form a shift path.
Partial results ("partial convolved words") are born as zero at the left
end and move right one stage per clock, least significant bit first. Within
one phase, words are spaced `P*n_tx` bits apart, which is at least `n_y`.
The carry flip-flop of a stage returns its carry to the same stage one cycle
later. By then the next more significant bit of the same word has arrived
there. So every stage is a bit-serial adder.

**Where the weights sit.** The bits of weight `W_i` occupy `n_w` consecutive
stages. The most significant bit is on the left, and bit 0 is at stage
`i*n_tx + n_w - 1`. A word destined to become `Y_k` is born when sample
`X_{k-N+1}` starts. It then reaches the bit-0 stage of `W_i` exactly when
sample `X_{k-N+1+i}` starts arriving on the bus. From then on, each sample
bit `x_j` ANDed with weight bit `w_b` lands at bit position `b + j` of that
word. This is the classic serial-parallel multiplier, laid out so that all
`N` products of one result accumulate in passing.

**Which sample each weight sees.** Other words of the same phase also pass
`W_i`, but at other times. `W_i` must only see the samples meant for words of
this phase. In phase `R`, the gates of `W_i` read bus line
`(R + i - N + 1) mod P`; every other line is invisible to them.

**Sharing.** When `n_w > n_tx`, the gate arrays of neighbouring weights
overlap. In that case a stage holds bits of up to `K = ceil(n_w / n_tx)`
weights. Those weights listen to different bus lines, and only one line
carries a sample at any time. So a plain OR of their gate outputs feeds the
stage's single full adder. This is what makes the array "shared": it has
`(N-1)*n_tx + n_w` stages instead of `N*n_w`.

**Headroom.** Because carries stay inside each stage, the top `n'` bits of a
word absorb the overflows of the `N` additions. The word never spills into
its neighbour.

**Output timing.** The last stage holds bit 0 of `W_{N-1}`. So the least
significant bit of `Y_k` is final in the very cycle that bit 0 of `X_k`
reaches the array. After that, the remaining bits follow one per cycle.

**Sectors and bus rotation.** A phase is cut into sectors `n_tx` stages wide.
Sector `S` holds the bits of `W_S, W_{S-1}, ..., W_{S-K+1}`. Weights whose
index falls outside `0..N-1` are absent: the first and last few sectors are
partly empty.

Each sector reads the bus in local numbering: slot `d` always uses local line
`-d mod P`. At its right edge the sector rotates the bus by one line. The
phase index only decides where the bus enters sector 0. As a result, every
sector of every phase is the same module.

**Buffer slices.** With `BUF_EVERY = m > 0`, a `buffer_slice` follows every
`m`-th sector. It delays the partial sum, all bus lines and the word clock by
one cycle together. The arithmetic is unchanged, and the phase gains one
cycle of latency per buffer. Such slices are meant for long arrays split
across chips. The default is `0` (no buffers), because the interval is a
free choice.

## Convolver sectors instead of phase units (`SLICED = 1`)

The same computation can be cut the other way: into **convolver sectors**.
Each convolver sector holds the same `n_tx` stages of all `P` phases, one
phase per row (`convolver_sector`). A chain of these sectors
(`sector_array`) replaces the `P` separate phases.

In this arrangement the bus is not rotated. Row `rho` always reads lines
`rho, rho-1, ..., rho-K+1`, so each row needs only `K` sample lines.
Instead, the partial sums move up one row at every sector interface.
Phase `R` therefore occupies row `(R + S - N + 1) mod P` in sector `S`,
tracing a helix through the rows. Every sector, and every weight and bus
connection, is identical along the chain. The outputs are reordered, so
`y[r]` is still phase `r`.

The results and their timing are bit-for-bit the same as with phase units.
Buffer slices are only offered with phase units.

## Two's-complement operation (`SIGNED = 1`)

Each product is computed as an array of non-negative terms. A gate output is
inverted when its term contains exactly one sign bit. That is the case when:

- the word clock is high (the sample's sign bit is on the bus) and the
  weight bit is not the weight's sign bit, or
- the word clock is low and the weight bit is the weight's sign bit.

Idle lines keep their gates at 0 in both modes.

What remains is the constant of every product:

    C_1 = -2^(n_x+n_w-1) + 2^(n_x-1) + 2^(n_w-1)

`const_adder` adds `C_N = N*C_1` (mod `2^n_y`) once per output word. The
output is then an `n_y`-bit two's-complement number. In unsigned mode the
constant is 0, and the adder only adds one cycle of delay.

Note the exponent `n_x+n_w-1` in the first term. It follows from the
complementing rule; for example, `n_x = n_w = 2` and `X = W = -2` give an
array sum of 8 for a product of 4, so `C_1 = -4`. Some statements of this
method give `-2^(n_x+n_w-2)` instead, which is wrong for this array.

## Interface and timing (`polyphase_convolver`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | bit clock; asynchronous active-low reset that clears every flip-flop |
| `x_in` | in | 1 | samples, LSB first, `n_x` data bits then `n_px` ignored bits |
| `x_start` | in | 1 | high on bit 0 of the first sample; may repeat on later bit-0 cycles (an assertion checks the alignment) |
| `w_we`, `w_addr`, `w_wdata` | in | 1, `clog2 N`, `n_w` | weight write port |
| `y[r]` | out | `P` | serial output of phase `r`, LSB first |
| `y_start[r]` | out | `P` | high on the LSB of each word of phase `r` |

Operating rules:

- **Continuous input.** After the first `x_start`, one sample is taken every
  `n_tx` cycles without interruption. The arrays move at a fixed pace and
  cannot pause.
- **Static weights.** Load the weights before streaming and leave them
  unchanged while samples flow.
- **Latency.** Bit 0 of `Y_k` is on `y` three cycles after bit 0 of `X_k`
  was on `x_in`. The three cycles are the distributor register, the last
  array stage and the constant adder. `E` trailing stages and every buffer
  slice each add one cycle, where `E = ceil(L/n_tx)*n_tx - L` (zero when
  `n_tx` divides `n_w`).
- **Start-up.** Phase `r` emits its first word `Y_r` one sample period after
  sample `r`. Words for `k < N-1` contain only the samples received so far:
  correct zero-padded values in unsigned mode, not meaningful in signed
  mode.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NX` | 2 | sample length `n_x` |
| `NW` | 4 | weight length `n_w` |
| `NPX` | 0 | idle bits between samples `n_px` |
| `N` | 9 | number of taps |
| `NP` | `ceil(log2 N)` | headroom `n'`; may be set larger |
| `SIGNED` | 0 | two's-complement samples, weights and outputs |
| `BUF_EVERY` | 0 | a buffer slice after every `BUF_EVERY` sectors (0 = none) |
| `SLICED` | 0 | 0: phases as units; 1: chain of convolver sectors |

`P`, `n_y` and the output constant are derived. `n_y` must not exceed 63.

Any `n_px` works. For example, `n_x = 5`, `n_w = 15` and `n' = 10` give
`P = 6, 5, 4, 3, 2, 2, 1` for `n_px = 0, 1, 3, 5, 10, 24, 25`. The idle bits
between output words are `n_pym = 0, 0, 2, 0, 0, 28, 0`. So a larger sample
separation trades sampling rate for fewer phases. With `n_px >= n_w + n'`
there is a single phase: the plain one-output systolic convolver, in which
each sample is followed by enough idle bits for a whole result.

Cost is roughly proportional to `P`. Each phase has `(N-1)*n_tx + n_w` full
adders and twice as many flip-flops.

## Where this design makes its own choices

Taken from the method as described:

- the number of phases
- the shared-adder phase array, its length and its weight spacing
- the OR-ed overlapping gates
- the cyclic permutation of the bus at sector edges
- the alternative chain of convolver sectors with phase permutation
- flip-flop-only buffer slices
- the sign-bit term complementing, with one constant added at the output

This design's own:

- **Distributor.** A free-running bit counter and line counter, started by
  `x_start`.
- **Per-line active flag.** Needed so that complemented terms stay zero on
  idle lines.
- **Word strobes.** `y_start` comes from the distributor's LSB strobe,
  delayed to the array output.
- **Weight loading.** A write port, with reset to zero.
- **Sector width.** Sectors are `n_tx` wide rather than `n_x`, so that
  `n_px > 0` uses the same modules.
- **Single sector module.** The weight-bit placement is computed from the
  parameters. One module therefore also covers `n_w` not a multiple of `n_x`,
  with no second slice type.
- **Trailing stages.** When `n_tx` does not divide `L`, the last sector is
  padded with `E` plain delay stages.

Not built:

- the canonical scheme with `N` phases of separate multipliers
- the intermediate scheme with separate multipliers merged into sub-phases
- reconfiguration and faulty-slice bypass through a configuration register,
  which is described only in outline
- converters from the serial outputs to other formats

## Verification

Each module has a self-checking testbench in `tb/`. They compare against
values computed independently in the testbench.

| testbench | what it checks |
|---|---|
| `tb_mult_stage` | random stage inputs against an arithmetic model, including the complement rule |
| `tb_phase_sector` | a one-weight sector as a complete serial-parallel multiplier, and a sector with two overlapping weights |
| `tb_sample_distributor` | bus contents cycle by cycle |
| `tb_weight_regs`, `tb_buffer_slice`, `tb_const_adder` | the support blocks |
| `tb_shared_phase` | one phase driven by a bus model: values and exact latency |
| `tb_convolver_sector` | a three-row sector: each row reads only its line, and results leave one row up |
| `tb_sector_array` | all five default phases built from convolver sectors, driven by a bus model: values and exact latency |
| `tb_polyphase_convolver` | six configurations side by side, listed below |
| `tb_full_size` | the convolver with no parameter overrides, 200 samples |
| `tb_workloads` | the `n_x = 5`, `n_w = 15`, `n' = 10` family for seven sample separations (with `N = 12`), and an `n_w = 2n_x`, `n' = n_x`, 4-phase case built as convolver sectors |

The six configurations in `tb_polyphase_convolver` are:

- the defaults
- two's complement
- non-zero sample separation with random idle bits
- buffer slices
- `n_w` not a multiple of `n_x`
- weights shorter than samples
- three of these again with `SLICED = 1`

In `tb_polyphase_convolver`, `tb_full_size` and `tb_workloads`, every output
word is compared with a reference convolution, and its start cycle is checked
against the latency formula. These three testbenches also count that every
phase produced words and that results used the headroom bits. They also
check that negative results and ignored idle bits occurred where the
configuration has them.

`tb_workloads` uses only small `N`. Very long arrays, such as `N` in the
hundreds, were not simulated. One attempt to build a simulation with
`n_x = 5`, `n_w = 15` and `N = 1024` (6 phases of about 5,100 stages each)
did not finish within 20 minutes. Each sector index is a distinct parameter
set, so Verilator elaborates over a thousand sector variants.

To run one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pc_pkg.sv \
    tb/tb_polyphase_convolver.sv --top-module tb_polyphase_convolver
./obj_dir/Vtb_polyphase_convolver
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`.
