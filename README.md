# Folded multichannel FxLMS engine for active noise control

Multichannel active noise control drives J loudspeakers ("secondary sources")
from J reference microphones so that the noise measured at M error microphones
cancels. The usual adaptation rule, the multichannel filtered-x LMS (FxLMS)
algorithm, costs about 2(M+1)·L multiply-adds per reference channel per
sample, with L-tap control filters and L-tap secondary-path models. For a
4 × 4 × 4 system with L = 200 at 24 kHz that is about 192 million multiply-adds
a second. That is too much for a small DSP. On an FPGA, one multiplier per
operation would use far too many DSP slices.

This RTL implements the *multiple parallel branch with folding* architecture
for that problem:

* **Parallel branches.** The system is split into J identical branches, one
  per reference/loudspeaker pair. Branch j owns control filter w_j, its weight
  update and the M secondary-path models ŝ_1j … ŝ_Mj it needs. All branches
  run at the same time and share only the error samples e_m(n) and the step
  size μ.
* **Folding.** Inside a branch, every multiply and every add of one sample
  runs on a single floating-point multiplier-adder, one operation per clock
  tick. A tap takes S = 2(M+1) ticks, so a sample takes S·L ticks. The whole
  engine therefore has only J arithmetic units. At the default 4 × 4 × 4,
  L = 200 size, that is 4 units and 2000 ticks per sample, or 24.99 kHz at a
  50 MHz clock.

All arithmetic is IEEE-754 single precision.

## What one sample computes

For branch j and sample n, with reference x_j(n) and errors e_1(n) … e_M(n):

```
filtered reference (secondary-path model, transposed FIR):
    x''_m(l) = ŝ_mj(l)·x_j(n) + x''_m(l+1)      l = L-1 … 0,  x''_m(L) = 0
    x'_jm(n) = x''_m(0)
control filter output (old weights):
    y_j(n)   = Σ_l w_jl(n)·x_j(n-l)
weight update:
    w_jl(n+1) = w_jl(n) + μ·Σ_m e_m(n)·x'_jm(n-l)
```

Here e = d − S·y: the primary noise d at a microphone minus what the
loudspeakers add to it. The update is the plain FxLMS rule. Nothing is
delayed or block-processed to suit the hardware, so folding does not change
the algorithm's behaviour.

The secondary-path filter is in **transposed form**. Each x''_m(l) is a
running partial sum that lives in memory from one sample to the next. Tap l
of sample n reads x''_m(l+1), which tap l+1 wrote during sample n−1. It then
overwrites x''_m(l) with the new partial sum. Taps are processed in
ascending order, so every value is read before it is overwritten. Tap 0
produces the new filtered reference x'_jm(n) = x''_m(0) before the weight
update of tap 0 needs it.

## The folding schedule

`fold_sched` counts ticks t = 0 … S−1 within a tap and taps l = 0 … L−1 within
a sample. Global tick T = S·l + t. Every branch receives the same tick and
performs the same kind of operation on its own data. The arithmetic unit
always computes `r = c·d + b`:

| tick t in tap l | operation | mux c (×) | mux d (×) | mux b (+) | result goes to |
|---|---|---|---|---|---|
| 0 … M−1 (m = t) | secondary path | ŝ_mj(l) | x_j(n) | x''_m(l+1), or 0 at l = L−1 | x''_m(l); at l = 0 also x'_jm(n) |
| M … 2M−1 (m = t−M) | gradient | e_m(n) | x'_jm(n−l) | 0 for m = 0, else previous result | gradient register |
| 2M | weight update | μ | gradient | w_jl | w_jl |
| 2M+1 | control filter | old w_jl | x_j(n−l) | 0 at l = 0, else running y | running y; at l = L−1 the output y_j(n) |

These rows match the timing tables of the original architecture where those
tables name an input: ŝ at S·l … S·l+M−1, e at S·l+M … S·l+2M−1, μ at
S·l+2M, and y_j(n) leaving at tick S(L−1)+2M+1. The rest of the routing comes
from the equations above.

Three details make this order work:

* The gradient is summed over m first and multiplied by μ once per tap. That
  costs M+1 operations. The M secondary-path steps and the one control-filter
  step bring the total to 2(M+1) per tap.
* The control filter must use the weight from *before* the update. The weight
  read for tick 2M is therefore kept in a register (`w_old_q`) and used at
  tick 2M+1.
* Every running sum starts from 0 through mux b: the first gradient term,
  the first control-filter tap, and the last secondary-path tap.

## Branch datapath and storage

`fxlms_branch` is a two-stage pipeline:

* **Issue cycle.** The tick's addresses go to the memories.
* **Execute cycle.** The memory words pass through the multiplexers and
  `fp_mac`. The result is written back to a memory or to one of the
  registers: gradient `acc_q`, running output `yacc_q`, or output `y`.

The delay lines are memories (`delay_ram`, Block-RAM style: synchronous read,
one write port), not chains of flip-flops:

| memory | words | contents | addressing |
|---|---|---|---|
| `u_xref` | L | x_j(n−l) | circular, slot `ptr` holds x_j(n), x_j(n−l) at (ptr−l) mod L |
| `u_w` | L | w_jl | l |
| `u_shat` | M·L | ŝ_mj(l), loaded from outside | m·L + l |
| `u_xpp` | M·L | transposed partial sums x''_m(l) | m·L + l |
| `u_xf` | M·L | filtered reference x'_jm(n−l) | m·L + (ptr−l) mod L |

`ptr` advances once per sample, so nothing is shifted. The RAM is
write-first: if the same address is written and read on one edge, the read
returns the new word. With M = 1, the gradient tick of tap 0 can read x'_j1(n)
on the same edge that writes it, and write-first makes that read correct.

At the defaults each branch holds 2800 words (89,600 bits). The engine holds
358,400 memory bits and about 870 flip-flops.

## Floating-point arithmetic

`fp_mac` is an `fp_mul` followed by an `fp_add`. Both are combinational, and
the product is rounded before the addition (not fused). The number handling
is deliberately simple:

* round to nearest even;
* subnormal inputs are read as zero, and results below the smallest normal
  become a signed zero (flush to zero);
* overflow gives ±infinity;
* any NaN, 0·∞ or ∞−∞ gives the quiet NaN `7FC00000`;
* an exact cancellation gives +0.

Because the arithmetic is deterministic, the testbenches compare every output
bit for bit with a golden model that performs the same operations in the
same order.

The whole multiply-add sits on one combinational path between the execute
registers. For a fast FPGA clock this path would have to be pipelined. That
is not done here.

## Interface and timing (`mcfxlms_top`)

Parameters: `J` (branches = reference channels = loudspeakers, default 4),
`M` (error microphones, default 4), `L` (control-filter and
secondary-path-model taps, default 200). S = 2(M+1) is derived.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `sample_valid` / `sample_ready` | in / out | 1 | sample handshake |
| `x_in[J]`, `e_in[M]`, `mu` | in | 32 each | x_j(n), e_m(n), step size, fp32 |
| `y_out[J]` | out | 32 each | y_j(n), fp32, held until the next result |
| `y_valid` | out | 1 | one-cycle pulse: `y_out` is new |
| `coef_we`, `coef_branch`, `coef_m`, `coef_l`, `coef_data` | in | 1, log2 J, log2 M, log2 L, 32 | write ŝ_mj(l) for j = `coef_branch`, m = `coef_m` |

Sequence:

1. **Reset and clear.** After reset the engine zeroes every memory. This
   takes M·L cycles (800 at the defaults). `sample_ready` stays low, and
   coefficient writes during the clear are ignored.
2. **Load the secondary-path estimates.** Use the coefficient port while the
   engine is idle. Entries you do not write stay zero.
3. **Run samples.** A sample is taken in a cycle with `sample_valid &&
   sample_ready`. x, e and μ are registered then, so they may change
   afterwards.
   * The S·L ticks run in the next S·L cycles.
   * `sample_ready` returns S·L+1 cycles after the accept.
   * `y_valid` pulses S·L+2 cycles after the accept.
   * At most one sample is taken every S·L+1 cycles: 2001 at the defaults,
     which is a 24.99 kHz sampling rate at 50 MHz.

In a real system, e_m(n) is measured at the same instant as x_j(n). So
y_j(n) reaches the loudspeaker after e_m(n) is sampled, and the secondary
path should include at least one sample of delay. The plant model in the
testbenches does this.

## Files

| file | role |
|---|---|
| `rtl/fxlms_pkg.sv` | fp32 type, constants, tick operation enum |
| `rtl/mcfxlms_top.sv` | top: controller, J branches, shared e/μ registers |
| `rtl/fold_sched.sv` | tick counter, schedule decode, handshake, clear, delay-line pointer |
| `rtl/fxlms_branch.sv` | one folded branch: multiplexers, memories, arithmetic unit |
| `rtl/delay_ram.sv` | simple dual-port write-first RAM |
| `rtl/fp_mac.sv`, `rtl/fp_mul.sv`, `rtl/fp_add.sv` | single-precision multiply-add |
| `tb/fp32_ref_pkg.sv` | fp32 reference computed in double precision |
| `tb/fxlms_model_pkg.sv` | golden FxLMS model and acoustic plant model |
| `tb/tb_*.sv`, `tb/tb_mcfxlms_body.svh` | self-checking testbenches |

## Verification

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=F`.

* **`tb_fp_mul`, `tb_fp_add`, `tb_fp_mac`** compare 65,000 random and
  directed cases bit for bit against a double-precision reference rounded
  once to fp32. The cases include cancellation, overflow, underflow and
  special values, plus 5,000 operand pairs with short significands that
  often produce exact rounding ties.
* **`tb_delay_ram`** runs random reads and writes, checks the one-cycle read
  latency, and forces write-first collisions.
* **`tb_fold_sched`** runs at the defaults. It checks the clear, every issued
  tick of 203 samples against the schedule table, the ready and y_valid
  timing, back-to-back samples, stalls and the pointer wrap.
* **`tb_fxlms_branch`** uses M = 3 and L = 7. It checks 28 samples bit for
  bit against the golden model and checks the S·L+2 latency.
  **`tb_fxlms_branch_m1`** repeats this with M = 1, the case that relies on
  the write-first RAM.
* **`tb_mcfxlms_top`** uses J = 2, M = 2 and L = 16, and runs three phases:
  1. Open loop with back-to-back samples and stalls.
  2. Closed loop against a simulated plant with a tone at 1/24 of the
     sampling rate (1 kHz at 24 kHz).
  3. Closed loop with noise band-limited to roughly 400–1500 Hz at 24 kHz.

  All outputs are checked bit for bit. The testbench also counts that every
  mechanism happened and that the noise is reduced: about 17 dB for both
  signals at this size.
* **`tb_mcfxlms_full`** runs the same three phases at the default
  4 × 4 × 4, L = 200 size: 13,210 samples and about 26 million cycles, which
  takes about 30 s. In the closed-loop phases the residual error is
  12.6 dB (tone) and 10.5 dB (band noise) below the uncontrolled noise. The
  plant is a small synthetic model with a perfect secondary-path estimate,
  so these figures show that the controller works. They do not predict
  acoustic performance.

To run one with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/fxlms_pkg.sv tb/fp32_ref_pkg.sv tb/fxlms_model_pkg.sv \
    tb/tb_mcfxlms_full.sv --top-module tb_mcfxlms_full
./obj_dir/Vtb_mcfxlms_full
```

For the other testbenches, change the last file and the top module name. The
fp and RAM testbenches need only `fxlms_pkg.sv` and `fp32_ref_pkg.sv` before
them.

## How closely this follows the original architecture, and what is new here

**Taken from the original architecture:**

* the split into J branches;
* one multiplier and one adder per branch;
* S = 2(M+1) ticks per tap and S·L ticks per sample;
* the transposed secondary-path filter;
* the ticks at which ŝ, e, μ and the output are used;
* single-precision arithmetic;
* delay lines held in block memory;
* the 4 × 4 × 4, L = 200 configuration at 50 MHz.

**Chosen here:**

* the exact routing of operands that the original timing tables leave
  unnamed;
* a set of addressed memories in place of the original chain of fixed
  delays (SD, (S−M)D, …);
* the sample handshake, registering e and μ, the clear after reset, and the
  coefficient port;
* the two-stage issue/execute pipeline and the write-first RAM;
* the floating-point conventions: rounded product then sum, flush to zero;
* the one idle cycle between samples (2001 cycles, not 2000).

**Not included:** the ADC and DAC modules, the anti-aliasing and
reconstruction filters, the FPGA carrier, and the microphones and
loudspeakers. The engine's fp32 ports stand where they would connect. The
original floating-point unit, built from four DSP slices per branch, is replaced by generic RTL, so
resource numbers from a DSP-slice implementation do not carry over.
