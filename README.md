# MBDA: a block-LMS adaptive FIR filter built from distributed arithmetic

This is an adaptive FIR filter for high sample rates. It has no multipliers
and never stores its tap coefficients. Instead it keeps small tables of
*partial products* and adapts the tables directly. It processes the input in
blocks of L samples (block LMS). In each block it computes L outputs and L
errors in parallel, then updates every table entry once, in a pipeline.

At the default size (p = 128 taps, L = 128, M = 64 tables, 16-bit input) one
block of 128 samples takes 35 clocks. One clock is one "selector + adder"
step. With a 15 ns adder and a 7 ns multiplexer (22 ns per clock) that is
about 166 Msamples/s.

## The idea in four steps

**Distributed arithmetic (DA).** Take a B-bit two's-complement fraction
x = -b(0) + sum_{l>0} b(l) 2^-l, where bit 0 is the sign bit. An inner
product of p samples with p coefficients can then be written as

    y = sum_l F(l) * T(a(l)),   F = [-1, 2^-1, ..., 2^-(B-1)]

Here a(l) is the p-bit word made from bit l of each of the p samples (the
*address vector*; the newest sample gives its most significant bit). T(k) is
the sum of the coefficients selected by the 1-bits of k. The output is then
B table look-ups plus a shift-and-add.

**Adapting the table, not the coefficients.** The LMS gradient with respect
to T(a(l)) is F(l)·e, so the filter adds a scaled error to the addressed
entries. It never forms the coefficients.

**Multi-memory blocks.** A single table of 2^p entries is impossible for
p = 128, and it would adapt slowly. So the taps are split into M groups of
R = p/M taps, each with its own 2^R-entry table, called a WAFS ("whole
adaptive function space"). At the default size R = 2, so each table has 4
words. The output adds one look-up from each table.

**Priority update.** In one block, error e_n (n = 0..L-1) addresses B entries
of each table, one per bit phase. Several phases can address the same entry.
The filter then applies only the contribution with the largest scale, which
is the smallest l (|F(l)| = 2^-l, sign bit first). An entry that no phase
addresses gets nothing from that error. For entry k of table m the update is

    T_m(k) += sum_n  F(l*) * 2^-MU_SHIFT * e_n,   l* = min { l : a_{n,m}(l) = k }

Because each entry gets at most one term per error, all L errors of a block
can be summed in one adder tree and written in one clock per entry.

## One block, clock by clock

LM = ceil(log2 M), NL = ceil(log2(L+1)). Clock 0 is the first clock after the
block is taken.

| clock | what happens |
|---|---|
| l = 0 .. B-1 | bit phase l: every output unit selects one word per table (Selector-0) |
| LM + l | the M selected words of phase l, summed by an LM-level pipelined tree, reach the accumulator: acc = 2·acc + S(l), or acc = -S(0) for the sign phase |
| LM + B - 1 | last phase: y = acc >>> (B-1) goes to the output latch |
| LM + B | y valid (`y_valid`); e = d - y is registered |
| LM + B + 1 + k | entry k (k = 0..2^R-1): each error's scaler output for the priority phase is selected (Selector-1) and registered |
| LM + B + 2 + k | entry k is read; its L update values and its old value go through an (L+1)-input tree of NL levels |
| LM + B + 1 + NL + k | the sum is written back into entry k (Selector-2) |

The last write is in clock T - 1, where T = NL + LM + 2^R + B + 1. The next
block is taken at the end of that same clock, so blocks follow each other
every T clocks. The output calculation never reads a table entry that is
still being updated. At the default size T = 8 + 6 + 4 + 16 + 1 = 35, and y
comes 22 clocks after the block is taken.

## Number formats

* `x_in`, `d_in`: B-bit two's-complement fractions (the sign bit has weight -1).
* Table entries, `y_out` and `e_out`: PW = 24 bits with FRAC = 20 fraction
  bits. Table entries saturate, and so do `y` and `e`.
* The step factor 0.5·R·mu/L is the power of two 2^-MU_SHIFT (default 2^-9,
  which is mu = 1/4 at L = 128, R = 2). This makes the scaler a negation plus
  arithmetic shifts. Shifts round toward minus infinity.
* The accumulator is PW + LM + B bits wide and exact, so the only rounding in
  an output is the final shift by B-1.

## Modules

```
mbda_adf                      top: handshake, desired-value register, wiring
├── input_registers           (p+L-1) x B shift register, L samples per block
├── mbda_controller           clock counter, strobes, address vectors, priority selects
├── output_calc      x L      M x selector0 -> pipe_adder_tree(M) -> accumulator -> latch
├── error_calc       x L      e = d - y, registered
├── update_value_calc x L     scaler -> M x selector1 -> register
├── wafs_update      x M      pipe_adder_tree(L+1) over updates + old entry
└── wafs             x M      2^R-word register table, written through selector2
mbda_pkg                      default sizes, saturation helper
pipe_adder_tree               pipelined binary adder tree (used by output_calc, wafs_update)
```

The tables are flip-flops, not RAM. In a single clock, all L output units
read every table at once.

## Interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset (tables start at zero) |
| `in_valid` / `in_ready` | in / out | 1 | a block is taken at a rising edge where both are high |
| `x_in`, `d_in` | in | L x B | the block's samples, index 0 = newest (x(jL)), index L-1 = oldest |
| `y_valid`, `y_out` | out | 1, L x PW | outputs, LM + B clocks after the block was taken, for one clock |
| `e_valid`, `e_out` | out | 1, L x PW | errors, one clock after `y_valid` (e_out holds until the next block's error) |

Parameters: `P`, `L`, `M`, `B`, `PW`, `FRAC`, `MU_SHIFT`. P must be a
multiple of M. FRAC must be at least B-1, and MU_SHIFT at least 1.

## Verification

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one prints
`TB_RESULT checks=N failures=F` and has a watchdog. There are also two
whole-filter tests:

* `tb_mbda_adf` runs seven filters side by side in the convergence setups:
  p = 8, an 8-tap low-pass unknown system, near-Gaussian white input,
  observation noise of variance 1.5e-6. They use L = 4 with M = 1, 2, 4, 8,
  and M = 4 with L = 1, 2, 3. For each filter it checks:
  * every output and error, bit-exactly, against a behavioural model
    (`tb/mbda_model_pkg.sv`);
  * the y and e latency;
  * the T-clock block period;
  * that the error power falls (about 35 dB, down to the noise floor, for
    M >= 2; 25 dB for M = 1, whose 256-word table adapts slowly).

  It also counts sign-bit phases, priority resolutions and unaddressed
  entries, and requires each to occur.
* `tb_mbda_adf_full` runs the default-size filter (p = L = 128, M = 64) for
  250 blocks (32 000 samples) of the same identification task. It makes the
  same bit-exact, latency and period checks and requires the error power to
  fall by at least 20 dB; it reaches the noise floor, about 38 dB down.

Every convergence run uses mu = 1/4 in 0.5·R·mu/L = 2^-MU_SHIFT (the L = 3
run, where that is not a power of two, uses 2^-4, i.e. mu = 0.19).

To run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mbda_pkg.sv tb/mbda_model_pkg.sv tb/tb_mbda_adf.sv --top-module tb_mbda_adf
./obj_dir/Vtb_mbda_adf
```

The default-size build takes a few minutes to compile. Its simulation takes
seconds.

## What is specified and what was chosen here

Taken from the description of the architecture:
* the block-LMS/DA formulation;
* the split into M tables of 2^R words;
* the priority update;
* the units and their selectors (Selector-0: 2^R to 1, Selector-1: B to 1,
  Selector-2: 1 to 2^R);
* the (p+L-1) x B input register;
* the per-block schedule, whose length is exactly
  ceil(log2(L+1)) + ceil(log2 M) + 2^R + B + 1 pipeline steps;
* the sizes p = L = 128, M = 64, B = 16.

Chosen here, because no source for them was available:
* the widths PW/FRAC;
* the power-of-two step size and its value;
* saturation;
* rounding by truncation;
* the block-parallel input with a valid/ready handshake (samples could
  equally be collected serially in front of it);
* reset to zero;
* the sign-bit-first accumulation order;
* one shared scaler per error (the structure draws one per Selector-1; all
  of them compute the same values);
* the unknown system, noise generator and step sizes in the testbenches.

Other points a user should know:

* **Output latency.** The quoted output latency includes collecting L serial
  samples (L·T_s + tau_oc). This design takes the L samples at once, so its
  own latency is just the computation, LM + B clocks.
* **Speed estimate.** With 22 ns clocks the default size gives 166.2
  Msamples/s and a 1254 ns latency by the same formula. The published
  figures are 165.5 MHz and 1259.7 ns. The small difference comes from the
  delay model behind the published table, which is not known here.
* **Smaller published sizes.** Some published size points (p = 8, 16, 32
  with M = 64) would need fewer than one tap per table, so they cannot be
  built with this structure.
