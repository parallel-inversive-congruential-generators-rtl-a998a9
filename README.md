# Parallel explicit inversive congruential generator

Inversive congruential generators (ICGs) are random number generators built on
a nonlinear recursion. Points built from linear generators lie on a few
hyperplanes. ICG points do not, but each ICG number costs a modular inversion,
which takes O(log2 m) work rather than one multiplication. This RTL moves that
inversion into hardware. It inverts by the *binary* extended Euclidean
algorithm, which needs only shifts, subtractions and compares: no divider. The
inverter is used to build a parallel family of *explicit* ICGs (EICGs):

    x_n^i = inv(a*n + b^i) mod m,   b^i = a*(i-1) + b mod m,   i = 1..N

Here `inv(0) = 0` and m is prime. Because the formula is explicit, any index n
can be computed directly, with no state carried over from x_(n-1).

The multiplier a is shared by all streams, and the constants step by a. So the
products b^i * inv(a) equal (i-1) + b*inv(a), and these are distinct. That is
the condition under which the N-tuples (x_n^1, ..., x_n^N) have good
statistical properties. The reference configuration uses 31-bit registers and
the Mersenne prime m = 2^31 - 1. Any odd prime below 2^WIDTH can be used, and
it is chosen at run time.

## Blocks

| module | role |
|---|---|
| `icg_pkg` | shared constants: `ICG_WIDTH = 31`, `ICG_M31 = 2^31-1`, `ICG_IDXW = 32` |
| `modinv` | binary extended Euclidean inverter, one step per clock |
| `modmul` | bit-serial (a*n + c) mod m, to start a stream at any index |
| `eicg_param` | combinational chain giving b^1..b^N |
| `eicg_stream` | one EICG stream: seed, step the argument by a, invert |
| `picg_top` | N streams side by side, joined into index-aligned tuples |

The hierarchy is `picg_top` → `eicg_param` plus N × `eicg_stream`. Each
`eicg_stream` holds one `modmul` and one `modinv`.

## The inverter (`modinv`)

This block is the heart of the design, and the least obvious part. It keeps
four WIDTH-bit registers:

* `u`, `v` start as x and m.
* `x1`, `x2` start as 1 and 0.

Throughout the run, `x1*x ≡ u` and `x2*x ≡ v` (mod m). Each clock cycle does
exactly one of the following:

| condition | update |
|---|---|
| u even | u ← u/2, x1 ← x1/2 mod m |
| else v even | v ← v/2, x2 ← x2/2 mod m |
| else u ≥ v | u ← (u−v)/2, x1 ← (x1−x2)/2 mod m |
| else | v ← (v−u)/2, x2 ← (x2−x1)/2 mod m |

The unit stops when u = 1 (the result is x1) or v = 1 (the result is x2).

Halving modulo an odd m costs one adder: r/2 when r is even, and (r+m)/2 when
r is odd. The modular subtraction is a subtract plus a conditional add of m.
The critical path is therefore a compare, a subtract-mod-m and an add of m.
There is no divider anywhere.

When both u and v are odd, their difference is even. So the subtraction and
the halving that always follows it are merged into one step. Every step at
least halves u·v < 2^(2·WIDTH), which bounds the run at 2·WIDTH steps.

Measured behaviour:

* Modulo 2^31−1: 40 steps on average over random operands, and 53 at most in
  the tests.
* At WIDTH = 61 with m = 2^61−1: 101 steps at most.

Other properties:

* **Latency.** Zero takes 1 cycle. Any other x takes steps + 2 cycles from the
  accepting cycle to `out_valid`. The `cycles` output reports the step count.
* **Bad operands.** An operand that shares a factor with m (possible only if m
  is not prime) drives u or v to 0. The unit then returns 0 rather than
  looping forever.
* **Operand range.** x must be below m.
* **Interface.** Valid/ready on both sides, with one operation in flight. The
  result is held while the consumer stalls, and an assertion checks this.
  `clear` aborts the operation.

## Streams, seeding and the tuple join

An `eicg_stream` never multiplies in steady state. The argument for n+1 is the
argument for n plus a (mod m).

On `load`, `modmul` forms a*n0 + b once. It uses Horner's rule, MSB first,
one index bit per cycle: acc ← 2·acc (+a) mod m, then + b. This takes NW + 2
cycles. From then on, each number costs one inversion:

* The first number appears NW + 6 + steps cycles after `load`.
* After that, each number follows the previous take by steps + 3 cycles.
* A zero argument takes 2 cycles instead.

The index `n` is an NW-bit label that wraps modulo 2^NW. The argument does not
wrap with it: it keeps following a·n + b.

`picg_top` gives every stream its own inverter. The N inversions of one index
take data-dependent times, so the top joins them:

* `tuple_valid` is the AND of the streams' valid signals.
* All streams are released together when the tuple is taken.
* `lane_wait` shows which streams are finished and waiting on a slower one.
* `tuple_cycles` is the slowest stream's step count.

With the host always ready, one tuple is produced per (slowest steps + 3)
cycles. An assertion checks that a joined tuple always carries a single index.
Since b^(i+1) = b^i + a, stream i+1 at index n equals stream i at index n+1.
The testbench checks this as well.

## Where the design departs from or goes beyond its source

* **Inverter.** The binary extended Euclidean inverter, the 31-bit width, the
  Mersenne modulus, a run-time prime modulus and inv(0) = 0 all follow the
  published design.
* **Inverter schedule.** The exact register-level schedule (one step per clock,
  with subtract and halve merged) is this design's own. The original circuit
  was not available in enough detail to copy.
* **Original timing.** The original FPGA reported 240–410 ns per inversion on a
  24 MHz part, which is about 6–10 clock cycles. This sequential inverter needs
  about 42 cycles on average (1.75 µs at 24 MHz). Only a deeper, more unrolled
  datapath would match that figure. The source does not say how its figure
  maps to clock cycles. Treat this as the main open difference.
* **Added hardware.** The source stops at the inverter. It gives the EICG
  formula and the b^i parameterisation, but no hardware around them. Added
  here: stream seeding by a shift-and-add multiplier, argument stepping by
  modular addition, one inverter per stream, and the tuple join.
* **Stream count.** N is not given by the source. `NSTREAMS = 4` is a
  placeholder.
* **Host.** The host side (a software library on a workstation, or an FPGA
  coprocessor in a larger machine) is not part of this RTL. Its
  configuration and result signals are the top's ports.
* **Design choices.** Handshakes, reset (synchronous, active low), the `clear`
  input and the index width (32) are all choices made for this design.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 31 | register width; m must be an odd prime < 2^WIDTH |
| `NW` | 32 | index counter width |
| `NSTREAMS` | 4 | streams in the family (top, `eicg_param`) |

The step counter is 8 bits wide. That covers WIDTH up to 127.

## Simulating

Each testbench in `tb/` checks itself and ends with a line
`TB_RESULT checks=N failures=F`. The reference model in
`tb/icg_ref_pkg.sv` inverts by Fermat's little theorem, x^(m−2) mod m, using
128-bit products. This is independent of the Euclidean hardware.

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/icg_pkg.sv tb/icg_ref_pkg.sv tb/picg_top_tb.sv --top-module picg_top_tb
./obj_dir/Vpicg_top_tb
```

Replace `picg_top_tb` with `modinv_tb`, `modmul_tb`, `eicg_param_tb` or
`eicg_stream_tb` for the block tests. What each testbench covers:

* `modinv_tb`: the 31-bit unit against edge values, 3000 random operands, five
  other primes and every residue mod 1009. It also tests a 61-bit unit against
  2^61−1. It checks each latency against the step count.
* `modmul_tb`: random and extreme operands, exact latency, and a stalled
  result.
* `eicg_param_tb`: b^i for 4 and 9 streams, and the distinctness property.
* `eicg_stream_tb`: the number sequence, exact seeding and per-number timing,
  a zero argument, a reload mid-inversion, another prime, and index wrap.
* `picg_top_tb`: the default-size top with 1200 tuples over three
  configurations. It counts, and requires, each of these:
  * join waits
  * host back-pressure
  * zero arguments
  * the argument wrapping modulo m
  * a non-zero start index
  * a reload while running
  * a non-Mersenne modulus
