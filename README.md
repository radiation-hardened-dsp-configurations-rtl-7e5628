# Radiation-hardened arithmetic in DSP48E slices

An SRAM-based FPGA hit by a particle can have one of its registers, or one
bit of its configuration, flipped. The usual cure is triple modular
redundancy (TMR): compute the result three times and vote. Built from
ordinary logic cells (CLBs), the three copies of an adder or multiplier and
their voters take a lot of area. A large part of the routing exposed to upsets
belongs to those copies and voters.

This design does the arithmetic *and the voting* inside the DSP48E slices
of the FPGA. Each copy of an add, multiply or multiply-accumulate runs in its
own slice. A comparison between two copies is done by a slice's **pattern
detector**, which can compare the arithmetic unit's output with the value on
the slice's C input. The CLBs are left with little more than an output
multiplexer. The RTL is a library of such hardened templates for 16-bit
signed operands, plus a cycle-level model of the DSP48E slice the templates
are built from. The templates are:

| template (top-level port prefix) | module | slices | voter | rate |
|---|---|---|---|---|
| `add_v1`, `mul_v1`, `macc_v1` (recommended) | `tmr3_dsp` | 6 | three comparator slices + CLB merge | 1 set / cycle |
| `mul_v2`, `macc_v2` | `tmr3_reuse` | 3 | each slice also compares | 1 set / 2 cycles |
| `add_v3dsp`, `mul_v3dsp`, `macc_v3dsp` | `tmr_unique` (`CMP_IN_DSP=1`) | 4 | one comparator slice + CLB mux | 1 set / cycle |
| `add_v3clb`, `mul_v3clb`, `macc_v3clb` | `tmr_unique` (`CMP_IN_DSP=0`) | 3 | CLB comparator + CLB mux | 1 set / cycle |
| `mul_v4` | `tmr_unique_reuse` | 3 | slice 1 also compares, CLB mux | 1 set / 2 cycles |

The six-slice triplicated-voter form (`tmr3_dsp`) is the one recommended for
use. It keeps working with one wrong replica *or* one wrong comparator. The
others trade some of that protection for fewer slices.

## The slice model (`dsp48e`)

`rtl/dsp48e.sv` models the parts of the slice that the templates use:

* A (30 bits) and B (18 bits) go through 0, 1 or 2 registers (`AREG`,
  `BREG`). C (48 bits) has an optional register (`CREG`).
* A[24:0] × B feeds a signed 25×18 multiplier, followed by the M register
  (`MREG`).
* The X, Y and Z multiplexers, chosen by the 7-bit OPMODE, feed a 48-bit
  arithmetic/logic unit chosen by the 4-bit ALUMODE.
  * X chooses from 0, M, P and A:B.
  * Y chooses from 0, all ones and C.
  * Z chooses from 0, PCIN, P, C, and PCIN or P shifted right by 17.
  * The unit does Z+X+Y+CIN, Z−(X+Y+CIN), the two negated forms, and the
    two-input logic functions of X and Z.
* The P register (`PREG`) drives P and PCOUT.
* The pattern detector compares the unit's output with `PATTERN`, or with C
  (`USE_C_PATTERN`), under `MASK`. It produces PATTERNDETECT and
  PATTERNBDETECT, registered together with P.
* OPMODE, ALUMODE, CARRYINSEL and CARRYIN can be registered (`OPMODEREG`)
  and may change every cycle. The templates use this to switch one slice
  between computing and comparing.
* The cascades to neighbouring slices:
  * A and B can come from ACIN/BCIN (`A_CASCADE`, `B_CASCADE`). They leave
    on ACOUT/BCOUT after the input registers.
  * CARRYCASCOUT is the registered carry of the 48-bit result.
  * MULTSIGNOUT is the registered sign of the product.
* The 3-bit CARRYINSEL picks the carry input:

  | CARRYINSEL | carry input |
  |---|---|
  | 000 | CARRYIN |
  | 001 | ~PCIN[47] |
  | 010 | CARRYCASCIN |
  | 011 | PCIN[47] |
  | 100 | the slice's own CARRYCASCOUT |
  | 101 | ~P[47] |
  | 110 | A[24] xnor B[17] (the rounding bit, aligned with M) |
  | 111 | P[47] |

* With Z = 100 (P, for a multiply-accumulate wider than one slice), a set
  MULTSIGNIN adds all ones. That is the sign extension of the lower slice's
  product.
* `USE_SIMD` (1, 2 or 4) splits the unit into one 48-bit, two 24-bit or four
  12-bit lanes, with no carry between them. CARRYOUT[3:0] reports the
  lanes' carries:
  * one lane: bit 3;
  * two lanes: bits 1 and 3;
  * four lanes: bits 0 to 3.

  The carry input enters lane 0 only. For the subtract modes, the carry
  output is the inverted borrow.

The OPMODE/ALUMODE codes, and the behaviour of the cascade and carry ports,
follow the DSP48E primitive as this model reads it. The package `hcis_pkg`
gives the codes names (`OPM_ADD`, `OPM_MUL`, `OPM_MACC`, `OPM_HOLD`,
`OPM_PASS`, `ALU_*`).

Simplifications:

* The multiplier's two partial products are summed inside the model, so the
  X=M / Y=M pair passes the whole product through X. An assertion checks
  that M is only ever selected in X and Y together.
* Clock enables are grouped: A, B, C, M, P, and one for the control inputs.
* The reset is shared; there is no separate reset per register.

The templates use none of the cascade, carry-select or SIMD features. The
slice's own testbench covers them.

One synchronous active-high reset `rst` clears every register in the design.

## Building blocks of the templates

**`dsp_op`: one replica.** The operation runs in one slice with every
register enabled.

* ADD puts `a` on C and `b` on A:B and computes C + A:B.
* MUL and MACC put `a` on A and `b` on B. MUL computes M; MACC computes
  P + M, or M in the cycle `acc_clr` is given.
* When no operand set arrives, the slice gets OPMODE `P = P`, so the last
  result stays on P.
* For MUL and MACC, a fabric register delays OPMODE by one cycle. This lines
  it up with the product in the M register.

Latency from `in_valid` to the result on P and `out_valid`:

| OP | latency |
|---|---|
| ADD | 2 cycles |
| MUL, MACC | 3 cycles |

**`dsp_cmp`: comparator slice.** The value `x` enters on PCIN and passes
through the unit to P (OPMODE Z = PCIN). The value `y` enters on C and is the
pattern, with an empty mask, so PATTERNDETECT is `x == y` over 48 bits. With
`PREG=1` both p and eq are registered; with `PREG=0` both are combinational.

**`dsp_op_cmp`: one slice doing both jobs.** The pattern detector looks at
the unit's output in the same cycle it is computed. A neighbouring replica's
result is only visible on its P register one cycle later, so the two cannot
be compared in the cycle of the computation. The slice therefore alternates:

1. It computes its result.
2. In the next cycle OPMODE switches to `P = P`. The unit now outputs the
   held result, and the detector compares it with the neighbour's result on
   C (C unregistered).

Operands can arrive at most every second cycle, which an assertion checks.
p and eq are valid together 4 cycles after `in_valid`. ADD cannot use this
slice, because the adder needs C for an operand.

**`tmr_merge`: merge after a triplicated voter.** This is the CLB logic that
follows the three comparisons:

    out = r1 if eq12 or eq13
          r2 if only eq23
          r1 otherwise

With one wrong replica or one wrong flag, `out` is still correct. Replica 3's
value is never needed: whenever it would be chosen, replica 2 is equal to it.

## The templates

**`tmr3_dsp`: recommended, six slices.**

* Three `dsp_op` replicas.
* Three `dsp_cmp` slices (`PREG=1`) in a ring: comparator k gets replica k on
  PCIN and replica k+1 on C, giving eq12, eq23 and eq31.
* `tmr_merge` picks from the comparators' P outputs (r1, r2) and the flags.

Latency is that of the operation plus 1 (ADD 3, MUL/MACC 4), at one set per
cycle.

**`tmr3_reuse`: triplicated voter in three slices.**

* Slice k is a `dsp_op_cmp` whose C input is replica k+1's result. It
  therefore outputs Mk and the flag for the pair (k, k+1).
* `tmr_merge` follows, as in `tmr3_dsp`.

Latency 4, one set every two cycles.

**`tmr_unique`: one voter.**

* Three `dsp_op` replicas.
* Replicas 1 and 2 are compared. With `CMP_IN_DSP=1` this is a `dsp_cmp`
  slice with `PREG=0`, so the flag lines up with the results without an
  extra register. With `CMP_IN_DSP=0` it is a CLB `==`.
* A CLB multiplexer outputs replica 1 if the two agree, else replica 3.

Latency is that of the operation (ADD 2, MUL/MACC 3), at one set per cycle.
A single wrong replica or a single wrong comparison is masked: with all
replicas correct, a false "not equal" just selects r3, which is correct too.
What this voter cannot mask is two faults together. For example, a
comparator stuck at "equal" by a configuration upset, followed later by a
wrong r1, passes r1 through. The triplicated voter would still catch that.

**`tmr_unique_reuse`: one voter, slice reuse (`mul_v4`).**

* Slice 1 is a `dsp_op_cmp` comparing its own result with replica 2.
* Slices 2 and 3 are `dsp_op`.
* The same multiplexer as `tmr_unique` follows.

Latency 4, one set every two cycles.

In every template, `out` holds the last result, and `out_valid` is high for
one cycle when a new one appears. Operands are signed 16-bit two's-complement
values; results are the full 48-bit P word. A multiply-accumulate keeps
adding products until a set comes with `acc_clr`, which starts a new sum
with that set's product.

## The top (`hcis_top`)

The top has no parameters. It holds all twelve templates of the table above
on one shared operand port (`a`, `b`, `in_valid`, `acc_clr`), with one
`<template>_out` / `<template>_valid` pair per template.

A set is taken when both `in_valid` and `in_ready` are high. `in_ready` drops
for the cycle after each taken set, because the reuse templates need two
cycles per set. Every template receives the set in the same cycle.

## Upsets and how the tests emulate them

Each testbench emulates a single event upset by flipping random bits of one
replica's register in front of the arithmetic unit:

* the M register for MUL and MACC;
* the C register for ADD.

It can also clear a registered equality flag of one comparator. Each
expected result is then computed independently with integer arithmetic. The
voted output must still equal it, with the valid flag at the stated
latency.

Rotation and coverage:

* The upset kinds rotate over replica 1, 2 and 3, and over the comparator
  flag where the template registers one.
* The testbenches count each kind of hit, and each fallback of a unique
  voter to replica 3. A failure is counted if any of them never happens.

An upset in the accumulator of a MACC replica persists in that replica until
the next `acc_clr`. The voter keeps masking it, but a second upset in another
replica before the clear would not be masked.

## Where this departs from the source scheme, and what is assumed

* The slice model has every port of the slice diagram. Its simplifications
  are listed above. The behaviour of the cascade, carry-select and SIMD
  features comes from the DSP48E primitive, not from the hardening scheme.
* The source leaves these points open, so they are this design's own
  choices:
  * pipeline register settings, and with them all latencies;
  * operand signedness and the 48-bit result width;
  * the valid/ready interface;
  * the reset;
  * the mapping of operands to ports;
  * the merge rule after the triplicated voter.
* The source states that in the reuse templates one slice does both the
  operation and the comparison "concurrently". Here they take alternate
  cycles, for the timing reason given under `dsp_op_cmp`. That halves the
  throughput of those templates.
* Upsets are emulated in registers only. Configuration-memory upsets (wrong
  routing, a changed OPMODE constant), as a fault-injection platform would
  produce them, are not modelled.
* Baselines with the operations or voters in CLB logic are not part of the
  library and are not included.
* The RTL is not mapped to an FPGA. A synthesis tool will infer the slices
  from `dsp48e` only if it recognises the structure. To target real devices,
  replace `dsp48e` by the vendor primitive; its ports and parameters are
  named to make that a direct swap.

## Files

* `rtl/hcis_pkg.sv`: widths, OPMODE/ALUMODE names, operation enum,
  latency functions.
* `rtl/dsp48e.sv`: slice model.
* `rtl/dsp_op.sv`, `rtl/dsp_cmp.sv`, `rtl/dsp_op_cmp.sv`: slice
  configurations.
* `rtl/tmr_merge.sv`: merge logic of the triplicated voter.
* `rtl/tmr3_dsp.sv`, `rtl/tmr3_reuse.sv`, `rtl/tmr_unique.sv`,
  `rtl/tmr_unique_reuse.sv`: templates.
* `rtl/hcis_top.sv`: all templates side by side.
* `tb/<module>_tb.sv`: one self-checking testbench per module. Each ends
  with a `TB_RESULT checks=… failures=…` line and has a watchdog.
  `tb/hcis_top_tb.sv` runs the whole top at its defaults for 4,000 cycles of random
  operand sets, with accumulator clears, refused sets and rotating upsets.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal \
      -y rtl -y tb +libext+.sv -Irtl \
      rtl/hcis_pkg.sv tb/hcis_top_tb.sv --top-module hcis_top_tb -o sim
    ./obj_dir/sim

Replace `hcis_top_tb` by any other `<module>_tb` to test one block. Each
test finishes in seconds. The testbenches flip register bits through
hierarchical references (`dut.u_mul_v1.g_rep[0].u_op.u_dsp.m_q`). If you
rename instances or registers, update those paths.
