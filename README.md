# Pipelined inexact speculative adder

A 16-bit adder that does not wait for carries to ripple from one 4-bit
section to the next. Each 4-bit section (a carry look-ahead adder, *PCLA*)
starts with a carry-in that is *guessed* by a small speculator (*PSPEC*) from
the top two bit pairs of the section below. Most guesses are right, and the
result is then exact. When a guess is wrong, a compensator (*PCOMP*) at that
section boundary notices it (the guess differs from the carry the section
below actually produced) and repairs the sum cheaply: it corrects the lowest
bit of the upper section, or, if that bit would wrap, it "balances" the top
two bits of the lower section so the remaining error shrinks. The whole adder
is cut into five pipeline stages, and a stage that has no live addition in it
is not clocked.

The adder is therefore *inexact*: it trades a small, bounded, occasional
error for a critical path no longer than a few gates.

## Structure

```
  a[15:12] b[15:12]   a[11:8] b[11:8]    a[7:4] b[7:4]     a[3:0] b[3:0]   cin
       |                 |   \ a,b[11:10]    |  \ a,b[7:6]      |  \ a,b[3:2]  |
       |                 |    PSPEC 2        |   PSPEC 1        |   PSPEC 0    |
       |                 |      |            |     |            |     |        |
     PCLA 3 <-spec2----PCLA 2 <-+--spec1---PCLA 1 <+---spec0---PCLA 0 <-+------'
      |  |             |  |   |           |  |   |           |  |   |
      |  |  s[12] s[11:10],cout2,spec2    |  |  s[8],s[7:6],cout1    |  s[4],s[3:2],cout0
      |  |         PCOMP 2                |  |   PCOMP 1             |   PCOMP 0
   cout s[15:13]   s[12] s[11:10]  s[9]  ...  s[8] s[7:6]  s[5]    s[4] s[3:2]  s[1:0]
```

| Output bits        | Produced by                                  |
|--------------------|----------------------------------------------|
| `s[1:0]`, `s[5]`, `s[9]`, `s[15:13]`, `cout` | straight from a PCLA |
| `s[4]`, `s[8]`, `s[12]` | low bit of PCLA 1/2/3, possibly corrected by PCOMP 0/1/2 |
| `s[3:2]`, `s[7:6]`, `s[11:10]` | top bits of PCLA 0/1/2, possibly balanced by PCOMP 0/1/2 |

`cout` is the top section's own carry out; it is not compensated, so it can be
wrong when section 3's guessed carry-in was wrong.

## Speculation

PSPEC for boundary *j* looks only at `a` and `b` bits 3 and 2 of section *j*
and computes, with generate `g = a & b` and propagate `p = a ^ b`,

    spec = g[3] | p[3] & g[2]            (window carry-in assumed 0)

This is the carry that section *j* would produce if no carry entered bit 2.
Section *j+1* adds with `spec` as its carry-in. Because the true carry can
only be larger than or equal to this guess, every error in the default
configuration is *positive*: the upper section was added with 0 where 1 was
due, and the sum is one unit of `2^(4(j+1))` too low.

The parameter `SPEC_CIN` sets the carry assumed into the window. With
`SPEC_CIN = 1` the guess is an upper bound and errors are mostly *negative*
(sum too high). Both directions are handled by the compensator.

## Compensation

For boundary *j*, let `spec` be the guessed carry into section *j+1* and
`cout` the carry section *j* really produced (with its own carry-in). The
error flag is `fe = spec ^ cout`.

| Case | Action |
|---|---|
| `fe = 0` | nothing; both fields pass |
| positive (`cout=1, spec=0`), low field of section *j+1* not all ones | low field + 1: exact repair |
| positive, low field all ones | low field left alone; top two bits of section *j* forced to `11` |
| negative (`cout=0, spec=1`), low field not zero | low field − 1: exact repair |
| negative, low field zero | low field left alone; top two bits of section *j* forced to `00` |

Correction is exact. Balancing replaces an error of `2^(4(j+1))` by a smaller
one. Pushing the lower section's top bits in the direction of the missing
carry recovers part of the lost weight without touching more than two bits.
The low field is one bit wide by default (`LSB_BITS`). A positive error
therefore gets corrected when that bit is 0, and balanced when it is 1. Over
an exhaustive sweep of the lower 16 bits of the operands (upper byte random),
about 83 % of results are exact. The largest error observed is 1092.

The compensator for boundary *j* only touches bit `4(j+1)` and bits
`4j+3:4j+2`, so the three compensators never write the same bit, and they act
independently when several boundaries mis-speculate at once.

## Pipeline and timing

Six register levels, five stages:

| Level | Holds | Logic in the stage before it |
|---|---|---|
| L0 | `a`, `b`, `cin` | — |
| L1 | PSPEC `g`,`p`; operands re-timed | window generate/propagate |
| L2 | PSPEC `spec`; PCLA prefix terms `G(i:0)`, `P(i:0)` | one AND-OR; CLA prefix |
| L3 | PCLA sums and carries out | carries `c = G + P·cin`, sums `s = p ^ c` |
| L4 | PCOMP flag, direction, ±1 of low field, wrap | XOR, incrementer/decrementer |
| L5 | corrected/balanced fields, bypassed bits: outputs | multiplexers |

The PCLA splits its look-ahead so that everything independent of the carry-in
is done in its first stage. The guessed carry therefore needs to arrive only
at its second stage. Each of PSPEC, PCLA and PCOMP has two stages.

* Throughput: one addition per clock.
* Latency: an addition sampled on edge *t* (with `in_valid` high) appears on
  `sum`/`cout` with `out_valid` high after edge *t+5*.
* Outputs hold their last value while `out_valid` is low.

### Stage clock gating

`stage_gate_ctrl` shifts `in_valid` down a chain of live flags. Level 0 is
enabled by `in_valid`, level *k* by the live flag of level *k−1*. Stages are
thus gated while the pipeline fills at the start of a burst, while it drains at
the end, and whenever it idles. The RTL expresses this as register load
enables. A synthesis flow with clock-gating insertion maps each enable to a
gating cell; no gating cell is instantiated by hand.

## Interface of `isa_pipelined`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset clearing all registers |
| `in_valid` | in | 1 | `a`, `b`, `cin` hold an addition this cycle |
| `a`, `b` | in | N | operands |
| `cin` | in | 1 | carry into section 0 |
| `out_valid` | out | 1 | outputs hold a result |
| `sum` | out | N | approximate sum |
| `cout` | out | 1 | carry out of the top section |
| `fe` | out | N/X−1 | per boundary: the guess was wrong |
| `corrected` | out | N/X−1 | per boundary: low field was corrected |
| `balanced` | out | N/X−1 | per boundary: top bits were balanced |

Parameters (defaults in `isa_pkg`): `N = 16`, `X = 4` (section width),
`R = 2` (speculation window), `LSB_BITS = 1`, `BAL_BITS = 2`,
`SPEC_CIN = 0`. Elaboration fails unless `N` is a multiple of `X` with at
least two sections, `0 < R < X`, and `LSB_BITS + BAL_BITS ≤ X`. The pipeline
depth is fixed at five stages.

## Files

| File | Contents |
|---|---|
| `rtl/isa_pkg.sv` | default sizes |
| `rtl/pspec.sv` | speculator, 2 stages |
| `rtl/pcla.sv` | X-bit pipelined carry look-ahead adder, 2 stages |
| `rtl/pcomp.sv` | compensator, 2 stages |
| `rtl/stage_gate_ctrl.sv` | per-level enables |
| `rtl/isa_pipelined.sv` | top |
| `tb/tb_isa_model_pkg.sv` | integer reference model of the whole adder |
| `tb/tb_<block>.sv` | one self-checking testbench per module |
| `tb/tb_isa_full.sv` | default configuration, 65,536 additions back to back |

## Verification

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
after a fixed number of cycles if something hangs.

* `tb_pspec`, `tb_pcla`, `tb_pcomp`: exhaustive inputs, then random ones.
  Each is checked against arithmetic (`(a+b+c) >> R`, `a+b+cin`, an integer
  model of the compensation rule). They also check that a disabled stage holds
  its output. `tb_pcomp` also runs a 2-bit low field. An assertion in
  `pcomp` checks on every clock that a flagged error gets exactly one of the
  two repairs.
* `tb_stage_gate_ctrl`: every enable against the valid history.
* `tb_isa_pipelined`: two adders (`SPEC_CIN` 0 and 1) on bursts with random
  gaps. Operands include directed mis-speculations at each boundary, with the
  low field at and away from its wrap value. It checks sum, carry, flags and the
  five-cycle latency against the model, and that a result with no flag equals
  the exact sum. It also requires that exact results, correction up and down,
  balancing to `11` and to `00`, gated stages and back-to-back results all
  occur.
* `tb_isa_full`: the default configuration, no parameters overridden.

Running one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_isa_pipelined \
  rtl/isa_pkg.sv tb/tb_isa_model_pkg.sv rtl/pspec.sv rtl/pcla.sv rtl/pcomp.sv \
  rtl/stage_gate_ctrl.sv rtl/isa_pipelined.sv tb/tb_isa_pipelined.sv
./obj_dir/Vtb_isa_pipelined
```

## How far it follows the source design, and where it departs

Taken from the source design:
* the 16-bit/4-bit/2-bit-window configuration and which output bits each
  compensator touches;
* the speculator and adder equations;
* the XOR error flag, increment-or-balance with `11`, and the rule that
  correction happens only without overflow;
* two stages per sub-block, five stages and six register levels overall;
* gating of idle stages.

This design's own choices:
* **Stage boundaries.** Where each register sits inside PSPEC, PCLA and PCOMP
  is not specified. So is the extra re-timing register at L1 that lines the
  operands up with the guessed carries.
* **Negative errors.** The decrement and balancing-to-`00` path is built from
  the description of both error directions. It is reachable only with
  `SPEC_CIN = 1`, since the default speculator never over-guesses.
* **Handshake and flags.** `in_valid`/`out_valid`, the flag outputs and
  reset are additions.
* **Clock gating** is expressed as load enables, not gated clock nets.
* **Uncompensated `cout`.** The carry out of the top section is passed
  through without compensation.

Not in the RTL: the sleep, stack and sleepy-stack leakage-reduction styles.
They are transistor-level ways of building each gate (sleep transistors at the
rails, series-split transistors, or both). They change power and delay but not
the logic, so they belong to the cell library or custom layout, not to this
code. No timing or power figures are claimed for this RTL.
