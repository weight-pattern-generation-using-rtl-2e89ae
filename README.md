# Accumulator-based 3-weight test pattern generator with precomputed carry

Built-in self-test needs many pseudorandom patterns before hard-to-detect
faults are exercised. Biasing some circuit inputs helps: an input that is held
at 0 or at 1 while the others vary randomly reaches faults that uniform random
patterns rarely hit. A popular low-cost choice uses only three weights:
0 (always 0), 1 (always 1) and 0.5 (random).

This design produces such patterns from an ordinary accumulator, the kind of
unit a datapath already contains. The accumulator register is the pattern; on
every clock it adds a constant input `v`, which makes its free-running bits
behave like pseudorandom bits of weight 0.5. Any bit can instead be pinned at
0 or 1 through asynchronous set/reset inputs of its flip-flops. The trick that
makes this work without touching the adder is that a pinned bit keeps its two
adder operands complementary, and a full adder with complementary operands
passes its carry-in straight to its carry-out. Pinned bits are therefore
invisible to the carry chain, and the remaining free bits still behave as one
accumulator.

Each bit cell additionally computes its sum and carry for both possible
carry-in values ahead of time, with two full adders, and uses the arriving
carry only to select between them. The carry path through one bit is then a
single 2:1 multiplexer.

## Files

| file | contents |
|---|---|
| `rtl/full_adder.sv` | one-bit full adder |
| `rtl/precomp_acc_cell.sv` | one accumulator bit: B and A flip-flops with asynchronous set/reset, two full adders, sum/carry select |
| `rtl/weight_pattern_gen.sv` | top: `K` cells chained into the pattern generator |
| `tb/tb_full_adder.sv`, `tb/tb_precomp_acc_cell.sv`, `tb/tb_weight_pattern_gen.sv` | self-checking testbenches |

## The bit cell

```
             v_i ──► [B ff] ──b──┐
                                  ├─► FA(cin=0) ─► s0,c0 ─┐
             ┌──────────a────────┤                        ├─ mux(cin_i) ─► s_sel ─► [A ff] ─► a_o (pattern bit)
             │                    └─► FA(cin=1) ─► s1,c1 ─┘                 │
             └──────────────────────────────────────────────────────────────┘
                                                 cout_o = cin_i ? c1 : c0
```

Both flip-flops have asynchronous, active-high set and reset. The two
configuration inputs reach them crosswise:

| `set_i` | `reset_i` | A (pattern bit) | B | carry | weight |
|---|---|---|---|---|---|
| 1 | 0 | 1 | 0 | `cout_o = cin_i` | 1 |
| 0 | 1 | 0 | 1 | `cout_o = cin_i` | 0 |
| 0 | 0 | `A ^ B ^ cin` each clock | `v_i` each clock | majority(A, B, cin) | 0.5 |
| 1 | 1 | illegal (the top asserts against it) | | | |

With A and B complementary, the carry-for-0 adder produces carry 0 and the
carry-for-1 adder produces carry 1, so the select multiplexer hands `cin_i`
on unchanged. This holds for any adder implementation; the adder itself is
not modified.

## What sequence the generator produces

Let F be the number of free bits. Pack the free bits of A into an F-bit number
`a`, and the free bits of B into `b`. Because pinned bits pass carries
through, one clock does

    a(t+1) = a(t) + b(t) + cin   (mod 2^F),   cout_o = carry out of that F-bit add

and the pinned bits stay at their forced values. With `v` held constant and
its lowest free bit set (an odd `b`) and `cin = 0`, the free bits visit all
2^F states in 2^F clocks, so across one period every free bit is 1 in exactly
half the patterns: weight 0.5 exactly, not only on average. With no bit pinned
the block is the plain accumulator generator, `s(t+1) = s(t) + v`.

Choosing which bits get weight 0, 1 or 0.5 is left to the user. It is normally
done off-line, from a simulation of the circuit under test; the inputs
`set_i`/`reset_i` are brought out for it.

## Interface and timing of `weight_pattern_gen`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of all A and B flip-flops |
| `set_i` | in | K | bit i pinned to 1 (weight 1), asynchronous, active high |
| `reset_i` | in | K | bit i pinned to 0 (weight 0), asynchronous, active high |
| `v_i` | in | K | accumulator input |
| `cin_i` | in | 1 | carry into bit 0 |
| `pattern_o` | out | K | the A registers: the test pattern |
| `cout_o` | out | 1 | carry out of bit K-1, combinational |

Parameter `K` (default 8) is the pattern width.

- One new pattern per clock.
- `v_i` is captured into B on one rising edge and added into A on the next.
- Set and reset act immediately, without a clock edge. Change them while the
  clock is stable, as for any asynchronous control.
- The flip-flops have no separate reset. To start from a known state, pulse
  `reset_i` (or `set_i`) on the bits to be initialised. Note that a bit
  released from reset has B = 1 until the next edge loads `v_i`, so the first
  clock after release adds 1 in that position instead of `v_i`.

## Where the design makes its own choices

The description it follows gives the cell structure, the three
configurations, the carry pass-through rule and the two-adder selection. It
leaves the following open, and these choices were made:

- **Width.** No pattern width is given; `K = 8` is the default.
- **B input.** The input flip-flop's data input is not specified; here it
  loads `v_i` on every edge.
- **Set/reset wiring.** `set_i` drives A's set and B's reset, `reset_i` drives
  A's reset and B's set. This is the wiring that keeps A = NOT B in both
  pinned configurations, which the carry pass-through rule requires.
- **Select signal.** The multiplexers select by the carry arriving from the
  bit below.
- **Carry order.** Bit 0 is the least significant; `cin_i` enters there.
- **Both high.** Set together with reset is treated as illegal. Inside a
  flip-flop, set wins.
- **Synchronous design.** The motivation given for the second adder mentions
  an asynchronous feedback path and a race. This implementation is fully
  synchronous, so it has no such race. The second adder is kept for its
  purpose: taking the full adder out of the carry path.

The general precomputation structure the design draws on has a separate input
register. Its control register's load is gated by precomputation logic. That
structure depends on the circuit it is applied to and is not built here. Its
only instance in this design is the per-bit adder pair.

## Size

Per bit: two flip-flops, two full adders (for fixed carry-ins they reduce to
XOR/XNOR for the sums and AND/OR for the carries), and two 2:1 multiplexers.
At K = 8 that is 16 flip-flops. On a small FPGA it is roughly 16 LUTs and
35 I/O pins. A published Spartan-3 implementation of this scheme used a device with 960 slices,
1920 flip-flops, 1920 4-input LUTs and 66 I/O. It reported 5 slices,
5 flip-flops, 10 LUTs and 7 I/O for the proposed cell, against 7 slices,
5 flip-flops, 12 LUTs and 6 I/O for the single-adder accumulator cell. The
width behind those numbers is not stated.

## Verification

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

- `tb_full_adder` applies all eight input rows. It compares against the
  integer `a + b + cin` and checks the carry pass-through rows.
- `tb_precomp_acc_cell` first walks every (A, B, cin) combination, then runs
  3000 random cycles against a bit-level register model. These include
  set/reset applied between clock edges.
- `tb_weight_pattern_gen` runs the top at its default `K = 8` against a
  word-level model. The model packs the free bits, adds them as integers and
  unpacks the result, so it knows nothing of the cell structure. The test has
  three phases:
  1. 300 clocks of the plain accumulator, checked against `s(t+1) = s(t) + v`.
  2. 40 random weight assignments, each run for one full period. Every
     weight-1 bit must be 1 on all patterns, every weight-0 bit on none, and
     every free bit on exactly half.
  3. 5000 random cycles with changing `v`, `cin` and weights, including
     asynchronous forcing.

  It counts pinned and free bit-patterns, carries carried across pinned bits,
  carry-outs and asynchronous forces, and fails if any of them never occurs.

Simulate with Verilator 5, for example:

```
verilator --binary --timing --assert -Wall -Wno-fatal -y rtl +libext+.sv \
  --top-module tb_weight_pattern_gen tb/tb_weight_pattern_gen.sv
./obj_dir/Vtb_weight_pattern_gen
```

The testbenches initialise every register they read through set/reset. They
do not depend on power-up values.
