# Carry skip adder with Kogge-Stone stage adders

A carry skip adder splits an N-bit addition into stages. Each stage has a
*skip* path that lets an incoming carry jump over it when every bit of the
stage propagates. In the classic form the stage's ripple adder still has to
wait for the carry from below. A 2:1 multiplexer then picks either that
ripple result or the skipped carry.

This design removes that wait in two ways:

- **Concatenation.** Every stage above the first adds its operand slices with
  carry in 0. All stages therefore work at the same time, none waiting for
  the stage below.
- **Incrementation.** When the carry from below arrives, a small incrementer
  (a chain of half adders) adds it to the stage's *intermediate result* `Z`.

That leaves one carry chain running from stage to stage, with one compound
gate per stage:

```
CO_j = C_j | (&Z_j & CO_{j-1})
```

- `C_j` is the carry out of the stage's own adder (generate).
- `&Z_j` says that the intermediate result is all ones. An incoming carry
  then passes straight through (skip).
- In any other case the incoming carry ends in this stage. The incrementer
  absorbs it into the sum bits.

Each stage adder is a Kogge-Stone parallel-prefix adder, not a ripple-carry
adder. The default configuration is a 20-bit adder made of five 4-bit stages.

The whole circuit is combinational. It has no clock, no register, no reset
and no handshake: `sum` and `cout` follow `a`, `b` and `cin` after the logic
delay.

## Top level: `cska_ksa`

```
module cska_ksa #(int unsigned N = 20, int unsigned M = 4)
  (input [N-1:0] a, b, input cin, output [N-1:0] sum, output cout);
```

`sum = (a + b + cin) mod 2^N`, and `cout` is the carry out of bit N-1.
The adder has Q = N/M stages, and N must be a multiple of M (checked at
elaboration).

```
 bits:   [N-1 .. N-M]          ...   [2M-1 .. M]            [M-1 .. 0]
         stage Q                     stage 2                stage 1
  a,b -> KS adder (cin 0)            KS adder (cin 0)       KS adder (cin)
             | Z_Q, C_Q                  | Z_2, C_2             | C_1 = CO_1
  cout <- skip gate <- ... <------- skip gate <----------------+
             |                           |                      |
         incrementer(Z_Q+CO_{Q-1})   incrementer(Z_2+CO_1)      sum[M-1:0]
```

- **Stage 1** is only a Kogge-Stone adder with the external carry in. Its
  carry out starts the chain.
- **Stages 2..Q** (`cska_stage`) each hold three parts: a Kogge-Stone adder
  with carry in 0, a skip gate (`skip_logic`) and an incrementer
  (`incrementation_block`).

## The skip chain and its alternating polarity

This is the subtle part of the design.

Each skip gate is a single inverting compound gate: AND-OR-Invert (AOI) or
OR-AND-Invert (OAI). Because the gates invert, the carry changes polarity at
every stage. To avoid putting inverters on the critical path, the gate types
alternate:

| stage j | gate | carry entering | carry leaving | stage adder carry | product of Z |
|---|---|---|---|---|---|
| 2, 4, ... (even) | AOI | `CO_{j-1}` true | `~CO_j` | `C_j` | AND |
| 3, 5, ... (odd)  | OAI | `~CO_{j-1}` | `CO_j` true | `~C_j` | NAND |

- AOI: `~(C | (P & CI))`.
- OAI: `~(~C & (~CI | ~P))`, which equals `C | (P & CI)`.

So both gates compute the same carry function and differ only in polarity.
The package `cska_pkg` holds the enum `skip_gate_e` and the function
`skip_gate_of(j)`, which picks the gate for stage j. An OAI stage receives the
complemented carry. It inverts that carry once more before its incrementer;
this inverter is off the skip chain.

The last stage's gate sets the polarity of `cout`. With the default Q = 5 the
last stage is an OAI stage and `cout` comes straight from its gate. For an
even Q the last gate is AOI, and one inverter restores the true carry.

Worst-case path: stage 1's Kogge-Stone adder, then Q-1 skip gates, then the
last stage's incrementer. Each upper stage's own adder works in parallel and
is normally off this path.

## The stage adder: `ks_adder`

`ks_adder` is a W-bit Kogge-Stone adder with a carry in and a carry out.

1. It forms the bit signals `g = a & b` and `p = a ^ b`. The carry in is
   folded into bit 0: `g0 = a0 b0 | p0 cin`.
2. It runs ceil(log2 W) prefix levels. At level l, every bit i >= 2^l merges
   its (G, P) pair with the pair 2^l bits lower. Bits below 2^l pass through.
3. The carry into bit i+1 is then the final G_i, and `sum = p ^ {G, cin}`.

At W = 4 there are two levels. Widths that are not a power of two work too
(5 and 8 bits are tested). The group propagate leaving the last level is
unused, which lint reports.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `cska_ksa.N` | 20 | operand width |
| `cska_ksa.M` | 4 | bits per stage (fixed stage size); must divide N |
| `cska_stage.GATE`, `skip_logic.GATE` | `SKIP_AOI` | AOI or OAI skip gate; the top sets it per stage |
| `ks_adder.W`, `incrementation_block.W` | 4 | slice width |

## Where this follows the source design and where it does not

These points follow the published design:

- the concatenation and incrementation stages;
- the skip-gate function and the AOI/OAI alternation starting with AOI at
  stage 2;
- the unused incrementer carry;
- a Kogge-Stone adder in place of each ripple block;
- the 20-bit width.

These are this implementation's own choices or readings:

- **Stage size M = 4.** The published waveform shows 4-bit intermediate
  results for four upper stages. The stage size is not stated in prose.
- **Equal stage sizes.** This is the fixed-stage-size form. A
  variable-stage-size arrangement, with stages growing towards the middle, is
  not provided.
- **Kogge-Stone in every stage,** stage 1 included. One published RTL
  schematic shows ripple-carry cells in some stages. This design uses the
  block diagram's form.
- **The internal Kogge-Stone network.** It is the standard one. The source
  gives only the adder's name.
- **Gate choices around the skip gate.** The AND/NAND gate that forms the
  product of Z and the inversions around the OAI stages are the choices that
  make the alternating chain compute the correct carry.
- **The output inverter** for an even number of stages.
- **No variable-latency (clock-stretching) mode.** A variable-latency
  extension with a modified middle-stage adder is mentioned but not
  specified, so none is provided.

Baseline adders used for comparison are not included: the multiplexer-based
conventional carry skip adder and the ripple-carry version of this
structure. Power and timing figures are not reproduced either. This is
functional RTL only. The compound gates appear as Boolean expressions, and a
synthesis tool is free to map them onto any cells.

## Verification

Each testbench checks its block against integer arithmetic, counts its checks
and ends with a line `TB_RESULT checks=<n> failures=<n>`. Each also has a
watchdog.

| testbench | what it covers |
|---|---|
| `tb_ks_adder` | exhaustive at W = 4, 5 and 8 |
| `tb_incrementation_block` | exhaustive at W = 4 and 6 |
| `tb_skip_logic` | exhaustive, AOI and OAI, against `C | (&Z & CO)` |
| `tb_cska_stage` | exhaustive AOI and OAI stages; the skip case must occur |
| `tb_cska_ksa` | default 20-bit adder, see below |
| `tb_cska_ksa_configs` | exhaustive N=8/M=2 (even Q, so the output inverter is used) and N=6/M=6 (single stage); random N=16/M=8 and N=12/M=3 |

`tb_cska_ksa` runs these vectors:

- the two reference additions, `FFFFF + FFFFF = 1_FFFFE` and
  `AAAAA + AAAAA = 1_55554`, including each upper stage's intermediate result
  (`1110` and `0100`) and adder carry;
- all-propagate operands (`a + ~a + 1`);
- 200,000 random and propagate-biased vectors.

It counts how often each carry mechanism decided an upper stage's carry:
generate, skip, carry stopped, and increment. It also counts how often a
carry crossed every skip gate. Every count must be non-zero.

Each block's testbench was also run against a deliberately broken copy of the
block, and it failed there. Examples of the breaks: the carry in dropped from
the prefix tree, OR in place of AND in the skip gate, and skip gates shifted
by one stage.

## Simulating

With Verilator 5 (the testbenches use `#` delays, so `--timing` is needed):

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/cska_pkg.sv rtl/half_adder.sv rtl/ks_adder.sv rtl/incrementation_block.sv \
  rtl/skip_logic.sv rtl/cska_stage.sv rtl/cska_ksa.sv tb/tb_cska_ksa.sv \
  --top-module tb_cska_ksa -o sim && ./obj_dir/sim
```

To run another testbench, replace the last file and `--top-module`. Each run
takes well under a second. To change the size, set `N` and `M` on
`cska_ksa`; keep N a multiple of M. Lint with
`verilator --lint-only -Wall` on the same file list. Two warnings are
expected: the open incrementer carry pin and the unused last-level propagate.

## Files

- `rtl/cska_pkg.sv`: the skip-gate enum and the per-stage gate choice
- `rtl/cska_ksa.sv`: the top level
- `rtl/cska_stage.sv`: one upper stage
- `rtl/ks_adder.sv`: the Kogge-Stone adder
- `rtl/skip_logic.sv`: the AOI/OAI skip gate
- `rtl/incrementation_block.sv`: the half-adder incrementer
- `rtl/half_adder.sv`: the half-adder cell
- `tb/`: one testbench per block, plus `tb_cska_ksa_configs`
