# Shared logic BIST with a low-power test pattern generator

When a chip is split into many logic blocks, each block could get its own
built-in self-test (BIST) generator. Often several blocks want tests of the
same kind, though. Such blocks can form a **group** that shares one
generator: one LFSR, one set of biasing gates and one list of seeds drive all
blocks of the group at once. Each block keeps only its own signature
register. This RTL builds such a group. It has four 4-bit ripple carry adders
as circuits under test, one shared pattern generator, one response analyzer
and one control unit.

The pattern generator has two parts:

* a **low-power LFSR**. It puts three intermediate vectors between every two
  successive LFSR vectors. A bit that changes between two LFSR vectors then
  changes over four smaller steps. The total number of input transitions
  stays the same, but no single step switches as many inputs, so peak
  switching in the circuit under test falls.
* **input biasing gates**, taken from on-chip generation of functional
  broadside tests. Each primary input gets its own D bits of the LFSR. If that
  input should mostly be 0, an AND of MOD of those bits drives it. If it should
  mostly be 1, an OR drives it. With no preference, one bit drives it directly.

```
              seed_i ─┐
                      v
   ┌──────────── fbt_tpg (shared) ─────────────┐
   │ lp_lfsr (D*N_PI bits) ─> AND/OR per input │── a(u) ──┬──────────┬─── ... G blocks
   └───────────────────────────────────────────┘          v          v
                 ^                                 [mux test/func] [mux]
                 │ load / en                             v          v
            bist_ctrl ── misr_clr/en ──────────>  rca ─> misr   rca ─> misr
            (mod-L     ── tra_check ─┐                     │           │
             counter,                v                     v           v
             irq)  <── error ──── tra  <── golden_i, blk_en_i ── signatures
```

## The low-power LFSR (`lp_lfsr`)

This block takes the most care to understand. Take an N-bit register ff1..ffN
(N even, H = N/2) that shifts from ff1 towards ffN. The feedback is
`ff1 <= ff1 xor ffN`. A conventional LFSR clocks all N flops at once. This one
clocks the two halves separately. An extra **shaded flop** carries ffH across
the boundary. It captures ffH when the first half shifts and feeds ffH+1 when
the second half shifts. So four steps move the register by exactly one
conventional shift.

Each step produces one output vector:

| step | flops clocked        | first half of output | second half of output |
|------|----------------------|----------------------|-----------------------|
| T    | ff1..ffH, shaded     | flops                | flops                 |
| Ta   | none                 | flops                | injector              |
| Tb   | ffH+1..ffN           | flops                | flops                 |
| Tc   | none                 | injector             | flops                 |

The **injector** of a half compares each flop with the value at its D input,
which is the value it will take at the next shift:

* where the two agree, the flop's value goes out;
* where they differ, the random bit R goes out. R is the output of ffN.

A bit that is about to toggle therefore shows R for one vector before it
takes its new value. That gives one transition before the shift or one after
it, never two. Over T(k) → Ta → Tb → Tc → T(k+1), each bit changes at most
once, and only if it differs between T(k) and T(k+1). `tb_lp_lfsr` checks this
on an 18-bit instance.

Worked example with N = 8 and seed `0100 1011` (ff1 on the left):

| vector | value       | how                                                      |
|--------|-------------|----------------------------------------------------------|
| seed   | `0100 1011` | loaded                                                   |
| T1     | `1010 1011` | first half shifts, ff1 = 1 xor 0; shaded = old ff4 = 0   |
| Ta     | `1010 1111` | second half 1011 against next 0101, R = ff8 = 1          |
| Tb     | `1010 0101` | second half shifts, ff5 takes shaded 0                   |
| Tc     | `1111 0101` | first half 1010 against next 0101, R = 1                 |
| T2     | `0101 0101` | first half shifts, ff1 = 1 xor 1 = 0                     |

Bit order in the RTL: `q[N-1]` is ff1 and `q[0]` is ffN, so this table's strings
read directly as binary literals. `load` sets the flops and `out` to `seed`,
clears the shaded flop and starts at step T. Each cycle with `en` high
registers the next vector on `out`. `phase` tells which step comes next.

The feedback `ff1 xor ffN` is the one the worked example uses. It is not
maximal length: the period is 63 for N = 8 and 253,921 for N = 18. That does
not matter for runs of L = 64 vectors. The `TAPS` parameter (a mask in the same
bit order) selects other feedback. An all-zero seed locks up, as in any XOR
LFSR.

## Biasing the primary inputs (`fbt_tpg`)

`fbt_tpg` wraps an `lp_lfsr` of `D*N_PI` bits. Primary input j owns the LFSR
bits `[j*D +: D]`. The parameter `CUBE` holds a 2-bit `cube_t` per input
(`bist_pkg`):

* `CUBE_0`: the input is the AND of the lowest MOD bits of its slice, so it is
  1 with probability about 2^-MOD;
* `CUBE_1`: the input is the OR of those bits, so it is 0 with probability
  about 2^-MOD;
* `CUBE_X`: the input is bit 0 of its slice.

In functional broadside testing the preferred value of an input is the one
that synchronizes fewer state variables. Biasing towards it keeps the
circuit from falling into the same state again and again. All blocks of a
group use the same cube and the same gates. The adders used here have no
state, so the default cube is all `CUBE_X`. The end-to-end testbench sets an
AND on `a[0]` and an OR on `b[3]` to exercise both gates.

## One test run (`bist_ctrl`)

Hold `test_mode_i` high. Then pulse `start_i` with `seed_i`, `blk_en_i` and
`golden_i` already stable. The control unit steps through:

| state | cycles | actions                                                      |
|-------|--------|--------------------------------------------------------------|
| LOAD  | 1      | load seed into the LFSR, clear MISRs and analyzer results    |
| RUN   | L      | vector a(u), u = 0..L-1 (modulo-L counter), MISR captures    |
| CHECK | 1      | analyzer compares signatures                                 |
| DONE  | 1      | `done_o` high; `irq_o` set if any enabled block failed       |

`done_o` rises L+2 clock edges after the edge that samples `start_i`. The
first vector applied, a(0), comes from the seed itself. After that come T1,
Ta, Tb, Tc, T2, and so on. `irq_o` stays high until `irq_clear_i` is pulsed,
and an error in the same cycle wins over the clear. Dropping `test_mode_i`
aborts a run. To apply several seeds, start several runs, each with the
expected signatures for its seed.

## Signatures, analyzer and subgroups (`misr`, `tra`)

Each block has an 8-bit Galois MISR with polynomial x^8+x^4+x^3+x^2+1. It
compacts that block's `{cout, sum}` once per RUN cycle. The analyzer compares
each enabled block's signature with `golden_i[g]` and latches `fail_o[g]`.
The expected signatures come from fault-free simulation of the same seed,
computed off line.

`blk_en_i` selects the **subgroup** under test. A disabled block keeps its
functional inputs, its MISR is not clocked and it cannot fail. This covers
two cases: testing only part of the group when power limits how many blocks
may switch together, and skipping a block already found faulty.

## Circuit under test (`rca`, `full_adder`)

The circuit under test is an N-bit ripple carry adder (N = 4) built from full
adders. Its delay grows linearly with N, about (N-1)·t_carry + t_sum. The top
maps the generator's vector onto the adder as `{cin, b, a}`, so N_PI = 2N+1 = 9
and the LFSR has D·N_PI = 18 bits. For demonstration, `flt_en`, `flt_sel` and
`flt_val` force the carry leaving one stage to a stuck-at value. Tie `flt_en`
low in real use.

## Parameters of `sharing_bist_top`

| name  | default | meaning                                           |
|-------|---------|---------------------------------------------------|
| N     | 4       | adder width                                       |
| G     | 4       | blocks in the group                               |
| D     | 2       | LFSR bits per primary input                       |
| MOD   | 2       | inputs of each biasing gate (1 ≤ MOD ≤ D)         |
| L     | 64      | vectors per seed (length of the input sequence)   |
| SIG_W | 8       | MISR width                                        |
| CUBE  | all x   | preferred value per primary input                 |

Only N = 4 and the 8-bit LFSR of the worked example come from the published
method. The method names G, D, MOD and L but gives no values, so those
defaults are this design's choices, and so are the MISR and the port set.

## How far this follows the method, and what is left out

Taken from the method:

* the low-power LFSR, step by step, including its feedback and R;
* one slice of D LFSR bits per primary input, with AND/OR biasing gates chosen
  by a cube;
* one generator, one set of gates and one set of seeds shared by a group;
* a modulo-L counter per sequence;
* the TPG / response analyzer / control unit split, with test/normal mode,
  an interrupt and an interrupt clear;
* testing of subgroups;
* the ripple carry adder as circuit under test.

This design's own choices:

* a parallel seed port and a registered generator output;
* the control state sequence and its timing;
* the MISR;
* expected signatures supplied as inputs;
* the 2-bit cube encoding;
* which bits of a slice feed each gate;
* the stuck-at injection ports.

Not built:

* **Functional broadside test application.** The method scans the circuit's
  initial state Sinit and the seed in before each sequence. Every state the
  circuit passes through then serves as a launch state, and scan chains of
  equal length are shifted circularly (padded with dummy flip-flops). The
  adder here has no state, and the scan structure itself is not specified,
  so none of this is built. Seeds arrive in parallel instead.
* **Group and seed selection.** Choosing the groups, the seeds (random seeds
  until Q sequences in a row add no coverage) and the per-block subsets of
  seeds is an off-line fault-simulation procedure. Its results enter through
  `seed_i`, `golden_i` and `blk_en_i`.
* **Gate count.** The method counts at most n+1 gates for n inputs. This RTL
  uses at most one gate per input plus the LFSR's feedback XOR.

## Simulation

Every file in `rtl/` and `tb/` holds one module or package. `bist_pkg` must be
read first. Each testbench checks its block against an independent model,
prints `TB_RESULT checks=<n> failures=<n>` and has a cycle watchdog. With
plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/bist_pkg.sv \
          tb/tb_sharing_bist_top.sv --top-module tb_sharing_bist_top
./obj_dir/Vtb_sharing_bist_top
```

| testbench             | what it shows                                                     |
|-----------------------|-------------------------------------------------------------------|
| `tb_full_adder`       | all 8 input combinations                                          |
| `tb_rca`              | all 512 sums; every stuck-at carry fault against a reference      |
| `tb_lp_lfsr`          | the worked example; a flop-level model; the transition budget     |
| `tb_fbt_tpg`          | gate outputs per cube entry; the AND/OR bias in 1-frequencies     |
| `tb_misr`             | bit-level compaction model; a single-bit error changes the signature |
| `tb_tra`              | per-block fail flags with random enables                          |
| `tb_bist_ctrl`        | latency L+2, exactly L generator cycles, interrupt set and clear, abort |
| `tb_sharing_bist_top` | G=3, L=20, biased cube. Every vector a(u) against a model of the whole BIST. Fault detection, interrupt, subgroup run, normal mode, abort; each counted, none allowed to be missing |
| `tb_full_size`        | the top at its default parameters: one passing run and one run that catches a stuck-at-1 carry in block 3 |

All of them finish in well under a second.
