# CRIN BIST: a clustered reconfigurable-interconnection-network pattern generator

Built-in self-test (BIST) with a plain LFSR cannot reach test cubes that have many
specified bits: such random-pattern-resistant cubes almost never appear in a
pseudo-random stream. A reconfigurable interconnection network (RIN) helps: a
small multiplexer network between the LFSR and the scan chains is switched between
a handful of *configurations*, each configuration connecting the scan chains to a
different set of LFSR stages, so that the stream produced in each configuration
contains ("embeds") a different part of the deterministic test set.

The clustered variant (CRIN) adds one idea. Before the hardware is built, the scan
cells of the circuit are reordered so that cells whose specified bits are mostly 0
land together in some chains (the **AND-Chains**), cells whose specified bits are
mostly 1 land in others (the **OR-Chains**), and the rest form the **LFSR-Chains**.
The AND-Chains are then fed not by the LFSR but by 2-input AND gates on LFSR
stages, whose output is 1 only a quarter of the time; the OR-Chains are fed by
2-input OR gates, whose output is 1 three quarters of the time. Weighted streams
match weighted cubes far more often, and because the specified bits have been
pulled into the AND- and OR-Chains, the LFSR-Chains see more don't-care bits and
are also matched more easily. The result is fewer configurations, fewer BIST
patterns and less stored control data than the unclustered RIN.

This repository holds synthesizable SystemVerilog for the on-chip generator and
self-checking testbenches for every block. The offline part, the scan-cell
reordering, is software and is described but not included (see
[The offline step](#the-offline-step-that-produces-the-numbers)).

## Block diagram

```
                 +----------------------+      +------------------------+
                 | stored control bits  |----->| pattern counter        |
                 | (crin_control_store) |      | (crin_pattern_counter) |
                 +----------------------+      +-----------+------------+
                            ^ cfg                          | advance
                            |                  +-----------v------------+
                            +------------------| configuration counter  |
                                               | (crin_config_counter)  |
                                               +-----------+------------+
                                                           | C_0..C_{d-1}
                                               +-----------v------------+
                                               | d-to-g decoder         |
                                               +-----------+------------+
                                                           | D_0..D_{g-1} (one-hot)
     +------+   +-----------+   +-----------+              |
     |      |-->| AND Block |-->| RIN (AND) |<-------------+----> AND-Chains  (NUM_AND)
     |      |   +-----------+   +-----------+              |
     | LFSR |------------------>| RIN (LFSR)|<-------------+----> LFSR-Chains (NUM_LFSR)
     |      |   +-----------+   +-----------+              |
     |      |-->| OR Block  |-->| RIN (OR)  |<-------------+----> OR-Chains   (NUM_OR)
     +------+   +-----------+   +-----------+
```

Every scan chain is `CHAIN_LEN` cells long. Chains are numbered AND-Chains first,
then LFSR-Chains, then OR-Chains.

| Module | Role |
|---|---|
| `crin_pkg` | default sizes (the s5378 instance) and the LFSR choice |
| `crin_lfsr` | L-stage Galois LFSR, all stages brought out |
| `crin_and_block`, `crin_or_block` | banks of LFSR-tapped 2-input AND / OR gates |
| `crin_rin` | multiplexer switch network, one row of the connection table per configuration |
| `crin_scan_chain` | shift-in side of one scan chain of the circuit under test |
| `crin_decoder` | d-to-g decoder, configuration number to one-hot lines |
| `crin_config_counter` | d-bit configuration counter with end-of-session flag |
| `crin_pattern_counter` | per-configuration pattern counter and shift/capture sequencer |
| `crin_control_store` | ROM of per-configuration pattern counts |
| `crin_bist` | top level: the complete generator driving all chains |

## The reconfigurable interconnection network

This is the part that carries the test data, and the one to understand before
changing anything.

`crin_rin` has `NUM_IN` source bits, `NUM_OUT` chain inputs and `NUM_CFG`
configurations. For each configuration *k* and chain *j* a table entry names the
source bit that drives chain *j* while configuration *k* is active. The decoder
raises exactly one line `d[k]`, and each chain input is an AND-OR multiplexer:

    chain_in[j] = OR over k of ( d[k] AND src[SEL_TABLE[k][j]] )

so a configuration switch is instantaneous and purely combinational. With no line
raised (outside a session), all chain inputs are 0.

The table is the parameter `SEL_TABLE`, packed as `NUM_CFG*NUM_OUT` fields of
`IDX_W = ceil(log2 NUM_IN)` bits, field (k, j) at bit offset `(k*NUM_OUT + j)*IDX_W`.
In a real design the table comes out of the embedding simulation described
below: it is different for every circuit and every test set. **The default table
is a placeholder** that merely exercises the hardware: chain *j* takes source
`(j + k*NUM_OUT) mod NUM_IN` in configuration *k*, so consecutive configurations
use different source stages. `crin_bist` instantiates three RINs (AND, LFSR and
OR groups) and takes their tables as its parameters `AND_SEL`, `LFSR_SEL` and
`OR_SEL`, in the same packed format; a group's chain *j* is its local index
(AND-Chain 0 is chain 0, LFSR-Chain 0 is chain `NUM_AND`, and so on).

All three RINs see all 32 LFSR stages (or all 32 gate outputs), which gives each
table entry 32 choices. The number of gates in the AND and OR Blocks and the
stages they tap are this design's choice: gate *i* combines stages *i* and
*(i + L/2 - 1) mod L*, which gives 32 distinct tap pairs for L = 32.

## One BIST session, cycle by cycle

A one-cycle `start` while idle begins a session: the LFSR is reloaded with its
seed and the configuration counter goes to 0. Then, for each configuration *k*:

1. **Preset cycle.** The pattern counter loads the count stored for *k*.
2. **Patterns.** For each pattern, `CHAIN_LEN` cycles with `shift_en` high: every
   chain takes one bit from its RIN output and the LFSR steps once. Then one cycle
   with `capture` high: all chains now hold the complete pattern (`chain_cells`),
   and the count goes down by one.
3. **Switch.** At the capture of the configuration's last pattern the pattern
   counter pulses `advance`; the configuration counter steps to *k+1*, the
   decoder moves its one-hot line, and the next preset cycle follows.

An `advance` in the last configuration raises `done` instead, and the pattern
counter returns to idle. `busy` is high for exactly

    NUM_CFG + TOTAL_PATTERNS * (CHAIN_LEN + 1) + 1   cycles,

which is 1 492 036 cycles for the default instance. The LFSR is not reseeded
between configurations; only a new `start` does that, so every session produces
the same patterns.

`capture` marks the cycle in which the circuit under test would capture its
response. Response capture and compaction (a MISR, for example) are not part of
this generator and are not modelled; `scan_out` is brought out for them.

## Stored control bits

The only stored data is one pattern count per configuration, `PCNT_W` bits wide,
addressed by the configuration number.
The RIN tables are hard-wired into the multiplexers, not stored. This matches the
reported storage figures, which are always the number of configurations times 17
or 18 bits; for s5378, 11 configurations x 17 bits = 187 bits, hence the default
`PCNT_W = 17`.

Only the total pattern count of each circuit is known (186 503 for s5378), not its
split over configurations. The default contents of `crin_control_store` therefore
split the total as evenly as possible (16 955 patterns for configurations 0-8,
16 954 for 9 and 10). Real counts come from the embedding simulation; pass them as
`PATTERN_COUNTS` to `crin_bist` (word *k* at bit offset `k*PCNT_W`). A count of 0
is not allowed and is flagged by an assertion.

## The offline step that produces the numbers

Everything circuit-specific is computed before the hardware is generated:

* **Signal probabilities.** For each scan cell, the fraction of 1s among the
  specified values it takes in the first third of the test cubes (cubes sorted by
  decreasing number of specified bits).
* **Grouping.** Cells are sorted by that probability. Cells at or below 0.25 form
  the AND-Chains, cells above 0.75 the OR-Chains, the rest the LFSR-Chains. The
  group sizes become `NUM_AND`, `NUM_LFSR`, `NUM_OR`.
* **Spreading.** Within each group, simulated annealing swaps cells between chains
  to even out the number of specified bits per chain in every cube (the cost is the
  mean, over cubes, of the standard deviation of the per-chain specified-bit
  counts), so that each chain's slice of a cube has as many don't-cares as
  possible. Swaps stay within a group, so the groups keep their character.
* **Embedding.** A simulation of this generator then picks the configurations
  (the RIN tables) and the number of patterns in each, allowing at most 5 000
  pseudo-random patterns between two embedded cubes.

None of this is in the RTL; it shows up only as the parameters above.

## Parameters and sizing for other circuits

`crin_bist` defaults to the s5378 instance: 32 chains of 7 cells, groups
(11, 18, 3), 11 configurations, 186 503 patterns. The LFSR is 32 stages with the
primitive polynomial x^32 + x^22 + x^2 + x + 1 and seed 1; its length and
polynomial are this design's choice, since none is specified for the scheme.

| Parameter | Default | Meaning |
|---|---|---|
| `NUM_AND`, `NUM_LFSR`, `NUM_OR` | 11, 18, 3 | chains per group |
| `CHAIN_LEN` | 7 | cells per chain |
| `NUM_CFG` | 11 | configurations *g*; counter width *d* = ceil(log2 *g*) |
| `PCNT_W` | 17 | bits per stored pattern count |
| `TOTAL` | 186503 | patterns, used for the default `PATTERN_COUNTS` |
| `LFSR_LEN`, `LFSR_POLY`, `LFSR_SEED` | 32, `32'h0040_0007`, 1 | pattern source (Galois form, x^L implied) |
| `PATTERN_COUNTS` | even split of `TOTAL` | stored control bits |
| `AND_SEL`, `LFSR_SEL`, `OR_SEL` | rotation placeholder | RIN connection tables |

Reported instances for the ISCAS'89 benchmarks, all with 32 chains (only the
first one fits the defaults; the others need the parameters in the row):

| Circuit | Scan cells | `CHAIN_LEN` | Groups (AND, LFSR, OR) | `NUM_CFG` | Patterns | `PCNT_W` |
|---|---|---|---|---|---|---|
| s5378 | 214 | 7 | (11, 18, 3) | 11 | 186 503 | 17 |
| s9234 | 247 | 8 | (12, 12, 7) * | 16 | 296 770 | 17 |
| s13207 | 700 | 22 | (18, 11, 3) | 6 | 157 895 | 18 |
| s15850 | 611 | 20 | (16, 12, 4) | 25 | 356 231 | 18 |
| s35932 | 1763 | 56 | (17, 13, 2) | 3 | 19 983 | 15 |
| s38417 | 1664 | 52 | (12, 17, 3) | 133 | 1 225 964 | 18 |
| s38584 | 1464 | 46 | (9, 19, 4) | 8 | 265 469 | 18 |

\* The s9234 groups add up to 31 chains as reported; they are used as given.
`PCNT_W` is the reported storage divided by the number of configurations.

## Where this design fills gaps

The architecture fixes the blocks, their connections, the gate types of the
weighting blocks, the one-hot control of the RINs by a d-to-g decoder, and a
pattern counter preset per configuration that triggers the configuration counter.
The following are this design's own choices:

* LFSR length, polynomial, seed and Galois form; the LFSR steps only on shift
  cycles.
* Number of gates in the AND and OR Blocks and their taps.
* The placeholder RIN tables and the even split of patterns over configurations.
* The sequencing: one preset cycle per configuration, `CHAIN_LEN` shift cycles and
  one capture cycle per pattern.
* The configuration counter is described as cycling through all 2^d codes. When
  *g* is not a power of two (11 here), codes *g*..2^d-1 select nothing, so the
  session ends after *g* configurations instead.
* `start`/`busy`/`done` handshake, an asynchronous active-low reset on every
  register, and an enable on the decoder so that the RINs are idle outside a
  session.
* Scan chains are modelled on the shift-in side only.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_crin_lfsr` | full 255-state period of an 8-stage instance; hand-worked first states of the 32-stage default; 2000 steps against polynomial arithmetic; hold and reload |
| `tb_crin_and_block`, `tb_crin_or_block` | every gate output on random words; ones (zeros) fraction within 22-28 % |
| `tb_crin_rin` | an explicit 3-configuration table and the default 11-configuration network, all one-hot and all-zero controls |
| `tb_crin_scan_chain` | cell contents and `scan_out` against a shift history, with gated shifting |
| `tb_crin_decoder` | all 16 codes, enable high and low |
| `tb_crin_config_counter` | counting, `last`, `done` at the end, clear, two sessions |
| `tb_crin_control_store` | default counts and their sum; explicit contents |
| `tb_crin_pattern_counter` | shifts per pattern, capture, `advance` timing, `remaining`, session length, halt |
| `tb_crin_bist` | reduced instance (3+4+2 chains of 5 cells, 8-stage LFSR, 3 configurations of 40/25/60 patterns, explicit RIN tables): every scan input bit and every pattern against an independent model, per-configuration counts, session length, weighting of the groups, repeatability after a restart, and that every mechanism occurred |
| `tb_crin_bist_full` | the same checks on the unmodified default instance, two complete sessions of 186 503 patterns each |
| `tb_crin_bist_workloads` | the six other benchmark instances side by side, each with a tenth of its reported patterns: counts, session length, one-hot control, weighting |

Observed in the full-size run: ones make up 24.9 % of the AND-Chain bits, 50.0 % of
the LFSR-Chain bits and 75.0 % of the OR-Chain bits.

To simulate with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_crin_bist_full \
    -y rtl -y tb +libext+.sv rtl/crin_pkg.sv tb/tb_crin_bist_full.sv -o sim
./obj_dir/sim
```

Replace the top module and file for any other testbench. The full-size run takes
a few seconds; `tb_crin_bist_workloads` about a minute.

## Limits

* The RIN tables and per-configuration pattern counts are placeholders until
  they are produced by the reordering and embedding software for a real circuit;
  the hardware is exact, the default contents are not the reported ones.
* No response compaction and no capture path into the scan chains.
* The weighting blocks use one fixed tap pattern; any pair of distinct stages
  gives the same 1/4 (3/4) weighting.
