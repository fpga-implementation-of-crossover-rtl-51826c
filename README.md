# In-place PMX crossover for TSP tours

This is a hardware crossover unit for a genetic algorithm that solves the
travelling salesman problem. A tour of M cities is a permutation of the city
numbers 0..M-1. The unit takes two parent tours and produces two child tours
with partially-mapped crossover (PMX), so that every child is again a valid
permutation.

The architecture follows the paper *FPGA Implementation of Crossover Module of
Genetic Algorithm* (N. Attarmoghaddam, K. F. Li, A. Kanan). It rests on two
ideas:

* **In-place children.** The children are written over the parents. Only two
  chromosome memories and one temporary memory are needed: 3·M·(⌈log₂M⌉+1)
  flip-flops in all, instead of separate parent and offspring memories.
* **Associative search.** Each stored gene has its own comparator, like the tags
  of a fully associative cache. Asking "is city x in the crossover segment,
  and where?" therefore takes one clock cycle, whatever the segment length.

The default build handles 1024-city tours (`M = 1024`). It has been simulated
at 6, 16, 40, 128, 256, 512 and 1024 cities.

## PMX in one paragraph

Two cut points `cp1 <= cp2` split each tour into three pieces: a **top** part
(positions `0..cp1-1`), the **mapping segment** (`cp1..cp2`) and a **bottom**
part (`cp2+1..M-1`). Child 1 gets parent 2's segment. Its top and bottom come
from parent 1, position by position. If parent 1's city `x` already occurs in
the inherited segment at position `j`, then `x` is replaced by parent 1's city
at `j`. That city is checked again, and the replacement repeats until a city
is found that the segment does not contain. Child 2 is built the same way with
the parents' roles swapped. Example with cut points 1 and 4:

```
parent 1 = 3 | 0 1 4 5 | 2        child 1 = 0 | 1 3 5 4 | 2
parent 2 = 2 | 1 3 5 4 | 0        child 2 = 2 | 0 1 4 5 | 3
```

In child 1, the leading 3 clashes with the segment (3 sits at segment position
2). It is replaced by parent 1's city at position 2, which is 1. City 1 also
clashes (position 1), so it becomes 0, which is free.

## How the two memories are reused

This is the part that takes the most care. Name the pieces of parent 1
P1 (top), P2 (segment) and P3 (bottom), and the pieces of parent 2 P4, P5
and P6.

| memory   | holds at start | holds at end | kept in place |
|----------|----------------|--------------|---------------|
| memory 0 | parent 1       | child 2      | P2            |
| memory 1 | parent 2       | child 1      | P5            |
| temp     | (nothing)      | copy of P4 and P6 | -        |

1. **Save.** P4 and P6 are copied into the temporary memory, each word to the
   address it had in memory 1. The top and bottom copies run in parallel, one
   word of each per cycle. This takes `max(cp1, M-1-cp2)` cycles.
2. **Child 1 into memory 1.** For each top position, then each bottom
   position, `k`:
   * read parent 1's city at `k` from memory 0;
   * search memory 1's segment, which is P5;
   * on a match at `j`, take memory 0's city at `j`, which is P2;
   * write the final city to memory 1 at `k`.

   This destroys P4 and P6 in memory 1, which is why they were saved first.
3. **Child 2 into memory 0.** For each top and bottom position `k`:
   * read parent 2's city at `k` from the temporary memory;
   * search memory 0's segment, which is P2;
   * on a match at `j`, take memory 1's city at `j`, which is P5;
   * write the final city to memory 0 at `k`.

Both segments, P2 and P5, are never written, so each step finds the mapping
it needs. Memory 0's top and bottom are not read again after step 2, so
overwriting them in step 3 is safe.

## The associative comparator array (`assoc_cmp`)

M comparators each test `cells[j] == key`. A comparator can only fire if
`cp1 <= j <= cp2`. In a valid tour a city occurs at most once, so the match
position is simply the OR of the indices whose comparator fired; no priority
encoder is needed. A second output, `multi_hit`, detects two or more matches
with `|(match & (match-1))`. The top level keeps this as a sticky `bad_tour`
flag: it can only rise if a parent was not a permutation. With an invalid
parent the mapping chain may never end, so such a run should be aborted with
reset.

## Controller (`pmx_ctrl`)

The controller has 17 states: `Idle`, `COPY_SMPL`, four groups of
`CMP1 / CMP2 / COUNT` (one group for each of `TOP_1`, `BTM_1`, `TOP_2` and
`BTM_2`, the four parts to fill), `Delay1`, `Delay2` and `Finish`. Each
position `k` of a part goes through:

| state | comparator key | match found                                    | no match |
|-------|----------------|------------------------------------------------|----------|
| CMP1  | source city at `k` | load mapped city into `cur`, go to CMP2    | load source city into `cur`, go to COUNT |
| CMP2  | `cur`          | load next mapped city, stay in CMP2            | write `cur` at `k`; next `k` (CMP1) or next part |
| COUNT | -              | -                                              | write `cur` at `k`; next `k` (CMP1) or next part |

So a position costs 2 cycles if it needs no replacement or one, and one more
cycle for each further replacement in its chain. `Delay1` and `Delay2` each
take one cycle to move `k` from the top part to `cp2+1`. `Finish` raises
`done` for one cycle and returns to `Idle`. The three counters are `k`, plus
`ct` and `cb` for the top and bottom words of the copy step.

Total latency, from the clock edge that samples `start` to the end of the
`done` cycle:

```
max(cp1, M-1-cp2)                              copy
+ sum over the 2·(M - (cp2-cp1+1)) filled positions of (2 + max(0, chain-1))
+ 2                                            Delay1, Delay2
+ 1                                            Finish
```

Here `chain` is the number of replacements a position needs. The latency
depends on the cut points and on the parents: a wider segment means fewer
positions to fill, but longer chains.

## Interface (`pmx_crossover`)

| port | dir | width | use |
|------|-----|-------|-----|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `ld_we`, `ld_sel`, `ld_addr`, `ld_data` | in | 1, 1, AW, W | write a parent city while idle (`ld_sel` 0: memory 0 = parent 1, 1: memory 1 = parent 2) |
| `rd_sel`, `rd_addr` → `rd_data` | in/out | 1, AW → W | combinational read of memory 0 or 1 while idle |
| `start`, `cp1`, `cp2` | in | 1, AW, AW | start a crossover; needs `1 <= cp1 <= cp2 <= M-2` |
| `busy`, `done` | out | 1 | running; one-cycle end pulse |
| `bad_tour` | out | 1 | a segment held a city twice during this run |

`W = ⌈log₂M⌉+1` (11 bits at M = 1024) and `AW = ⌈log₂M⌉`. The extra bit of
`W` comes from the paper's storage count; valid cities never set it.

To use the unit:

1. Load both parents, one word per cycle, with `ld_we`.
2. Pulse `start` with the cut points.
3. Wait for `done`.
4. Read child 1 from memory 1 (`rd_sel = 1`) and child 2 from memory 0
   (`rd_sel = 0`).

An assertion flags any write through the load port while `busy` is high.
Another checks the cut-point range when a start is accepted. Hold `start`
low while `rst_n` is low.

## Measured speed

The testbenches ran random parent pairs: 20 random cut-point pairs plus three
extreme ones per size. They measured these cycles per crossover:

| cities | average | min | max | paper (approx., read from its plot) |
|--------|---------|-----|-----|-------------------------------------|
| 128    | 469     | 232 | 637 | ~460 |
| 256    | 829     | 226 | 1277 | ~960 |
| 512    | 1783    | 950 | 2557 | ~1840 |
| 1024   | 3715    | 716 | 5117 | ~3730 |

The paper does not say how it chose its cut points. These runs draw both cut
points uniformly from `1..M-2`.

Cost at M = 1024, from a generic synthesis:

* 22.5 k flip-flop bits in the two chromosome memories;
* 11 k bits in the temporary memory;
* 1024 11-bit equality comparators;
* about 2 k 10-bit range comparators that gate the equality comparators to
  the segment.

## Where this RTL departs from, or adds to, the paper

* **Host interface.** The paper does not define one. The load port, read
  port, start/done handshake and cut-point inputs are this design's own. The
  cut points are latched at `start`.
* **Cut-point convention.** The segment is `cp1..cp2` inclusive.
  `1 <= cp1 <= cp2 <= M-2` is required so that the top and bottom parts are
  never empty. The controller has no path for an empty part.
* **What the controller states do.** The paper names the states and gives
  their transition conditions. What each state does in a cycle, the role of
  the Delay states, and the meaning of the two counters besides `k` are this
  design's reading. The paper's state diagram draws no exit from
  `CMP2_BTM_2` to `Finish`. This RTL applies the same rule as in the other
  three parts: when the last position is written from CMP2, the run ends.
* **One temporary memory.** It is a single M-word array with two write
  ports, not two separate memories. Its size matches the paper's
  flip-flop count.
* **Tour length is a build parameter.** There is no run-time length
  register. A shorter tour can be run on a larger build by giving both
  parents the same padding cities at the same positions after `cp2`; those
  positions then come through unchanged, at 2 cycles each per child. The
  1024-city test does this with 128-city tours.
* **Added outputs.** The `bad_tour` check and the load-while-busy assertion
  are additions.
* **Not included.** The rest of the genetic algorithm is not part of this
  unit: population, fitness, selection, mutation and the random choice of cut
  points. Neither is the paper's reduced-comparator variant, which it
  discusses only as a worse alternative.

## Files

| file | content |
|------|---------|
| `rtl/pmx_pkg.sv` | state enum, gene-width function |
| `rtl/chrom_mem.sv` | flip-flop chromosome memory, all words visible |
| `rtl/temp_mem.sv` | temporary memory, two write ports |
| `rtl/assoc_cmp.sv` | M-way associative segment search |
| `rtl/pmx_ctrl.sv` | controller and counters |
| `rtl/pmx_crossover.sv` | top level |
| `tb/tb_chrom_mem.sv`, `tb/tb_temp_mem.sv`, `tb/tb_assoc_cmp.sv`, `tb/tb_pmx_ctrl.sv` | unit tests |
| `tb/pmx_driver.sv` | stimulus, software PMX reference and cycle-count model for the top level (optional padded short-tour runs) |
| `tb/tb_pmx_crossover.sv` | end-to-end test at 6 (worked example), 16 and 40 cities, including the `bad_tour` check |
| `tb/tb_pmx_sizes.sv` | 128, 256 and 512 cities, prints cycle statistics |
| `tb/tb_pmx_full.sv` | default 1024-city build, prints cycle statistics; also padded 128-city tours and `bad_tour` |

Every testbench checks its results itself and ends with a line
`TB_RESULT checks=N failures=F`. The top-level tests compare both children
gene by gene with a software PMX, check that each child is a permutation,
and check the exact cycle count against the formula above. They also count
how often each controller path was taken and fail if any never occurred:

* the copy step;
* a single replacement;
* a chained replacement;
* leaving a part from CMP2;
* leaving a part from COUNT;
* both Delay states;
* bad-tour detection, in the tests that load an invalid parent.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/pmx_pkg.sv tb/tb_pmx_crossover.sv --top-module tb_pmx_crossover
./obj_dir/Vtb_pmx_crossover
```

Replace `tb_pmx_crossover` with any other testbench name. The package file
must come first. The 1024-city test builds and runs in a few seconds. To
change the tour length, set `M`; `W` and `AW` follow from it.
