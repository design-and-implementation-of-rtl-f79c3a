# Genetic-algorithm path planner for a mobile robot, in hardware

This core finds a short, collision-free path for a robot across a 16 × 16
occupancy grid. The grid comes from a camera image. The search is a genetic
algorithm (GA) that runs entirely in logic:

- a population of 16 candidate paths is bred for 100 generations;
- each path is scored by its Manhattan length plus a penalty for every
  obstacle cell it crosses;
- roulette-wheel selection with elitism, single-point crossover and per-gene
  mutation improve the population;
- a free-running cellular-automaton random number generator supplies the
  randomness.

A host processor writes the map and the start and target cells into a small
register file, starts the run, and reads back the best path. One run at the
default size takes about 60,000 clock cycles, roughly 0.8 ms at 78 MHz.

The architecture follows a published FPGA design of this GA core. That design
was written in VHDL for a Xilinx Virtex-5 and sat next to a MicroBlaze
processor. This SystemVerilog is a re-creation of it, not the original. Where
the published description stops, the choices made here are listed in
[What is filled in](#what-is-filled-in-and-where-it-departs).

## A path and its chromosome

A path has six nodes: start, four free intermediate nodes, and target. Only
the four intermediate nodes evolve, so a chromosome is eight 4-bit genes:

```
bit 31                                            bit 0
 | x1 | y1 | x2 | y2 | x3 | y3 | x4 | y4 |
 gene 0                              gene 7
```

Consecutive nodes are joined by straight lines, so a path has five segments.
The 32-bit word is also the layout of the `Path_Coordinates` register.
`ga_pkg` defines it as `chrom_t`, a packed array `[0:7]` of 4-bit genes, with
gene 0 in the most significant nibble. The occupancy grid `grid_t` is indexed
`grid[y][x]`, and a 1 marks an obstacle.

## Scoring a path: `fitness_unit`

Lower fitness is better:

```
f = sum over segments ( |dx| + |dy| )  +  PENALTY × (obstacle cells crossed)
```

The Manhattan term is added when a segment is set up. The obstacle term needs
the cells the straight line really passes through. These come from
Bresenham's line algorithm, which uses only integer arithmetic:

- The unit holds the current cell, the segment end, `|dx|`, `-|dy|` and the
  error term `err`. It starts with `err = |dx| - |dy|`.
- Each clock it computes `e2 = 2·err`, steps x when `e2 ≥ -|dy|` and steps y
  when `e2 ≤ |dx|`. A diagonal step moves both.
- It looks up the new cell in the grid, adds `PENALTY` if the cell is an
  obstacle, and repeats until it reaches the segment end.

A segment therefore costs one set-up cycle plus `max(|dx|,|dy|)` stepping
cycles. A whole chromosome costs `5 + Σ max(|dx|,|dy|)` cycles, between 5 and
80. The cells tested are those the line enters after leaving a node, up to and
including the next node. The start cell is never tested.

`PENALTY` defaults to 100. With a penalty that large, every collision-free
path scores better than any colliding one on this grid, since the worst
collision-free path costs 5 × 30 = 150. A real robot's paths then sort into
"feasible by length" first, with colliding ones far behind.

## One generation: `ga_core`

The engine is one state machine. It steps through the operators in turn and
keeps three arrays in flip-flops: the population `pop`, the next population
`nxt`, and the fitness `fit`.

| stage | unit | what happens | cycles (POP = 16) |
|---|---|---|---|
| INIT (once) | `init_population` | two random words per chromosome | 33 |
| FIT | `fitness_unit` | score chromosomes 0..15 one after another | Σ (7 + path cells), ≈ 520 |
| SEQ | `pop_sequencer` | rank sort; best/worst index and fitness | 3 |
| ELITE | – | best chromosome → `nxt[0]` | 1 |
| SEL | `selection_unit` | build the wheel (16), then 16 spins fill the mating pool | 34 |
| MATE / XO | `crossover_unit` | parents from pool[2k], pool[2k+1]; children → `nxt[2k+1]`, `nxt[2k+2]` | 3 per pair, 24 |
| MUT | `mutation_unit` | one offspring (slot 1..15, from `rnd[15:12]`) mutated gene by gene | 10 |
| NEXT | – | `pop ← nxt`, generation + 1 | 1 |

These are the counts measured in the full-size testbench. A generation takes
about 600 cycles, and a run of 100 generations about 60,000. The table below
compares them with the per-operator times reported for the reference core at
78 MHz (12.8 ns per cycle):

| operator | reference core | this RTL at 78 MHz |
|---|---|---|
| initial population | 0.82 µs | 0.42 µs |
| fitness (16 chromosomes) | 4.10 µs | ≈ 6.7 µs |
| population sequencer | 0.05 µs | 0.04 µs |
| selection | 0.92 µs | 0.44 µs |
| mating + crossover | 0.05 + 0.10 µs | 0.31 µs |
| mutation | 0.20 µs | 0.13 µs |
| 100 generations | 594 µs | ≈ 770 µs |

The last pair's second child has no slot and is dropped. Slot 0 holds the
elite, so the best fitness can never get worse. An assertion in `ga_core`
checks this in simulation.

After the initial population has been scored, 100 rounds of breeding follow.
The final population is scored as well. Its best member is reported on `done`
through `best_path` and `best_fit`. These two outputs also follow the best
member of each generation while the run goes on.

Fitness evaluation is serial and dominates the run time, at about 85 % of the
cycles. Several `fitness_unit` instances working on different chromosomes
would be the natural way to speed the core up. The published design does not
describe how its fitness stage is organised.

## Randomness: `lca_rng`

The random number generator is a 16-cell linear cellular automaton with null
boundaries:

- cells 0, 2 and 4 follow rule 150: `s_i' = s_{i-1} ^ s_i ^ s_{i+1}`;
- all other cells follow rule 90: `s_i' = s_{i-1} ^ s_{i+1}`.

This rule vector (`RULE150 = 16'h0015`) gives the maximum cycle length of
2^16 − 1 states, and the testbench checks that. The state advances on every
clock whether or not anyone uses it. Each operator reads its own field of the
current word:

| user | bits |
|---|---|
| selection spin | `rnd[7:0]` |
| crossover point | `rnd[10:8]` |
| mutation compare / new gene | `rnd[7:0]` / `rnd[11:8]` |
| offspring to mutate | `rnd[15:12]` |
| initial population | all 16 bits (four genes per word) |

## Selection: `pop_sequencer` and `selection_unit`

`pop_sequencer` sorts by rank. In one cycle all 16 chromosomes count how many
others beat them: lower fitness, or equal fitness and a lower index. That
count is their rank. In the next cycle each index is written to the slot of
its rank. The result is `order[0..15]`, best first, plus the best and worst
index and fitness.

`selection_unit` is a roulette wheel for a fitness that is minimised:

- Chromosome *i* gets a slot of width `max_fit − fit_i + 1`.
- The wheel is laid out in sorted order, one slot per clock, and the running
  sums are stored.
- A spin scales an 8-bit random number to the wheel:
  `ptr = (rnd8 × total) >> 8`.
- All 16 running sums are compared with `ptr` at once. The first sum greater
  than `ptr` wins, so the result is ready one cycle after the request.

## Crossover and mutation

`crossover_unit` cuts both parents before gene `point` (0..7) and swaps the
tails. Point 0 swaps whole chromosomes, which leaves the pair unchanged as a
set. The unit has one registered stage.

`mutation_unit` takes one offspring and walks its eight genes, one per clock.
A gene becomes `rnd[11:8]` when `rnd[7:0] < MUT_RATE`. The default rate of 64
gives a 25 % chance per gene.

## Host interface: `ga_regs`, `ga_ip_top`

Word registers sit at byte offsets from the core's base address:

| offset | name | dir | content |
|---|---|---|---|
| 0x00 | Control | W | bit 0: 1 = start, 0 = wait |
| 0x04 | Status | R | bit 0: 1 = finished, 0 = running (0 after reset) |
| 0x08 | Start_Target | W | `[15:12]` start x, `[11:8]` start y, `[7:4]` target x, `[3:0]` target y |
| 0x0C | Path_Coordinates | R | best chromosome, layout above |
| 0x10 + 4·y | Map row y (y = 0..15, up to 0x4C) | W | bit x = 1: cell (x, y) is an obstacle |

Bus timing is as follows:

- A write happens in the cycle `bus_wr` is high.
- For a read, `bus_rd` returns data on `bus_rdata` with `bus_rvalid` one cycle
  later.
- Written registers read back. Unmapped offsets read 0.

Writing 1 to Control while the core is idle sends a single start pulse and
clears Status. The core's `done` sets Status and latches the path.

The host sequence is: write the 16 map rows, write Start_Target, write
Control = 1, poll Status until it reads 1, then read Path_Coordinates. The map
and Start_Target must not change during a run.

`ga_ip_top` also brings out a run monitor for debugging and testbenches:

- `busy`;
- `generation`;
- `best_fit`;
- `n_infeasible`, the number of evaluations that hit an obstacle;
- `n_mutated`, the number of genes changed.

## Parameters

| parameter | default | where | meaning |
|---|---|---|---|
| `POP` | 16 | top, core | population, a power of two from 4 to 16 |
| `GENERATIONS` | 100 | top, core | breeding rounds, up to 255 |
| `MUT_RATE` | 8'd64 | top, core | per-gene mutation threshold, out of 256 |
| `PENALTY` | 100 | top, core, fitness | cost per obstacle cell |
| `SEED` | 16'h1D2B | top, rng | reset state of the automaton (0 is forced to 1) |
| `RULE150` | 16'h0015 | rng | cells that use rule 150 |

Grid size, path length (four free nodes) and gene width are fixed in
`ga_pkg`. At the defaults the core synthesises to about 2,900 flip-flops.
Most of them hold the two populations, the fitness array and the
mating pool.

## What is filled in, and where it departs

The published design gives the following, and this RTL keeps it:

- the operator sequence;
- the 16 × 16 grid, population of 16 and 100 generations;
- the 16-cell 90/150 cellular automaton with one word per clock;
- roulette-wheel selection with elitism and an 8-bit random input;
- single-point crossover at a 3-bit random point;
- per-gene mutation against a fixed rate with a new random 4-bit coordinate,
  applied to one randomly chosen offspring;
- the Manhattan-plus-penalty fitness traced with Bresenham lines;
- the twenty-register host map with its offsets, directions and widths.

The following are this design's own choices:

- **Penalty = 100 per obstacle cell.** The published fitness values step in
  hundreds, but the value is not stated.
- **The 90/150 rule vector.** Only "150-90-150" is given; here cells 0, 2 and
  4 use rule 150, which reaches the maximum cycle length.
- **Which random bits each operator uses.**
- **The controller.** This covers the placement of the elite and children,
  the pairing of the mating pool, and the choice of the mutated offspring
  among slots 1..15, so that it never overwrites the elite.
- **Slot width and spin scaling of the roulette wheel.**
- **Rank sort in the sequencer.** The sorting method is not described.
- **Bit layouts** of Start_Target, Path_Coordinates and the map rows; the
  start pulse; the bus handshake.
- **Mutation rate 64/256.** No value is given.

Known departures from the published results:

- **Run time.** The reference core reports about 0.594 ms for 100
  generations at 78 MHz, about 46,300 cycles. This RTL takes about 60,000
  cycles, mostly because fitness is scored one chromosome and one cell at a
  time. The reference core's 4.10 µs for 16 chromosomes, about 20 cycles
  each, suggests more parallel tracing. Its structure is not described, so
  it is not copied here. The other stages are as fast as the reference core
  or faster, except mating with crossover. See the table in
  [One generation](#one-generation-ga_core).
- **Clock rate.** The clock is not constrained or verified for any device.
- **Outside parts.** The MicroBlaze processor, the camera and image-processing
  PC, and the robot are not part of this RTL. A testbench drives the register
  bus in their place.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself after a fixed cycle budget.
`tb/ga_ref_pkg.sv` holds the independent reference models: the path cost with
its own Bresenham loop, the fitness cycle count, and one automaton step.

| testbench | what it establishes |
|---|---|
| `tb_lca_rng` | 2000 steps against the cell model; period exactly 65,535 |
| `tb_fitness_unit` | 400 random paths/maps plus hand cases: fitness, obstacle count, `5 + cells` latency |
| `tb_pop_sequencer` | 500 sorts with heavy ties: permutation, order, tie rule, min/max, latency |
| `tb_selection_unit` | every spin against a wheel model; 16-cycle build; best member wins the most spins |
| `tb_crossover_unit` | 1000 pairs, both children gene by gene |
| `tb_mutation_unit` | 500 chromosomes with predicted random words; count and 8-cycle latency |
| `tb_init_population` | write order, packing and `done` |
| `tb_ga_regs` | map/start-target write and read-back, start pulse rules, Status, path latch |
| `tb_ga_core` | 6 runs at POP 8 / 30 generations: every stored fitness, best = population minimum, elitism |
| `tb_ga_ip_top` | the full-size run through the bus on two maps (see below) |

`tb_ga_ip_top` runs the core at its defaults through the bus, from (0,0) to
(15,15):

- on a map of scattered blocks;
- on a map with a wall that has one gap.

For each run it checks the following:

- Status clears, then sets.
- The path read back costs exactly the reported fitness.
- The path is collision-free and costs at least the Manhattan bound of 30.
- 100 generations ran, and the best fitness never rose.
- The run took no more than 69,500 cycles.

It also requires that each mechanism acted at least once: obstacle penalties,
crossovers that exchange genes, mutations, elitism holding the best, the best
improving, and a second run after the first. Both runs end on a cost-30
path, in about 60,000 cycles.

To run a testbench with plain Verilator, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ga_ip_top \
  -y rtl -y tb +libext+.sv rtl/ga_pkg.sv tb/ga_ref_pkg.sv tb/tb_ga_ip_top.sv
./obj_dir/Vtb_ga_ip_top
```

Swap in another testbench name to run a single block. The full-size run
simulates in a few seconds.
