# FPGAGA: a genetic-algorithm engine in hardware

This design runs a complete simple genetic algorithm (GA) in logic, without a
processor. A host loads the GA's parameters and a starting population into the
engine's internal memory, raises `go`, and gets `done` back after a set number of
generations. The final population is then in memory. Only the fitness function
depends on the problem. Every other stage is generic:

* fitness-proportional (roulette) selection of parent pairs,
* single-point crossover and bit-flip mutation, each with a programmable
  probability,
* generational replacement.

The RTL is parameterised by member width, fitness width, population size and so
on. It ships with four fitness functions, picked at build time:

* `f(x) = 2x`
* `f(x) = x + 5`
* `f(x) = 2x^3 - 45x^2 + 300x`
* the cost of a two-way circuit partition

The architecture and its module split follow the FPGAGA design of Akkar and
Abdul-Rahman, "Implementation of Genetic Algorithm Using FPGA with
Applications". That design is in turn modelled on the hardware GA engine of Scott
et al. The original was written in VHDL for a Xilinx Spartan-XL. This RTL is an
independent SystemVerilog version of it. Where the original description leaves
something open, this version makes its own choices; they are listed below.

## The pipeline

```
            +-----------------------------------------------+
            |           sum of fitness                      |
            v                                               |
  PSM --member,fitness--> SM --pair--> CMM --children--> FM-+
   ^                      ^            ^                  |
   | member read          | u          | a, b, x          | member write
   |                      +---- RNG ---+                  |
   +------------------ MIC (memory interface/control) <---+
                         |         ^
                      shared memory (parameters, 2 population banks)
                         |
                      front end (host): go / done, load and read back
```

| module | role |
|---|---|
| `ga_mic` | Memory Interface and Control. Starts and stops the run, is the only path to the memory, arbitrates requests, owns the population banks |
| `ga_memory` | single-port shared RAM, synchronous write, asynchronous read (distributed-RAM style) |
| `ga_rng` | 16-cell cellular-automaton random number generator |
| `ga_psm` | Population Sequencer. Reads members one after another and streams them to selection |
| `ga_sm` | Selection. Roulette-wheel choice of two parents |
| `ga_cmm` | Crossover/Mutation |
| `ga_fm` | Fitness Module. Evaluates children, writes them back, sums fitness, counts generations |
| `ga_fitness_eval` | the fitness function chosen by `FUNC` |
| `ga_partition_eval` | partition cost circuit, used when `FUNC = FUNC_PARTITION` |
| `ga_pkg` | parameter codes, function enum, the example netlists |
| `fpgaga_top` | wires the above together |

After `start`, control is distributed. Each module asks the MIC for the
parameters it needs and then works on its own. Modules pass data over
valid/ready channels, so all stages are busy at once: the PSM streams members,
the SM accumulates fitness, the CMM mutates one pair and the FM evaluates
another, all at the same time. The MIC serves one memory request per cycle. When
several requests are pending, the lower-priority modules wait.

### Generations and the two banks

The population lives in two banks. The PSM reads bank `pop_bank` (the current
generation) and the FM writes its children into the other bank. The FM counts
the members it writes. On the acknowledge of the last member of a generation it
does two things in the same clock edge:

* it pulses `gen_done`, and the MIC swaps the banks;
* it hands the new sum of fitness to the SM.

Pairs already in flight were selected from the old generation. They are written
into the next generation, so consecutive generations overlap by a few members,
much as in a software steady pipeline. After the last generation the FM pulses
`finished` instead of `gen_done`. The MIC then:

* swaps the banks once more, so `pop_bank` names the final population;
* drops `run`, which returns every module to idle;
* raises `done`, which stays high until `go` falls.

### Selection

For each parent, the SM takes an `R`-bit random number `u` and sets the threshold
`T = (S * u) >> R`. `S` is the sum of fitness of the current generation. The SM
then adds up the fitness of the members arriving from the PSM. The member whose
fitness takes the running sum above `T` is picked. The PSM goes round the
population without restarting, so each selection begins where the last one
stopped. With a uniform `u`, a member is picked with probability proportional to
its fitness.

The SM also has a guard. If `M` members pass without a pick, the current member
is taken. This can only happen when `S` is zero, or just after a generation
change while `S` is stale. The guard keeps the pipeline from hanging.

### Crossover and mutation

Probabilities are `P`-bit fractions of `2^P`. With `P = 9`, a mutation probability
of 0.00195 is stored as 1 (1/512) and a crossover probability of 0.998 as 511
(511/512). A pair is processed in these steps:

1. If the random number `rnd_a` is below `pc`, the two members swap their `k` low
   bits. `k` is the `log2(N)`-bit random number `rnd_x`, brought into `0..N-1`
   by one conditional subtraction of `N`. So the cut always lies inside the
   member.
2. For bit positions `0..N-1`, one per cycle, bit `i` of child 0 flips if
   `rnd_a < pm`, and bit `i` of child 1 flips if `rnd_b < pm`.

The children are offered `N + 1` cycles after the pair is taken.

### Random numbers

`ga_rng` is a null-boundary hybrid cellular automaton (CA). Cells 0, 4, 5 and 6
use rule 150; the others use rule 90. This rule vector, `RULE150 = 16'h0071`,
gives the maximal period 2^16 - 1. The seed is a parameter (AAAA in the reference
runs). The automaton steps once per cycle, and all outputs are fixed slices of
its state:

| output | slice |
|---|---|
| `rnd_a` | `state[P-1:0]` |
| `rnd_b` | `state[15 -: P]` |
| `rnd_x` | `state[8 +: LOGN]` |
| `rnd_sel` | `state[8-R +: R]` |

Because the slices are fixed, successive numbers are correlated. That is a known
weakness of CA generators, accepted here for their low cost.

## The partition fitness

A design of `C` cells is split into blocks A and B. A partition is a `C`-bit
string `P`: bit `i` set means cell `i+1` is in block B. Each net `j` is a mask
`N_j` of the cells on it. `ga_partition_eval` handles one net per two cycles:

* a one-bit counter `v` walks over 0 and 1;
* `C` comparators test `P_i == v`;
* each comparator output is ANDed with `N_j[i]`, and the results are ORed into
  "net j has a cell in block v";
* that bit is added into a one-bit accumulator. After both values of `v`, the
  accumulator is 0 exactly when the net touches both blocks. The net then
  counts as cut.

When all nets are done, the fitness is `F_P = Fmax - Fcut`. `Fmax` is the cut
count of the initial arrangement. Then the zeros of `P` (the cells in block A)
are counted. If block A does not hold between 40% and 60% of the cells, the
fitness is forced to 1. This penalty makes unbalanced partitions unlikely to
survive. An evaluation takes `2 * nets + 2` cycles. The arithmetic functions take
one cycle whatever their complexity.

`ga_pkg::net_mask` holds three example netlists. Cell `k` is bit `k-1`.

| cells | nets | Fmax | nets (cell lists) |
|---|---|---|---|
| 5 | 4 | 4 | {1,2,3,4} {2,3} {1,4} {1,5} |
| 10 | 6 | 6 | {1..10} {5,6} {4,7} {3,8} {2,9} {1,10} |
| 15 | 9 | 9 | {all but 2,4} {7,8} {6,9} {5,10} {4,11} {3,12} {2,13} {1,14} {1,15} |

In the best partitions found, the cut counts fall from 4 to 1, from 6 to 2 and
from 9 to 2. The fitness values are then 3, 4 and 7.

## Memory map and parameters

The address is `LOGM + 2` bits wide. The word width `VALW` is the largest of:

* `CASIZE`
* `P`
* `N + F`
* `max(LOGM + F, LOGMAXNG)`

| address | contents |
|---|---|
| `{0, code}` | user parameter `code` |
| `{1, bank, idx}` | member `idx` of bank 0 or 1, stored as `{fitness, member}` in the low `N+F` bits |

| code | parameter | reference value |
|---|---|---|
| 0 `PAR_SEED` | CA seed | `16'hAAAA` |
| 1 `PAR_PMUT` | mutation probability × 2^P | 1 |
| 2 `PAR_PCROSS` | crossover probability × 2^P | 511 |
| 3 `PAR_INITSUM` | sum of fitness of the initial population | see below |
| 4 `PAR_POPLAST` | population size − 1 (size even, at most `M`) | 15 |
| 5 `PAR_GENLAST` | number of generations − 1 | 15 |

The host must write the initial population into bank 0 together with its
fitness, and put the sum of that fitness in `PAR_INITSUM`. It may use memory only
while `run` is low, i.e. before `go` and after `done`.

Hardware parameters of `fpgaga_top`:

| name | default | meaning |
|---|---|---|
| `P` | 9 | width of the probabilities and the decision numbers |
| `N` | 4 | member width |
| `F` | 5 | fitness width |
| `R` | 4 | selection precision |
| `CASIZE` | 16 | CA size |
| `M` | 16 | largest population |
| `MAXNUMGENS` | 10 | sets the generation register width, `log2(10)` = 4 bits, so at most 16 generations |
| `FUNC` | `FUNC_2X` | fitness function |

## Configurations and results

The defaults are the `f(x) = 2x` configuration. The other five reference cases
override only `N`, `F` and `FUNC`:

| case | N | F | optimum | initial sum | best found | cycles (this RTL) | cycles (original) |
|---|---|---|---|---|---|---|---|
| 2x | 4 | 5 | 30 | 102 | 30 | 6,813 | 12,673 |
| x+5 | 4 | 5 | 20 | 187 | 20 | 6,219 | 12,889 |
| cubic | 4 | 11 | 1125 | 8965 | 1125 | 6,891 | 12,993 |
| 5 cells | 5 | 3 | 3 | 19 | 3 | 6,468 | 21,305 |
| 10 cells | 10 | 3 | 4 | 22 | 4 | 6,550 | 29,258 |
| 15 cells | 15 | 4 | 7 | 28 | 7 | 6,642 | 41,865 |

All six runs use the same settings:

* 16 members and 16 generations;
* seed AAAA;
* mutation probability 1/512 and crossover probability 511/512;
* an initial population whose sum of fitness equals the reference initial sum.

The runs reach the same optima as the original. The populations are not the
original ones, so the generation-by-generation curves differ. The cycle counts
differ because the two implementations are organised differently. In this RTL a
run takes about 7,000 cycles whatever the function. The member stream into the
SM limits throughput. A parent needs, on average, about half the population to
stream past the SM. Each member costs three cycles: read request, ack, and
handover. A pair therefore costs roughly 50 cycles. The CMM and FM stages, even
the 20-cycle evaluation of the 15-cell partition, overlap with that time. That is
why the partition runs cost little more than the arithmetic ones.

## Where this RTL departs from the original or fills gaps

* The single-port memory, the request/ack protocol, the fixed-priority
  arbitration, the address map and the two population banks are this design's
  own. The original says only that the modules reach the internal memory through
  the MIC.
* The CA rule (90/150, vector 0x0071) and how its state is sliced are chosen
  here.
* The selection threshold `(S*u) >> R` is this design's reading of "scaling down
  the sum of fitness with precision r". The stall guard is an addition.
* Single-point crossover with a `log2 N`-bit point is this design's choice. The
  original's "d" parameter, which keeps crossover on bit-group boundaries, is
  not a separate parameter: members here are plain bit strings, and the point is
  reduced modulo `N`.
* The generation register is `log2(MAXNUMGENS)` = 4 bits wide. It holds
  "generations − 1", so the reference 16 generations fit. The population size is
  stored the same way.
* The partition size window is read as 40%–60% of the cells in block A. `Fmax` is
  the initial cut count.
* Net 0 of the 15-cell netlist is taken to connect every cell except 2 and 4. It
  is cut in both the initial and the final arrangement, so this choice does not
  change the cut counts.
* The fitness function is a build-time parameter (`FUNC`), not a rewrite of the
  evaluation code.
* There is no elitism, no other stopping rule, and no I/O beyond the plain
  memory port and `go`/`done`. The host program is outside this RTL.

## Simulating

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
testbench prints `TB_RESULT checks=N failures=M`.

| testbench | what it runs |
|---|---|
| `tb_fpgaga_top` | the whole engine at its default size, the `2x` case |
| `tb_fpgaga_workloads` | the other five cases side by side |

Both use `tb/ga_tb_harness.sv`, which plays the host. It builds the initial
population, loads memory and checks the run:

* every member write, checked against its own fitness model;
* every sum handed to the SM;
* the final population;
* the optimum;
* that crossover, mutation, bank swaps, all parameter reads, arbitration
  conflicts, pipeline overlap and (for partitions) the balance penalty each
  happened at least once.

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ga_pkg.sv tb/tb_fpgaga_top.sv \
          --top-module tb_fpgaga_top -o sim && ./obj_dir/sim
```

Swap the testbench name to run any other test. Every run finishes in well under
a second.

To change the problem:

1. Set `FUNC` and `N`/`F` on `fpgaga_top`.
2. For a new netlist, add it to `ga_pkg::net_mask`/`num_nets`.
3. For a new function, add a branch to `ga_fitness_eval`.

`F` must hold the largest fitness. Then load a matching initial population and
initial sum.
