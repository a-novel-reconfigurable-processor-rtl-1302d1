# CIRPART: a genetic-algorithm processor for multiway circuit partitioning

CIRPART splits the modules (cells) of a netlist into *k* partitions so that
few nets cross partition boundaries and the partitions are about the same
size. It does this with a genetic algorithm run entirely in hardware: a
population of candidate partitionings is scored, parents are chosen by
tournament, and children are bred by uniform crossover and mutation,
generation after generation. Four small engines (controller, fitness
evaluator, parent selector, genetic operator) take turns on three memories
(netlist, population, fitness). The engines are pipelined so that each
memory word is touched in one clock cycle, and the two parts of the cost
are computed in parallel.

This repository holds synthesizable SystemVerilog for the whole processor,
with self-checking testbenches for every block and for complete GA runs. The
architecture, the module split, the controller's state sequence and its
codes, the two-bank population memory, gene-level addressing, tournament
selection with four fitness reads per parent pair, uniform crossover and
the default GA parameters come from the published CIRPART architecture.
Cost formulas, memory ports, the netlist format, the register map and all
cycle-level timing are this implementation's own choices. They are listed
in [Departures and own choices](#departures-and-own-choices).

## Encoding: chromosomes and netlist

**Chromosome.** A chromosome holds one *gene* per netlist module. The gene
is the binary partition number, 0 to k-1, of that module. With 8
partitions at most, a gene is 3 bits. Module 7's gene of chromosome 3 is
one word of the population memory, so genes are read and written one at a
time, never as whole chromosomes.

```
module:   M0 M1 M2 M3 M4 M5 M6 M7
gene:      3  1  2  0  3  1  2  1     -> module M0 is in partition 3, ...
```

**Population memory** (`cirpart_pop_mem`). It has two banks. At any time
one bank holds the parents and the genetic operator writes the children
into the other. The banks then swap roles. The gene address is
`{bank, chromosome, module}`, which is 1 + 7 + 12 = 20 bits by default.

**Netlist** (`cirpart_input_mem`). The netlist is a *pin list*. Each word
holds a module index in bits `[MOD_W-1:0]`. Bit `MOD_W` is set on the last
pin of each net. Nets are stored one after another. A 3-pin net on modules
4, 9, 2 followed by a 2-pin net on modules 9, 5 is stored as:

```
word 0: {0, 4}   word 1: {0, 9}   word 2: {1, 2}   word 3: {0, 9}   word 4: {1, 5}
```

**Fitness memory** (`cirpart_fit_mem`). It holds one 16-bit *cost* per
chromosome. Lower is better.

## Cost of a partitioning

```
cost = net_cut + imbalance        (saturated to 16 bits)
net_cut   = number of nets whose pins lie in two or more partitions
imbalance = (modules in the largest partition) - (modules in the smallest),
            taken over partitions 0..k-1
```

## The fitness evaluator: two walkers

`cirpart_fem` is the busiest block, because it reads the whole netlist once
for every chromosome in every generation. For one chromosome it runs two
independent pipelines in the same clock cycles:

* **Imbalance walker.** It reads genes 0..M-1 of the chromosome through
  population read port A, one per cycle. It increments a per-partition
  counter indexed by the gene.
* **Net-cut walker.** It reads pin word *i* from the netlist memory. In the
  next cycle it uses the module index in that word as the address into the
  same chromosome on population read port B. In the cycle after that it ORs
  a one-hot of the returned gene into a partition mask. On the last pin of a
  net, the net is cut if the mask has more than one bit set
  (`mask & (mask-1) != 0`). The mask is then cleared.

When both walkers have finished and their pipelines are empty, the total is
written to the fitness memory and every counter is cleared. The walkers then
start on the next chromosome.

A chromosome takes `max(M, P+1) + 3` cycles, where M is the number of
modules and P the number of pins. Because the two walkers overlap, the cost
is set by whichever is longer, which is normally the pin list.

## The controller and its state sequence

`cirpart_cpm` sequences everything through five states:

| state | starts (code) | waits for (code) | what happens |
|---|---|---|---|
| S1 | StartGA `000` | Ready `000` | idle: control registers writable. After `start_ga`, it takes `num_pins` netlist words on `net_valid`/`net_ready` into the netlist memory |
| S2 | StartInit `001` | InitComp `001` | writes a random gene into every (chromosome, module) of the low bank, one per cycle |
| S3 | StartEval `010` | EvalComp `010` | the fitness evaluator scores the current bank |
| S4 | StartSel `011` | SelComp `011` | the parent selector fills its parent table |
| S5 | StartMat `100` | MatComp `100` | the genetic operator writes the children; then the banks swap and the generation counter increments |
| S3 → S1 | StartEval `010` | GAComp `101` | after the evaluation at generation `num_gen`, the final population is streamed out and `ga_comp` pulses |

S3 → S4 → S5 → S3 repeats until the generation counter reaches `num_gen`.
A run therefore has `num_gen` selection and mating rounds and `num_gen + 1`
evaluations. Every completion is reported on `evt_valid`/`evt_code` with the
codes above. `start_code` shows the last start code, and `state` shows the
state (`cpm_state_e`).

Only one of the fitness evaluator, selector and genetic operator runs at a
time. The memory ports they share are multiplexed in `cirpart_top` by the
controller's `owner` output:

* population read port A: FEM in S3, GOM in S5, CPM otherwise
* population write port: GOM in S5, CPM otherwise
* fitness read port: PSM in S4, CPM otherwise
* population read port B, the netlist read port and the fitness write port: FEM only

Each engine has its own address and data bus, named AB1/DB1 (CPM), AB2/DB2
(FEM), AB3/DB3 (PSM) and AB4/DB4 (GOM) in the comments.

## Selection and breeding

**Parent selection** (`cirpart_psm`) is a binary tournament. For each of
`NSEL` table entries, where `NSEL` is `num_chrom` rounded up to even, it
does the following:

1. It draws two random chromosome indices, `floor(rand16 * num_chrom / 65536)`.
2. It latches both indices and reads both costs from the fitness memory.
3. It keeps the cheaper one. On a tie, the first index wins.

Entries 2j and 2j+1 become the parents of child pair j. Each pair therefore
reads four random fitnesses. A tournament takes 3 cycles.

**Genetic operation** (`cirpart_gom`) handles one pair at a time:

* **Crossover decision.** One random draw below `xover_thr` enables
  crossover for the pair.
* **Uniform crossover.** If crossover is on, each gene position swaps the
  two parents' genes between the two children with probability 1/2. If it
  is off, the children copy their parents.
* **Mutation.** Each child gene is then replaced, with probability
  `mut_thr/65536`, by a random partition number in [0, k).
* **Schedule.** Each gene takes four cycles: read parent A, read parent B,
  write child A, write child B.
* **Odd population.** If `num_chrom` is odd, the last pair's second child is
  dropped.

Each of the three random users (initial population, selector, genetic
operator) has its own 32-bit xorshift generator (`cirpart_rng`). All three
are seeded from the seed register, each XORed with a different constant.

## Using the processor

1. **Write the control registers** while idle: `cpu_we`, `cpu_addr[3:0]`,
   `cpu_wdata[15:0]`.

   | addr | register | reset value |
   |---|---|---|
   | 0 | `num_modules` (1..MAX_MODULES) | 0 |
   | 1 | `num_pins` (0..MAX_PINS) | 0 |
   | 2 | `num_chrom`, population size (2..MAX_CHROM) | 20 |
   | 3 | `num_parts`, k (2..MAX_PARTS) | 2 |
   | 4 | `num_gen`, generations | 20 |
   | 5 | `xover_thr`, crossover if rand16 < value | 64881 (0.99) |
   | 6 | `mut_thr`, per-gene mutation if rand16 < value | 655 (0.01) |
   | 7, 8 | seed bits 15:0 and 31:16 (non-zero) | 1 |

   A probability *r* is written as `round(r * 65536)`.

2. **Pulse `start_ga`.** If a register is out of range, the start is ignored
   and an assertion reports it.
3. **Stream the netlist.** Send `num_pins` pin words on
   `net_valid`/`net_data`. A word is taken in a cycle where both `net_valid`
   and `net_ready` are high.
4. **Read the result.** After the last evaluation the processor outputs one
   gene per cycle on `out_valid`, in chromosome-major order. Each gene comes
   with `out_chrom`, `out_gene_idx` and `out_gene`, plus `out_fitness`, the
   cost of that chromosome. `ga_comp` then pulses and `busy` falls.

## Timing

All memories are synchronous, with one cycle of read latency. With M
modules, P pins and C chromosomes, one generation costs about:

```
evaluate  C * (max(M, P+1) + 3) + 1
select    3 * NSEL + 1              (NSEL = C rounded up to even)
mate      ceil(C/2) * (4M + 2) + 1
```

The initial population takes `C*M` cycles and the final output about
`C*M`. The block testbenches check the evaluate, select, mate and
initial-population counts exactly.

Measured busy cycles on random netlists of the evaluated benchmark sizes,
4-way, with 2 to 5 pins per net:

| netlist | C | G | cycles | at 117 MHz |
|---|---|---|---|---|
| 125 modules, 147 nets (516 pins) | 20 | 20 | 325,641 | 2.78 ms |
| 125 modules, 147 nets | 100 | 20 | 1,636,145 | 13.98 ms |
| 125 modules, 147 nets | 20 | 100 | 1,564,520 | 13.37 ms |
| 2844 modules, 3282 nets (~10.6k pins) | 20 | 20 | 7,217,024 | 61.7 ms |
| 3014 modules, 3029 nets (~11.5k pins) | 20 | 20 | 7,014,183 | 60.0 ms |

The published CIRPART implementation reports 4.18, 18.38, 16.96, 85.34 and
77.27 ms for circuits of these module and net counts and GA settings, at
117 MHz on an FPGA. `tb_cirpart_top_full` and `tb_cirpart_workloads` fail
if a run would take longer than that at 117 MHz. The runs use random
netlists with the benchmarks' module and net counts, not the benchmark
circuits themselves, so only the problem shapes are the same. This RTL has
not been synthesised for a specific FPGA, so 117 MHz is only a reference
clock here.

## Parameters

All sizes are compile-time parameters of `cirpart_top` and are passed down.

| parameter | default | meaning |
|---|---|---|
| `MAX_MODULES` | 4096 | genes per chromosome (largest benchmark: 3014 modules) |
| `MAX_PINS` | 16384 | netlist memory words |
| `MAX_CHROM` | 128 | chromosomes per bank (largest population evaluated: 100) |
| `MAX_PARTS` | 8 | largest k; sets the gene width |

At these defaults the memories total about 3.36 Mbit: the population memory
is 2 x 128 x 4096 x 3 bits, the netlist memory 16384 x 13 bits and the
fitness memory 128 x 16 bits. They are written as plain arrays. For an FPGA
or ASIC, map them onto block RAM or external SRAM with the same one-cycle
read latency. The population memory needs one write port and two read
ports.

## Files

| file | contents |
|---|---|
| `rtl/cirpart_pkg.sv` | codes, states, register map, register bundle, random helpers |
| `rtl/cirpart_top.sv` | the processor: engines, memories, port multiplexing |
| `rtl/cirpart_cpm.sv` | controller (CPM) |
| `rtl/cirpart_fem.sv` | fitness evaluator (FEM) |
| `rtl/cirpart_psm.sv` | parent selector (PSM) |
| `rtl/cirpart_gom.sv` | crossover and mutation (GOM) |
| `rtl/cirpart_rng.sv` | xorshift32 generator |
| `rtl/cirpart_input_mem.sv`, `rtl/cirpart_pop_mem.sv`, `rtl/cirpart_fit_mem.sv` | the three memories |
| `tb/tb_cirpart_ref_pkg.sv` | reference models: xorshift, range scaling, cost, random netlists |
| `tb/tb_cirpart_driver.sv` | drives and checks one complete GA run on a top |
| `tb/tb_<block>.sv` | one self-checking testbench per block (`tb_cirpart_pkg` checks the package's codes and functions) |
| `tb/tb_cirpart_top.sv` | end-to-end run at reduced sizes; requires every mechanism to occur |
| `tb/tb_cirpart_top_full.sv` | one complete run with all parameters at their defaults |
| `tb/tb_cirpart_workloads.sv` | four runs shaped like the evaluated benchmarks |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/cirpart_pkg.sv tb/tb_cirpart_ref_pkg.sv tb/tb_cirpart_top.sv \
    --top-module tb_cirpart_top -o sim
./obj_dir/sim
```

Replace `tb_cirpart_top` with any other testbench name.

What the testbenches check:

* **Block testbenches.** They compare against models written independently
  in `tb_cirpart_ref_pkg`. The fitness evaluator is checked against the
  reference cost. The selector is checked by replaying its random sequence.
  The genetic operator is checked for exact copies, for exact pairwise
  swaps, and for legal mutated genes, all with exact cycle counts.
* **System runs.** These mirror every population-memory write. Every
  fitness-memory write is recomputed from the netlist. They check the final
  output stream, the sequence of completion codes and the generation count.
  They also require the mean population cost to fall over the run.
* **`tb_cirpart_top`.** It also counts each mechanism and fails if any never
  happened. The mechanisms are: netlist loading, random initialisation, both
  walkers active together, a cut net, both tournament outcomes, a pair
  copied and a pair crossed, a swapped gene, a mutation, evaluation of both
  banks, and the final output.

`tb_cirpart_top_full` runs in well under a second and
`tb_cirpart_workloads` in about ten seconds.

## Departures and own choices

These points are not fixed by the CIRPART description and were chosen here:

* **Cost function.** Net cut plus (largest minus smallest partition). The
  description names a net-cut cost and a partition-imbalance cost but not
  their formulas or weights.
* **Netlist format.** The pin list with an end-of-net flag, the
  `net_valid`/`net_ready` input stream, and the one-gene-per-cycle output
  stream.
* **Control registers.** The register map, the seed register, and rates
  held as 16-bit thresholds.
* **Random numbers.** The xorshift32 generators and their seeding.
* **Memory ports.** The population memory has a second read port so the two
  costs can be computed at once. The memories are on-chip arrays, where the
  description uses external RAM chips. Shared ports are multiplexed by
  controller state.
* **Selection.** Tournament size 2, with ties going to the first
  contestant. All parents of a generation are chosen in one selection phase
  and kept in a table inside the selector.
* **Crossover and mutation.** The crossover rate applies per parent pair,
  each gene swaps with probability 1/2, and a mutation draws a fresh random
  partition.
* **Partition numbers.** They run from 0 to k-1. An illustrative example in
  the description numbers partitions from 1.
* **No elitism.** The best chromosome can be lost between generations.
  The description does not mention elitism, so none was added.
* **Extra CPU input.** The CPU block of the original block diagram has an
  input named INT whose function is not described. It is not implemented.
