# Evolutionary design engine for multiple constant multipliers

A multiple constant multiplier (MCM) multiplies one input `x` by a fixed set of
constants `c1 … cN` using only adders, subtractors and shifts. Finding the MCM
with the fewest components is hard, so this engine searches for one with an
evolutionary algorithm, in hardware, testing one candidate circuit per clock.

The search rests on one observation. A circuit built only from additions,
subtractions and shifts computes a linear function of `x` (modulo 2^16). Two
such circuits that agree at `x = 1` therefore agree at every `x`. A candidate
is fully verified by one evaluation with `x = 1`: its outputs must equal the
constants themselves. No input sweep is needed, however wide the datapath or
however many outputs there are. The cost of checking a candidate is one pass
through a pipeline.

The RTL follows the accelerator in *On Evolutionary Synthesis of Linear
Transforms in FPGA*. That accelerator ran on a Virtex II Pro at 100 MHz,
evaluating 10^8 candidates per second. Where that description leaves a detail
open, this RTL makes its own choice. Every such choice is listed below and in
the opening comment of each file.

## The loop

```
            +--------------------------------------------------------------+
            v                                                              |
  selection_unit ---> mutation_unit ---> vrc ---> fitness_unit ------------+
  (2-way tournament,   (5 samplers,      (4 x 11   (|error| sum, wire
   banked population,   XOR mask)         CFBs,     count, 32-bit
   best register,                         4 stages) fitness)
   elitism)
       ^                        |
       |                        +--> delay_line (the chromosome rides along)
  evo_control (start, generation count, stop rules, drain)
```

Every clock, `evo_accel` does four things at once:

- it picks a parent by tournament;
- it mutates the previous parent;
- it moves earlier candidates one column further through the virtual
  reconfigurable circuit (VRC);
- it writes one evaluated offspring, with its fitness, back into the
  population memory.

Nothing stalls.

## A candidate circuit: the chromosome

The VRC is a grid of `COLS × ROWS` configurable functional blocks (CFBs),
4 × 11 by default. A CFB has two operand multiplexers. Each one picks either
the input `x` or any output of the column just before it. The CFB then
computes one of four functions on 16 bits and registers the result. There is
no connection across more than one column, except through `x`. Column 0 sees
only `x`.

Each CFB is configured by a 10-bit gene (`mcm_pkg::gene_t`):

| bits | field   | meaning |
|------|---------|---------|
| 1:0  | `fn`    | 0 ADD `a+b`, 1 SUB `a-b`, 2 SHIFT `a << sel_b`, 3 WIRE `a` |
| 5:2  | `sel_a` | 0 = `x`, 1..11 = row 0..10 of the previous column, 12..15 = `x` |
| 9:6  | `sel_b` | operand B, coded like `sel_a`; for SHIFT it is the shift distance 0..15 |

The chromosome is the genes concatenated, column-major. The gene of column
`c`, row `r` sits at bits `(c*ROWS + r)*10 +: 10`. This makes 440 bits for
4 × 11, within the 512-bit configuration store of the original. Using the B
field as the shift distance is this design's own encoding. It keeps the gene
at 10 bits, so the 11 × 4 grid fits in 512 bits.

**Outputs are fixed, not evolved.** Output `k` (0..31) is row `k % ROWS` of
column `COLS-1-k/ROWS`. Outputs 0..10 are the last column. Outputs 11..21 are
the column before it, delayed one cycle so they line up. Outputs 22..31 are
rows 0..9 of column 1. The host places each constant on an output of its
choice and sets that output's mask bit. The depth of a product is bounded by
the column it sits in, so small constants can go on early columns.

## Fitness

`fitness_unit` computes, for every output with its mask bit set,
`|y_k - desired_k|`. Outputs with a clear mask bit contribute 0. A pipelined
adder tree (5 levels for 32 outputs) sums these into `error`. The last stage
then forms:

```
error != 0 :  fitness = 0x8000_0000 - error
error == 0 :  fitness = 0x8000_0000 + wire_count
```

Higher fitness is better. Every correct circuit outranks every incorrect one.
Among correct circuits, the one with more CFBs set to WIRE ranks higher, and a
wire costs no hardware. The wire count comes from one comparator per CFB
(`col_wire_count`), summed column by column inside the VRC while the
configuration moves down the pipeline.

The cost measure counts WIRE genes only. A non-wire CFB that drives no output
still counts as a component. Fewer non-wire CFBs is therefore an upper bound on
the component count, not the exact count. How error and wire count are merged
into one number is this design's reading of the original. The original only
says the wire count is part of the fitness, with 0x80000000 entering the last
stage.

## Selection, mutation and generations

**Population memory.** The population (8 individuals by default) is stored as
`{fitness, chromosome}` words in `pop_ram`. Each RAM has two banks, selected by
the top address bit. Parents are read from one bank while offspring are
written into the other. After 8 offspring have been written, the banks swap
(`gen_pulse`). That swap is one generation. There are two identical RAMs,
always written together, so that two individuals can be read in the same
cycle.

**Tournament.** Two LFSRs pick two indices, computed as `(rnd*POP) >> 32`.
The fitter individual is selected; on a tie, the first one wins.

**Best individual and elitism.** A register keeps the fittest offspring seen
in the current run. It is also replaced on *equal* fitness, which lets the
search drift across equally good circuits. With `elitism` set, the first of
every 8 selections is this register instead of a tournament winner. It is
marked `keep` and passes through the mutation unit unchanged, so the best
circuit always stays in the population. The original places the elitism
multiplexer in the same position. When the elite copy is inserted, and the
`keep` marking, are this design's choices.

**Mutation.** `N_SAMP` = 5 samplers each own two LFSRs. A sampler fires when
its first number is greater than the host register `prob_r` (R). Its second
number picks a bit as `(rnd*440) >> 32`. The fired bits form a mask, which is
XORed into the chromosome, so at most 5 bits change. Each sampler fires with
probability `1 - R/2^32`:

- `R = 0` flips about 5 bits;
- `R = 0x8000_0000` flips about 2.5 bits;
- `R = 0xFFFF_FFFF` flips none.

The host may rewrite R during a run. The original used 5 mutated genes per
offspring. The sampler count of 5 is chosen to match it.

**Generation overlap.** The loop latency is 14 cycles:

- 2 for selection;
- 1 for mutation;
- 4 for the VRC;
- 7 for fitness.

That is longer than one generation of 8. To keep one candidate per clock,
selection does not wait for the generation in flight. It keeps reading the
last complete generation until the next swap. The effect is a generation gap
of one. The original gives the full rate but not how it handles this.

**Run control.** `evo_control` starts a run on `start`. The run ends at
`max_gen` generations, after `stag_limit` generations without a strict
improvement of the best fitness (0 turns this off), or on `halt`. Issuing then
stops, the candidates in flight drain, and `done` rises with `stop_reason`:
1 for the generation limit, 2 for stagnation, 3 for halt.

## Timing summary

| stage | module | latency (cycles) |
|-------|--------|-----------------|
| tournament: RAM read, compare | `selection_unit` | 2 |
| mutation | `mutation_unit` | 1 |
| circuit evaluation, one column per cycle | `vrc` | `COLS` (4) |
| abs. differences, adder tree, final stage | `fitness_unit` | `2 + log2(NOUT)` (7) |
| write-back | `selection_unit` | 1 (into RAM) |

Throughput is one candidate per clock. At 100 MHz that would be 10^8
evaluations per second, the rate of the original. This RTL has not been timed
on an FPGA.

## Using it

Registers and settings are plain ports of `evo_accel`; a host processor or a
register file is expected to drive them. A run goes as follows:

1. Hold `rst_n` low, then release it.
2. With the engine idle, write the `POP` initial chromosomes. Set `init_we`
   with `init_idx` and `init_chrom`, one per clock. Random bits are a good
   start. Loaded individuals get fitness 0.
3. Set `desired[k]` to the constants, `mask` to the outputs in use, `prob_r`,
   `elitism`, `max_gen` and `stag_limit`.
4. Pulse `start`. Wait for `done`. Read `best_fit`, `best_chrom`,
   `gen_count` and `eval_count`. `best_fit[31]` set means the circuit is
   correct. `best_fit - 0x8000_0000` is then its number of WIRE blocks.
5. A new `start` runs again from the population left in memory. Reload it
   first to start afresh.

To read out the circuit, decode `best_chrom` with the gene table above. Follow
the operands back from the outputs in use. Blocks not reached from an output
are unused.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `W` | 16 | datapath width |
| `X_W` | 8 | width of the VRC input port (`x`, zero-extended) |
| `COLS`, `ROWS` | 4, 11 | VRC grid; `COLS*ROWS*10` must be at most 512 |
| `NOUT` | 32 | VRC outputs; at most `COLS*ROWS` |
| `POP` | 8 | population size |
| `N_SAMP` | 5 | mutation samplers, i.e. the most bits flipped per offspring |
| `FIT_W` | 32 | fitness width |

`ROWS` must be below 16, because of the 4-bit select fields. Table sizes such as
the 6 × 6 VRC are a parameter change away: `COLS=6, ROWS=6`.

## Files

| file | content |
|------|---------|
| `rtl/mcm_pkg.sv` | gene type, function codes, constants |
| `rtl/cfb.sv` | one CFB |
| `rtl/col_wire_count.sv` | per-column wire comparators and sum |
| `rtl/vrc.sv` | the CFB grid, configuration pipeline, output alignment |
| `rtl/adder_tree.sv` | pipelined adder tree |
| `rtl/fitness_unit.sv` | error, mask, fitness |
| `rtl/lfsr32.sv` | 32-bit LFSR, x^32+x^22+x^2+x+1, 32 steps per clock |
| `rtl/mutation_unit.sv` | samplers and XOR mask |
| `rtl/pop_ram.sv` | simple dual-port RAM, registered read |
| `rtl/selection_unit.sv` | banks, tournament, best register, elitism |
| `rtl/evo_control.sv` | run controller |
| `rtl/delay_line.sv` | register chain for the chromosome |
| `rtl/evo_accel.sv` | top level |
| `tb/mcm_ref_pkg.sv` | reference model of chromosome evaluation and fitness, for the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_evo_accel` and `tb_mcm_workloads` |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops. Each one has
a watchdog. With Verilator 5, from the project root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mcm_pkg.sv tb/mcm_ref_pkg.sv tb/tb_evo_accel.sv --top-module tb_evo_accel
./obj_dir/Vtb_evo_accel
```

Use the same command with any other `tb_<name>.sv`. Simulators with four-state
logic work as well, but the testbenches initialise everything they read.

- **Unit testbenches.** Each compares its module with values computed
  independently in the testbench, and checks the latency where there is one.
  `tb_vrc` evaluates 3000 random configurations back to back against a
  column-by-column model. `tb_fitness_unit` checks exact fitness values and
  the 7-cycle latency. `tb_selection_unit` mirrors both banks and checks each
  tournament result against the two indices the unit reports (`tour_a`,
  `tour_b`). `tb_mutation_unit` checks flip counts at three settings of R.
- **`tb_evo_accel`** runs the whole engine at its default parameters, taking
  about 20 s of simulation. It evolves a 3x/5x/7x multiplier from a random
  population. Every candidate written back is re-evaluated by
  `mcm_ref_pkg`. It drives all three stop reasons, changes R during a run,
  and checks one evaluation per clock when the pipeline is full. It also
  checks that the best circuit is correct for `x = 1234`, by linearity. It
  counts each mechanism (bank swaps, tournaments, elite copies, mutations,
  improvements, correct circuits, wire-count gains, stop reasons) and fails
  if one never happens.
- **`tb_mcm_workloads`** runs two published benchmark problems on the default
  grid, as far as a simulation allows, in about two minutes.
  - 5 constants (83, 221, 71, 387, 13), on outputs 0..4. With a budget of
    1.5 M generations, and a stop after 0.6 M without improvement, 2 of 5
    random seeds found a correct multiplier. One needed about 0.09 M
    generations and the other about 0.29 M. Both ended with 19 to 21 non-wire
    CFBs, an upper bound on the component count, as explained under Fitness.
    The other seeds stalled with an error of 1 to 3. The original reports
    about 0.46 M generations on average, with 99.5 % success, on a 4 × 6 grid.
  - 20 constants (1 and the odd primes up to 71). The host places them by
    size: 1, 3, 5, 7, 17 and 31 on column-1 outputs, the next seven on
    column 2, and the largest seven on column 3. With up to 2.5 M
    generations, no seed reached a correct circuit. Each stalled with an
    error of 4 to 14. The original reports 100 % success, after about
    0.46 M generations, on a 4 × 10 grid.

  The search here converges more slowly than the original reports. The
  hardware reproduces every fitness value exactly; the gap lies in how the
  evolutionary loop is set up. Candidate causes are the generation overlap,
  the elitism schedule, the mutation setting (R = 0, five flipped bits) and
  the error measure's local optima. The original does not give enough detail
  to tell which one matters.

  The runs are stochastic. The testbench therefore checks that the hardware
  reports its results consistently, not that the search succeeds.

## Where this RTL departs from, or goes beyond, the original

- **Host interface.** The original is driven by a PC, which loads the
  initial population and sets the registers. Here those are plain ports, and
  the PC link is not part of the RTL.
- **Gene encoding.** Field order, function codes, the shift distance taken
  from the B select field, and select codes above `ROWS` meaning `x` are all
  this design's own.
- **Output mapping.** The original's outputs are fixed CFBs, "up to 32". The
  mapping used here, last column first, follows its block diagram. One passage
  of the original says the number of outputs equals the number of CFBs. This
  RTL has 32 outputs for 44 CFBs.
- **Input pipelining.** `x` is registered down the VRC pipeline together with
  the configuration. The original's diagram feeds the input to all columns
  directly. With the constant `x = 1` used during evolution, both give the
  same results.
- **Fitness formula, elitism timing and generation overlap.** These are as
  described above. Each is an interpretation where the original gives only the
  structure.
- **Mutation register.** The formula the host uses to compute R from a
  per-bit mutation probability is software and is not part of this RTL. The
  comparison "fire when the random number exceeds R" is the original's.
- **No crossover.** The original's pipeline has a "mutation/crossover"
  stage. Its algorithm, however, builds each generation from tournament
  selection and mutation only. Only mutation is built here.
- **LFSR.** The polynomial and seeds are this design's own. Each generator
  also steps 32 times per clock (leap-forward). A one-step LFSR gives nearly
  the same word, shifted by one place, on consecutive clocks. That would make
  consecutive tournament indices and mutation positions strongly related.
- **Not built.** The 512-bit register array is not a separate block. The
  configuration is carried in the VRC's pipeline registers instead, and its
  size is checked at elaboration.
- **Search success.** This loop solves the benchmarks less often and more
  slowly than the original reports. See the workload results above.
