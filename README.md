# GAP/D: a genetic-algorithm processor ring that migrates when a deme stalls

A distributed genetic algorithm (GA) evolves several populations, called *demes*, side
by side. Now and then it must move genotypes between them. If it moves too few, each deme
converges early on its own local optimum. If it moves too many, the demes stop being
independent searches, and the links carry traffic for nothing. GAP/D makes that choice in
hardware. Each processor watches the slope of its own average-fitness curve. It sends new
genotypes to its neighbour only while that curve is flat, that is, while its deme is about
to converge.

This repository holds synthesizable SystemVerilog for the whole problem-independent part:

- a ring of four GA processors, one per deme, each with its own population memory;
- a cellular-automaton random number generator in each processor;
- tournament selection, crossover and mutation;
- the convergence monitor that makes the migration decision;
- a dispatch unit that drives two fitness evaluators per processor;
- the emigration and immigration ports that form the ring.

The fitness function is left to external *fitness evaluation processors* (FEPs), so one
processor design serves any optimisation problem. The testbenches supply a behavioural FEP
for the Royal-Road function.

## The migration rule

At the end of each generation *t* a processor computes the average fitness *f(t)* of its
deme and the gradient

    g(t) = ( f(t) - f(t - dt) ) / dt

If `g(t) <= G_TH`, the deme migrates during the next generation. G_TH defaults to 32. A
falling average also counts as flat.

How this is computed without extra passes over memory (`conv_monitor`):

- **The average is kept as a running sum.** Each write into the population memory replaces
  one individual. The controller reports the old fitness of the slot and the new one, and the
  sum is updated by `new - old`. `f(t)` is the sum divided by POP_SIZE. POP_SIZE is a power of
  two, so the division is a shift.
- **A generation is POP_SIZE replacements.** The GA is steady-state, so it has no natural
  generation boundary. A generation here is POP_SIZE new individuals, which is POP_SIZE/2
  evolution cycles (128 at the default size). At that length, the threshold of 32 separates
  a rising deme from a flat one on Royal-Road runs.
- **No divider for `dt`.** The unit compares `f(t) - f(t-dt) <= G_TH * DELTA_T`. DELTA_T is
  the gradient interval in generations and defaults to 1. The `gradient` output is
  `f(t) - f(t-dt)`, which equals g(t) when DELTA_T = 1.
- **Start-up.** `migrate_en` stays low until DELTA_T+1 averages exist. The first
  "generation" is the evaluation of the random initial population.

While `migrate_en` is high, the first child of every evolution cycle is offered to the
emigration port. That is the behaviour of a fixed every-cycle migration scheme, switched
on only while the deme is flat.

## One processor (`gap_node`)

```
            from previous deme
                   |
              immigration ----------------+
                                          v
  ca_rng --> gap_ctrl ------ pair -----> dispatch ===> FEP 0, FEP 1 (outside)
   (rnd)     | selection                   |   ^
             | crossover                   |   | fitness
             | mutation     evaluated pair |
             |        <--------------------+
             |  write-back
             v
          pop_mem ---- old/new fitness ---> conv_monitor --> migrate_en
                                                               |
             first child of each cycle -----------------> emigration --> to next deme
```

`gap_ctrl` is the population controller. After reset it builds the initial population:
POP_SIZE random genotypes, sent in pairs to the FEPs and written to slots 0..POP_SIZE-1.
`running` rises when the last one is written. From then on the controller repeats
*evolution cycles*:

1. Read four individuals at random addresses. Candidates 0 and 1 compete, as do 2 and 3;
   the fitter one of each pair becomes a parent (`tournament_sel`). The two losers' slots
   are where this cycle's children go, which makes this a steady-state GA.
2. Cross the two parents with a random uniform mask (`crossover`), which gives two children.
3. XOR a flip mask into each child (`mutation`). Each mask bit is the AND of five random
   bits, so every bit flips with probability 1/32.
4. Hand the pair and the two slots to `dispatch`, and offer the first child to `emigration`.

`dispatch` sends child *i* to FEP *i*, so both are evaluated at once. If an immigrant is
waiting, it takes the place of the second child. That way the immigrant is evaluated by
this deme's FEP and written into this deme's population.

When both results are back, a second state machine in `gap_ctrl` writes the pair. For each
child it reads the slot's old fitness, then writes `{fitness, genotype}` and reports
old and new fitness to the monitor.

## Timing of an evolution cycle

Genetic operations overlap fitness evaluation: while the FEPs work on one pair, the next
pair is already being made. With no waiting, one cycle takes **11 clocks**:

| clock | generation side                                        | random word used for   |
|-------|--------------------------------------------------------|------------------------|
| 0     | pair accepted by dispatch; selection cleared, masks reset | crossover mask      |
| 1-4   | four candidate reads issued                            | read address, mutation mask |
| 5     | fourth candidate captured                              | mutation mask          |
| 6     | winners crossed, children registered                   | mutation mask          |
| 7-10  | waiting for the mutation masks                         | mutation mask          |
| 11    | mutated pair offered = clock 0 of the next cycle       |                        |

The ten mutation-mask clocks (five per child, alternating) set the length of a cycle. The
published chip took 21 clocks per cycle with a different sequence. The clock count here is
this implementation's own.

Two kinds of waiting can occur; both are counted:

- **Stall (`stall_count`).** The pair is ready but dispatch still holds the previous pair,
  because the FEPs are slower than 11 clocks. In practice this is the normal case.
- **Blocked read (`rd_block_count`).** Write-back has priority on the single memory port. A
  candidate read that collides with it waits a clock. Dispatch holds one pair at a time, so
  this only happens when a pair comes back within a few clocks of being accepted.

Write-back takes 5 clocks from `out_valid` to `out_ready`.

Candidate reads may return an individual whose replacement is still being evaluated. That is
normal in a pipelined steady-state GA: the old individual is still a valid member until the
write.

## Random numbers (`ca_rng`)

The generator is a 64-cell linear cellular automaton with null boundaries. On every clock,
cell *i* becomes `s[i-1] ^ s[i+1]` (rule 90). Cells whose bit is set in RULE also add
`s[i]` (rule 150). The default rule vector `64'hd8f33418f3d4e711` was chosen so that the
state runs through all 2^64-1 nonzero values: the automaton's transition matrix over GF(2)
has order exactly 2^64-1. Unlike a shift register, every bit mixes with its neighbours on
every step. Each deme gets a different seed (`gapd_pkg::deme_seed`).

A single generator serves a whole processor, one 64-bit word per clock. The crossover mask is
sampled on a clock when the mutation unit takes no word. The candidate addresses share words
with the mutation masks, which is a weak correlation and was accepted.

## FEP interface

Per FEP:

| signal          | dir (processor view) | meaning |
|-----------------|-----|---------|
| `fep_req_valid` | out | a genotype waits for evaluation |
| `fep_req_gene`  | out | the genotype, held until accepted |
| `fep_req_ready` | in  | FEP accepts it on this clock |
| `fep_rsp_valid` | in  | one-clock pulse with the result, at least one clock after acceptance |
| `fep_rsp_fit`   | in  | fitness, FIT_W bits, larger is better |

Each FEP has one genotype in flight. The testbench FEP (`tb/fep_model.sv`) evaluates the
Royal-Road function: the genotype is cut into blocks, and each block of all ones adds
BLOCK×SCALE. The latency is random in a range.

## The ring

`gapd_top` connects deme *d*'s emigration port to the immigration port of deme
(*d*+1) mod N_DEMES. Both ports are one-entry buffers with valid/ready handshakes:

- **Emigration.** It keeps a child offered while `migrate_en` is high, if its buffer is free.
  Otherwise the child is not migrated, and `emig_skip_count` counts it.
- **Immigration.** It is ready while empty. It holds one genotype until dispatch takes it.

All FEP ports and the status of each deme are top-level ports:

- `avg_fit`, `gradient`, `migrate_en`, `gen_count`, `gen_tick`, `running`;
- the event counters.

## Parameters

| parameter | default | origin |
|-----------|---------|--------|
| N_DEMES   | 4       | published configuration (four demes) |
| POP_SIZE  | 256     | published (population size); must be a power of two |
| GENE_W    | 64      | published (genotype length) |
| FIT_W     | 24      | published (fitness length) |
| MUT_LOG2  | 5       | published mutation probability 1/32, read as per bit |
| G_TH      | 32      | published threshold |
| DELTA_T   | 1       | this implementation (gradient interval in generations) |
| RULE, SEED | see `gapd_pkg` | this implementation |

Crossover is applied to every pair, as published (probability 1). After synthesis the
default ring has about 1,700 word-level cells, 4,000 flip-flop bits, and 92 kbit of memory,
mostly the four 256 × 88-bit population memories.

## How far to trust it, and where it departs from the original

These follow the published design:

- the division into units and their connections;
- steady-state GA on a single population memory;
- overlap of genetic operations with fitness evaluation;
- two FEPs per processor;
- the ring of demes;
- the gradient rule with threshold 32;
- all published sizes.

The published description names several units without giving their insides. These are
choices made here:

- **Selection.** Two binary tournaments among four random individuals, with losers
  replaced. The published scheme is called "simplified tournament selection", but its exact
  rules are not given.
- **Crossover.** Uniform crossover. The crossover type is not given.
- **Mutation.** 1/32 is read as a per-bit probability.
- **Generation length, DELTA_T and the start-up rule** of the monitor, as described above.
- **Immigrant placement.** An immigrant replaces the second child of a pair and is evaluated
  by the receiving deme.
- **Emigration rate.** While migration is on, one child per cycle is offered for emigration.
- **Handshakes, buffer depths, the initial population, reset.** All registers that are read
  have a synchronous active-low reset `rst_n`; the population memory needs none because
  initialisation writes every slot.
- **Result path.** In the original, the FEP writes its result straight into the population
  memory. Here the result returns through dispatch and the population controller writes
  it. The memory therefore keeps one port, and the monitor sees every replacement.
- **Cycle length.** 11 clocks per evolution cycle, against 21 in the original chip.
- **Gate count.** The original's (about 60,000 gates) is not comparable with the synthesis
  figures above.

## Verification

Every unit has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ca_rng` | 2000 steps against a word-level model `(s<<1)^(s>>1)^(s&RULE)`; never zero; bit balance |
| `tb_crossover` | each child bit against the parent the mask selects |
| `tb_mutation` | masks rebuilt from the driven words; ready after 10 clocks; flip rate near 1/32 |
| `tb_pop_mem` | random reads and writes against a model array |
| `tb_tournament_sel` | winners and losers for random candidates in random order, including ties |
| `tb_conv_monitor` | average, gradient and decision at every boundary for a rising, flat, falling and rising curve, for dt = 1 and 2 |
| `tb_dispatch` | genotype routing, fitness return, immigrant substitution, both FEPs busy at once |
| `tb_emigration`, `tb_immigration` | handshakes, ordering, skip and receive counters |
| `tb_gap_ctrl` | full initial population; every write goes to a tournament loser with the right fitness; monitor fed the true old fitness; children are the winners' bits up to mutation; exactly 11 clocks per cycle; stalls and blocked reads |
| `tb_gap_node` | one processor looped to itself; memory always correctly evaluated; monitor average equals memory average at every boundary; migration on and off; fitness improves |
| `tb_gapd_top` | four demes of 32: the checks above per deme, emigrants all received, and every mechanism (stall, migration on/off, emigration, skipped emigration, immigrants written) seen |
| `tb_gapd_full` | the ring at its default parameters on the Royal-Road function for about 150,000 evolution cycles per deme |

In `tb_gapd_full` the Royal-Road function has eight 8-bit blocks worth 8192 each, so the
maximum is 65,536. That scale is the testbench's choice. The deme averages rise from near 0
to about 25,000 within 35 generations. They reach about 52,000–53,000 after 1172
generations, with each deme switching migration on and off many times. The run takes a few
seconds.

## Simulating

All files are plain SystemVerilog-2017. The package must be read first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/gapd_pkg.sv tb/tb_gapd_full.sv --top-module tb_gapd_full -o sim
./obj_dir/sim
```

Replace `tb_gapd_full` with any other testbench name. `tb/gapd_tb_body.svh` is the shared
end-to-end test body. To test a different size, copy `tb_gapd_top.sv` and change its
localparams (ND, POP, BLOCK, SCALE, LAT_MAX, RUN_GENS).

To use the ring for another problem, connect real FEPs to the `fep_*` ports. Any evaluator
that follows the handshake above will do. Then pick G_TH for the scale of the new fitness
function.
