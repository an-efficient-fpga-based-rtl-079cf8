# Complete evolvable hardware on an FPGA: compact GA core, test bench and evolvable individuals

This design evolves small digital circuits in hardware. A circuit, the
*individual*, is a fixed grid of 32 tiny programmable cells. Its function is set
entirely by a 1024-bit chromosome, which holds the contents of the cells'
look-up tables. A genetic algorithm proposes chromosomes. A hardware test
module runs each one against a table of input / expected-output pairs and
scores it. The algorithm then moves toward the better one.

Three parts that usually sit in software are hardware here:

- the genetic algorithm, which is a *compact* GA (cGA);
- the fitness evaluation;
- the individuals themselves.

Only one step is left to a host processor: loading each new chromosome pair
into the two individuals. On an FPGA that means partial reconfiguration
through the configuration port. In this RTL it is a plain write port
(`cfg_*`). Together the host and this RTL form a complete evolution loop.

## The compact genetic algorithm

A cGA stores no population. It keeps one probability per gene instead,
the *probabilistic vector* (PV): 1024 values of 16 bits, where 0x8000 means
0.5. Each generation does the following:

1. Sample two chromosomes A and B. Gene *i* of a chromosome is 1 when a fresh
   16-bit random number is below PV[i].
2. Score both.
3. Hold one binary tournament: the fitter is the winner. On a tie, A wins.
4. For each gene where winner and loser differ, move PV[i] by the step *t*
   toward the winner's bit. The result is kept inside [*d*, 1 − *d*].

The step sets the effective population size (t = 1/N). The default is
0x0400 = 1/64, which corresponds to 64 individuals. The margin *d* keeps
every gene slightly random, so it acts as a built-in single-gene mutation.
Its default is 0x07AE, about 3 %. Neither value is fixed in hardware: both
are registers the host writes.

Two options are set in `REG_CONFIG`:

- **Elitism** (bit 0). The chromosome memory holding the last winner is not
  resampled, so the winner meets a new challenger in the next generation.
- **Additional mutation** (bit 1). This mutates whole LUTs, which a
  single-gene rate cannot do. Two extra random generators, one per
  individual, are used. At the first gene of each 16-gene LUT, a random
  number below `REG_MUTPROB` marks the LUT as mutated. The 16 genes of a
  mutated LUT then take random bits instead of PV samples. This helps the
  search leave local maxima.

## Core phases (`cga_core`)

The core is a sequencer over three memories:

- the PV, a 1024 × 16 block RAM;
- chromosome A, 32 × 32;
- chromosome B, 32 × 32.

`REG_STATUS[3:0]` shows the current phase:

| phase | code | what happens | length |
|---|---|---|---|
| INIT | 1 | reseed the RNGs, write 0x8000 to all PV elements | about 1 030 clocks |
| GEN | 2 | `lutfg_generator` produces one 32-gene cell word for A and for B per pass; its 5-bit counter walks the genes, a memory pointer walks the 32 cells | 32 × 611 clocks |
| WREC | 3 | stall: the host reads the chromosomes and deploys them, then writes CTRL.deployed | host-defined |
| FEV | 4 | `testing_module` scores both individuals | 10 × tests + 2 |
| CMP | 5 | pick the winner, latch both fitness values | 1 clock |
| UPD | 6 | `pv_update` walks all 1024 genes | 2 clocks/gene + 4 per differing gene |

After UPD the generation counter increments and the core returns to GEN.
Writing CTRL.start restarts from INIT at any time.

### Generation: `lutfg_generator`, `rng`, `lfsr16`

The generator has four random number generators:

- RNG A and RNG B sample the two individuals;
- two more feed the additional mutation.

For each gene, the generator:

1. reads the PV element;
2. raises REQUEST;
3. waits until every RNG reports READY;
4. compares each number with the PV element and stores the gene bits.

After 32 genes it raises `ready`. Each RNG is a buffer filled one *noise bit*
per clock. The noise bit is the XOR of two 16-bit Fibonacci LFSRs, which
shift right and feed bit 15:

- one LFSR uses 2 taps (bits 6 and 0);
- the other uses 4 taps (bits 9, 5, 4 and 0).

The 32-bit seed is split between them: the low half goes to the 2-tap LFSR,
the high half to the 4-tap LFSR. REINIT loads the seed, and AVAILABLE shows
that the RNG is idle.

A 16-bit number takes 16 clocks, plus a handshake. A gene costs 19 clocks
and a cell 611. Note that neither LFSR is maximal length: from seed 1 their
periods are 434 and 57 337. Mixing them gives usable but not strong numbers.
The tap positions are kept exactly as the algorithm specifies them.

### Update: `pv_update`

Each gene goes through a small state machine:

1. READ: address the PV element.
2. READONE: latch the element and both gene bits.
3. Genes that agree are skipped.
4. STA: set up the add/subtract with the enable bit.
5. RFA: read the adder result.
6. WRT: write the element back.
7. CMP: wait for the write to complete.

An add is enabled only while the element is below 1 − d, and a subtract only
while it is above d. The result is clamped to that bound. Each time the
margin stops or limits an update, `clamp_hit` pulses; the SoC counts these
pulses in `REG_DBG_CLAMP`. The upper bound is min(1 − d, P + t).

## The evolvable individual

### Cell (`ehw_cell`)

One cell fits one Virtex-4 slice. It has:

- two 4-input LUTs, F and G, fed by the same four inputs;
- a multiplexer that picks between them using the cell's own flip-flop.

So a cell is a 5-input function of (state, 4 inputs), stored as 32 genes.
The bit selected is `luts[31 − {q, in}]`. The register updates only while
`ce` is high.

### Grid (`ehw_individual`)

There are four columns of eight cells. Cell *c* = 8·column + row holds
chromosome bits [32c+31 : 32c].

- Column 0 reads the 8-bit input word.
- Each later column reads the eight outputs of the column before it.
- Cells in rows 0, 2, 4 and 6 read the low nibble of that word.
- Cells in rows 1, 3, 5 and 7 read the high nibble.
- The output is column 3.

Routing is fixed and is not evolved. Because every cell is registered, an
input word reaches the output after four enabled clocks.

### Wrapper (`ehw_wrapper`)

The wrapper drives one individual through INPUT, CONTROL, OUTPUT and STATE
registers:

- CONTROL codes: EMPTY 0x00, START 0x01, RESET 0x02.
- STATE codes: waiting 0x02, complete 0x03 (the low bit means complete),
  running 0x00.
- FSM: WAIT_DATA → RESET_FF → ASSERT_CE → CLOCK_1 … CLOCK_4 →
  DEASSERT_ALL.
- An EMPTY word must come between two commands.
- RESET clears the cells and the output.
- START runs the four clocks and latches the output.

STATE and OUTPUT are registered. COMPLETE becomes visible 7 clocks after
START is presented.

### Testing module (`testing_module`)

The test memory holds up to 256 triplets (I, O, D):

- I is the input;
- O is the expected output;
- D is a don't-care mask.

An output R passes when `(R | D) == (O | D)`. The fitness is the number of
passed tests.

The module drives K = 2 wrappers in lockstep. Each test takes 10 clocks:
RESET, EMPTY, START, four evaluation clocks and the completion handshake.
The RESET for the next test is issued in the clock where COMPLETE is seen.
For each test, a results memory stores `{pass bits, outputs}` so the host
can read it back. A full set of 256 tests takes 2 562 clocks.

## SoC top (`ehw_soc`) and the host protocol

The top combines `cga_core` and `testing_module`. It adds a register bus
with these timing rules:

- A write takes one cycle.
- `bus_rdata` is valid one clock after `bus_re`.
- A `*_DAT` read must come at least two clocks after its `*_IDX` write.

| addr | name | access | meaning |
|---|---|---|---|
| 0x00 | CTRL | W | b0 start (INIT then evolve), b1 deployment done, b2 reseed RNGs |
| 0x01 | CONFIG | RW | b0 elitism, b1 additional mutation |
| 0x02 | STATUS | R | [3:0] phase, b5 evaluating, b6 fitness ready, b7 winner is B |
| 0x03 | STEP | RW | update step t (reset 0x0400) |
| 0x04 | MARGIN | RW | threshold d (reset 0x07AE) |
| 0x05 | MUTPROB | RW | LUT mutation probability, 16-bit fraction |
| 0x06 | NTESTS | RW | number of tests used (reset 256) |
| 0x07 | GENCOUNT | R | completed generations |
| 0x08–0x0B | SEED0–3 | RW | seeds of RNG A, B, mutation A, mutation B |
| 0x10 / 0x11 | FIT_A / FIT_B | R | fitness of this generation |
| 0x12 / 0x13 | DBG_MUT / DBG_CLAMP | R | mutated LUTs, margin stops |
| 0x20 / 0x21 | CHROM_IDX / CHROM_DAT | W / R | {B-select, cell} → 32 genes |
| 0x22 / 0x23 | PV_IDX / PV_DAT | W / R | gene → PV element |
| 0x24 / 0x25 | TEST_IDX / TEST_DAT | W / W | test → {D, O, I} in bits 23:0 |
| 0x26 / 0x27 | RES_IDX / RES_DAT | W / R | test → {pass B, pass A, out B, out A} |

The host loop is:

1. Write the test set and NTESTS.
2. Write CTRL = 1.
3. Wait for `irq_wrec`. Read the 2 × 32 chromosome words and write each one
   to the deployment port (`cfg_we[k]`, `cfg_cell`, `cfg_data`). Then write
   CTRL = 2.
4. Wait for `irq_fit`. Optionally read FIT_A, FIT_B and STATUS.
5. Repeat from step 3.

A host can stop when a fitness value equals the number of tests.

With the default settings, one generation takes about 19 600 clocks for
sampling and 2 562 for scoring, plus 2 000–4 000 for the update, plus the
deployment time. Sampling dominates the time because of the bit-serial
random numbers.

## Where this design fills gaps or departs from the original system

- **The processor, bus, DDR memory, UART, the configuration access port and
  the bitstream builder** are not included. The builder is the software that
  computes frame addresses and writes LUT bits into partial bitstreams. The
  register bus and the deployment port stand in their place. In the FPGA
  system the LUT contents live in configuration memory. Here they sit in a
  register file inside each individual.
- **Random number width.** The original system names both 8-bit and 16-bit
  numbers. This design uses 16 bits (`rng` parameter `WIDTH`), because the
  numbers are compared with 16-bit PV elements.
- **RUNNING code.** The original STATE table gives RUNNING and waiting the
  same code, 0x02. Here RUNNING is 0x00, so that "low bit set" still means
  complete.
- **Update bound.** The upper clamp is min(1 − d, P + t), which matches the
  definition of the margin.
- **Tie rule, register map, default seeds and cycle counts** are this
  design's own choices. The one exception is the 10 clocks per test, which
  follows the original system. Also this design's own: the zero-seed guard
  (a zero seed loads 0x0001), the results-memory layout, and the way LUT
  mutations draw their random bits.
- **Elitism.** Elitism is a single flag that stops the winner's memory
  from being resampled. The host may set or clear it in any phase, and
  that runtime switching is the only way persistent and non-persistent
  elitism are told apart. The "high selection pressure" option is not
  implemented.
- **Generation rate.** At 100 MHz the hardware part of one generation
  takes about 0.25 ms. The rest of each generation, building and sending
  two partial bitstreams, happens outside this RTL and sets the overall
  rate. The original system reports 226 to 247 generations per second
  with that software included.
- **Size.** The design holds the standard 1024-gene individual. The extended
  16-component individual (a 16 384-bit genome and a 32-bit data path) is not
  built. The core's `NCELLS` parameter sizes the PV and chromosome memories,
  but the testing module and individuals are fixed at 32 cells.

## Files

Files in `rtl/`:

- `ehw_pkg.sv`: sizes, command and state codes, the test-triplet struct, the
  phase enum and the register map.
- `ehw_cell.sv`, `ehw_individual.sv`, `ehw_wrapper.sv`: the individual.
- `testing_module.sv`: fitness evaluation.
- `lfsr16.sv`, `rng.sv`, `lutfg_generator.sv`: random sampling.
- `pv_update.sv`, `bram_sp.sv`, `cga_core.sv`: the algorithm.
- `ehw_soc.sv`: the top.

Files in `tb/`: each `tb_<module>.sv` checks its module against independent
reference models in `ehw_ref_pkg.sv`. Every testbench prints
`TB_RESULT checks=N failures=M`. The testbenches cover:

- cycle counts: RNG 17, wrapper 7, test 10 per vector, generator 609, cell
  611 in the core;
- LFSR periods;
- update arithmetic and margin clamping;
- elitism, mutation and tie rules.

`tb_cga_core` evolves a 64-gene OneMax problem to completion, with the host
computing fitness. `tb_ehw_soc` runs the full-size system at its default
parameters for 24 generations on 4-input parity. In that run the host model:

- deploys each pair over the bus;
- checks both fitness values, the results memory and all 1 024 PV elements
  after every update;
- switches elitism, LUT mutation, a large step and a reseed on during the
  run;
- restarts the core in the middle of an update pass and checks that the
  vector is back at 0.5;
- counts each of these mechanisms, and fails if one never happens.

`tb_parity_evolution` runs the benchmark workload itself. It evolves a
4-input parity generator (16 tests, output bit 0 relevant, default step
and margin, no options) until one individual passes every test, and then
re-scores that chromosome with the reference model. It typically needs
about 4 600 generations (the original system averaged about 4 400), which is
about 110 million clocks and a little over a minute of simulation. For 5 to 8 inputs only the `SIZES` list changes;
those runs take proportionally longer.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_ehw_soc \
  -y rtl -y tb rtl/ehw_pkg.sv tb/ehw_ref_pkg.sv tb/tb_ehw_soc.sv -o sim
./obj_dir/sim
```

Replace `tb_ehw_soc` with any other testbench name. All modules are
synthesizable, and the packages are the only shared files. `tb_ehw_soc`
takes about 20 s and `tb_cga_core` about 7 s; every other testbench except
`tb_parity_evolution` finishes in seconds.
