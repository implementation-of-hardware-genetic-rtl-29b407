# Hardware genetic operators: CA random numbers, systolic selection, crossover and mutation

A genetic algorithm spends most of its time on three problem-independent
operations: choosing parents in proportion to their fitness (roulette-wheel
selection), mixing pairs of parents (crossover) and flipping genes at random
(mutation). Only the fitness function depends on the problem. This RTL puts
the three operators, and the random numbers they need, in hardware. The
fitness function stays outside, in software or in problem-specific logic. The
engine takes a scored population in, one gene per clock. It returns the next
generation's offspring, also one gene per clock. The outside world scores the
offspring and sends them back, which closes the loop.

The structure follows a published FPGA genetic engine from 2008. That design
has hybrid cellular-automaton (CA) random number generators, a systolic
selection array, uniform crossover cells, comparator-based mutation cells,
four chromosome memory blocks and a delivery controller. Where the
publication leaves something open, this RTL makes its own choice. The section
"How far this follows the original" lists those choices.

Default sizes, all in `rtl/ga_pkg.sv`:

| quantity | value |
|---|---|
| population (and selection array size) | 4 chromosomes, 4x4 cells |
| chromosome | 6 genes of 8 bits |
| fitness, ball, random numbers | 16 bits |
| crossover mask generator | 8 CA sites |

## Data flow of one generation

```
 pop_gene/pop_fit ──► ga_control ──wr_en──► chrom_mem x4 ──(staggered reads)──► sel_array 4x4 ──► xover_module ──► mut_module x4 ──► out_gene[0..3]
                        │   fit_sum ────────────────────────────────────────────────▲   ▲ balls
                        │   sel_step ──► ca_rng x4 (one per column) ─── rnd ────────────┘
                        └── seed_load ──► every generator, once after reset
```

1. **Load.** The outside writes `POP*GENES` = 24 beats, chromosome 0 first.
   Beat *b* goes to memory block *b*/6. The controller adds each
   chromosome's fitness to `fit_sum`, saturating at 65535. On the last beat
   it steps each column's generator once. That gives fresh balls for this
   generation, and the balls then hold still for the whole selection.
2. **Selection.** Block *k* is read in clocks *k* .. *k*+5. Each row of the
   array therefore starts one clock after the row above (the stagger). Each
   of the four columns draws one chromosome.
3. **Crossover.** Selected chromosomes 0 and 1 are crossed, and so are 2 and
   3. The swap mask comes from an 8-site generator that steps once per gene.
4. **Mutation.** Each of the four offspring streams has its own 16-site
   generator. The whole 8-bit gene is inverted when the random number is
   below `pmut`.

## The random number generators (`ca_rng`)

Each generator is a line of N one-bit cells. On each enabled clock, cell *i*
takes the XOR of its left and right neighbours. A rule-150 cell also XORs in
its own value (bit *i* of `RULE150` set); a rule-90 cell does not. The line
is not a ring. The left neighbour of cell 0 is input `a`, tied to 0 in the
engine. The right neighbour of the last cell is input `z`, tied to 1.
Because `z` is 1, the all-zero state is not a fixed point, so a generator can
start from zero.

The 16-site rule vector is `16'hAAAB`. Cell 0 and the odd cells use rule 150;
the even cells 2..14 use rule 90. Bit 15 is the cell next to `z`. This vector
reproduces the original output table: from seed 0 the outputs are 32768,
16384, 8192, 61440, 47104, … From zero it returns to zero after 65535 steps,
so one 16-bit value is never reached. The original text claims a full 2^16
period; its own table contradicts that. The 8-site generator of the crossover
module uses `8'hAB` (period 255). The original gives no 8-site rule. A 4-site
generator is `N=4, RULE150=4'hA` (period 15).

`q` is the state and `d` the next state. `clr` clears asynchronously.
`load` writes `seed`. The engine gives every generator its own seed,
`SEED + i*16'h3C5B`, loaded once in the clock after reset. If two generators
shared a seed, the four selection columns would all pick the same parent.

## The systolic selection array (`sel_array`, `sel_cell`)

This is the least obvious part of the design.

**Roulette wheel.** The ball of column *j* is `(rnd_j * fit_sum) >> 16`. The
random number is read as a fraction in [0, 1) and scaled to a point in
[0, fit_sum). Chromosome *k* wins column *j* when the ball is at least the
fitness sum of chromosomes 0..*k*-1 and below the sum of 0..*k*. The odds
are therefore fit_k / fit_sum. A chromosome with fitness 0 is never picked.
The same chromosome may win several columns.

**Cells.** Chromosome *k* streams along row *k*, left to right: one gene per
clock (`ga`), with its fitness (`fit`) held beside it. Column *j* carries
three things top to bottom:

- the remaining ball;
- a flag `sel`, meaning "already selected";
- the gene stream of the winner so far (`sg`).

Each cell computes `ball - fit`. If that is negative (a zero crossing) and
`sel` is still low, the cell wins. It puts its row's gene on `sg`, raises
`sel` and sends the ball on as all ones. Otherwise the ball goes on reduced
by `fit`, and `sg`/`sel` pass through. Every output is registered, so data
moves one cell per clock in both directions.

**Why the stagger.** Cell (*k*, *j*) must see gene *g* of row *k* in the same
clock as the `sg` stream from the cell above. Row data reaches column *j*
after *j* clocks. Column data reaches row *k* after *k* clocks. Both line up
when row *k* is fed *k* clocks after row 0. Ball and fitness are constant
for a whole chromosome, so each cell's decision stays the same for all six
genes. The winner's chromosome therefore passes through whole, with no state
kept per chromosome.

**Output alignment.** Column *j* leaves the bottom *j* clocks after column 0.
Output registers delay column *j* by 3-*j* more clocks. Gene *g* of every
selected chromosome then appears together, 2*POP-1 = 7 clocks after row 0
received gene *g*. `sel_out[j]` says whether column *j* found a winner. It
is always 1 when `fit_sum` is the true, non-zero sum. If the sum saturated,
the ball is still below the true sum, so a winner is still found, but with
slightly distorted odds.

## Crossover and mutation

- **`xover_cell`**: uniform crossover. Where mask bit *i* is 1, the parents
  swap bit *i*; elsewhere each child keeps its own parent's bit. The outputs
  are registered. Its default width of 16 is the parallel cell of the
  original. The engine uses it at 8 bits, one gene per clock, so chromosome
  length is only a matter of how many genes are streamed.
- **`xover_module`**: the 8-site generator and two cells sharing one mask.
  The generator steps on every gene (`ce`).
- **`mut_cell`**: a 16-bit comparator (`rnd < pmut`), an XOR with the gene
  bit and a register with clock enable and clear.
- **`mut_module`**: a 16-site generator and eight cells. All eight compare
  the same random number, so a gene is either kept or inverted as a whole,
  with probability `pmut`/65536. The generator steps on every gene.

## Memory and control (`chrom_mem`, `ga_control`)

Each of the four memory blocks holds one chromosome: 6 genes of 8 bits, plus
its fitness. One wrapping counter is the pointer for both writes and reads,
so a chromosome goes in and out as an ordered stream. Reads are registered,
with one clock of latency.

The controller has four states: INIT (seed load), IDLE, LOAD and RUN. In RUN
one counter *c* produces every enable. The counter starts on the clock after
the last load beat.

| signal | high for counter values |
|---|---|
| `rd_en[k]` | k .. k+5 |
| selected genes at the array output | 8 .. 13 |
| `xo_ce` | 8 .. 13 |
| `mut_ce` | 9 .. 14 |
| `out_valid` (`out_first` at 10, `done` at 15) | 10 .. 15 |

A generation takes 24 load beats plus 16 run clocks. The next population is
accepted as soon as `pop_ready` rises again. Every stage handles one gene
per clock. The original reports 13.4 ns per gene on a Virtex-II (74.6
million genes/s); that is a clock-rate figure this RTL does not claim.

## Engine interface (`ga_engine`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clr` | in | 1 | clock; asynchronous active-high clear |
| `pop_valid`, `pop_gene`, `pop_fit` | in | 1, 8, 16 | population beat; hold `pop_fit` for the 6 genes of a chromosome |
| `pop_ready` | out | 1 | beats are accepted (IDLE/LOAD) |
| `pmut` | in | 16 | mutation probability × 65536 |
| `out_valid`, `out_first` | out | 1 | offspring gene valid; gene 0 |
| `out_gene` | out | 4×8 | gene *g* of each of the four offspring |
| `sel_found` | out | 4 | column found a winner |
| `busy`, `done` | out | 1 | run in progress; last offspring gene |

Parameter `SEED` (default `16'h0001`) sets the base of the generator seeds.
Beats may pause (`pop_valid` low) during a load. Beats sent while
`pop_ready` is low are ignored.

## How far this follows the original

Taken from the original:

- the CA generator structure;
- the 4x4 array of subtract-and-test selection cells, with an all-ones ball
  after a selection;
- the uniform crossover rule, including its published 16-bit example;
- the comparator/XOR/register mutation cell and the shared random number of
  the mutation module;
- four memory blocks of one 6×8-bit chromosome each, with a counter as
  pointer;
- a controller that holds the selection random numbers for a whole
  selection period.

This design's own choices:

- the 16-site rule vector, recovered by fitting the published output table
  (it matches 61 of 64 published values; the other three are evidently
  misprints);
- the seed-load port and the per-instance seeds;
- the ball scaling by multiplication, and the saturating fitness sum;
- the separate selected-gene channel in the selection cells;
- the output deskew registers;
- the pairing 0/1 and 2/3 for crossover;
- one mutation module per offspring stream;
- the 8-site rule vector;
- the stream protocol at the ports;
- the controller's states and timing;
- the clock enables used in place of a separately generated "master clock".

Other departures:

- The original 16-site generator reports 32 flip-flops, so it probably also
  registered the next state. Here `d` is combinational.
- The original also mentions a bit-serial crossover cell. Here the serial
  form works one 8-bit gene per clock.

Not built: the fitness evaluation and population generation. They are
problem dependent, and the original leaves them outside the engine.

## Simulating

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. For example, to run the whole engine:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/ga_pkg.sv tb/tb_ga_engine.sv \
          --top-module tb_ga_engine -Mdir obj && obj/Vtb_ga_engine
```

(`-y rtl` lets verilator find each module in `rtl/<name>.sv`; the package is
given first because every block imports it.)

To test a single block, replace the testbench and top module name, e.g.
`tb/tb_sel_array.sv` and `tb_sel_array`.

- `tb_ga_engine` runs the engine at its default size for 60 generations. It
  acts as the fitness side, with one-max fitness: the number of one bits
  plus 1. It predicts every offspring gene with its own model of the
  generators and operators, and checks the output timing. It also counts
  that each mechanism happened: selection in every column, one chromosome
  winning two columns, a zero-fitness chromosome passed over, crossover
  swaps, mutations, a saturated fitness sum and paused loads.
- `tb_ca_rng` checks the published output table (seeds 0 and 1) and the
  period.
- `tb_xover_cell` checks the published 16-bit crossover example.
- `tb_mut_module` checks the published mutation example: gene 11001100,
  `pmut` = 0x1000, random number 0x0AF7, giving 00110011.
- `tb_sel_cell` checks the published selection-cell example: fitness 255
  against balls 191 and 447.
- The other testbenches compare each block against reference models.

## Changing sizes

`GENE_W`, `GENES`, `FIT_W` and `POP` live in `ga_pkg`. The blocks take them
as parameter defaults, and the controller derives its timing from them.
`POP` must be even for the crossover pairing.

Changing `RNG_W` or the gene width needs a matching CA rule vector. Choose
one with maximal period for the new length, and check the period by
simulation, as `tb_ca_rng` does.

The testbenches, including the end-to-end test, assume the default sizes.
