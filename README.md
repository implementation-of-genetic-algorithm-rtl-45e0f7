# Genetic-algorithm accelerator for the travelling salesman problem

A genetic algorithm (GA) built entirely in hardware searches for a short
closed route through N cities, the travelling salesman problem. Every step of the GA runs
as dedicated logic under one state machine. Routes are stored as
permutations in dual-port block RAM. Route length is computed by a four-stage
pipeline that adds one pre-computed city-to-city distance per clock. The
operators are swap mutation, order crossover (OX1), tournament selection and
elitism. The design targets a small FPGA (it was conceived for a Xilinx Artix-7
XC7A15T at 100 MHz), but the RTL is generic and uses no vendor primitives.

The default configuration is 70 cities, 200 individuals and 4000
generations. The tournament size is 5, the crossover rate 0.95, the mutation
rate 0.01, and the best 10 % of each generation are kept unchanged.

## How a run proceeds

```
                +-------------------------- ga_controller (FSM) ---------------------------+
 start -------->| IDLE > INIT > {SHUFFLE > EVALUATION > CHECK_BEST} x POP                  |
                |   > per generation: {ELITE|SELECT > CROSSOVER > [MUTATION] > EVALUATION   |
                |                      > CHECK_BEST} x POP > NEXT_GEN ... > DONE            |
                +---+-----------+-------------+--------------+---------------+------------+
                    |           |             |              |               |
               lfsr32     swap_mutation   ox_crossover   tournament_/    fitness_pipeline
             (random)    (2-cycle swap)   (OX1 / copy)   elite_select    (+ dist_rom)
                    |           |             |              |               |
                    v           v             v              v               v
             +-------------+ +-------------+          +------------+   +---------------+
             | dp_bram 0   | | dp_bram 1   |          | cost_table |   | best_register |--> best_dist
             | (POP x N)   | | (POP x N)   |          | 2 x POP    |   | + comparator  |
             +-------------+ +-------------+          +------------+   +---------------+
               parents <-> offspring, roles swap every generation
```

1. **INIT** writes the identity route 0,1,…,N-1 into every individual of RAM 0,
   one gene per clock (POP·N cycles).
2. **SHUFFLE** turns each identity route into a random route by making N
   random swaps. The route is then evaluated and offered to the best
   register. This builds generation 0.
3. **Each generation** fills the offspring RAM slot by slot:
   * Slots 0 … POP/10-1 are **elites**. `elite_select` scans the parents'
     costs for the best individual not yet taken, and the crossover unit
     copies that route unchanged.
   * Every other slot runs **two tournaments** of 5 random individuals,
     which give parent 1 and parent 2. **Order crossover** of the two
     parents follows; with probability 0.05 the child is a plain copy of
     parent 1 instead. Then comes **one swap mutation** with probability
     0.01.
   * Each child is **evaluated**. In **CHECK_BEST** its cost goes into the
     cost table and is offered to the global best register.
4. **NEXT_GEN** swaps the roles of the two RAMs and of the two cost-table
   banks, then counts the generation. After MAX_GEN generations the FSM
   stays in DONE.

Every random choice uses 16-bit halves of one free-running 32-bit LFSR
(x^32+x^22+x^2+x+1, Galois form). An index in [0, R) is computed as
`(r * R) >> 16`. A probability p is a 16-bit threshold round(p·65536),
compared with r.

## Storage layout

* **Routes.** Gene *p* of individual *i* sits at address `i*N + p` of a
  14-bit-addressed, 8-bit-wide true dual-port RAM. The size is 200·70 = 14,000
  words. There are two such RAMs. One holds the parents (`par_bank`) and the
  other takes the offspring (`work_bank`). During generation 0 both roles are
  RAM 0.
* **Costs.** `cost_table` holds POP 32-bit costs per bank in two banks. Its
  read is asynchronous, so selection compares one cost per clock.
* **Distances.** `dist_rom` holds the N×N matrix of 16-bit integer distances
  at address `a*N + b`, with a one-cycle read. The matrix is computed at
  elaboration by `ga_pkg::euc_dist`, which returns the Euclidean distance
  rounded to the nearest integer. The coordinates come from `city_x`/`city_y`.
  The built-in instance is a **synthetic** set of 70 points in a 1000×1000
  square, given by closed formulas in `ga_pkg`. To run a real instance (for
  example TSPLIB st70, eil51 or wi29), replace those two functions, or
  `euc_dist` itself, and set N to match. A route's length is fixed at N at
  elaboration.

## The operators in detail

### Fitness pipeline (`fitness_pipeline`, `dist_rom`)

The pipeline uses both RAM ports to read two neighbouring cities in one cycle:

| stage | cycle | work |
|---|---|---|
| 1 fetch | t | counter *i* → port A address `base+i`, port B address `base+(i+1) mod N` |
| 2 read | t+1 | RAM returns cities a, b; ROM address `a*N+b` is formed |
| 3 lookup | t+2 | ROM returns d(a,b) |
| 4 accumulate | t+3 | `acc += d(a,b)` (32-bit; the last edge closes the tour) |

One edge enters per clock. `done` pulses N+3 cycles after `start`, with the
closed-tour cost on `cost`.

### Swap mutation (`swap_mutation`)

In the first cycle both genes are read, one through each port. In the second
cycle both ports write with their data inputs cross-wired: port A writes what
port B read, and port B writes what port A read. No holding register is
needed beyond the RAM's own output registers. A swap takes 2 cycles, and
another may start right after it. SHUFFLE uses the same unit.

### Order crossover (`ox_crossover`)

This is the hardest block to follow. A child must be a valid permutation,
and it is built without ever searching memory:

1. **Segment copy.** Counter P1 walks cut1…cut2 of parent 1, and each gene is
   written to the same position of the child.
2. **Fill and validate.** Counter P2 walks all N positions of parent 2,
   starting after cut2 and wrapping. A *comparator* decides whether the city
   is already in the child. It is built as one presence bit per city, set on
   every write. If the city is missing, it is written to the next free child
   position, which starts after cut2 and wraps. If the city is present, the
   write enable is suppressed.

Reads are issued one per cycle. The gene is checked the next cycle, when a
2-to-1 multiplexer picks the parent-1 or parent-2 data. It is held in
register `P2_REG` and written the cycle after that. Exactly N child words are
written. `done` comes (cut2-cut1+1)+N+3 cycles after `start`. In copy mode the
cut points become 0 and N-1 and the fill phase is skipped, so a copy takes
N+3 cycles. Copy mode serves the elites and the children that skip crossover.

Parents are read from the parent RAM, parent 1 on port A and parent 2 on
port B. The child is written through port A of the offspring RAM. This is
why two RAMs are used.

### Selection and elitism (`tournament_select`, `elite_select`)

The tournament makes its 5 draws in 5 consecutive cycles, each a random index
and a cost compared with the best so far. The lowest cost wins, because
fitness is the reciprocal of route length. Elite selection is a full minimum
scan (POP cycles) over parents not yet taken. It is repeated POP/10 times,
so the elites come out best first.

### Best register (`best_register`)

The best register holds the lowest cost so far (`best_dist`), the generation
that found it, and its slot. An update needs a strict `<`. Because the
overall best is always the first elite, it sits in slot 0 at the start of
every generation. The controller then *rebases* the stored slot to 0. At
`done`, `best_idx` therefore points at the best route in the final
population, and that route can be read through `rd_addr`/`rd_city`.

## Top-level interface (`ga_tsp_top`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst | in | 1 | clock; synchronous active-high reset |
| start | in | 1 | starts a run when idle (may be held high) |
| done | out | 1 | high from the end of the last generation until reset |
| best_dist | out | 32 | best route cost found |
| best_idx | out | 16 | slot of that route in the final population |
| best_gen | out | 16 | generation that found it (0 = initial population) |
| best_update | out | 1 | one-cycle pulse on each improvement |
| current_gen | out | 16 | finished generations (= MAX_GEN at done) |
| pop_size_out, total_gen | out | 16 | POP and MAX_GEN |
| rd_addr / rd_city | in / out | 14 / 8 | read port into the final population, one-cycle latency, valid after done |

Parameters: `N` (70), `POP` (200), `MAX_GEN` (4000), `TOUR_SIZE` (5),
`CX_RATE` (62259 = 0.95·65536), `MUT_RATE` (655 = 0.01·65536) and `SEED`.
The elite count is POP/10, with a minimum of 1. Bus widths are in `ga_pkg`:
14-bit RAM address, 8-bit city, 16-bit distance and ROM address, 32-bit cost,
16-bit generation counters. With 8-bit cities, N can be at most 256. POP·N
must fit 14 address bits; widen `ADDR_W` for larger problems.

## Throughput

At the default size, a full run of 4000 generations takes **162.5 M clock
cycles**, or about 40,600 cycles per generation. At 100 MHz that is about
1.6 s. Most of a generation goes to the crossover (about N + segment cycles
per child) and the evaluation (N+3 per child). Another 20 × 200 cycles go to
the elite scans. The original implementation reports about 22,500 cycles
per generation for this configuration (0.90 s at 100 MHz). It does not say
how its steps are scheduled, so this figure is not reproduced here.

| configuration | cycles per generation, this RTL | reported for the original |
|---|---|---|
| 29 cities, POP 150, 1500 generations | 15,709 | about 13,330 |
| 51 cities, POP 150, 2000 generations | 23,230 | about 25,000 |
| 70 cities, POP 200, 4000 generations | 40,629 | about 22,500 |

## Where this RTL follows the original design and where it chooses

The original design fixes the following, and this RTL follows it:

* The operators and rates. The state names IDLE … NEXT_GEN and the
  generation counter that stops at MAX_GEN.
* The identity fill, and swap-based shuffle and mutation through the two RAM
  ports.
* The 4-stage fitness pipeline with ROM lookup and one edge per clock.
* The OX1 datapath: two counters, multiplexer, P2_REG, and a comparator that
  gates the write enable.
* The 32-bit LFSR, integer distances, and the bus widths listed above.

This implementation chose the rest:

* The two RAMs used ping-pong, and the cost table.
* ELITE/SELECT/CROSSOVER as explicit states in the generation loop.
* The mutation rate applied once per child: one swap with probability 0.01.
* The presence-bit comparator, and the classic wrap-around fill order of
  OX1.
* Sequential tournament draws instead of parallel comparators.
* Elitism by repeated minimum scans.
* The LFSR polynomial and seed, and rounding of distances to the nearest
  integer.
* The closing edge in the route cost.
* All handshakes and latencies.
* The best-route slot tracking and the read-back port.

Not included:

* No host interface (UART or other).
* No 2-opt local search. It belongs to the software version of the algorithm.
* No real benchmark coordinates; the built-in instance is synthetic.

With a mutation rate of 0.01 per child and swap mutation only, the population
loses diversity early. In the full-size run the best route stops improving
after about a hundred generations. Raising `MUT_RATE` trades convergence
speed for exploration.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=… failures=…`. The expected values are computed
independently, for example distances with real-valued `$sqrt`, and OX1
children from a software model.

| testbench | what it checks |
|---|---|
| `lfsr32_tb` | 5000 steps against a software LFSR, seed, enable, never zero |
| `dp_bram_tb` | random two-port traffic against a reference array, read-first, latency 1 |
| `dist_rom_tb` | all 4900 entries of the 70-city matrix |
| `fitness_pipeline_tb` | 8 random 70-city routes, cost and N+3 latency |
| `swap_mutation_tb` | 500 back-to-back swaps, 2-cycle timing, final contents |
| `ox_crossover_tb` | 205 crossovers and copies against an OX1 model, N writes, exact latency |
| `tournament_select_tb` | drawn indices, winner, TOUR_SIZE+1 latency |
| `elite_select_tb` | top 10 % in order with ties, scan time |
| `best_register_tb` | strict comparison, ties, update pulse, rebase, clear |
| `ga_controller_tb` | the FSM with behavioural operator stand-ins: fill, shuffle, per-generation counts, parent bases, cost writes, bank swaps |
| `ga_tsp_top_tb` | a whole run at N=12, POP=20, 30 generations: final population all permutations, recomputed costs equal the table, route at `best_idx` costs `best_dist`, `best_dist` never rises; every mechanism (fill, shuffle, elite, tournament, crossover, crossover-rate copy, comparator suppression, mutation, improvement, rebase, generation turn) counted and required |
| `ga_tsp_full_tb` | the same checks with every parameter at its default: 70 cities, 200 individuals, 4000 generations (about 2 minutes in Verilator) |
| `ga_tsp_workloads_tb` | the two smaller evaluation sizes side by side, 29 cities / 150 / 1500 generations and 51 cities / 150 / 2000 generations (about 1 minute), each checked by `ga_run_checker` as above |

To run one, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/ga_pkg.sv tb/ga_tsp_top_tb.sv \
          --top-module ga_tsp_top_tb -o sim && ./obj_dir/sim
```

The testbenches finish with `$finish` and have watchdogs. They read no files.
