# Evolvable sensor-validation hardware on a virtual reconfigurable circuit

A plant is watched by three redundant sensors. When one or two of them fail,
or when all of them are noisy, the circuit that combines their readings into
one trustworthy value has to change. This design does that change in hardware.
A small genetic algorithm searches for a new configuration of a *virtual
reconfigurable circuit* (VRC), a grid of 25 programmable 8-bit processing
elements (PEs) built from ordinary logic. Configurations are scored against
training samples that the host supplies. The best one is loaded into the VRC,
which then processes the live sensor readings.

The host, typically a PC, estimates the plant and decides which sensors have
failed. It turns that decision into a training set: for each sample, three
sensor readings and the value the output should have. The host side is not
part of this RTL. The top module brings out the ports the host would drive.

The architecture follows a published model VRC for sensor fault handling:
25 PEs in six columns of four plus one output PE, 13 PE functions, 8-source
operand multiplexers and 8/10-bit PE configuration words. The publication
gives almost nothing about the genetic unit beyond a block diagram, so every
detail of the evolution loop here is this design's own choice. The section
*Departures and open points* lists them.

## The VRC array

```
 x0,x1,x2 ──┬──────────┬──────────┬── ... ──┬──────────┐
            │          │          │         │          │
         ┌─────┐    ┌─────┐    ┌─────┐   ┌─────┐    ┌─────┐
         │PE 0 │──┐ │PE 4 │──┐ │PE 8 │   │PE 20│──┐ │     │
         │PE 1 │──┼▶│PE 5 │──┼▶│PE 9 │ … │PE 21│──┼▶│PE 24│──▶ y
         │PE 2 │──┤ │PE 6 │──┤ │PE 10│   │PE 22│──┤ │     │
         │PE 3 │──┘ │PE 7 │──┘ │PE 11│   │PE 23│──┘ └─────┘
         └─────┘    └─────┘    └─────┘   └─────┘
         column 0   column 1   column 2  column 5   output PE
```

Each PE has two operand multiplexers (X and Y), a function unit and an 8-bit
output register. The configuration memory drives the multiplexer selects and
the function code directly.

**Operand sources.** A PE in column 0 picks each operand from 4 sources
(2-bit select):

| select | 0  | 1  | 2  | 3 |
|--------|----|----|----|---|
| source | x0 | x1 | x2 | 0 |

Every other PE, the output PE included, picks from 8 sources (3-bit select):

| select | 0..3                                    | 4  | 5  | 6  | 7 |
|--------|-----------------------------------------|----|----|----|---|
| source | PE outputs of the preceding column, rows 0..3 | x0 | x1 | x2 | 0 |

The limit of 8 sources comes from the original design. Which 8 sources a PE
sees is this design's choice. Letting every column reach the circuit inputs
directly is what allows time-dependent circuits (see *Timing*).

**Functions** (4-bit code, `pe_func_e` in `vrc_pkg`):

| code | function     | code | function       |
|------|--------------|------|----------------|
| 0    | X << 1       | 7    | X \| 0xF0      |
| 1    | ~X           | 8    | X \| 0x0F      |
| 2    | X \| Y       | 9    | min(X, Y)      |
| 3    | X ^ Y        | 10   | max(X, Y)      |
| 4    | (X + Y) >> 2 | 11   | X >> 1         |
| 5    | (X + Y) >> 1 | 12   | X + Y (mod 256)|
| 6    | X & 0xF0     | 13-15| X (unused codes)|

The two averaging functions use the 9-bit sum, so they do not overflow.
There is no explicit "wire" function. To route a value through a column, use
`X | 0`: operand X from the value, operand Y from source 7.

**Chromosome layout.** Each PE has one configuration word made of three
fields. From the least significant bit: `sel1` (X source), `sel2` (Y source)
and `func`. The words of PEs 0..3 are 8 bits (2+2+4). The words of PEs 4..24
are 10 bits (3+3+4). The words are concatenated with PE 0 in the lowest bits,
for 4·8 + 21·10 = 242 bits. `vrc_pkg::cfg_offset(p)` and `cfg_width(p)` give
each PE's word position and width.

## Timing

Every PE output is registered, so each column is one pipeline stage. A
circuit input reaches `y` after **7 clock cycles** (`vrc_pkg::LATENCY`). A PE
in column *c* can combine a preceding-column output, which is derived from
inputs that are at least one cycle older, with a fresh circuit input. The
array can therefore build delay lines and small filters as well as pure
combinational functions. The noise-filtering workload depends on this.

Reconfiguration takes effect at the next clock edge. The PE registers keep
their contents across a reconfiguration. `clr` zeroes them synchronously.

## The evolution loop

```
 rng ─▶ init_pop_gen ─┐                     ┌─▶ mutation ─┐
                      ▼                     │             ▼
                 chrom_mem (POP × 242) ◀────┴──── ga_controller ──▶ vrc cfg load
                      │                                ▲
 sample_mem ─▶ fitness_eval ◀──▶ vrc                   │
                      │                                │
                      ▼                                │
                 err_mem (POP × 14) ─▶ selection ──────┘
```

`ga_controller` runs a generational, elitist, mutation-only evolution:

1. **Initial population.** `init_pop_gen` fills each of the POP = 8 slots
   with a random chromosome. Each chromosome is 8 words from a 32-bit LFSR,
   taking 8 cycles.
2. **Evaluation.** For each slot, the controller loads the chromosome into
   the VRC configuration memory in one cycle and starts `fitness_eval`.
   `fitness_eval` clears the PE registers, streams the NS = 32 training
   samples in, one per cycle, and compares each VRC output with the target
   of the sample that entered 7 cycles earlier. The fitness is the sum of
   absolute differences; 0 means a perfect circuit. One evaluation takes
   1 + NS + 7 = 40 cycles. The error goes into `err_mem`.
3. **Selection.** `selection` scans `err_mem` in POP + 1 cycles and returns
   the slot with the lowest error. On a tie the later slot wins, so an
   offspring that is as good as its parent replaces it. This neutral drift
   helps the search.
4. **Stop test.** The run ends when the best error is at most `err_limit`,
   or when `max_gens` generations have been evaluated. The best chromosome
   is then left loaded in the VRC.
5. **Breeding.** Otherwise the best chromosome goes unchanged into slot 0.
   Each of slots 1..7 gets a copy of it with MUT_BITS = 3 random bits
   inverted (`mutation`, 4 cycles). Then the loop goes back to step 2.

Because the parent survives, the best error never increases from one
generation to the next. At the default sizes a generation takes about 390
clock cycles.

While a run is busy, a multiplexer in front of the VRC feeds it from the
sample memory. When the run is idle, the multiplexer feeds it from the
external sensor inputs `ei`. A run therefore takes the VRC out of service
until it finishes.

## Using `ehw_top`

| port group | use |
|---|---|
| `smp_we`, `smp_addr`, `smp_wdata` | write training sample `smp_addr` (`sample_t`: `in1`, `in2`, `in3`, `target`, 8 bits each, `in1` lowest) |
| `seed_we`, `seed` | seed the random number generator (0 is replaced by 1) |
| `ga_start`, `max_gens`, `err_limit` | start a run while idle |
| `ga_busy`, `ga_gen_done`, `ga_done` | run in progress, one pulse per generation, run finished |
| `ga_gens`, `ga_best_err`, `ga_best_chrom` | result: generations used, best error, best chromosome |
| `cfg_load`, `cfg_bits` | load a whole chromosome into the VRC (ignored while busy) |
| `cfg_we`, `cfg_addr`, `cfg_wdata` | rewrite one PE word, right-aligned (ignored while busy) |
| `cfg_out` | the configuration in force |
| `ei`, `vrc_y` | live sensor inputs and the VRC output, 7 cycles later |

Parameters: `POP` (population, default 8), `NS` (training samples, default
32) and `MUT_BITS` (bit flips per offspring, default 3). Error values are
`8 + clog2(NS+1)` bits wide (14 at the defaults). The array geometry and data
width are constants in `vrc_pkg`.

A direct configuration for "mean of sensors 1 and 2" works like this. PE 0 is
function 5 with X = x0 and Y = x1. PEs 4, 8, 12, 16, 20 and 24 are function 2
with X from source 0 and Y from source 7. Every other PE is left at zero.

## Departures and open points

* **242 configuration bits, not 217.** The original text gives 217 bits in
  total. It also gives 8 bits for each first-column PE and 10 bits for each
  of the other PEs, and with 25 PEs those counts add up to 242. This design
  follows the per-PE word sizes.
* **Which 8 sources** an operand multiplexer offers is not specified in the
  original. The set here is described in *The VRC array*.
* **Registered PEs.** The original says that both combinational and
  sequential functions can be evolved, but gives no clocking. Here one
  register per PE makes each column a pipeline stage.
* **Data width of 8 bits** is inferred from the function constants 0xF0 and
  0x0F and from the eight-bit-slice transistor schematics of the PE
  functions.
* **Function details** are this design's choices: carry-keeping averages, a
  wrapping adder and unused codes that pass X.
* **Genetic unit.** The original names its units (random number generation,
  initial population, chromosome memory, error memory, fitness evaluation,
  selection and address decoding, mutation, controller, sample memory) and
  nothing more. Every algorithmic choice above is this design's own:
  population size, sample count, fitness measure, elitist selection, bit-flip
  mutation, stop rule and the host port protocol. The diagram has no
  crossover unit, and none is built.
* **Not built:** the host-side estimator and fault decision logic, which run
  in software. Also not built: the transistor-level power study that the
  original reports for each PE function.

## Files

`rtl/`: `vrc_pkg` (constants, types, chromosome layout), `vrc_fu` (function
unit), `vrc_pe`, `vrc_cfg_mem`, `vrc`, `sample_mem`, `rng`, `init_pop_gen`,
`chrom_mem`, `err_mem`, `mutation`, `selection`, `fitness_eval`,
`ga_controller` and `ehw_top`.

`tb/`: one self-checking testbench per module (`<module>_tb.sv`) and
`vrc_ref_pkg.sv`, a cycle-accurate reference model of the VRC used by the
VRC and system testbenches. There are two system testbenches:

* `ehw_top_tb` runs the single-sensor-failure case at the default sizes. It
  covers direct configuration, a PE word write, evolution runs stopped by
  the generation limit and by the error limit, and live operation. It checks
  the reported error against the model and counts each mechanism.
* `ehw_cases_tb` runs the double-failure case and the noise-filter case.

Each testbench prints `TB_RESULT checks=N failures=M`. With plain Verilator,
for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/vrc_pkg.sv tb/vrc_ref_pkg.sv tb/ehw_top_tb.sv --top-module ehw_top_tb
./obj_dir/Vehw_top_tb
```

The unit testbenches take well under a second. `ehw_top_tb` simulates up to
about 1.2 million cycles, also in about a second.

## What the simulations show

* Single failure (sensor 3 garbage, target = mean of sensors 1 and 2): runs
  usually reach zero error on 32 samples within a few hundred to a few
  thousand generations.
* Double failure (sensor 1 stuck, sensor 2 erratic, target = sensor 3): runs
  reach zero or near-zero error.
* Noise filter (Gaussian noise, sigma of about 16 codes, on all three
  sensors): the evolved circuit's summed error is typically 35-50 % of the
  error of using one sensor alone.

These results depend on the random seed. The testbenches check only that
evolution improves on the first generation and that the hardware's reported
error is exact.

Synthesis with a generic flow gives about 1,400 word-level cells and 4,400
flip-flops for `ehw_top` at its defaults. Of those flip-flops, 242 are the
VRC configuration, 200 are PE registers and 1,936 are the chromosome memory.
