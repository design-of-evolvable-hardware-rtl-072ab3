# Evolvable hardware on a pipelined genetic algorithm processor

This design evolves digital circuits on one chip, with no processor and no configuration download in the loop.
An array of small reconfigurable logic cells is the circuit under evolution.
A genetic algorithm processor (GAP), built entirely in logic, holds a population of candidate configurations for that array.
Over many generations it loads each candidate into the array, measures how well the array then does a target job, and breeds better configurations from the good ones.

The GAP is built around one idea: a chromosome longer than the datapath is handled as a stream of 32-bit words.
Each word moves through a short pipeline: read, crossover, mutation, write/load.
One small set of crossover and mutation units therefore serves any chromosome length.
Only the number of repetitions in the control sequence changes.

The 6x6 cell array needs a 288-bit configuration, which is 9 words.
A one-max evaluator (fitness = number of one bits) is built in beside the array.
It runs the GAP alone on chromosomes of 1 to 15 words.

```
                         +------------------------- gap ---------------------------+
 start, max_gen,         |  gap_controller ---- counter_control (time, t0..t3)     |
 chrom_words ----------->|    | addresses, write enables, FIFO/evaluator strobes   |
                         |    v                                                    |
                         |  gap_memory (dual port, 2 banks x 128 slots x 16 words) |
                         |    | port A word (parent a)    | port B word (parent b) |
                         |    v                           v                        |
                         |  crossover (1 clock) ---> mutation (1 clock)            |
                         |    rng x4 (LCGs)           |  child a    |  child b     |
                         |                            v             v              |
                         |                     chrom_fifo a   chrom_fifo b         |
                         |  elite (best fitness+address)  |          |             |
                         +-----------------|--------------|----------|-------------+
                                 fe_word / load / start   |          | written back to
                                           v              |          | the next bank
            +------------ ehw_fitness_unit ---------------+          |
            |  eval_vector_mem -> edge inputs -> ehw_array (6x6 ehw_cell)
            |  edge outputs == expected (masked)? count -> fitness, done
            +------------------------------------------------------------
            onemax_fitness (alternative evaluator, problem_sel = 1)
```

## The control sequences

The controller runs two sequences.
A counter control unit counts time steps. Some steps are *repeated*: they run once per chromosome word before time moves on.

**Generation** builds the random initial population. For each individual:

| step | repeated | action |
|---|---|---|
| 0 | yes | write a random word to memory; load it into the evaluator |
| 1 | no | evaluate; time is held until the evaluator reports done |
| 2 | no | write the fitness; update the elite; clear the evaluator |

**Reproduction** produces two children per pass:

| step | repeated | action |
|---|---|---|
| t(0) | yes | read word k of parent a (port A) and of parent b (port B) |
| t(1) | trails t(0) by 1 | crossover of word k |
| t(2) | trails t(0) by 2 | mutation of word k |
| t(3) | trails t(0) by 3 | push both children's word k into the FIFOs; load child a's word into the evaluator |
| 4 | no | evaluate child a (held until done) |
| 5 | no | write fitness a; update the elite |
| 6 | yes | pop both FIFOs; write child a and child b to the next bank; load child b into the evaluator |
| 7 | no | evaluate child b |
| 8 | no | write fitness b; update the elite |

The FIFOs let child b wait while child a is being evaluated.
Time 6 then writes both children back through the two memory ports at once.

### Counter control unit

`counter_control` has four parts:
- a bit counter;
- a comparator against the repeat count, whose output is `less`;
- a main (time) counter;
- three delay flip-flops.

While `less` is high, the bit counter advances and the main counter holds.
The main counter also holds while `time_stop` is high. The controller uses that to wait for the evaluator.

The bus `t[3:0]` is `less` and its three delayed copies.
- `t[0]` marks a word being read.
- `t[1]`, `t[2]` and `t[3]` mark the same word one, two and three clocks later, as it reaches crossover, mutation and the FIFOs.

The pipeline therefore needs no per-stage valid logic from the controller.
The word index travels along in a matching delay chain (`s1..s3`).
Once the last repetition ends, the time counter passes through times 1, 2 and 3 in one clock each. In those clocks the last word drains through the pipeline, so child a is complete when time 4 starts its evaluation.

### Cycle counts

- W is the number of words per chromosome.
- E is the length of one evaluation step: from the start pulse to done, plus the step itself.

One reproduction pass (two children) takes 2W + 7 + 2E clocks.

| evaluator | E | clocks per pair |
|---|---|---|
| one-max | W + 3 | 4W + 13 |
| EHW fitness unit, N vectors | 3 + 12N | for the 64-vector adder, 2·9 + 7 + 2·771 = 1567 |

For the initial population, one-max takes 2W + 5 clocks per individual.
With a population of 100, one generation takes:
- 50 passes × 17 = 850 clocks for a 32-bit one-max;
- about 78,000 clocks for the adder.

The testbenches check these counts exactly.

## Memory map

`gap_memory` is a dual-port RAM of 32-bit words with synchronous read.
The address is `{bank, individual, word}`:
- bank: 1 bit;
- individual: 7 bits;
- word: `SUB_W` bits, 4 at the defaults.

Words `0..W-1` of a slot hold the chromosome.
The top word, `2**SUB_W-1`, holds the fitness. Every individual's fitness is therefore at a fixed position.

The two banks hold the current and the next generation. They swap at the end of every generation.
While the processor is idle, the memory can be read through `host_addr`/`host_rdata`.

## Genetic operators

- **Random numbers** come from four linear congruential generators, R(i+1) = A·R(i) + B mod 2^32, each with its own constants.
  - Each is seeded from a free-running clock counter when a run starts.
  - The run is therefore repeatable for a given start time after reset.
- **Selection.** Parent a is the elite (best individual) of the previous generation. Parent b is chosen at random: (r[31:16] · POP) >> 16.
- **Elitism.** The first child of every generation is an unaltered copy of the elite, so the best fitness never drops.
- **Crossover** is one-point over the whole chromosome.
  - The cut position and the decision to cross are drawn once per pair.
  - The probability is 0.8, set by `CROSS_THRESH` = 52429/65536.
  - The cut is a bit index. Bit j of word k comes from parent a when 32k + j < cut.
- **Mutation** works on each word of each child separately.
  - A 16-bit random value is compared with `MUT_THRESH`, 1704/65536 ≈ 0.026.
  - When the value is below the threshold, one bit of the word is flipped. Five more random bits choose which.
  - This gives a rate of at most one flip per 32 bits, lower than a typical per-bit mutation rate.
- **Elite unit.** It keeps the best fitness and the individual's address for the generation being written. Ties keep the earlier individual.
  - At the end of a generation, that best is committed.
  - `gen_best_fitness` and `gen_best_addr` report it.

## The evolvable array

`ehw_array` is a ROWS × COLS grid (6 × 6) of `ehw_cell`s.
Each cell has four outputs, one toward each neighbour: up, down, left and right.
Each output has its own 2-bit function code:

| code | output |
|---|---|
| 00 | AND of all four inputs |
| 01 | OR of all four inputs |
| 10 | NOT of the input arriving from the opposite side |
| 11 | the input arriving from the opposite side (buffer) |

A cell's byte is `{right, left, down, up}`.
Cell (r, c) takes configuration bits `8·(r·COLS + c) +: 8` of the 288-bit register. The register is loaded one 32-bit word at a time.

The outer edge carries 24 input wires into the array and 24 output wires out of it. They are numbered:

| edge | indices | order |
|---|---|---|
| top | 0..5 | left to right |
| right | 6..11 | top to bottom |
| bottom | 12..17 | left to right |
| left | 18..23 | top to bottom |

Edge input i drives the cell input at that position. Edge output i is the outward output of the cell there.

Every cell output is a flip-flop.
A purely combinational grid with four-way neighbour links forms loops: a cell can feed its neighbour, which feeds it back.
Registering the outputs keeps every configuration a well-defined synchronous circuit. It also gives the array the memory a state machine needs.
As a result, a signal moves one cell per clock, so a result needs time to reach the edges.

## Fitness measurement

`ehw_fitness_unit` surrounds the array with four parts:
- the vector memory, `eval_vector_mem`: up to 64 entries of `{mask, expected, input}`, each 24 bits;
- an input driver;
- a vector counter;
- a comparator.

After the chromosome is loaded, a start pulse does the following:
1. It clears the cell flip-flops.
2. It holds each vector's input on the edges for `SETTLE` = 12 clocks. That is twice the grid size, enough for a signal to cross.
3. It compares the masked outputs with the masked expected value and counts the vectors that match.

Latency from start to done is 2 + N·SETTLE clocks. `busy` stalls the GAP's time counter meanwhile.
The cells are cleared only once per evaluation. A vector sequence can therefore score sequential behaviour.
Two example problems are used:

- **3-bit adder.** a drives edge inputs 0..2 and b drives 3..5. The 4-bit sum is expected on edge outputs 12..15. There are 64 vectors, and the maximum fitness is 64.
- **Four-state machine.** The states are 00 → 01 → 11 → 10 while the input is 1.
  - On input 0: 00 stays, 01 and 11 return to 00, and 10 goes to 11.
  - The input is on edge 0, and the state is expected on edge outputs 12 and 13.
  - A 32-step input sequence is used, so the maximum fitness is 32.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `ehw_gap_top` | `POP_SIZE` | 100 | population size (even, ≤ 128) |
| | `ROWS`, `COLS` | 6, 6 | cell array; the chromosome length `NWORDS` = ⌈8·ROWS·COLS/32⌉ and the word-address width `SUB_W` = clog2(NWORDS+1) follow from it |
| | `VEC_DEPTH` | 64 | evaluation vectors |
| | `SETTLE` | 12 | clocks per vector |
| `gap` | `CROSS_THRESH`, `MUT_THRESH` | 52429, 1704 | crossover probability 0.8, mutation rate 0.026 (×65536) |
| `chrom_fifo` | `DEPTH` | 16 | words per child FIFO |

`chrom_words` (a port) sets the chromosome length of a run: 9 for the 6 × 6 array, 18 for 6 × 12, and 1 or 2 for the 32- and 64-bit one-max.
The population, array size, bits per cell, crossover and mutation rates and the 32-bit word follow the source design.
SETTLE, the vector mask, the edge numbering, the cell encoding and the memory layout beyond "individual/word address with fitness at a fixed word" are this design's choices.

## Departures from the source design and open points

- **Registered cell outputs.** The source cells are combinational. See the evolvable-array section for why they are registered here.
- **Selection, elitism, crossover type, two banks.** The source names an elite unit but does not say how parents are picked, what kind of crossover is used, or how the new generation replaces the old. The choices above are this design's own.
- **Measured evolution.** The one-max problems converge as expected: 32 bits reach about 30 in 40 generations, and 64 bits reach 64 in 60 generations. The circuit problems are only partly reproduced.
  - The source reports the 6 × 6 adder reaching fitness 20 after 20,000 generations, and the 6 × 12 adder reaching 47.
  - Here, the adder reaches 8 of 64 within about 50 generations and stays there through 20,000 generations. 8 is the score of a constant output of 7.
  - The state machine reaches 16 of 32 and stays there through 2,000 generations.
  - A variant in which ties replace the elite, so that the search can drift across equal-fitness configurations, did no better in 1,000 generations.
  - Likely causes:
    - The elite × random selection keeps little diversity.
    - The fitness counts only vectors on which all outputs are right, so most single changes score the same.
    - With the registered cells and four-input AND/OR functions, a useful circuit needs many cooperating cells before it scores at all.
  - These are the first things to change when trying to reproduce the source's curves.
  - `tb_ehw_evolution` runs 600 and 300 generations by default. Use `+ADDER_GENS=`, `+FSM_GENS=` and `+WDOG=` for longer runs. 20,000 adder generations take about 15 minutes of simulation.
- **Linear-function and set-covering evaluators** are not included. The source uses them as GAP tests but does not define the function or the problem instance.
- At the 100 MHz clock of the source design, a 32-bit one-max generation takes 8.5 µs here, and an adder generation about 0.8 ms.

## Verification

Each module has a self-checking testbench in `tb/`.
Each one prints `TB_RESULT checks=N failures=M` and has a watchdog.
Expected values come from independent models in the testbenches. `tb/ehw_model_pkg.sv` is a cycle model of the array and the scoring.

| testbench | what it runs |
|---|---|
| `tb_ehw_gap_top` | the full design at its default parameters: one-max 32 and 64 bits, then the adder and the state machine on the EHW. It counts each mechanism (crossover, mutation, evaluator stall, pipeline overlap, generation→reproduction switch, bank swaps, FIFO waits) and fails if one never happens. It checks the generation cycle counts and re-scores the elite configuration in the model. |
| `tb_ehw_evolution` | 600 generations of the adder and 300 of the state machine, about 30 s |
| `tb_adder_6x12` | the adder on a 6 × 12 array (`ROWS=6, COLS=12`, 18-word chromosomes) |
| `tb_gap`, `tb_gap_controller` | the processor alone against a behavioural evaluator; memory write logs checked against the control sequence |
| others | one per module |

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/gap_pkg.sv tb/ehw_model_pkg.sv tb/tb_ehw_gap_top.sv --top-module tb_ehw_gap_top
./obj_dir/Vtb_ehw_gap_top
```
