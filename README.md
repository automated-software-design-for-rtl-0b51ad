# A genetic-algorithm trainer for a hardware neuron

This design trains the weights of a single artificial neuron in hardware.
Gradient descent is not used. A small genetic algorithm searches for weights
instead. Each chromosome is one candidate set of the neuron's three weights.
The circuit runs each candidate through the neuron for fixed training inputs
and scores how far the output lands from the wanted value. If a candidate is
exact, training stops. Otherwise the best candidates are bred into a new
generation. Once training is finished, the same neuron keeps running with the
winning weights, so its output follows whatever inputs are applied.

The structure follows a published FPGA design. That design trains a
3-input neuron for the inputs 63, -82, 70 and the target output 77, and
reaches the target in three generations. This RTL, run on that case, also
stops after three generation steps. That takes 425 clock cycles.

## The neuron and its table-driven sigmoid

The neuron (`ga_neuron`) first computes an integer pre-activation:

    lin = (in1*W1 + in2*W2 + in3*W3) / 16        (integer division, rounds toward 0)

Inputs are signed integers in -100..100. Weights are 8-bit two's-complement
integers. Because of the `/16`, a weight is effectively a value in units of
1/16, covering -8.0 .. +7.94.

The activation is a sigmoid scaled to 0..100, with 50 at `lin = 0`. It uses no
multiplier or exponential. It is defined by 51 thresholds X(0..50) on `|lin|`:

* `out = 50 + a` when `X(a) <= |lin| < X(a+1)`, for a = 0..49
* `out = 100` when `|lin| >= X(50)`
* for negative `lin` the result is mirrored: `out = 100 - out`

The thresholds (in `ga_pkg::act_threshold`) are:

    0 3 7 11 15 19 23 27 31 35 39 43 47 52 56 60 65 69 74 78 83 88 92 97 103 108 113
    118 124 130 136 142 149 155 163 170 178 186 195 205 216 227 240 254 270 289 312 341 382 451 520

The first 27 are the published values. The remaining ones extend them along
the curve the published ones follow:

    X(a) = floor(98.31 * ln((50 + a) / (50 - a)))

This is the inverse of `out = 100 / (1 + exp(-lin / 98.31))`. X(50) is the
same formula at a = 49.5 and closes the last step.

The table is searched with 50 parallel comparators, not with a loop. The table
is increasing, so the number of thresholds X(1..50) that `|lin|` reaches is
exactly the interval index `a`. The output is 50 plus that count.

A `start` pulse computes the result. `nout` and `done` appear one clock later,
and `nfinish` toggles on each evaluation.

## Chromosomes and the population

A chromosome is three 8-bit genes, one per weight. That makes 24 bits, stored
as `chrom_t` (gene 0 drives `in1`). The population always has
**6 chromosomes**. Breeding keeps **4 parents** and makes one child per pair of
parents: 4·3/2 = 6.

Reset, or the start of a training run, loads this initial population. The
values are in units of 1/16, written as real weights:

| chromosome | W1, W2, W3 |
|---|---|
| 1 | -1, -1, -1 |
| 2 | -1, -1, -1 |
| 3 | 1, 1, 1 |
| 4 | -0.5, -0.5, -0.5 |
| 5 | 0, 0, 0 |
| 6 | 0.5, 0.5, 0.5 |

Rows 1, 2, 3, 5 and 6 follow the example population of the original design.
Row 4 is this design's choice. The population is the `INIT_POP` parameter of
`ga_genetic`.

## One generation

A generation has three phases. The status outputs of `genvhdl` show each one.

1. **Forming** (`nouts_forming = 1`). For i = 0..5, the weight register
   `ga_chrs_to_w` is loaded from chromosome i, and the neuron fires
   (`start`). Its output is stored as `lout[i]`, and the fitness error as
   `err[i] = |lout[i] - zout|`. This takes 3 cycles per chromosome.
2. **Analysis** (`analysis = 1`, one cycle). Training ends if any `err[i]` is
   0. In that case the lowest such i wins. (A tolerance is available as the
   `TOL` parameter; the default of 0 means an exact match.) Otherwise a
   generation step starts in `ga_genetic`.
3. **Selection and breeding** (`ga_genetic`, 116 cycles):
   * **Selection.** `ga_select` ranks the six chromosomes by error, smallest
     first. Ties go to the lower index. The four best are copied into the
     parent store `par`, with `par[0]` the best.
   * **Breeding.** The parent pairs (k, i) are taken in the order
     (0,1) (0,2) (0,3) (1,2) (1,3) (2,3). Each pair writes child 0..5 in turn:
     * *copy*: the child starts as a copy of parent k;
     * *crossover*: for each gene, a bit position b is drawn twice, and bit b
       of the child's gene is taken from parent i;
     * *mutation*: for each gene, a bit position is drawn four more times, and
       that bit of the child's gene is inverted.

     Each of these steps takes one clock cycle. One child takes
     1 + 3·(2+4) = 19 cycles.

The bit positions come from `ga_lcg`, a 20-bit pseudo-random state:

    num5 <- (num5 * 29 / 8) mod 2^20          position = num5 mod 8 (bit 0 = LSB)

Every draw advances it by one step. The state carries over from one
generation to the next. Starting a training run reseeds it with `SEED`
(default 1), so a repeated run is identical. A seed of 0 would lock the
generator at 0.

The mutation rate is heavy: 4 flips per 8-bit gene, some of which may hit the
same bit. As a result, the search keeps exploring and does not settle into
fine-tuning. This matches the original scheme.

A full generation takes **136 cycles**: 18 cycles of forming, then 118 cycles
of analysis, selection and breeding.

## Sequencing, start and the trained phase

`ga_main` is the sequencer. Training begins with a one-cycle `train` pulse.
The pulse reloads the initial population, reseeds the generator and clears
the `generation` counter. A `train` pulse that arrives during a generation
step is ignored. There is no limit on the number of generations. The trainer
keeps going until a chromosome matches.

When training ends, `finish_teaching` rises. The winning chromosome is loaded
into the weight register, and from then on the neuron fires every cycle. As a
result, `nout` follows changes of `in1..in3` with one cycle of delay. Scores
are no longer recorded.

### Top-level ports (`genvhdl`)

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock, asynchronous active-low reset |
| train | in | 1 | pulse: start or restart training |
| in1, in2, in3 | in | 8 signed | neuron inputs, -100..100 |
| zout | in | 8 | wanted output, 0..100 |
| nout | out | 21 signed | neuron output after every evaluation (0..100) |
| start | out | 1 | neuron evaluation strobe |
| i | out | 3 | chromosome being scored, 0..5 |
| nouts_forming, analysis, finish_teaching | out | 1 | phase flags |
| generation | out | 16 | completed generation steps |
| weights | out | 24 | weight register (3 × 8-bit signed) |

`nout` is 21 bits wide to match the output range of the original block. Its
value never leaves 0..100.

Parameters of `genvhdl`: `SEED` (1), `TOL` (0), `XBITS` crossover bits per
gene (2), `MBITS` mutated bits per gene (4). The sizes (3 weights, 8-bit
genes, 6 chromosomes, 4 parents, 51 thresholds) are in `ga_pkg`.

## Files

| file | contents |
|---|---|
| `rtl/ga_pkg.sv` | sizes, types, activation thresholds |
| `rtl/genvhdl.sv` | top level |
| `rtl/ga_main.sv` | sequencer and scoring |
| `rtl/ga_genetic.sv` | population, parent store, crossover and mutation engine |
| `rtl/ga_select.sv` | rank sort, picks the 4 best |
| `rtl/ga_lcg.sv` | bit-position generator |
| `rtl/ga_chrs_to_w.sv` | chromosome-to-weight register |
| `rtl/ga_neuron.sv` | neuron with table sigmoid |
| `tb/ga_ref_pkg.sv` | behavioural model of the whole algorithm, used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
the end-to-end run at default parameters:

    verilator --binary --timing -Wno-fatal -y rtl -y tb -Irtl -Itb \
        rtl/ga_pkg.sv tb/ga_ref_pkg.sv tb/tb_genvhdl.sv --top-module tb_genvhdl
    ./obj_dir/Vtb_genvhdl

Use the same command with `tb_ga_neuron`, `tb_ga_genetic`, `tb_ga_main`,
`tb_ga_select`, `tb_ga_lcg` or `tb_ga_chrs_to_w` to run the module tests.

What the tests establish:

* **`tb_genvhdl`** runs the 63/-82/70 → 77 case at default parameters. The
  behavioural model predicts every neuron output of every generation, and
  the test compares each one. It also checks:
  * the generation count (3), the number of analyses, crossover bits (36 per
    step) and mutation bits (72 per step), and the 136-cycle generation;
  * the winning weights, and that the trained output is 77;
  * 50 random input changes in the trained phase;
  * that a restart repeats the run exactly.
* **`tb_ga_genetic`** compares parents and children with the model for 60
  generation steps with random scores. It also checks the 116-cycle step.
* **`tb_ga_neuron`** tests values at each threshold and just below it,
  saturation, and random vectors.
* **`tb_ga_main`** replaces the neuron and the engine with scripted models.
  It includes near misses of 76 and 78 that must not stop training.

The model in `tb/ga_ref_pkg.sv` is written independently of the RTL. It
computes the thresholds beyond the first 27 in real arithmetic, searches the
table with a loop, and sorts with an insertion sort.

## Where this design makes its own choices

The arithmetic of the neuron, the threshold values, the population and parent
counts, the pair order, the crossover and mutation counts, and the generator
recurrence are taken from the original design. The following are not, or are
interpretations:

* **Clocking.** The original describes processes paced by a simulator step
  signal. This RTL is a synchronous FSM with a clock, an asynchronous reset
  and a `train` pulse. All cycle counts above belong to this RTL.
* **Crossover count.** The original's summation formula takes one bit per
  weight from the second parent. Its step-by-step scheme takes two. The
  scheme is followed (`XBITS = 2`).
* **Selection.** "Sort by fitness" is read as keeping the four lowest errors
  as parents, because the scheme breeds from four parents. The fitness is
  only the output error, since the network shape is fixed.
* **Thresholds 27..50**, the **fourth initial chromosome**, the **seed**, LSB
  bit numbering and the **exact-match** stop rule are this design's choices.
* **`nouts_forming`** is high while chromosomes are being scored. The
  original describes this signal in two ways that do not agree; this RTL
  follows the first.
* **Not built.** The original also reports training a chain of two neurons
  and a 2-1 network, each with four synapses. How their synapses are wired,
  their inputs and targets, and their chromosome layout are not specified,
  so this RTL trains only the single 3-input neuron.

## Size

After generic synthesis the whole trainer is about 840 word-level cells and
390 flip-flop bits. Most of the flip-flops hold the population (144 bits)
and the parent store (96 bits). The neuron needs three 8×8 multipliers and 50
comparators.
