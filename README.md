# CGP accelerators: evolving programs and circuits in a virtual reconfigurable circuit

Cartesian Genetic Programming (CGP) represents a candidate program as a grid of
programmable nodes: each node picks its operands from the primary inputs or from
earlier columns and applies one function from a small set. An evolutionary search
mutates these grids and keeps the fittest. Almost all of its time goes into
evaluating candidates on a training set, and that is what this RTL accelerates.

The idea is to build the CGP grid itself as hardware: a **virtual reconfigurable
circuit (VRC)**, an array of real processing elements whose multiplexers and
function selectors are driven from configuration registers. A chromosome *is* the
VRC's configuration bitstream. Loading a candidate means writing those registers,
and evaluating it means streaming training vectors through the array, one per
clock, while a fitness unit compares the outputs with the required ones.

Two accelerators are provided, built on the same engine:

| | symbolic regression (`sr_accel`) | logic circuits (`lc_accel`) |
|---|---|---|
| nodes | 8 columns x 4 rows of 8-bit CFBs | 10 x 10 logic PEs |
| inputs / outputs | 9 x 8 bit / 1 x 8 bit | 9 / 9 bits |
| function set | 16 functions: add, subtract, shifts, min, max, logic | wire, and, xor, (not a) and b |
| connectivity | any input or any node of the previous column | inputs, previous column, or the column before it (L-back 2) |
| data per clock | one training vector | DW = 4 input combinations in parallel (bit-parallel) |
| training data | external SRAMs | truth table in on-chip memory, all 2^9 input combinations |
| fitness | sum of absolute errors (lower is better) | correct output bits, plus a wire count in bits 7..0 (higher is better) |
| clocks per candidate | k (training-set size) | 2^9 / 4 = 128 |

`cgp_top` places both accelerators side by side. Each has its own host register
port and processor port. The search algorithm itself (mutation and selection) runs
on an embedded processor outside this RTL.

## The engine: how a candidate travels

```
 processor ──writes──► population memory (NBANKS banks, validity bit per bank)
                               │ one column word per clock
                               ▼
                  PMI ── conf_we/conf_col/conf_data ──► VRC conf_reg[col]
                   │  fu_start                           ▲ vin      │ vout
                   ▼                                     │          ▼
                fitness unit: input generation ──────────┘   fitness computation
                                                                   │ fit_we/fit_value
                  PMI result queue ◄───────────────────────────────┘
                   │ irq, fit_value, fit_bank
                   ▼
 processor ──irqack, new candidate into that bank, set validity bit──┘
```

1. The processor writes a configuration into a bank of the population memory,
   one VRC column per word, and sets the bank's validity bit.
2. The PMI (processor and memory interface) picks a valid bank, round robin, and
   clears its bit. It reads the bank's column words on consecutive clocks and
   writes each into the VRC's per-column configuration register. It pulses
   `fu_start` in the clock in which column 0 is written.
3. The fitness unit feeds one vector (or one group of DW vectors) per clock. It
   extends the VRC pipeline and accumulates the fitness. After the last vector it
   pulses `fit_we`.
4. The PMI pairs the result with its bank number and queues it. `irq` stays high
   while the queue is not empty. The processor reads `fit_value`/`fit_bank`,
   acknowledges with `irqack`, writes a new candidate into that bank and sets the
   validity bit again.

With two or more banks the processor builds the next candidate while the current
one is being evaluated.

### Pipelined reconfiguration (the subtle part)

Each VRC column is one pipeline stage: node outputs are registered, and the
primary inputs travel along a chain of registers beside the array. A vector that
enters in clock T is in column c during clock T + c. The PMI writes column c's
configuration at the end of clock T - 1 + c, which is exactly one clock before the
candidate's first vector reaches that column. The previous candidate's last
vectors are still in the columns further right, and they keep their old
configuration. Two consecutive candidates therefore follow each other with no
bubble, and a candidate costs exactly as many clocks as it has vectors:

```
clock        S      S+1        S+2        S+3      ...  S+k      S+k+1
PMI          read0  read1      read2      ...           read0'   (next candidate)
conf write          col0       col1       col2          ...      col0'
fu_start            1
FU address          v0         v1         v2       ...  v(k-1)   v0'
VRC col 0                      v0         v1                     v(k-1)
VRC col 1                                 v0       ...
```

The PMI spaces starts by `max(clocks per candidate, number of columns)`, because
its single read port can load only one column per clock. The fitness result
appears `k + COLS + 1` clocks after `fu_start`. In the logic accelerator the result
appears `128 + 10 + 1` clocks after `fu_start`.

## Symbolic-regression VRC (`vrc_sr`, `sr_cfb`)

Each CFB has two 4-bit input selects and a 4-bit function code: 12 bits per CFB,
48 bits per column, 384 bits per candidate. The column word places CFB r at bits
`[12r +: 12]`, laid out as `{selA[3:0], selB[3:0], func[3:0]}`. Select codes are
numbered as follows:

- 0..8: the nine primary inputs (a 3x3 pixel window in the image-filter use);
- 9..12: the four CFBs of the previous column;
- 13..15, or a previous-column code used in column 0: read the value 0.

The program output is row 0 of the last column. The 16 functions (`cgp_pkg::sr_func_e`):

| code | function | code | function |
|---|---|---|---|
| 0 | 255 | 8 | x >> 1 |
| 1 | x | 9 | x >> 2 |
| 2 | 255 - x | 10 | max(x - y, 0) |
| 3 | x or y | 11 | x + y (mod 256) |
| 4 | (not x) or y | 12 | min(x + y, 255) |
| 5 | x and y | 13 | (x + y) >> 1 |
| 6 | not (x and y) | 14 | max(x, y) |
| 7 | x xor y | 15 | min(x, y) |

The function list and all the encodings are choices made here. The original
description only says that the set holds addition, subtraction, shifts, minimum,
maximum and logic functions.

`fu_sr` reads SRAM1 (one 72-bit word per vector, holding all nine inputs) and
passes it to the VRC. `COLS` clocks later it reads the required output from SRAM2
at the same address, writes the VRC output to SRAM3 and adds `|y - r|`. All SRAMs
are assumed synchronous, with one clock of read latency. A 126 x 126 training
image (15876 vectors) gives about 6300 evaluations per second at 100 MHz.

## Logic-circuit VRC (`vrc_lc`, `lc_pe`, `phenotype_size`, `fu_lc`)

**Bit-parallel evaluation.** Every signal is DW bits wide, and bit k belongs to a
different input combination. This is the hardware form of the usual
software trick of simulating many vectors with one bitwise instruction. The
fitness unit drives input j of lane k with bit j of vector number `cnt*DW + k`,
so all 512 combinations of 9 inputs take 128 clocks at DW = 4.

**L-back 2.** A PE can read the primary inputs, any PE of column c-1, or any PE of
column c-2. Column c-2's registered outputs pass through one more register before
they reach column c, so all sources of a column belong to the same vectors.
Select codes are numbered as follows:

- 0..8: the primary inputs;
- 9..18: column c-1;
- 19..28: column c-2;
- 29..31, or a column that does not exist: read 0.

With `LBACK = 1` only the first two groups exist.

**Configuration size.** Each PE has two selects of `clog2(NI + LBACK*ROWS)` bits
and a 2-bit function code. That is 12 bits per PE and 1200 bits for the default
10 x 10 grid. The same formula gives 14 bits per PE and 2016, 2744 and 3584 bits
for 12 x 12, 14 x 14 and 16 x 16 grids. Outputs are rows 0..NO-1 of the last
column and are not configurable.

**Phenotype size.** Circuit size is optimised by counting PEs that are
configured as wires (function code 0): the more wires, the smaller the circuit.
`phenotype_size` watches the configuration port. A comparator per PE flags the
wires of the column being written, an adder tree sums the flags and an
accumulator adds up the columns. Column 0 restarts the accumulator. The count is
ready one clock after the last column, so it costs no evaluation time. Note that
it counts every wire PE, including PEs whose output nothing uses.

**Fitness word.** `fit_value = {correct output bits, wire count[7:0]}`. The correct
bits are counted over all 2^NI vectors and NO outputs, so the maximum is 4608 at
the defaults. Lanes beyond vector 2^NI - 1 are ignored; this only matters when DW
does not divide 2^NI, for example DW = 12. Compared as an unsigned number, the
fitness ranks function first and size second. The wire count is queued per
candidate, because the next candidate's count can be complete before the current
candidate's fitness.

The truth table is written by the host through `tt_we/tt_addr/tt_wdata`. Word w
holds outputs for vectors `w*DW .. w*DW+DW-1`: bit `o*DW + k` is output o of
vector `w*DW + k`.

## Control unit and processor interface

`cu` is the host's view of an accelerator (32-bit registers, word addresses):

| addr | register | |
|---|---|---|
| 0 | CTRL | bit 0: run |
| 1 | NUM_VECTORS | training vectors per candidate (symbolic regression only) |
| 2 | MAX_EVALS | stop starting candidates after this many results, 0 = no limit |
| 3 | EVAL_COUNT | results so far; any write clears it |
| 4 | STATUS | bit 0: running, bit 1: limit reached |

When the limit is reached, candidates already started still finish and report.
The processor side is described in the engine section above. A set and a clear of
the same validity bit in the same clock resolve to set.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| all accelerators | NBANKS | 8 | population banks (population size of the multiplier experiments) |
| `sr_accel`, `vrc_sr` | COLS, ROWS, NI | 8, 4, 9 | grid and input count |
| `sr_accel`, `fu_sr` | AW, KW, FITW | 18, 24, 32 | SRAM address, vector count and fitness widths |
| `lc_accel`, `vrc_lc` | NI, NO, COLS, ROWS | 9, 9, 10, 10 | inputs, outputs, grid |
| `lc_accel`, `vrc_lc` | DW | 4 | vectors per clock (1..12 were studied for the original) |
| `lc_accel`, `vrc_lc` | LBACK | 2 | 1 or 2 |

`cgp_top` fixes the per-accelerator sizes to these defaults and exposes NBANKS.

## How far to trust it, and where it departs from the original

Each VRC is checked against an independent behavioural model in
`tb/cgp_ref_pkg.sv`, with random configurations streamed back to back. The logic
model simulates one vector at a time, not bit-parallel. The end-to-end tests run a
hill-climbing search on both accelerators and check every fitness value the
hardware reports. The following follow the original design: grid sizes, node
widths, configuration sizes, column pipeline, column-wise reconfiguration, L-back 2
registers, comparator/adder-tree size count, the size in the low 8 fitness bits,
the bank/validity/IRQ/IRQACK protocol, and the SRAM roles.

Choices made here where the original is silent:

- the regression function list and all encodings;
- select numbering and reading 0 for unused codes;
- which rows drive the outputs;
- SRAM and memory timing;
- the CU register map and the evaluation limit;
- round-robin bank choice and the result queue;
- returning the bank number with the fitness;
- reset only on control state, not on datapaths or memories.

Not included:

- the embedded processor and its search software;
- the external SRAM devices;
- the host bus bridge: the CU's register port stands where it would attach;
- several VRC/fitness-unit pairs on one chip, which was only proposed.

The original reports evaluation rates for 6..9-input circuits at DW = 4 that are
1000 times lower than 100 MHz divided by the clocks per candidate. This design
makes no attempt to reproduce that factor.

## Simulating

Every module has a self-checking testbench `tb/tb_<module>.sv` that ends by printing
`TB_RESULT checks=N failures=M`. The shared reference models are in
`tb/cgp_ref_pkg.sv`. The environments `tb/sr_env.sv` and `tb/lc_env.sv` model the
processor, host and SRAMs. For example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/cgp_pkg.sv tb/cgp_ref_pkg.sv tb/tb_cgp_top.sv --top-module tb_cgp_top
./obj_dir/Vtb_cgp_top
```

`tb_cgp_top` runs both accelerators at their default sizes in about half a
minute. It fails unless each mechanism happens at least once: back-to-back
candidates, results queued behind `irq`, the evaluation limit, a non-zero
wire count, and L-back 2 connections.

Two further testbenches run the workloads the accelerators were designed for.
`tb_sr_image_filter` uses full-size image-filter training sets of 15876 vectors;
candidates follow each other every 15876 clocks. `tb_lc_workloads` runs the
logic accelerator in fourteen configurations:

- 2 x 2 multiplier on 8 x 8 PEs, L-back 1 and 2;
- 2 x 3, 3 x 3 and 3 x 4 multipliers on 10 x 10 PEs, L-back 1 and 2;
- 4 x 4 multiplier on 16 x 16 PEs;
- 9-input multiplier with dw = 1, 2, 8 and 12;
- 9-input multiplier on a 12 x 12 grid.

These are short searches. Their purpose is to confirm correct evaluation, not to
reproduce success rates.

