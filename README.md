# A programmable nerve-centre SoC for the lower urinary tract

The nervous control of the bladder can be modelled as a set of nine nerve
centres. Each centre looks at a few nerve signals, remembers a little state,
decides, and drives a few signals of its own. This design puts that model in
hardware. It does not hard-wire a centre. Every centre is the same small
micro-programmed machine, and its program and data table make it behave as a
particular centre. The chip has nine such centres. Every three of them share
one decision unit (ALU). All signals pass through a shared signal memory.

The one centre fully specified, and used throughout the tests, is the
**cortical-diencephalic (CD) centre**. It is the highest, voluntary level of
bladder control. It reads three signals:

| signal | meaning |
|---|---|
| DA | afferent tension of the detrusor (bladder) muscle |
| MI | voluntary "void now" signal |
| RI | voluntary "hold on" (retention) signal |

It drives two signals: PA, to the preoptic area (start voiding), and PS, to
the pontine storage centre (keep storing while the urge is felt). Real-valued
signals are scaled by 1000 and truncated to integers. The two thresholds are
therefore 2000 (H1 = 2.00) and 18200 (H2 = 18.2).

## What the CD centre computes

Each *pass* of the program takes one sample of (DA, MI, RI). It checks the
rows below in order. Every row also requires the stored *state* word to be
non-zero.

| row | condition | PA | PS | meaning |
|---|---|---|---|---|
| 1 | DA < H1, MI = 0, RI = 0 | 0 | 0 | storing, no urge |
| 2 | H1 ≤ DA < H2, MI = 0, RI ≠ 0 | 0 | 1 | urge felt, holding on |
| 3 | (H1 ≤ DA < H2, MI ≠ 0, RI = 0) or DA ≥ H2 | 1 | 0 | voiding: by choice, or forced by high tension |

When a row matches, the state is set to 1 and the row's outputs are sent.
When no row matches, the program falls through to the row-1 outputs (0, 0).
It then stores the row-3 condition, without the state term, as the new state.
An unmatched sample, such as DA in band with neither voluntary signal, drops
the state to 0. The centre then outputs (0, 0) until a sample with
DA ≥ H2, or in band with MI and not RI, raises it again.

This is what the program does, and the hardware runs it faithfully. The
testbench model (`tb/cd_ref_pkg.sv`) encodes this behaviour, including the
fall-through.

## The micro-machine inside a centre

A centre (`cn_block`) executes one 19-bit instruction per clock. Each
instruction moves one value from a *starting component* to a *terminal
component*:

```
 18   16 15  14 13       8 7   6 5        0
+-------+------+----------+------+----------+
|  op   | src  | src addr | dst  | dst addr |
+-------+------+----------+------+----------+
```

| op | code | | src | code | | dst | code |
|---|---|---|---|---|---|---|---|
| NULL | 000 | | INPUT (perception) | 00 | | OUTPUT (execution) | 00 |
| LOAD | 001 | | MEMORY | 01 | | STACK P (program pointer) | 01 |
| AND | 010 | | ALU (decision) | 10 | | MEMORY | 10 |
| OR | 011 | | | | | ALU | 11 |
| NOT | 100 | | | | | | |
| = | 101 | | | | | | |
| > | 110 | | | | | | |

The address fields select within a component:
- an input or output index;
- a data-memory word (64 words);
- an ALU register. As a target, REG 0 or REG 1. As a source, REG 0 or REG 1
  for NOT and LOAD, and `000011` ("both") for the two-operand operations.

The value moved depends on the source:
- From INPUT or MEMORY: the word read.
- From ALU: the decision unit's result for the instruction's operation.
  - AND, OR and NOT are **logical**: non-zero is true, and the result is 0
    or 1. The signals are scaled by 1000, so "active" is any non-zero value.
  - `>` is REG 0 > REG 1, signed.
  - `=` is REG 0 == REG 1.
  - LOAD passes one register through unchanged.

All reads are combinational. All writes land on the next rising edge, so every
instruction sees the results of the one before it. There is no pipeline and no
hazard.

**Control flow** goes through writes to STACK P:

| instruction | effect |
|---|---|
| `NULL … → STACK P` | pointer returns to 0. The pass ends, `pass_done` pulses for one clock and the inputs are sampled for the next pass. |
| `AND/OR/NOT/=/> … → STACK P` | conditional jump: if the result is non-zero, jump to the address held in ALU REG 0; otherwise continue. |
| `LOAD x → STACK P` | unconditional jump to x. |

The conditional jump is the subtle part. The CD program first loads a jump
address from the data memory into REG 0. It then loads the condition into
REG 1 and issues `AND → STACK P`. The AND is true only if both are non-zero.
A jump address is never 0, so the jump is taken exactly when the condition
holds.

**Modes.** `mode = 0` is Config:
- the pointer is held at 0;
- the configuration ports write the program memory and the data memory;
- the perception registers sample the inputs on every clock.

`mode = 1` is Work:
- the program runs;
- configuration writes are ignored.

### Blocks of a centre

| block | file | role |
|---|---|---|
| perception | `rtl/perception_block.sv` | snapshot registers for the N_IN inputs, taken once per pass; the multiplexer picks one by address |
| memorisation | `rtl/memorisation_block.sv` | 64-word data memory: thresholds, output values, state, jump addresses, accumulators |
| decision | `rtl/decision_block.sv`, `rtl/decision_alu.sv` | two operand registers behind a demultiplexer, operation units, output multiplexer |
| execution | `rtl/execution_block.sv` | N_OUT output registers; each holds the last value written |
| program memory | `rtl/program_memory.sv` | 128 × 19-bit words, combinational read |
| program pointer | `rtl/program_pointer.sv` | steps every clock, jumps, holds on a stall |
| glue and decode | `rtl/cn_block.sv` | instruction decode, source multiplexer, write enables, jump logic |
| shared types | `rtl/cn_pkg.sv` | instruction struct, opcode and component enums |

`rtl/nerve_centre.sv` is one centre with a decision block of its own. It
never stalls. Loaded with the CD program, it is the single-centre CD
prototype. Besides its output registers it shows each output write
(`out_we`, `out_sel`, `out_data`) so that the chip can copy it into the
shared memory.

## The CD program and its data table

`tb/cd_program.hex` holds the 98-word CD program, one instruction per line.
It checks the three rows in turn: positions 0–18 for row 1, 19–45 for row 2
and 46–82 for row 3. Each check ends in a conditional jump. Three epilogues
follow, at 83, 88 and 93. Each one:
- copies the last condition (accumulator 0x3D) into the state word 0x20;
- writes the row's two output values from the data memory to the outputs;
- ends with `NULL → STACK P`.

A failed row-3 check falls through into the first epilogue.

Data memory layout:

| address | contents |
|---|---|
| 0x00, 0x01 | H1, H2 |
| 0x02–0x07 | PA/PS values for rows 1, 2, 3: 0,0 · 0,1 · 1,0 |
| 0x20 | state, initially 1 |
| 0x3A, 0x3B, 0x3C | jump addresses 83, 88, 93 |
| 0x3D–0x3F | accumulators |

Most configuration sits in the lower half (0x00–0x1F) and the working data
in the upper half, but the jump addresses are configured at 0x3A–0x3C, so the
memory itself does not protect either half.

**Timing.** A pass lasts 24 clocks when row 1 holds (19 + 5), 51 when row 2
holds (46 + 5), and 88 for row 3 or for no row (83 + 5). Add one clock for
every clock the centre waited for a shared decision unit. A centre takes a
new input sample only at the end of a pass. To see every sample of signals
sampled once a second, the clock must therefore run at 88 Hz or more. If the
clock runs at the sample rate instead, each pass answers for the sample
present when it started and the samples that arrive during the pass are
skipped. A change of the inputs then shows at the outputs within two passes
(at most 176 clocks).

## Sharing decision units (`decision_cluster`)

The operation units (two 32-bit comparators plus logic) are the costly part of
a centre. Centres spend most clocks on loads and stores. So every three
centres share one set of operation units.

The program keeps operands in REG 0/REG 1 across several instructions.
Sharing those registers would let one centre corrupt another's operands. Each
centre therefore keeps its **own register pair** inside the cluster, and
loading it needs no arbitration.

An instruction that reads the ALU raises `dec_req`. A round-robin arbiter
grants one requester per clock. The ALU computes with that centre's registers
and operation, and the result returns in the same clock. A refused centre
*stalls*: its pointer holds and it writes nothing. It retries on the next
clock. With round-robin order, a requester waits at most two clocks. With all
nine centres running the CD program, centres stall often. The full-chip test
counts roughly one stall per three clocks per cluster. Every result stays
correct, and only the pass length grows.

**What sharing saves.** A generic gate-level synthesis of the whole chip at
default sizes gives 197,448 cells with sharing and 198,727 with one decision
unit per centre, only 0.6% fewer. The nine program and data memories, held in
flip-flops with their read multiplexers, make up most of the chip. Counting
only the logic gates outside flip-flops and multiplexers, sharing saves 14%
(8,562 against 9,972). The saving is below the published "up to 20%" because
each centre keeps its own operand registers, and only the operation units are
shared.

## The chip (`neuronal_soc`)

- **Nine centres** (`N_CN = 9`) and **three decision clusters**
  (`CN_PER_DEC = 3`). Centre c uses cluster c / 3. With `CN_PER_DEC = 1`
  every centre is instead a `nerve_centre` with its own decision block and
  never stalls. That is the arrangement that sharing saves area against.
- **Shared memory** (`shared_memory`): 64 signal slots of 32 bits, kept in
  registers so that every centre reads every signal at once. It has three
  compartments:
  - slots 0–10 hold the chip inputs: nine afferent signals plus MI and RI.
    They are captured from the pins on every clock, so a pin change reaches
    its slot one clock later. Centres cannot write here.
  - slots 32–39 drive the eight efferent output pins.
  - all other slots hold internal signals between centres.
- **Signal maps.** Each centre has an input map (which slot feeds each
  perception input) and an output map (which slot each output writes). A
  centre's output write reaches its slot on the same edge as its own output
  register. If two centres write one slot on the same clock, the
  lower-numbered centre wins.
- **Configuration** (mode 0):
  - `cfg_cn` selects a centre;
  - `cfg_prog_*` writes its program;
  - `cfg_mem_*` writes its data memory;
  - `cfg_map_*` writes one map entry: `cfg_map_out` = 0 for an input, 1 for
    an output; `cfg_map_idx` is the port and `cfg_map_slot` the slot.
- **Status:** `pass_done[c]` and `stall[c]` for each centre.

Bring-up sequence:
1. Hold `mode` = 0.
2. Write each centre's program, data table and maps.
3. Set `mode` = 1. Each centre starts at address 0 with the input snapshot
   taken on the last Config clock.

## Where this departs from, or adds to, the published design

Taken from the published design:
- the component set;
- the instruction format and codes;
- the two modes;
- the CD truth table, data layout and program;
- nine centres with one decision unit per three;
- a shared memory for afferent, internal and efferent signals.

The published CD program listing has a few positions whose binary and
description disagree. The reading used here agrees with the step-by-step walk
through the first row and with the truth table. The changes:
- position 16 loads REG 0;
- position 17 loads 0x3E;
- positions 19 and 46 read input 0;
- positions 20 and 47 load REG 1;
- positions 21–22 and 48–51 are `> → 0x3D`, `= → 0x3E`,
  `LOAD 0x3D → REG 0`, `LOAD 0x3E → REG 1`, `OR → 0x3F`.

The general rule that the lower half of the data memory is kept for
configuration values does not match the CD data table, which configures
0x3A–0x3C and lets the program write its state to 0x20. The data table is
followed: the memory protects no address range, and every address can be
configured or written by the program.

The truth table's printed third row says "MI and RI". The program tests "MI
and not RI", and the program is followed.

This design's own choices, where the source is silent:
- 32-bit data words;
- 128-word program memory;
- a combinational-read, one-instruction-per-clock machine;
- asynchronous active-low reset of registers, with memories left unreset and
  filled by configuration;
- the per-pass input snapshot;
- logical AND/OR/NOT and a signed `>`;
- jumps through REG 0 taken on a non-zero result;
- the request/grant sharing with per-centre operand registers;
- the shared-memory layout and the programmable signal maps;
- the configuration port;
- centre sizes of three inputs and two outputs everywhere. These are the CD
  centre's sizes.

Not provided:
- **Programs for the other eight centres.** Their behaviour is not
  specified. The chip runs any program, and the tests load the CD program
  into all nine centres.
- **Separate INPUT and OUTPUT blocks.** Nothing is specified for them beyond
  carrying signals, so the shared memory's input and efferent compartments
  play their part.
- **An instruction field naming the decision unit.** The 19-bit format has
  none, so a centre always uses the cluster it is wired to.

## Simulating

All testbenches are self-checking. Each prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. Run them from the repository root, because
they read `tb/cd_program.hex` by relative path.

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/cn_pkg.sv tb/cd_ref_pkg.sv rtl/*.sv tb/tb_neuronal_soc.sv \
    --top-module tb_neuronal_soc -Mdir obj_soc
./obj_soc/Vtb_neuronal_soc
```

Swap in any other `tb/tb_<block>.sv` and top module name to test one block.

| testbench | what it shows |
|---|---|
| `tb_neuronal_soc` | the full chip at default size: 60,000 clocks, about 6,700 passes over nine centres. Each pass's outputs (at the efferent pins or internal slots) and its exact length, including stalls, are checked against the reference. Centre 8 takes its MI from centre 0's PA through an internal slot. All rows, the no-row case, stalls on each cluster and configuration lock-out must occur. |
| `tb_neuronal_soc_dedicated` | the same test on the chip built with `CN_PER_DEC = 1`. No centre may ever stall, so each pass is exactly 24, 51 or 88 clocks. |
| `tb_nerve_centre` | the single CD centre on a filling, retention, voiding and emptying trace, then random samples. It checks outputs, stored state and pass length (24/51/88). |
| `tb_cd_clinical_rate` | the CD centre with a new sample on every clock, as when data and clock share one rate: a synthetic 3000-sample bladder cycle (filling, urge with retention, voluntary micturition up to a 26.0 peak, emptying). Each pass must answer for the sample present at its start, and the outputs must go storage, retention, micturition, storage, each change showing within 176 clocks. |
| `tb_cn_block` | one centre against a testbench-played decision unit that refuses about a third of requests. No write may happen while stalled, and pass length is exact. |
| `tb_decision_cluster` | grants are one-hot and only to requesters, no port starves, results use the right centre's registers, and loads stay isolated |
| others | one per block: ALU operations, register loading, input snapshot, data memory modes, output routing, program memory lock, pointer stepping, hold and jumps, shared-memory priority and compartments |

The `+verilator+rand+reset+2` run-time option randomises everything not reset
and is a useful extra check. Every value that is read is either reset or
configured first.
