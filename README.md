# A self-timed 16-bit ALU driven by a four-phase pulse pipeline

This is a 16-bit accumulator ALU with no clock. Each instruction is started
by one request/acknowledge handshake. A chain of four-phase control
elements turns that handshake into a short train of overlapping pulses.
The controller of the selected instruction uses those pulses as its
register clocks, its multiplexer select and its accumulator load. When the
train has passed, nothing in the circuit toggles until the next request, so
the clock is stopped between instructions. How fast an instruction runs
depends only on the delays put between the control elements. Those delays
are built from delay macros: single hand-placed FPGA look-up tables.

The RTL follows a published FPGA prototype of such an ALU, built for a
Virtex-II, which was meant as part of an asynchronous microprocessor. The
structure, instruction set, pulse counts and delay figures come from that
design. Where it leaves things open, this implementation makes its own
choices. They are listed in "Where this RTL departs from the original"
below.

## The four parts

```
            sel[4:0]                          din[15:0]
               |                                  |
      +--------v--------+  deco[14:0]  +----------v-----------------+
      | instr_decoder   |------------->|  st_alu (data path)        |
      +-----------------+      |       |  alu_operations -> result_ |
                               |       |  mux -> accumulator --+    |
      +-----------------+      v       |        ^ (feedback)   |    |
req ->| st_pipeline     | xi[9:1] +----+--------+--------------+    |
ack <-| 9 control blocks|-------->| async_control: 15 operation  |  |
busy<-| + delay lines   |<--------|  controls, test & acc merges |  |
      +-----------------+ n_pulses+------------------------------+  |
                                     | tot_test -> op_counter       |
```

* **ST pipeline** (`st_pipeline`): nine control blocks in a chain. Each
  block is a Muller C-element (`st_control`). The request path between two
  blocks has 3 delay macros and the acknowledge path has 1. One handshake
  sends a single wave down the chain, and block *k* emits pulse `xi[k]`.
* **Instruction decoder** (`instr_decoder`): decodes the 5-bit selection
  code into 15 one-hot lines.
* **Asynchronous control** (`async_control`): one operation control per
  instruction, gated by that instruction's decoder line. Each instruction
  has one of four types (`op_type1` … `op_type4`), which sets which pulses
  drive which outputs. Two OR merges (`pulse_merge`) combine the outputs of
  all the controls. The "acc" merge gives the accumulator clock. The "test"
  merge gives the total-test line, which pulses once per instruction and
  drives the operations counter (`op_counter`).
* **ALU data path** (`st_alu`) has three parts:
  * the operation block (`alu_operations`), where the accumulator and the
    input word feed every operation and some operations have their own
    register,
  * a 15-channel one-hot multiplexer (`result_mux`, lines I0..I14),
  * the accumulator (`accumulator`).

## The pulse train (the part to understand first)

Let Tm be the delay of one macro (1.01 ns). A forward link is F = 3 macros
and the acknowledge link is B = 1 macro. Block *k*'s output follows its
request when its request and acknowledge inputs differ. Otherwise it holds.
Suppose the environment raises `req` and lowers it as soon as `ack` rises.
Then, measured from the rising edge of `req`:

* pulse `xi[k]` rises at (k−1)·F·Tm = (k−1)·3.03 ns,
* each pulse lasts (F+B)·Tm = 4.04 ns, so consecutive pulses overlap,
* the last block of the train acknowledges itself through B macros.

```
req   _/‾\______________________________
xi1   _/‾‾‾‾\___________________________      3.03 ns apart,
xi2   ____/‾‾‾‾\________________________      4.04 ns wide
xi3   _______/‾‾‾‾\_____________________
 ...
xiN   ___________________/‾‾‾‾\_________
busy  _/‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾‾\_________     falls at (N·F + B)·Tm
```

The train does not always use all nine blocks. The asynchronous control
reports in `n_pulses` how many pulses the selected instruction needs, and
block `n_pulses` then acts as the end of the chain. A short instruction
therefore frees the ALU sooner.

### What each operation type does with its pulses

All outputs are gated by the instruction's decoder line.

| type | pulses | register load | multiplexer select | accumulator load | done (`tot_test`) | used by |
|---|---|---|---|---|---|---|
| 1 | 4 | – | xi1 ∨ xi2 ∨ xi3 | xi2 | xi4 | LDA, ADD, COMPL, INC A, AND, OR, RESTA |
| 2 | 2 | xi1 | – | – | xi2 | PTO_SAL |
| 3 | 5 | xi1 | xi2 ∨ xi3 ∨ xi4 | xi3 | xi5 | ROT_D, ROT_I, DES_D, LDA X, COMP, LDA Y |
| 4 | 9 | xi1 (operands B, C) | xi2 ∨ … ∨ xi9 | xi8 | xi9 | MUL |

The select goes high at least one pulse before the accumulator edge and
stays high until at least one pulse after it. This is what makes the
self-timed load safe. The wiring of types 1 and 4 is the original's. For
type 4, the six pulses between the operand load and the accumulator load
are the time the combinational 16×16 multiplier gets. The pulse assignment
of types 2 and 3 is this design's choice (see below).

With the default delays, the timing measured from `req` is:

| type | accumulator load | done pulse | `busy` falls | rate |
|---|---|---|---|---|
| 1 | 3.03 ns | 9.09 ns | 13.13 ns | 76 MIPS |
| 2 | – | 3.03 ns | 7.07 ns | 141 MIPS |
| 3 | 6.06 ns | 12.12 ns | 16.16 ns | 62 MIPS |
| 4 | 21.21 ns | 24.24 ns | 28.28 ns | 35 MIPS |

## Instruction set

The selection code `sel` is 5 bits. Decoder line k is active for code k+1.
Arithmetic is modulo 2^16 and comparison is unsigned.

| code | name | effect | mux line | type |
|---|---|---|---|---|
| 1 | LDA | ACC ← din | I2 | 1 |
| 2 | ADD | ACC ← ACC + din | I1 | 1 |
| 3 | ROT_D | ACC ← ACC rotated right by 1 | I3 | 3 |
| 4 | ROT_I | ACC ← ACC rotated left by 1 | I4 | 3 |
| 5 | COMPL | ACC ← ~ACC | I5 | 1 |
| 6 | DES_D | ACC ← ACC >> 1 (logical) | I6 | 3 |
| 7 | LDA X | X ← din, ACC ← X | I9 | 3 |
| 8 | INC A | ACC ← ACC + 1 | I8 | 1 |
| 9 | COMP | ACC ← {13'b0, GT, EQ, LT} of ACC vs din | I7 | 3 |
| 10 | LDA Y | Y ← din, ACC ← Y | I10 | 3 |
| 11 | AND | ACC ← ACC & din | I11 | 1 |
| 12 | OR | ACC ← ACC \| din | I12 | 1 |
| 13 | PTO_SAL | port_out ← ACC | – | 2 |
| 14 | RESTA | ACC ← ACC − din | I14 | 1 |
| 15 | MUL | ACC ← low 16 bits of ACC × din | I13 | 4 |

Codes 0 and 16–31 run a one-pulse train that no controller responds to.
Nothing changes and `tot_test` does not pulse. Line I0 carries the
accumulator itself. It is selected whenever no instruction drives a line.

## Using `st_alu_top`

1. Reset: drive `rst` low, then high for at least 10 ns, then low. Reset is
   asynchronous, and the registers act on its rising edge. It clears the
   accumulator, all operation registers, the counter and the pipeline.
2. Set `sel` and `din`, then wait until `busy` is low.
3. Raise `req` and wait for `ack` to go high. Lower `req` and wait for
   `ack` to go low.
4. Wait for `busy` to go low. The result is then in `acc` (or `port_out`).
   `tot_test` has pulsed once, and `op_count` has gone up by one.

Keep `sel` and `din` stable from step 2 until `busy` falls. The controllers
react to the decoder lines for as long as pulses are in flight. Changing
`sel` early can clock the wrong register.

Parameters of the top: `FWD_MACROS` (3), `BACK_MACROS` (1), `LUT_NS`
(0.439) and `ROUTE_NS` (0.571). One macro delays by `LUT_NS + ROUTE_NS`.

## Delay macros and the timing model

`delay_macro` is a behavioural model of a look-up table used as a buffer,
with an inertial delay of `LUT_NS + ROUTE_NS`. `delay_line` chains
`N_MACROS` of them.

* 0.439 ns is the look-up table delay of the original device.
* The route share was chosen to make one macro 1.01 ns. Then a
  three-macro link is 3.03 ns, the cycle measured for a two-element
  control chain on the original FPGA.
* A single macro measured pin to pin on the FPGA takes about 9.6 ns, but
  most of that is the input and output pads. Inside a chain there are no
  pads, so they are not modelled.

Real route delays differ from macro to macro and grow irregularly with
chain length. The model uses one fixed value for every macro. Absolute
times are therefore only indicative, for example:

| case | this model | measured on the original FPGA |
|---|---|---|
| 25-block chain, first to last pulse | 72.7 ns | 99.3 ns |
| 75-macro delay module | 75.75 ns | 65.5 ns post-layout |

A synthesis tool reduces a `delay_macro` to a wire. A real implementation
needs the look-up tables kept and placed by constraints.

## Files

| file | what it is |
|---|---|
| `rtl/st_alu_pkg.sv` | widths, selection codes, multiplexer lines, operation types, `op_clks_t` |
| `rtl/st_alu_top.sv` | the whole ALU |
| `rtl/st_pipeline.sv`, `rtl/st_control.sv` | pulse pipeline and its C-element block |
| `rtl/delay_line.sv`, `rtl/delay_macro.sv` | behavioural delay models |
| `rtl/instr_decoder.sv` | selection code to decoder lines |
| `rtl/async_control.sv`, `rtl/op_type1..4.sv`, `rtl/pulse_merge.sv` | asynchronous control |
| `rtl/st_alu.sv`, `rtl/alu_operations.sv`, `rtl/result_mux.sv`, `rtl/accumulator.sv` | data path |
| `rtl/op_counter.sv` | operations counter |
| `tb/alu_ref_pkg.sv` | reference model of the instructions for the testbenches |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_st_alu_top.sv` | end-to-end test at the default parameters |
| `tb/tb_macro_sweep.sv` | ALU rebuilt with 3…40 macros per link; prints latency and MIPS per type |

## Simulating

The design needs an event-driven simulation with delays. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/st_alu_pkg.sv tb/alu_ref_pkg.sv tb/tb_st_alu_top.sv \
    --top-module tb_st_alu_top -o sim
./obj_dir/sim
```

Other testbenches build the same way: change the file and the top module.
Testbenches that do not use the reference package can leave out
`tb/alu_ref_pkg.sv`. Every testbench ends by printing
`TB_RESULT checks=N failures=M`, and none takes more than a few seconds.

The end-to-end test covers the following:

* every instruction, then a 400-instruction random program with unused
  codes mixed in, with the accumulator, output port, X/Y and counter
  checked after each instruction,
* the exact times of the accumulator load, the done pulse and the end of
  `busy`,
* no activity while idle,
* a reset in the middle of a multiplication.

The test counts each operation type, instruction and compare outcome, and
fails if any of them never occurred.

Lint notes:

* The C-element is a latch inside a loop that closes only through the
  delay lines. Verilator reports it as a circular combinational path, and
  synthesis as one latch per block. Both are expected.
* Bits 15..3 of the compare register are constant zero.

## Where this RTL departs from the original

Taken from the original:

* the four modules and how they connect,
* the 16-bit width,
* the 15 instructions, their 5-bit codes, decoder values and multiplexer
  lines,
* the pulse counts of the four types (4, 2, 5, 9),
* the wiring of the type 1 and type 4 controls,
* 3 forward and 1 feedback macros per link,
* the look-up table delay.

This design's own choices:

* **Gate functions.** Only the wiring of the type 1 and type 4 controls is
  published. Here, pulses are merged with OR and gated with AND by the
  decoder line.
* **Types 2 and 3.** Which pulse drives which output is chosen by analogy
  with types 1 and 4.
* **Which instruction has which type.** In the original drawing, the four
  example controls hang on decoder lines 1–4, which does not fit the
  instruction table. Here the type follows whether the instruction owns a
  register.
* **Train length follows the type.** In the original, one pipeline of nine
  outputs feeds every control. Here the pipeline stops after the last pulse
  the instruction needs. The original reports a different speed for each
  type, and without this every instruction would take the full nine-pulse
  time.
* **`busy` output.** Added so the environment knows when `sel`/`din` may
  change.
* **Control block.** Built as a Muller C-element. The original does not
  detail the control block's insides.
* **Meaning of some instructions.** The instruction names are Spanish
  mnemonics, and their exact meanings are inferred:
  * COMPL is the one's complement.
  * COMP writes a three-flag word to the accumulator.
  * LDA X and LDA Y load their register from the input word.
  * MUL keeps the low 16 bits and captures both operands (32 flip-flops,
    where the original lists 16).
* **Line I0.** It holds the accumulator. The original names 15 select
  lines, but its table uses only I1–I14.
* **Decoder input.** The decoder takes a 5-bit code. One drawing of the
  original shows 15 separate enable inputs instead.
* **Reset.** Its polarity and style are chosen here.
* **Counter width.** 16 bits.
* **Timing.** The timing model is linear with one delay per macro, so
  latency grows with the macro count for every type. The original measured
  about 11 ns for type 2 whatever the macro count, and lower absolute
  rates (16–52 MIPS at its shortest delay). The ordering of the types
  (type 2 fastest, type 4 slowest) matches the original.

Not modelled:

* the FPGA occupation figures,
* the fan-out and net-delay statistics,
* the supply-current comparison with a synchronous ALU. That is a
  board-level measurement. The property behind it, no switching without a
  request, is checked in simulation.
