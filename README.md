# Delay-testable domino datapath: 32-bit ALU and 64-entry register file

Fast datapath units (adders, ALUs, register-file bit lines) are built from
domino logic. Each domino gate precharges in one clock phase and evaluates in
the other. A small defect, such as a resistive via or a weak transistor,
makes a gate slow without making it wrong. At the slow clock of a tester
that slowness never shows up. At speed, it makes the chip fail.

This design gives every critical domino section an extra **footer**
transistor. The footer's gate is normally held on. In TEST mode it is driven
by a delayed, inverted copy of the clock. The section may then evaluate only
between the clock edge that starts evaluation and the moment the footer
turns off: an *evaluation window* of a few hundred picoseconds, set on chip
by an inverter delay chain. A section that is late by more than the window's
safety margin does not finish, and its outputs stay at the precharged value.
So a delay fault becomes an ordinary logic failure that a slow, cheap tester
can see. The window does not depend on the clock period, so the test clock
can be 5x slower than the normal clock (200 MHz here). Only one section gets
a tight window at a time, so a failing result also tells you *which* section
is slow. That is delay diagnosis, not just detection.

The repository holds two units built around these ideas. They sit side by
side in the top module `datapath_top` and are not connected to each other:

* `alu32`: a 32-bit ALU with NORMAL and TEST modes. Its adder and output
  multiplexer are compound domino. Its logic unit, shifter and decoder are
  non-critical static logic with clock-gated inputs.
* `rf_read_port`: a 64-entry, 32-bit register file whose read port is a
  wide-OR domino path: word lines, then 16-wide local bit lines, then a NAND
  with clock-controlled precharge, then a 2-wide global bit line, then an
  output latch.

## How domino circuits are represented in RTL

This is the part that needs the most care when reading or changing the code.
RTL has no transistors, so each footed domino section is a `cdl_stage`
instance. That is a latch with these rules:

* In its precharge phase the output is forced to 0. (The dynamic node is
  high, so the inverter after it is low.)
* In its evaluation phase the output follows the settled logic function `f`
  while the `footer` input is 1.
* When `footer` falls during evaluation, the output **holds** what it had
  reached. A 0 that should have become 1 stays 0 until the next precharge.

At zero delay, with the footer held at 1, this is just a phase-gated copy of
`f`, so the datapath computes the right answer. A delay fault is simulated
by making `f` arrive late: the testbenches force the section's input net to
its precharged value and release it a few hundred picoseconds after the
evaluation edge. If the footer closes first, the late value is lost and the
result is wrong. `tb_cdl_stage` sweeps the arrival time across the window to
show the pass/fail boundary.

Static gates, keepers, dual supply voltages, body bias and transistor
sizing have no logic function. The code leaves them out, and no timing
beyond the evaluation windows is modelled.

Lint reports every `always_latch` block in `ds_latch` and `cdl_stage` as a
latch and notes that `<=` in them acts as `=`. Both are intended: the
latches are the circuit.

## The ALU

### Instructions

An instruction has 5 bits, `{T/N, op[3:0]}`. The top bit selects the mode.

| instr | mode | operation | result |
|---|---|---|---|
| 0_0000 | NORMAL | ADD | A + B, carry on `cout` |
| 0_0001 | NORMAL | LOOP | previous result + B |
| 0_0010 | NORMAL | INV | ~A |
| 0_0011 | NORMAL | AND | A & B |
| 0_0100 | NORMAL | OR | A \| B |
| 0_0101 | NORMAL | XOR | A ^ B |
| 0_0110 to 0_1010 | NORMAL | SHL1 to SHL5 | A << 1 to 5 |
| 0_1011 to 0_1111 | NORMAL | no-op | 0 |
| 1_xx00 | TEST | A + B, section 1 under test | |
| 1_xx01 | TEST | A + B, section 2 under test | |
| 1_xx10 | TEST | A + B, section 3 under test | |
| 1_xx11 | TEST | A + B, reserved stress code, all footers on | |

This gives 11 NORMAL and 4 TEST codes, 15 instructions in all. The opcode
values, the shift direction (left, logical) and the meaning of LOOP (add B
to the ALU's own previous result) are this design's choices. So is the
behaviour of the reserved code.

### Timing

```
 edge E0 (rising)    instr, A, B and the decoded control word are captured
 clk = 1             PG + in-block carry merge (section 1)   footer N3
                     block-level carry merge tree (section 2) footer N5
                     logic unit and shifter (static)
 clk = 0             carries held in a latch; sum select and output
                     multiplexer (section 3)                  footer N7
                     output latch transparent
 edge E1 (rising)    result and cout held until the next clk = 0 phase
```

Latency is one cycle: read the result just after E1. Throughput is one
instruction per cycle. The loopback register captures the result at every
rising edge, so LOOP can be issued back to back. `rst_n` is synchronous and
active low. It loads a no-op control word, so the result becomes 0 and all
footers stay on.

### Units

* **Decoder** (`alu_decoder`). A combinational decode into the
  `alu_ctrl_t` word. The word is registered in master-slave latches
  (`ds_ff`). It produces the unit selects, the logic function, the shift
  distance, the loopback select, the TEST section code, and two
  clock-gating enables.
* **Input stage** (`alu_input_stage`). The A and B buses feed two register
  banks: one for the adder, one for the logic and shift units. Only the bank
  of the unit the instruction uses receives a clock pulse (`clock_gate`).
  The other bank, and the wires behind it, stay still. This stands in for
  the original design's bus splitters.
* **Adder** (`hc_adder32`). Propagate and generate are P = A | B and
  G = A & B. Four-bit block terms feed a Han-Carlson prefix tree over the
  eight blocks, which gives the carries C3, C7, ..., C31. For every block,
  two 4-bit ripple adders compute the sum for carry-in 0 and for carry-in 1
  in parallel. The block's incoming carry picks one of them. A front-end
  mux chooses A or the loopback register as the first operand.
* **Logic unit** (`alu_logic_unit`). A pass-transistor-style bit slice:
  B steers A, ~A or a constant onto the output. It computes INV, AND, OR
  and XOR.
* **Shifter** (`alu_shifter`). A left shift by 1 to 5 positions, in
  log-shifter stages of 1, 2 and 4. Larger distances are clamped to 5.
* **Output mux** (`alu_out_mux`). A wide-OR of the one-hot selected unit
  results. With no select the output is 0. An assertion in `alu32` checks
  that the selects are one-hot.

### Delay test logic

`dft_ctrl` decodes T/N, CTRL1 (`instr[1]`) and CTRL2 (`instr[0]`):

| T/N | CTRL1 CTRL2 | footer N3 | footer N5 | footer N7 |
|---|---|---|---|---|
| 0 | x x | 1 | 1 | 1 |
| 1 | 0 0 | TESTCLK1 | 1 | 1 |
| 1 | 0 1 | 1 | TESTCLK2 | 1 |
| 1 | 1 0 | 1 | 1 | TESTCLK3 |
| 1 | 1 1 | 1 | 1 | 1 (stress) |

Its input multiplexers drive delay-chain node A with CLK and node B with
CLKB in TEST mode. In NORMAL mode both nodes are tied to 1, so the chain
does not load the clock. `dft_delay_chain` is a behavioural model of the
inverter chain, with the following outputs:

* TESTCLK1 = ~A delayed 230 ps (window of section 1).
* TESTCLK2 = ~A delayed 390 ps. It shares the first part of the chain with
  TESTCLK1 and sets the window of section 2.
* TESTCLK3 = ~B delayed 170 ps. It closes section 3, which evaluates in the
  low phase.

Each delay includes about 60 ps of safety margin. A synthesised netlist
would need a real delay line in its place.

Using TEST mode:

1. Slow the clock down. The testbenches use 200 MHz (2500 ps half period);
   any period longer than the windows works.
2. Issue **one warm-up TEST instruction** and ignore its result. The chain
   is parked while in NORMAL mode, so the first TEST cycle can miss its
   closing edge.
3. For each section, apply vectors with that section under test and compare
   the sums. A wrong result with section k under test, and right results
   with the other sections under test, points to a slow gate in section k.

`tb_alu32` and `tb_datapath_top` show this. They inject a late evaluation
into each section in turn and check the full 3x3 matrix: a fault is caught
exactly when its own section is under test. They also show that the same
fault goes unnoticed in NORMAL mode at the slow test clock.

`tb_alu_delay_range` measures the detection range. For each section it
sweeps how late the section evaluates, in 20 ps steps, and finds the
smallest lateness that corrupts the sum under three conditions:

| condition | section 1 | section 2 | section 3 |
|---|---|---|---|
| TEST mode, 200 MHz clock | > 230 ps | > 390 ps | > 170 ps |
| NORMAL mode, 200 MHz clock | > 2500 ps | > 2500 ps | > 2500 ps |
| NORMAL mode, 1.5 GHz clock | > 333 ps | > 333 ps | > 333 ps |

With the windows, a slow tester gets the resolution of a test run at full
speed. In this zero-delay model the numbers are the window lengths. On
silicon, a section's own delay takes up most of its window, and what is left
over is the roughly 60 ps safety margin. So the real resolution is that
margin, not the full window.

## The register file

`rf_read_port` holds 64 entries of 32 bits in an array. Writes happen at the
rising clock edge (one write port, `we`/`waddr`/`wdata`). The read path is
built out of explicit domino stages:

* `rf_decoder` (6:64) decodes the read address. Its outputs are ANDed with
  CLK to form the word lines, which are 0 while CLK = 0 (precharge).
* For each bit, `rf_bitline` has four 16-wide local bit lines. Each one
  discharges when any selected entry holds a 1.
* A 2-input NAND merges each pair of local bit lines. During precharge, a
  clock-controlled pull-down forces the NAND output to 0, modelled as AND
  with CLK. This shortens precharge in silicon.
* A 2-wide global bit line and an inverter give the read bit.
* An output latch, transparent while CLK = 1, holds the data through the
  precharge phase.

A read presented before the rising edge is valid during that high phase and
held until the next one. A write and a read of the same entry in the same
cycle return the new data. `LBL_W` is a parameter. 16 (16-wide LBL, 2-wide
GBL) is the leakage-controlled configuration this design is about. 8 gives
the conventional 8-wide LBL, 4-wide GBL organisation, and `tb_rf_bitline`
checks both. `re` and the write port are this design's additions; the
original work describes only the read path.

## Files

`rtl/` holds one module or package per file:

| file | contents |
|---|---|
| `alu_pkg.sv` | widths, opcodes, logic functions, control word struct |
| `datapath_top.sv` | top: ALU and register file side by side |
| `alu32.sv` | ALU |
| `alu_decoder.sv`, `alu_input_stage.sv`, `clock_gate.sv` | decode and gated inputs |
| `ds_latch.sv`, `ds_ff.sv` | latch and master-slave flip-flop |
| `hc_adder32.sv`, `alu_logic_unit.sv`, `alu_shifter.sv`, `alu_out_mux.sv` | execution units |
| `cdl_stage.sv` | footed domino section timing model |
| `dft_ctrl.sv`, `dft_delay_chain.sv` | delay test logic (the chain is behavioural) |
| `rf_read_port.sv`, `rf_decoder.sv`, `rf_bitline.sv` | register file |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`, plus
`tb_alu_delay_range` (described above). Each prints
`TB_RESULT checks=N failures=M`. `tb_datapath_top` runs the top at its
default sizes. It sends 700 pipelined NORMAL instructions through the ALU,
switches to TEST mode, tests each section with and without an injected
fault, runs the reserved code, switches back, and drives 664 register-file
accesses (reads, writes, same-cycle write-then-read, disabled reads). It
counts each of these mechanisms and fails if any of them never happened.

All files use `timeunit 1ps`. To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/alu_pkg.sv rtl/*.sv tb/tb_datapath_top.sv \
    --top-module tb_datapath_top -Mdir obj -o sim
./obj/sim
```

Replace `tb_datapath_top` with any other testbench name. Each run takes
seconds.

## What follows the original design and what does not

These come from the original design:

* the unit partition and critical path of the ALU;
* the Han-Carlson sparse carry tree with 4-bit carry-select blocks;
* the three test sections and where they evaluate in the clock;
* the mode table;
* the window delays of 230, 390 and 170 ps;
* the 200 MHz test clock;
* the register-file read path with 16-wide local and 2-wide global bit
  lines.

These are this design's own choices:

* the instruction encoding and the meaning of LOOP;
* left shifts;
* the reset;
* the carry latch between the high and low phases;
* the output-latch polarities;
* the register-file write port and read enable;
* the behaviour of the reserved stress code.

These are not modelled: the reduced-swing clock buffer, the input and output
scan chains, keepers, reverse body bias and its bias generator, and every
electrical effect (leakage, noise margin, energy). The evaluation windows
are the only timing in the model. A real delay fault's size in picoseconds
has to come from circuit simulation; the RTL only shows how the window turns
a late section into a wrong result.
