# From a ROM-driven state machine to a single-cycle processor

This repository holds two small designs that show the same idea at two scales:
**a finite state machine is a state register plus a ROM that maps (current
state, inputs) to (next state, outputs).**

* A **vending-machine controller**: 2 bits of state (quarters inserted), a
  32-word x 4-bit ROM, and a handful of AND/OR gates that shrink the ROM from an
  impractical 2^24 x 13 bits to 128 bits.
* An **LC2Kx single-cycle processor**: here the "state" is the PC, an 8-entry
  register file and memory, and the ROM is a control ROM indexed by the opcode.
  Every instruction completes in one clock cycle.

Both are built from the same parts: a 2-to-1 mux, an N-to-2^N decoder, a ROM made
of a decoder and an OR array, and a clocked register. `lecture9_top` places the
two designs side by side. They share only the clock and the reset.

All RTL is SystemVerilog-2017 and synthesizable. Every module has a
self-checking testbench in `tb/`.

## Building blocks

| module | what it is | timing |
|---|---|---|
| `mux2` | `out = sel ? in2 : in1` | combinational |
| `decoder` | N-to-2^N one-hot decoder (3x8 and 5x32 are used) | combinational |
| `rom` | decoder drives one word line, each data bit is the OR of the word lines connected to it; the contents are a parameter | combinational |
| `register` | D flip-flops with a load enable and a synchronous reset | rising edge |
| `adder` | `in1 + in2`, carry out dropped | combinational |
| `alu` | `fn=0`: add, `fn=1`: nand; `eq = (in1 == in2)` | combinational |
| `sign_extend` | 16 to 32 bits, copying bit 15 | combinational |
| `register_file` | 8 x 32, two read ports (combinational), one write port (clocked) | write at rising edge |
| `memory` | 65,536 x 32, ports `addr`, `datain`, `dataout`, `en`, `rw` (1 = read, 0 = write) | combinational read, write at rising edge |

Two immediate assertions guard design rules. The decoder output must be one-hot,
and the vending machine must never open a drink latch below three coins.

The `rom` default contents are a small 8-word x 4-bit example. Rows 0 to 7 hold
1001, 0100, 0010, 1001, 0010, 0001, 1000 and 0000. `CONTENTS` packs word k at
bits `[k*DW +: DW]`.

## The LC2Kx single-cycle processor (`lc2kx_cpu`)

### Instruction format

| bits | 24-22 | 21-19 | 18-16 | 15-0 | 2-0 |
|---|---|---|---|---|---|
| field | opcode | regA | regB | offset (sign-extended) | destReg (add, nand) |

Bits 31-25 are ignored.

### Datapath

```
          +--------------------------- branch adder: (PC+1) + SE(offset) ----+
          |                                                                  |
 PC mux --+-- PC -- instruction memory -- bits 24-22 -- 3x8 decoder -- control ROM
   ^                       |                                              |
   +-- PC+1 adder          +-- 21-19 --> R1  register  OUT1 ---------> ALU IN1
                           +-- 18-16 --> R2    file    OUT2 --+-> ALU-B mux -> ALU IN2
                           +-- dest mux(18-16 | 2-0) --> W      |   ^ SE(offset)
                           +-- 15-0 --> sign extend              +-> data memory Datain
                                         ALU OUT --> data memory Addr
                        write-data mux (data memory out | ALU OUT) --> register file D
```

The control ROM is a `rom` with AW = 3. Its internal 3x8 decoder turns the
opcode into one word line. The selected row is the control word (`ctrl_t` in
`lc2kx_pkg`):

| opcode | dest_sel | wdata_sel | rf_en | alub_sel | alu_fn | mem_en | mem_rw | branch |
|---|---|---|---|---|---|---|---|---|
| 000 add  | 1 (2-0) | 1 (ALU) | 1 | 1 (regB) | 0 add | 0 | 1 | 0 |
| 001 nand | 1 | 1 | 1 | 1 | 1 nand | 0 | 1 | 0 |
| 010 lw   | 0 (18-16) | 0 (memory) | 1 | 0 (offset) | 0 | 1 | 1 read | 0 |
| 011 sw   | 0 | 0 | 0 | 0 | 0 | 1 | 0 write | 0 |
| 100 beq  | 0 | 0 | 0 | 1 | 0 | 0 | 1 | 1 |
| 101 jalr, 110 halt, 111 noop | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 0 |

Every mux follows one rule: select 0 takes the first input and select 1 takes
the second. The PC mux picks the branch target when `branch AND alu.eq`.
Otherwise it picks PC + 1.

All state changes happen on one rising edge. The PC, the register-file write
and the data-memory write update together. Reads of the register file and both
memories are combinational, so the whole instruction settles within the cycle.
The result is one instruction per clock. For example, a program of 31
instructions takes 31 cycles.

### Where this processor is this design's own

* **Only ADD is fully specified by the source material.** Its control row and
  field positions come from there. The opcodes and semantics of nand, lw, sw
  and beq follow the standard LC2K instruction set, and so do the ROM rows
  derived from them.
* **jalr and halt do nothing.** The datapath has no path from PC + 1 to the
  register file and none from a register to the PC, so jalr and halt act as
  noop. A halted program keeps running through memory. Testbenches detect the
  end by watching the PC.
* **The `branch` control bit is added.** No select line for the PC mux is
  specified, so the control word has an eighth bit.
* **The memories are two copies of one address space.** The LC2 state is one
  65,536-word memory, but the datapath uses separate instruction and data
  memories. Here each memory holds all 65,536 words. The load port writes a
  word into both, but a `sw` changes only the data memory. Self-modifying code
  therefore does not see its own stores.
* **Register 0 is an ordinary register.** It is not hard-wired to zero, and all
  registers reset to 0.
* **The memory `rw` encoding is 1 = read, 0 = write.** `dataout` is 0 while
  `en` is low.
* **The load port is this design's own.** Hold `rst` high and pulse `load_en`
  with `load_addr`/`load_data`. The word goes into both memories. Release `rst`
  to start at PC 0. Memory contents are not reset.

## The vending-machine controller (`vending_controller`)

The machine takes quarters only, and every drink costs $0.75. The state is the
number of quarters held, 0 to 3. Its raw inputs are a coin trigger, a refund
button, 10 drink selectors and 10 pressure sensors (1 = bottle present). Its
outputs are 10 drink-release latches and a coin-release latch.

**How the ROM is kept small.** If all 22 inputs went to the ROM, it would need
2^24 words of 13 bits. Instead, `vending_drink_logic` ANDs each selector with
its pressure sensor and ORs the ten results into one "drink select" bit. On the
output side, one "drink release" bit from the ROM is ANDed with each selector to
open that drink's latch. The ROM address is then
`{state[1:0], coin, drink_select, refund}` (5 bits). The ROM word is
`{next_state[1:0], coin_release, drink_release}` (4 bits). The total is 128
bits.

**ROM contents.** The ROM is computed at elaboration by `rom_word()` in
`vending_controller.sv`. It follows these rules, in this priority:

1. refund: go to 0 coins. The coin-release latch opens if at least one coin was
   held.
2. drink select (a stocked slot is selected): at 3 coins, go to 0 and release
   the drink. Below 3 coins nothing happens ("no free drinks").
3. coin: 0 to 1 to 2 to 3. A coin at 3 coins keeps the state and opens the
   coin-release latch to return that quarter.
4. Otherwise the state holds. This includes selecting an empty slot at 3
   coins: the customer keeps the credit and may choose another drink.

The following are this design's own choices: the priority among simultaneous
inputs, returning an extra quarter at 3 coins, and refund at 0 coins doing
nothing.

**Timing.** The controller handles one input event per rising clock edge. The
outputs are Mealy outputs: they come straight from the ROM. They are valid in
the cycle the input is present and last that one cycle.

## Top level (`lecture9_top`)

`lecture9_top` has no parameters. Its ports are `clk` and `rst`, plus:

* `cpu_*`: the load port, and the processor's PC, instruction, control word and
  branch-taken signal.
* `vm_*`: the vending-machine inputs and outputs, and the current coin count.

## Simulating

Each testbench is a top module with no ports. It prints
`TB_RESULT checks=N failures=M` and calls `$finish`. To build and run one with
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/lc2kx_pkg.sv tb/tb_lecture9_top.sv --top-module tb_lecture9_top -o sim
./obj_dir/sim
```

For another testbench, substitute its name, for example `tb_lc2kx_cpu` or
`tb_vending_controller`.

What the testbenches cover:

* **`tb_lecture9_top`** is end to end, with all parameters at their defaults.
  * It loads the full 65,536-word image, then computes 7 x 6 by repeated
    addition, followed by nand, noop, sw and lw.
  * It checks the registers and memory, and checks that the run takes exactly
    one cycle per instruction.
  * In parallel, a customer session on the vending machine checks every output
    on every cycle.
  * It counts every mechanism and fails if any never occurred: each
    instruction kind, taken and untaken branches, coin, refund, drink release,
    empty slot, refused free drink and returned extra coin.
* **`tb_lc2kx_cpu`** runs in three parts, all with 65,536-word memories:
  * the "add 1 2 3" example, including its control word;
  * a hand-checked loop program with an exact cycle count;
  * 4,000 cycles of a random memory image. After every cycle, the PC and all
    registers are compared with an instruction-level reference model. The
    whole data memory is compared at the end.
* **`tb_vending_controller`** runs directed scenarios and 2,000 random events
  against a reference model.
* **The unit testbenches** check each building block against values computed
  independently.

Each testbench has a watchdog and runs in well under a second.

## Changing the design

* **A different price or coin set** means new ROM contents in `rom_word()` and
  possibly a wider state register (the `register` width and the `rom` `AW`).
* **New processor instructions** need a new row in `CONTROL_ROM`
  (`lc2kx_control.sv`) and a new `ctrl_t` field if they need a new datapath
  path.
* **A smaller memory** for faster simulation: set `WORDS` on `lc2kx_cpu`. It
  must be a power of two. Addresses use its low `log2(WORDS)` bits.
