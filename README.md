# Multi-cycle MIPS: one multiplexer datapath and three bus datapaths

A single-cycle processor makes every instruction as slow as the slowest one
and needs a separate adder, instruction memory and data memory, because
every unit is used at most once per clock. A multi-cycle processor cuts
each instruction into short steps of about equal delay, one clock cycle
each, and stores what a step produces in registers the programmer never
sees. A short instruction then finishes in fewer cycles than a long one,
and one ALU and one memory can be reused in different steps of the same
instruction: the ALU computes PC + 4, branch targets and addresses as well
as results, and a single memory holds both instructions and data.

This repository holds four such machines, all executing MIPS instructions
with 32-bit words and 32 general-purpose registers:

| machine | module | datapath | instructions | cycles per instruction |
|---|---|---|---|---|
| 0 | `mc_cpu` | multiplexers, FSM control | add, sub, and, or, slt, ori, lw, sw, beq, j | 3 to 5 |
| 1 | `src_bus1_cpu` | one shared bus | add | 6 |
| 2 | `src_bus2_cpu` | in-bus and out-bus | add | 5 |
| 3 | `src_bus3_cpu` | two operand buses, one result bus | add | 3 |

Machine 0 is the main design. The bus machines show how the number of
buses trades wiring for cycles. For them only instruction fetch and `add`
are specified, and only those are built. `multicycle_top` places the four
side by side. Each has its own memory. They share only clock and reset.

## The multiplexer machine (`mc_cpu`)

### Datapath (`mc_datapath`)

The programmer-visible state is the PC, the register file (`regfile`, 32 x
32 bits, `r0` reads as zero) and the memory (`memory`). The datapath adds
five internal registers:

* **IR**: the instruction. It loads from memory only when `IRWrite` is high,
  so it stays stable for the whole instruction.
* **MDR**: the memory output.
* **A, B**: the two register-file outputs.
* **ALUOut**: the ALU result.

MDR, A, B and ALUOut have no enable: they load every cycle, so each holds
what was computed in the previous cycle. The control unit only has to make
sure that a value is consumed in the cycle after it was produced.

Six multiplexers route the data. Their select signals come from the
control unit:

| signal | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| IorD (memory address) | PC | ALUOut | | |
| RegDst (write register) | rt = IR[20:16] | rd = IR[15:11] | | |
| MemtoReg (write data) | ALUOut | MDR | | |
| ALUSrcA | PC | A | | |
| ALUSrcB | B | 4 | ext(IR[15:0]) | ext(IR[15:0]) << 2 |
| PCSource | ALU result | ALUOut | {PC[31:28], IR[25:0], 00} | |

`ext_unit` sign-extends the immediate when `ExtOp` = 1 (addresses and
branch offsets) and zero-extends it when `ExtOp` = 0 (`ori`). `mc_alu`
adds, subtracts, ands, ors or does a signed set-on-less-than, and reports
`Zero`. `mc_alu_control` chooses the operation:

| ALUOp | operation |
|---|---|
| 00 | add |
| 01 | subtract |
| 10 | taken from the function field |
| 11 | or |

The PC is written when `PCWrite` is high, or when `PCWriteCond` is high and
the ALU's `Zero` output is high. That is how `beq` branches.

### Control (`mc_control`): the step table

The control unit is a Moore FSM with one state per row of the table below.
Its outputs depend only on the state. This table is the core of the
design. All instructions share the first two steps:

* **T0 (IF)** reads `IR <- M[PC]`. In the same cycle the ALU, otherwise
  idle, computes `PC + 4` and writes it to the PC.
* **T1 (ID)** loads A and B from the register file. The ALU, again idle,
  computes the branch target `PC + (sext(imm) << 2)` into ALUOut. It does
  so for every instruction, because the instruction type is not yet known
  at that point. The PC already holds PC + 4, so the target comes out
  right. This early computation lets `beq` finish in T2.

At the end of T1 the opcode picks the path:

| state | IorD | MemRd | MemWr | IRWr | RegDst | MemtoReg | RegWr | ExtOp | SrcA | SrcB | ALUOp | PCSrc | PCWrCond | PCWr |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| IF | 0 | 1 | 0 | 1 | - | - | 0 | - | 0 | 1 | add | 0 | 0 | 1 |
| ID | - | 0 | 0 | 0 | - | - | 0 | 1 | 0 | 3 | add | - | 0 | 0 |
| EX_R | - | 0 | 0 | 0 | - | - | 0 | - | 1 | 0 | func | - | 0 | 0 |
| WB_R | - | 0 | 0 | 0 | 1 | 0 | 1 | - | - | - | - | - | 0 | 0 |
| EX_ORI | - | 0 | 0 | 0 | - | - | 0 | 0 | 1 | 2 | or | - | 0 | 0 |
| WB_ORI | - | 0 | 0 | 0 | 0 | 0 | 1 | - | - | - | - | - | 0 | 0 |
| EX_LW / EX_SW | - | 0 | 0 | 0 | - | - | 0 | 1 | 1 | 2 | add | - | 0 | 0 |
| M_LW | 1 | 1 | 0 | 0 | - | - | 0 | - | - | - | - | - | 0 | 0 |
| WB_LW | - | 0 | 0 | 0 | 0 | 1 | 1 | - | - | - | - | - | 0 | 0 |
| M_SW | 1 | 0 | 1 | 0 | - | - | 0 | - | - | - | - | - | 0 | 0 |
| EX_BEQ | - | 0 | 0 | 0 | - | - | 0 | - | 1 | 0 | sub | 1 | 1 | 0 |
| EX_J | - | 0 | 0 | 0 | - | - | 0 | - | - | - | - | 2 | 0 | 1 |

"-" means don't care. The RTL drives every don't-care low. The resulting
instruction lengths are:

| instruction | cycles |
|---|---|
| R-type, ori, sw | 4 |
| lw | 5 |
| beq, j | 3 |
| unknown opcode | 2 (returns to IF after ID, so it acts as a no-op) |

Two entries of the table were settled by checking them against the
register transfers they must perform:

* **ALUSrcA in ID is 0 (PC)**, since ID computes `PC + offset`.
* **EX_BEQ uses A − B (ALUSrcA = 1, ALUSrcB = 0)**, so that `Zero` means
  A = B.

`ori` needs an OR from the ALU, but the 2-bit ALUOp code has only three
defined meanings. The free code 11 is used for it.

### Timing and interfaces

Reset is synchronous and active high. It clears the PC and the internal
registers and starts in IF, fetching from address 0.

The memory port expects a combinational read: the word at `mem_addr`
appears on `mem_rdata` in the same cycle. Writes (`mem_write`) land at the
rising edge. The `memory` module behaves this way; its read data is zero
while `mem_read` is low. `instr_done` is high in the last cycle of every
instruction. `dbg_reg` / `dbg_reg_data` read any register without
disturbing the machine.

## The bus machines

On a bus machine, each register that can act as a source has an output
enable onto a bus, and each register that can act as a destination has a
load enable from one. A step is a set of enables. The buses replace the
multiplexers, but only one value can travel on a bus per cycle. Memory is
reached through two registers:

* **MA** holds the address.
* **MD** is loaded from memory.

The ALU of these machines (`src_alu`) has three functions:

| function | result | used for |
|---|---|---|
| ADD | C = A + B | the add instruction |
| INC4 | C = B + 4 | PC + 4 |
| PASS_B | C = B | plain transfers through the ALU |

Each bus is built as an AND-OR multiplexer of its enabled sources. An
assertion checks that no two sources drive a bus at once.

**One bus (`src_bus1_cpu`).** The PC, IR, MA, MD, the register file and
two ALU registers share one bus. Register A holds the first ALU operand;
the second operand is the bus itself. The result goes to register C.

```
T0  MA <- PC, C <- PC + 4
T1  MD <- M[MA], PC <- C
T2  IR <- MD
T3  A <- RF[rs]
T4  C <- A + RF[rt]
T5  RF[rd] <- C
```

**Two buses (`src_bus2_cpu`).** The buses split the traffic by direction:

* Bus B carries values out of the registers: from the register file, IR,
  PC and MD.
* Bus A carries values into the registers, and its only source is the ALU
  output.

Every transfer therefore passes through the ALU, with PASS_B for a plain
copy. Since the result can be stored in the cycle it is computed,
register C is no longer needed.

```
T0  MA <- PC
T1  PC <- PC + 4, MD <- M[MA]
T2  IR <- MD
T3  A <- RF[rs]
T4  RF[rd] <- A + RF[rt]
```

**Three buses (`src_bus3_cpu`).** Buses A and B are the ALU operands and
bus C is its result. The register file drives A and B at once, so `add`
is a single transfer. MA is transparent: an address put on bus B reaches
the memory in the cycle MA is loaded. This lets one cycle do three things:

* load MA from the PC,
* read the memory into MD,
* rewrite the PC with PC + 4.

The PC can be read and rewritten in the same cycle because it is
edge-triggered.

```
T0  MA <- PC, MD <- M[MA], PC <- PC + 4
T1  IR <- MD
T2  RF[rd] <- RF[rs] + RF[rt]
```

The transparent MA is modelled without a latch. A register keeps the last
address, and in a cycle that loads MA from bus B, bus B goes straight to
the memory address.

The bus machines decode the instruction from MD while it is being copied
into IR. A word that is not `add` (opcode 0, function 100000) ends the
instruction there:

| machine | cycles for a non-add word |
|---|---|
| 1 bus | 3 |
| 2 buses | 3 |
| 3 buses | 2 |

Their memories are never written.

## Top level (`multicycle_top`)

Per-machine ports are unpacked arrays of four, indexed by machine number
(0 to 3 as in the first table):

* `host_we`, `host_addr`, `host_wdata`, `host_rdata`: the second port of
  that machine's memory, used to load a program while `rst` is high and to
  read results afterwards.
* `dbg_reg`, `dbg_data`: register-file read.
* `pc`, `ir`, `instr_done`: observation.

`mc_state` and `bus1_step` / `bus2_step` / `bus3_step` show the control
state of each machine. `WORDS` (default 1024) sets the size of each memory
in 32-bit words. Addresses are byte addresses; bits [1:0] are ignored and
the upper bits wrap.

Shared types and encodings are in `rtl/mips_pkg.sv`:

* the opcodes and function codes, which are the standard MIPS32 values;
* the ALU operation codes;
* the select codes;
* the `mc_ctrl_t` control bundle and the `mc_state_t` states.

## Choices this design makes

These points are not fixed by the machine organisation above:

* The memory size.
* The host port and the register-file debug port.
* The reset behaviour.
* `r0` hardwired to zero.
* The ALU operation set of machine 0 (add, sub, and, or, slt).
* The ALUOp code 11 for `or`.
* Unknown opcodes acting as no-ops.
* Memory read data being zero while `mem_read` is low.

The bus machines implement only what their transfer lists cover:

* No memory writes.
* No branches.
* No instructions other than `add`.

An I/O device on the memory bus is part of the organisation but not built.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.
`tb/mips_asm_pkg.sv` encodes instructions for the test programs.

* The unit benches compare against values computed in the bench:
  * random and corner operands for the ALUs and the extender;
  * all ALUOp and function-code combinations;
  * random traffic on the register file and the memory.
* `mc_control_tb` checks every control output against the step table, in
  every state of every instruction class, together with the cycle counts.
* `mc_datapath_tb` plays the control unit itself, driving table rows by
  hand, and checks PC and register results. Its program has a taken and a
  not-taken `beq` and a `j`.
* `mc_cpu_tb` runs a program that uses every instruction, including
  negative offsets and an unknown opcode. It checks the address and length
  of every instruction, the final registers and the stored words.
* The bus machine benches check add results and per-instruction cycle
  counts. They preset `r1` and `r2` through a hierarchical reference,
  because these machines cannot load constants.
* `multicycle_top_tb` runs all four machines at the default parameters
  against an instruction-set model that executes in lockstep. Machine 0
  sums a 16-word random array with a `lw`/`add`/`beq`/`j` loop and then
  uses the remaining instructions. Machines 1-3 run a chain of 29 adds and
  one unknown word. The bench checks the following:
  * each executed instruction word, one cycle after its `instr_done`;
  * each instruction's cycle count;
  * at the end, all registers and the data area.

  It also counts how often each mechanism occurred and fails if one never
  did. The mechanisms are every instruction class, a taken and a not-taken
  branch, a jump, an unknown opcode, and an add and a skipped word on each
  bus machine.

Not verified: synthesis timing, and any behaviour outside these
instruction sets.

## Simulating

Each testbench is a top-level module with no ports. For example, with
Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mips_pkg.sv tb/mips_asm_pkg.sv \
    tb/multicycle_top_tb.sv --top-module multicycle_top_tb
./obj_dir/Vmulticycle_top_tb
```

Use the same command with another `*_tb.sv` for a single unit. All RTL is
synthesizable SystemVerilog-2017. The memories are plain arrays with a
combinational read, so an FPGA flow will map them to distributed RAM, or to
block RAM after the read is made synchronous.
