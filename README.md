# WIMP51 — a three-cycle teaching subset of the 8051

The WIMP51 is a deliberately tiny 8-bit processor for a first look at how a
CPU works. Its instructions are real Intel 8051 instructions, bit for bit, so
programs for it are written and assembled with any 8051 assembler. Only
thirteen of them exist, though. There is no internal RAM, no interrupts and no
peripherals. Every instruction takes exactly three clock cycles: **Fetch**,
**Decode** and **Execute**. Each cycle does one easily seen thing: load the
opcode, load the operand, use the operand.

This repository holds synthesizable SystemVerilog for the processor, a
self-checking testbench for each block, and an end-to-end testbench. The
end-to-end testbench runs programs against an instruction-level reference
model.

## Instruction set

| Assembly     | Encoding                 | Effect                         | Bytes |
|--------------|--------------------------|--------------------------------|-------|
| `MOV A,#d`   | `0111_0100 dddddddd`     | A ← d                          | 2 |
| `MOV A,Rn`   | `1110_1nnn`              | A ← Rn                         | 1 |
| `MOV Rn,A`   | `1111_1nnn`              | Rn ← A                         | 1 |
| `ADDC A,#d`  | `0011_0100 dddddddd`     | C,A ← A + d + C                | 2 |
| `ADDC A,Rn`  | `0011_1nnn`              | C,A ← A + Rn + C               | 1 |
| `ANL A,Rn`   | `0101_1nnn`              | A ← A and Rn                   | 1 |
| `ORL A,Rn`   | `0100_1nnn`              | A ← A or Rn                    | 1 |
| `XRL A,Rn`   | `0110_1nnn`              | A ← A xor Rn                   | 1 |
| `SWAP A`     | `1100_0100`              | A ← A[3:0],A[7:4]              | 1 |
| `CLR C`      | `1100_0011`              | C ← 0                          | 1 |
| `SETB C`     | `1101_0011`              | C ← 1                          | 1 |
| `SJMP rel`   | `1000_0000 rrrrrrrr`     | PC ← PC + 2 + rel              | 2 |
| `JZ rel`     | `0110_0000 rrrrrrrr`     | if A = 0: PC ← PC + 2 + rel    | 2 |

`rel` is a signed byte. Every other opcode behaves as a one-byte, three-cycle
no-operation. The real 8051 does not do this. It is a choice of this design.

## Datapath

```
 data_bus ──┬──────────────► IR ─────────► control unit ◄── Z
            │                                  │ control word (every block)
            │   R0..R7 ──┐                     ▼
            │  (reg file)│          ┌──────► ALU (carry C, Z) ──► ACC ──┬──► acc_out
            └──────────► AUX ───────┤          ▲                        │
              aux_ctl selects       │          └──── ACC ───────────────┤
              data bus / reg file   │                                   └──► reg file write
                                    └──────► PC ALU ──► PC ──┬──► addr_bus
                                               ▲             │
                                               └─────────────┘
```

* **IR, ACC, PC** are 8-bit registers with a write enable (`wimp51_reg`).
* **AUX** (`wimp51_aux`) is the operand register. It is loaded in Decode,
  either from the data bus (immediate byte or branch offset) or from the
  register file. `aux_ctl` picks the source: 1 means the data bus.
* **Register file** (`wimp51_regfile`) holds R0..R7, eight bits each. It has a
  single 3-bit select (`reg_sel`, taken from IR[2:0]) for both read and
  write. The read is combinational into AUX. The write takes the accumulator.
* **ALU** (`wimp51_alu`) combines ACC with AUX. It owns the one-bit carry
  register C and drives Z, which is 1 exactly when ACC is zero.
* **PC ALU** (`wimp51_pcalu`) gives either PC + 1 or PC + AUX. The sum wraps
  modulo 256, so an AUX byte acts as a signed offset.
* **Control unit** (`wimp51_control`) holds the phase and decodes IR and Z
  into the control word.

The program counter is 8 bits wide, so programs are at most 256 bytes long.

## The three cycles, signal by signal

This is the heart of the design. Every control signal is a function of the
phase, the opcode in IR and Z.

| Phase   | Instruction class                                  | Active controls                                               | Effect |
|---------|----------------------------------------------------|---------------------------------------------------------------|--------|
| Fetch   | all                                                | `psen_n`=0, `ir_we`, `pc_we`, PC_INC                          | IR ← mem[PC], PC ← PC+1 |
| Decode  | `MOV A,#d`, `ADDC A,#d`, `SJMP`, `JZ`              | `psen_n`=0, `aux_we`, `aux_ctl`=1, `pc_we`, PC_INC            | AUX ← mem[PC], PC ← PC+1 |
| Decode  | `MOV A,Rn`, `ADDC/ANL/ORL/XRL A,Rn`                | `aux_we`, `aux_ctl`=0                                         | AUX ← Rn |
| Decode  | others                                             | none                                                          | — |
| Execute | `SJMP`                                             | `pc_we`, PC_REL                                               | PC ← PC + AUX |
| Execute | `JZ`                                               | `pc_we`=Z, PC_REL                                             | taken only if A = 0 |
| Execute | `MOV Rn,A`                                         | `reg_we`                                                      | Rn ← A |
| Execute | `MOV`, `ADDC`, `ANL`, `ORL`, `XRL`, `SWAP` into A  | `acc_we`, matching `alu_op`                                   | A ← ALU result (ADDC also updates C) |
| Execute | `CLR C`, `SETB C`                                  | `alu_op` = CLRC / SETC                                        | C changes, A is not written |

Two points are worth noting:

* **PC moves twice for two-byte instructions.** PC already points past the
  operand byte when a branch executes. So PC + rel, with no correction, gives
  the 8051 target "address of next instruction + rel".
* **JZ tests the accumulator, not a stored flag.** Z is recomputed
  combinationally from ACC every cycle. The last instruction that wrote A
  therefore decides the branch.

The control unit checks its own sequencing with assertions. Fetch is always
followed by Decode, Decode by Execute, and Execute by Fetch. Fetch always
strobes program memory, and Execute never does.

## External interface and timing

| Port       | Dir | Width | Meaning |
|------------|-----|-------|---------|
| `clk`      | in  | 1 | clock, all state changes on the rising edge |
| `rst`      | in  | 1 | synchronous, active high. Clears PC, A, C, AUX, IR and R0..R7 and starts in Fetch. |
| `addr_bus` | out | 8 | program memory address, always equal to PC |
| `data_bus` | in  | 8 | program memory data |
| `psen_n`   | out | 1 | active-low program memory read strobe. It is low in Fetch and in the Decode cycle of two-byte instructions. |
| `acc_out`  | out | 8 | accumulator, for observation |

Program memory lives outside the processor. It must behave as an
asynchronous ROM. A byte at `addr_bus` has to be on `data_bus` within the
same cycle, before the rising edge that ends a cycle with `psen_n` low. A
synchronous memory needs a wait state, and this design has none.

## Where this RTL makes its own choices

The block structure, the instruction set, the three phases and what happens
in each, the control signal set, and the meaning of C and Z are those of the
WIMP51. The following are this implementation's decisions:

* PC is incremented during Decode for two-byte instructions. This matches the
  observed control values of the original (PC_INC with `pc_we` = 1 while an
  immediate is fetched), and it is what makes the branch arithmetic work.
* The memory interface is asynchronous, as described above. The 8-bit address
  bus follows from the 8-bit program counter.
* The reset is synchronous, and every register clears to zero.
* `CLR C` and `SETB C` leave the accumulator write enable low.
* Undefined opcodes are one-byte no-operations.
* The register file read is combinational.
* The numeric encodings of `alu_op` and `pcalu_op` are this design's own. So
  are the operation name `ALU_NONE`, which is used outside Execute and leaves
  C untouched, and the grouping of the control word into the `ctrl_t` struct.
* ADDC produces only the carry. The 8051's auxiliary-carry and overflow flags
  are not part of the WIMP51.

A classic lab exercise reverses the logic of Z, so that JZ branches when
A ≠ 0. You can reproduce it by changing one line at the end of
`rtl/wimp51_alu.sv`. The unit testbench of the ALU and the end-to-end
testbench both fail loudly when you do.

## Files

| File | Contents |
|------|----------|
| `rtl/wimp51_pkg.sv` | opcodes, phase enum, ALU/PC ALU operation enums, control-word struct |
| `rtl/wimp51.sv` | top level |
| `rtl/wimp51_control.sv` | phase sequencer and decoder |
| `rtl/wimp51_alu.sv` | ALU, carry register, Z |
| `rtl/wimp51_pcalu.sv` | next-PC adder |
| `rtl/wimp51_regfile.sv` | R0..R7 |
| `rtl/wimp51_aux.sv` | operand register with source select |
| `rtl/wimp51_reg.sv` | write-enabled register (IR, ACC, PC) |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_wimp51_reg`, `tb_wimp51_aux`, `tb_wimp51_regfile`: random stimulus
  against a model of the register.
* `tb_wimp51_pcalu`: exhaustive over all PC and offset values, for both
  operations.
* `tb_wimp51_alu`: random operands for every operation, with a carry model.
  Carry-in, carry-out and a zero accumulator are each forced to occur.
* `tb_wimp51_control`: all 256 opcodes × both Z values × every phase are
  compared with an independently written table. It also checks the
  three-cycle rotation.
* `tb_wimp51`: the whole processor with a behavioural 256-byte ROM. After
  every instruction it compares PC, A, C and R0..R7 with an instruction-level
  model. It also checks that the opcode is fetched at the right address, and
  that `psen_n` is low for exactly as many cycles as the instruction has
  bytes. It runs three kinds of program:
  * the ten-byte fragment `74 FF F8 74 42 FA ED 4A D3 C3`;
  * a hand-written loop that sums 5+4+3+2+1 and then exercises SWAP, ANL,
    ORL, XRL and a carrying ADDC, with its final values checked against
    hand-computed numbers;
  * a cycle-by-cycle check of the Decode cycle of `ADDC A,#09h`, covering
    register values and every control signal in that cycle;
  * 40 random programs of 300 instructions each.

  It counts every mechanism and fails if one never happens: immediate fetch,
  register fetch, register write, each ALU operation, carry in and out, SJMP,
  and JZ both taken and not taken. It runs at the design's only
  configuration and takes about a second.

To run one with Verilator:

```sh
verilator --binary --timing --assert -Irtl -Itb --top-module tb_wimp51 \
  rtl/wimp51_pkg.sv rtl/wimp51.sv tb/tb_wimp51.sv
./obj_dir/Vtb_wimp51
```

Replace `tb_wimp51` and `wimp51.sv` with a unit testbench and its module to
run the others. `rtl/wimp51_pkg.sv` must always come first. The design has no
parameters to size. `wimp51_reg` takes a width and a reset value, and the top
uses the 8-bit default.
