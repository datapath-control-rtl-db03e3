# A single-cycle LEGv8 processor: datapath and control

This is a complete processor in the textbook sense: a *datapath* that moves and
transforms 64-bit data, and a *control unit* that tells the datapath what to do
for each instruction. It implements six instructions of the LEGv8 subset of
64-bit ARM, which are enough to write real loops:

| Instruction              | Register transfers                                              |
|--------------------------|-----------------------------------------------------------------|
| `ADD Rd, Rn, Rm`         | `Reg[Rd] = Reg[Rn] + Reg[Rm]; PC = PC + 4`                      |
| `SUB Rd, Rn, Rm`         | `Reg[Rd] = Reg[Rn] - Reg[Rm]; PC = PC + 4`                      |
| `LDUR Rd, [Rn, #DAddr9]` | `Reg[Rd] = Mem[Reg[Rn] + SignExtend(DAddr9)]; PC = PC + 4`      |
| `STUR Rd, [Rn, #DAddr9]` | `Mem[Reg[Rn] + SignExtend(DAddr9)] = Reg[Rd]; PC = PC + 4`      |
| `B BrAddr26`             | `PC = PC + (SignExtend(BrAddr26) << 2)`                         |
| `CBZ Rd, CondAddr19`     | `PC = (Reg[Rd] == 0) ? PC + (SignExtend(CondAddr19) << 2) : PC + 4` |

Every instruction is done in one clock cycle: fetch, decode, register read,
ALU, memory access and write-back all happen between two rising edges. So the
CPI is 1 for every instruction, and the clock period is set by the slowest
instruction (LDUR). The processor also detects three exceptional events:
undefined instructions, signed overflow in ADD/SUB, and an interrupt request
from an I/O device. For each it cancels the instruction, saves its PC and a
cause code, and jumps to a fixed handler address.

Next to the processor, the top level holds a second, unrelated example from
the same material: a small "math unit", which is an accumulator driven by
four register-transfer operations.

## Instruction formats

All instructions are 32 bits. Register fields are 5 bits, which gives 32
registers.

```
R  (ADD, SUB)  | Opcode 31:21 | Rm 20:16 | SHAMT 15:10 | Rn 9:5 | Rd 4:0 |
D  (LDUR,STUR) | Opcode 31:21 | DAddr9 20:12 | 00 11:10 | Rn 9:5 | Rd 4:0 |
B  (B)         | Opcode 31:26 | BrAddr26 25:0                           |
CB (CBZ)       | Opcode 31:24 | CondAddr19 23:5                | Rd 4:0 |
```

| Instruction | Opcode bits            |
|-------------|------------------------|
| ADD         | `10001011000`          |
| SUB         | `11001011000`          |
| LDUR        | `11111000010`          |
| STUR        | `11111000000`          |
| B           | `000101` (bits 31:26)  |
| CBZ         | `10110100` (bits 31:24)|

The control unit always looks at bits 31:21. For B and CBZ the lower bits of
that slice belong to the offset and are ignored. SHAMT is not used by any of
the six instructions. The constants are in `rtl/legv8_pkg.sv`.

## The datapath

```
           +------------------------------ MemToReg mux <-----------------+
           |                                   ^                          |
  PC --> Instruction --> RegFile  Aa=Rn  Da ---+--> ALU --+--> Data memory Addr
  ^      memory          Ab=Reg2Loc?Rm:Rd  Db -+-> ALUSrc |    Din = Db   Dout
  |                      Aw=Rd, Dw             |    mux   |
  |                                            +----------)--> Din
  +-- PC+4 / PC+(SE(offset)<<2) <-- BrTaken, UncondBr <-- zero flag
```

The datapath has three multiplexers, each named after the control signal
that drives it:

* **Reg2Loc** chooses the second register to read (port Ab). R-format
  instructions read `Rm`. STUR and CBZ read `Rd` instead: STUR needs the value
  to store, and CBZ needs the value to test. Both sit in the `Rd` field.
* **ALUSrc** chooses the ALU's B input. It is either the second register value
  `Db` or the sign-extended `DAddr9` that LDUR and STUR add to the base
  register.
* **MemToReg** chooses the write-back value: the ALU result, or the data
  memory output for LDUR.

STUR writes `Db` to the data memory at the address the ALU has just computed.
CBZ reads `Reg[Rd]` through port B and sends it through the ALU unchanged (the
"pass B" operation). The ALU's zero flag then answers `Reg[Rd] == 0`.

### Next PC

The fetch unit (`instruction_fetch`) builds both branch targets from the
current instruction. `UncondBr` picks which offset field to sign-extend:
`BrAddr26` for B, `CondAddr19` for CBZ. The offset counts instructions, so it
is shifted left by two before being added to the PC. `BrTaken` then picks
between that target and `PC + 4`. An exception overrides both choices.

## Control

The control unit (`control`) is a pure decoder of bits 31:21. It follows this
table:

|          | ADD | SUB | LDUR | STUR | B | CBZ    |
|----------|-----|-----|------|------|---|--------|
| Reg2Loc  | 1   | 1   | x    | 0    | x | 0      |
| ALUSrc   | 0   | 0   | 1    | 1    | x | 0      |
| MemToReg | 0   | 0   | 1    | x    | x | x      |
| RegWrite | 1   | 1   | 1    | 0    | 0 | 0      |
| MemWrite | 0   | 0   | 0    | 1    | 0 | 0      |
| BrTaken  | 0   | 0   | 0    | 0    | 1 | zero   |
| UncondBr | x   | x   | x    | x    | 1 | 0      |
| ALUOp    | +   | -   | +    | +    | x | pass B |

How this design fills in the table:

* Every don't-care (`x`) is driven as 0, and an `x` ALUOp is driven as `+`.
* `BrTaken` for CBZ is the ALU zero flag. To keep the combinational path
  clean (control → register select → ALU → zero → BrTaken), `BrTaken` is a
  separate output. All other signals are bundled in the `ctrl_t` struct.
* An opcode matching none of the six instructions raises `illegal`. All of
  its write enables and branch selects stay 0.

## Exceptions

| Event                           | Handler PC              | Cause |
|---------------------------------|-------------------------|-------|
| Undefined instruction           | `0x0000_0000_C000_0000` | 1     |
| Signed overflow in ADD or SUB   | `0x0000_0000_C000_0020` | 2     |
| I/O interrupt request (`irq`)   | `0x0000_0000_C000_0040` | 3     |

An exception is taken in the same cycle as the instruction it hits
(`exc_take` is high). The instruction's register write and memory write are
suppressed, so the general-purpose registers and memory are protected. At the
clock edge, the instruction's PC goes into `epc`, its cause goes into `cause`,
and the PC goes to the handler.

* If several events arrive in the same cycle, the order is: undefined,
  overflow, interrupt.
* An interrupt cancels the instruction that would otherwise run in that
  cycle. `epc` then points at that instruction, so a handler can resume there.
* `irq` is level-sensitive. The device must drop it once the interrupt is
  taken; there is no masking.
* Only ADD and SUB raise overflow. LDUR/STUR address arithmetic never does.
* The handler addresses are the 32-bit values above, zero-extended to 64 bits.
* Parameter `EXCEPTIONS = 0` turns the whole mechanism off.

The six-instruction subset has no return-from-exception instruction. The
design also has no privileged state, divide-by-zero or hardware-failure
detection. `epc` and `cause` are brought out as ports instead.

Memory aliasing matters here. The instruction memory decodes only
`PC[11:2]` at the default size of 1024 words. So the three handler addresses
land on words 0, 8 and 16 of the instruction memory, and the undefined-
instruction handler shares word 0 with the reset entry point. A program that
wants distinct handlers must place them there, or use a different `RESET_PC`.

## Memories, ports and timing

* **Register file** (`register_file`): 32 × 64 bits, two combinational read
  ports (Aa/Da, Ab/Db) and one write port (Aw/Dw). The write happens at the
  rising edge. Register 31 always reads 0 and ignores writes (the LEGv8 zero
  register `XZR`). Reset clears all registers.
* **Instruction memory** (`instruction_memory`): `IMEM_WORDS` = 1024 words,
  read combinationally at `PC[11:2]`. It is loaded through `prog_we`,
  `prog_addr` (word index) and `prog_wdata`.
* **Data memory** (`data_memory`): `DMEM_WORDS` = 1024 doublewords. It is
  read combinationally at `Addr[12:3]`, because a load must finish in the same
  cycle. It is written at the rising edge. The low three address bits are
  ignored, so every access is an aligned doubleword. The host port `dmem_h_*`
  reads and writes by doubleword index. If the processor and the host write
  the same word in the same cycle, the processor wins.
* **Reset** is synchronous and active low. It sets the PC to `RESET_PC`
  (0) and clears the registers, EPC and cause. Load programs and data while
  the processor is held in reset.
* **Trace outputs** show the instruction of the current cycle: `pc`, `instr`,
  the register write it will perform at the next edge (`rf_we`, `rf_waddr`,
  `rf_wdata`), and its memory write (`dm_we`, `dm_addr`, `dm_wdata`).
  `rf_we` is also high for writes to register 31, which are then dropped.

## The math unit

`math_unit` is a separate register-transfer example. It has a register `A`
and a counter `I`. On every clock edge it performs one operation, selected by
`op`, and always increments `I`:

| `op`      | Transfer              |
|-----------|-----------------------|
| `MU_ADD`  | `A = A + B; I++`      |
| `MU_HOLD` | `A = A; I++`          |
| `MU_MULT` | `A = A * B; I++`      |
| `MU_INIT` | `A = Din; I++`        |

The defaults are a 16-bit `A`, `B` and `Din` and an 8-bit counter that wraps.
The product is truncated to 16 bits. Reset clears both `A` and `I`. The
operation encoding is in `rtl/math_unit_pkg.sv`.

## Files

| File                        | Contents                                                 |
|-----------------------------|----------------------------------------------------------|
| `rtl/legv8_pkg.sv`          | widths, opcodes, ALU ops, `ctrl_t`, causes, vectors      |
| `rtl/math_unit_pkg.sv`      | math-unit operation enum                                 |
| `rtl/datapath_control_top.sv` | top: processor (`cpu_*`) and math unit (`mu_*`)        |
| `rtl/single_cycle_cpu.sv`   | processor: wiring of the blocks below, the three muxes   |
| `rtl/instruction_fetch.sv`  | PC, PC+4, branch target, next-PC selection               |
| `rtl/instruction_memory.sv` | instruction memory with load port                        |
| `rtl/control.sv`            | control decoder                                          |
| `rtl/register_file.sv`      | 32 × 64 register file                                    |
| `rtl/sign_extend.sv`        | sign extender (used for DAddr9, BrAddr26, CondAddr19)    |
| `rtl/alu.sv`                | add / subtract / pass B, zero and overflow flags         |
| `rtl/data_memory.sv`        | data memory with host port                               |
| `rtl/exception_unit.sv`     | exception detection, EPC, cause, vector                  |
| `rtl/math_unit.sv`          | math-unit example                                        |

`sign_extend` synthesises to wires only, since copying a sign bit is pure
wiring. It is still kept as its own module because it is a named block of
the datapath.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog.

* `tb_datapath_control_top` is the end-to-end test, run at the default sizes.
  It runs 60 random programs, each from reset for 3,000 cycles. Each program
  fills the whole instruction memory with all six instructions, 2 %
  undefined words, and random interrupt requests. Every cycle, the processor
  is compared against an instruction-set reference model
  (`tb/legv8_asm_pkg.sv`) on: PC, instruction, register write, memory write
  and the exception decision. This also checks that exactly one instruction
  retires per cycle. At the end, the whole data memory, EPC and cause are
  compared. The test fails if any of these never occurs: each instruction
  kind, CBZ taken and not taken, forward and backward branches, each
  exception cause, a write to the zero register, a load of data stored
  earlier in the run, and each math-unit operation. The math unit runs
  random operations in parallel against its own model.
* `tb_single_cycle_cpu` runs a directed program that computes 5 × 7 by
  repeated addition using LDUR, ADD, SUB, CBZ, B and STUR. It checks that
  the result 35 is stored, and that the program reaches its final
  instruction after exactly 31 instructions in 31 cycles. It then triggers
  each exception cause and checks the vector, EPC, cause and the suppressed
  writes.
* The unit testbenches check the control table over all 2,048 opcodes. They
  test the ALU against 65-bit reference arithmetic, the register file and
  memories against model arrays, the fetch unit's next PC, and the exception
  unit's priority and saved state.

To simulate one testbench with Verilator 5, run from the repository root.
The packages must come first:

```
verilator --binary --timing --top-module tb_datapath_control_top \
  -y rtl -y tb +libext+.sv -Irtl \
  rtl/legv8_pkg.sv rtl/math_unit_pkg.sv tb/legv8_asm_pkg.sv \
  tb/tb_datapath_control_top.sv -o sim
./obj_dir/sim
```

The end-to-end test runs in well under a second. To change its length,
adjust `EPISODES` and `EP_CYCLES` in the testbench.

## What follows the specification and what is chosen here

These follow the specification: the six instructions and their register
transfers, the instruction formats and opcodes, the datapath structure
(register-file port assignment, the Reg2Loc / ALUSrc / MemToReg muxes, store
data from port B, CBZ through the ALU zero flag), the control table, the
three exception vectors and the "save EPC, protect registers, note cause"
behaviour, and the four math-unit transfers.

These are choices made here, where the specification is silent:

* 64-bit data, following the LEGv8 architecture.
* The zero register.
* Memory sizes, aliasing and alignment.
* Combinational memory reads.
* The program-load and host ports, and the trace outputs.
* Reset values, and `RESET_PC` = 0.
* Encodings of ALUOp, cause and the math-unit operations.
* Driving the control table's don't-cares as 0.
* Exception priority, and the level-sensitive interrupt.
* Math-unit widths.

Not built:

* A pipelined version of the datapath. Pipelining is only mentioned as the
  way to shorten the cycle time.
* Return from exception, and any operating-system interface.
* Other exception sources (divide by zero, hardware failure).
