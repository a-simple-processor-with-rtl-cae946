# HW ISA: a 16-bit single-cycle teaching processor

This is a small load/store processor for a made-up 16-bit instruction set,
built as the simplest possible microarchitecture: every instruction is fetched,
decoded, executed and written back in a single clock cycle. It is meant to make
the link between an instruction set (what each instruction does to the
registers, memory and PC) and the hardware that carries it out easy to follow.
Nine instructions exist: four ALU operations, load, store, branch-if-equal,
jump, and halt.

## Machine state

| State | Size | Notes |
|---|---|---|
| Registers `R0`–`R15` | 16 × 16 bit | `R0` always reads 0 and `R1` always reads 1; writing them does nothing |
| PC | 16 bit | byte address of the next instruction; starts at 0 on reset |
| Instruction memory | 32768 × 16 bit | separate from data; byte addressed, one instruction per even address |
| Data memory | 65536 bytes | byte addressed, read and written as 16-bit words |

Data words are **little-endian**: the word at address `A` has the byte at `A`
in bits 7:0 and the byte at `A+1` in bits 15:8. If memory holds `0xEB` at 0 and
`0xCA` at 1, `LW R3, 0(R0)` loads `0xCAEB`.

## Instruction set

All instructions are 16 bits with the opcode in bits 15:12.

| Instruction | Effect | Opcode | 11:8 | 7:4 | 3:0 |
|---|---|---|---|---|---|
| `ADD Rs, Rt, Rd` | `R[d] ← R[s] + R[t]` | 0010 | s | t | d |
| `SUB Rs, Rt, Rd` | `R[d] ← R[s] − R[t]` | 0011 | s | t | d |
| `AND Rs, Rt, Rd` | `R[d] ← R[s] & R[t]` | 0100 | s | t | d |
| `OR Rs, Rt, Rd`  | `R[d] ← R[s] \| R[t]` | 0101 | s | t | d |
| `LW Rt, off(Rs)` | `R[t] ← M[R[s] + off]` | 0000 | s | t | off |
| `SW Rt, off(Rs)` | `M[R[s] + off] ← R[t]` | 0001 | s | t | off |
| `BEQ Rs, Rt, off` | if `R[s] == R[t]`: `PC ← PC + 2 + off·2` | 0111 | s | t | off |
| `JMP off` | `PC ← off·2` | 1000 | off (12 bits) | | |
| `HALT` | stop | 1111 | – | – | – |

The 4-bit `off` of `LW`, `SW` and `BEQ` is signed (−8…7); the 12-bit `JMP`
offset is unsigned, so a jump reaches any even address from 0 to 0x1FFE. In
`BEQ`, "PC" is the address of the branch itself. Note the operand order:
the destination of an ALU instruction is the *last* register named.

Opcodes 0110 and 1001–1110 are unassigned. This implementation executes them
as no-operations and flags them on the `illegal` output.

## How one cycle works

Each clock cycle follows the abstract loop *fetch `IM[PC]`; `PC ← PC + 2`;
execute*, all in combinational logic between two rising edges:

1. The PC addresses the instruction memory (asynchronous read).
2. The control unit decodes bits 15:12 into a control word.
3. The register file reads `R[s]` (bits 11:8) and `R[t]` (bits 7:4).
4. The ALU adds, subtracts, ANDs or ORs.
5. The data memory is read at, or written to, the ALU result.
6. At the rising edge the register file, data memory and PC are updated.

Arithmetic and memory instructions share this datapath. A single control bit,
`mem`, chooses between them in three places:

| Multiplexer | `mem = 0` (ADD, SUB, AND, OR, BEQ) | `mem = 1` (LW, SW) |
|---|---|---|
| ALU operand B | `R[t]` | sign-extended 4-bit offset |
| register written | `Rd` (bits 3:0) | `Rt` (bits 7:4) |
| value written | ALU result | data-memory word |

So a load computes its address in the ALU (`R[s] + off`) and writes what the
memory returns into `Rt`; a store does the same address sum and writes `R[t]`
to memory.

`BEQ` uses the ALU too: the control unit asks for a subtraction, and the branch
is taken when the ALU's `zero` flag is set. In parallel the PC unit has already
computed `PC + 2` and the branch target `PC + 2 + (sign-extended off << 1)`,
and the next PC is chosen among `PC + 2`, the branch target and the jump target
`off12 << 1`.

### Control word

The control unit translates the opcode; the ALU's operation code is not the
instruction's opcode.

| Instruction | ALU op | reg_write | mem_store | mem | branch | jump | halt |
|---|---|---|---|---|---|---|---|
| ADD / SUB / AND / OR | add / sub / and / or | 1 | 0 | 0 | 0 | 0 | 0 |
| LW | add | 1 | 0 | 1 | 0 | 0 | 0 |
| SW | add | 0 | 1 | 1 | 0 | 0 | 0 |
| BEQ | sub | 0 | 0 | 0 | 1 | 0 | 0 |
| JMP | – | 0 | 0 | 0 | 0 | 1 | 0 |
| HALT | – | 0 | 0 | 0 | 0 | 0 | 1 |

### Halting

`HALT` advances the PC past itself (as every instruction does before it
executes) and sets a `halted` flag. From then on the PC holds and no register
or memory write happens until reset. This is a clock-enable style stop rather
than an actual gated clock.

### Timing

One instruction per clock, with no stalls or hazards: a program that executes
N instructions, counting the final `HALT`, is halted N rising edges after reset
is released. The critical path runs from the PC through instruction memory,
register read, ALU and data memory to the register-file write data. The
slowest instruction, `LW`, sets the clock period.

## Ports of `hw_cpu`

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (PC ← 0, halted ← 0, core writes suppressed) |
| `im_load_we/addr/data` | in | 1/16/16 | write an instruction at a byte address (program loading) |
| `dm_h_addr/we/wdata` | in | 16/1/16 | host read/write port of the data memory |
| `dm_h_rdata` | out | 16 | little-endian word at `dm_h_addr` |
| `rf_h_addr/we/wdata` | in | 4/1/16 | host register access; a host write is taken only in a cycle in which the core is not writing |
| `rf_h_rdata` | out | 16 | `R[rf_h_addr]` |
| `pc`, `ins` | out | 16 | current PC and the instruction it addresses |
| `running` | out | 1 | an instruction executes this cycle (`rst_n && !halted`) |
| `halted`, `taken`, `illegal` | out | 1 | halted; BEQ taken or JMP this cycle; unassigned opcode at PC |

The host ports exist so that a test bench or loader can set up the initial
machine state (program, memory contents, register values) and read the result.
To be safe, use them only while `rst_n` is low or the core has halted. Both
memories read asynchronously. Registers `R2`–`R15` and both memories have no
reset value.

Parameters: `IM_ADDR_W` and `DM_ADDR_W` (both 16) are the byte-address widths
of the two memories. The word width (16) and register count (16) are fixed by
the ISA and live in `hw_pkg`.

## Source files

| File | Contents |
|---|---|
| `rtl/hw_pkg.sv` | widths, opcode and ALU-op enums, control-word struct, field extractors |
| `rtl/alu.sv` | add / sub / and / or with zero flag |
| `rtl/reg_file.sv` | 16 × 16 register file, 2 read + 1 write + 1 inspection port, R0/R1 fixed |
| `rtl/instr_mem.sv` | instruction memory with load port |
| `rtl/data_mem.sv` | byte-array data memory, little-endian word access, host port |
| `rtl/control_unit.sv` | opcode → control word |
| `rtl/pc_unit.sv` | PC register, PC+2 and branch-target adders, next-PC select, halt flag |
| `rtl/hw_cpu.sv` | top level: the single-cycle datapath |
| `tb/tb_*.sv` | one self-checking bench per module |

## Simulating

Each bench prints `TB_RESULT checks=N failures=M` and finishes. For example:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/hw_pkg.sv tb/tb_hw_cpu.sv \
          --top-module tb_hw_cpu -o sim
./obj_dir/sim
```

The same works for `tb_alu`, `tb_reg_file`, `tb_instr_mem`, `tb_data_mem`,
`tb_control_unit` and `tb_pc_unit`. `tb_hw_cpu` runs the processor at its
default sizes. It contains a small assembler (`ADD(s,t,d)`, `LW(t,off,s)`,
`BEQ(s,t,off)`, `JMP(off)`, …) that makes it easy to write further programs.
It runs:

* three worked example programs, checking final registers, memory, PC and cycle count:
  * a store of `R1 + R1`
  * two loads, an AND of `0xCAEB` and `0x56BD` giving `0x42A9`, and a store
  * a loop that multiplies 3 by 2 with `SUB`, `BEQ`, `ADD` and `JMP` in 11 cycles
* directed tests of negative offsets, `OR`, writes to `R0`/`R1`, and a backward-branch loop;
* 40 random 48-instruction programs, run in lockstep with an instruction-level
  model in the bench. The PC is compared every cycle. All registers and all
  64 KiB of data memory are compared at the end.

It also counts each mechanism and fails if any never occurred:

* each opcode
* BEQ taken and not taken
* a write to R0/R1
* a negative offset
* an unassigned opcode
* halted idle cycles

## Design choices not fixed by the instruction set

* Memory sizes: each memory covers the full 16-bit address range.
* Data accesses at odd addresses are allowed (two consecutive bytes). An access at 0xFFFF wraps its second byte to address 0.
* Unassigned opcodes are no-operations.
* The ALU operation encoding is internal (`hw_pkg::alu_op_t`). There are no carry or overflow flags, and arithmetic wraps modulo 2¹⁶.
* Reset: synchronous, active low, PC = 0. Register and memory contents are not reset.
* HALT is implemented as a hold state, described above.
* The program-load and host-access ports are additions for loading and observing the machine. They are not part of the instruction set.
