# A single-cycle MIPS-subset processor

This is a textbook processor: a datapath and a control unit that fetch,
decode and execute one MIPS instruction per clock cycle. The design is built
up one instruction at a time. It starts with the program counter and
instruction memory, then each instruction adds only the path it needs: a
register file and ALU for `add`, a sign-extension unit and operand mux for
`addi`, a data memory and write-back mux for `lw`, a store path for `sw`, a
branch adder for `beq`, a jump-target path for `j`, and finally the extra
inputs that `sll`, `slt`, `jal` and `jr` need. The result is a small,
readable processor where every mux has a reason that can be traced to one
instruction.

Everything is 32 bits wide, the register file has 32 registers, and the
instruction and data memories are separate (1024 words each by default).
There is no pipeline: the clock period has to cover the longest path, which
runs from the PC through instruction memory, register read, ALU, data memory
and write-back mux.

## Instructions

| Instruction | Format | Opcode / funct | What the datapath does |
|---|---|---|---|
| `add rd, rs, rt` | R | 0x00 / 0x20 | rd = rs + rt |
| `slt rd, rs, rt` | R | 0x00 / 0x2A | rd = (rs < rt, signed) ? 1 : 0 |
| `sll rd, rt, sh` | R | 0x00 / 0x00 | rd = rt << sh |
| `jr rs` | R | 0x00 / 0x08 | PC = rs |
| `addi rt, rs, imm` | I | 0x08 | rt = rs + sx(imm) |
| `lw rt, imm(rs)` | I | 0x23 | rt = mem[rs + sx(imm)] |
| `sw rt, imm(rs)` | I | 0x2B | mem[rs + sx(imm)] = rt |
| `beq rs, rt, off` | I | 0x04 | if rs == rt: PC = PC+4 + (sx(off) << 2) |
| `j target` | J | 0x02 | PC = {PC+4[31:28], target, 00} |
| `jal target` | J | 0x03 | $31 = PC+4; PC as for `j` |

Field layout: R-type is `op[31:26] rs[25:21] rt[20:16] rd[15:11] sh[10:6]
funct[5:0]`. I-type is `op rs rt imm[15:0]`. J-type is `op target[25:0]`.
The numeric codes are the standard MIPS ones. Register `$0` always reads as
zero. Any other opcode or function code writes nothing and moves on to PC+4.
`add` does not trap on overflow. There are no byte or halfword loads.

## The datapath, path by path

```
            +----+      +-------+  instr  +---------+ rs_val +-----+ alu_y  +------+
   +------->| PC |--+-->| Insn  |-------->| RegFile |------->| ALU |------->| Data |--+
   |        +----+  |   | Mem   |         | s1 s2 d |--+     +-----+        | Mem  |  |
   |                |   +-------+         +---------+  | rt_val  ^  | z,lt   +------+  |
   |            +---v--+                        ^      +--->[mux]-+  |          ^      |
   |            |  +4  |-- pc_plus4             |           sx(imm)  |   rt_val-+      |
   |            +------+                        |                    |                 |
   |                                            +-- write-back mux <-+-----------------+
   |                                                (ALU, mem, zx(lt), PC+4, rt<<sh)
   +-- [jr mux] <-- [jump mux] <-- [branch mux] <-- PC+4, PC+4 + (sx(imm) << 2)
        rs_val       {PC+4[31:28], target<<2}        select = branch AND z
```

**Fetch.** The PC is a 32-bit register written on every clock. It addresses
the instruction memory, whose read is combinational. A `+4` adder forms the
default next PC, because addresses count bytes and instructions are four
bytes long.

**Register read and destination.** The `rs` and `rt` fields go straight to
the two read ports. A three-input mux picks the register to write: `rd` for
R-type instructions, `rt` for `addi` and `lw`, and the fixed register 31 for
`jal`.

**ALU and its second operand.** The first ALU operand is always the `rs`
value. A mux chooses the second operand: the `rt` value for R-type and `beq`,
or the sign-extended 16-bit immediate for `addi`, `lw` and `sw`. The ALU only
adds or subtracts. Beside the result it produces two condition bits:

- `z`, true when the result is zero. `beq` uses it with a subtraction to test
  rs == rt.
- `lt`, signed rs < rt. It is the sign of rs − rt, XORed with the overflow
  bit so that it is correct for every pair of operands.

**Memory access.** The data memory's address is the ALU result (rs + imm).
The `rt` value feeds its write data, so `sw` can store it. A store turns off
the register write enable.

**Write-back.** A five-input mux chooses what reaches the register file:

- the ALU result
- the word read from memory (`lw`)
- the `lt` bit, zero-extended to 32 bits (`slt`)
- PC+4 (`jal`)
- the output of a separate left shifter, which shifts `rt` by the 5-bit `sh`
  field (`sll`)

**Next PC.** Three 2-input muxes in a row pick the next PC:

1. The branch mux picks PC+4 or the branch target. The target is
   PC+4 + (sx(imm) << 2), made by a second adder. The mux takes the target
   when the control's `branch` signal AND the ALU's `z` are both true.
2. The jump mux can override that with the jump target. The target is the
   26-bit field shifted left by 2, with the top four bits of PC+4 above it.
3. The `jr` mux can override both with the `rs` value.

Every state change, which is the PC, the one register write and the one
memory store, happens on the same rising edge at the end of the cycle.

## Control

The control unit is a combinational lookup from opcode (and, for R-type, the
function field) to a control word. It behaves like the ROM or PLA that a
hardware implementation of this table would use. The control word is the
`ctrl_t` struct in `mips_pkg`:

| | reg_dst | alu_imm | alu_op | wb_sel | reg_we | mem_we | branch | jump | jump_reg |
|---|---|---|---|---|---|---|---|---|---|
| add | rd | 0 | add | ALU | 1 | 0 | 0 | 0 | 0 |
| slt | rd | 0 | sub | COND | 1 | 0 | 0 | 0 | 0 |
| sll | rd | – | – | SHIFT | 1 | 0 | 0 | 0 | 0 |
| jr | – | – | – | – | 0 | 0 | 0 | 0 | 1 |
| addi | rt | 1 | add | ALU | 1 | 0 | 0 | 0 | 0 |
| lw | rt | 1 | add | MEM | 1 | 0 | 0 | 0 | 0 |
| sw | – | 1 | add | – | 0 | 1 | 0 | 0 | 0 |
| beq | – | 0 | sub | – | 0 | 0 | 1 | 0 | 0 |
| j | – | – | – | – | 0 | 0 | 0 | 1 | 0 |
| jal | $31 | – | – | PC4 | 1 | 0 | 0 | 1 | 0 |

## The register file, two ways

The register file has two read ports and one write port, which is what an
R-type instruction needs in one cycle. Every register is a `dff_reg`. The
write data is wired to all of them, and a decoder of the write address,
ANDed with the write enable, lets exactly one of them load.

The read ports come in two versions:

- **`regfile`** uses one NREGS-to-1 mux per read port. This is fine for a
  handful of registers, but a 32-to-1 mux is deep.
- **`regfile_tristate`** gives each register a tri-state buffer on each
  port's shared bus. A decoder of the read address enables exactly one
  buffer, so one register drives the bus and the rest are high-impedance.
  This is the usual answer for 32 registers.

The processor uses the tri-state version by default (`RF_TRISTATE = 1`).
Setting the parameter to 0 swaps in the mux version. Both versions behave
identically at the ports. Synthesis tools report several drivers on each
tri-state read bus; that is expected, because the decoders never enable two
buffers at once. In a simulator with only two states, such as Verilator,
the bus simply carries the enabled register's value.

Reads are combinational. A register written at a clock edge can be read
right after that edge. Reading the register that is being written in the
same cycle returns the old value. With `ZERO_R0 = 1`, which the processor
sets, register 0 ignores writes and so reads as zero.

## Memories and loading a program

`memory` is a single-port RAM with one address, a write-data bus, a
read-data bus and a write enable: one access per cycle, read or write.
Writes happen on the rising edge, and reads are combinational. The address
counts bytes; bits `[2 +: log2(WORDS)]` pick the word, and the other bits
are ignored. Neither memory is reset.

The instruction memory is written through the top's load port. Hold `rst`
high, and for each word drive `load_we = 1` with `load_addr` (a byte
address) and `load_data` for one clock. While loading, the load address
takes the place of the PC on the memory's single address bus. An assertion
flags any load while the core is running. After the last word, release
`rst`: the PC starts at 0. The data memory needs no loader. Programs should
store a word before they load it, because the memory's initial contents are
undefined.

## Top-level interface (`mips_single_cycle`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk` | in | 1 | rising edge commits PC, register write and store |
| `rst` | in | 1 | synchronous, active high; PC and registers to 0 |
| `load_we`, `load_addr`, `load_data` | in | 1, 32, 32 | instruction-memory load port (only while `rst`) |
| `pc`, `instr` | out | 32, 32 | instruction executing this cycle |
| `rf_we`, `rf_waddr`, `rf_wdata` | out | 1, 5, 32 | register write committed at the next edge (a write to $0 shows here but is dropped) |
| `dmem_we`, `dmem_addr`, `dmem_wdata` | out | 1, 32, 32 | store committed at the next edge |

| Parameter | Default | |
|---|---|---|
| `WIDTH` | 32 | data width |
| `NREGS` | 32 | number of registers |
| `IMEM_WORDS`, `DMEM_WORDS` | 1024 | memory sizes in words |
| `RF_TRISTATE` | 1 | 1 = tri-state read ports, 0 = mux read ports |

The `rf_*` and `dmem_*` outputs are for observation only. They show the
architectural effect of each instruction, which is enough to trace a program
without looking inside the design.

## What comes from the source design and what is added here

Taken from the source design:

- the instruction subset
- every datapath unit and which instruction needs it: PC, +4 adder,
  instruction and data memory, 2R1W register file, ALU with a zero output,
  sign-extension unit, zero-extension unit for the condition bit, shifter,
  the two `<<2` units, the branch adder
- the destination, ALU-operand, write-back and PC muxes, and the
  branch-AND-zero select
- the register built from flip-flops with a write enable
- the decoded write enable of the register file
- the mux and tri-state read-port organisations
- the single-port memory with separate input and output data buses

Choices made here, where the source is silent:

- the opcode and function-field values (standard MIPS)
- `$0` hard-wired to zero
- synchronous reset, with the PC starting at 0
- the memory sizes
- the upper four bits of the jump target
- the order of the three next-PC muxes
- feeding the shifter output into the write-back mux
- the ALU's two-operation encoding and its overflow-corrected less-than
- the instruction-memory load port and the observation outputs
- the handling of unknown instructions

Deliberate differences and omissions:

- **Register-file read timing.** The source describes the register file as
  read on the clock edge that does not write it. Here the read ports are
  combinational, as the datapath drawings show them and as a single-cycle
  machine needs.
- **Registers with write enable.** The source ANDs the write enable with the
  clock. Here the write enable is a clock enable on the flip-flops, which
  loads on the same edges without a gated clock.
- **Not built.** The source also outlines a multi-cycle control, a
  micro-programmed control and exception handling, a memory with a single
  bidirectional data bus and an asynchronous strobe, register files with two
  write ports, and a 16-bit variant of the processor. It gives no detail for
  any of these, so none is built here.

## Simulating and checking

Every module has a self-checking testbench in `tb/`. Each one compares the
module against values the testbench works out on its own. Each ends by
printing `TB_RESULT checks=N failures=M`, and each has a watchdog. To run
one with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_mips_single_cycle.sv --top-module tb_mips_single_cycle
./obj_dir/Vtb_mips_single_cycle
```

**`tb_mips_single_cycle`** runs the whole processor at its default
parameters, against an instruction-set model written separately in the
testbench (`tb/mips_tb_body.svh`). The model runs in lock step with the
processor. Every cycle the testbench checks the fetched PC and instruction,
and the register write and store that the processor is about to commit. It
runs two programs:

- A hand-written program with a loop that sums 1..10, storing and reloading
  each partial sum. It also has a `jal`/`jr` subroutine call, `slt` with both
  outcomes, `sll`, negative immediates and offsets, and a write to `$0`
  followed by a read of `$0`.
- About 900 random `add`/`addi`/`slt`/`sll`/`lw`/`sw`/forward-`beq`
  instructions over a 32-word data region.

The testbench also checks that each program reaches its final self-loop in
exactly as many cycles as instructions executed, which is one instruction
per cycle. It counts each mechanism: every instruction kind, branch taken,
branch not taken, and a dropped write to `$0`. A mechanism that never
happens is a failure. `tb_mips_single_cycle_muxrf` runs the same test with
the mux-based register file.

The unit testbenches cover the following:

- `tb_regfile` and `tb_regfile_tristate`: the 4-entry and the 32-entry
  files, with random traffic.
- `tb_memory`: the full 1024-word array.
- `tb_alu`: the overflow corners of `lt`.
- `tb_sign_extend`: all 65536 immediates.
- `tb_control`: the hand-written control table above, plus every undefined
  opcode and function code.
