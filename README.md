# Two stored-program machines: a 16-bit teaching ISA and a MIPS subset

A stored-program computer keeps its instructions in the same memory as its
data. The processor fetches an instruction word into an instruction register,
and the bits of that register steer everything that follows. Then it fetches
the next one. This repository holds two small processors built on that idea.
Each is written in synthesizable SystemVerilog and comes with its memory and
self-checking testbenches:

* **ex16** is a compact 16-bit machine. It has 16-bit instructions, data and
  PC, 16 registers and exactly 16 instructions. Every field of an instruction
  is 4 bits wide.
* **mips** is a 32-bit processor for a subset of the MIPS instruction set. It
  has the R, I and J formats, 32 registers and byte addresses.

Both machines are multicycle. Each instruction passes through the same short
sequence of steps: read the instruction, read registers, operate, access
memory, write a register. Each step takes one clock. Steps an instruction has
no use for are skipped. Both use one memory port for instructions and data.
`isa_machines_top` places the two machines side by side. They share only the
clock and reset.

## The ex16 instruction set

Every instruction is one 16-bit word with a one-level 4-bit opcode in
bits 15:12. The other three nibbles are fields. Each register field is 4 bits
for 16 registers.

| opcode | mnemonic            | [11:8]  | [7:4] | [3:0] | effect                                  |
|-------:|---------------------|---------|-------|-------|-----------------------------------------|
| 0      | ADD  R3, R2, R1     | R3      | R2    | R1    | R3 ← R2 + R1                            |
| 1      | SUB  R3, R2, R1     | R3      | R2    | R1    | R3 ← R2 − R1                            |
| 2      | AND  R3, R2, R1     | R3      | R2    | R1    | R3 ← R2 & R1                            |
| 3      | OR   R3, R2, R1     | R3      | R2    | R1    | R3 ← R2 \| R1                           |
| 4      | SLT  R3, R2, R1     | R3      | R2    | R1    | R3 ← (R2 < R1) signed ? 1 : 0           |
| 5      | ADDI R2, R1, V      | V       | R2    | R1    | R2 ← R1 + sext(V)                       |
| 6      | ANDI R2, R1, V      | V       | R2    | R1    | R2 ← R1 & zext(V)                       |
| 7      | ORI  R2, R1, V      | V       | R2    | R1    | R2 ← R1 \| zext(V)                      |
| 8      | SLTI R2, R1, V      | V       | R2    | R1    | R2 ← (R1 < sext(V)) signed ? 1 : 0      |
| 9      | LW   R2, V(R1)      | V       | R2    | R1    | R2 ← mem[R1 + sext(V)]                  |
| 10     | SW   R2, V(R1)      | V       | R2    | R1    | mem[R1 + sext(V)] ← R2                  |
| 11     | BEQ  R2, R1, V      | V       | R2    | R1    | if R1 = R2: PC ← own address + sext(V)  |
| 12     | BNE  R2, R1, V      | V       | R2    | R1    | if R1 ≠ R2: PC ← own address + sext(V)  |
| 13     | SHIFT type R2, R1   | type    | R2    | R1    | R2 ← R1 moved by one bit (table below)  |
| 14     | JR   R1             | –       | –     | R1    | PC ← R1                                 |
| 15     | JAL  addr           | addr[11:8] | addr[7:4] | addr[3:0] | R15 ← own address + 1; PC ← {PC[15:12], addr} |

Some points are easy to get wrong:

* **Operand order.** In the three-register forms the *middle* field (R2) is
  the left operand. So `SUB R3, R2, R1` computes R2 − R1, and `SLT` asks
  whether R2 < R1. In the immediate forms R1 is the source and R2 is the
  destination.
* **Immediates are 4 bits.** V ranges from −8 to +7 where it is sign-extended
  (ADDI, SLTI, LW, SW, BEQ, BNE). It ranges from 0 to 15 where it is
  zero-extended (ANDI, ORI). A larger constant has to be built, for example
  with ADDI followed by SHIFT left steps.
* **Branches are relative to the branch's own address.** `BEQ …, 0` is a
  branch to itself. Memory and branch offsets count 16-bit words, because the
  memory is word-addressed.
* **JAL** keeps the top four bits of the PC and replaces the lower twelve, so
  it reaches any word in the current 4096-word region. It links through R15.
  `JR R15` returns, and `JAL` to its own address stops the machine in a tight
  loop, which the testbenches use as "halt".
* **R0 is always zero.** Writes to it are dropped. Use R0 when an instruction
  needs no base register or no result.

The SHIFT type field has room for 16 kinds, and each moves the operand by
exactly one bit:

| type | operation                        |
|-----:|----------------------------------|
| 0    | shift left, fill 0               |
| 1    | shift right, fill 0              |
| 2    | shift right, fill with the sign  |
| 3    | rotate left                      |
| 4    | rotate right                     |
| 5    | shift left, fill 1               |
| 6    | shift right, fill 1              |
| 7–15 | reserved: copy R1 to R2 (a move) |

## How an instruction runs

`ex16_control` and `mips_control` are small state machines. They walk each
instruction through up to five steps and emit a packed control word
(`ctl_t`) for every clock. The datapath (`ex16_cpu`, `mips_cpu`) holds the
registers that carry values from one step to the next: PC, IR, A and B (the
two registers read), ALUOut and MDR (the loaded word).

| step   | LW                 | SW                  | R / I / SHIFT     | BEQ / BNE                  | JAL / JR          |
|--------|--------------------|---------------------|-------------------|----------------------------|-------------------|
| FETCH  | IR ← mem[PC], PC+1 | same                | same              | same                       | same              |
| DECODE | A ← R1, B ← R2     | same                | same              | same                       | jump (and link); done |
| EXEC   | ALUOut ← A + V     | ALUOut ← A + V      | ALUOut ← result   | A − B; branch if taken; done | –               |
| MEM    | MDR ← mem[ALUOut]  | mem[ALUOut] ← B; done | –               | –                          | –                 |
| WB     | R2 ← MDR; done     | –                   | dest ← ALUOut; done | –                        | –                 |
| clocks | 5                  | 4                   | 4                 | 3                          | 2                 |

The MIPS machine follows the same table. It uses rs and rt in place of R1 and
R2, and rd or rt as the destination. `j` takes the place of JAL/JR and finishes
in DECODE. An R-type instruction with an unknown funct, or an unknown opcode,
runs for 4 clocks and changes nothing except the PC.

The memory has a combinational read, so it serves a fetch or a load within
the same clock. The memory address is the PC in FETCH and ALUOut in MEM, and
only SW writes. A new instruction is fetched only while `run` is high. With
`run` low the controller waits in FETCH without side effects and `idle` is
high, so a machine always stops between two instructions. Reset clears the PC
and all registers. The memory contents are not reset.

## The MIPS subset machine

* Instructions: `add sub and or slt sll srl` (R-type: opcode 0 and funct
  20/22/24/25/2A/00/02 hex), `addi slti andi ori` (8, 10, 12, 13), `lw sw`
  (35, 43), `beq bne` (4, 5), `j` (2). These are the standard MIPS codes.
* Formats: R `op rs rt rd shamt funct`, I `op rs rt imm16`, J `op addr26`.
  For example, `add $8, $17, $18` is `000000 10001 10010 01000 00000 100000`,
  and `lw $9, 32($18)` is op 35, rs 18, rt 9, offset 32.
* Addresses are bytes. Load and store addresses are rs + sext(imm16), where
  imm16 is a byte offset. Only whole words are accessed, and the two low
  address bits are ignored.
* The branch target is PC + 4 + sext(imm16)·4. The jump target is
  {(PC + 4)[31:28], addr26, 00}: a jump stays inside its 256 MB region.
* `addi` and `add` wrap on overflow. The machine has no exceptions.
* The memory is 16384 words (64 KiB). Byte addresses wrap modulo that size.

## Loading and running a program

`ex16_computer` and `mips_computer` each pair a processor with its memory
(`sp_memory`) and add a loader port:

1. Hold `run` low and wait for `idle`. It is high after reset.
2. Write words with `ld_we`, `ld_addr` and `ld_wdata`, one per clock.
   `ld_addr` is a word address. `ld_rdata` shows the word at `ld_addr`
   combinationally, so results can be read back the same way.
3. Raise `run`. Execution starts at the current PC, which is 0 after reset.
   Drop `run` at any time. The machine finishes its current instruction and
   then idles. Raise `run` again to continue.

The loader port is ignored while the machine runs. Each processor also reports
every instruction it completes. `retire_valid`, `retire_pc` and `retire_ir` are
high or valid in the instruction's last clock. `wb_we`, `wb_addr` and
`wb_data` show the register write of that clock. A write aimed at register 0
is not reported.

`isa_machines_top` brings out both sets of ports with the prefixes `ex16_`
and `mips_`.

## Files

| file (rtl/)          | role                                                        |
|----------------------|-------------------------------------------------------------|
| `ex16_pkg.sv`        | ex16 opcodes, ALU ops, shift types, steps, control word      |
| `ex16_alu.sv`        | ADD, SUB, AND, OR, SLT and zero flag                         |
| `ex16_shifter.sv`    | one-bit shift and rotate unit                                |
| `ex16_control.sv`    | ex16 step sequencer                                          |
| `ex16_cpu.sv`        | ex16 datapath: PC, IR, A, B, ALUOut, MDR, register file       |
| `ex16_computer.sv`   | ex16 processor, memory and loader port                       |
| `mips_pkg.sv`        | MIPS opcodes, functs, ALU ops, control word                  |
| `mips_alu.sv`        | add, sub, and, or, slt, sll, srl                             |
| `mips_control.sv`    | MIPS step sequencer                                          |
| `mips_cpu.sv`        | MIPS datapath                                                |
| `mips_computer.sv`   | MIPS processor, memory and loader port                       |
| `regfile.sv`         | register file with register 0 held at zero (used by both)    |
| `sp_memory.sv`       | unified program/data memory (used by both)                   |
| `isa_machines_top.sv`| both machines side by side                                   |

Default sizes: the ex16 memory is 65536 × 16 bits, the whole space a 16-bit PC
can reach. The MIPS memory is 16384 × 32 bits. Both are parameters (`DEPTH`)
of the `*_computer` modules. `DEPTH` must be a power of two.

## Simulating

Every testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. For example, to run the full-size top-level
test with Verilator 5:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/ex16_pkg.sv rtl/mips_pkg.sv tb/ex16_iss_pkg.sv tb/mips_iss_pkg.sv \
    tb/tb_isa_machines_top.sv --top-module tb_isa_machines_top
./obj_dir/Vtb_isa_machines_top
```

Replace the last file and the top name to run another testbench. It takes
about ten seconds.

`tb/ex16_iss_pkg.sv` and `tb/mips_iss_pkg.sv` are instruction-level reference
models, one instruction per call. They are written from the instruction
definitions above, not from the RTL. They also provide small encoder
functions (`enc_r`, `enc_i`, `enc_jal`/`enc_j`) for writing test programs.

## How it is verified

* Unit tests cover each ALU, the shifter, the register file, the memory and
  both controllers. The controller tests check every step of every
  instruction, including the clock counts in the table above.
* `tb_ex16_cpu` and `tb_mips_cpu` compare the processor with its reference
  model for every instruction. They check the address, instruction word,
  register write, store and clock count. The processor runs a directed
  program and then 30–40 random programs of 400 instructions each.
* `tb_ex16_computer` and `tb_mips_computer` load real programs through the
  loader port: an array sum with a counted loop, a subroutine call and
  return, the conditional `if (i == j) h = i + j`, SLT tests, and the
  constant updates `A = A + 5`, `B = B + 1`, `C = C - 18`. On ex16 the −18
  is split over three ADDIs, because V holds only −8 to +7. They run each
  program and read the results back.
* `tb_isa_machines_top` runs both machines at full size at the same time.
  It uses directed programs, stops and restarts them, and then fills both
  memories completely with random programs. The test counts every opcode,
  every shift type, every MIPS instruction, taken and untaken branches,
  writes to register 0, loader reads and writes, and stop/restart. It fails
  if any of them never happened.

Limits: nothing has been checked on an FPGA or against timing. Random
programs often fall into short loops, so long programs are exercised mainly
by the directed tests.

## Not included

* The ex16 data path, PC and register count are fixed at 16 bits and 16
  registers. The narrower and wider variants the instruction format would
  allow are not parameterized.
* MIPS multiply and divide, and the Hi and Lo registers they write, are not
  included. Neither are `jal`, `jr`, byte and halfword loads and stores,
  unsigned arithmetic or exceptions.
* Assembler-level constructs such as `blt` are not hardware. They are built
  from `slt` followed by `beq` or `bne`, as the testbenches do.

## Design choices beyond the instruction set definition

The instruction formats, the instruction list, the 16-register/16-bit sizes,
the step sequence and the PC-relative branches follow the ex16 machine's
definition. These choices were made here:

* The numbering of the 16 opcodes, and the seven shift types with the nine
  reserved ones.
* Sign- versus zero-extension of the 4-bit V, and signed SLT/SLTI.
* R15 as the JAL link register, and JAL keeping PC[15:12].
* Skipping empty steps, which gives 4 clocks for R/I/SHIFT and 2 for jumps.
* One shared memory with combinational read, the memory sizes, and the loader
  port.
* For MIPS: byte offsets in lw/sw, as in the standard encoding; branch and
  jump arithmetic from the standard architecture; no overflow exceptions;
  unknown instructions run as no-ops.
