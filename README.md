# Jackal: a 16-bit teaching RISC in SystemVerilog

Jackal is a deliberately small 16-bit load/store processor. It has a 4-bit
opcode and 4-bit register operands, so there is room for 16 instructions and
16 registers. Only 12 of each are defined. The rest are left open for the
implementer. Every instruction is one 16-bit word. Memory is 64K words of
16 bits (128 KB), reached through the host side of an SDRAM controller. The
core has no interrupts, no floating point and no byte addressing.

This RTL implements the 12 defined instructions as a simple multi-cycle core
(one instruction at a time, no pipeline). It connects to memory through the
controller's `rd`/`wr`/`done` handshake.

## Instruction set

Bit 15 is the most significant bit. `C` = bits 11:8, `A` = bits 7:4, `B` = bits 3:0.

| opcode | mnemonic | fields | effect |
|---|---|---|---|
| 0000 | ADD  | C=dst A=src1 B=src2 | R[C] = R[A] + R[B] (wraps modulo 2^16) |
| 0001 | SUB  | same | R[C] = R[A] - R[B] |
| 0010 | AND  | same | R[C] = R[A] & R[B] |
| 0011 | OR   | same | R[C] = R[A] \| R[B] |
| 0100 | NAND | same | R[C] = ~(R[A] & R[B]) |
| 0101 | SLA  | C=dst A=src B=amount | R[C] = R[A] << B (zeros shifted in) |
| 0110 | SRA  | same | R[C] = R[A] >>> B (sign bit shifted in) |
| 0111 | LD   | C=dst A=addr reg, B=0110 | R[C] = MEM[R[A]] |
| 0111 | ST   | C=data reg A=addr reg, B=1001 | MEM[R[A]] = R[C] |
| 0111 | –    | any other B | no operation |
| 1000 | LIL  | C=dst, bits 7:0 = imm | low byte of R[C] = imm, high byte kept |
| 1001 | LIH  | C=dst, bits 7:0 = imm | high byte of R[C] = imm, low byte kept |
| 1010 | CMP  | A=src1 B=src2 (C unused) | sets CRN/CRZ/CRP from R[A] vs R[B] |
| 1011 | BRN/BRZ/BRP/JMP | C=mode, bits 7:0 = offset | see below |
| 1100–1111 | – | undefined | executed as no-operations |

Branch modes: 0110 BRN (taken if CRN), 0111 BRZ (taken if CRZ), 1000 BRP
(taken if CRP), 1001 JMP (always taken). Any other mode is a no-op. A taken
branch sets `PC = PC + 1 + offset`. Otherwise `PC = PC + 1`. The 8-bit offset
is sign-extended, so a branch reaches -128..+127 words around the next
instruction. `JMP -1` (`0xB9FF`) is a jump to itself, and the test programs
use it as a halt.

Idioms that fall out of the encoding:
- `AND` with an all-ones register, or `OR` with a zero register, moves a register.
- `NAND` with all-ones gives NOT.
- `LIL` followed by `LIH` loads a full 16-bit constant.

Registers R0–R11 are general purpose. Operand codes 1100–1111 (U0–U3) are
left undefined by the instruction set. Here they read as 0x0000, and writes
to them are discarded. The PC is not visible as a register operand.

After reset the PC, R0–R11 and the three flags are 0x0000/0, and execution
starts at address 0.

### The compare

`CMP` sets exactly one flag. CRN is set when R[A] < R[B], CRZ when they are
equal, and CRP when R[A] > R[B]. Both operands are read as two's complement.
The flags keep their value until the next `CMP`.

The instruction set defines the flags by the sign of `R[A] - R[B]`. This core
takes that difference with 17 bits, so it is never truncated. As a result
`CMP 0x8000, 0x0001` reports *less than* (CRN), although a 16-bit subtraction
would wrap to a positive number. Code written for a core that uses the
wrapped 16-bit sign would differ only in such overflowing cases.

## How an instruction runs

`jackal_ctrl` sequences every instruction through five states:

```
FETCH --(port ready: start read at PC)--> FWAIT --(ack: load IR)--> EXEC
EXEC --(not LD/ST: write register / flags, update PC, retire)--> FETCH
EXEC --(LD/ST)--> MEM --(port ready: start access at R[A])--> MWAIT
MWAIT --(ack: LD writes R[C], PC+1, retire)--> FETCH
```

While the instruction register holds the instruction, the decoder output is
static. So the register-file reads, ALU result, compare and next PC are all
combinational from the IR and settle during EXEC. One clock edge commits
them. `retire` pulses for one cycle on that edge. During MEM and MWAIT the
address and store data come straight from register-file read ports 1 and 2.

Read-port steering:
- Port 1 always reads field A.
- Port 2 reads field B for the register-register operations and for CMP.
- Port 2 reads field C for LIL/LIH (the byte that is kept) and for ST (the
  value stored).

Each instruction fetch also waits on memory. So with a controller that
answers in L cycles, a non-memory instruction takes L + 5 cycles, and LD/ST
take about twice that. There is no cache and no overlap. A store completes
before the next fetch starts, so self-modifying code behaves as written.

## The memory handshake

The SDRAM controller is an existing block and is not part of this RTL. The
core talks to its host side:

| signal | direction (core view) | meaning |
|---|---|---|
| `rd`, `wr` | out | request a read or a write; held until `done` |
| `hAddr[15:0]` | out | word address, stable while the request is up |
| `hDIn[15:0]` | out | data to memory, stable while `wr` is up |
| `done` | in | the controller has finished; read data valid while high |
| `hDOut[15:0]` | in | data from memory |

`jackal_memif` is the master side and uses a four-phase handshake:

1. The core pulses `start` while `ready` is high. The port registers the
   address, data and direction, then raises `rd` or `wr`.
2. It holds them until it samples `done` high. In that cycle it captures
   `hDOut` and pulses `ack` to the core on the following cycle.
3. It drops `rd`/`wr` and does not accept a new access until `done` has
   fallen again.

Step 3 is what makes the port independent of how long the controller keeps
`done` high. Without it, a new request issued right away could be answered
by the previous access's `done`. The memory-port testbench uses a
controller model whose `done` outlasts the request by one cycle, so a port
that skipped this step would fail it.

With a controller that raises `done` L edges after it first sees the request
and drops it one edge after the request falls:
- `ack` comes L + 2 cycles after `start` is sampled.
- The port is ready again L + 4 cycles after `start`.

The testbench checks both numbers.

Three concurrent assertions guard the rules:
- `rd` and `wr` are never both high.
- The address and write data stay stable while a request waits.
- `start` is only given while the port is ready.

They sit inside the memory-port module. Because they use the reset in
`disable iff`, Verilator's lint reports the reset as used both synchronously
and asynchronously. That warning does not describe the synthesized logic.

## What is this design's choice

The instruction set fixes the encodings, the operations, the reset values
and the branch rule. Everything below is decided here:

- **Organisation.** Multi-cycle, non-pipelined, with the five-state sequencer
  above.
- **Branch offset.** Read as a signed 8-bit number.
- **Compare.** Uses the exact signed comparison (see *The compare*).
- **SLA.** A plain left shift: zeros come in and the sign bit is not kept.
- **Shift amount.** The 4-bit field, 0–15.
- **Undefined opcodes 1100–1111.** Executed as no-ops. The same goes for
  LD/ST and branch modes not listed in the table.
- **U0–U3 operands.** Read as zero, and writes to them are ignored. An LD or
  ST whose address operand is U0–U3 therefore accesses address 0.
- **Reset.** Active low and asynchronous. The condition flags reset to 0 as
  well.
- **Extra outputs.** `retire` and `pc` are brought out for observation.
- **Board-level pins.** The original board-level core also drove SDRAM pins
  and a seven-segment display (`a`–`g`). Those pins belong to the SDRAM
  controller and to display logic that the instruction set does not define,
  so `jackal` exposes the controller's host side instead.

## Module map

| module | role |
|---|---|
| `jackal` | top: PC, instruction register, wiring of the blocks below |
| `jackal_pkg` | opcode and mode encodings, decoded-instruction struct, ALU op enum |
| `jackal_ctrl` | instruction sequencer (FETCH/FWAIT/EXEC/MEM/MWAIT) |
| `jackal_memif` | host-side master of the SDRAM controller |
| `jackal_decode` | splits and classifies the instruction word |
| `jackal_regfile` | R0–R11, two read ports, one write port |
| `jackal_alu` | ADD SUB AND OR NAND SLA SRA, LIL/LIH byte merge |
| `jackal_cond` | CMP and the CRN/CRZ/CRP flags |
| `jackal_branch` | next-PC computation |

Top-level ports: `clock`, `reset` (active low), `rd`, `wr`, `done`, `hAddr`,
`hDIn`, `hDOut`, `retire`, `pc`. The core has 285 flip-flops, 192 of them in
the register file, and about 170 word-level cells after coarse synthesis. That
is small next to the Spartan II XC2S100 FPGA of the board this core was
meant for, which has 2,400 flip-flops. The full 128 KB address space fits
many times over in the board's 16 MB SDRAM.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`.

- `tb_jackal_alu`, `tb_jackal_decode`, `tb_jackal_branch`: directed corner
  cases plus thousands of random vectors. The reference model is written
  differently from the RTL (bit loops, repeated single shifts).
- `tb_jackal_regfile`, `tb_jackal_cond`: shadow models. Includes the
  overflowing compare pairs and reset.
- `tb_jackal_memif`: runs against the controller model. Checks read data and
  the exact L + 2 / L + 4 cycle timing, then a random-latency phase.
- `tb_jackal_ctrl`: checks the order of strobes for each instruction class.
- `tb_jackal`: the whole core at its default configuration, in two phases.
  - A hand-written program. It stores 10..1 to memory in a loop, sums the
    numbers back (55), and exercises the shifts, NAND, AND/OR, LIL/LIH,
    BRN/BRZ/BRP/JMP and a final store. Results are checked against
    hand-computed values.
  - 40 random instruction streams of 4000 instructions each. They run in
    lock step with an instruction-level model written in the testbench.
    After every retired instruction the PC, all registers and the flags are
    compared. At the end of each stream, all 64K words of memory are
    compared.
  - The testbench counts every opcode, LD, ST, the no-op modes, taken and
    not-taken conditional branches, JMP, U-operand reads and memory wait
    cycles. It fails if any of them never occurred.

`tb/sdramcntl_model.sv` is a behavioural stand-in for the SDRAM controller
with 64K words behind it. Its latency is fixed or random (1..`LATENCY`).

What is not verified: timing against the real SDRAM controller and board,
and any behaviour of the undefined opcodes and operands beyond "no-op / zero".

## Simulating

With Verilator 5 (two-state; the testbenches reset everything they read):

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/jackal_pkg.sv tb/tb_jackal.sv --top-module tb_jackal
./obj_dir/Vtb_jackal
```

Swap `tb_jackal` for any other testbench name. The full-core test takes
about a second.

To run your own program:
1. Write instruction words into `u_mem.mem[]` of the controller model before
   releasing reset, as phase 1 of `tb_jackal` does with its small assembler
   functions (`rrr`, `lil`, `lih`, `ld`, `st`, `cmp`, `br`).
2. Watch `retire` and `pc`.
