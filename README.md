# An 8-bit microprocessor with genetic instructions

A genetic algorithm evolves a population of bit strings ("chromosomes"). It
spends most of its time on three small bit operations:

- **crossover**, which splices two parents at a cut point;
- **mutation**, which flips a bit;
- **inversion**, which reverses a segment.

On an ordinary 8-bit CPU each of these takes a loop of masks and shifts. This
processor makes each of them a single instruction on the accumulator. The cut
points come from an on-chip random number generator.

The rest is a conventional microprogrammed accumulator machine:

- an 8-bit data path and a 16-bit (64 Kbyte) address space;
- four addressing modes;
- a stack for subroutines and interrupts;
- an 8-bit parallel port and a serial port.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017). It follows a short
published description of the design: the register set, the instruction
tables, the instruction format and a block diagram of the datapath. That
description gives no microprogram, no bus timing and no interrupt details.
Everything it leaves open is decided here and marked as such below.

## Programmer's model

| register | width | use |
|---|---|---|
| AC | 8 | accumulator; every ALU and genetic operation works on it |
| PC | 16 | program counter (reset: 0000h) |
| SP | 16 | stack pointer; the stack grows upwards |
| Y | 16 | index and loop counter; the pointer for register-indirect mode |
| BASE | 16 | base register for register-based mode |
| IR | 8 | instruction register |
| MA, MD | 16 | memory address and memory data registers (not visible to programs) |
| PIN, SIN, POUT, SOUT | 8 | parallel and serial I/O registers |
| CF, ZF | 1 | carry (borrow after CMP) and zero flags |
| YZF | 1 | 1 whenever Y = 0 (not stored; used by BY) |

## Instruction format

Every instruction starts with one op-code byte:

```
bit  7   6 5 4 3 2   1 0
     0   op-code     mode     memory-reference instruction
     1   op-code     -  -     register / I-O instruction
```

| mode | name | operand bytes after the op-code | effective address |
|---|---|---|---|
| 00 | immediate | 1 (2 for 16-bit loads) | the operand itself |
| 01 | direct | 2, high byte first | the 16-bit address |
| 10 | register indirect | none | Y |
| 11 | register based | 1 (unsigned displacement d) | BASE + d |

Branch and CALL instructions always have a 2-byte target after the op-code,
whatever their mode bits. All 16-bit quantities in memory are stored high
byte first.

## Instruction set

"M" is the operand: an immediate byte or the byte at the effective address.
The cycle counts cover everything from fetch to the end of the instruction,
for the modes immediate / direct / indirect / based.

| op-code | instr. | operation | flags | cycles |
|---|---|---|---|---|
| 0 00000 | ADD | AC ← AC + M | CF, ZF | 5/8/6/7 |
| 0 00001 | AND | AC ← AC ∧ M | ZF | 5/8/6/7 |
| 0 00010 | OR | AC ← AC ∨ M | ZF | 5/8/6/7 |
| 0 00011 | CMP | compute AC − M | CF = borrow, ZF = equal | 5/8/6/7 |
| 0 00100 | LDA | AC ← M | – | 5/8/6/7 |
| 0 00101 | LDSP | SP ← 16-bit M | – | 6/9/7/8 |
| 0 00110 | LDY | Y ← 16-bit M | – | 6/9/7/8 |
| 0 00111 | ST | [EA] ← AC (immediate mode: over the operand byte) | – | 4/7/5/6 |
| 0 01000 | BR | PC ← target | – | 6 |
| 0 01001 | BC | if CF: PC ← target | – | 7 taken / 6 not |
| 0 01010 | BZ | if ZF: PC ← target | – | 7 / 6 |
| 0 01011 | BY | if Y = 0: PC ← target | – | 7 / 6 |
| 0 01100 | CALL | [SP] ← PC_H, [SP+1] ← PC_L, SP += 2, PC ← target | – | 8 |
| 0 01101 | RET | SP −= 2, PC ← [SP]:[SP+1] | – | 8 |
| 0 01110 | XOR | AC ← AC ⊕ M | ZF | 5/8/6/7 |
| 0 01111 | LDB | BASE ← 16-bit M | – | 6/9/7/8 |
| 0 10000 | XOVRML | AC ← AC(7..i) & M(i−1..0) | – | 5/8/6/7 |
| 0 10001 | XOVRMLM | AC ← M(7..i) & AC(i−1..0) | – | 5/8/6/7 |
| 0 10010 | XOVR2 | AC ← AC(7..j) & M(j−1..i) & AC(i−1..0) | – | 5/8/6/7 |
| 1 00000 | INC | Y ← Y + 1 | (YZF) | 4 |
| 1 00001 | COM | AC ← ¬AC | – | 4 |
| 1 00010 | SHL | AC ← AC << 1, 0 shifted in | – | 4 |
| 1 00011 | SHR | AC ← AC >> 1, 0 shifted in | – | 4 |
| 1 00100 | ROTL | rotate AC left | – | 4 |
| 1 00101 | ROTR | rotate AC right | – | 4 |
| 1 00110 | PIN | AC ← PIN | – | 4 |
| 1 00111 | SIN | AC ← SIN | – | 4 |
| 1 01000 | POUT | POUT ← AC | – | 4 |
| 1 01001 | SOUT | SOUT ← AC, start sending | – | 4 |
| 1 01010 | CC | CF ← 0 | CF | 4 |
| 1 01011 | HALT | wait for an interrupt | – | 4 + wait |
| 1 01100 | INV | AC(j..i) ← AC(i..j), bits reversed | – | 4 |
| 1 01101 | MUT1 | AC(i) ← ¬AC(i) | – | 4 |
| 1 01110 | MUT2 | AC(i) ← ¬AC(i), then AC(j) ← ¬AC(j) | – | 4 |

Op-codes not in the table execute as one-byte no-operations. The original
description counts 35 instructions but lists the 34 above. The missing one
is unknown and is not invented here.

A counted loop loads Y with the negated count and closes with `INC` and
`BY exit`. Y reaching zero ends the loop.

## The genetic instructions

Each genetic instruction uses two points, i and j, each 0..7. They come from
the random number generator (`gp_rng`), an 8-bit maximal-length LFSR with
polynomial x⁸+x⁶+x⁵+x⁴+1:

- i = LFSR bits 2..0;
- j = LFSR bits 5..3.

The LFSR steps once at the end of every genetic instruction, so each such
instruction sees a fresh pair of points. It does not step at any other time,
so a program's results are reproducible from the seed (parameter `RNG_SEED`).

| instruction | result, shown bit by bit from bit 7 down to bit 0 |
|---|---|
| XOVRML | upper bits 7..i from AC, lower bits i−1..0 from M (one-point crossover) |
| XOVRMLM | upper bits from M, lower bits from AC (the other child of the same cut) |
| XOVR2 | bits hi−1..lo from M, the rest from AC (two-point crossover) |
| INV | bits hi..lo of AC in reverse order, the rest unchanged |
| MUT1 | bit i of AC flipped |
| MUT2 | bit i flipped, then bit j flipped |

Here lo = min(i, j) and hi = max(i, j). The points are put in order so that
the segment is always well formed.

Edge cases follow the formulas directly:

- A cut at i = 0 takes nothing from M.
- XOVR2 with i = j leaves AC unchanged.
- MUT2 with i = j flips the same bit twice, which also leaves AC unchanged.

Example: AC = 1111_0000, M = 1010_1010, i = 3.
XOVRML gives 1111_0010 and XOVRMLM gives 1010_1000.

A typical use: a population sits in memory and Y walks over it. Each loop
pass runs `LDA (Y)`, `XOVRML elite`, `MUT1` and `ST (Y)`. That crosses every
member with a fixed individual and mutates it. The end-to-end testbench runs
exactly this loop.

All six operators are combinational, in `gp_genetic`. They run in the single
execute cycle of the instruction.

## Microprogrammed control

The control unit (`gp_control`) is a microsequencer. It reads 32-bit
microwords from a 256-word store (`gp_urom`): 1 Kbyte, the size of the
original design's microprogram store. This microprogram uses 84
words. The original reports about 150 words but does not publish them. This
microprogram and its field layout are this design's own.

### Microword layout (`uword_t` in `gp_pkg`)

| field | bits | meaning |
|---|---|---|
| nx | 3 | next address: SEQ, JMP, JCOND, DISP (routine for op-code and mode), EXEC (execute word for op-code), END (fetch, or interrupt entry) |
| cond | 2 | condition for JCOND: CF, ZF, YZF, interrupt pending |
| addr | 8 | jump address |
| mem | 3 | memory cycle: read into IR / MD_L / MD_H / MD_L with MD_H cleared; write AC / PC_H / PC_L |
| rsvd | 2 | unused, zero |
| pc | 2 | hold, +1, ← MD, ← interrupt vector |
| sp | 2 | hold, +1, −1, ← MD |
| ma | 3 | hold, ← PC, ← SP, ← MD, ← Y, ← BASE + MD, +1 |
| yb | 2 | none, Y+1, Y ← MD, BASE ← MD |
| fn | 5 | accumulator function; it also decides which flags are written, whether POUT or SOUT loads, and whether the LFSR steps |

### How an instruction runs

1. FETCH (two words): MA ← PC; then IR ← [MA], PC+1, MA+1.
2. DECODE: a mapping table jumps on IR. A memory-reference instruction goes
   to the operand routine for its class and mode. The classes are 8-bit
   operand, 16-bit operand, store address, branch, CALL and RET. A
   register/I-O instruction goes straight to its execute word.
3. Operand routines build the effective address in MA:
   - direct: MA ← MD;
   - indirect: MA ← Y;
   - based: MA ← BASE + MD, where MD holds the displacement with a zero
     high byte.

   Shared tails then read one byte into MD_L or two bytes into MD. An EXEC
   jump then reaches the execute word of the op-code.
4. The execute word does the operation and ends with END. END goes to the
   interrupt entry if an interrupt is pending, otherwise back to FETCH.

Every microword is decoded combinationally from the micro-PC register, so
each control signal holds for a whole clock cycle.

## Interrupts and HALT

A rising edge on `irq` sets a pending latch. The request is taken only at
the end of an instruction, or while HALT is waiting. Entry takes three cycles:

1. MA ← SP.
2. It pushes PC, high byte first, as CALL does.
3. It loads PC with `INT_VECTOR` (default 0010h) and clears the latch.

The service routine returns with RET. Flags and AC are not saved, so a
routine that must preserve them stores AC itself. There is no instruction to
disable interrupts. Holding `irq` high does not raise a second request.

HALT loops in the microprogram until an interrupt arrives. After the service
routine returns, execution continues after the HALT. Reset also ends the
wait.

## I/O

- **PIN** samples `par_in` every clock.
- **SIN** shifts `serial_in` in at bit 0 every clock. The SIN instruction
  therefore reads the last eight bits received, the newest in bit 0.
- **POUT** drives `par_out` and changes only on the POUT instruction.
- **SOUT** is loaded by the SOUT instruction and then sends the byte LSB
  first on `serial_out`, one bit per clock, for 8 clocks. A second SOUT
  within those 8 clocks restarts the transmission with the new byte.

There are no start or stop bits and no baud-rate divider. The original gives
only the port registers, so this framing is a placeholder to adapt.

## Bus interface and timing

Every memory access is addressed by MA, the memory address register: the
address pins are MA's outputs. To read the instruction stream the
microprogram first copies PC into MA and then steps both together; to use
the stack it copies SP into MA. Operand addresses are built in MA directly.
This costs one extra cycle per instruction fetch and per group of stack
accesses, and keeps a single address path into memory.

The data pins are split into `din` and `dout`, with `mem_rd` and `mem_wr`
strobes, instead of one bidirectional bus. Each memory cycle is one clock
long:

- `addr` and the strobe are valid from just after the rising edge.
- A read expects `din` to be valid combinationally within the same cycle, as
  from an asynchronous SRAM or ROM. The datapath captures it at the next
  rising edge.
- A write stores `dout` at `addr` on the rising edge that ends the cycle.

An assertion in `gp_cpu` checks that `mem_rd` and `mem_wr` are never high
together. Reset (`rst_n`, active low) is asynchronous. It clears every
register, sets PC to 0000h and loads the LFSR with `RNG_SEED`.

## Where this design departs from, or fills in, the original

- **Microprogram:** the microword fields, the mapping tables and all routines
  are new.
- **Source of i and j:** the original shows a random number generator in the
  datapath but does not say how it feeds the points. Here the LFSR supplies
  both points, and its polynomial, width and seed are new. The original
  datapath also shows a multiplexer beside the MD register, whose other input
  is unclear. No way to give the points explicitly is provided.
- **Stack width:** the original writes CALL as "[SP] ← PC, SP ← SP + 1". With
  an 8-bit data bus, the return address takes two bytes and SP moves by 2.
- **Addressing modes:** indirect mode uses Y. Based mode uses BASE plus an
  unsigned one-byte displacement. The original names these modes without
  giving their registers or operand sizes.
- **CMP:** CMP sets CF to the borrow (AC < M, unsigned).
- **Unspecified flags:** shifts, rotates, LDA and the genetic instructions
  leave the flags alone. The original lists flags only for ADD, AND, OR,
  XOR, CMP and CC.
- **HALT:** the original prints its effect as "CC ← 0", read here as
  stopping the processor. Here HALT waits for an interrupt.
- **Interrupts:** the interrupt mechanism, the vector address, the memory
  timing, the serial framing and the reset values are new.
- **Memory addressing:** the original datapath drawing shows MA as the only
  address into memory, and this design keeps that: fetches and stack
  accesses first copy PC or SP into MA. The cycle counts in the instruction
  table are this design's; the original gives none.
- **Instruction count:** 34 instructions rather than the 35 the original
  counts.

## Files

| file | contents |
|---|---|
| `rtl/gp_pkg.sv` | op-codes, addressing modes, microword type, micro-addresses |
| `rtl/gp_cpu.sv` | top level: control, datapath, I/O |
| `rtl/gp_control.sv` | microsequencer, interrupt latch |
| `rtl/gp_urom.sv` | microprogram store and mapping tables |
| `rtl/gp_datapath.sv` | registers, address and data multiplexers, base adder |
| `rtl/gp_alu.sv` | 8-bit ALU |
| `rtl/gp_genetic.sv` | crossover, inversion, mutation |
| `rtl/gp_rng.sv` | LFSR for the points i, j |
| `rtl/gp_io.sv` | PIN, SIN, POUT, SOUT |
| `tb/tb_*.sv` | one self-checking testbench per module |

Parameters of `gp_cpu`: `INT_VECTOR` (16 bits, default 16'h0010) and
`RNG_SEED` (8 bits, non-zero, default 8'hA5).

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog counts a failure if the testbench hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl --top-module tb_gp_cpu \
    rtl/gp_pkg.sv rtl/gp_alu.sv rtl/gp_genetic.sv rtl/gp_rng.sv rtl/gp_io.sv \
    rtl/gp_urom.sv rtl/gp_control.sv rtl/gp_datapath.sv rtl/gp_cpu.sv \
    tb/tb_gp_cpu.sv
./obj_dir/Vtb_gp_cpu
```

For one block, list only `gp_pkg.sv`, the block's files and its testbench:
for example `gp_alu.sv` with `tb_gp_alu.sv`, or `gp_urom.sv`, `gp_control.sv`
and `tb_gp_control.sv`.

### What the testbenches establish

- **`tb_gp_cpu`** runs the processor, at its default parameters, in lockstep
  with an instruction-level reference model written in the testbench. The
  program has two parts:
  - A directed part runs every instruction in every mode, both outcomes of
    each conditional branch, a Y-counted loop, CALL/RET, a HALT woken by an
    interrupt, and one genetic-algorithm generation over an 8-member
    population.
  - A random stream of 6000 instructions follows, under random interrupt
    pulses and random parallel and serial input.

  The testbench checks:
  - the architectural registers, POUT and the LFSR at every instruction
    boundary;
  - the length in clock cycles of every instruction (except HALT) and of
    every interrupt entry, against the cycle counts in the instruction table;
  - every bit sent on the serial output;
  - all 64 Kbyte of memory at the end.

  It also counts each mechanism (every op-code and mode, taken and untaken
  branches, interrupts while running and during HALT, carry, borrow, serial
  bits) and fails if any never occurred.
- **`tb_gp_urom`** walks the microprogram for all 256 op-code bytes under
  each branch condition. It checks the memory reads, writes, PC and SP
  movements and register loads against each instruction's definition.
- **`tb_gp_control`**, **`tb_gp_datapath`**, **`tb_gp_alu`**,
  **`tb_gp_genetic`**, **`tb_gp_rng`** and **`tb_gp_io`** check their blocks
  against values computed independently in the testbench. The ALU test runs
  every accumulator value against every third operand value.
  The genetic-unit test covers every (i, j) pair. The LFSR test checks the
  full 255-state period.

Not verified: timing closure on any technology, and behaviour with a memory
slower than one cycle (no wait states are supported).
