# A 16-bit load/store CPU with the programme counter in R7

This is a small von Neumann CPU that executes the single-data-item loads and
stores of a Thumb-like 16-bit instruction set. It has 16-bit words and 16-bit
word addresses, and one memory holds both the program and its data. There are
eight registers, R0 to R7. R7 is the programme counter, so any instruction that
reads or writes a register can also read or write the PC. In this design,
PC-relative loads and jumps are not special instructions. They are the ordinary
load with R7 as the base register or as the destination.

The design follows an introductory lecture on CPU organisation (CSCI 250,
"CPU Architecture II"). The lecture specifies the register set, the four
load/store encodings and the word-addressed memory. It does not specify the
ALU. Every other instruction word is therefore fetched, reported on the top's
`other_*` ports and skipped.

## Programmer's model

| register | role |
|---|---|
| R0-R6 | general purpose, 16 bits |
| R7 | programme counter: while an instruction executes, it holds the address of the *next* instruction |
| IR | instruction register; not addressable by programs |

Memory is 65,536 words of 16 bits each. Every address is one whole word, and
there is no byte addressing. A C array `int a[100]` takes 100 consecutive
addresses. Struct fields sit at `&q` and `&q + 1`.

## Instructions

| bits 15-12 (opA) | 11-9 (opB) | 8-6 | 5-3 | 2-0 | instruction | effect |
|---|---|---|---|---|---|---|
| 0101 | 000 | Rm | Rn | Rt | `STR Rt, [Rn, Rm]` | mem[Rn + Rm] <- Rt |
| 0101 | 100 | Rm | Rn | Rt | `LDR Rt, [Rn, Rm]` | Rt <- mem[Rn + Rm] |
| 0110 | 0, then imm5 in 10-6 | | Rn | Rt | `STR Rt, [Rn, #imm5]` | mem[Rn + imm5] <- Rt |
| 0110 | 1, then imm5 in 10-6 | | Rn | Rt | `LDR Rt, [Rn, #imm5]` | Rt <- mem[Rn + imm5] |

- **Offsets.** `imm5` is zero-extended and is not scaled, because addresses
  count words. Address sums wrap modulo 2^16.
- **Worked example, register offset.** R2 = FF00h, R3 = 0003h and R0 = FF07h.
  `0101 000 011 010 000` (`STR R0, [R2, R3]`) writes FF07h to word FF03h.
- **Worked example, immediate offset.** With the same registers,
  `0110 0 00100 010 000` (`STR R0, [R2, #4]`) writes FF07h to word FF04h.
- **Other instruction words.** Any other word executes as "no operation" and
  raises `other_valid` for one cycle. This includes:
  - the half-word, byte and signed-byte forms (opB 001-011 and 101-111);
  - the byte, half-word and stack-pointer groups (opA 0111-1001);
  - all ALU and branch words.

## How an instruction runs, and what R7 reads

The memory has a single port, so every instruction takes exactly **two clock
cycles**:

1. **FETCH.** The memory address is R7. The word read is loaded into IR. The
   same edge writes R7 <- R7 + 1 through the register array's write port.
2. **EXEC.** IR is decoded. The address generator forms Rn + Rm or
   Rn + imm5. A store drives Rt's value onto the memory write port. A load
   writes the word read into Rt on the closing edge. `instr_done` is high
   during this cycle.

Because the increment happens during FETCH, R7 holds *the address of the next
instruction* during EXEC. This has four consequences a programmer needs to know:

- **PC-relative loads.** `LDR Rt, [R7, #k]` reads the word k+1 places after
  the instruction itself. This is how constants are loaded: the instruction set
  has no move-immediate instruction.
- **Jumps.** `LDR R7, [...]` is a jump. The new value is the next fetch address.
  `LDR R7, [R7, #k]`, where the word it points at holds the address of the
  load itself, is a one-instruction halt loop.
- **Storing R7.** `STR R7, [...]` stores the return address (instruction
  address + 1).
- **Self-modifying code.** Instructions and data share one memory, so a store
  may overwrite code. The change takes effect the next time that word is
  fetched.

There is no pipeline. No hazards, stalls or forwarding exist.

## Block structure

```
thumb16_cpu
 |- u_ir    reg_cell          instruction register (16-bit register with load enable)
 |- u_dec   ls_decoder        opA/opB table -> op class, Rm/Rn/Rt/imm5 fields
 |- u_regs  reg_array         8 x reg_cell, 3 read ports (3 x mux8to1), 1 write port
 |- u_agu   addr_gen          Rn + (use_imm ? zext(imm5) : Rm)
 |- u_ctrl  fetch_exec_ctrl   FETCH/EXEC state, PC+1, memory and write-back muxing
 `- u_mem   main_memory       2^16 x 16 words, combinational read, clocked write
```

Shared types are in `thumb16_pkg`:

- the decoded-instruction struct `dec_t`;
- the op-class enum `op_e` and the state enum `state_e`;
- the opcode constants.

The three read ports of the register array are addressed straight from IR:

| port | field | feeds |
|---|---|---|
| A | Rn (bits 5-3) | address base |
| B | Rm (bits 8-6) | register offset |
| C | Rt (bits 2-0) | store data |

R7 also has its own `pc` output, which drives the fetch address.

`fetch_exec_ctrl` holds two assertions:

- memory is written only in EXEC, by a store, and never in the same cycle as a
  register load;
- every FETCH writes R7 + 1 to R7.

## Top-level interface

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, everything on the rising edge |
| `rst_n` | in | 1 | asynchronous active-low reset: registers 0000h, R7 = `RESET_PC`, sequencer in FETCH |
| `pc` | out | 16 | R7 |
| `ir` | out | 16 | instruction register |
| `instr_done` | out | 1 | high during each EXEC cycle |
| `other_valid` | out | 1 | the instruction in EXEC is not one of the four loads/stores |
| `other_instr` | out | 16 | that instruction word |
| `other_op_a`, `other_op_b` | out | 16 | values of R[bits 5-3] and R[bits 8-6] |
| `mem_addr`, `mem_we`, `mem_wdata` | out | 16, 1, 16 | the memory port, for observation |

The `other_*` ports are where an ALU would attach. They carry no write-back
path, because the ALU's instruction formats are not defined.

Parameter: `RESET_PC` (default 0000h), the address of the first fetch.
Widths are in `thumb16_pkg` (`DW = 16`, `AW = 16`).

The memory is not reset, and the CPU has no loader port. Preload the program
before releasing reset. Either assign `u_mem.mem[i]` hierarchically from a
testbench, or add a `$readmemh` to `main_memory`.

## Where this design makes its own choices

The source lecture gives the register set, the encodings, the addressing
arithmetic and the word-addressed memory. The following were decided here:

- **Sequencing.** Two cycles per instruction, with R7 incremented in FETCH.
  The lecture says only that the PC holds the next instruction's address and
  that fetch happens every cycle.
- **Register array ports.** Three read ports, so that a store reads Rn, Rm and
  Rt in one cycle. One write port, shared by the PC increment and loads.
- **Memory timing.** A combinational read and a clocked write, with the same
  port used for fetch and data. The size, 2^16 words, is inferred from the
  16-bit addresses.
- **Immediate offset.** `imm5` is zero-extended and not scaled, which matches
  the worked example (FF00h + #4 = FF04h). In the lecture, the slide on the
  load-immediate form names "Rm" as its offset, but its bit table has a 5-bit
  immediate there. The bit table is followed.
- **Reset.** The reset is asynchronous and active-low. All registers clear to
  0000h, and the first fetch is from 0000h. The lecture places the instruction
  segment before the data segment, but gives no addresses for either.
- **Opcodes that are not built.** Unimplemented opcodes are skipped rather than
  trapped.
- **Parts that are absent:**
  - the ALU;
  - byte and half-word accesses;
  - multiple-register loads and stores, which the lecture names without an encoding;
  - a stack pointer;
  - privileged or kernel mode.

  The lecture mentions kernel mode and system calls only as background for
  32-bit ARM.

## Simulating

Each module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and stops itself through a watchdog.
With plain Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/thumb16_pkg.sv \
          tb/tb_thumb16_cpu.sv --top-module tb_thumb16_cpu -Mdir obj -o sim
./obj/sim
```

Replace `thumb16_cpu` with any other module name to run that module's test.
The testbenches initialise everything they read, so they work under
Verilator's two-state random initialisation.

`tb_thumb16_cpu` runs the CPU at its default size. A reference model of the
instruction set, inside the testbench, executes in lockstep with the CPU. At
every completed instruction it checks:

- the instruction word and the PC;
- the memory write strobe, address and data;
- all eight registers;
- that instructions complete exactly two cycles apart.

The test has two phases:

1. **A directed program.** It loads constants PC-relatively, runs both worked
   store examples above, loads them back, and skips a store-half-word word and
   a non-memory word. It then jumps over trap code by loading R7, stores R7, and
   ends in a self-loop.
2. **A random program.** The whole memory is filled with a random program,
   mostly load/store words, and 20,000 instructions are run.

The test counts each mechanism: both addressing forms of both directions,
PC-relative loads, jumps, stores of R7 and skipped instructions. A mechanism
that never occurs counts as a failure.

The unit tests cover the following:

| test | what it checks |
|---|---|
| decoder | all 65,536 instruction words, against wildcard patterns |
| register array | every read port on every cycle, through random writes |
| memory | full size, random writes and read-back |
| sequencer | each state's outputs for every instruction class |
