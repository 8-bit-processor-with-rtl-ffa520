# An 8-bit processor whose instruction set is a memory

This is an 8-bit processor built the way a hobbyist builds one on a bench: a
handful of TTL-style parts (74181 ALU slices, 74193 counters, 74574 registers,
74189 RAMs, byte-wide EEPROMs) on two shared buses. What makes it unusual is
that none of its instructions is wired in. Every cycle, a 40-bit control word
read from a writable control store decides which part drives each bus and
which registers load. A user can add, remove or redefine instructions, or
rewire how the datapath is used, by rewriting that memory. No logic has to
change.

The RTL models each part's function as synchronous logic on one clock. It
keeps the part boundaries, so each block below corresponds to a circuit
board of the original design.

## Datapath

```
            DATA BUS (8)
   ┌──────┬──────┬──────────┬───────────┬──────┬────────┐
   │      │      │          │           │      │        │
  GPR    PC    A   B      ALU buf      IR    memory  (A, B, IR, PC, GPR load from here)
 16x8   8-bit  │   │        ▲           │
   │      │    └─ALU┘───────┘           │  {IR, CTR} ──► control store ──► 40-bit control word
   │      │      (2 x 74181)            │
   └──────┴────────────────┬────────────┘
            ADDRESS BUS (8) ──► memory address
```

* **Data bus** sources: program memory (MMRY RD), PC, ALU output buffer, GPR.
  Sinks: A, B, IR, PC (load), GPR, memory (write).
* **Address bus** sources: PC, ALU output buffer, GPR. Its only sink is the
  memory address.
* Only one source may drive a bus at a time. The buses are modelled as
  one-hot OR multiplexers (`bus8`), and an assertion catches two drivers at
  once. An undriven bus reads `0x00`.

The GPR file and the ALU buffer can both drive the address bus. A pointer held
in a register can therefore address memory directly, without first going
through the PC.

| Block | Module | What it is |
|---|---|---|
| ALU | `alu8`, `alu181` | Two 74181 slices with ripple carry. The FN header `{CN, M, S3..S0}` selects one of 32 functions |
| ALU output buffer | `alu_out_buffer` | 8-bit register (74574). It latches the ALU result on `alu_latch` |
| A, B registers | `reg574` | Operand registers loaded from the data bus. They always feed the ALU |
| Flags | `flag_logic` | Carry, A=B and zero, loaded on `flag_in`. Brought out as ports |
| GPR | `gpr`, `ram189` | 16 x 8 register file made of two 16 x 4 74189 slices |
| Program counter | `program_counter` | 8 bits, from two chained `ctr193`. Increments, loads from the data bus, resets to 0 |
| Instruction register | `instruction_register` | 8 bits, from two chained `ctr193`. Loads, increments, resets |
| Instruction counter | `instruction_counter` | 4-bit micro-step counter (`ctr193`) |
| Control store | `control_store` | 4096 x 40 bits (five byte-wide EEPROMs), addressed by `{IR, CTR}` |
| Memory | `program_memory` | 256 bytes of program and data. Asynchronous read, clocked write |
| Top | `cpu_top` | Wires everything up and adds programmer and debug ports |

`cpu_pkg` holds the control-word type, the ALU function codes, the opcodes and
the start-up microcode.

## How an instruction runs

This is the part that takes some getting used to. The control store address is
`{IR, CTR}`: the opcode picks a **block** of 16 words, and the 4-bit
instruction counter picks the **step** within it. CTR advances on every clock.
A step that sets `rst_ctr` sends it back to 0.

Step 0 of *every* block is the fetch: PC onto the address bus, memory read
onto the data bus, IR loads. The control store is read combinationally. So at
the clock edge that ends the fetch, IR takes the new opcode and CTR goes to 1,
and step 1 is read from the **new** instruction's block. In other words, the
fetch of the next instruction is done by the block of the previous one, which
is why every block must start with the same two steps:

| step | control word | effect |
|---|---|---|
| 0 | `pc_out_a, mem_rd, ir_in` | fetch opcode, switch to its block |
| 1 | `pc_inc` | PC points at the operand or at the next opcode |
| 2.. | instruction-specific | |
| last | `rst_ctr` | next cycle is step 0 = fetch |

After reset, PC, IR and CTR are 0, so the processor starts with step 0 of
block 0. That step fetches the first opcode at address 0.

For example, "load A with an immediate" (opcode `0x01`) takes five cycles:

1. `pc_out_a, mem_rd, ir_in`
2. `pc_inc`
3. `pc_out_a, mem_rd, a_in` (the operand byte goes into A)
4. `pc_inc`
5. `rst_ctr`

The default microcode always spends a separate step on `rst_ctr`. Merging it
into the previous step would save a cycle per instruction, and the hardware
allows it.

An instruction longer than 16 steps can set `ir_inc`. The IR then steps to the
next opcode while CTR keeps counting, so execution continues in the next
block at the following step. The testbench defines such an instruction at run
time.

### The ALU output buffer costs a step

The ALU output buffer is a clocked register. An ALU result therefore appears
on a bus one step after the step that computes it:

* step *n*: set `alu_fn` and `alu_latch` (and `flag_in`)
* step *n+1*: `alu_out_d` or `alu_out_a`

`alu_out_buffer` has a parameter `REGISTERED`. Setting it to `0` turns the
buffer into a plain non-storing buffer (a 74541). In that case the microcode
must keep `alu_fn` steady during the step that drives the bus. The default
microcode does not do that, so only use `REGISTERED = 0` with your own
microcode.

## The control word

The layout is defined by `ctrl_t` in `cpu_pkg.sv` (bit 0 is the LSB):

| bits | field | meaning |
|---|---|---|
| 0 | `pc_out_a` | PC → address bus |
| 1 | `pc_out_d` | PC → data bus (save a return address) |
| 2 | `pc_inc` | PC + 1 |
| 3 | `pc_ld` | data bus → PC |
| 4 | `mem_rd` | memory[address bus] → data bus |
| 5 | `mem_wr` | data bus → memory[address bus] |
| 6 | `ir_in` | data bus → IR |
| 7 | `a_in` | data bus → A |
| 8 | `b_in` | data bus → B |
| 9 | `alu_latch` | ALU result → ALU output buffer |
| 10 | `alu_out_d` | ALU buffer → data bus |
| 11 | `alu_out_a` | ALU buffer → address bus |
| 12 | `gpr_in` | data bus → R[`gpr_addr`] |
| 13 | `gpr_out_d` | R[`gpr_addr`] → data bus |
| 14 | `gpr_out_a` | R[`gpr_addr`] → address bus |
| 15 | `ir_inc` | IR + 1 (continue in the next block) |
| 16 | `rst_ctr` | end of instruction |
| 17 | `flag_in` | load the flags |
| 18 | `halt` | stop the instruction counter |
| 24:19 | `alu_fn` | `{CN, M, S3, S2, S1, S0}` of the 74181s |
| 28:25 | `gpr_addr` | register number |
| 39:29 | spare | |

The register file has no address path of its own. Its register number comes
from the control word, so an instruction that names a register has one block
per register. With 256 blocks available that is affordable: the default
instruction set puts the register number in the opcode's low nibble.

## Default instruction set

The control store starts out holding `cpu_pkg::default_microcode()`. Each
instruction is one opcode byte, plus one operand byte for the immediate
forms.

| opcode | mnemonic | operation | cycles |
|---|---|---|---|
| `00` | NOP | (any opcode not listed also acts as NOP) | 3 |
| `01 ii` | LDA #i | A ← i | 5 |
| `02 ii` | LDB #i | B ← i | 5 |
| `03 aa` | JMP a | PC ← a | 4 |
| `1n ii` | LDR Rn,#i | Rn ← i | 5 |
| `2n` | MOVA Rn | A ← Rn | 4 |
| `3n` | MOVB Rn | B ← Rn | 4 |
| `4n` | LDAI Rn | A ← mem[Rn] (Rn drives the address bus) | 4 |
| `5n` | STI Rn | mem[A] ← Rn (A reaches the address bus through the ALU) | 5 |
| `6n` | JR Rn | PC ← Rn (`6F` returns from CALL) | 4 |
| `7n` | CALL Rn | R15 ← PC, PC ← Rn | 5 |
| `C0`–`C8` | ADD SUB AND OR XOR NOT INC DEC SHL | A ← f(A, B), flags | 5 |
| `C9` | CMP | flags of A − B − 1 (A=B set iff A = B) | 4 |
| `Dn` | STA Rn | Rn ← A | 5 |
| `FF` | HLT | stops in step 2 | – |

The flags are outputs only. Nothing in the control path reads them, so the
instruction set has no conditional branch.

## ALU function select

`alu181` implements the full 74181 function table for active-high data. For
each bit it forms P = A | (B & S0) | (~B & S1) and G = (A & ~B & S2) | (A & B & S3).
Then:

* Logic mode (M = 1): F = ~(P xor G).
* Arithmetic mode (M = 0): F = P plus G plus carry-in. This covers A plus B
  (`1001`), A minus B minus 1 (`0110`), A plus A (`1100`) and the others.

CN and CN+4 are active-low carries, as on the chip: CN = 0 adds 1. The ALU
functions used by the microcode are named `FN_*` in `cpu_pkg`.

## Programming and reset

* `rst` is asynchronous and active high. It clears PC, IR, CTR, A, B, the ALU
  buffer and the flags. The GPRs and memories are not cleared.
* Hold `rst` high while filling memory through `prog_mem_we/addr/data`. A
  programmer write wins over a processor write in the same cycle.
* Write microcode words through `prog_cs_we/addr/data`. The address is
  `{opcode, step}`.
* `dbg_mem_addr/dbg_mem_data` reads memory back at any time.
* `halted` is high while a HLT step runs. During halt, CTR holds still and
  nothing else happens.

## Where this RTL departs from the original hardware

* **One clock, synchronous parts.** The 74193's separate up and down clocks
  and its asynchronous load are replaced by enables on the system clock, so
  chained counters carry synchronously. The 74189's write pulse becomes a
  clocked write. EEPROM write times are not modelled: a memory write takes
  one cycle.
* **ALU output buffer.** The original parts list names a 74574 flip-flop,
  while its buffer schematic shows a 74541. The flip-flop is the default.
  `REGISTERED = 0` selects the other.
* **74189 complement.** The 74189 reads back the complement of what it
  stores, so `gpr` inverts data on the way in. Registers then read back
  their true value.
* **Control store size.** Five 8K EEPROMs are fitted, but 12 address lines
  (8 from IR, 4 from CTR) are driven, so 256 blocks of 16 words exist.
  Likewise only the 256 bytes of program memory that an 8-bit PC and address
  bus can reach are built.
* **Added for completeness.** This RTL adds the following:
  * the control-word layout and the whole default instruction set
  * memory writes (`mem_wr`)
  * the HALT step
  * the choice of flags
  * the register number carried in the control word
  * the programmer and debug ports
  * reset of A, B, the ALU buffer and the flags
* **Not built.** Interrupt logic is not built. The original design mentions
  interrupts (reset clears them, and saving the PC is meant for them) but does
  not describe them. Nor is clock generation built.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/cpu_pkg.sv tb/tb_cpu_top.sv --top-module tb_cpu_top
./obj_dir/Vtb_cpu_top
```

Swap in the name of any other testbench (`tb_alu181`, `tb_gpr`, ...).
`tb_cpu_top` runs the processor at its full default size. It loads a
program, defines the extra two-block instruction `0x80` in the control store,
and runs to HLT. It then checks the results in memory and registers and the
5-cycle timing of LDA, and requires every control mechanism (each bus path,
PC load, memory write, flag load, IR increment, halt) to have occurred at
least once. It finishes in about 150 clock cycles.

`tb_cpu_random` generates 25 random straight-line programs. They mix loads,
register moves, all ALU operations, indirect loads and stores, and forward
jumps. It runs each program on the processor and on an instruction-level
reference model inside the testbench, then compares A, B, the flags, all 256
memory bytes and the exact cycle count. The carry flag is compared only
after arithmetic operations, because in logic mode the 74181's carry output
has no defined meaning.

To change the instruction set, edit `default_microcode()` in `cpu_pkg.sv`, or
write words through the control-store programming port at run time. Keep
steps 0 and 1 of every block as the fetch pair.
