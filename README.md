# A single-cycle Thumb machine

This is a register-level model of a processor that runs a subset of the 16-bit
Thumb instruction set and completes every instruction in one clock cycle, with
no pipeline. It is organised the way a textbook datapath is: decoding ROMs
produce a bundle of control signals, a few small multiplexers refine them with
bits from the instruction, and a fixed datapath (three-port register file,
barrel shifter, ALU, two-port memory) does the same sequence of steps for every
instruction, whether the instruction needs each step or not.

The design follows a published C "register-level simulator" of the machine,
recast as synthesizable SystemVerilog. It is a teaching design, not a model of
any real ARM core.

## What the machine runs

Implemented: the shifts by immediate and by register, 3-operand add/sub,
8-bit immediate mov/cmp/add/sub, the sixteen two-register ALU operations
(and, eor, lsl, lsr, asr, adc, sbc, ror, tst, neg, cmp, cmn, orr, mul, bic,
mvn), add/cmp/mov on high registers, bx and blx (register), PC-relative ldr,
word ldr/str with register or immediate offset, SP-relative ldr/str, add
to PC/SP, add/sub SP, conditional branch, unconditional branch and the
two-halfword bl.

Not implemented, by design: byte and halfword loads and stores, push, pop,
ldm, stm, exceptions and the Thumb state bit. Anything that would need more
than one cycle is left out. Two consequences matter when writing programs:

* A routine that calls another must first copy LR into a low register
  (`mov r7, lr`) and return through it (`bx r7`), since LR cannot be pushed.
* Opcodes `01010` and `01011` are decoded from bits 15:11 only, so `strh`,
  `strb`, `ldrsb`, `ldrh`, `ldrb` and `ldrsh` with a register offset execute
  as word `str`/`ldr`. Their immediate-offset forms, and `push`/`pop`/`ldm`/
  `stm`, stop the machine with a fault.

Some flag behaviour differs from the ARM architecture on purpose, to keep the
datapath uniform:

* An instruction that writes flags writes all four. Logical operations and
  `muls` clear C and V; moves and shifts clear V.
* Moves and shifts take C from the barrel shifter's carry. A shift by zero
  hands back the old C flag, so `movs rd, #imm` and `lsls rd, rm, #0` leave C
  unchanged.
* `bl` leaves the plain return address in LR (there is no Thumb bit).

## How one instruction executes

`thumb_core` performs these steps combinationally between two clock edges:

1. **Fetch.** The memory is read as 32-bit words; bit 1 of the PC picks the
   upper or lower halfword. `nextpc = pc + 2`.
2. **Decode.** `thumb_decoder` looks up the control word. Opcode
   `instr[15:11]` indexes a 32-row table, except for opcode `01000`: there,
   bit 10 picks a 16-row table indexed by `instr[9:6]` (ALU operations) or a
   4-row table indexed by `instr[9:8]` (high-register operations).
3. **Derived signals.**
   * `thumb_regsel` (three copies) turns each register selector into a number.
     The number comes from an instruction field or is wired to SP, LR or PC.
   * `thumb_alusel` resolves the table entries "Add or Sub according to
     bit 7 / bit 9".
   * The condition is always `instr[11:8]`.
   * `thumb_perhaps` makes the link write depend on `instr[7]` (bx vs blx).
4. **Register read.** `thumb_regfile` reads three registers, `ra`, `rb` and
   `rc`. The PC reads as PC + 4.
5. **Shift.** `thumb_rand2sel` chooses the shifter input: `rb`, or an
   immediate field, sign-extended for branch offsets. `thumb_shiftsel` chooses
   the distance: 0, 1, 2 or 12, the 5-bit field (with 0 meaning 32 for right
   shifts), or the low byte of `ra`. `thumb_shifter` shifts.
6. **ALU.** `thumb_alu` takes `ra` and the shifter output, plus the old C flag
   (for adc/sbc) and the shifter carry. It uses `thumb_adder` for add, sub,
   adc, sbc and neg.
7. **Memory.** The ALU output is the address. A store writes `rc`. For a load,
   the result is the loaded word; otherwise it is the ALU output.
8. **Write-back.**
   * `thumb_cond` evaluates the condition against the old flags. A "maybe"
     register write (conditional branches) happens only if the condition holds.
   * r0-r13 are written when selected.
   * LR takes the result if it is selected, else `nextpc` for bl/blx.
   * PC takes the result with bit 0 cleared if it is selected, else `nextpc`.
   * Flags are replaced if the table says so.

The branch instructions use the ordinary datapath. A branch reads the PC
(plus 4) as `ra`, shifts the offset left by 1 in the shifter, adds in the ALU,
and writes the sum to the PC register. The two bl halves work the same way:

* `bl1` computes `PC+4 + (offset_hi << 12)` into LR.
* `bl2` computes `LR + (offset_lo << 1)` into the PC and writes `nextpc` into
  LR.

PC-relative `ldr` and `add rd, pc, #imm` use a separate ALU operation, `ALU_ADR`,
that rounds the sum down to a multiple of 4.

Instructions whose second register is the shifted value swap the usual
operand roles: `lsls rd, rs` reads `rs` as `ra` (distance) and `rd` as `rb`
(data). The decoding tables handle this.

### The decoding tables

Each row holds: register selectors A, B and C; the shifter-input source; the
shift operation and distance source; the ALU operation; memory read and write;
flag write; register write (yes/no/maybe); and link write (yes/no/maybe).
Selector C names the register that is written, and also the third register
read (the value a store writes). The type `ctrl_t` in `thumb_pkg` lists the
fields. Table 1 at a glance:

| opcode | instruction | A | B | C | operand 2 | shift | ALU | mem | flags | write |
|---|---|---|---|---|---|---|---|---|---|---|
| 0-2 | lsls/lsrs/asrs #imm | - | Ry | Rx | rb | op, imm5 (0=32 for right) | Mov | - | yes | yes |
| 3 | adds/subs | Ry | Rz | Rx | rb or imm3 | 0 | bit 9 ? Sub : Add | - | yes | yes |
| 4-7 | movs/cmp/adds/subs #imm8 | Rw | - | Rw | imm8 | 0 | Mov/Sub/Add/Sub | - | yes | yes (cmp no) |
| 9 | ldr rd, [pc, #] | PC | - | Rw | imm8 | lsl 2 | Adr | read | - | yes |
| 10/11 | str/ldr [rn, rm] | Ry | Rz | Rx | rb | 0 | Add | write/read | - | no/yes |
| 12/13 | str/ldr [rn, #] | Ry | - | Rx | imm5 | lsl 2 | Add | write/read | - | no/yes |
| 18/19 | str/ldr [sp, #] | SP | - | Rw | imm8 | lsl 2 | Add | write/read | - | no/yes |
| 20/21 | add rd, pc/sp, # | PC/SP | - | Rw | imm8 | lsl 2 | Adr/Add | - | - | yes |
| 22 | add/sub sp, # | SP | - | SP | imm7 | lsl 2 | bit 7 ? Sub : Add | - | - | yes |
| 26/27 | b<cond> | PC | - | PC | simm8 | lsl 1 | Add | - | - | maybe |
| 28 | b | PC | - | PC | simm11 | lsl 1 | Add | - | - | yes |
| 30 | bl (1st half) | PC | - | LR | simm11 | lsl 12 | Add | - | - | yes |
| 31 | bl (2nd half) | LR | - | PC | imm11 | lsl 1 | Add | - | - | yes, link |

Field names: Rx = `instr[2:0]`, Ry = `[5:3]`, Rz = `[8:6]`, Rw = `[10:8]`.
In table 3, Rxx = `{instr[7], instr[2:0]}` and Ryy = `instr[6:3]`. Opcodes
14-17, 23-25 and 29 are not implemented.

## Stopping

* **halted** is high while the PC holds `MAGIC = 0x0FFFFFFE`. Reset loads this
  value into LR, so a program written as a subroutine halts the machine when it
  returns. By convention the result is left in r0.
* **fault** is a sticky stop that leaves all state as it was before the
  offending instruction. `fault_code` gives the cause:
  * 1: the PC is at or beyond the end of memory.
  * 2: a load or store address is at or beyond the end of memory.
  * 3: the instruction is not implemented.

## Using the top level

The top module is `thumbsim`, with parameter `MEMSIZE` in bytes (default 16384).

1. Hold `rst_n` low for one clock. This sets SP = MEMSIZE, LR = MAGIC, PC = 0,
   and all other registers and the flags to 0.
2. With `run` low, load the little-endian image one word per clock through
   `load_we` / `load_addr` (word index) / `load_data`. Any register can be
   preset through `init_we` / `init_idx` / `init_data`. Arguments normally go
   in r0-r12.
3. Raise `run`. One instruction completes per clock until `halted` or `fault`
   rises.
4. Read the state on the `pc`, `flags` and `regs` outputs.

Timing: all reads (register file, both memory ports) are combinational, and
all state changes on the rising edge. The critical path runs fetch → decode →
register read → shifter → ALU (including the 32×32 multiply) → memory read →
write-back mux.

## Files

| file | contents |
|---|---|
| `rtl/thumb_pkg.sv` | shared types: control enumerations, `ctrl_t`, `flags_t`, constants |
| `rtl/thumbsim.sv` | top: core + memory + load port |
| `rtl/thumb_core.sv` | the single-cycle datapath and control |
| `rtl/thumb_decoder.sv` | the three decoding tables |
| `rtl/thumb_regfile.sv` | 16 × 32 registers, three read ports, PC/LR rules |
| `rtl/thumb_mem.sv` | word memory, fetch port and data port |
| `rtl/thumb_alu.sv`, `rtl/thumb_adder.sv` | ALU and its adder |
| `rtl/thumb_shifter.sv` | barrel shifter |
| `rtl/thumb_shiftsel.sv`, `rtl/thumb_rand2sel.sv`, `rtl/thumb_regsel.sv`, `rtl/thumb_alusel.sv`, `rtl/thumb_perhaps.sv`, `rtl/thumb_cond.sv` | control multiplexers and condition logic |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Verification

Every testbench checks itself and ends with a line
`TB_RESULT checks=N failures=M`.

* **`tb_thumb_core`** is the broadest test. It runs about 300 random programs
  against a separate reference model written in the testbench. The model
  decodes each instruction format with a direct switch, not the tables, and
  shifts one bit at a time. Each program fills all 16 kB with random
  instructions and presets random registers. After every clock the test
  compares all registers, the flags, `halted` and `fault`. The run also has to
  take taken and untaken branches, loads, stores, bl, blx, halts and each kind
  of fault.
* **`tb_thumbsim`** runs a hand-assembled program on the full-size machine.
  The program sums an array, calls a factorial routine 12 kB away with bl,
  uses shift carries, adc, a literal pool and the stack, and returns to MAGIC.
  The test checks the results in registers and memory. It also requires
  exactly 69 clocks for the 69 instructions executed. Three more short
  programs trigger each fault code.
* The leaf modules are checked exhaustively or on random inputs against
  arithmetic written independently.

To simulate with plain Verilator, for example:

```
verilator --binary --timing -Irtl rtl/thumb_pkg.sv tb/tb_thumbsim.sv --top-module tb_thumbsim
./obj_dir/Vtb_thumbsim
```

## Where this design makes its own choices

The reference behaviour fixes most of the machine. The points below are
choices made here:

* **Errors.** The original stops the whole simulation on an error. Here the
  machine raises the sticky `fault` output, with a cause code, instead. The
  range checks use "at or beyond MEMSIZE" rather than "beyond MEMSIZE", so
  the address equal to MEMSIZE is also caught.
* **Unimplemented opcodes.** What such an opcode does is not defined. Here it
  raises fault code 3.
* **Image loading and register arguments.** In the original, a host program
  reads an image file and command-line values. Here the top has load and
  register-preset ports, and the machine-state printout becomes the
  `pc`/`flags`/`regs` outputs.
* **Flags and registers at reset.** The flags reset to 0, and r0-r12 reset
  to 0 unless preset.
* **Memory.** Both memory reads are asynchronous, which a single-cycle machine
  needs. A real implementation would use a register-file-style memory or split
  the cycle.
* **Shift distance by register.** It is the low 8 bits of the register, so
  shifts by 32 or more follow the rules above.
* **Rotation by a multiple of 32.** It returns the value unchanged, with the
  carry taken from bit 31.
* **Encodings.** The numeric values of the internal control enumerations are
  arbitrary. The condition codes are fixed by the instruction encoding.
