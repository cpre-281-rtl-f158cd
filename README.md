# i281: an 8-bit teaching CPU in SystemVerilog

The i281 is a small 8-bit processor meant to be understood completely, gate by
gate. Every part is a textbook part. There are parallel-access registers built
from D flip-flops, 2-to-1 and 4-to-1 bus multiplexers, a decoder, and a table
of control lines. The whole machine fits in 144 bytes of memory. This RTL
builds the complete CPU: program counter, code memory with a BIOS half, opcode
decoder, control logic, four registers, ALU, flags, data memory, and a video
card that shows data memory on eight 7-segment displays.

It executes **one instruction per clock cycle**. Nothing is pipelined, and
there are no stalls or multi-cycle operations. During a cycle the instruction
at the PC flows combinationally through decoder, control, register read, ALU
and memories. On the rising edge every state element that is enabled updates
at once: PC, registers, flags, data memory and code memory.

## Machine model

| Resource | Size | Notes |
|---|---|---|
| Registers | A, B, C, D, 8 bits | two read ports, one write port |
| Flags | ZF, NF, OF | written only by ADD, ADDI, SUB, SUBI, SHIFTL, SHIFTR, CMP |
| Data memory | 16 × 8 | bytes 0–7 are also the display memory |
| Code memory | 64 × 16 | 0–31 BIOS (read-only), 32–63 user code |
| PC | 6 bits | resets to 0 (first BIOS word) |
| Inputs | 16 code switches, 8 data switches | plain input ports |

### Instruction format

```
 15   12 11 10 9  8 7             0
+-------+-----+----+---------------+
|opcode |  X  | Y  |  imm / addr   |
+-------+-----+----+---------------+
```

X and Y name registers (00 A, 01 B, 10 C, 11 D). For some opcodes, Y instead
selects a variant of the instruction.

| Opcode | Instruction | Effect |
|---|---|---|
| 0000 | NOOP | — |
| 0001, Y=00 | INPUTC addr | code[addr] ← code switches (BIOS mode only) |
| 0001, Y=01 | INPUTCF X,off | code[X+off] ← code switches (BIOS mode only) |
| 0001, Y=10 | INPUTD addr | data[addr] ← data switches |
| 0001, Y=11 | INPUTDF X,off | data[X+off] ← data switches |
| 0010 | MOVE X,Y | X ← Y + imm (imm is 0 in a plain move) |
| 0011 | LOADI / LOADP X,imm | X ← imm |
| 0100 / 0110 | ADD / SUB X,Y | X ← X ± Y, flags |
| 0101 / 0111 | ADDI / SUBI X,imm | X ← X ± imm, flags |
| 1000 | LOAD X,addr | X ← data[addr] |
| 1001 | LOADF X,[Y+off] | X ← data[Y+off] |
| 1010 | STORE addr,X | data[addr] ← X |
| 1011 | STOREF [Y+off],X | data[Y+off] ← X |
| 1100, I8=0/1 | SHIFTL / SHIFTR X | X ← X<<1 / X>>1 (zero fill), flags |
| 1101 | CMP X,Y | flags of X − Y |
| 1110 | JUMP off | PC ← PC+1+off |
| 1111, Y=00/01/10/11 | BRE/BRZ, BRNE/BRNZ, BRG, BRGE off | branch if condition holds |

A branch offset is I5..I0, read as two's complement (−32..+31). The conditions
use the stored flags. BRE takes ZF, BRNE takes ¬ZF, BRG takes ¬ZF ∧ (NF ≡ OF),
and BRGE takes NF ≡ OF. These are signed comparisons after a CMP.

## The control word

The center of the design is the control table. Each instruction drives 18
control lines, C1..C18. The lines are gathered in `i281_pkg::ctrl_t` in table
order:

| Line | Name | 0 selects | 1 selects |
|---|---|---|---|
| C1 | IMEM_WRITE_ENABLE | — | write code memory |
| C2 | PROGRAM_COUNTER_MUX | PC+1 | PC+1+offset |
| C3 | PROGRAM_COUNTER_WRITE_EN | — | load PC (every instruction) |
| C4,C5 | REGISTERS_PORT0_SELECT | register for ALU input a | |
| C6,C7 | REGISTERS_PORT1_SELECT | register for ALU b / store data | |
| C8,C9 | REGISTERS_WRITE_SELECT | destination register | |
| C10 | REGISTERS_WRITE_ENABLE | — | write register |
| C11 | ALU_SOURCE_MUX | register port 1 | immediate |
| C12,C13 | ALU_SELECT | 00 shl, 01 shr, 10 add, 11 sub | |
| C14 | FLAGS_WRITE_ENABLE | — | store ZF/NF/OF |
| C15 | ALU_RESULT_MUX | ALU output | immediate |
| C16 | DMEM_INPUT_MUX | register port 1 | data switches |
| C17 | DMEM_WRITE_ENABLE | — | write data memory |
| C18 | REG_WRITEBACK_MUX | ALU result mux | data memory |

Five 2-to-1 bus multiplexers carry all the data steering. Four are 8 bits wide
(C11, C15, C16, C18) and one is 6 bits wide (C2). The output of the C15 mux is
the machine's single address bus. It addresses data memory (low 4 bits) and
code-memory writes (low 6 bits), and it is also the value written back by
LOADI. So "address = immediate" (LOAD, STORE, INPUTC, INPUTD) and
"address = register + offset" (LOADF, STOREF, INPUTCF, INPUTDF) differ only in
C15 and C11. In the second group the ALU adds the offset.

```
 PC ──> code memory ──> opcode decoder ──> control logic ──> C1..C18
                                                ^ flags
 regs port0 ───────────────────────────> ALU a ─┐
 regs port1 ──┬─[C11]── imm ───────────> ALU b  │
              │                                 v
              │              imm ──[C15]── ALU result ──┬──> data mem addr
              │                                         ├──> code mem write addr
 data switches ──[C16]── port1 ──> data mem write data  │
 data mem read data ──[C18]─────────────────────────────┴──> register write data
```

## BIOS mode and user mode

Code memory is split into two halves. The BIOS half (0–31) is a ROM given by a
parameter. The user half (32–63) is built from 16-bit registers. The user half
can be written from the code switches, but only in BIOS mode. In user mode
INPUTC and INPUTCF still run, but the write is dropped. In this design the CPU
is in **BIOS mode exactly while the PC is in the BIOS half**. A BIOS program
can therefore load a user program from the switches and then jump to address
32. Once it has jumped, the user program cannot modify itself. After reset the
PC is 0. With the default all-NOOP BIOS, the CPU runs straight through into
the user program.

## Video card

Data bytes 0–7 drive displays 0–7. A store shows up on the display in the same
clock edge that executes it.

- **Normal mode:** each display shows the hex digit of its byte's low 4 bits.
  Bits 7..4 are free for the program's use.
- **Video game mode** (`video_game_mode` = 1): bit *k* (0–6) lights segment
  *k* directly, and bit 7 is unused. Segments are numbered 0 top, 1 upper
  right, 2 lower right, 3 bottom, 4 lower left, 5 upper left, 6 middle. For
  example, the bytes 0x79, 0x54, 0x5E draw "E", "n", "d".

Segment outputs are active high (1 = lit). Invert them for a common-anode
board.

## Files

| File | Block |
|---|---|
| `rtl/i281_pkg.sv` | types, opcodes, `ctrl_t`, default memory contents |
| `rtl/i281_cpu.sv` | top level: the whole CPU, memories and video card |
| `rtl/program_counter.sv` | PC register, incrementer, branch adder, 6-bit PC mux |
| `rtl/code_memory.sv` | BIOS ROM + user code registers |
| `rtl/opcode_decoder.sv` | I15..I8 → one line per instruction |
| `rtl/control_logic.sv` | instruction line + X/Y + flags → C1..C18 |
| `rtl/register_file.sv` | registers A–D, two read ports, one write port |
| `rtl/alu.sv` | shl / shr / add / sub, ZF NF OF |
| `rtl/flags_register.sv` | 3-bit flag store |
| `rtl/data_memory.sv` | 16 × 8 register-file memory |
| `rtl/video_card.sv`, `rtl/hex7seg.sv` | display drivers |
| `rtl/par_reg.sv`, `rtl/bus_mux2.sv`, `rtl/bus_mux4.sv` | building blocks |

Top-level parameters of `i281_cpu`:

- `BIOS_INIT` (32 words, default all NOOP).
- `USER_CODE_INIT` (32 words). The default is an example program that sums
  1..mem[0] into B and stores the sum at data address 2.
- `DMEM_INIT` (16 bytes, default mem[0] = 5).

Reset is active high and asynchronous. It clears the PC, registers and flags,
and reloads both memories from these parameters. The outputs `pc`, `regs` and
`flags` are there for observation only.

## Simulating

Every block has a self-checking testbench `tb/tb_<block>.sv` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/i281_pkg.sv tb/tb_i281_cpu.sv --top-module tb_i281_cpu -o sim
./obj_dir/sim
```

The CPU-level testbenches are:

- `tb_i281_full` runs the default configuration untouched. It checks the sum
  (15), the displays, and that the final STORE retires on cycle 63
  (32 BIOS NOOPs + 3 + 5 loop passes × 5 + 2 + 1).
- `tb_i281_cpu` is end to end. A BIOS loader copies a 28-word program in from
  the code switches (the testbench acts as the operator) and reads both data
  inputs. The program bubble-sorts the array 7 3 2 1 6 4 5 8, then runs every
  remaining instruction, including an overflowing ADD and a user-mode INPUTC
  that must be refused. The testbench counts each instruction, taken and
  untaken branches, accepted and refused code writes, and overflow, and checks
  both display modes.
- `tb_i281_video` draws "End" in video game mode.

To run your own program, pass it as `USER_CODE_INIT` (and optionally
`BIOS_INIT` and `DMEM_INIT`). The small `enc()` helper in `tb/tb_i281_cpu.sv`
assembles instructions.

## What follows the original design and what does not

These parts follow the original design:

- The list of components, the memory sizes and the BIOS/user split.
- The 18 control lines and their value for every instruction.
- The branch conditions.
- The register and bus-mux circuits.
- The display memory map and the game-mode segment numbering.

The following are this implementation's choices, because the original gives
no details for them:

- **Opcode numbers and field positions.** The Y field's position (I9..I8) is
  given. The opcode values, the X field in I11..I10, and the sub-opcode bits
  are chosen here. They agree with the instruction words of the published
  example program, whose loop closes with an unconditional JUMP.
- **Branch arithmetic.** Targets are PC+1+offset with a 6-bit signed offset.
- **INPUTD control row.** INPUTD sets C15, C16 and C17, which stores the
  data switches at the immediate address.
- **ALU details.** Shifts move one bit with zero fill, and shifts clear OF.
  OF is signed overflow for add and subtract.
- **Mode selection.** BIOS mode means PC < 32. Video game mode is an input
  pin.
- **Initial state.** Memories reload their initial contents on reset. The
  default BIOS is empty (all NOOP).
- **Display polarity.** Segments are active high, and game mode uses bits 6..0
  only.
- **Timing.** The single-cycle timing is an inference from the all-register,
  all-combinational datapath. No cycle counts are given.

The PONG game is not included. It is a program, and its code is not
available; its paddle would simply be one of the data switches.
