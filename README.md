# Single-cycle MIPS subset processor

This is a small 32-bit MIPS processor. It fetches, decodes, executes and
retires one instruction per clock edge. The control is purely
combinational: no state machine, no pipeline registers. The program counter,
the register file and the data memory are the only state. This makes the
design easy to follow. The cost is a clock period long enough for the
slowest instruction: a load reads the register file, adds in the ALU, reads
data memory and writes the register file, all in one cycle.

The design is written for simulation and for an FPGA board (Terasic DE2).
On the board, seven-segment displays show what the processor is doing.

## Instruction set

| Class      | Instructions                                   | Opcode / funct (hex)          |
|------------|------------------------------------------------|-------------------------------|
| R-type ALU | add, addu, sub, subu, and, or, xor, nor, slt, sltu | op 00; funct 20, 21, 22, 23, 24, 25, 26, 27, 2A, 2B |
| Immediate  | addi                                           | 08                            |
| Loads      | lw, lh, lhu, lb, lbu                           | 23, 21, 25, 20, 24            |
| Stores     | sw, sh, sb                                     | 2B, 29, 28                    |
| Control    | beq, j                                         | 04, 02                        |

The encodings are the standard MIPS32 ones. Some behaviours differ from a
full MIPS:

- No exceptions. add/addu and sub/subu behave the same (overflow is
  ignored).
- Misaligned addresses are not trapped.
- There are no branch delay slots. The instruction after a taken branch or
  jump is not executed.

Any other opcode does nothing, apart from advancing the PC. An R-type word
with an unknown funct code writes rs + rt to rd. The all-zero word
(`sll $0,$0,0`) is therefore still a no-op, because `$0` cannot be written.

## Structure

```
mips_de2_top                board wrapper: displays + LED
 ├─ MIPSsubset cpu          processor + memories
 │   ├─ mips mips           core
 │   │   ├─ controller c    combinational control
 │   │   │   ├─ maindec md  opcode -> control bundle + ALUOp
 │   │   │   ├─ aludec ad   ALUOp + funct -> ALU operation
 │   │   │   └─ pcsrc = branch & zero
 │   │   └─ datapath dp
 │   │       ├─ flopr pcreg program counter
 │   │       ├─ regfile rf  32 x 32, 2 read / 1 write
 │   │       ├─ alu alu_i
 │   │       └─ memalign ma byte/halfword steering
 │   ├─ imem imem           64-word program ROM, combinational read
 │   └─ dmem dmem           64-word RAM, combinational read, byte-lane write
 └─ hex7seg g_hex[0..7].dec
```

Shared types are in `mips_pkg`:

- the opcode and funct enums
- the ALUOp and ALU operation enums
- the `ctrl_t` control bundle

### One cycle, start to end

1. `pc` addresses `imem`, which returns `instr` combinationally.
2. The controller decodes `instr[31:26]` and `instr[5:0]`.
3. The register file is read at rs (`instr[25:21]`) and rt (`instr[20:16]`).
4. ALU operand B is either rt or the sign-extended 16-bit immediate
   (`alusrc`).
5. The ALU result is either written back or used as the data address.
   For a store, `memalign` positions the rt value in the right byte lanes
   and sets the lane write enables. For a load, it extracts and extends the
   addressed byte or halfword from the word `dmem` returns.
6. The write-back value is the ALU result or the load data (`memtoreg`).
   It goes to rd for R-type instructions and to rt otherwise (`regdst`).
7. On the rising edge, these are all written: the PC, the register file
   (if `regwrite`) and the data memory lanes (if a store).

### Next PC

| Condition                | Next PC                                   |
|--------------------------|-------------------------------------------|
| `jump`                   | `{PC+4[31:28], instr[25:0], 2'b00}`       |
| `branch & zero` (PCSrc)  | `PC+4 + (sign-extended immediate << 2)`   |
| otherwise                | `PC+4`                                    |

beq works as follows:

- The ALU decoder is told to subtract (ALUOp 01).
- The ALU's `zero` flag shows that rs equals rt.
- One AND gate in the controller combines it with `branch`.

The PC resets asynchronously to 0.

## The control unit

The control unit has two levels of decoding. Both levels are combinational.

**Main decoder** (`maindec`): opcode → control bundle.

| Instr. | regwrite | regdst | alusrc | branch | memwrite | memtoreg | jump | ALUOp | size / signed |
|--------|:-:|:-:|:-:|:-:|:-:|:-:|:-:|:--:|:--|
| R-type | 1 | 1 | 0 | 0 | 0 | 0 | 0 | 10 | –            |
| addi   | 1 | 0 | 1 | 0 | 0 | 0 | 0 | 00 | –            |
| beq    | 0 | 0 | 0 | 1 | 0 | 0 | 0 | 01 | –            |
| j      | 0 | 0 | 0 | 0 | 0 | 0 | 1 | 00 | –            |
| lw     | 1 | 0 | 1 | 0 | 0 | 1 | 0 | 00 | word         |
| lh/lhu | 1 | 0 | 1 | 0 | 0 | 1 | 0 | 00 | half, signed / unsigned |
| lb/lbu | 1 | 0 | 1 | 0 | 0 | 1 | 0 | 00 | byte, signed / unsigned |
| sw/sh/sb | 0 | 0 | 1 | 0 | 1 | 0 | 0 | 00 | word / half / byte |

**ALU decoder** (`aludec`): what it does depends on ALUOp.

- ALUOp 00 means add. It is used for address calculation and addi.
- ALUOp 01 means subtract. It is used for beq.
- ALUOp 10 passes the choice to the funct field.

Immediate assertions in `controller` flag a decode that both stores and
writes a register, or that is both a branch and a jump.

The 4-bit ALU operation codes in `mips_pkg::aluctl_e` are internal and can
be renumbered freely.

## Memories and byte order

Both memories hold 32-bit words. Both use byte address bits `[7:2]` (64 words
each by default), so addresses wrap every 256 bytes. The depths are
parameters of `MIPSsubset`.

The data memory has one write enable per byte lane. Memory is **big-endian**,
as MIPS is by default: byte offset 0 is bits 31:24.

- `sb` copies the low byte of rt into all four lanes and enables one lane.
- `sh` copies the low halfword into both halves and enables one half.
- `lb`/`lbu` and `lh`/`lhu` pick the addressed byte or halfword. They
  sign-extend it or zero-extend it.
- For halfwords, address bit 0 is ignored. For words, bits 1:0 are ignored.

The instruction memory is filled at start-up from a hex file, one word per
line. It is given by the `MEMFILE` parameter, and the default is
`rtl/mips_test.hex` (relative to the directory the simulator is started from).
Words the file does not provide read as 0, which is a no-op. The data memory
starts at zero. The registers have no reset, so write a register before you
read it.

## The test program

`rtl/mips_test.hex` holds the classic 18-word test for this kind of
processor. Its assembly is given as comments in the file. It executes 16
instructions. Along the way it uses every basic mechanism:

- addi and the R-type operations
- a beq that is not taken, and a beq that is taken
- a jump that skips an instruction
- a store followed by a load of the same word

With the clock starting high, a 10 ns period and reset released at 22 ns, the
ALU result (`dataadr`) takes these values, one per cycle:

```
05 0c 03 07 04 0b 08 00 00 01 0c 07 50 50 00 54
```

The program stores 7 to byte address 0x50 (80) and then 7 to address 0x54
(84). The second store is the instruction at 0x44, in the 16th cycle. "7
stored at 84" is the pass condition. On the board, the last step shows
`07 54 0044`.

`tb/mips_ext_test.hex` is a second program. It exercises the instructions
beyond that set: nor, xor, sltu, addu, subu, sb, sh, lb, lbu, lh and lhu. It
ends in a `j` to itself.

## Board wrapper

`mips_de2_top` runs the processor from its `clk` input. On the board, drive
it from a debounced push-button to step the program one instruction per
press. The displays show the following (active-low segments; `hex[i]` drives
display HEXi):

| Displays  | Value                                     |
|-----------|-------------------------------------------|
| HEX7–HEX6 | `writedata[7:0]`, the value a store writes |
| HEX5–HEX4 | `dataadr[7:0]`, the data address / ALU result |
| HEX3–HEX0 | `pc[15:0]`                                |

`ledr[0]` lights during a store. Which value goes on which display is a
choice you can change. The pin assignment and any clock divider or debouncer
are left to the board project.

## Timing

Everything between two clock edges is combinational. The longest paths run
in two places:

- from the data memory's read port, through the load multiplexers, into the
  register file write port
- from the PC register, through instruction fetch, the register file and the
  ALU, to the data-memory address

A Cyclone II implementation of this organisation has met a 9 ns clock. At
that period, the 15-to-16-instruction test program finishes in roughly
135–145 ns. Byte steering adds a little logic to the load path compared with
a word-only design.

## Simulating

Every testbench in `tb/` checks itself. Each one prints
`TB_RESULT checks=N failures=M` and calls `$finish`. Run it from the
directory that contains `rtl/` and `tb/`, because the memory files are named
relative to it:

```
verilator --binary --timing --top-module mips_de2_top_full_tb \
    -y rtl -y tb +libext+.sv rtl/mips_pkg.sv tb/mips_de2_top_full_tb.sv
./obj_dir/Vmips_de2_top_full_tb
```

| Testbench               | What it shows |
|-------------------------|---------------|
| `mips_de2_top_full_tb`  | The board top at default settings runs the test program. It checks both stores, the cycle of the last one and the display contents. |
| `mips_de2_top_tb`       | Two boards run side by side: the test program and the extended program. It checks the first board's displays at every store. It also counts R-type operations, addi, taken and untaken branches, jumps, word and sub-word loads and stores, and fails if any of them never happens. |
| `MIPSsubset_tb`         | The processor with its memories. It checks the PC and the ALU result in every cycle against the sequence above, and applies the store check. |
| `mips_tb`               | The core with testbench memories runs the extended program. It checks every stored result. |
| `datapath_tb`           | The datapath with hand-driven controls. It checks write-back, loads, byte stores, and forward and backward branches and jumps. |
| `controller_tb`, `maindec_tb`, `aludec_tb` | Decoding, exhaustive over opcode or funct. |
| `alu_tb`, `regfile_tb`, `flopr_tb`, `memalign_tb`, `imem_tb`, `dmem_tb`, `hex7seg_tb` | Unit tests against reference models. |

Verilator is two-state. Unwritten registers start at arbitrary values, and
that is harmless for these programs.

## Design choices not fixed by the architecture

- The ALU operation encoding and the `ctrl_t` field set.
- Memory depths of 64 words, and the file loading of the instruction memory.
- Byte-lane enables and big-endian lane order for sb/sh/lb/lh.
- No reset of the register file; the PC resets asynchronously to 0.
- Unknown opcodes act as no-ops. Unknown R-type funct codes add.
- `MIPSsubset` has an extra `pc` output. It comes after the five usual ports
  (`clk`, `reset`, `writedata`, `dataadr`, `memwrite`), so positional
  instantiation with five ports still works.
- The display assignment of the board wrapper.
