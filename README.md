# SHA3-256 on a five-stage pipelined MIPS

This is a small 32-bit MIPS processor, the textbook five-stage pipeline, with
only the instructions a SHA3-256 (Keccak) program needs. The hash is not a
hardware accelerator: it is software, and the processor is kept as plain as
possible. There is no forwarding and no hazard detection, branches are
decided in the MEM stage, and there are no flushes. The program is scheduled
around the pipeline instead, so the hardware stays a straight datapath with
no interlock logic at all.

The SystemVerilog is synthesizable and passes Verilator lint and a second
SystemVerilog front end without errors. A testbench loads the
SHA3-256 program and hashes messages of 0, 1 and 2 blocks. Every digest
matches an independent reference model and published SHA3-256 values.

## Datapath

```
 IF                 ID                       EX                        MEM                 WB
 PC ─► imem ─► IF/ID ─► control ─► ID/EX ─► ALU control, ALU ─► EX/MEM ─► dmem ─► MEM/WB ─► MemtoReg mux
 │  └► +4 adder       regfile (rs,rt)        ALUSrc mux, RegDst mux     pc_src            │
 │                     sign_extend           branch_target (<<2 + add, or jump)            │
 └◄──────────── PCSrc mux ◄──────────── target, PCSrc from MEM ◄──────────────────────────┘
                       ▲──────────────── register write (WB) ─────────────────────────────┘
```

| Module | Stage | Role |
|---|---|---|
| `pc_reg` | IF | program counter, resets to 0 |
| `imem` | IF | instruction memory, 1024 words, asynchronous read, load port |
| `adder` | IF | PC + 4 |
| `mux2` | IF/EX/WB | PCSrc, ALUSrc, RegDst (5 bits) and MemtoReg selections |
| `if_id_reg`, `id_ex_reg`, `ex_mem_reg`, `mem_wb_reg` | between stages | pipeline registers, struct-typed (`mips_pkg`) |
| `control` | ID | opcode to the EX / M / WB control groups |
| `regfile` | ID/WB | 32 × 32 bits, 2 read and 1 write port, `$0` = 0, write-through |
| `sign_extend` | ID | 16 to 32 bits |
| `alu_control` | EX | ALUOp + funct to ALU operation |
| `alu` | EX | add, sub, and, or, xor, nor, slt, sllv, srlv, Zero flag |
| `branch_target` | EX | PC+4 + (offset << 2), or pseudodirect jump target |
| `pc_src` | MEM | PCSrc = (beq & Zero) \| (bne & !Zero) \| j |
| `dmem` | MEM | data memory, 1024 words, plus a host port |
| `sha3_mips` | top | wires all of the above |

The control word is decoded once, in ID. It then travels with its
instruction in three groups, as in the classic design. EX is RegDst, ALUSrc
and ALUOp. M is Branch, Bne, Jump, MemRead and MemWrite. WB is RegWrite and
MemtoReg. Each stage uses its own group and passes the rest on.

## The timing contract software must keep

This is the part that matters most when writing code for this core. The
hardware does not protect the program from its own pipeline.

**Data hazards.** A result is written in WB. The register file passes a value
written in a cycle straight through to a read in the same cycle
(write-through). An instruction in ID therefore sees the result of the
instruction three places ahead of it, and not that of the one or two just
before. Loads follow the same rule. So a consumer must come **at least three
instructions after** its producer. The directed test checks this:

```
addi $1, $0, 5
addi $2, $1, 1     # $2 = 1  (old $1)
addi $3, $1, 1     # $3 = 1  (old $1)
addi $4, $1, 1     # $4 = 6
```

**Control hazards.** `beq`, `bne` and `j` take effect when they reach MEM. By
then the next three instructions have already been fetched. They are never
squashed, so every control transfer has **three delay slots that always
execute**. The jump resolves in MEM as well, so all control transfers behave
the same way.

The testbench assembler (`tb/mips_asm_pkg.sv`) keeps both rules for you. It
inserts nops ahead of any instruction that reads a register written by one of
the two instructions before it. It also puts three nops after each branch and
jump. Its raw mode turns this off for directed tests.

## Instruction subset

| Class | Instructions | Addressing |
|---|---|---|
| R-type | `add sub and or xor nor slt sllv srlv` | register |
| I-type | `addi` | immediate (sign-extended) |
| memory | `lw sw` (word only) | base + offset |
| branch | `beq bne` | PC-relative |
| jump | `j` | pseudodirect `{PC+4[31:28], index, 00}` |

All encodings are standard MIPS32. Anything else decodes to an all-zero
control word and acts as a nop. The word `0x00000000` is also a nop: it is
an `add` into `$0`. There are no byte or halfword accesses, no `lui`, no
immediate logic operations, no constant shifts, no `jal`/`jr` and no
exceptions. The variable shifts (`sllv`/`srlv`) shift `rt` by `rs[4:0]`.

## How the hash runs

The program lives in `tb/sha3_prog_pkg.sv`. It is built with the assembler
package, takes 287 words with the scheduling nops, and uses this data memory
layout (byte addresses):

| Address | Contents |
|---|---|
| `0x000` | Keccak state, 25 lanes of 64 bits, lane (x,y) at `8*(x+5y)`, low half first |
| `0x0C8` | rho/pi output (B) |
| `0x190` | theta column parities C[4], C[0..4], C[0] (wrapped, so x±1 needs no modulo) |
| `0x1C8` | theta D[0..4] |
| `0x1F0` | 24 round constants |
| `0x2B0` | one 5-word entry per lane for rho/pi: destination offset, n, 31−n, offsets of the "high" and "low" halves |
| `0x4A4` | chi offsets of lanes x+1 and x+2 |
| `0x4CC` | digest, 8 words (little-endian bytes, as in FIPS 202) |
| `0x4EC` | number of blocks; `0x4F0` DONE flag |
| `0x500` | padded message blocks, 136 bytes each (up to 20) |

The program runs in four steps:

1. It clears the state.
2. For each block, it XORs the 17 rate lanes into the state and runs
   Keccak-f[1600]: 24 rounds of theta, rho and pi, chi, and iota.
3. It copies the first 256 bits of the state to the digest area.
4. It writes 1 to DONE and spins.

A 64-bit lane lives in two 32-bit registers, so each rotation is built from
shifts. A rotation by n ≥ 32 is a half swap plus a rotation by n − 32, and the
table does the swap by choosing which half is loaded as "high". The term
`lo >> (32−n)` is computed as `(lo >> 1) >> (31−n)`, which is also right for
n = 0, so the rotation code has no branches. Chi uses `nor x, x, $0` as NOT.

The host computes the tables and places them. They follow the FIPS 202
definitions:

- **Round constants:** bit 2^j − 1 of round i is the output of the LFSR
  x⁸+x⁶+x⁵+x⁴+1 at step j + 7i.
- **rho offsets:** (t+1)(t+2)/2 mod 64 along the walk (x,y) ← (y, 2x+3y mod 5),
  starting at (1,0).
- **pi:** moves lane (x,y) to (y, 2x+3y mod 5).

The host also does the padding (`0x06 … 0x80`), because the subset has no
byte stores.

**Cost.** Run time is data independent:

| Run | Cycles from reset release |
|---|---|
| no block (setup and squeeze only) | 618 |
| one block | 73,060 |
| two blocks | 145,502 |

That is 72,442 cycles per block, about 3,000 per round. At a 10 ns clock one
136-byte block takes about 0.72 ms, roughly 1.5 Mbit/s. Many of the cycles are
nops kept for the hazard rules. Filling delay slots and interleaving independent
lanes would remove many of them.

## Using the top module

`sha3_mips #(IMEM_WORDS = 1024, DMEM_WORDS = 1024)`:

| Port | Use |
|---|---|
| `clk`, `reset` | rising-edge clock; synchronous active-high reset clears PC, pipeline registers and register file (not the memories) |
| `imem_we`, `imem_waddr`, `imem_wdata` | write one program word (word index) |
| `host_dmem_we`, `host_dmem_addr`, `host_dmem_wdata`, `host_dmem_rdata` | second data-memory port (byte address, word access); asynchronous read |
| `pc`, `pcnext`, `instr`, `aluout`, `dataadr`, `writedata`, `memwrite`, `readdata` | observation of IF, EX and MEM |

A hash run has four steps:

1. Hold `reset` and load the program.
2. Write the tables, the padded blocks and the block count, and clear DONE.
3. Release `reset`.
4. Poll DONE through the host port, then read the 8 digest words.

If both data-memory ports write the same word in the same cycle, the
processor's write wins. Both memories are arrays that start at zero. Reads
past the end return 0.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). The
expected values are computed independently: plain operators, shadow arrays,
the MIPS32 control table, or exhaustive input sets. `tb_sha3_mips` runs the
whole design at its default sizes:

- The directed program checks hazard distances and the three delay slots.
- The SHA3-256 program hashes the empty message, `"welcom"`, a 135-byte
  message (the case where the single-byte pad is 0x86) and a random 200-byte
  message (two blocks).
- Each digest is compared with the reference model in `tb/sha3_ref_pkg.sv`.
  For `""` and `"welcom"` it is also compared with the published values
  `a7ffc6f8…434a` and `29c7661a…875c`.
- It checks the cycle counts above for data independence.
- It counts taken and not-taken `beq` and `bne`, jumps, loads, stores,
  register write-through events and host writes, and fails if any count is
  zero.

To simulate with Verilator, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing -Irtl -Itb -y rtl +libext+.sv \
  rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/sha3_ref_pkg.sv tb/sha3_prog_pkg.sv \
  tb/tb_sha3_mips.sv --top-module tb_sha3_mips -o sim && ./obj_dir/sim
```

A unit test needs only `rtl/mips_pkg.sv` and its `tb/tb_<module>.sv` with the
same `-y rtl -Itb` options. Each testbench prints
`TB_RESULT checks=N failures=M` at the end.

## What follows the source design and what does not

**Follows the source design:**

- the five stages and their names
- the datapath blocks and the four pipeline registers
- the EX/M/WB grouping of the control signals
- the branch decision in MEM through a Branch-and-Zero gate
- the byte-addressed word memory
- the five MIPS addressing modes
- the waveform signal names used for the observation ports
- SHA3-256 as the hash, with the sponge construction (absorb, then squeeze)

**This design's own choices:**

- the exact instruction subset, including `bne` and `j` and the jump resolving
  in MEM
- write-through in the register file
- the memory sizes
- the host ports and synchronous reset
- padding and table setup done by the host
- the whole SHA3-256 program and its memory layout

**Differences from the reported results.** The original implementation
reported:

- completion of a one-block SHA3-256 in 103 clocks (1030 ns at 10 ns)
- a digest for `"welcom"` beginning `3f0d883a`

A full 24-round Keccak-f[1600] run as software on a 32-bit datapath cannot
finish in about a hundred cycles: this core needs 73,060. The standard
SHA3-256 of `"welcom"` is `29c7661a…875c`, and that is what this design
computes and is tested against.

The FPGA figures (Spartan-6 utilisation, 0.037 W, 250 Mbit/s) belong to that
implementation. They were not reproduced here.
