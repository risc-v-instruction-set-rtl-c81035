# djb2 hash instruction for RISC-V

Blockchains hash their records all the time. A simple blockchain can hash each
block with the djb2 string hash:

    hash = 5381
    for each character c:  hash = hash * 33 + c      (33 * h computed as (h << 5) + h)

On a plain RISC-V core, each character costs a load, a shift, two adds and
the sign-extension moves the compiler inserts around them. This design folds
the whole hash step into **one R-type instruction**:

    djb2 rd, rs1, rs2        rd = (rs1 << 5) + rs1 + rs2

Here `rs1` holds the running hash (5381 before the first character), `rs2` holds
the current character and `rd` receives the new hash. Software then hashes a
string with one `djb2` per character. It feeds each result back as the next
`rs1`, until it reaches the terminating zero byte.

The RTL here is the execution side of that extension. It is a small unit that
sits next to a RISC-V core's integer ALU. It recognises the instruction,
computes the hash step and returns a register write. The core itself (fetch,
register file, memory) is not part of this design.

## Instruction encoding

`djb2` uses the **custom-1** major opcode, which the RISC-V base opcode map
reserves for vendor extensions. In the opcode map that is row `inst[6:5] = 01`,
column `inst[4:2] = 010`, with `inst[1:0] = 11`.

| bits   | 31:25   | 24:20 | 19:15 | 14:12  | 11:7 | 6:0       |
|--------|---------|-------|-------|--------|------|-----------|
| field  | funct7  | rs2   | rs1   | funct3 | rd   | opcode    |
| value  | 0000001 | any   | any   | 000    | any  | 0101011   |

Equivalently, a word `w` is `djb2` when `(w & 32'hfe00707f) == 32'h0200002b`.
For example, a compiler emits `32'h02f707ab` for `djb2 a5, a4, a5`
(rd = x15, rs1 = x14, rs2 = x15).

All other custom-1 words are left unimplemented. The unit flags them so the
core can trap them as illegal instructions.

## Blocks

```
                issue_instr ──► djb2_decoder ──► is_djb2 / is_custom1 / rd
                                                     │
 issue_rs1_val ─┐                                    ▼
                ├─► djb2_alu ──► result ──► [ write-back register ] ──► wb_valid, wb_rd, wb_data
 issue_rs2_val ─┘                 (rs1<<5)+rs1+rs2
```

| file | what it is |
|------|------------|
| `rtl/djb2_pkg.sv` | Encoding constants (`DJB2_MATCH`, `DJB2_MASK`, custom-1 opcode, funct fields), seed 5381, shift 5, and the decode struct `dec_t`. |
| `rtl/djb2_alu.sv` | Combinational hash step: a fixed shift by 5 and two adders, with no multiplier. Parameter `XLEN` (default 64). |
| `rtl/djb2_decoder.sv` | Combinational match of opcode/funct3/funct7, and extraction of rd/rs1/rs2 from their R-type positions. |
| `rtl/djb2_ise.sv` | Top level. Decoder plus ALU plus one write-back register stage. Parameter `XLEN` (default 64). |

### Top-level interface (`djb2_ise`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears `wb_valid`) |
| `issue_valid` | in | 1 | the core issues an instruction this cycle |
| `issue_instr` | in | 32 | the instruction word |
| `issue_rs1_val`, `issue_rs2_val` | in | XLEN | operand values the core read (with its own forwarding) |
| `claim` | out | 1 | combinational: the word is `djb2` and this unit executes it |
| `unimpl` | out | 1 | combinational: a custom-1 word that is not `djb2` |
| `wb_valid`, `wb_rd`, `wb_data` | out | 1, 5, XLEN | write request to the register file |

Timing:

- A claimed instruction's result appears on `wb_*` on the next clock edge.
- A new `djb2` may be issued every cycle, with no back-pressure.
- A back-to-back chain of `djb2`s hashes one character per cycle, provided the
  core forwards `wb_data` into `issue_rs1_val`.
- A `djb2` with `rd = x0` executes but raises no `wb_valid`.

Assertions in `djb2_ise` check three rules:

- `claim` implies the full encoding.
- No write to x0 is ever requested.
- `claim` and `unimpl` are never both high.

## Width and overflow

The target is a 64-bit RISC-V core, so `XLEN` defaults to 64. The arithmetic
covers the full register width and wraps modulo 2^XLEN. A C program that
hashes into a 32-bit `int` keeps only the low 32 bits of each result, with a
32-bit store. Those low bits never depend on the upper bits of the operands, so
the unit returns exactly the C result in `wb_data[31:0]`. For example,
`"GOOD PARTY"` hashes to `32'hf23d9c7e` as a C int and to
`64'h726b8aedf23d9c7e` in 64 bits. The unit works unchanged at `XLEN = 32`.

`rs2` is used as given, not masked to 8 bits. Software loads the character
with `lbu`, so it is already zero-extended.

## What it buys

In the unoptimised (`-O0`) hash loop, the instructions per character drop from
17 to 11. One `djb2` replaces seven instructions: the `slliw` and `addw` of the
multiply by 33, the `addw` of the character, three `sext.w`, and a second load
of the hash.
At higher optimisation levels the saving per character is smaller.

Published instruction-set-simulator measurements of a whole small blockchain
program report instruction-count reductions of:

| optimisation level | reduction |
|--------------------|-----------|
| `-O0` | 6.3 % |
| `-O1`, `-O2`, `-O3` | about 1.4 % |
| `-Os` | none |

The rest of that program (printing, list handling, start-up) is untouched by the instruction.

## What follows the instruction definition, and what is this design's own

These parts follow the definition of the instruction:

- the encoding (opcode, funct7 = 1, funct3 = 0, MATCH/MASK);
- the operand roles;
- the shift-by-5-and-add datapath;
- the seed 5381;
- the 64-bit target.

These parts are this design's own choices:

- the issue/write-back interface;
- the single register stage (latency 1, throughput 1 per cycle);
- synchronous active-low reset;
- the x0 rule, which is standard RISC-V;
- the `unimpl` flag;
- full-width arithmetic instead of a 32-bit "word" operation.

The defined behaviour fixes only the low 32 bits of the result. If your
software expects a sign-extended 32-bit result in a 64-bit register, like
`addw`, change the last line of `djb2_alu` to sign-extend bit 31.

Nothing here has been synthesised for a technology or timed. The path from the
operand inputs to the write-back register is a three-operand XLEN-bit addition
(`rs1 << 5`, `rs1`, `rs2`), which a synthesis tool can map to one carry-save
stage and one carry-propagate adder.

## Testbenches

Every testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`.
Each one has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb/tb_djb2_alu.sv` | 64- and 32-bit instances against `33*rs1 + rs2` computed by multiplication; seed, `djb2("a") = 177670`, wrap-around, 2000 random pairs |
| `tb/tb_djb2_decoder.sv` | `02f707ab` decodes as `djb2 a5,a4,a5`; every single-bit flip of a fixed field is rejected; 5000 random words against MATCH/MASK |
| `tb/tb_djb2_ise.sv` | End to end at default parameters; details below |
| `tb/tb_blockchain.sv` | The hashing work of a voting blockchain; details below |

`tb_djb2_ise` has two phases:

- Strings are hashed back to back, with forwarding. The results are compared
  with precomputed constants and a reference loop, and the cycle count is
  checked at one character per cycle.
- A random mix of `djb2` (some with rd = x0), other custom-1 words, foreign
  opcodes and idle cycles. `claim`, `unimpl` and the write-back are checked
  for each. Every one of these cases must occur; the counts are printed.

`tb_blockchain` models the hashing work of a small voting blockchain:

- The genesis block hashes one random vote.
- Ten further blocks each hash the concatenation of all votes so far.
- Block hashes are checked against a 32-bit C-int reference, and the
  previous-hash chain is printed.

To run one with plain Verilator from the repository root:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module tb_djb2_ise -y rtl -y tb +libext+.sv rtl/djb2_pkg.sv tb/tb_djb2_ise.sv
./obj_dir/Vtb_djb2_ise
```

Replace `tb_djb2_ise` with any other testbench name. Each finishes in well under a second.

## Using it in a core

1. In decode, send every instruction to `djb2_ise` along with its operand values.
2. If `claim` is high, the instruction belongs to this unit: do not send it to
   the integer ALU.
3. If `unimpl` is high, raise an illegal-instruction exception.
4. Merge `wb_*` into the register-file write port at the stage that follows
   execute.
5. Forward `wb_data` to the operands of the next instruction, as for any ALU
   result.
