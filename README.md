# Single-cycle MIPS subset processor

This is a small 32-bit MIPS processor in which every instruction runs in
exactly one clock cycle. It fetches a word from a program memory, decodes
it, reads two registers, computes in an ALU, optionally reads or writes a
data memory, and writes a result back to the register file, all before the
next rising clock edge. Program and data live in separate memories (a
Harvard organisation), so fetching an instruction and serving a load or
store never compete for one port.

It implements 34 instructions of the MIPS I integer set:
register and immediate arithmetic and logic, shifts, set-less-than, byte,
halfword and word loads and stores, conditional branches, absolute jumps,
jump-register and jump-and-link. There is no multiply/divide, no
coprocessor, no exceptions and no branch delay slot.

```
            +------------------------------ mips_top -------------------------------+
            |                                                                        |
  prog_* -->| program memory <-- PC --- fetch_unit (PC, +4, +8, branch add, jump ||) |
            |      | inst                       ^ pc_sel                             |
            |      v                            |                                    |
            |   control ---------------------- (=?, cmp results)                     |
            |      |                                                                 |
            |   regfile --A--> ALU <--mux-- B / imm_extend                           |
            |      ^             | result = address                                  |
            |      |             v                                                   |
            |      +-- mux <-- data memory --> load_extend                           |
            |         (ALU / load / PC+8)                                            |
            +------------------------------------------------------------------------+
```

## Blocks

| Module | What it is |
|---|---|
| `mips_top` | The computer: CPU, program memory and data memory. |
| `mips_cpu` | The datapath and the wiring between the units below. |
| `fetch_unit` | PC register; PC+4, PC+8, branch target, jump target; next-PC mux. |
| `control` | Decoder: instruction word plus compare results gives the control word and the next-PC choice. |
| `regfile` | 32 x 32-bit registers, r0 reads as zero, two read ports, one write port. |
| `alu` | Add, subtract, and, or, xor, nor, signed set-less-than, and three shifts. |
| `imm_extend` | 16 to 32 bit sign or zero extension. |
| `eq_compare` | The `=?` unit for BEQ/BNE. |
| `zero_compare` | The `cmp` unit for BLTZ/BGEZ/BLEZ/BGTZ: compares R[rs] with zero. |
| `mips_memory` | Byte-addressed memory with an enable and a 2-bit control code. Used twice. |
| `load_extend` | Picks the byte or halfword out of the loaded word and extends it. |
| `mips_pkg` | Opcodes, function codes, instruction layouts, ALU operations and the control word. |

Every file starts with a comment on what the module does, its interface
and its timing.

## Clocking and reset

This is the part that most needs care when the design is reused.

- **Rising edge:** the PC loads its next value, and the data memory
  performs a store.
- **Falling edge:** the register file performs its write (`WE` high,
  destination not r0).
- **Combinational reads:** all register and memory reads.

The clock is therefore split in two halves. During the high half, the
instruction, the register reads, the ALU, the memory read and the
write-back mux must all settle. At the falling edge the result is written.
During the low half, the register that was just written feeds back
through the datapath and the write-back value changes again, but nothing
samples it until the next falling edge.

This is safe because of which instructions use what at the rising edge.
Only those that write no register let register values decide anything
at the rising edge: stores (address and data), branches and JR (next PC).
JAL writes r31, but its next PC comes from the instruction word only.
The timing budget for one instruction is therefore half a clock period,
from the rising edge to the falling edge.

Reset is synchronous and active high. The PC sees it on rising edges and
loads `RESET_PC` (default 0). The register file sees it on falling edges
and clears r1..r31. Release `rst` while `clk` is high, just after a
rising edge. The first instruction then gets a whole high half-cycle
before its register write. The data memory is disabled while `rst` is
high, so nothing is stored during loading.

## Next PC: branches, jumps and links

`fetch_unit` computes every candidate each cycle, and `control` picks
one with `pc_sel`:

| `pc_sel` | Next PC | Used by |
|---|---|---|
| SEQ | PC+4 | everything else, and branches not taken |
| BRANCH | PC+4 + (sign-extended offset << 2) | BEQ, BNE, BLTZ, BGEZ, BLEZ, BGTZ when taken |
| JUMP | {(PC+4)[31:28], target26, 2'b00} | J, JAL |
| REG | R[rs] | JR |

Points that surprise people:

- **Jumps and branches are relative to PC+4.** Both use the address of
  the next instruction, not the jump itself.
- **J and JAL keep the upper 4 bits of PC+4.** So J cannot leave its
  256 MiB region. One exception: a J in the last word of a region goes
  into the next region, because PC+4 is already there.
- **No branch delay slot.** The word after a taken branch or jump is not
  executed.
- **JAL writes PC+8 into r31.** A second +4 adder provides this value.
  Combined with the missing delay slot, a subroutine's `jr $31` returns
  to the second word after the JAL. The word right after the JAL is
  never executed on that path. Code for this design must leave that slot
  empty or use it for something that only runs when reached another way.
  The end-to-end test checks this.
- **Branch conditions come from the registers, not the ALU.**
  - `eq_compare` tests R[rs] == R[rt].
  - `zero_compare` evaluates one of four relations of R[rs] against zero.
  - The ALU stays free for the address or arithmetic of the same word.

## Memory: control codes, byte lanes and alignment

`mips_memory` has a 32-bit byte address, 32-bit write data, 32-bit read
data, an enable `en` and a 2-bit control `mc`:

| `mc` | Operation |
|---|---|
| 00 | read word (address 4-byte aligned) |
| 01 | write byte: `wdata[7:0]` to `addr` |
| 10 | write halfword: `wdata[15:0]` to `addr` (2-byte aligned) |
| 11 | write word: `wdata` to `addr` (4-byte aligned) |

How it behaves:

- **Read:** combinational. `rdata` is the aligned word containing `addr`
  when `en` is high and `mc` = 00, otherwise zero.
- **Write:** on the rising edge when `en` is high.
- **Byte order:** little endian. Byte `4k` is bits 7:0 of word `k`.
- **Alignment:** assertions flag misaligned halfword and word writes.
  The hardware ignores the low address bits in those cases.
- **Loads:** the memory only reads whole words. `load_extend` takes the
  byte (`addr[1:0]`) or halfword (`addr[1]`) out of the word and sign-
  or zero-extends it. This is how LB, LBU, LH and LHU are built.

Storage is `2**ADDR_BITS` bytes (`MEM_ADDR_BITS` on the top, default 16,
so 64 KiB each for program and data). The address ports are 32 bits
wide, but higher address bits are ignored. The memory therefore repeats
every 64 KiB.

The processor itself has a full 32-bit PC. A jump to `0xabcd1234` really
sets the PC to that value, but the instruction is fetched from offset
`0x1234`. Raise `MEM_ADDR_BITS` if programs need distinct code or data
above 64 KiB.

Programs are loaded through the top's `prog_we`/`prog_addr`/`prog_wdata`
port. It writes whole words into the program memory and works only while
`rst` is high.

## Instruction set

R-type (opcode 0, selected by the function code):

| funct | Instr | Operation |
|---|---|---|
| 0x20 / 0x21 | ADD / ADDU | rd = rs + rt |
| 0x22 / 0x23 | SUB / SUBU | rd = rs - rt |
| 0x25 | OR | rd = rs \| rt |
| 0x26 | XOR | rd = rs ^ rt |
| 0x27 | NOR | rd = ~(rs \| rt) |
| 0x2a | SLT | rd = (signed rs < signed rt) |
| 0x00 | SLL | rd = rt << shamt |
| 0x02 | SRL | rd = rt >> shamt, zero fill |
| 0x03 | SRA | rd = rt >> shamt, sign fill |
| 0x08 | JR | PC = rs |

I-type and J-type:

| op | Instr | Operation |
|---|---|---|
| 0x08 / 0x09 | ADDI / ADDIU | rt = rs + sext(imm) |
| 0x0a | SLTI | rt = (signed rs < sext(imm)) |
| 0x0c | ANDI | rt = rs & zext(imm) |
| 0x0d | ORI | rt = rs \| zext(imm) |
| 0x0f | LUI | rt = imm << 16 |
| 0x20 / 0x24 | LB / LBU | rt = sext / zext of byte |
| 0x21 / 0x25 | LH / LHU | rt = sext / zext of halfword |
| 0x23 | LW | rt = word |
| 0x28 / 0x29 / 0x2b | SB / SH / SW | store low byte / halfword / word of rt |
| 0x04 / 0x05 | BEQ / BNE | branch if rs == rt / rs != rt |
| 0x01, rt=0 / rt=1 | BLTZ / BGEZ | branch if rs < 0 / rs >= 0 |
| 0x06 / 0x07 | BLEZ / BGTZ | branch if rs <= 0 / rs > 0 |
| 0x02 | J | jump |
| 0x03 | JAL | jump, r31 = PC+8 |

Loads and stores use the address rs + sext(imm).

How some of these are built:

- **LUI:** the ALU shifts the zero-extended immediate left. A mux sets the
  shift amount to the constant 16 instead of the shamt field.
- **ALU B input:** a mux picks R[rt] or the extended immediate.
- **Overflow:** ADD, SUB and ADDI compute the same result as their
  unsigned forms and never trap.
- **Unknown encodings:** any encoding not in the tables executes as a
  no-op. It writes nothing and goes to PC+4.

## Where this design departs from, or fills in, its source

The register-file timing, the memory interface and codes, the
instruction tables, the datapath multiplexers and the next-PC rules are
taken from the source description. The following are choices made here:

- **Opcode numbers:** SLTI (0x0a), ADD (0x20) and SUB (0x22) are named
  but not numbered in the source. They use the standard MIPS numbers.
- **Shifts:** SRL and SRA both shift R[rt]. SRL fills with zeros and SRA
  with the sign bit. The source's shift table is inconsistent about the
  operand and the operator, and this follows its words "zero ext." and
  "sign ext.".
- **Jump region:** J and JAL both use bits 31..28 of PC+4. The JAL row
  disagrees with the J row, and this follows J.
- **Byte order:** little endian. The source names MIPS under both byte
  orders.
- **Things the source does not specify:**
  - reset behaviour
  - the delay slot (none here)
  - overflow traps (none)
  - the handling of unknown instructions
  - program loading
  - memory size (64 KiB per memory here; the source gives only an upper
    bound of a 32-bit address)
  - where sub-word loads are extracted
- **Rising-edge updates:** the PC and the data memory update on the
  rising edge. Only the register file's falling-edge write is specified.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops, and each has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_alu`, `tb_imm_extend`, `tb_eq_compare`, `tb_zero_compare`, `tb_load_extend` | Compare against expressions written independently: directed corner values plus random values. `tb_imm_extend` checks all 65,536 immediates both ways. |
| `tb_regfile` | Falling-edge writes, nothing written on the rising edge, `WE` low, r0, reset. |
| `tb_mips_memory` | All four codes, byte lanes, the enable, aliasing above `ADDR_BITS`, against a byte-array model. |
| `tb_fetch_unit` | Every next-PC source, including region boundaries and negative offsets. |
| `tb_control` | Decodes every supported instruction and checks the control word and branch decisions. |
| `tb_mips_cpu` | The CPU with memories modelled in the testbench. Runs the classic walkthrough (addu, slti, lw, j) and a 10-iteration counting loop whose first words are the standard encodings of `addi r2,r0,10`, `addi r1,r0,0` and `slt r3,r1,r2`. Checks results and the exact cycle count. Then runs a random 200-instruction program (ALU, shifts, sub-word loads and stores, forward branches) in lockstep with the reference model. |
| `tb_mips_top` | End to end, at the default parameters (details below). |

`tb_mips_top`, in detail:

- It loads a program through the load port and runs it on the full
  system.
- Every cycle it compares the PC, instruction, register write and memory
  write with a reference instruction-set model (`mips_asm_pkg::mips_iss`).
  It also compares hand-computed values at chosen points.
- It counts how often each mechanism occurs. These include sub-word
  loads and stores, taken and not-taken branches of each kind, J, JAL,
  JR, writes to r0 and out-of-region PCs. It fails if any count is zero.
- It checks one instruction per cycle.

`mips_asm_pkg` also has one encoder function per instruction (`i_addu`,
`i_lw`, `i_beq`, ...). Use them to write further test programs.

To run one test with plain Verilator (5.x):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/mips_pkg.sv rtl/*.sv tb/mips_asm_pkg.sv tb/tb_mips_top.sv \
  --top-module tb_mips_top -o sim && ./obj_dir/sim
```

For a block test, list `rtl/mips_pkg.sv`, the block's file, and the
testbench (plus `tb/mips_asm_pkg.sv` for `tb_mips_cpu` and
`tb_mips_top`). A file list with the package first works for every
tool.

The testbenches call the registers `dut.u_regfile.regs` or
`dut.u_cpu.u_regfile.regs` by hierarchical name. Renaming instances
means updating them.
