# HRISC: a five-stage teaching pipeline with interchangeable control units

HRISC is a 32-bit, 17-instruction subset of DLX. It was designed so that
students can build a complete pipelined processor on a bench from TTL parts.
Its published description concentrates on the part students find hardest:
the control unit. It gives two versions of it. One is microcoded, with one
small PROM per pipe stage. The other is hardwired: a few gates per stage,
plus a trick in the instruction format. Every R-type instruction carries
its own EX-stage control lines in its low eleven bits.

This repository is a synthesizable SystemVerilog model of that processor.
It has the five-stage datapath and **both** control units, and an input
`ctl_sel` chooses which unit drives the datapath. The two units give the
same control lines for every defined instruction. So a program runs the
same way under either one, and you can even switch between them while it
runs.

## Instruction formats and encoding

```
I-type  | op[31:26] | rs[25:21] | rd[20:16] | immediate / offset [15:0] |
R-type  | op[31:26] | rs[25:21] | rt[20:16] | rd[15:11] | control word [10:0] |
```

The six opcode bits are named `a b c d e f`, from bit 31 down to bit 26.
`a` selects the format: 0 means R-type, 1 means I-type.

| class | instr | opcode `abcdef` | meaning |
|---|---|---|---|
| R, `ef=10` ALU | ADD, SUB, AND, XOR | 000010, 000110, 001010, 001110 | rd <- rs op rt |
| R, `ef=00` shift | SRL, SLL | 001000, 001100 | rd <- rs >> / << rt[4:0] (logical) |
| R, `ef=11` set | SEQ, SLT, SGT | 000011, 000111, 001011 | rd <- (rs ==/</> rt) ? 1 : 0, signed |
| I, `b=0` | LW, SW | 100000, 100100 | rd <- M[rs+imm] ; M[rs+imm] <- rd |
| I, `b=0` | ADDI, LHI | 101000, 101100 | rd <- rs + sext(imm) ; rd <- rs + (imm << 16) |
| I, `b=1` | BEQZ, BNEZ | 110000, 110100 | if rs ==/!= 0: PC <- PC+1+sext(imm) |
| I, `b=1` | JR, JALR | 111000, 111100 | PC <- rs ; JALR also writes R31 (the link) |

Fixed by the original design: the two formats, bit `a`, and the `ef` groups
of the R-type instructions. The I-type instructions are decoded from
`b c d`, and their decode equations fix `b c d` for LW, SW, ADDI, LHI and
JALR. The remaining opcode bits were chosen here. For R-type instructions,
the `b c d` bits are only needed by the microcoded unit, which sees nothing
but the opcode. They were chosen so that all 17 instructions have distinct
opcodes.

The R-type control word (bits 10..0) is part of the instruction. An
assembler must emit the word that belongs to the opcode. The package
function `hrisc_pkg::rtype()` does this.

| bits | 10..7 | 6 | 5 | 4 | 3 | 2 | 1 | 0 |
|---|---|---|---|---|---|---|---|---|
| line | S3-S0 | Cn | M | OUT1 <- A op B | OUT3 <- A op B | SETF | SL | SR |
| ADD | 0001 | 1 | 0 | 1 | 0 | 0 | 0 | 0 |
| SUB | 0110 | 1 | 0 | 1 | 0 | 0 | 0 | 0 |
| AND | 1011 | 0 | 1 | 1 | 0 | 0 | 0 | 0 |
| XOR | 0110 | 0 | 1 | 1 | 0 | 0 | 0 | 0 |
| SRL | 0000 | 0 | 0 | 0 | 0 | 0 | 0 | 1 |
| SLL | 0000 | 0 | 0 | 0 | 0 | 0 | 1 | 0 |
| SEQ | 0110 | 1 | 0 | 0 | 1 | 0 | 0 | 0 |
| SLT | 0110 | 0 | 0 | 0 | 1 | 1 | 0 | 0 |
| SGT | 0110 | 1 | 0 | 0 | 1 | 1 | 0 | 0 |

(Don't-care entries of the original table are written as 0.)

The ALU decodes these lines as follows:

- **M=1 (logic).** The sixteen bitwise functions of the classic 4-bit TTL
  ALU slice. Only AND (1011) and XOR (0110) are used.
- **M=0 (arithmetic).** 0001 gives A+B, 0110 gives A-B, and any other code
  passes A through.
- **SR / SL.** Each overrides the ALU result with a logical shift of A by
  B[4:0].
- **Set result.** SETF=0 gives A==B. SETF=1 gives A>B when Cn=1 and A<B
  when Cn=0.

The all-zero word is a no-operation.

## The pipeline

```
 IF        ID                 EX                         MEM                    WB
 PC1 ─► IM ─► IR1 ─► IR2      IR3                        IR4
 +1 / OUT1      RF[rs]  ─► A ─┬─► ALU(A|PC2, B|IMM) ─► OUT1 ───► OUT2 ─┐
                RF[rt]  ─► B ─┤   set unit ─────────► OUT3 ──┘        ├─► RD / R31
                PC1     ─► PC2│   A == 0 ───────────► COND            │
                              │   ALU ──────────────► MAR ─► DM ─► MDR2┘
                              └─────────────────────► MDR1 ─┘
```

A register whose name ends in stage number *n* is loaded at the end of
stage *n*. Each stage takes its control lines from its own instruction
register: ID from IR1, EX from IR2, MEM from IR3, WB from IR4. One
instruction enters per clock, and a result is written to the register file
on the fifth rising edge after the instruction's fetch began.

### Transfers of control

In EX, a branch computes its target PC2 + offset into OUT1, and COND
records whether A is zero. A jump passes A into OUT1. During MEM, the PC
multiplexer loads OUT1 into PC1 when the instruction's `b1 b2` lines and
COND say so:

| b1 b2 | instruction | PC1 <- OUT1 when |
|---|---|---|
| 1 0 | BEQZ | COND |
| 1 1 | BNEZ | not COND |
| 0 1 | JR, JALR | always |
| 0 0 | others | never |

So `take = b1 ? (b2 ^ COND) : b2`.

Nothing is squashed. The three instructions after a branch or jump have
already been fetched when the PC changes, and **they are executed (three
delay slots)**. JALR writes R31 with its own address + 4, which is the
first instruction after its delay slots. A branch or jump must not be placed
in the delay slots of another one. An assertion in `hrisc_top`
(`a_no_transfer_in_delay_slot`) flags such code in simulation.

### Data hazards

There is no forwarding and no interlock. The register file is written in WB
and read in ID during the same cycle, and the write reaches the read. The
original hardware gets this by reading and writing in opposite clock
halves; here it is a write-to-read pass path. The rule for software is:
**a result (from the ALU, a set, a load or a link) can be used by the
third instruction after its producer.** At least two other instructions or
no-ops must sit in between. This holds for every source operand, including
the register tested by BEQZ/BNEZ and the target register of JR/JALR.

## The two control units

Both units produce four groups of lines, defined as structs in `hrisc_pkg`:

- `id_ctrl_t`: `b1 b2`.
- `ex_ctrl_t`: S3-S0, Cn, M, the OUT1 and OUT3 loads, SETF, SL, SR, EB
  (immediate operand), NEW (upper-half immediate), EA (PC2 operand), the
  OUT1 target load, and the COND, MAR and MDR1 enables.
- `mem_ctrl_t`: OUT2 <- OUT1, OUT2 <- OUT3, MDR2 <- DM[MAR], and
  DM[MAR] <- MDR1.
- `wb_ctrl_t`: RD <- OUT2, RD <- MDR2, and R31 <- LINK3.

**Microcoded (`hrisc_ctrl_ucode`).** There are four 64-word PROMs, one per
stage, each addressed by the opcode in that stage's instruction register.
Their contents are computed from the opcode by functions when the arrays
are initialised. Unused opcodes hold all-zero words.

**Hardwired (`hrisc_ctrl_hw`).** For R-type instructions, each EX line is
simply the instruction bit ANDed with `a'`. I-type instructions are decoded
from `b c d`, with `X = a b' c` (ADDI, LHI):

```
S0 = a'·S0(IR2) + X + LW/SW + branch        Cn  = same with Cn(IR2)
OUT1 load = a'·OUT1(IR2) + X                NEW = a b' c d
EB = a b' + branch
OUT2<-OUT1 = a' f' + X     OUT2<-OUT3 = a' e f
MDR2<-DM   = a b' c' d'    DM<-MDR1   = a b' c' d
RD<-OUT2   = X + a'        RD<-MDR2   = a b' c' d'     R31<-LINK3 = a b c d
b1 = a b c'                b2 = a b (c + d)
```

For undefined opcodes, the two units can differ. For the 17 instructions
they give identical lines, and the unit testbenches check exactly this
against one reference table. In the running pipeline, assertions in
`hrisc_top` (`a_id_agree`, `a_mem_agree`, `a_wb_agree`) check that the two
units agree on the lines that depend on the opcode alone. The EX lines of an
R-type instruction come from its own low bits in the hardwired unit, so they
agree only if the instruction carries the right control word.

## Where this model goes beyond, or departs from, the original description

The original gives the stages, the registers and their transfers, the
control-line tables and the MEM/WB/EX gate equations. These points are
choices made for this model:

- **Opcode values.** The bits not fixed by the format and decode equations
  (see above) are this model's.
- **Order of the last two control bits.** The list of control lines names
  SR before SL, but the table rows put SRL's 1 in bit 0 and SLL's 1 in
  bit 1. The rows are followed: bit 1 = SL, bit 0 = SR.
- **EB.** The table says EB is 1 for ADDI, LW, SW and LHI, which is `a b'`.
  The gate drawing labels its inputs `a'` and `b'`. The table is followed.
- **The ALU circuit.** Only the codes are given. The meaning of Cn used
  here (it chooses SLT or SGT) and the pass function for other arithmetic
  codes are this model's. Shifts take their amount from rt[4:0], as in
  DLX. Comparisons are signed.
- **Extra EX lines.** The original EX tables do not list several lines:
  the PC2 operand select, the branch/jump target load into OUT1, the
  COND/MAR/MDR1 enables, and an add for load/store addresses and branch
  targets. They were added to both units.
- **Pipeline policy.** Delay slots, the link value (JALR + 4), the absence
  of hazard hardware, and the resulting software rules are this model's.
  The original does not discuss hazards.
- **Register 0 and reset.** R0 reads as zero, as in DLX. `rst_n` is
  synchronous and active low. It clears PC1 and every pipeline register,
  which fills the pipeline with no-ops. The register file and the memories
  are not reset; a program must write a register before reading it.
- **Memory sizes and ports.** Both memories hold 1024 words and are word
  addressed. They have a load port (instruction memory) and a host port
  (data memory). There is also a register observation port. All of these
  exist for simulation and bring-up.
- **The `ctl_sel` selector.** The original presents the two control units
  as alternatives. Building both and selecting one at run time is this
  model's choice.

## Files

| file | contents |
|---|---|
| `rtl/hrisc_pkg.sv` | opcodes, R-type control words, control-line structs, `rtype()`/`itype()` |
| `rtl/hrisc_alu.sv` | ALU, shifter, set unit |
| `rtl/hrisc_regfile.sv` | 32 x 32 register file, 3 read ports, write-to-read pass |
| `rtl/hrisc_imem.sv`, `rtl/hrisc_dmem.sv` | instruction and data memories |
| `rtl/hrisc_ctrl_ucode.sv` | microcoded control unit (stage PROMs) |
| `rtl/hrisc_ctrl_hw.sv` | hardwired control unit |
| `rtl/hrisc_top.sv` | the pipeline; top level |
| `tb/hrisc_tb_pkg.sv` | reference control table and instruction-level model |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, to run the whole processor:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/hrisc_pkg.sv tb/hrisc_tb_pkg.sv rtl/hrisc_*.sv tb/tb_hrisc_top.sv \
  --top-module tb_hrisc_top -o sim && ./obj_dir/sim
```

Replace the last testbench and `--top-module` to run the others.
`tb_hrisc_alu`, `tb_hrisc_regfile`, `tb_hrisc_imem` and `tb_hrisc_dmem` need
only `rtl/hrisc_pkg.sv` and their module. `tb_hrisc_ctrl_*` also need
`tb/hrisc_tb_pkg.sv`.

`tb_hrisc_top` runs the top level at its default sizes. Its program uses
all 17 instructions:

- a counted loop closed by BNEZ;
- BEQZ and BNEZ, both taken and not taken;
- a JALR call and a JR return;
- a useful instruction in a delay slot;
- instructions that a jump must skip.

The program runs three times: under the microcoded unit, under the
hardwired unit, and with the unit switched every three cycles. Each time,
all 32 registers and all 1024 data-memory words are compared with the
instruction-level model. The testbench also checks the timing: the first
result is written on the fifth edge and the next ones follow one per cycle.
It counts each pipeline mechanism and fails if one never happens.
`tb_hrisc_random` runs long random programs that obey the scheduling rules
above, under both units, against the same model.

To write programs, build words with `hrisc_pkg::rtype(op, rs, rt, rd)` and
`itype(op, rs, rd, imm)`. Load them through `imem_ld_*` while `rst_n` is
low, then release reset. Remember the delay slots and the three-instruction
result distance.
