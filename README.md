# LC-2: a minimal 16-bit RISC processor

The LC-2 is a teaching processor built to show how small a usable instruction
set can be. Everything is one 16-bit word: data, addresses and instructions.
It is a load/store machine. Arithmetic only reads and writes registers, and
memory is reached only through loads and stores. There are eight general
registers and thirteen instructions. Each instruction is a fixed 16-bit word
with a 4-bit opcode. Those thirteen instructions are enough to compute any
logic function and any arithmetic result. They also cover memory access with
direct and indexed addresses, conditional branches on the sign of the last
result, procedure calls and system calls.

This RTL is a multi-cycle implementation. Every instruction goes through the
same eight one-cycle stages, so each instruction takes exactly 8 clock
cycles. The stages are: send the instruction address, fetch, store the
instruction, decode, compute the address, read memory, execute, write the
result.

## Instruction set

The opcode is in bits 15:12. `Rd` is the destination register, `Rs`/`Rs1`/`Rs2`
are source registers (3 bits each). In the address formulas, PC is the address
of the *next* instruction, because the PC is incremented while the instruction
is being fetched.

| Opcode | Instr.      | Bits 11:0                                  | Effect |
|--------|-------------|--------------------------------------------|--------|
| 0001   | ADD         | `Rd[11:9] Rs1[8:6] 0 00 Rs2[2:0]`          | Rd ← Rs1 + Rs2; set N/Z/P |
| 0001   | ADD         | `Rd[11:9] Rs[8:6] 1 imm5[4:0]`             | Rd ← Rs + sext(imm5); set N/Z/P |
| 0101   | AND         | as ADD (register or immediate form)        | Rd ← Rs1 & (Rs2 or sext(imm5)); set N/Z/P |
| 1001   | NOT         | `Rd[11:9] Rs[8:6] 111111`                  | Rd ← ~Rs; set N/Z/P |
| 0010   | LD          | `Rd[11:9] offset9`                         | Rd ← M[{PC[15:9], offset9}]; set N/Z/P |
| 0011   | ST          | `Rs[11:9] offset9`                         | M[{PC[15:9], offset9}] ← Rs |
| 0110   | LDR         | `Rd[11:9] Rs[8:6] index6`                  | Rd ← M[Rs + zext(index6)]; set N/Z/P |
| 0111   | STR         | `Rs1[11:9] Rs2[8:6] index6`                | M[Rs1 + zext(index6)] ← Rs2 |
| 1110   | LEA         | `Rd[11:9] offset9`                         | Rd ← {PC[15:9], offset9}; set N/Z/P |
| 0000   | BR          | `n z p offset9`                            | if (N&n \| Z&z \| P&p) PC ← {PC[15:9], offset9} |
| 0100   | JMP/JSR     | `L 00 offset9`                             | if L: R7 ← PC; PC ← {PC[15:9], offset9} |
| 1100   | JMPR/JSRR   | `L 00 Rs[8:6] index6`                      | if L: R7 ← PC; PC ← Rs + zext(index6) |
| 1101   | RET         | `000000000000`                             | PC ← R7 |
| 1111   | TRAP        | `0000 trapvect8`                           | R7 ← PC; PC ← M[zext(trapvect8)] |

Opcodes 1000, 1010 and 1011 are unassigned. They execute as no-operations.

**Direct (page) addressing.** `{PC[15:9], offset9}` is a concatenation, not a
sum. Memory is divided into 128 pages of 512 words. LD, ST, LEA, BR and JSR
reach any word in the page of the next instruction. To reach anything else,
use the indexed forms LDR, STR and JSRR, or load an address with LEA first.

**STR field order.** STR takes its *base* register from bits 11:9 and the
*data* register from bits 8:6. This is the order the STR format defines
(`STR Rs2 → Rs1, index`), and it is the reverse of LDR, whose bits 8:6 are the
base. Assemblers written for other LC-2 descriptions put the STR data register
in bits 11:9, so check this first when porting code.

**Condition codes.** N, Z and P are three one-bit registers. Exactly one of
them is set. They are updated by the result writes of ADD, AND, NOT, LD, LDR
and LEA. The R7 link write of JSR, JSRR and TRAP does not update them. BR
tests them against its n, z, p bits, so `BR nzp` is an unconditional branch
and `BR` with n = z = p = 0 never branches.

**TRAP.** Words 0x0000–0x00FF form the vector table. `TRAP v` saves the return
address in R7 and jumps to the address stored in word `v`. The routine returns
with RET.

## How an instruction executes

The controller (`lc2_control`) is a 3-bit stage counter that wraps from stage 8
back to stage 1. For each stage it decodes which datapath registers load. No
stage is ever skipped. An instruction that does not need a stage spends an idle
cycle in it, which keeps the controller trivial and the timing fixed.

| # | Stage   | What happens (register transfers at the end of the cycle) |
|---|---------|------------------------------------------------------------|
| 1 | SEND    | MAR ← PC |
| 2 | FETCH   | memory read at MAR (the word appears on the read port next cycle) |
| 3 | STORE   | IR ← memory word; PC ← PC + 1 |
| 4 | DECODE  | A ← R[ra1], B ← R[ra2] (the register numbers come from the decoder) |
| 5 | ADDR    | MAR ← effective address (page, indexed or trap vector) |
| 6 | MEM     | memory read at MAR, for LD, LDR and TRAP only |
| 7 | EXEC    | RES ← ALU result, memory word, effective address or PC; MDR ← memory word |
| 8 | WRITE   | R[wa] ← RES and N/Z/P update; memory write of B at MAR (ST, STR); PC ← new PC |

Where the new PC of stage 8 comes from:

- BR (if the condition holds), JMP/JSR and JMPR/JSRR: MAR, the effective address.
- TRAP: MDR, the vector word read in stage 6.
- RET: A, which holds R7.

For a link, RES holds the incremented PC, and that is what R7 receives.

Worked example, `ADD R5, R4, #3` (encoded 0x1B23) at 0x3001:

1. SEND: MAR becomes 0x3001.
2. FETCH: the word is read.
3. STORE: IR becomes 0x1B23 and PC becomes 0x3002.
4. DECODE: A is loaded with R4.
5. ADDR: the computed address goes unused.
6. MEM: no memory read is issued.
7. EXEC: RES becomes R4 + 3.
8. WRITE: R5 receives RES, and N/Z/P are set from it.

`tb_lc2_add_example` checks each of these register transfers.

Memory timing is simple because there is only one memory port. The processor
never reads and writes memory in the same cycle: instruction reads happen in
stage 2, data reads in stage 6, and writes in stage 8. The memory must return
the word for a read request in the following cycle. A synchronous RAM does
this.

## Blocks

| Module | Role |
|--------|------|
| `lc2_pkg` | opcodes, stage, ALU/address/write-back/PC-select enums, the decoded-instruction struct `ctrl_t` and the enable struct `en_t` |
| `lc2_alu` | ADD, AND, NOT on 16 bits, combinational |
| `lc2_regfile` | R0–R7, two combinational read ports, one write port, cleared on reset |
| `lc2_cond_codes` | N/Z/P registers and the branch condition; asserts that exactly one bit is set |
| `lc2_addr_unit` | page, indexed and trap-vector address formulas |
| `lc2_decoder` | opcode and fields → `ctrl_t` |
| `lc2_control` | eight-stage sequencer → `en_t` enables |
| `lc2_cpu` | the datapath registers (PC, IR, MAR, A, B, RES, MDR) and the blocks above |
| `lc2_memory` | 2^16 × 16-bit synchronous RAM |
| `lc2_system` | top level: `lc2_cpu` + `lc2_memory` |

The top level `lc2_system` has these ports:

- Inputs: `clk` and `rst_n` (asynchronous, active low).
- Status outputs: `pc`, `ir`, `stage`, `retire` (high during stage 8) and `nzp`.

Its single parameter is `RESET_PC`, the address of the first instruction. The
default is 0x3000. Programs and the vector table are written into
`u_mem.mem` before reset is released; the memory array is not reset. There is
no halt instruction. A program ends by branching to itself, for example with
`BR nzp` to its own address.

The processor's memory interface (`mem_addr`, `mem_re`, `mem_we`, `mem_wdata`,
`mem_rdata`) is visible on `lc2_cpu`. You can attach a different memory, or a
memory-mapped device, to it, as long as read data arrives in the cycle after
`mem_re`.

## Design choices beyond the instruction set

The instruction set and the eight-stage sequence are fixed by the LC-2
definition. These points are choices of this implementation:

- Every instruction runs all eight stages. No stage is skipped, so the CPI is
  always 8.
- Stores are performed in stage 8.
- The immediate `imm5` is sign-extended, which allows decrementing with
  `ADD Rd, Rs, #-1`. The 6-bit `index` of LDR, STR and JSRR is zero-extended.
- PC-relative page addresses and return addresses use the incremented PC.
- Reset clears R0–R7, sets Z, and starts at `RESET_PC` = 0x3000. This address
  is clear of the vector table.
- The condition codes are not changed by the R7 link write.
- Unassigned opcodes are no-operations. Bits that the formats show as fixed
  zeros or ones are not checked.
- The datapath registers MAR, MDR, A, B and RES are this implementation's
  choice. They are the minimum needed to carry values from one one-cycle
  stage to the next.
- There are no I/O devices.

## Simulating

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
stops, and a watchdog ends it if it hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lc2_pkg.sv tb/lc2_tb_pkg.sv rtl/lc2_*.sv tb/tb_lc2_system.sv \
    --top-module tb_lc2_system -o sim && obj_dir/sim
```

Substitute any other testbench name. The testbenches are:

- `tb_lc2_alu`, `tb_lc2_regfile`, `tb_lc2_cond_codes`, `tb_lc2_addr_unit`,
  `tb_lc2_decoder`, `tb_lc2_control` and `tb_lc2_memory` check one block each
  against values computed in the testbench.
- `tb_lc2_cpu` runs the processor with a testbench-owned memory. It fills all
  64K words with random values and executes random instruction streams from
  several resets. The random streams include traps through random vectors and
  self-modifying stores. After every instruction it compares the PC, N/Z/P,
  all registers and every memory write with `Lc2Model`.
- `tb_lc2_system` runs the full default-size system. It starts with a directed
  program that uses every instruction, both operand forms, branches taken and
  not taken, calls with and without link, and a trap. It checks hand-computed
  results and exactly 8 cycles per instruction, and fails if any of these
  mechanisms never occurred. It then runs 4000 random instructions against the
  model.
- `tb_lc2_add_example` is the stage-by-stage trace described above.

`tb/lc2_tb_pkg.sv` holds the encoders, one function per instruction form, for
example `e_add_i(rd, rs, imm)` and `e_str(data, base, idx)`. It also holds
`Lc2Model`, the reference model. The model is written directly from the
instruction table above and shares no code with the RTL.

## Size

After generic synthesis, the processor has about 150 word-level cells and 246
flip-flops. 128 of the flip-flops are the register file. The memory is a
single 1 Mbit (64K × 16) memory cell.
