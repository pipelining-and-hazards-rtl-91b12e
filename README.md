# Five-stage MIPS pipeline with data-hazard handling

This is a classic five-stage, in-order MIPS pipeline (IF, ID, EX, MEM, WB). It
shows how a pipelined processor keeps a dependent instruction from using a
stale register value. Each stage takes one clock cycle. Registers are read in ID
and written in WB, so an instruction can need a result that an older
instruction has computed but not yet written back. The design handles these
data hazards in three ways:

* **Forwarding (bypass into EX).** A result still in the EX/MEM register
  (M→Ex), or the value being written back in WB (W→Ex), replaces the stale
  operand at the start of EX.
* **Register-file bypass (WB→ID).** A register read in ID returns the value
  that WB is writing in the same cycle.
* **Stalling.** A load's data exists only at the end of MEM. When the very
  next instruction needs it, the pipeline stalls for one cycle. The PC and
  IF/ID hold their values, and a bubble (a nop that writes neither registers
  nor memory) goes into ID/EX.

Branches and jumps are resolved in EX with the MIPS one-instruction delay
slot. A taken branch costs one discarded fetch.

A parameter turns forwarding off. The design then falls back to plain
stalling, and you can compare the two schemes cycle for cycle.

## Pipeline organisation

```
        IF            ID                     EX                   MEM            WB
  PC -> imem -> [IF/ID] -> control,extend -> [ID/EX] -> fwd muxes -> [EX/MEM] -> dmem -> [MEM/WB] -> wb mux
  PC+4            regfile (read, bypass)        ALU, HI/LO        mem_align          -> regfile write
                  hazard_unit ---stall--> hold PC, hold IF/ID, bubble into ID/EX
                                      forward_unit <- EX/MEM.Rd/WE, MEM/WB.Rd/WE
  PC <---------------- target, taken ---- branch_unit (EX): clear IF/ID
```

| register | carries |
|---|---|
| IF/ID  | instruction, PC+4, valid |
| ID/EX  | control bundle (ALU op, operand selects, RegWr, MemWr, load, branch kind, HI/LO op), A, B, extended immediate, shamt, jump index, source numbers Ra/Rb, destination Rd, PC+4, valid |
| EX/MEM | ALU result D (also the memory address), store data B, Rd, RegWr, MemWr, load, access size, unsigned-load flag, LL/SC flags, PC+4, valid |
| MEM/WB | ALU result D, loaded and extended value M, Rd, RegWr, load, PC+4, valid |

In every pipeline-register struct the all-zero value is a bubble. So "insert
a nop" just means "clear the register". ID chooses the destination: rd for
R-type, rt for I-type. ID/EX.Rd is therefore the register that the hazard
rules compare against.

An instruction fetched in cycle *n* writes back in cycle *n + 4*. Without
stalls, one instruction completes every cycle. A run that executes *N*
instructions therefore finishes in cycle *N + 4 + stalls + squashes*. Here
*squashes* counts discarded fetches that were followed by more work. The
testbenches check this.

## Hazard rules

This is the core of the design. All rules ignore register 0, which is
hard-wired to zero. They use only registers that the instruction really reads:
the decoder reports this as `uses_ra`/`uses_rb`. For example, an I-type
instruction's rt is a destination, not a source.

**Forwarding (`forward_unit`, in EX).** For each operand register `R` of the
instruction in ID/EX:

```
M->Ex:  EX/M.WE && EX/M.Rd != 0 && R == EX/M.Rd
W->Ex:  M/WB.WE && M/WB.Rd != 0 && R == M/WB.Rd && !(M->Ex condition)
```

M→Ex wins because EX/MEM holds the newer result. The W→Ex source is the final
write-back value, taken after the ALU-result/loaded-data mux, so a loaded word
is forwarded too. The forward muxes sit ahead of the immediate mux. This means
the forwarded B operand is also the store data that `sw` carries into MEM.

**Register-file bypass (`regfile`, in ID).** If WB writes register `R`
(`R != 0`) in the same cycle that ID reads `R`, the read port returns the
value being written. This has the same effect as writing in the first half of
the cycle and reading in the second half, but it keeps a single clock edge.

**Stall (`hazard_unit`, in ID).** For each source register `R` of the
instruction in IF/ID:

| configuration | stall when |
|---|---|
| `FORWARD=1` (default) | ID/EX is a load with RegWr and `R == ID/EX.Rd` (load-use) |
| `FORWARD=0` | `R == ID/EX.Rd` (with RegWr) or `R == EX/M.Rd` (with RegWr) |
| either, with `RF_BYPASS=0` | additionally `R == M/WB.Rd` (with RegWr) |

The stall holds the PC, holds IF/ID, and clears ID/EX. The stalled instruction
re-reads its registers in the next cycle. This is why the bypassed or
forwarded value reaches it.

Stall cycles for the example sequences. The end-to-end testbench measures
the first three. The last row follows from the rules, and the testbench checks
it only as part of a longer program:

| sequence | forwarding + bypass | stall only, bypass | stall only, no bypass |
|---|---|---|---|
| `add r3,r1,r2; sub r5,r3,r5; or r6,r3,r4; add r6,r3,r8` | 0 | 2 | 3 |
| `add r3,r1,r2; sub r5,r3,r4; lw r6,4(r3); or r5,r3,r5; sw r6,12(r3)` | 0 | 3 | 5 |
| `add r3,r1,r2; sub r5,r3,r1; or r6,r3,r4` | 0 | 2 | 3 |
| `lw r1,8(r0); add r2,r1,r1` | 1 | 2 | 3 |

The pair `lw rX` followed by `sw rX` also costs one stall with forwarding. The
store data is needed in EX, and the loaded word is not there yet.

## Branches and jumps

Control flow follows the MIPS rule of one **delay slot**: the instruction
after a branch or jump always executes, and the target follows it.
`branch_unit` resolves the branch in EX. By then the delay slot is in ID and
the next sequential instruction is in IF. The unit compares the forwarded
operands, so a branch gets its operands through the same forwarding and
stall rules as an ALU instruction.

| taken? | effect |
|---|---|
| taken | PC ← target; the instruction in IF is discarded (IF/ID cleared); the delay slot continues. One lost cycle. |
| taken, delay slot stalled in ID | PC ← target; IF/ID keeps the delay slot. The stall cycle already covers the discard. |
| not taken | nothing |
| not taken, likely form (`BEQL` …) | the delay slot becomes a bubble (ID/EX cleared); fetch continues. One lost cycle. |

Targets: PC+4 + (offset << 2) for branches, {PC+4[31:28], index, 00} for
`J`/`JAL`, and rs for `JR`/`JALR`. `JAL` writes PC+8 to r31, and `JALR`
writes it to rd. The link value is produced in EX, so it is forwarded like an
ALU result. There is no branch prediction.

## Instruction set

The encodings are standard MIPS32: op[31:26], rs[25:21], rt[20:16], rd[15:11],
shamt[10:6], funct[5:0], and a 16-bit immediate.

* R-type: `ADD ADDU SUB SUBU AND OR XOR NOR SLT SLTU SLL SRL SRA SLLV SRLV SRAV`
* Multiply/divide: `MULT MULTU DIV DIVU MFHI MFLO MTHI MTLO` (see below)
* Control flow: `J JAL JR JALR BEQ BNE BLEZ BGTZ BLTZ BGEZ BEQL BNEL BLEZL BGTZL`
* I-type: `ADDI ADDIU SLTI SLTIU ANDI ORI XORI LUI` (`ANDI`/`ORI`/`XORI`
  zero-extend; the others sign-extend)
* Memory: `LW LH LHU LB LBU SW SH SB`, and `LWL LWR SWL SWR` for unaligned
  words (below). Byte order is little-endian: byte 0 of
  a word is bits 7:0. A half-word access ignores address bit 0, and a word
  access ignores bits 1:0, so misaligned accesses round down instead of
  trapping. `LB`/`LH` sign-extend; `LBU`/`LHU` zero-extend.
* Synchronization: `LL SC`, and `SYNC` (below).

**Unaligned words.** With k = address bits 1:0, `LWL`/`SWL` move memory
bytes 0..k of the addressed word to or from register bytes 3-k..3.
`LWR`/`SWR` move memory bytes k..3 to or from register bytes 0..3-k. The
pair `LWR rt, a` and `LWL rt, a+3` therefore loads the word at any byte
address a. `SWR`/`SWL` store it the same way. `LWL`/`LWR` keep the register
bytes they do not load, so they read rt as a source. The old rt value travels
down the pipeline in the store-data field, and `mem_align` merges it in MEM.
As a result, `LWL` directly after `LWR` on the same register takes the
one-cycle load-use stall.

**HI/LO.** `hilo_unit` sits in EX next to the ALU. It holds the HI/LO pair,
a 33×33-bit signed multiplier and a 32-bit divider that works on magnitudes,
all single-cycle and combinational. `MULT`/`MULTU` write the 64-bit product.
`DIV`/`DIVU` write the quotient to LO and the remainder to HI; the quotient
rounds toward zero and the remainder takes the dividend's sign. `MTHI`/`MTLO`
copy rs. The pair is written on the edge that ends EX, and `MFHI`/`MFLO` read
it in EX as their result. Writers and readers use the pair in the same stage,
so `MFLO` straight after `MULT` needs no stall or forwarding. The `MFLO`
result then enters EX/MEM like an ALU result and is forwarded from there.
Division by zero gives LO = all ones and HI = the dividend. MIPS leaves this
case undefined.

**LL/SC and SYNC.** A single link bit sits in the MEM stage. `LL` loads a
word like `LW` and sets the bit. `SC` stores rt only while the bit is set. It
then writes the old bit to rt (1 = stored, 0 = failed) and clears the bit.
The success flag exists only in MEM, so `SC` is handled as a load: an
instruction that uses its result straight away takes the load-use stall, and
the result is forwarded from WB. There is one processor and no exception, so
only `SC` clears the bit. Memory is strongly ordered, so `SYNC` has nothing to
wait for and executes as a nop.

Any other encoding executes as a nop. `0x00000000` (`sll r0,r0,0`) is the
canonical nop.

These are **not built**:

* `BLTZAL`/`BGEZAL` and the other REGIMM forms. They execute as nops.
* Misaligned-address exceptions.
* `SYSCALL`, `BREAK` and coprocessor instructions. The design has no
  exception or coprocessor mechanism.
* The overflow trap of `ADD/SUB/ADDI`. Results wrap.

## Top-level interface (`mips_pipeline`)

| parameter | default | meaning |
|---|---|---|
| `NREGS` | 32 | registers (5-bit register fields) |
| `IMEM_WORDS` | 256 | instruction memory words |
| `DMEM_WORDS` | 256 | data memory words |
| `FORWARD` | 1 | M→Ex / W→Ex forwarding; 0 = stall until the register file has the value |
| `RF_BYPASS` | 1 | WB→ID register-file bypass |

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock; synchronous reset (PC = 0, pipeline = bubbles, registers = 0) |
| `ld_imem_we`, `ld_dmem_we` | in | 1 | write `ld_data` into instruction / data memory at byte address `ld_addr` |
| `ld_addr`, `ld_data` | in | 32 | loader address and data; `ld_addr` also selects `dbg_dmem_data` |
| `dbg_reg_addr` / `dbg_reg_data` | in / out | 5 / 32 | read any register |
| `dbg_dmem_data` | out | 32 | data-memory word at `ld_addr` |
| `stall` | out | 1 | the hazard unit stalled this cycle |
| `squash` | out | 1 | a taken branch discarded the fetch after its delay slot, or a likely branch annulled its delay slot |
| `fwd_sel_a`, `fwd_sel_b` | out | 2 | EX operand source: 0 register, 1 EX/MEM (M→Ex), 2 WB (W→Ex) |
| `rf_bypass` | out | 1 | ID took a register value from the write in progress |
| `retire_valid`, `retire_pc` | out | 1 / 32 | an instruction is in WB, and its address |

Load programs and data while `rst` is high, then release `rst`. The first
instruction is fetched from address 0. Both memories read combinationally
within their stage and write on the rising edge. Memories are not reset.

## Files

| file | contents |
|---|---|
| `rtl/mips_pkg.sv` | opcodes, ALU operations, control bundle and pipeline-register structs |
| `rtl/mips_pipeline.sv` | top: stages, pipeline registers, operand muxes, write-back mux |
| `rtl/pc_unit.sv` | PC register and +4 adder, with stall hold |
| `rtl/imem.sv`, `rtl/dmem.sv` | instruction and data memories with load/debug ports; dmem has per-byte write enables |
| `rtl/mem_align.sv` | byte/half-word/partial-word lane steering: store byte enables and lanes, load extraction, extension and merging |
| `rtl/control.sv` | decoder |
| `rtl/extend.sv` | immediate sign/zero extension |
| `rtl/regfile.sv` | register file with WB→ID bypass |
| `rtl/hazard_unit.sv` | stall detection |
| `rtl/forward_unit.sv` | forwarding selection |
| `rtl/alu.sv` | ALU |
| `rtl/branch_unit.sv` | branch condition and target |
| `rtl/hilo_unit.sv` | HI/LO pair with multiplier and divider |
| `rtl/pipe_reg.sv` | generic pipeline register (hold / bubble) |
| `tb/tb_<module>.sv` | self-checking unit testbenches |
| `tb/tb_mips_pipeline.sv` | end-to-end test, three configurations side by side |
| `tb/tb_mips_full.sv` | end-to-end test at the default parameters |
| `tb/mips_tb_defs.svh` | instruction encoders and an instruction-set reference model |

## Simulating

Run from the repository root. The end-to-end testbenches include
`tb/mips_tb_defs.svh` by that path.

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/mips_pkg.sv tb/tb_mips_full.sv --top-module tb_mips_full -Mdir obj_full
./obj_full/Vtb_mips_full
```

Replace `tb_mips_full` with any other testbench name. Each testbench prints
`TB_RESULT checks=N failures=M` and ends. A watchdog ends a run that hangs,
and counts that as a failure.

## Verification

* Each module has a unit testbench that compares it with a reference written
  independently in the testbench: random and directed stimulus for the ALU,
  extender, decoder table, register file (with and without bypass), memories,
  byte/half-word alignment, HI/LO arithmetic, branch conditions and targets,
  PC (with redirect), pipeline register, hazard
  rules (all four configurations) and forwarding priority.
* `tb_mips_pipeline` runs a set of programs on three copies of the processor:
  forwarding with bypass, stall-only with bypass, and stall-only without
  bypass. The programs are the example sequences above, a load-use sequence,
  a byte/half-word load and store sequence, an unaligned word moved with
  LWL/LWR/SWL/SWR, a multiply/divide sequence, an LL/SC sequence (one
  successful and one failing `SC`), a branch and jump sequence
  covering every control-flow case in the table above, and four random
  150-instruction programs over r0–r7. The random programs use every memory,
  LL/SC and multiply/divide instruction, and forward branches and jumps that are
  never placed in a delay slot.
  It compares every register and data-memory word with an instruction-by-
  instruction reference model. It checks stall counts and completion cycles
  against hand-worked values. It also checks that every mechanism (load-use
  stall, M→Ex, W→Ex, register-file bypass, branch squash) actually occurred.
* `tb_mips_full` does the same at the default parameters.

The set-up of the example programs uses the register values r1..r7 = 36, 9,
12, 18, 7, 41, 22, written by `addi` instructions followed by four nops. Since
MIPS has no `nand`, the first example uses `nor` in its place.

## Departures and choices to be aware of

* Every hazard comparison requires the producer to write a register (RegWr).
  This way stores, bubbles and instructions without a destination never stall
  or forward.
* With forwarding, the only stall is load-use. There is no load delay slot:
  the hardware interlocks.
* Branches resolve in EX with one delay slot. The classic textbook datapath
  carries the target to MEM instead, which would discard two instructions.
* The register-file bypass is a mux around the array, not an opposite-edge
  register file.
* The single-cycle multiplier and divider are the simplest correct choice.
  They set the clock period of a real implementation. A multi-cycle unit
  would need a HI/LO interlock that this design does not have.
* The LL/SC link bit and its rules (set by `LL`, cleared only by `SC`) are
  this design's choice for a single processor without exceptions.
* Little-endian byte order and the round-down treatment of misaligned
  addresses are this design's choices.
* Memory sizes (256 words each) are this design's choice. The loader and debug
  ports and the event outputs exist for testing and performance counting.
