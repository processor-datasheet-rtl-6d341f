# A 64-bit control-word processor for a LEGv8 subset

This is a small 64-bit processor in which every instruction step is one flat
**31-bit control word**. The word names the registers to read and write, the
ALU function, the next-PC mode and the one source that drives the shared data
bus. The control unit does nothing but turn an instruction into that word, plus
a 64-bit literal **K**. The datapath does whatever the word says, so the whole
machine can also be driven by hand one word at a time, without the control unit.

The processor runs a subset of ARM's teaching ISA LEGv8, with the standard
encodings: add, subtract, AND, OR, XOR (register, immediate and flag-setting
forms), shifts, MOVZ/MOVK, loads and stores, B, BL, BR, CBZ, CBNZ and B.cond.
It is single-cycle. Most instructions take one clock. The ALU is deliberately
plain: it shifts by one place and has no wide-move logic. So MOVZ, MOVK and
multi-place shifts take extra clocks, and the PC holds while they run.

The organisation follows a processor datasheet: the 32 x 64-bit register file,
the ALU with its function-select codes, the 255-word RAM that writes on the
rising edge and reads on the falling edge, the four-mode PC and the control-word
layout. The source left the control-word values for each instruction
unfinished. They were derived here from what each field means. Those values and
everything else marked below as a design choice are this implementation's own.

## Block structure

```
            +-----------+  instr  +--------------+  cw, K, zbr
 pc ------->| instr_mem |-------->| control_unit |-----------+
  ^         +-----------+         +--------------+           |
  |                                   ^ flags                v
  |   +------------------------- datapath -------------------------+
  |   |  program_counter <- PS, (PCsel ? K : regA)                 |
  +---|  regfile --A--> alu <--B-- (selB ? K : regB)               |
      |     ^                |                                     |
      |     |    data bus <--+-- EN_ALU   (one source only)        |
      |     +--- data bus <----- EN_MEM / EN_B / EN_PC (PC+4)      |
      |  status register <- ALU Z/N/C/V when SL = 1                |
      +------------------------------------------------------------+
                 | ALU result [10:3] = address, regB = write data
                 v
            +----------+
            | data_ram |---- read data (falling edge) -> EN_MEM
            +----------+
```

| Module | Role |
|---|---|
| `cpu` | top: the blocks above wired together, plus a program-load port |
| `datapath` | register file, ALU, PC, status register, data bus |
| `control_unit` | instruction decoder and a small sequencer for multi-cycle instructions |
| `regfile` | 32 x 64-bit registers, two combinational read ports, one write port |
| `alu` | 64-bit ALU: operand inverters, eight operations, Z/N/C/V |
| `program_counter` | 64-bit PC with hold / +4 / load / relative modes |
| `data_ram` | 255 x 64-bit RAM: rising-edge write, falling-edge read |
| `instr_mem` | 256 x 32-bit instruction memory with a load port |
| `legv8_pkg` | control-word struct, ALU codes, opcodes, condition evaluation |

## The control word

Fields in `legv8_pkg::ctrl_word_t`, from MSB to LSB:

| Bits | Field | Meaning |
|---|---|---|
| 30:29 | PS | next PC: `00` hold, `01` PC+4, `10` PC <- in, `11` PC <- PC+4+in*4 |
| 28:24 | DA | register written |
| 23:19 | SA | register read on port A (always ALU input A) |
| 18:14 | SB | register read on port B |
| 13:9 | FS | ALU function select |
| 8 | regW | write the data bus into register DA at the clock edge |
| 7 | ramW | write register B into the RAM at the ALU-result address |
| 6 | EN_MEM | RAM read data drives the data bus |
| 5 | EN_ALU | ALU result drives the data bus |
| 4 | EN_B | register B drives the data bus |
| 3 | EN_PC | PC+4 drives the data bus (return address for BL) |
| 2 | selB | ALU input B: `0` register B, `1` K |
| 1 | PCsel | PC jump input ("in" above): `0` register A, `1` K |
| 0 | SL | load the ALU's Z/N/C/V into the status register |

**The data bus** carries the register write data. At most one of EN_MEM,
EN_ALU, EN_B and EN_PC may be set in a cycle. The bus is an AND-OR multiplexer,
not tri-state drivers. An assertion in `datapath` reports two enabled sources.
With no source enabled the bus reads zero.

**K** is a separate 64-bit output of the control unit. It carries an
immediate, a load/store offset, a branch offset or a MOVK mask.

## The ALU function select

FS[1] inverts A and FS[0] inverts B before the operation. FS[4:2] picks the
operation:

| FS[4:2] | Result | Codes used |
|---|---|---|
| 000 | A & B | `00000` AND, `00001` A & ~B (MOVK mask) |
| 001 | A \| B | `00100` |
| 010 | A + B + c0 | `01000` add, `01001` subtract |
| 011 | A ^ B | `01100` |
| 100 | A >> 1 (zero in) | `10000` |
| 101 | A << 1 (zero in) | `10100` |
| 110 | 0 | `11000` |
| 111 | 16'hFFFF, zero-extended | `11100` |

The ALU has an explicit carry input. In the datapath it is `FS[1] | FS[0]`, so
inverting an operand makes the two's complement: `01001` is A - B and `01010`
is B - A. Standalone, the same ALU also gives A+1, A-1, -A, A and ~A through
the carry input. Status is `{V, C, N, Z}` (bit 0 = Z). Z and N describe every
result. C (unsigned carry) and V (signed overflow) come only from the adder and
are 0 otherwise. For subtraction C = 1 means "no borrow", as in ARM.

Two readings of the source are worth knowing:
- Its two tables disagree on the shift codes. The ALU's own table (used here)
  gives `10000` = right and `10100` = left. The control-word table gives the
  opposite.
- The `111` constant is printed as a 16-bit all-ones value. It is kept that
  way: the upper 48 bits are 0, and nothing in the instruction set uses it.

## Multi-cycle instructions

The instruction stays on the instruction-memory output because PS = `00` holds
the PC. The control unit steps through a 2-bit state (`cu_state`):

| Instruction | Cycle 1 (state 00) | Further cycles | PC |
|---|---|---|---|
| MOVZ Rd, #imm, LSL #16*hw | Rd <- 0 (`11000`) | state 01: Rd <- Rd \| (imm << 16hw) | held in cycle 1 |
| MOVK Rd, #imm, LSL #16*hw | Rd <- Rd & ~(FFFF << 16hw) (`00001`, K = mask) | state 01: as MOVZ | held in cycle 1 |
| LSL/LSR Rd, Rn, #n, n >= 2 | Rd <- Rn shifted once | state 10: Rd <- Rd shifted once, n-1 times | held until the last cycle |
| LSL/LSR #1 | Rd <- Rn shifted once | none | |
| LSL/LSR #0 | Rd <- Rn, register B (SB = Rn) put on the bus with EN_B | none | |

So MOVZ and MOVK take 2 clocks, and LSL/LSR #n take max(n, 1) clocks (up to
63). A 6-bit counter in the control unit counts the remaining shifts. Because
Rd is rewritten in every cycle, an instruction whose Rd equals Rn still gives
the right result.

## Branches and the PC

The PC mode PS=`11` computes **PC + 4 + 4*K**. To keep standard LEGv8 semantics
(target = address of the branch + 4*offset), the control unit sends
**K = offset - 1** for B, BL, B.cond, CBZ and CBNZ.

- **B / BL**: PS=`11`, PCsel=1. BL also puts PC+4 on the bus (EN_PC) and
  writes it to X30.
- **BR Rn**: PS=`10`, PCsel=0, SA=Rn.
- **B.cond**: the condition (EQ, NE, HS, LO, MI, PL, VS, VC, HI, LS, GE, LT,
  GT, LE, AL) is tested against the status register. The status register
  changes only when an instruction sets SL: ADDS, SUBS, ADDIS, SUBIS, ANDS,
  ANDIS. ANDS/ANDIS clear C and V.
- **CBZ / CBNZ Rt**: Rt passes through the ALU (Rt | Rt). The control unit
  raises `zbr` and proposes PS=`11`. The datapath replaces that with PS=`01`
  when the ALU zero flag disagrees. The decision is made in the datapath so
  that no combinational path runs from the ALU back into the control unit.

## Memories and timing

All state changes on the rising edge, except the data RAM's read register. The
reset is asynchronous and active high. It clears the PC, all 32 registers, the
status register, the control-unit state and the RAM output register. It does
not clear the RAM cells or the instruction memory.

- **Register file**: reads are combinational. A write lands at the rising edge,
  and a read of the same register in that cycle sees the old value. X31 is an
  ordinary register, not a zero register.
- **Data RAM**: 255 words. It writes at the rising edge and loads its read
  register at the **falling edge**. A load therefore finishes in one cycle:
  - The address is formed in the first half of the cycle.
  - The data is captured at the falling edge.
  - The data is written into the register file at the next rising edge.

  Reads and writes never happen at the same instant. Addresses are byte
  addresses: ALU result bits [10:3] select a 64-bit word, so data lives at byte
  addresses 0 to 2039. Word 255 does not exist: it reads zero and ignores
  writes. The address wraps every 2 KiB.
- **Instruction memory**: 256 words. Reads are combinational, indexed by
  PC[9:2]. Addresses past the end read zero, which decodes as a no-op
  (PC + 4). Load a program through `imem_load_*` (word index, one word per
  clock) while holding `rst` high.

## Instruction encodings

These are the standard LEGv8 fields:

| Format | Fields | Instructions |
|---|---|---|
| R | opcode[31:21] Rm[20:16] shamt[15:10] Rn[9:5] Rd[4:0] | ADD SUB ADDS SUBS AND ORR EOR ANDS LSL LSR BR |
| I | opcode[31:22] imm12[21:10] Rn Rd | ADDI SUBI ADDIS SUBIS ANDI ORRI EORI ANDIS |
| D | opcode[31:21] offset9[20:12] Rn Rt | LDUR STUR |
| IW | opcode[31:23] hw[22:21] imm16[20:5] Rd | MOVZ MOVK |
| CB | opcode[31:24] offset19[23:5] Rt | CBZ CBNZ B.cond (cond in Rt[3:0]) |
| B | opcode[31:26] offset26 | B BL |

Departures from full LEGv8 (design choices):
- The logical immediates (ANDI, ORRI, EORI, ANDIS) take the 12-bit field
  zero-extended, not ARM's bitmask-immediate encoding.
- Loads and stores are 64-bit only.
- Any encoding not listed is a no-op.

## Using the RTL

Every file is standalone SystemVerilog-2017. `legv8_pkg.sv` must be read first.
Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
to build and run the whole-processor test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/legv8_pkg.sv tb/legv8_asm_pkg.sv rtl/cpu.sv tb/cpu_tb.sv --top-module cpu_tb
./obj_dir/Vcpu_tb
```

The unit testbenches are `alu_tb`, `regfile_tb`, `data_ram_tb`,
`program_counter_tb`, `instr_mem_tb`, `control_unit_tb` and `datapath_tb`. Each
compares the block with a model written in the testbench. `tb/legv8_asm_pkg.sv`
holds encoder functions (`r_type`, `i_type`, `d_type`, `iw_type`, `cb_type`,
`b_type`) for writing test programs.

`cpu_tb` runs at the default sizes:
- One hand-written program. It has a counted loop closed by B.NE, builds a
  64-bit constant with MOVZ/MOVK, uses loads and stores, 4- and 63-place
  shifts, taken and untaken CBZ/CBNZ, a BL/BR call, and flag-setting
  arithmetic followed by B.VS, B.EQ, B.LT and B.GT.
- Five random 200-instruction programs.

An instruction-level model in the testbench runs alongside. Every clock the PC
must match the model. This also checks the cycle count of every instruction.
At the end all registers and stored memory words must match. The testbench
also fails if any opcode, a taken or untaken conditional branch, a held-PC
cycle, any of the four flags, any of the four data-bus sources, a status
register load or a RAM write never occurred.

## Limits

- Single cycle, no pipeline and no hazards to handle. The critical path runs
  through instruction memory, decode, register read, the 64-bit adder and the
  RAM address to the falling edge.
- The source also shows a pipelined front end (IF/ID register, instruction
  register file and instruction buffer) with no description. It is not built.
  The instruction goes straight from instruction memory to the control unit.
- Only 64-bit loads and stores exist. The source's opcode table also lists
  byte, half-word and word variants (STURB/LDURB, STURH/LDURH, STURW), but
  its instruction list and control-word tables do not. The RAM has no byte
  enables, so they are not implemented and decode as no-ops.
- Status flags come only from the flag-setting instructions listed above.
  There are no exceptions and no interrupts.
