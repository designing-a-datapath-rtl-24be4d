# A single-cycle Thumb datapath

This is a processor core that executes a useful subset of the 16-bit ARM Thumb
instruction set. It finishes **every instruction in one clock cycle**. There is
no pipeline. The PC addresses an instruction memory, a decoder expands the
instruction into control signals, and the values flow through register file,
shifter, ALU and data memory back to the register file before the next rising
edge. The long combinational path limits the clock rate: register file →
shifter → ALU → data memory → register file. The gain is that the whole machine
can be read as one picture. A pipelined design would start from this one and
cut that path into stages.

The main idea is that a small number of datapath elements, steered by a wide
word of control signals, can carry out every instruction. The decoder just
looks up that word in a table, one row per instruction. Most of the work of
the design lies in choosing elements and control settings so that one fixed
set of wires can serve all the instruction formats.

The design follows a teaching design that builds such a datapath step by step.
The element names, the control signals and the decoding table come from that
source. The sizes, the reset behaviour, the encodings of the control values
and a few details of the Thumb architecture that it leaves open are this
implementation's choices. They are listed under "Where the choices are this
design's own".

## The datapath

```
           +----+   instr   +--------+  ctrl (decoded signals)
 pc ------>|IMem|---------->| Decode |------------------------------------+
  ^        +----+           +--------+                                    |
  |  regselA/B/C: instruction field or SP/LR/PC -> cRegA/B/C              |
  |                                                                       |
  |  +---------+ ra ------------------------------+----------+            |
  +--| RegFile | rb -> rand2sel -> Shifter -aluin2-> ALU -aluout-> DMem   |
     | r0..r15 | rc ---------(store data)-------------------------> |     |
     +---------+           shiftsel ^  shcarry ^   | newflags     memout  |
        ^   ^  nextpc = pc+2                   Flags -> Condx -> enable   |
        |   +-- result = cMemRd ? memout : aluout                         |
```

| Element | Module | What it does |
|---|---|---|
| IMem | `imem` | 16-bit instruction at the PC, read combinationally |
| Decode | `decoder` | opcode → `ctrl_t` bundle of decoded control signals |
| regselA/B/C | `regsel` ×3 | picks a register number: instruction field (Rx, Ry, Rz, Rw, Rxx, Ryy) or fixed SP, LR, PC |
| RegFile | `regfile` | 16 registers, r15 is the PC; three read ports, PC port, nextpc input, link write |
| rand2Sel | `rand2sel` | second operand: rb, or an immediate field (zero- or sign-extended) |
| shiftsel | `shiftsel` | shift amount: 0, 1, 2, 12, imm5 field, or ra[7:0] |
| Shifter | `shifter` | Lsl/Lsr/Asr/Ror of the second operand, with carry out |
| alusel | `alusel` | ALU operation; resolves "add or subtract by bit 9 / bit 7" |
| ALU | `alu` | 13 operations and the NZCV flags |
| DMem | `dmem` | word load (combinational) and store (clocked) |
| Flags | `flags_reg` | NZCV register, written when cWFlags is set |
| Condx | `condx` | evaluates condition field instr[11:8] against the flags |
| +2, result mux, regwrite mux, link mux | inline in `thumb_datapath` | small muxes, see below |

`thumb_pkg` defines the control types, and `thumb_datapath` is the top level.

### The shifter sits in front of the ALU

The barrel shifter acts on the second operand before it reaches the ALU. It is
not a separate unit beside the ALU. Shift instructions then use the ALU's `Mov`
operation, which passes the shifted operand through. The same shifter also
scales immediate offsets: word offsets ×4 (`Sh2`), branch offsets ×2 (`Sh1`)
and the upper half of a `bl` offset ×4096 (`Sh12`). No separate scaling adders
are needed.

### The PC is register r15

The register file follows the ARM view that the PC is an ordinary register:

* When a read port selects r15 it returns **PC+4**, the value the architecture
  specifies for reads of the PC.
* A separate `pc` output gives the true current PC for instruction fetch.
* Every cycle the PC is loaded with `nextpc` = PC+2, **unless** the instruction
  writes r15 explicitly, in which case that write wins. A branch is therefore
  simply an ALU add whose result is written to r15. Bit 0 of a value written to
  the PC is dropped, because register-held targets carry the Thumb bit.
* `cLink` writes `nextpc` to LR (r14) as well, in the same cycle.

### Decoding: a row of control signals per instruction

Each control signal takes a few named values:

| Signal | Values |
|---|---|
| cRegSelA/B/C | Rx=instr[2:0], Ry=[5:3], Rz=[8:6], Rw=[10:8], Rxx={[7],[2:0]}, Ryy=[6:3], Rsp, Rlr, Rpc, – |
| cRand2 | RegB, Imm3, RImm3 (rb or imm3 by instr[10]), Imm5, Imm7, Imm8, SImm8, Imm11, SImm11 |
| cShiftOp | Lsl, Lsr, Asr, Ror |
| cShiftAmt | Sh0, Sh1, Sh2, Sh12, ShImm (instr[10:6]), ShReg (ra[7:0]) |
| cAluSel | Add Sub And Eor Orr Bic Mvn Mov Adc Sbc Neg Mul Adr, Bit9, Bit7 |
| cMemRd, cMemWr | load / store; cMemRd also steers the result mux |
| cWFlags | write NZCV |
| cWReg | N / Y / C (write only if the condition holds) |
| cWLink | N / Y / C (link if instr[7] is set) |

The decoder is written as a set of lookup tables, the way a ROM decoder would
be built. A 32-entry main table on `instr[15:11]` identifies most
instructions. Two smaller tables handle the groups that start `010000` (the
register ALU group, indexed by `instr[9:6]`) and `010001` (high-register
operations and bx/blx, indexed by `instr[9:8]`). Some rows are worth a closer
look:

| Instruction | A | B | C | Rand2 | Shift | AluSel | Mem | Flags | WReg | WLink |
|---|---|---|---|---|---|---|---|---|---|---|
| adds/subs r/i3 | Ry | Rz | Rx | RImm3 | Lsl Sh0 | Bit9 | – | T | Y | N |
| rors r | Ry | Rx | Rx | RegB | Ror ShReg | Mov | – | T | Y | N |
| ldr i5 | Ry | – | Rx | Imm5 | Lsl Sh2 | Add | Rd | F | Y | N |
| ldr pc | Rpc | – | Rw | Imm8 | Lsl Sh2 | Adr | Rd | F | Y | N |
| b\<c\> | Rpc | – | Rpc | SImm8 | Lsl Sh1 | Add | – | F | C | N |
| bx/blx | – | Ryy | Rpc | RegB | Lsl Sh0 | Mov | – | F | Y | C |
| bl1 | Rpc | – | Rlr | SImm11 | Lsl Sh12 | Add | – | F | Y | N |
| bl2 | Rlr | – | Rpc | Imm11 | Lsl Sh1 | Add | – | F | Y | Y |

Reading these rows:

* For `rors` the shift amount comes from the *first* register port. That is
  why the roles of Rx and Ry are swapped there.
* `ldr pc` uses `Adr`, an add that first rounds the PC+4 value down to a
  multiple of 4.
* A conditional branch computes its target every time. Only the write to r15
  depends on the condition. The flags are read but not changed, so one compare
  can feed several branches.

### Subroutine calls

The 32-bit `bl` runs as two 16-bit halves, one per cycle:

1. `bl1` computes PC+4 + (sign-extended high offset × 4096) into LR.
2. `bl2` computes LR + (low offset × 2) into the PC. In the same cycle
   `cLink` writes the return address (`nextpc`) into LR.

`bx Rm` and `blx Rm` differ only in bit 7. The link mux therefore copies
`instr[7]` into `cLink` (cWLink = C). Returning is `bx lr`.

This split assumes the J1 and J2 bits of the second half are both 1. That
holds for any offset inside ±4 MB.

### Flags

The ALU always computes NZCV. Whether they are stored is decided by cWFlags:
arithmetic and logical instructions write them, and loads, stores, branches,
`add`/`mov` with high registers and SP arithmetic do not.

* Add-type operations set all four flags. For a subtraction, C is set when
  there is no borrow.
* Logical operations and `Mov` take C from the shifter's carry-out and keep V.
  A shift by 0 passes the current C through, so non-shifting logical
  instructions leave C alone.
* `muls` sets only N and Z.

## Instruction coverage

**Implemented:**

* shifts: lsls/lsrs/asrs with #imm5
* add/sub register and imm3
* mov/cmp/add/sub with imm8
* the whole register ALU group: ands eors lsls lsrs asrs adcs sbcs rors tst
  negs cmp cmn orrs muls bics mvns
* high-register add/cmp/mov
* bx, blx
* word loads and stores: ldr/str reg+reg, reg+imm5, sp+imm8, and ldr pc-relative
* address generation: add Rd,pc,#imm and add Rd,sp,#imm; add/sub sp,#imm7
* branches: b\<c\>, b, bl

**Not implemented:**

* byte and halfword transfers
* push/pop, ldm/stm
* sign/zero extension, rev, cps
* svc and udf
* other 32-bit encodings

These execute as a no-op that only advances the PC, and the top-level `undef`
output is raised for that cycle.

## Interfaces and timing

`thumb_datapath` (parameters `IMEM_WORDS = 2048`, `DMEM_WORDS = 1024`,
`RESET_PC = 0`):

* `clk`, `rst`: reset is synchronous and active high. It clears r0–r14 and
  the flags and sets the PC to `RESET_PC`. Memory contents are not reset.
* `imem_we`, `imem_waddr`, `imem_wdata`: program load into the instruction
  memory, one halfword per clock, by byte address.
* Trace outputs:
  * `pc` and `instr`: the instruction executing this cycle.
  * `undef`
  * `mem_wr`, `mem_addr`, `mem_wdata`: the store made this cycle.
  * `flags`

One instruction completes at each rising edge. Both memories answer within the
cycle. They model the hit case of separate instruction and data caches in a
modified Harvard arrangement. A real memory system would need a stall
mechanism, which this design does not have. Constants in a literal pool that
`ldr pc` should read must be in the data memory, since that is where loads go.

## Where the choices are this design's own

The reference description leaves these points open:

* Memory sizes: 2048 instructions and 1024 data words. Addresses wrap modulo
  the size.
* Memory interface: only word transfers exist, and `addr[1:0]` is ignored.
  `memout` is 0 when no read is requested.
* Program-load port on the instruction memory, and the trace outputs.
* Reset values.
* Bit patterns of all control values.
* Unused register ports ("–" in the table) read r0.
* The shifter has a carry input (the current C flag). The source drawing shows
  only value, amount and operation entering it. The ALU receives all four
  flags, not only the carry, so that V can be kept.
* Architectural details taken from the Thumb instruction set, where the source
  names an operation without defining it:
  * `lsrs/asrs #0` shift by 32
  * shifts by a register use the bottom byte, with ARM results for amounts of
    32 or more
  * `Adr` rounding
  * flag rules per operation
  * the condition table
  * bit 0 dropped on writes to the PC
* LR after `bl`/`blx` holds the plain return address, as in the source. It does
  not have bit 0 set as on a real Cortex-M. Code that compares LR values would
  see the difference. `bx lr` works either way.
* Condition codes 1110 and 1111 in the branch format are not branches
  (udf/svc). They are decoded as unimplemented.

## Simulating

Every module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`.
Each one ends by printing `TB_RESULT checks=N failures=M`. The top-level test
is `tb/tb_thumb_datapath.sv`, and runs at the default sizes:

* It assembles an 87-instruction program in place, using the encoders in
  `tb/thumb_asm_pkg.sv`.
* It checks all 19 stores the program makes against hand-computed values.
* It checks that the final loop is reached after exactly 110 cycles for 110
  executed instructions.
* It counts taken and untaken conditional branches, calls, returns, loads,
  stores, PC- and SP-relative operations, high-register operations, shifts by
  register, flag changes and the unimplemented opcode, and fails if any count
  is zero.

```
verilator --binary --timing --assert --top-module tb_thumb_datapath \
  rtl/thumb_pkg.sv tb/thumb_asm_pkg.sv rtl/*.sv tb/tb_thumb_datapath.sv
./obj_dir/Vtb_thumb_datapath
```

`tb/tb_thumb_random.sv` is a co-simulation against an instruction-set model
written inside the testbench from the Thumb rules:

* It runs 12 random programs of about 600 instructions each.
* The programs mix every implemented class, including forward `b<c>`, `b`
  and `bl`. A prologue fills a data area so that every load reads a known
  value.
* After every clock edge it compares PC, r0–r14 and NZCV with the model.
  This checks each instruction in the very cycle it executes.
* It reads the register file through the hierarchical path
  `dut.u_regfile.regs`.

A unit test is built the same way with its own `--top-module tb_<name>`. The
files need no include paths; `thumb_pkg.sv` must come first. To run your own
program, write it with the `thumb_asm_pkg` encoders, or load halfwords through
the `imem_*` port while `rst` is high, then release reset.
