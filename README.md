# A microcoded RISC-V machine on a single bus

This is a small RV32 processor that does not decode instructions into control signals with
logic. It interprets them with a microprogram instead. The datapath is minimal: one 32-bit bus,
a few registers, an ALU, a register file and a slow memory. Each clock cycle performs one
*register transfer* such as `A <= Reg[rs1]` or `PC <= A + 4`. A control ROM, indexed by a
microprogram counter (microPC), says which unit drives the bus in that cycle and which registers
load from it. Executing a RISC-V instruction means running a short sequence of these
microinstructions: fetch, decode by dispatching on the opcode, then the sequence for the
instruction's op-group.

The organisation follows the bus-based microcoded RISC-V machine of Berkeley's CS 152 lecture
"Simple Machine Implementations, Microcode". That lecture gives:

- the datapath
- the memory module
- the second ("jump-type") microcontroller
- the microprogram for fetch, ALU, ALU-immediate, load, store, jumps and branches
- complex ALU instructions with memory operands, which show that such an instruction needs only
  more microcode and no change to the datapath

What this RTL adds, and where it departs from the lecture, is listed under
[Departures and own choices](#departures-and-own-choices).

## Parts

| File | Part |
|---|---|
| `rtl/mc_pkg.sv` | Shared types: the control word `ctrl_t`, ROM word `uinst_t`, enums for ImmSel, RegSel, ALUOp, microbranch type; microcode entry addresses |
| `rtl/ucoded_rv32.sv` | Top: controller + datapath + memory |
| `rtl/ucontroller.sv` | microPC register, +1, op-group dispatch, jump logic, next-microPC multiplexer, control ROM |
| `rtl/control_rom.sv` | The microprogram |
| `rtl/jump_logic.sv` | Microbranch decision |
| `rtl/opcode_ext.sv` | Opcode to op-group entry address |
| `rtl/bus_datapath.sv` | IR, A, B, MA, bus multiplexer, ALU-operation decode |
| `rtl/alu.sv`, `rtl/imm_select.sv`, `rtl/reg_file.sv` | Datapath units |
| `rtl/bus_memory.sv` | Multi-cycle RAM with a `busy` flag |

## The bus and its transfers

Four units can drive the bus, each with its own enable from the control word:

| Driver | Enable | Drives |
|---|---|---|
| Immediate select | `en_imm` | the I, S, SB, U or UJ immediate of IR (`imm_sel`), or the whole IR |
| ALU | `en_alu` | `f(A, B)` |
| Register file | `en_reg` | entry `rs1`, `rs2`, `rd` or the PC (`reg_sel`) |
| Memory | the memory's own `dout_en` = `en_mem & ~mem_wrt` | the word at `MA` |

These destinations load from the bus at the clock edge:

- IR (`ld_ir`)
- A (`ld_a`)
- B (`ld_b`)
- MA (`ld_ma`)
- the register-file entry picked by `reg_sel` (`reg_wrt`)
- the memory (`en_mem & mem_wrt`)

The register file has a single port. So `Reg[rd] <= Reg[rs1]` is impossible in one cycle; it
goes through A and the ALU. The PC is entry 32 of the register file and x0 reads as zero. The
bus is a multiplexer, not tri-state wires. An assertion in `bus_datapath` fires if two drivers
are enabled together.

The ALU works only on A and B. Its `zero` output (result == 0) is the only datapath status the
controller sees, apart from the opcode. The microinstruction's 4-bit ALUOp field either names a
fixed operation, or says "take it from the instruction":

- `UOP_FUNC` for R-type and the three complex operations: funct3 plus bit 30.
- `UOP_FUNCI` for I-type: funct3, plus bit 30 for shifts only.
- `UOP_BRCMP` for conditional branches. funct3 picks a comparison whose result is zero exactly
  when the branch is taken: SUB for BEQ, SEQ for BNE, SGE for BLT, SLT for BGE, SGEU for BLTU,
  SLTU for BGEU.

The fixed operations are ADD, pass A, pass B, A+4, A−4, and `JumpTarg(A,B)`. `JumpTarg` adds
the UJ-format offset found in B (a copy of IR) to A.

## Memory and the busy/spin handshake

Memory is assumed to be much slower than a register transfer. `bus_memory` models this with a
counter:

- While `en_mem` is held, `busy` stays high for `LATENCY` cycles and then drops for one cycle.
- In that last cycle a load's data are valid on the bus, and a store writes the bus value into
  the array at the clock edge.
- An access therefore takes `LATENCY + 1` cycles.
- Dropping `en_mem` early aborts the access without writing.

The controller waits with the *spin* microbranch: the microinstruction repeats while `busy` is
high. Its register loads therefore happen on every repeat, and the last one, in the
non-busy cycle, is the one that sticks. For example, `IR <= Memory` reloads IR on each cycle
of the wait. A load writes `rd` on every cycle of its wait. Nothing reads `rd` during that time,
and the final value is the memory word.

Memory is word-addressed by `addr[11:2]` with the default 1024 words. It supports only 32-bit
accesses, and address bits [1:0] are ignored.

## The microcontroller

```
            opcode ──► ext ──► op-group ─┐
  ROM.abs_target ───────────────────────┤
  microPC + 1 ──────────────────────────┼─► mux ──► microPC ──► control ROM ──► control word
  microPC ──────────────────────────────┘    ▲                      │
                                             └─ jump logic ◄── jump type, zero, busy
```

The opcode and status bits do not address the ROM; they go through small logic beside it. This
keeps the ROM at 2^6 = 64 words of 29 bits: 20 bits of control signals, a 3-bit microbranch
type and a 6-bit absolute target. The microbranch types are:

| Type | Next microPC |
|---|---|
| next | microPC + 1 |
| spin | busy ? microPC : microPC + 1 |
| fetch | absolute (an unconditional microjump) |
| dispatch | entry of the opcode's op-group |
| ftrue | zero ? absolute : microPC + 1 |
| ffalse | zero ? microPC + 1 : absolute |

`ftrue` is built but the microprogram does not need it, because the branch compare is arranged
so that zero always means "taken".

## The microprogram

One line per microinstruction. The control ROM header in `rtl/control_rom.sv` has the same list.

| Op-group | microPC | Transfers (microbranch) |
|---|---|---|
| fetch | 0–2 | `MA, A <= PC`; `IR <= Memory` (spin); `PC <= A + 4` (dispatch) |
| ALU (OP) | 3–5 | `A <= rs1`; `B <= rs2`; `rd <= func(A,B)` (fetch) |
| ALUi (OP-IMM) | 6–8 | `A <= rs1`; `B <= Imm`; `rd <= Op(A,B)` (fetch) |
| LW | 9–13 | `A <= rs1`; `B <= Imm`; `MA <= A+B`; `rd <= Memory` (spin); — (fetch) |
| SW | 14–18 | `A <= rs1`; `B <= SImm`; `MA <= A+B`; `Memory <= rs2` (spin); — (fetch) |
| JAL | 19–23 | `A <= PC`; `rd <= A`; `A <= A-4`; `B <= IR`; `PC <= JumpTarg(A,B)` (fetch) |
| JALR | 24–29 | `A <= rs1`; `B <= Imm`; `B <= A+B`; `A <= PC`; `rd <= A`; `PC <= B` (fetch) |
| BRANCH | 30–35 | `A <= rs1`; `B <= rs2`; `A <= PC` with compare (ffalse → fetch); `A <= A-4`; `B <= BImm`; `PC <= A+B` (fetch) |
| LUI | 36 | `rd <= UImm` (fetch) |
| AUIPC | 37–40 | `A <= PC`; `A <= A-4`; `B <= UImm`; `rd <= A+B` (fetch) |
| mem-mem ALU (custom-0) | 41–47 | `MA <= rs1`; `A <= Memory` (spin); `MA <= rs2`; `B <= Memory` (spin); `MA <= rd`; `Memory <= func(A,B)` (spin); — (fetch) |
| reg-mem-src ALU (custom-1) | 48–51 | `MA <= rs1`; `A <= Memory` (spin); `B <= rs2`; `rd <= func(A,B)` (fetch) |
| reg-mem-dst ALU (custom-2) | 52–56 | `A <= rs1`; `B <= rs2`; `MA <= rd`; `Memory <= func(A,B)` (spin); — (fetch) |
| trap | 57 (and 58–63) | — (fetch to itself) |

By the time an instruction's own sequence runs, the PC already points at the next instruction.
Sequences that need the instruction's own address recover it with `A <= A - 4`.

J and JR are JAL and JALR with `rd = x0`. The three complex instructions use the R-type
layout, with funct3/funct7 choosing the operation:

| Instruction | Opcode | Operation |
|---|---|---|
| memory-memory | `0001011` | `M[rd] <= M[rs1] op M[rs2]` |
| register-memory source | `0101011` | `rd <= M[rs1] op rs2` |
| register-memory destination | `1011011` | `M[rd] <= rs1 op rs2` |

### Cycles per instruction

With L = `MEM_LATENCY` (default 10), every instruction costs its fetch (3 + L cycles) plus:

| ALU | ALUi | LW | SW | JAL | JALR | branch not taken / taken | LUI | AUIPC | mem-mem | reg-mem-src | reg-mem-dst |
|---|---|---|---|---|---|---|---|---|---|---|---|
| 3 | 3 | 5+L | 5+L | 5 | 6 | 3 / 6 | 1 | 4 | 7+3L | 4+L | 5+L |

An `add` therefore takes 16 cycles at the default latency, and a `lw` takes 28.

## Departures and own choices

Where the lecture's microcode is incomplete or uses an older RISC-V draft, this RTL follows the
RV32I instruction formats.

- **Encodings.** The microcode slides take immediates from older bit positions, for example a
  branch offset from IR[31:27,16:10]. Here the immediates, the branch offset and the JAL target
  use the RV32I layout: sign bit 31, SB offset `imm[12|10:5]…imm[4:1|11]`, UJ offset
  `imm[20|10:1|11|19:12]`.
- **JAL** writes `rd`, not always x1, so that J is JAL with `rd = x0`.
- **JALR** is six steps of this design's own. The lecture's three-step version would link the
  wrong value and ignore the immediate. The target's bit 0 is not cleared, and the memory ignores
  address bits [1:0].
- **Stores** use the S-type immediate. The lecture's slide says "BImm", from the older encoding.
- **Branches.** All six conditions share one sequence, with the condition chosen in the ALU by
  funct3. The lecture shows only `beq`.
- **Own additions**: LUI and AUIPC, and the trap state with its `halted` output. The opcodes of
  the three complex instructions are also this design's choice. The lecture gives a microprogram
  only for the memory-memory form. The two register-memory sequences are written here in the
  same style.
- **Sizes.** The control word is 20 bits, not the lecture's 17, because ALUOp is 4 bits wide
  here. The lecture's datapath figure prints ImmSel and RegSel as 3 bits; both are 3 bits here.
- **Not built**:
  - byte and half-word loads and stores
  - the floating-point registers and the FP status register
  - exceptions beyond the single trap
  - the lecture's first, pure-ROM controller (superseded by the jump-type controller used here)
  - the nanocoding and writable-control-store variants, which the lecture only discusses
- **Reset.** An active-low asynchronous reset clears the microPC, IR, A, B, MA and the whole
  register file, so execution starts at address 0. Memory is not reset: load the program before
  releasing reset.

## How far it has been checked

Every module has a self-checking testbench in `tb/`:

- **`tb_ucoded_rv32`** runs the whole machine at its default parameters. It runs a fixed program
  with a loop of stores, loads and a backward branch, plus a call and return. It then runs 1000
  random programs of 80 instructions, drawn from every instruction kind. An instruction-level
  model in the testbench runs the same programs. After each one, all registers, the PC and the whole memory
  must match the model. The cycle count must equal the table above exactly.
- **Coverage of the top test.** It counts memory spin cycles, dispatches, branches taken and not
  taken for each of the six conditions, and every op-group including the trap. It fails if any of
  these never occurred.
- **Unit tests**:
  - `tb_alu`, `tb_imm_select` and `tb_reg_file` check their unit against reference models, with
    random and corner-case values.
  - `tb_bus_memory` checks busy timing, data and aborted stores.
  - `tb_jump_logic` checks the microbranch table exhaustively.
  - `tb_opcode_ext` checks all 128 opcodes.
  - `tb_control_rom` checks every ROM word against the transfer table above.
  - `tb_ucontroller` checks the microPC walk for each op-group, with busy and zero driven.
  - `tb_bus_datapath` plays controller and memory and checks each transfer and ALU decode.

The reference models in the testbenches were written from the RV32I definitions and from the
tables above, separately from the RTL. A bug shared by both, such as a misread format, would not
be caught.

## Simulating

Plain Verilator 5 is enough. The package must come first:

```
verilator --binary --timing --assert -y rtl -y tb rtl/mc_pkg.sv tb/tb_ucoded_rv32.sv \
          --top-module tb_ucoded_rv32 -o sim
./obj_dir/sim
```

Every testbench ends by printing `TB_RESULT checks=N failures=M`. The top-level run takes well
under a second. For any other testbench, replace `tb_ucoded_rv32` with its name.

To run your own program, write 32-bit words into `ucoded_rv32.u_mem.mem[]` (word `i` is at byte
address `4*i`) while reset is held. Then release reset and wait for `halted`. The word
`0x0000007f` is a convenient halt.

## Changing it

- **Memory size and latency.** Set the top's `MEM_DEPTH` and `MEM_LATENCY` parameters. Any
  latency from 0 up works; with 0, memory never raises busy.
- **Adding an instruction.** This is the point of microcode:
  1. Append its microinstructions in `control_rom.sv`.
  2. Give it an entry address in `mc_pkg`.
  3. Map its opcode in `opcode_ext.sv`.

  The datapath needs no change if the new behaviour is a sequence of bus transfers. There are 6
  free ROM words at `UPC_W = 6`. Widen `UPC_W` for more, and update the address constants.
