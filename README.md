# RISC16: a 16-bit multi-cycle load/store processor

RISC16 is a small, non-pipelined 16-bit RISC processor for FPGA-based embedded
use. Every instruction is one 16-bit word with a fixed layout. It has sixteen
16-bit general-purpose registers and a single memory for program and data
(16K words). One ALU does all the arithmetic: it increments the PC, forms load/store
addresses and branch targets, and executes the ALU instructions. A five-state
controller sequences it. Every instruction takes the same four clocks: two fetch
phases and two execute phases.

The architecture follows a published description of a 16-bit RISC processor
for the Xilinx Spartan-3E. That description sets the instruction set and its
encoding, and the register file organisation. It also sets the IDLE / FETCH /
EXECUTE controller with two phases per step, and the names of the main control
signals. The RTL here is an independent implementation. Where the description
gives no detail, the choices are this design's own. They are listed under
"Design choices" below.

## Instruction set

Bits 15:12 hold the opcode. Bits 11:8 hold `Rd`, bits 7:4 `Rs`, and bits 3:0 `Rt`
or a 4-bit offset.

| opcode | mnemonic | fields        | operation                                   |
|--------|----------|---------------|---------------------------------------------|
| 0000   | ADD      | Rd, Rs, Rt    | Rd = Rs + Rt                                |
| 0001   | SUB      | Rd, Rs, Rt    | Rd = Rs - Rt                                |
| 0010   | AND      | Rd, Rs, Rt    | Rd = Rs & Rt                                |
| 0011   | OR       | Rd, Rs, Rt    | Rd = Rs \| Rt                               |
| 0100   | XOR      | Rd, Rs, Rt    | Rd = Rs ^ Rt                                |
| 0101   | NOT      | Rd, Rs        | Rd = ~Rs                                    |
| 0110   | SLA      | Rd, Rs        | Rd = Rs << 1                                |
| 0111   | SRA      | Rd, Rs        | Rd = Rs >>> 1 (sign kept)                   |
| 1000   | LI       | Rd, imm8      | Rd = {8'h00, imm8} (imm8 = bits 7:0)        |
| 1001   | LW       | Rd, Rs        | Rd = M[Rs]                                  |
| 1010   | SW       | Rs, Rt        | M[Rs] = Rt                                  |
| 1011   | BIZ      | Rs, off       | if Rs == 0: PC = PC + 1 + sext(off)         |
| 1100   | BNZ      | Rs, off       | if Rs != 0: PC = PC + 1 + sext(off)         |
| 1101   | JAL      | Rd, off       | Rd = PC + 1; PC = PC + 1 + sext(off)        |
| 1110   | JMP      | off           | PC = PC + 1 + sext(off)                     |
| 1111   | JR       | Rs            | PC = Rs                                     |

Branch and jump offsets are 4-bit signed numbers, so the range is -8..+7 words
from the next instruction. A longer jump loads an address into a register
(with `LI`, shifts and `OR`) and uses `JR`. `JMP -1` (`16'hE00F`) jumps to itself
and is the usual way to halt. Memory addresses are word addresses. The low
14 bits of the register or PC select the word.

## The four-phase instruction cycle

This is the core of the design. The controller (`control_unit`) has the states
`IDLE`, `FETCH1`, `FETCH2`, `EXEC1` and `EXEC2`. Each state lasts one clock.
`reset_s1` forces `IDLE` from any state. `IDLE` writes zero into the PC, and
the processor then runs `FETCH1 → FETCH2 → EXEC1 → EXEC2 → FETCH1 …`.

| phase  | all instructions / per class |
|--------|------------------------------|
| FETCH1 | memory address = PC. The IR captures `M[PC]`. The ALU computes PC + 1 (operand A = PC, operand B = constant 1, `alu_op` = ADD) into the ALU output latch. |
| FETCH2 | PC ← ALU output latch (PC + 1). The decoded opcode loads the operand latches it needs: A ← `Rs` and/or B ← `Rt`. JAL writes the latch (PC + 1) to `Rd`. |
| EXEC1  | ALU ops: A op B into the latch, and the flags update. LW: address = A + 0, and the memory word goes into the MDR. SW: address = A + 0, and B is written to memory. BIZ/BNZ/JAL/JMP: the latch gets PC + offset (the PC is already PC + 1). JR: the latch gets A + 0. LI: nothing. |
| EXEC2  | ALU ops: `Rd` ← latch. LW: `Rd` ← MDR. LI: `Rd` ← imm8. JAL/JMP/JR: PC ← latch. BIZ/BNZ: PC ← latch if the zero check of latch A allows it. SW: nothing. |

Notes on this schedule:

* Branches test the register value that was captured in latch A in FETCH2. The
  ALU is busy computing the target, so the zero check is a separate
  16-input NOR on the latch (`opa_zero`).
* Every register read goes through the operand latches in FETCH2, and every
  write lands in EXEC2 (JAL in FETCH2). No instruction overlaps another, so
  there are no hazards and no forwarding.
* Memory is touched twice per instruction at most: the instruction read in
  FETCH1 and a data read or write in EXEC1. A single-ported memory is enough.

## Datapath

`datapath` holds these units:

* `register_file`: 16 × 16 bits, two combinational read ports (`Rs`, `Rt`) and
  one write port (`Rd`) clocked on the rising edge.
* Operand latches A and B, and a memory data register (MDR).
* The operand multiplexers. Operand A is latch A or the PC. Operand B is latch B,
  1, the sign-extended offset, or 0.
* `alu`: ADD, SUB, AND, OR, XOR, NOT, with carry-out and signed overflow.
* `barrel_shifter`: a four-stage arithmetic shifter (0..15 places), used here
  by one place for SLA and SRA.
* `accumulator`: the ALU output latch. It captures the ALU or shifter result.
  It feeds the next-PC mux and the register write port.
* `flag_register`: `{v, c, n, z, parity}` of the last ALU or shift
  instruction. `c` is the adder carry (1 = no borrow on SUB) or the bit shifted
  out. `v` is the signed overflow of ADD/SUB, and 0 for the other operations.
  `parity` is the XOR of the result bits, so it is 1 when the result has an odd
  number of ones. No instruction reads the flags; they are a status output.

Control is a packed struct `ctrl_t`, defined in `risc16_pkg`. Three of its fields
are one-hot. Assertions in `control_unit` check that they stay one-hot.

* `alu_op` (8 bits): bit *i* = the ALU instruction with opcode *i*, so ADD =
  `00000001` and SRA = `10000000`. Non-ALU phases use ADD.
* `opb_sel` (4 bits): `0001` latch B, `0010` constant 1, `0100` offset,
  `1000` zero.
* `data_sel` (3 bits): `001` ALU output latch, `010` MDR, `100` immediate.

`instr_decoder` turns the IR fields into a `decoded_t`. This struct holds the
opcode enum, the register numbers, imm8, the sign-extended offset and the class
bits that say which operand latches an instruction needs. `instruction_register`
and `program_counter` are plain registers with write enables. The next-PC value
is 0 in IDLE and the ALU output latch otherwise.

## Interface of the top, `risc16_cpu`

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clock`       | in  | 1     | rising-edge clock |
| `reset_s1`    | in  | 1     | synchronous, active-high reset |
| `mem_addr_s1` | out | 14    | word address: the PC in FETCH1, Rs in EXEC1 of LW/SW |
| `mem_wr_s1`   | out | 1     | write strobe, high in EXEC1 of SW |
| `mem_wdata`   | out | 16    | store data |
| `mem_rdata`   | in  | 16    | read data, valid in the same cycle as the address |
| `pc`          | out | 16    | program counter (status) |
| `flags`       | out | 5     | `{v, c, n, z, parity}` (status) |
| `state`       | out | 3     | controller state (status) |

The intended memory is an external asynchronous SRAM chip of 16K × 16. The
chip's shared data bus is split here into `mem_wdata` and `mem_rdata`. On a
board, an I/O pad with `mem_wr_s1` as output enable joins them. The memory must
write on the rising edge when `mem_wr_s1` is high and read combinationally.
A synchronous-read block RAM would need a change. The IR (in FETCH1) and the
MDR (in EXEC1) capture the data at the end of the same clock that presents the
address, so a registered RAM needs the address one phase earlier, or an extra
wait state.

Reset: hold `reset_s1` high for at least one clock. After it falls, there is
one `IDLE` clock, and then the first `FETCH1` reads address 0. The register file,
the flags, the ALU output latch and the operand latches are cleared by reset.
The IR is not cleared, but it is written before it is used.

`ADDR_W` (default 14) is the only parameter of the top. The data path is fixed
at 16 bits by the instruction format.

## Design choices

The underlying description leaves the following open. This design's answers
are listed here:

* **Field order.** Bits 11:8 are `Rd` and bits 7:4 are `Rs`. This follows the
  instruction table. One prose passage instead calls bits 11:8 and 7:4 the two
  source registers and bits 3:0 the target.
* **One memory or two.** Program and data share one memory on one bus. The
  top-level pin diagram shows one SRAM with a 14-bit address, and the controller
  fetches instructions and accesses data in different phases. An overview figure
  draws separate instruction and data memories.
* **SW operand order.** `M[Rs] = Rt`: `Rs` is the address and `Rt` the data.
* **Offsets and immediates.** Offsets are sign-extended 4-bit fields relative
  to PC + 1. `LI` zero-extends its 8-bit immediate.
* **Shifts.** SLA and SRA shift by one place. Their encoding has no
  shift-distance field, so the barrel shifter's distance input is tied to 1.
* **Flags.** The flag set comes from the original ALU simulation: `z`, `n`,
  `c`, `v`, parity. The meaning of `c` on SUB and on shifts, and the parity
  sense, are chosen here. The original ALU was tested with a mode/select
  interface; this one uses the one-hot `alu_op` of the control description.
* **Clocking.** One rising-edge clock, with one clock per phase. The control
  signal names carry `_s1` / `_s2` suffixes that hint at a two-phase clock,
  which is not modelled.
* **Control encodings.** Only ADD = `00000001` and "constant 1" = `0010` are
  given. The other one-hot positions, the operand-A select and the next-PC
  select are chosen here.
* **Left out.** The original block diagram also shows a universal shift
  register, a keyboard I/O port and a power supply. No instruction or
  connection defines what the shift register or the I/O port do, so neither is
  implemented. The "stack registers" mentioned as a PC source do not exist:
  JAL keeps the return address in a general register.

The original work reports a 50 MHz Spartan-3E implementation. This RTL has not
been taken through FPGA tools, so that figure is not confirmed. The longest
path is the operand mux, then the 16-bit adder or the shifter, then the
accumulator.

## Verification

Each module in `rtl/` has a self-checking testbench `tb/tb_<module>.sv`. Each
one compares the module with values computed independently in the testbench and
prints `TB_RESULT checks=N failures=M`:

* `tb_alu`: all six operations on corner operands and 3000 random pairs each,
  with carry and overflow.
* `tb_barrel_shifter`: every distance, both directions, and the shifted-out bit.
* `tb_instr_decoder`: all 65536 instruction words.
* `tb_register_file`, `tb_program_counter`, `tb_instruction_register`,
  `tb_accumulator`, `tb_flag_register`: random stimulus against reference
  registers.
* `tb_datapath`: micro-step control words, as the controller would issue them,
  against a register model.
* `tb_control_unit`: the state sequence (four clocks per instruction), the
  control word of every phase for random opcodes and branch conditions, and a
  reset in any state.
* `tb_risc16_cpu`: the whole processor at its default size, with a behavioural
  SRAM (`tb/sram_model.sv`). An instruction-level reference model runs in
  lock-step with it. At every instruction boundary the testbench compares the PC,
  the fetch address, all 16 registers and the flags. It also checks that each
  instruction takes exactly four clocks and that memory writes match the model.
  The test first runs a directed program that uses every instruction, including
  a counted loop, taken and untaken branches and a JAL/JR call. It then runs
  thirty random memory images of 200 instructions each, each started by a reset
  in the middle of an instruction. It counts how often each opcode, branch
  outcome, load, store, reset and flag condition occurred, and fails if any of
  them never did.

`tb_programs` runs three small programs at the default size, each on 20
random data sets. The first sums an 8-word array, the second reduces the array
with XOR, AND and OR, and the third multiplies two 8-bit numbers by
shift-and-add. The testbench checks the stored results. It also checks that the
clock count equals four times the number of instructions executed.

To run one with Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/risc16_pkg.sv \
    tb/tb_risc16_cpu.sv --top-module tb_risc16_cpu -o sim
./obj_dir/sim
```

Replace `tb_risc16_cpu` with any other testbench name. The testbenches use
only `$urandom` for random stimulus, and every one has a cycle watchdog.

## Changing the design

* **New instructions.** There are no free opcodes. Extending the set means a
  wider opcode, or reusing the unused bits of NOT/SLA/SRA/SW (for example a
  shift distance in bits 3:0 for SLA/SRA: connect it to the barrel shifter's
  `amount` input).
* **Control.** All control comes from the one `always_comb` in
  `control_unit.sv`, by state and opcode. The datapath only obeys `ctrl_t`.
* **Memory size.** Set `ADDR_W` on `risc16_cpu`, up to 16. The PC is always
  16 bits.
