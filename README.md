# HW: a 16-bit single-cycle teaching processor

HW is a deliberately small processor meant to show how an instruction set
becomes hardware. It has six instructions: four ALU operations, one
conditional branch and one jump. Each instruction is one 16-bit word. The
instructions sit in a 256-byte memory addressed by an 8-bit program counter.
Every instruction finishes in one clock. Each clock, the word at the PC is
decoded, two registers are read, the ALU combines them, and the result is
written back. At the same edge the PC moves on to the next address.

This RTL builds the whole machine: the program counter and its next-address
logic, the instruction memory with a port for loading programs, the register
file, the ALU, the opcode decoder and a top level that joins them. It is
written in synthesizable SystemVerilog.

## Instruction set

| Instruction       | Effect                                   | [15:12] | [11:8] | [7:4] | [3:0]  |
|-------------------|------------------------------------------|---------|--------|-------|--------|
| `ADD Rs, Rt, Rd`  | R[d] = R[s] + R[t]                       | 0010    | s      | t     | d      |
| `SUB Rs, Rt, Rd`  | R[d] = R[s] - R[t]                       | 0011    | s      | t     | d      |
| `AND Rs, Rt, Rd`  | R[d] = R[s] & R[t]                       | 0100    | s      | t     | d      |
| `OR  Rs, Rt, Rd`  | R[d] = R[s] \| R[t]                      | 0101    | s      | t     | d      |
| `BEQ Rs, Rt, off` | if R[s] == R[t]: PC = PC + 2 + 2*off     | 0111    | s      | t     | off    |
| `JMP off`         | PC = 2*off                               | 1000    | off[11:8] | off[7:4] | off[3:0] |

- There are sixteen 16-bit registers. R0 always reads 0 and R1 always reads
  1, and writes to them have no effect. That gives every program the two
  constants it needs to build other values: `ADD R1 R1 R2` makes 2.
- Addresses count bytes and instructions are two bytes long, so the PC
  always holds an even number.
- The instruction set has no loads or stores. Registers change only through
  ALU results.
- Any other opcode decodes to a no-operation: the PC advances by 2 and no
  register changes. This is this implementation's choice.

## Choosing the next PC

This part needs the closest reading (`rtl/fetch_unit.sv`). Two adders run in
every cycle:

1. `PC + 2`, the next instruction in sequence.
2. `(PC + 2) + (sign_extend(off4) << 1)`, the branch target. The 4-bit BEQ
   offset is signed (-8..+7) and counts instructions from the instruction
   *after* the branch. For example, `BEQ R3 R0 1` at address 6 goes to
   6 + 2 + 2 = 10 when R3 is 0, and to 8 otherwise. An offset of -1 branches
   back to the BEQ itself.

A multiplexer picks the branch target only when **Branch** and **Zero** are
both 1. Branch means the instruction is a BEQ. Zero comes from the ALU, which
computes Rs - Rt for a BEQ. Both signals are needed because the ALU's zero
flag also goes high for other instructions, for example `SUB` of equal
values.

`JMP` does not use the ALU. Its 12-bit field counts instructions from address
0, so the target is `off * 2`: `JMP 3` goes to address 6. The PC has only 8
bits, so only the low 7 bits of the field count. A jump can reach the first
128 instructions, which is the whole memory. The upper 5 bits are ignored; a
lint warning about them is expected.

## Datapath and control

`rtl/cpu.sv` holds the execution side of the machine:

- The instruction's Rs and Rt fields drive the register file's two read
  ports (`rtl/regfile.sv`). Both reads are combinational.
- The ALU (`rtl/alu.sv`) takes four control bits: Ainv, Bneg and a 2-bit
  operation. Ainv inverts A. Bneg inverts B and feeds a carry of 1 into the
  adder, which gives subtraction. The operation codes are 00 = AND, 01 = OR
  and 10 = add. This implementation defines 11 to give 0.
- `zero` is 1 when the result is 0. `overflow` is signed two's-complement
  overflow of the add or subtract; AND and OR leave it at 0.
- The decoder (`rtl/control.sv`) maps opcodes to control signals:

  | Opcode | Ainv Bneg Op | RegWrite | Branch | Jump |
  |--------|--------------|----------|--------|------|
  | ADD    | 0 0 10       | 1        | 0      | 0    |
  | SUB    | 0 1 10       | 1        | 0      | 0    |
  | AND    | 0 0 00       | 1        | 0      | 0    |
  | OR     | 0 0 01       | 1        | 0      | 0    |
  | BEQ    | 0 1 10       | 0        | 1      | 0    |
  | JMP    | (0 0 00)     | 0        | 0      | 1    |

  JMP's ALU bits do not matter; the decoder drives them to 0. Jump is a
  signal of this implementation's own, added so that the fetch unit can pick
  the jump target.
- For ADD, SUB, AND and OR, the ALU result is written to Rd at the rising
  clock edge. There is no bypass, and none is needed: the write happens at
  the same edge that ends the instruction.

## Instruction memory and program loading

`rtl/instr_mem.sv` holds 256 bytes as 128 words of 16 bits. The word is
picked by address bits [7:1]; bit 0 is ignored, which is why a lint warning
reports it unused. Reads are combinational, so the word at the PC is
available in the same cycle. Writes happen at the rising clock edge.

The top level (`rtl/hw_computer.sv`) has one address bus into the memory,
which the program counter and the loading switches share:

- `load = 1`: the memory address comes from `load_addr`, and each clock with
  `wr = 1` writes `load_data` at that address. The PC and the registers hold
  their values, so `instr` shows whatever word `load_addr` selects.
- `load = 0`: the address comes from the PC and the machine runs.

A typical session is: load the program, pulse `rst` for one clock, then run
with `load = 0`. The design brings out `pc`, `instr`, `read_data1` (Rs),
`read_data2` (Rt), `alu_result`, `zero` and `overflow` for observation.

## Timing and reset

- One clock, rising edge, no pipeline. On each edge the PC and the
  destination register update together.
- `rst` is synchronous and active high. It clears the PC to 0 and R2..R15 to
  0.
- The critical path runs: PC, memory read, register read, ALU, zero flag,
  next-PC multiplexer, PC. The write-back path (ALU to register file) is
  slightly shorter.

## Where this implementation fills gaps

The instruction set, encodings, widths, constant registers, ALU control
table and next-PC datapath are taken as specified. The following are choices
made here:

- The memory is 128 × 16 words with a synchronous write.
- The load/run address selection, and holding the PC and registers while
  loading, are this implementation's.
- Reset is synchronous and also clears the general registers.
- JMP takes priority over the branch select, and its target is truncated to
  8 bits.
- The ALU's unused operation 11 gives 0. The overflow flag is defined as
  signed overflow of the adder.
- Undefined opcodes behave as no-operations.
- BEQ computes Rs - Rt, the same way as SUB. Computing Rt - Rs would give the
  same Zero flag.

Shared widths, the opcode enumeration and the ALU control struct are in
`rtl/hw_pkg.sv`.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends with a line
`TB_RESULT checks=N failures=M`.

| Testbench           | What it checks |
|---------------------|----------------|
| `alu_tb`            | All 16 control combinations, on corner and random operands, against an integer reference. |
| `control_tb`        | All 16 opcodes against the control table. |
| `regfile_tb`        | Reset values, R0/R1 constants, and 2000 random write/read cycles against a model. |
| `instr_mem_tb`      | Fill and read back all words, odd addresses, and write timing. |
| `fetch_unit_tb`     | The BEQ and JMP examples above, negative offsets, hold, and 3000 random cycles. |
| `cpu_tb`            | 4000 random instructions against a register model. |
| `hw_computer_tb`    | The whole machine at its real sizes. |

`hw_computer_tb` works through four programs, comparing against an
instruction-level model of HW on every cycle:

1. The branch example.
2. A multiply-by-repeated-addition loop. It must give 3 × 2 = 6 and finish in
   exactly 17 clocks.
3. A doubling chain that ends in signed overflow.
4. Fifteen random 128-word programs.

It counts how often each mechanism occurs: every ALU operation, BEQ taken
and not taken, JMP, ignored writes to R0/R1, overflow, loading and reset.
Any mechanism that never occurs counts as a failure.

To run one testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/hw_pkg.sv \
    rtl/hw_computer.sv tb/hw_computer_tb.sv --top-module hw_computer_tb
./obj_dir/Vhw_computer_tb
```

Replace the module names to run the others. Every testbench finishes in well
under a second.
