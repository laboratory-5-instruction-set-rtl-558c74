// hw_pkg: shared widths, opcodes and control types of the HW machine.
//
// The HW machine is a 16-bit, single-cycle processor with an 8-bit byte
// address for its instruction memory and sixteen 16-bit registers (R0 and
// R1 hold the constants 0 and 1). Every instruction is one 16-bit word:
//
//   [15:12] opcode   [11:8] Rs   [7:4] Rt   [3:0] Rd or 4-bit branch offset
//   JMP uses [11:0] as a 12-bit instruction index.
//
// The opcode values and the ALU control bits (Ainv, Bneg, Op1, Op0) are the
// ones defined for the HW instruction set. The encoding of the control
// signals as a packed struct is this design's own choice.
package hw_pkg;

  localparam int unsigned ADDR_W = 8;   // instruction address bus (bytes)
  localparam int unsigned DATA_W = 16;  // instruction and register width
  localparam int unsigned NREGS  = 16;  // register count
  localparam int unsigned RIDX_W = 4;   // register index width

  typedef enum logic [3:0] {
    OP_ADD = 4'b0010,
    OP_SUB = 4'b0011,
    OP_AND = 4'b0100,
    OP_OR  = 4'b0101,
    OP_BEQ = 4'b0111,
    OP_JMP = 4'b1000
  } opcode_e;

  // 2-bit ALU operation selector.
  typedef enum logic [1:0] {
    ALU_AND = 2'b00,
    ALU_OR  = 2'b01,
    ALU_ADD = 2'b10,
    ALU_NONE = 2'b11   // not defined by the ISA; the ALU outputs 0
  } alu_op_e;

  // ALUOp bundle in the order Ainv, Bneg, Op1, Op0.
  typedef struct packed {
    logic    ainv;
    logic    bneg;
    alu_op_e op;
  } alu_ctrl_t;

  // Instruction fields for the R-type and BEQ formats.
  typedef struct packed {
    opcode_e           opcode;
    logic [RIDX_W-1:0] rs;
    logic [RIDX_W-1:0] rt;
    logic [RIDX_W-1:0] rd;   // destination register, or BEQ offset
  } instr_t;

endpackage
