// control: opcode decoder of the HW machine.
//
// Turns the 4-bit opcode into the datapath control signals, following the
// HW control table:
//   opcode  instr  Ainv Bneg Op   RegWrite Branch Jump
//   0010    ADD     0    0   10      1       0     0
//   0011    SUB     0    1   10      1       0     0
//   0100    AND     0    0   00      1       0     0
//   0101    OR      0    0   01      1       0     0
//   0111    BEQ     0    1   10      0       1     0
//   1000    JMP     -    -   --      0       0     1
// JMP's ALU bits are "don't care" in the table and are driven to 0 here.
// Opcodes outside the table write nothing and do not branch, so they act as
// no-operations; that, and the separate Jump signal, are design choices.
//
// Interface: opcode; alu_ctrl, reg_write, branch, jump.
// Timing: purely combinational.
module control
  import hw_pkg::*;
(
  input  logic [3:0] opcode,
  output alu_ctrl_t  alu_ctrl,
  output logic       reg_write,
  output logic       branch,
  output logic       jump
);

  always_comb begin
    alu_ctrl  = '{ainv: 1'b0, bneg: 1'b0, op: ALU_AND};
    reg_write = 1'b0;
    branch    = 1'b0;
    jump      = 1'b0;
    case (opcode)
      OP_ADD: begin alu_ctrl.op = ALU_ADD; reg_write = 1'b1; end
      OP_SUB: begin alu_ctrl.bneg = 1'b1; alu_ctrl.op = ALU_ADD; reg_write = 1'b1; end
      OP_AND: begin alu_ctrl.op = ALU_AND; reg_write = 1'b1; end
      OP_OR:  begin alu_ctrl.op = ALU_OR;  reg_write = 1'b1; end
      OP_BEQ: begin alu_ctrl.bneg = 1'b1; alu_ctrl.op = ALU_ADD; branch = 1'b1; end
      OP_JMP: jump = 1'b1;
      default: ;
    endcase
  end

endmodule
