// control_tb: self-checking test of the opcode decoder.
//
// Walks all 16 opcodes and compares ALUOp (Ainv, Bneg, Op1, Op0), RegWrite,
// Branch and Jump with the HW control table, written out here as literals.
// Opcodes outside the table must write nothing and not change the PC flow.
module control_tb;
  import hw_pkg::*;

  logic [3:0] opcode;
  alu_ctrl_t  alu_ctrl;
  logic       reg_write, branch, jump;
  int         checks = 0, failures = 0;

  control dut (.opcode(opcode), .alu_ctrl(alu_ctrl), .reg_write(reg_write),
               .branch(branch), .jump(jump));

  initial begin
    for (int op = 0; op < 16; op++) begin
      logic [3:0] e_alu;
      logic       e_rw, e_br, e_j, alu_care;
      alu_care = 1'b1;
      case (op)
        'b0010:  begin e_alu = 4'b0010; e_rw = 1; e_br = 0; e_j = 0; end // ADD
        'b0011:  begin e_alu = 4'b0110; e_rw = 1; e_br = 0; e_j = 0; end // SUB
        'b0100:  begin e_alu = 4'b0000; e_rw = 1; e_br = 0; e_j = 0; end // AND
        'b0101:  begin e_alu = 4'b0001; e_rw = 1; e_br = 0; e_j = 0; end // OR
        'b0111:  begin e_alu = 4'b0110; e_rw = 0; e_br = 1; e_j = 0; end // BEQ
        'b1000:  begin e_alu = 4'b0000; e_rw = 0; e_br = 0; e_j = 1; alu_care = 0; end // JMP
        default: begin e_alu = 4'b0000; e_rw = 0; e_br = 0; e_j = 0; alu_care = 0; end
      endcase
      opcode = 4'(op);
      #1;
      checks++;
      if ((alu_care && 4'(alu_ctrl) !== e_alu) || reg_write !== e_rw ||
          branch !== e_br || jump !== e_j) begin
        failures++;
        $display("FAIL opcode=%b: alu=%b rw=%b br=%b j=%b", opcode, alu_ctrl,
                 reg_write, branch, jump);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
