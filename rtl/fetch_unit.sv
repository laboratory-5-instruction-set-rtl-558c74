// fetch_unit: program counter and next-address logic of the HW machine.
//
// The PC holds the byte address of the instruction being executed and is
// cleared to 0 by reset. Each clock it loads one of three addresses:
//   * PC + 2                     sequential execution (first adder);
//   * PC + 2 + 2*sign_ext(off4)  BEQ taken, when Branch and Zero are both 1
//                                 (4-bit offset sign-extended to the PC
//                                 width, shifted left by 1, second adder);
//   * off12 * 2                  JMP, truncated to the PC width.
// The adders, sign extension, shift and the Branch-and-Zero select follow
// the lab's fetch circuit. Giving JMP priority, truncating its target to the
// low PC bits, using a synchronous reset and adding a hold input (en=0
// freezes the PC while a program is being loaded) are this design's choices.
//
// Interface: en, branch, zero, jump, offset (instruction bits [11:0]); pc.
// The upper JMP offset bits beyond the PC width are unused: the 8-bit
// address space reaches only the first 128 instructions.
// Timing: pc updates at the rising edge; the next-PC logic is combinational.
module fetch_unit #(
  parameter int unsigned PC_W   = hw_pkg::ADDR_W,
  parameter int unsigned BOFF_W = 4,    // BEQ offset width
  parameter int unsigned JOFF_W = 12    // JMP offset width
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic              branch,
  input  logic              zero,
  input  logic              jump,
  input  logic [JOFF_W-1:0] offset,
  output logic [PC_W-1:0]   pc
);

  logic [PC_W-1:0] pc_plus2, boff_ext, br_target, j_target, pc_next;

  assign pc_plus2  = pc + PC_W'(2);
  assign boff_ext  = PC_W'($signed(offset[BOFF_W-1:0]));   // sign extend
  assign br_target = pc_plus2 + (boff_ext << 1);           // shift left 1
  assign j_target  = {offset[PC_W-2:0], 1'b0};               // offset * 2

  always_comb begin
    if (jump)                 pc_next = j_target;
    else if (branch && zero)  pc_next = br_target;
    else                      pc_next = pc_plus2;
  end

  always_ff @(posedge clk) begin
    if (rst)     pc <= '0;
    else if (en) pc <= pc_next;
  end

  // Instructions are two bytes long: the PC never becomes odd.
  a_pc_even: assert property (@(posedge clk) disable iff (rst) pc[0] == 1'b0);

endmodule
