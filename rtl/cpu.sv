// cpu: execution datapath of the HW machine.
//
// One instruction is executed per clock. The instruction's Rs and Rt fields
// address the register file's two read ports, the ALU combines Read Data 1
// (Rs) and Read Data 2 (Rt) as the control decoder directs, and for ADD,
// SUB, AND and OR the ALU result is written back to register Rd at the next
// rising edge. For BEQ the ALU computes Rs - Rt and its zero flag, together
// with the branch signal, is handed to the fetch unit; JMP leaves the ALU
// and the registers alone and raises jump. This structure follows the lab's
// datapath. The en input (en=0 blocks register writes while a program is
// loaded) is this design's addition.
//
// Interface: instr (16-bit instruction); zero, overflow, branch, jump,
// jump/branch offset (instr[11:0]) for the fetch unit; read_data1/2 and
// alu_result for observation.
// Timing: combinational from instr to every output; registers update at
// the rising clock edge.
module cpu
  import hw_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              en,
  input  logic [DATA_W-1:0] instr,
  output logic              zero,
  output logic              overflow,
  output logic              branch,
  output logic              jump,
  output logic [11:0]       offset,
  output logic [DATA_W-1:0] read_data1,
  output logic [DATA_W-1:0] read_data2,
  output logic [DATA_W-1:0] alu_result
);

  instr_t    ins;
  alu_ctrl_t alu_ctrl;
  logic      reg_write;

  assign ins    = instr_t'(instr);
  assign offset = instr[11:0];

  control u_control (
    .opcode   (ins.opcode),
    .alu_ctrl (alu_ctrl),
    .reg_write(reg_write),
    .branch   (branch),
    .jump     (jump)
  );

  regfile u_regfile (
    .clk(clk),
    .rst(rst),
    .we (reg_write && en),
    .ra1(ins.rs),
    .ra2(ins.rt),
    .wa (ins.rd),
    .wd (alu_result),
    .rd1(read_data1),
    .rd2(read_data2)
  );

  alu u_alu (
    .a       (read_data1),
    .b       (read_data2),
    .ctrl    (alu_ctrl),
    .result  (alu_result),
    .zero    (zero),
    .overflow(overflow)
  );

endmodule
