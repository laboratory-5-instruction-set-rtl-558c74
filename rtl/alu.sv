// alu: 16-bit ALU of the HW machine.
//
// Operand A can be inverted (ainv) and operand B negated (bneg: B is
// inverted and a carry of 1 enters the adder, giving two's-complement
// subtraction). The 2-bit operation then selects
//   00 AND,  01 OR,  10 add,
// all applied to the possibly inverted operands. With ainv=0, bneg=1,
// op=10 the result is A - B, which BEQ uses: zero is 1 when the result is 0.
// overflow flags signed overflow of the adder and is 0 for AND and OR.
// The control bits and their encodings follow the HW control table;
// operation 11 is not defined there and gives 0 here, a design choice.
//
// Interface: a, b, ctrl (Ainv, Bneg, Op); result, zero, overflow.
// Timing: purely combinational.
module alu
  import hw_pkg::*;
#(
  parameter int unsigned W = hw_pkg::DATA_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  alu_ctrl_t    ctrl,
  output logic [W-1:0] result,
  output logic         zero,
  output logic         overflow
);

  logic [W-1:0] aa, bb, sum;

  assign aa  = ctrl.ainv ? ~a : a;
  assign bb  = ctrl.bneg ? ~b : b;
  assign sum = aa + bb + W'(ctrl.bneg);

  always_comb begin
    unique case (ctrl.op)
      ALU_AND: result = aa & bb;
      ALU_OR:  result = aa | bb;
      ALU_ADD: result = sum;
      default: result = '0;
    endcase
  end

  assign zero     = (result == '0);
  assign overflow = (ctrl.op == ALU_ADD) &&
                    (aa[W-1] == bb[W-1]) && (sum[W-1] != aa[W-1]);

endmodule
