// alu_tb: self-checking test of the 16-bit ALU.
//
// Applies the corner operands (0, 1, 0x7FFF, 0x8000, 0xFFFF) and random
// operands under every combination of Ainv, Bneg and the 2-bit operation,
// and compares result, zero and overflow with a reference computed here in
// 32-bit integer arithmetic. Signed overflow is judged from the range of the
// exact signed sum, not from carry bits.
module alu_tb;
  import hw_pkg::*;

  logic [15:0] a, b, result;
  alu_ctrl_t   ctrl;
  logic        zero, overflow;
  int          checks = 0, failures = 0;

  alu dut (.a(a), .b(b), .ctrl(ctrl), .result(result), .zero(zero), .overflow(overflow));

  task automatic check_one(input logic [15:0] ta, input logic [15:0] tb_, input logic [3:0] c);
    logic [15:0] ea, eb, exp_r;
    int          sa, sb, ssum;
    logic        exp_ov;
    a = ta; b = tb_; ctrl = alu_ctrl_t'(c);
    #1;
    ea = c[3] ? ~ta : ta;
    eb = c[2] ? ~tb_ : tb_;
    sa = $signed(ea);
    sb = $signed(eb);
    ssum = sa + sb + (c[2] ? 1 : 0);
    exp_ov = 1'b0;
    case (c[1:0])
      2'b00: exp_r = ea & eb;
      2'b01: exp_r = ea | eb;
      2'b10: begin
        exp_r  = 16'(ssum);
        exp_ov = (ssum > 32767) || (ssum < -32768);
      end
      default: exp_r = 16'h0;
    endcase
    checks++;
    if (result !== exp_r || zero !== (exp_r == 16'h0) || overflow !== exp_ov) begin
      failures++;
      $display("FAIL a=%h b=%h ctrl=%b: got r=%h z=%b v=%b, want r=%h z=%b v=%b",
               ta, tb_, c, result, zero, overflow, exp_r, exp_r == 16'h0, exp_ov);
    end
  endtask

  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'h7FFF, 16'h8000, 16'hFFFF};
    for (int c = 0; c < 16; c++) begin
      foreach (corner[i]) foreach (corner[j]) check_one(corner[i], corner[j], 4'(c));
      for (int n = 0; n < 200; n++) check_one(16'($urandom), 16'($urandom), 4'(c));
    end
    // The named HW operations, with known answers.
    check_one(16'd7, 16'd5, 4'b0010);  if (result !== 16'd12) failures++; checks++;   // ADD
    check_one(16'd7, 16'd5, 4'b0110);  if (result !== 16'd2)  failures++; checks++;   // SUB
    check_one(16'd9, 16'd9, 4'b0110);  if (zero !== 1'b1)     failures++; checks++;   // BEQ equal
    check_one(16'hF0F0, 16'h0FF0, 4'b0000); if (result !== 16'h00F0) failures++; checks++; // AND
    check_one(16'hF0F0, 16'h0FF0, 4'b0001); if (result !== 16'hFFF0) failures++; checks++; // OR
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
