// cpu_tb: self-checking test of the CPU datapath (control, registers, ALU).
//
// Feeds 4000 random instructions, one per clock, drawn mostly from the six
// HW opcodes, with en dropped now and then. A model register file kept here
// predicts Read Data 1 (Rs), Read Data 2 (Rt), the ALU result (Rs+Rt, Rs-Rt,
// Rs&Rt, Rs|Rt), the zero flag, Branch and Jump, and is updated with the
// result only for ADD/SUB/AND/OR with en=1 and Rd above R1. Because every
// instruction reads two registers, a wrong write shows up in later reads.
// A short directed sequence first builds known values from R1 = 1.
module cpu_tb;
  import hw_pkg::*;

  logic        clk = 0, rst, en;
  logic [15:0] instr, rd1, rd2, alu_result;
  logic        zero, overflow, branch, jump;
  logic [11:0] offset;
  logic [15:0] model [16];
  int          checks = 0, failures = 0;
  int          n_ops [16];

  cpu dut (.clk(clk), .rst(rst), .en(en), .instr(instr), .zero(zero),
           .overflow(overflow), .branch(branch), .jump(jump), .offset(offset),
           .read_data1(rd1), .read_data2(rd2), .alu_result(alu_result));

  always #5 clk = ~clk;

  function automatic logic [15:0] enc(input logic [3:0] op, input int s, input int t, input int d);
    return {op, 4'(s), 4'(t), 4'(d)};
  endfunction

  // Apply one instruction, check the combinational outputs, clock it in and
  // update the model.
  task automatic exec(input logic [15:0] ins, input logic ena = 1'b1);
    logic [3:0]  op, s, t, d;
    logic [15:0] a, b, r;
    logic        wr;
    {op, s, t, d} = ins;
    @(negedge clk);
    instr = ins;
    en    = ena;
    #1;
    a = model[s]; b = model[t];
    wr = 0; r = 16'h0;
    case (op)
      4'b0010: begin r = a + b; wr = 1; end
      4'b0011: begin r = a - b; wr = 1; end
      4'b0100: begin r = a & b; wr = 1; end
      4'b0101: begin r = a | b; wr = 1; end
      4'b0111: r = a - b;
      default: ;
    endcase
    checks++;
    if (rd1 !== a || rd2 !== b) begin
      failures++; $display("FAIL reads %h: %h %h want %h %h", ins, rd1, rd2, a, b);
    end
    checks++;
    if (branch !== (op == 4'b0111) || jump !== (op == 4'b1000) || offset !== ins[11:0]) begin
      failures++; $display("FAIL control %h", ins);
    end
    if (op inside {4'b0010, 4'b0011, 4'b0100, 4'b0101, 4'b0111}) begin
      checks++;
      if (alu_result !== r || zero !== (r == 16'h0)) begin
        failures++; $display("FAIL alu %h: %h z=%b want %h", ins, alu_result, zero, r);
      end
    end
    n_ops[op]++;
    @(posedge clk);
    if (wr && en && d > 1) model[d] = r;
  endtask

  initial begin
    foreach (model[i]) model[i] = (i == 1) ? 16'd1 : 16'd0;
    foreach (n_ops[i]) n_ops[i] = 0;
    rst = 1; en = 1; instr = 16'h0;
    @(posedge clk); #1 rst = 0;
    // Directed: R2 = 2, R3 = 3, R4 = 3 - 2 = 1, R5 = 2 & 3 = 2, R6 = 2 | 1 = 3.
    exec(enc(4'b0010, 1, 1, 2));
    exec(enc(4'b0010, 2, 1, 3));
    exec(enc(4'b0011, 3, 2, 4));
    exec(enc(4'b0100, 2, 3, 5));
    exec(enc(4'b0101, 2, 1, 6));
    exec(enc(4'b0010, 1, 1, 1));        // write to R1 must be ignored
    exec(enc(4'b0101, 3, 6, 0));        // write to R0 must be ignored
    checks++;
    if (model[3] !== 16'd3 || model[6] !== 16'd3) failures++;
    exec(enc(4'b0111, 3, 6, 0));        // BEQ R3 R6: equal, zero must be 1
    checks++; if (zero !== 1'b1) begin failures++; $display("FAIL BEQ zero"); end
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] op;
      case ($urandom % 7)
        0: op = 4'b0010; 1: op = 4'b0011; 2: op = 4'b0100; 3: op = 4'b0101;
        4: op = 4'b0111; 5: op = 4'b1000; default: op = 4'($urandom);
      endcase
      exec({op, 12'($urandom)}, ($urandom % 10) != 0);
    end
    checks++;
    if (n_ops[2] == 0 || n_ops[3] == 0 || n_ops[4] == 0 || n_ops[5] == 0 ||
        n_ops[7] == 0 || n_ops[8] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
