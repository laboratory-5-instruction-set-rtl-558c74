// fetch_unit_tb: self-checking test of the PC and next-address logic.
//
// Checks that reset clears the PC, then drives random Branch, Zero, Jump,
// hold and offset values for 3000 cycles and compares the PC after every
// edge with a model: PC+2, PC+2+2*offset4 (signed) when Branch and Zero are
// both 1, offset12*2 (low 8 bits) for a jump, unchanged while en=0. Also
// replays the worked examples: BEQ at 6 with offset 1 goes to 10 when taken
// and to 8 when not, and JMP 3 goes to 6.
module fetch_unit_tb;
  logic        clk = 0, rst, en, branch, zero, jump;
  logic [11:0] offset;
  logic [7:0]  pc, exp_pc;
  int          checks = 0, failures = 0;
  int          n_taken = 0, n_jump = 0, n_seq = 0;

  fetch_unit dut (.clk(clk), .rst(rst), .en(en), .branch(branch), .zero(zero),
                  .jump(jump), .offset(offset), .pc(pc));

  always #5 clk = ~clk;

  task automatic step_check(input logic [7:0] want, input string what);
    @(posedge clk); #1;
    checks++;
    if (pc !== want) begin
      failures++;
      $display("FAIL %s: pc=%0d want %0d", what, pc, want);
    end
  endtask

  task automatic go_to(input logic [7:0] target);
    // Use a jump to put the PC at an even address below 256.
    @(negedge clk); en = 1; jump = 1; branch = 0; zero = 0; offset = 12'(target >> 1);
    step_check(target, "go_to");
  endtask

  initial begin
    rst = 1; en = 1; branch = 0; zero = 0; jump = 0; offset = 0;
    @(posedge clk); #1 rst = 0;
    checks++; if (pc !== 8'd0) begin failures++; $display("FAIL reset"); end

    // Examples from the instruction set description.
    go_to(8'd6);
    @(negedge clk); jump = 0; branch = 1; zero = 1; offset = 12'd1;
    step_check(8'd10, "BEQ taken at 6");
    go_to(8'd6);
    @(negedge clk); jump = 0; branch = 1; zero = 0; offset = 12'd1;
    step_check(8'd8, "BEQ not taken at 6");
    @(negedge clk); jump = 1; branch = 0; offset = 12'd3;
    step_check(8'd6, "JMP 3");
    @(negedge clk); jump = 0; branch = 1; zero = 1; offset = 12'hFF8;   // offset -8
    step_check(8'(6 + 2 - 16), "BEQ offset -8");

    exp_pc = pc;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      en = ($urandom % 8) != 0;
      branch = 1'($urandom); zero = 1'($urandom);
      jump = ($urandom % 6) == 0;
      offset = 12'($urandom);
      if (!en)                 exp_pc = exp_pc;
      else if (jump)           begin exp_pc = 8'(offset * 2); n_jump++; end
      else if (branch && zero) begin
        exp_pc = 8'(int'(exp_pc) + 2 + 2 * int'($signed(offset[3:0]))); n_taken++;
      end
      else                     begin exp_pc = 8'(exp_pc + 2); n_seq++; end
      step_check(exp_pc, "random");
    end
    checks++;
    if (n_jump == 0 || n_taken == 0 || n_seq == 0) failures++;
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
