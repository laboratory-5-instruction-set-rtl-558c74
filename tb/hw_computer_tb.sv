// hw_computer_tb: end-to-end test of the HW machine at its default sizes.
//
// Programs are written into the instruction memory through the load port
// (load=1, one wr per clock), the machine is reset and then runs one
// instruction per clock. Every cycle the PC, the instruction and the
// datapath outputs are compared with an instruction-level model of the HW
// instruction set kept here. Four programs are run:
//   1. the branch example: BEQ R3 R0 1 at address 6 skips to 10 while R3 is
//      0 and falls through to 8 once R3 is not 0; JMP 3 returns to 6;
//   2. a multiply-by-repeated-addition loop (R4 = 3 * 2) whose results are
//      checked against literals and which must finish in 17 clocks;
//   3. a doubling chain that ends in a signed overflow (0x4000 + 0x4000);
//   4. fifteen full 128-word random programs, each run for 200 cycles
//      against the model (a random program soon settles in a loop).
// Each mechanism (each ALU operation, BEQ taken and not taken, JMP, a write
// to R0 or R1 being ignored, overflow, loading, reset) is counted and a
// mechanism that never happened counts as a failure.
module hw_computer_tb;
  logic        clk = 0, rst, load, wr;
  logic [7:0]  load_addr, pc;
  logic [15:0] load_data, instr, rd1, rd2, alu_result;
  logic        zero, overflow;

  int checks = 0, failures = 0;
  int n_add = 0, n_sub = 0, n_and = 0, n_or = 0, n_beq_taken = 0, n_beq_not = 0;
  int n_jmp = 0, n_const_write = 0, n_ovf = 0, n_load = 0, n_reset = 0;

  // Instruction-level model.
  logic [15:0] m_mem  [128];
  logic [15:0] m_regs [16];
  logic [7:0]  m_pc;

  hw_computer dut (
    .clk(clk), .rst(rst), .load(load), .wr(wr), .load_addr(load_addr),
    .load_data(load_data), .pc(pc), .instr(instr), .read_data1(rd1),
    .read_data2(rd2), .alu_result(alu_result), .zero(zero), .overflow(overflow)
  );

  always #5 clk = ~clk;

  function automatic logic [15:0] enc(input logic [3:0] op, input int s, input int t, input int d);
    return {op, 4'(s), 4'(t), 4'(d)};
  endfunction
  function automatic logic [15:0] add_(input int s, input int t, input int d); return enc(4'b0010, s, t, d); endfunction
  function automatic logic [15:0] sub_(input int s, input int t, input int d); return enc(4'b0011, s, t, d); endfunction
  function automatic logic [15:0] and_(input int s, input int t, input int d); return enc(4'b0100, s, t, d); endfunction
  function automatic logic [15:0] or_ (input int s, input int t, input int d); return enc(4'b0101, s, t, d); endfunction
  function automatic logic [15:0] beq_(input int s, input int t, input int off); return enc(4'b0111, s, t, off & 15); endfunction
  function automatic logic [15:0] jmp_(input int off); return {4'b1000, 12'(off)}; endfunction

  // Write words[0..n-1] to addresses 0, 2, 4, ... through the load port.
  task automatic load_program(input logic [15:0] words [128], input int n);
    for (int w = 0; w < n; w++) begin
      @(negedge clk);
      load = 1; wr = 1; load_addr = 8'(2 * w); load_data = words[w];
      m_mem[w] = words[w];
      n_load++;
    end
    @(negedge clk);
    wr = 0;
    // Read back through the same bus while still in load mode.
    for (int w = 0; w < n; w++) begin
      load_addr = 8'(2 * w); #1;
      checks++;
      if (instr !== words[w]) begin failures++; $display("FAIL load readback %0d", w); end
    end
    @(negedge clk);
    load = 0;
  endtask

  task automatic reset_machine();
    @(negedge clk); rst = 1;
    @(negedge clk); rst = 0;
    m_pc = 8'd0;
    foreach (m_regs[i]) m_regs[i] = (i == 1) ? 16'd1 : 16'd0;
    n_reset++;
    checks++;
    if (pc !== 8'd0) begin failures++; $display("FAIL pc after reset = %0d", pc); end
  endtask

  // Check the current cycle against the model, then let one clock pass.
  task automatic step();
    logic [15:0] ins, a, b, r;
    logic [3:0]  op, s, t, d;
    logic        wr_reg, ovf, alu_used;
    logic [7:0]  npc;
    int          sa, sb, ssum;
    ins = m_mem[m_pc[7:1]];
    {op, s, t, d} = ins;
    a = m_regs[s]; b = m_regs[t];
    r = 16'h0; wr_reg = 0; ovf = 0; alu_used = 1;
    npc = 8'(m_pc + 2);
    sa = $signed(a); sb = $signed(b);
    case (op)
      4'b0010: begin r = a + b; wr_reg = 1; ssum = sa + sb; ovf = ssum > 32767 || ssum < -32768; n_add++; end
      4'b0011: begin r = a - b; wr_reg = 1; ssum = sa - sb; ovf = ssum > 32767 || ssum < -32768; n_sub++; end
      4'b0100: begin r = a & b; wr_reg = 1; n_and++; end
      4'b0101: begin r = a | b; wr_reg = 1; n_or++; end
      4'b0111: begin
        r = a - b;
        ssum = sa - sb; ovf = ssum > 32767 || ssum < -32768;
        if (a == b) begin npc = 8'(int'(m_pc) + 2 + 2 * int'($signed(d))); n_beq_taken++; end
        else n_beq_not++;
      end
      4'b1000: begin npc = 8'({ins[11:0], 1'b0}); alu_used = 0; n_jmp++; end
      default: alu_used = 0;
    endcase
    if (ovf) n_ovf++;
    if (wr_reg && d < 2) n_const_write++;
    checks++;
    if (pc !== m_pc || instr !== ins || rd1 !== a || rd2 !== b ||
        (alu_used && (alu_result !== r || zero !== (r == 16'h0) || overflow !== ovf))) begin
      failures++;
      $display("FAIL pc=%0d (want %0d) ins=%h (want %h) rd1=%h rd2=%h alu=%h z=%b v=%b (want %h %h %h %b)",
               pc, m_pc, instr, ins, rd1, rd2, alu_result, zero, overflow, a, b, r, ovf);
    end
    @(negedge clk);
    if (wr_reg && d > 1) m_regs[d] = r;
    m_pc = npc;
  endtask

  task automatic expect_pc(input logic [7:0] want, input string what);
    checks++;
    if (pc !== want) begin failures++; $display("FAIL %s: pc=%0d want %0d", what, pc, want); end
  endtask

  logic [15:0] prog [128];
  int          cycles;

  initial begin
    rst = 0; load = 0; wr = 0; load_addr = 0; load_data = 0;
    foreach (m_mem[i]) m_mem[i] = 16'h0;

    // ---- Program 1: the branch example ------------------------------------
    prog[0] = add_(1, 1, 2);   // R2 = 2
    prog[1] = or_ (0, 0, 5);   // R5 = 0
    prog[2] = and_(0, 0, 6);   // R6 = 0
    prog[3] = beq_(3, 0, 1);   // 6:  BEQ R3 R0 1
    prog[4] = add_(1, 2, 2);   // 8:  ADD R1 R2 R2
    prog[5] = and_(0, 0, 4);   // 10: AND R0 R0 R4
    prog[6] = add_(3, 1, 3);   // 12: R3 = R3 + 1
    prog[7] = jmp_(3);         // 14: JMP 3
    load_program(prog, 8);
    reset_machine();
    repeat (3) step();
    expect_pc(8'd6, "before BEQ");
    step(); expect_pc(8'd10, "BEQ taken (R3 = 0)");
    repeat (3) step(); expect_pc(8'd6, "JMP 3");
    step(); expect_pc(8'd8, "BEQ not taken (R3 = 1)");
    checks++;                               // 8: ADD R1 R2 R2 gives 1 + 2
    if (alu_result !== 16'd3) begin failures++; $display("FAIL ADD at 8"); end
    step(); expect_pc(8'd10, "after ADD at 8");

    // ---- Program 2: R4 = 3 * 2 by repeated addition -----------------------
    prog[0]  = add_(1, 1, 2);  // 0:  R2 = 2
    prog[1]  = add_(2, 1, 3);  // 2:  R3 = 3
    prog[2]  = add_(1, 1, 1);  // 4:  write to R1 is ignored
    prog[3]  = add_(2, 0, 5);  // 6:  R5 = R2 (counter)
    prog[4]  = beq_(5, 0, 3);  // 8:  if R5 == 0 goto 16
    prog[5]  = add_(4, 3, 4);  // 10: R4 += R3
    prog[6]  = sub_(5, 1, 5);  // 12: R5 -= 1
    prog[7]  = jmp_(4);        // 14: goto 8
    prog[8]  = or_ (4, 2, 6);  // 16: R6 = R4 | R2
    prog[9]  = and_(6, 3, 7);  // 18: R7 = R6 & R3
    prog[10] = and_(4, 4, 8);  // 20: shows R4
    prog[11] = and_(6, 7, 9);  // 22: shows R6, R7
    prog[12] = jmp_(12);       // 24: stay here
    load_program(prog, 13);
    reset_machine();
    cycles = 0;
    while (m_pc != 8'd24 && cycles < 100) begin step(); cycles++; end
    checks++;
    if (cycles != 17) begin failures++; $display("FAIL multiply took %0d clocks, want 17", cycles); end
    expect_pc(8'd24, "multiply end");
    // Independent results: R4 = 6, R6 = 6 | 2 = 6, R7 = 6 & 3 = 2.
    checks++;
    if (m_regs[4] !== 16'd6 || m_regs[6] !== 16'd6 || m_regs[7] !== 16'd2 || m_regs[1] !== 16'd1) begin
      failures++; $display("FAIL multiply results");
    end
    step(); step();   // JMP 12 twice more: the PC stays at 24

    // ---- Program 3: doubling to signed overflow ---------------------------
    prog[0] = add_(1, 1, 2);                 // R2 = 2
    for (int i = 1; i <= 14; i++) prog[i] = add_(2, 2, 2);   // R2 doubles
    prog[15] = jmp_(15);
    load_program(prog, 16);
    expect_pc(8'd24, "PC held while loading");
    reset_machine();
    repeat (14) step();
    checks++;
    if (alu_result !== 16'h8000 || overflow !== 1'b1) begin
      failures++; $display("FAIL overflow: alu=%h v=%b", alu_result, overflow);
    end
    repeat (3) step();

    // ---- Program 4: random program against the model ----------------------
    for (int p = 0; p < 15; p++) begin
    for (int w = 0; w < 128; w++) begin
      logic [3:0] op;
      case ($urandom % 8)
        0, 1: op = 4'b0010; 2: op = 4'b0011; 3: op = 4'b0100; 4: op = 4'b0101;
        5: op = 4'b0111; 6: op = ($urandom % 3 == 0) ? 4'b1000 : 4'b0111;
        default: op = 4'($urandom);
      endcase
      prog[w] = {op, 12'($urandom)};
      // Keep jumps inside the 8-bit address space so they stay meaningful.
      if (op == 4'b1000) prog[w][11:7] = 5'b0;
    end
    load_program(prog, 128);
    reset_machine();
    repeat (200) step();
    end

    checks++;
    if (n_add == 0 || n_sub == 0 || n_and == 0 || n_or == 0 || n_beq_taken == 0 ||
        n_beq_not == 0 || n_jmp == 0 || n_const_write == 0 || n_ovf == 0 ||
        n_load == 0 || n_reset == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("mechanisms: add=%0d sub=%0d and=%0d or=%0d beq_taken=%0d beq_not=%0d jmp=%0d",
             n_add, n_sub, n_and, n_or, n_beq_taken, n_beq_not, n_jmp);
    $display("            const_write=%0d overflow=%0d loaded_words=%0d resets=%0d",
             n_const_write, n_ovf, n_load, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
