// instr_mem_tb: self-checking test of the 256-byte instruction memory.
//
// Fills all 128 instruction words with distinct random values through the
// write port, reads every word back at its even address and at the odd
// address above it (same word), then overwrites random words and checks
// that a write appears after the clock edge and leaves other words intact.
module instr_mem_tb;
  logic        clk = 0, we;
  logic [7:0]  addr;
  logic [15:0] wdata, rdata;
  logic [15:0] model [128];
  int          checks = 0, failures = 0;

  instr_mem dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  initial begin
    we = 0; addr = 0; wdata = 0;
    for (int w = 0; w < 128; w++) begin
      model[w] = 16'($urandom);
      @(negedge clk); we = 1; addr = 8'(2 * w); wdata = model[w];
    end
    @(negedge clk); we = 0;
    for (int w = 0; w < 128; w++) begin
      addr = 8'(2 * w); #1;
      checks++; if (rdata !== model[w]) begin failures++; $display("FAIL word %0d", w); end
      addr = 8'(2 * w + 1); #1;
      checks++; if (rdata !== model[w]) begin failures++; $display("FAIL odd addr %0d", w); end
    end
    for (int n = 0; n < 300; n++) begin
      int w, r;
      w = $urandom % 128;
      r = $urandom % 128;
      @(negedge clk); we = 1; addr = 8'(2 * w); wdata = 16'($urandom);
      #1;
      checks++; if (rdata !== model[w]) begin failures++; $display("FAIL early write"); end
      @(posedge clk); model[w] = wdata;
      @(negedge clk); we = 0; addr = 8'(2 * r); #1;
      checks++; if (rdata !== model[r]) begin failures++; $display("FAIL readback %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
