// regfile_tb: self-checking test of the 16 x 16 register file.
//
// After reset every register must read 0 except R1, which reads 1. Then
// 2000 random cycles write random data to random registers (R0 and R1
// included) while both read ports read random registers; reads are compared
// with a model array kept here, in which R0 and R1 never change. A write
// must not be visible before the clock edge that performs it.
module regfile_tb;
  logic        clk = 0, rst, we;
  logic [3:0]  ra1, ra2, wa;
  logic [15:0] wd, rd1, rd2;
  logic [15:0] model [16];
  int          checks = 0, failures = 0;

  regfile dut (.clk(clk), .rst(rst), .we(we), .ra1(ra1), .ra2(ra2), .wa(wa),
               .wd(wd), .rd1(rd1), .rd2(rd2));

  always #5 clk = ~clk;

  task automatic check_reads();
    checks++;
    if (rd1 !== model[ra1] || rd2 !== model[ra2]) begin
      failures++;
      $display("FAIL ra1=%0d rd1=%h (want %h) ra2=%0d rd2=%h (want %h)",
               ra1, rd1, model[ra1], ra2, rd2, model[ra2]);
    end
  endtask

  initial begin
    foreach (model[i]) model[i] = (i == 1) ? 16'd1 : 16'd0;
    rst = 1; we = 0; ra1 = 0; ra2 = 0; wa = 0; wd = 0;
    @(posedge clk); #1 rst = 0;
    for (int r = 0; r < 16; r++) begin
      ra1 = 4'(r); ra2 = 4'(15 - r); #1;
      check_reads();
    end
    for (int n = 0; n < 2000; n++) begin
      we = 1'($urandom); wa = 4'($urandom); wd = 16'($urandom);
      ra1 = ($urandom % 4 == 0) ? wa : 4'($urandom);
      ra2 = 4'($urandom);
      #1 check_reads();            // before the edge: old contents
      @(posedge clk);
      if (we && wa > 1) model[wa] = wd;
      #1 check_reads();            // after the edge: new contents
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
