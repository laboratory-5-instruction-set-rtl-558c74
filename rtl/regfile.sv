// regfile: the HW machine's register file.
//
// NREGS registers of DATA_W bits with two combinational read ports and one
// write port. R0 always reads 0 and R1 always reads 1; writes to them are
// ignored, so only R2..R15 are storage. The constant registers and the port
// set (Read Addr 1/2, Write Addr, Write Data, Write Enable, Read Data 1/2)
// follow the lab datapath. Clearing R2..R15 on reset is this design's choice.
//
// Timing: a write with we=1 takes effect at the rising clock edge; reads of
// the register being written return the old value until that edge.
module regfile #(
  parameter int unsigned NREGS  = hw_pkg::NREGS,
  parameter int unsigned DATA_W = hw_pkg::DATA_W,
  parameter int unsigned RIDX_W = $clog2(NREGS)
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              we,
  input  logic [RIDX_W-1:0] ra1,
  input  logic [RIDX_W-1:0] ra2,
  input  logic [RIDX_W-1:0] wa,
  input  logic [DATA_W-1:0] wd,
  output logic [DATA_W-1:0] rd1,
  output logic [DATA_W-1:0] rd2
);

  logic [DATA_W-1:0] regs [2:NREGS-1];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 2; i < NREGS; i++) regs[i] <= '0;
    end else if (we && wa > RIDX_W'(1)) begin
      regs[wa] <= wd;
    end
  end

  function automatic logic [DATA_W-1:0] rd(input logic [RIDX_W-1:0] a);
    if (a == RIDX_W'(0))      return '0;
    else if (a == RIDX_W'(1)) return DATA_W'(1);
    else                      return regs[a];
  endfunction

  assign rd1 = rd(ra1);
  assign rd2 = rd(ra2);

endmodule
