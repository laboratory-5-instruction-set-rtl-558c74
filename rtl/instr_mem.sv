// instr_mem: instruction memory of the HW machine.
//
// Holds 2**ADDR_W bytes organised as 16-bit words, one instruction per word.
// A byte address selects a word by its upper ADDR_W-1 bits; bit 0 is
// ignored, since instructions always start at even addresses (the PC moves
// in steps of 2). The memory has a single address bus, as in the lab
// circuit, shared by instruction fetch and program loading.
//
// Interface: addr (byte address), rdata (the word at addr), we/wdata (write
// port used to load a program).
// Timing: reads are combinational, so the instruction at the PC is present
// in the same cycle; writes take effect at the rising clock edge when we=1.
// The 256-byte size and the 16-bit data width come from the HW instruction
// set; the synchronous write and the word organisation are design choices.
module instr_mem #(
  parameter int unsigned ADDR_W = hw_pkg::ADDR_W,
  parameter int unsigned DATA_W = hw_pkg::DATA_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] addr,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata
);

  localparam int unsigned WORDS = (2 ** ADDR_W) / 2;

  logic [DATA_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[ADDR_W-1:1]] <= wdata;
  end

  assign rdata = mem[addr[ADDR_W-1:1]];

endmodule
