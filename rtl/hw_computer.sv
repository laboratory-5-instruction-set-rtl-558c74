// hw_computer: the complete HW machine with its program-loading circuit.
//
// The instruction memory, the fetch unit (PC and next-PC logic) and the CPU
// datapath are wired as in the lab's full implementation. A program is
// loaded by holding load=1 and writing one instruction per clock with wr=1
// at the byte address load_addr; while load=1 the memory address bus is
// taken from load_addr instead of the PC, and the PC and the registers are
// held. With load=0 the machine executes one instruction per clock,
// starting from address 0 after reset. The PC, the current instruction, the
// two register read values, the ALU result and the flags are brought out
// for observation, as the lab circuit displays them.
// Freezing the PC and the registers while loading, and writing the memory
// synchronously, are this design's choices.
//
// Timing: single cycle. The instruction at pc is decoded and executed
// combinationally; the PC and the destination register update together at
// the rising clock edge. rst is synchronous and active high.
module hw_computer
  import hw_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic              load,
  input  logic              wr,
  input  logic [ADDR_W-1:0] load_addr,
  input  logic [DATA_W-1:0] load_data,
  output logic [ADDR_W-1:0] pc,
  output logic [DATA_W-1:0] instr,
  output logic [DATA_W-1:0] read_data1,
  output logic [DATA_W-1:0] read_data2,
  output logic [DATA_W-1:0] alu_result,
  output logic              zero,
  output logic              overflow
);

  logic [ADDR_W-1:0] mem_addr;
  logic              branch, jump;
  logic [11:0]       offset;

  assign mem_addr = load ? load_addr : pc;

  instr_mem u_imem (
    .clk  (clk),
    .we   (load && wr),
    .addr (mem_addr),
    .wdata(load_data),
    .rdata(instr)
  );

  fetch_unit u_fetch (
    .clk    (clk),
    .rst    (rst),
    .en     (!load),
    .branch (branch),
    .zero   (zero),
    .jump   (jump),
    .offset (offset),
    .pc     (pc)
  );

  cpu u_cpu (
    .clk       (clk),
    .rst       (rst),
    .en        (!load),
    .instr     (instr),
    .zero      (zero),
    .overflow  (overflow),
    .branch    (branch),
    .jump      (jump),
    .offset    (offset),
    .read_data1(read_data1),
    .read_data2(read_data2),
    .alu_result(alu_result)
  );

endmodule
