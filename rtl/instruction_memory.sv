// Instruction memory: Instruction = Mem[PC]. Holds WORDS 32-bit words and
// is read combinationally at the word address PC[AW+1:2] (the two low PC
// bits are zero for aligned instructions; higher bits are not decoded, so
// the memory repeats through the address space). A write port loads the
// program: prog_we writes prog_wdata to word prog_addr at the rising clock
// edge. Size, aliasing and the load port are this design's choices.
module instruction_memory
  import legv8_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [XLEN-1:0]          pc,
  output logic [ILEN-1:0]          instr,
  input  logic                     prog_we,
  input  logic [$clog2(WORDS)-1:0] prog_addr,
  input  logic [ILEN-1:0]          prog_wdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [ILEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (prog_we) mem[prog_addr] <= prog_wdata;
  end

  assign instr = mem[pc[AW+1:2]];
endmodule
