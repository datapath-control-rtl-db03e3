// Data memory: Dout = Mem[Addr], and Mem[Addr] = Din when MemWrite is set.
// WORDS doublewords of 64 bits, addressed by the byte address Addr; only
// bits Addr[AW+2:3] are decoded, so accesses are treated as aligned
// doublewords and the memory repeats through the address space. Reads are
// combinational (the single-cycle datapath needs the data in the same
// cycle); writes happen at the rising clock edge.
//
// A second, host port (h_*) lets a test or a loader read and write the
// memory by doubleword index; a processor write to the same word in the
// same cycle takes precedence. Size, alignment and the host port are this
// design's choices.
module data_memory
  import legv8_pkg::*;
#(
  parameter int unsigned WORDS = 1024
) (
  input  logic                     clk,
  input  logic [XLEN-1:0]          addr,
  input  logic [XLEN-1:0]          din,
  input  logic                     memwrite,
  output logic [XLEN-1:0]          dout,
  input  logic                     h_we,
  input  logic [$clog2(WORDS)-1:0] h_addr,
  input  logic [XLEN-1:0]          h_wdata,
  output logic [XLEN-1:0]          h_rdata
);
  localparam int unsigned AW = $clog2(WORDS);

  logic [XLEN-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (h_we) mem[h_addr] <= h_wdata;
    if (memwrite) mem[addr[AW+2:3]] <= din;
  end

  assign dout    = mem[addr[AW+2:3]];
  assign h_rdata = mem[h_addr];
endmodule
