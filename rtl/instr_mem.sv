// instr_mem: instruction memory holding one execution packet (six 32-bit
// slots) per address. Combinational read at the fetch address; a write port,
// used to load the program while the core is held in reset, writes one
// packet at the clock edge. The document shows the block without size or
// ports; the depth (IMEM_WORDS packets) and the load port are this design's
// own. Contents are not reset.
module instr_mem
  import ftv_pkg::*;
#(
  parameter int unsigned DEPTH = IMEM_WORDS,
  parameter int unsigned AW    = PC_W
) (
  input  logic          clk,
  input  logic [AW-1:0] raddr,
  output packet_t       rdata,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  packet_t       wdata
);
  packet_t mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
