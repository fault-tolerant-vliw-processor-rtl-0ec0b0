// data_mem: the 1K x 32-bit data memory, word addressed, serving the three
// load/store units of the MEM stage plus one host port (for loading data and
// reading results). Each L/S port either reads (combinational, the value goes
// to the MEM/WB register) or writes at the clock edge. Writes to the same
// word in one cycle: the highest-numbered L/S port wins; the host port writes
// only when no L/S port writes that word. Contents are not reset.
// From the document: the 1K x 32 size and the three L/S units. This design's
// own: word addressing, the port arrangement and the host port.
module data_mem
  import ftv_pkg::*;
#(
  parameter int unsigned DEPTH = DMEM_WORDS,
  parameter int unsigned AW    = DADDR_W,
  parameter int unsigned NP    = N_LS
) (
  input  logic                clk,
  input  logic  [NP-1:0]      we,
  input  logic  [NP-1:0][AW-1:0] addr,
  input  word_t [NP-1:0]      wdata,
  output word_t [NP-1:0]      rdata,
  input  logic                host_we,
  input  logic  [AW-1:0]      host_addr,
  input  word_t               host_wdata,
  output word_t               host_rdata
);
  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (host_we) mem[host_addr] <= host_wdata;
    for (int p = 0; p < NP; p++)
      if (we[p]) mem[addr[p]] <= wdata[p];
  end

  always_comb
    for (int p = 0; p < NP; p++) rdata[p] = mem[addr[p]];

  assign host_rdata = mem[host_addr];
endmodule
