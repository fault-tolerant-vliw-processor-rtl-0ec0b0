// regfile: the shared register file, 32 registers of 32 bits with 12 read
// ports and 6 write ports (three ALU and three load/store results per
// packet), protected by a SEC-DED code.
//
// Each register is stored as a 39-bit codeword (secded_enc on every write
// port). Every read port decodes its codeword (secded_dec): a single flipped
// bit is corrected on the way out and reported on ecc_single, and two
// flipped bits are reported on ecc_double. The stored word is not rewritten
// by a read, so a corrected error stays in the array until the register is
// next written. Reads are combinational. Writes happen at the clock edge. A
// read of a register being written in the same cycle returns the new value
// directly, not through the code: these are the bypass multiplexers. If
// several ports write the same register, the highest-numbered port wins, in
// the bypass as in the array. r0 reads as zero, is never written and raises
// no flag. All registers reset to the codeword of zero.
//
// From the document: size, port counts, the bypass and the assumption that
// the register file is protected by an error-correcting code. This design's
// own: the code (extended Hamming, see secded_enc), no scrubbing, r0, the
// reset and the write priority.
module regfile
  import ftv_pkg::*;
#(
  parameter int unsigned NR = 12,
  parameter int unsigned NW = 6
) (
  input  logic              clk,
  input  logic              rst_n,
  input  ridx_t [NR-1:0]    raddr,
  output word_t [NR-1:0]    rdata,
  output logic  [NR-1:0]    ecc_single,
  output logic  [NR-1:0]    ecc_double,
  input  logic  [NW-1:0]    we,
  input  ridx_t [NW-1:0]    waddr,
  input  word_t [NW-1:0]    wdata
);
  logic [38:0] regs [NREG];
  logic [NW-1:0][38:0] wcode;
  logic [NR-1:0][38:0] rcode;
  word_t [NR-1:0]      rdec;
  logic  [NR-1:0]      rsingle, rdouble;

  for (genvar w = 0; w < NW; w++) begin : g_enc
    secded_enc u_enc (.data (wdata[w]), .code (wcode[w]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREG; r++) regs[r] <= '0;   // the codeword of 0
    end else begin
      for (int w = 0; w < NW; w++)
        if (we[w] && waddr[w] != '0) regs[waddr[w]] <= wcode[w];
    end
  end

  for (genvar p = 0; p < NR; p++) begin : g_dec
    assign rcode[p] = regs[raddr[p]];
    secded_dec u_dec (.code (rcode[p]), .data (rdec[p]), .single_err (rsingle[p]), .double_err (rdouble[p]));
  end

  always_comb begin
    for (int p = 0; p < NR; p++) begin
      rdata[p]      = rdec[p];
      ecc_single[p] = rsingle[p];
      ecc_double[p] = rdouble[p];
      for (int w = 0; w < NW; w++)
        if (we[w] && waddr[w] == raddr[p]) begin
          rdata[p]      = wdata[w];
          ecc_single[p] = 1'b0;
          ecc_double[p] = 1'b0;
        end
      if (raddr[p] == '0) begin
        rdata[p]      = '0;
        ecc_single[p] = 1'b0;
        ecc_double[p] = 1'b0;
      end
    end
  end
endmodule
