// secded_enc: encoder of the single-error-correcting, double-error-detecting
// (SEC-DED) code that protects the register file. A 32-bit word becomes a
// 39-bit codeword: an extended Hamming code with six check bits and one
// overall parity bit.
//
// Layout: bits [38:1] of the codeword are the Hamming positions 1..38. The
// check bits sit at the power-of-two positions 1, 2, 4, 8, 16 and 32, and
// the data bits fill the other 32 positions in ascending order (data bit 0
// at position 3). Check bit 2^k is the XOR of every other position whose
// index has bit k set. Bit 0 is the XOR of bits [38:1], so the whole
// codeword has even parity.
//
// Purely combinational. The register file is assumed to be protected by an
// error-correcting code, but no code is specified; this extended Hamming
// code and its bit layout are this design's own choice.
module secded_enc
  import ftv_pkg::*;
(
  input  word_t       data,
  output logic [38:0] code
);
  always_comb begin
    logic [38:1] c;
    int j;
    c = '0;
    j = 0;
    for (int pos = 1; pos <= 38; pos++)
      if ((pos & (pos - 1)) != 0) begin
        c[pos] = data[j];
        j++;
      end
    for (int k = 0; k < 6; k++)
      for (int pos = 1; pos <= 38; pos++)
        if (((pos >> k) & 1) == 1 && pos != (1 << k))
          c[1 << k] = c[1 << k] ^ c[pos];
    code = {c, ^c};
  end
endmodule
