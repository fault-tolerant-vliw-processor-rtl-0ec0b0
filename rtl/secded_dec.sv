// secded_dec: decoder of the register file's SEC-DED code (see secded_enc).
// It recomputes the six Hamming check sums over positions 1..38, giving the
// syndrome, and the parity over all 39 bits.
//   syndrome = 0, parity even  no error.
//   parity odd                 one bit is wrong. It sits at the position the
//                              syndrome names (syndrome 0 means the overall
//                              parity bit itself). The bit is flipped back
//                              and single_err is raised.
//   syndrome != 0, parity even two bits are wrong. The data cannot be
//                              corrected and double_err is raised.
// A syndrome that points past position 38 with odd parity can only come
// from three or more flipped bits; it is reported as double_err.
//
// Purely combinational. The code itself is this design's own choice; the
// register file is only assumed to be protected by some error-correcting
// code.
module secded_dec
  import ftv_pkg::*;
(
  input  logic [38:0] code,
  output word_t       data,
  output logic        single_err,
  output logic        double_err
);
  always_comb begin
    logic [38:1] c;
    logic [5:0]  syn;
    logic        par;
    int j;
    c   = code[38:1];
    par = ^code;
    syn = '0;
    for (int k = 0; k < 6; k++)
      for (int pos = 1; pos <= 38; pos++)
        if (((pos >> k) & 1) == 1) syn[k] = syn[k] ^ c[pos];
    single_err = 1'b0;
    double_err = 1'b0;
    if (par) begin
      if (syn <= 6'd38) begin
        single_err = 1'b1;
        for (int pos = 1; pos <= 38; pos++)
          if (6'(pos) == syn) c[pos] = ~c[pos];
      end else begin
        double_err = 1'b1;
      end
    end else if (syn != '0) begin
      double_err = 1'b1;
    end
    data = '0;
    j = 0;
    for (int pos = 1; pos <= 38; pos++)
      if ((pos & (pos - 1)) != 0) begin
        data[j] = c[pos];
        j++;
      end
  end
endmodule
