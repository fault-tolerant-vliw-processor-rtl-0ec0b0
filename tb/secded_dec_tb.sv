// secded_dec_tb: checks the register-file SEC-DED decoder. Codewords are
// built here from the definition of the code (data at the non-power-of-two
// positions, check bits chosen so that the XOR of the indices of all set
// bits is zero, overall parity even), then zero, one or two distinct bits
// are flipped. Zero flips must give the data with no flag, one flip the
// corrected data with single, two flips double and not single. Every one of
// the 39 single-bit positions is tried on each word.
module secded_dec_tb;
  import ftv_pkg::*;
  int checks = 0, failures = 0;
  logic [38:0] code;
  word_t data;
  logic single, dbl;

  secded_dec dut (.code (code), .data (data), .single_err (single), .double_err (dbl));

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s code=%h data=%h s=%b d=%b", what, code, data, single, dbl); end
  endtask

  function automatic logic [38:0] build(word_t d);
    logic [38:0] c;
    int j, x;
    c = '0;
    j = 0;
    x = 0;
    for (int pos = 3; pos <= 38; pos++)
      if (pos != 4 && pos != 8 && pos != 16 && pos != 32) begin
        c[pos] = d[j];
        if (d[j]) x ^= pos;
        j++;
      end
    for (int k = 0; k < 6; k++) c[1 << k] = x[k];
    c[0] = ^c[38:1];
    return c;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t d;
    logic [38:0] c;
    int b1, b2;
    for (int i = 0; i < 200; i++) begin
      d = (i == 0) ? 32'h0 : (i == 1) ? 32'hFFFF_FFFF : $urandom;
      c = build(d);
      code = c;
      #1 expect_("clean word", data == d && !single && !dbl);
      for (int b = 0; b < 39; b++) begin
        code = c ^ (39'h1 << b);
        #1 expect_("single flip corrected", data == d && single && !dbl);
      end
      b1 = $urandom % 39;
      b2 = (b1 + 1 + $urandom % 38) % 39;
      code = c ^ (39'h1 << b1) ^ (39'h1 << b2);
      #1 expect_("double flip detected", dbl && !single);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
