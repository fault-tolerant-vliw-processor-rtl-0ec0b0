// secded_enc_tb: checks the register-file SEC-DED encoder. For a valid
// extended Hamming codeword the XOR of the indices of all set bits among
// positions 1..38 is zero and the 39 bits have even parity; the data bits
// must sit, in order, at the positions that are not powers of two. These
// properties are checked on fixed and random words, with two exact
// codewords worked out by hand (0 -> 0, 1 -> 0xF).
module secded_enc_tb;
  import ftv_pkg::*;
  int checks = 0, failures = 0;
  word_t data;
  logic [38:0] code;

  secded_enc dut (.data (data), .code (code));

  task automatic expect_(string what, logic cond);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s data=%h code=%h", what, data, code); end
  endtask

  task automatic check_word(word_t d);
    int x, j;
    logic ok;
    data = d;
    #1;
    x = 0;
    for (int pos = 1; pos <= 38; pos++) if (code[pos]) x ^= pos;
    expect_("index XOR is zero", x == 0);
    expect_("even parity", ^code == 1'b0);
    ok = 1'b1;
    j = 0;
    for (int pos = 3; pos <= 38; pos++)
      if (pos != 4 && pos != 8 && pos != 16 && pos != 32) begin
        if (code[pos] != d[j]) ok = 1'b0;
        j++;
      end
    expect_("data bits in place", ok && j == 32);
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data = '0;
    #1 expect_("code of 0", code == 39'h0);
    data = 32'h1;
    #1 expect_("code of 1", code == 39'hF);
    check_word(32'h0);
    check_word(32'hFFFF_FFFF);
    check_word(32'h8000_0000);
    for (int b = 0; b < 32; b++) check_word(word_t'(1) << b);
    for (int i = 0; i < 500; i++) check_word($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
