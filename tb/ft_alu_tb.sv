// ft_alu_tb: checks every ALU function against a reference computed here
// with random and corner operands, then the stuck-at-0 / stuck-at-1
// fault-injection masks.
module ft_alu_tb;
  import ftv_pkg::*;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  alu_fn_e fn;
  word_t a, b, sa0, sa1, y;
  ft_alu dut (.fn(fn), .a(a), .b(b), .fi_sa0(sa0), .fi_sa1(sa1), .y(y));

  function automatic word_t ref_alu(alu_fn_e f, word_t x, word_t z);
    longint unsigned p;
    case (f)
      FN_ADD:  return x + z;
      FN_SUB:  return x - z;
      FN_AND:  return x & z;
      FN_OR:   return x | z;
      FN_XOR:  return x ^ z;
      FN_NOR:  return ~(x | z);
      FN_SLL:  return x << (z % 32);
      FN_SRL:  return x >> (z % 32);
      FN_SRA:  return word_t'($signed(x) >>> (z % 32));
      FN_SLT:  return ($signed(x) < $signed(z)) ? 1 : 0;
      FN_SLTU: return (x < z) ? 1 : 0;
      FN_MUL:  begin p = longint'(x) * longint'(z); return p[31:0]; end
      FN_PASSB: return z;
      default: return 0;
    endcase
  endfunction

  task automatic check(word_t exp, string what);
    #1;
    checks++;
    if (y !== exp) begin
      failures++;
      $display("FAIL %s fn=%0d a=%h b=%h y=%h exp=%h", what, fn, a, b, y, exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    word_t corners [6] = '{32'h0, 32'h1, 32'hFFFF_FFFF, 32'h8000_0000, 32'h7FFF_FFFF, 32'h0001_0000};
    sa0 = '0; sa1 = '0;
    for (int f = 0; f <= 12; f++) begin
      fn = alu_fn_e'(f);
      foreach (corners[i]) foreach (corners[j]) begin
        a = corners[i]; b = corners[j];
        check(ref_alu(fn, a, b), "corner");
      end
      repeat (200) begin
        a = $urandom; b = $urandom;
        check(ref_alu(fn, a, b), "random");
      end
    end
    // known values
    fn = FN_MUL; a = 32'd12345; b = 32'd6789; check(32'd83810205, "mul");
    fn = FN_SRA; a = 32'hF000_0000; b = 32'd4; check(32'hFF00_0000, "sra");
    fn = FN_SLT; a = 32'hFFFF_FFFF; b = 32'd1; check(32'd1, "slt");
    // fault injection masks
    fn = FN_ADD; a = 32'h0000_00F0; b = 32'h0000_000F;
    sa0 = 32'h0000_0010; check(32'h0000_00EF, "sa0");
    sa0 = '0; sa1 = 32'h8000_0000; check(32'h8000_00FF, "sa1");
    sa1 = '0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
