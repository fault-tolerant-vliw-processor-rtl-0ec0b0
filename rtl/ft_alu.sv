// ft_alu: one of the four identical ALUs (ALU_1..ALU_4) of the checked data
// path. It computes add, subtract, logic, shifts, set-less-than, pass-B (for
// LUI) and the low 32 bits of a 32x32 multiply, combinationally within the
// EXE cycle.
//
// The document gives the ALU's role and its 32x32 multiplier. The function
// list is this design's own. The two mask inputs are a fault-injection hook
// of this design: a 1 in fi_sa0 holds that result bit at 0, a 1 in fi_sa1
// holds it at 1 (stuck-at faults on the ALU output). Tie both to zero in
// normal use.
module ft_alu
  import ftv_pkg::*;
(
  input  alu_fn_e fn,
  input  word_t   a,
  input  word_t   b,
  input  word_t   fi_sa0,
  input  word_t   fi_sa1,
  output word_t   y
);
  word_t raw;
  logic [63:0] prod;

  assign prod = 64'(a) * 64'(b);

  always_comb begin
    unique case (fn)
      FN_ADD:   raw = a + b;
      FN_SUB:   raw = a - b;
      FN_AND:   raw = a & b;
      FN_OR:    raw = a | b;
      FN_XOR:   raw = a ^ b;
      FN_NOR:   raw = ~(a | b);
      FN_SLL:   raw = a << b[4:0];
      FN_SRL:   raw = a >> b[4:0];
      FN_SRA:   raw = word_t'($signed(a) >>> b[4:0]);
      FN_SLT:   raw = word_t'($signed(a) < $signed(b));
      FN_SLTU:  raw = word_t'(a < b);
      FN_MUL:   raw = prod[31:0];
      FN_PASSB: raw = b;
      default:  raw = '0;
    endcase
  end

  assign y = (raw & ~fi_sa0) | fi_sa1;
endmodule
