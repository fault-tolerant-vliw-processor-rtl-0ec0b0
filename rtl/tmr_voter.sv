// tmr_voter: the TMR_MV majority voter, enhanced to detect errors of more
// than one module. Word-level voting over three ALU results:
//   all three equal        -> y = a, no error
//   exactly one disagrees  -> y = the agreeing pair, single_err = 1,
//                             err_loc marks the outvoted input (masked)
//   no two agree           -> multi_err = 1 (y = a, not to be used)
// Two or three equal wrong results cannot be told from a correct vote; the
// document counts them as undetected (fail-unsafe) cases.
// The document names the voter and its enhancement; word-level voting is
// this design's reading. Combinational.
module tmr_voter #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         single_err,
  output logic         multi_err,
  output logic [2:0]   err_loc
);
  logic ab, ac, bc;
  always_comb begin
    ab = (a == b);
    ac = (a == c);
    bc = (b == c);
    y          = a;
    single_err = 1'b0;
    multi_err  = 1'b0;
    err_loc    = 3'b000;
    if (ab && ac) begin
      y = a;
    end else if (ab) begin
      y = a; single_err = 1'b1; err_loc = 3'b100;
    end else if (ac) begin
      y = a; single_err = 1'b1; err_loc = 3'b010;
    end else if (bc) begin
      y = b; single_err = 1'b1; err_loc = 3'b001;
    end else begin
      multi_err = 1'b1; err_loc = 3'b111;
    end
  end
endmodule
