// comparator: the CP1/CP2 checker of duplication with comparison. Two ALUs
// execute the same instruction; the results agree (eq = 1) or the
// instruction is flagged for recovery. Purely combinational, no latency, so
// the check happens in the same cycle as the execution, as the document
// requires. Width is a parameter (default 32, the data width).
module comparator #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         eq
);
  always_comb eq = (a == b);
endmodule
