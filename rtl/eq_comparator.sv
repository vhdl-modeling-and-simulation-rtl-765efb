// Equality comparator.
//
// EQUAL is high when the two W-bit words are identical. In the DIS a 12-bit
// instance compares the self-test counter (A) with the off-chip count
// (B); a match sets the end-of-test latch. Purely combinational.
module eq_comparator #(
  parameter int unsigned W = 12
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         equal
);
  assign equal = (a == b);
endmodule
