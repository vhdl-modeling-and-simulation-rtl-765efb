// Self-test counter.
//
// Cleared while its run input is low; counts up by one on every clock while
// run is high, so n clocks after run rises it holds n. It wraps after
// 2**W - 1. In the DIS, run is Start_SelfTest: the count includes the three
// clocks the self-test generator needs before its first vector, which is
// why the document asks for an off-chip count three greater than the number
// of vectors wanted. The role (compare the vector count with the off-chip
// count) is the document's; the counting convention is this design's.
module test_counter #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         run,
  output logic [W-1:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    count <= '0;
    else if (!run) count <= '0;
    else           count <= count + 1'b1;
  end
endmodule
