// Summation adder of a range bin processor.
//
// Adds this bin's W-bit two's complement term to the partial sum from the
// previous bin. The sum wraps on overflow; OF_OUT then goes high, and it also
// repeats an overflow already flagged upstream (OF_IN), so the flag at the
// end of the cascade tells whether any addition on the way overflowed. The
// document names the overflow inputs and outputs; detecting overflow from the
// operand and result signs is this design's choice. Combinational.
module sum_adder #(
  parameter int unsigned W = 16
) (
  input  logic signed [W-1:0] a,
  input  logic signed [W-1:0] b,
  input  logic                of_in,
  output logic signed [W-1:0] s,
  output logic                of_out
);
  always_comb begin
    s      = a + b;
    of_out = of_in | ((a[W-1] == b[W-1]) && (s[W-1] != a[W-1]));
  end
endmodule
