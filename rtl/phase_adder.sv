// Phase rotation adder.
//
// Adds two W-bit phase words modulo 2**W: the carry out is dropped, so the
// sum wraps around the circle (31 + 1 = 0 for the document's 5-bit phases).
// In each range bin processor it adds the programmed phase increment to the
// incoming phase sample, which rotates the echo of that range bin and gives
// it its Doppler motion. Combinational.
module phase_adder #(
  parameter int unsigned W = 5
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  assign s = a + b;
endmodule
