// One-bit 4-to-1 multiplexer cell.
//
// F = I0, I1, I2 or I3 for select {S1,S0} = 00, 01, 10, 11. Six of these
// form the 6-bit path multiplexer of the DIS. Combinational.
module mux4_bit (
  input  logic       i0,
  input  logic       i1,
  input  logic       i2,
  input  logic       i3,
  input  logic [1:0] s,
  output logic       f
);
  always_comb begin
    unique case (s)
      2'd0: f = i0;
      2'd1: f = i1;
      2'd2: f = i2;
      default: f = i3;
    endcase
  end
endmodule
