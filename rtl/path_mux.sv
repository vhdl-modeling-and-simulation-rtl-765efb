// Phase sample path multiplexer: W-bit 4-to-1 multiplexer built from W
// one-bit cells, as in the document (W = 6: PSV and five phase bits).
//
// Select {S1,S0}: 00 = path 1 (off-chip samples), 01 = path 2 (second
// off-chip input), 10 = path 3 (self-test generator), 11 = path 4 (phase
// extractor). Combinational.
module path_mux #(
  parameter int unsigned W = 6
) (
  input  logic [W-1:0] in0,
  input  logic [W-1:0] in1,
  input  logic [W-1:0] in2,
  input  logic [W-1:0] in3,
  input  logic [1:0]   sel,
  output logic [W-1:0] out
);
  for (genvar b = 0; b < W; b++) begin : g_bit
    mux4_bit u_cell (
      .i0(in0[b]), .i1(in1[b]), .i2(in2[b]), .i3(in3[b]),
      .s (sel),    .f (out[b])
    );
  end
endmodule
