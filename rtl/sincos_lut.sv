// Sine/cosine look-up table of the range bin processor.
//
// Converts a 5-bit phase p (32 steps of 11.25 degrees) into the complex unit
// vector it stands for, as two signed OUT_W-bit numbers:
//   cos_o = round(127 * cos(2*pi*p/32)),  sin_o = round(127 * sin(2*pi*p/32)).
// Only the quarter wave {127,125,117,106,90,71,49,25,0} (p = 0..8) is stored;
// the other quadrants follow by symmetry and sign change, and sine is the
// cosine delayed by a quarter turn (8 steps). The document specifies what the
// table does; the 8-bit amplitude of 127 is this design's reconstruction from
// the document's RBP result tables, which it reproduces bit for bit once the
// gain shifter drops its five LSBs. Combinational.
module sincos_lut
  import dis_pkg::*;
#(
  parameter int unsigned OUT_W = LUT_W
) (
  input  phase_t                  phase,
  output logic signed [OUT_W-1:0] cos_o,
  output logic signed [OUT_W-1:0] sin_o
);
  // Quarter wave: round(127*cos(k*11.25 deg)), k = 0..8.
  function automatic logic signed [OUT_W-1:0] quarter(input logic [3:0] k);
    case (k)
      4'd0: quarter = OUT_W'(127);
      4'd1: quarter = OUT_W'(125);
      4'd2: quarter = OUT_W'(117);
      4'd3: quarter = OUT_W'(106);
      4'd4: quarter = OUT_W'(90);
      4'd5: quarter = OUT_W'(71);
      4'd6: quarter = OUT_W'(49);
      4'd7: quarter = OUT_W'(25);
      default: quarter = '0;
    endcase
  endfunction

  function automatic logic signed [OUT_W-1:0] cosine(input phase_t p);
    logic [5:0] u;
    u = {1'b0, p};
    if (u <= 6'd8)       cosine = quarter(4'(u));
    else if (u <= 6'd16) cosine = -quarter(4'(6'd16 - u));
    else if (u <= 6'd24) cosine = -quarter(4'(u - 6'd16));
    else                 cosine = quarter(4'(6'd32 - u));
  endfunction

  assign cos_o = cosine(phase);
  assign sin_o = cosine(phase - phase_t'(8));
endmodule
