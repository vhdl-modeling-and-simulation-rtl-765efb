// Gain shifter: scales a LUT value by a power of two chosen by a 4-bit gain
// code and rescales it to the 16-bit sum format.
//
// out = (in * 2**s) >>> 5 (arithmetic, i.e. rounded toward minus infinity),
// with s = g[1:0] + 3*g[2] + 4*g[3], so s runs from 0 to 10. The shift is
// done by two cascaded stages of multiplexers: the first shifts by 0..3 from
// g[1:0], the second by 0, 3, 4 or 7 from g[3:2]. The document says that the
// gain is a multiplication by powers of two made with multiplexers; the
// split of the code into these two stages and the five dropped LSBs are
// reconstructed from its 1-, 4- and 16-RBP result tables, which this mapping
// reproduces exactly. With 127 the largest LUT magnitude, |out| <= 4064, so
// one term never overflows the 16-bit sum. Combinational.
module gain_shifter
  import dis_pkg::*;
#(
  parameter int unsigned OUT_W = SUM_W
) (
  input  logic signed [LUT_W-1:0]  in,
  input  gain_t                    gain,
  output logic signed [OUT_W-1:0]  out
);
  localparam int unsigned EXT_W = LUT_W + 10;  // room for the largest shift

  logic signed [EXT_W-1:0] ext, stage1, stage2;

  always_comb begin
    ext = EXT_W'(in);                 // sign extension
    stage1 = ext <<< gain[1:0];       // first shifter: 0..3
    unique case (gain[3:2])           // second shifter: 0, 3, 4, 7
      2'b00:   stage2 = stage1;
      2'b01:   stage2 = stage1 <<< 3;
      2'b10:   stage2 = stage1 <<< 4;
      default: stage2 = stage1 <<< 7;
    endcase
  end

  assign out = OUT_W'(stage2 >>> DROP_LSB);
endmodule
