// Phase extractor: converts an I/Q sample from the DRFM (two 8-bit two's
// complement numbers) into a 5-bit unsigned phase, 0..31 in steps of 11.25
// degrees counter-clockwise from the +I axis.
//
// Method (this design's own; the document gives the function and test
// results, not the circuit). The signs of I and Q select the quadrant and
// the comparison |Q| > |I| the octant. The ratio r = minor/major of the two
// magnitudes, both 0..128, is compared with four fixed thresholds,
//   minor * 1024 >= major * T,  T = {80, 341, 485, 847},
// i.e. r >= 0.0781, 0.3330, 0.4736, 0.8271. These sit near the sector
// boundaries tan(5.625), tan(16.875), tan(28.125), tan(39.375) degrees and
// were chosen so that the extractor reproduces the document's table of
// reference conversions; one listed point, (I,Q) = (1,3), gives 6 here where
// the table lists 7, because the table gives 2 for the same ratio at (6,2).
// The number s of thresholds met (0..4) counts sectors from the nearest
// axis: in quadrant I the phase is s below 45 degrees and 8 - s above, and
// so on around the circle. (0,0) gives phase 0.
//
// Pipeline: three clocks. Stage 1 registers I, Q and the valid flag when
// LOAD is high (the chip ties LOAD high); stage 2 registers quadrant, octant
// and s; stage 3 registers the phase. sample_out.psv is valid_in delayed by
// three clocks, and drives the Phase Sample Valid of path 4.
module phase_extractor
#(
  parameter int unsigned IQ_W = dis_pkg::IQ_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   load,
  input  logic signed [IQ_W-1:0] i_in,
  input  logic signed [IQ_W-1:0] q_in,
  input  logic                   valid_in,
  output dis_pkg::sample_t                sample_out
);
  localparam int unsigned MAG_W = IQ_W + 1;    // |-128| = 128
  localparam int unsigned PRD_W = MAG_W + 10;
  localparam logic [9:0] TH [4] = '{10'd80, 10'd341, 10'd485, 10'd847};

  // stage 1
  logic signed [IQ_W-1:0] i_r, q_r;
  logic                   v_r;
  // stage 2
  logic       i_neg_r, q_neg_r, swap_r, v_r2;
  logic [2:0] s_r;
  // stage 3
  dis_pkg::sample_t    out_r;

  logic [MAG_W-1:0] ai, aq, mj, mn;
  logic             swap;
  logic [2:0]       s;

  always_comb begin
    ai   = i_r[IQ_W-1] ? -{i_r[IQ_W-1], i_r} : {1'b0, i_r};
    aq   = q_r[IQ_W-1] ? -{q_r[IQ_W-1], q_r} : {1'b0, q_r};
    swap = aq > ai;
    mj   = swap ? aq : ai;
    mn   = swap ? ai : aq;
    s    = '0;
    if (mj != '0) begin
      for (int t = 0; t < 4; t++)
        if ((PRD_W'(mn) << 10) >= PRD_W'(mj) * PRD_W'(TH[t])) s = s + 3'd1;
    end
  end

  function automatic dis_pkg::phase_t to_phase(input logic i_neg, input logic q_neg,
                                      input logic sw, input logic [2:0] st);
    dis_pkg::phase_t p;
    unique case ({q_neg, i_neg})
      2'b00: p = sw ? 5'(8 - st)  : 5'(st);        // quadrant I
      2'b01: p = sw ? 5'(8 + st)  : 5'(16 - st);   // quadrant II
      2'b11: p = sw ? 5'(24 - st) : 5'(16 + st);   // quadrant III
      default: p = sw ? 5'(24 + st) : 5'(32 - st); // quadrant IV
    endcase
    return p;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      i_r <= '0; q_r <= '0; v_r <= 1'b0;
      i_neg_r <= 1'b0; q_neg_r <= 1'b0; swap_r <= 1'b0; s_r <= '0; v_r2 <= 1'b0;
      out_r <= '0;
    end else begin
      if (load) begin
        i_r <= i_in;
        q_r <= q_in;
        v_r <= valid_in;
      end
      i_neg_r <= i_r[IQ_W-1];
      q_neg_r <= q_r[IQ_W-1];
      swap_r  <= swap;
      s_r     <= s;
      v_r2    <= v_r;
      out_r.psv   <= v_r2;
      out_r.phase <= to_phase(i_neg_r, q_neg_r, swap_r, s_r);
    end
  end

  assign sample_out = out_r;
endmodule
