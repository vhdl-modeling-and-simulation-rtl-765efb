// Self-test sequence generator: 12-bit maximal-length LFSR.
//
// While start is low the register is initialised with one bit set and the
// others clear, and PSV is low. Three clocks after start rises PSV goes
// high, and from then on the register shifts once per clock, producing a
// new pseudo-random 5-bit phase sample (phase = the five newest bits, the
// newest in bit 4) with PSV high. The bit sequence obeys
//   b[n] = b[n-6] xor b[n-8] xor b[n-11] xor b[n-12],
// a primitive recurrence, so the sequence repeats after 4095 samples,
// starting 0x10, 0x08, 0x04, 0x02, 0x01, 0x00, 0x10, 0x08, 0x14, ... The
// document gives the register length, the one-hot start, the 3-clock start
// delay and the whole 4095-sample sequence; the feedback taps are derived
// from that sequence. Shifting is not stopped by the end of a test: the
// RBPs are frozen instead (see dis_control).
module self_test_lfsr
  import dis_pkg::*;
#(
  parameter int unsigned W = 12
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output sample_t sample_out
);
  logic [W-1:0] sr;          // sr[W-1] newest bit
  logic [1:0]   start_d;     // start delay line
  logic         psv;
  logic         fb;

  assign fb = sr[6] ^ sr[4] ^ sr[1] ^ sr[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr      <= W'(1) << (W-1);
      start_d <= '0;
      psv     <= 1'b0;
    end else if (!start) begin
      sr      <= W'(1) << (W-1);
      start_d <= '0;
      psv     <= 1'b0;
    end else begin
      start_d <= {start_d[0], 1'b1};
      psv     <= start_d[1];
      if (psv) sr <= {fb, sr[W-1:1]};
    end
  end

  assign sample_out.psv   = psv;
  assign sample_out.phase = sr[W-1 -: PH_W];
endmodule
