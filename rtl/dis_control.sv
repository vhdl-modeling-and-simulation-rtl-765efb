// Overhead control circuitry of the DIS.
//
// Steers one of four phase-sample sources into the RBP cascade and produces
// the Operate/Maintenance signal:
//   * the 6-bit 4-to-1 path multiplexer selects, by path_sel {S1,S0},
//     00 path 1 (off-chip input ext0), 01 path 2 (off-chip input ext1),
//     10 path 3 (self-test generator), 11 path 4 (phase extractor);
//   * the self-test generator starts when start_selftest rises;
//   * a 12-bit counter counts clocks from the rise of start_selftest
//     (cleared while it is low) and a comparator raises Equal when it
//     reaches the off-chip count test_count;
//   * Equal sets an ~S/~R latch (~S = not Equal); start_selftest low resets
//     it (~R = start_selftest);
//   * a 2-to-1 multiplexer drives oper from the latch's QN output when
//     oper_mux_sel is 1, and from the off-chip level oper_mux_io when it is 0.
// With oper_mux_sel = 1 a self test therefore applies exactly
// test_count - 3 vectors (the generator's first vector comes three clocks
// after the start) and then drives oper low, freezing the RBPs and with them
// the signature. The document states both that the counter is cleared by
// PSV low and counts while PSV is high, and that "the off-chip number should
// be three greater than the desired test length" (61 vectors for a count of
// 64, the count its path 3 simulation uses); this design follows the second. The document's path 3 procedure sets oper_mux_sel = 1 and its
// paths 1, 2 and 4 procedures set it to 0 with oper_mux_io = 1; this polarity
// follows those procedures. The latch reset by start_selftest is this
// design's choice. The phase extractor's LOAD input is tied high.
module dis_control
  import dis_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  sample_t                ext0_in,
  input  sample_t                ext1_in,
  input  logic signed [IQ_W-1:0] drfm_i,
  input  logic signed [IQ_W-1:0] drfm_q,
  input  logic                   iq_valid_in,
  input  logic [1:0]             path_sel,
  input  logic                   start_selftest,
  input  logic [CNT_W-1:0]       test_count,
  input  logic                   oper_mux_io,
  input  logic                   oper_mux_sel,
  output sample_t                mux_out,
  output logic                   oper,
  output logic                   selftest_done
);
  sample_t          st_sample, pe_sample;
  logic [CNT_W-1:0] count;
  logic             equal;
  logic             latch_q, latch_qn;

  self_test_lfsr #(.W(12)) u_lfsr (
    .clk, .rst_n, .start(start_selftest), .sample_out(st_sample));

  phase_extractor u_pe (
    .clk, .rst_n, .load(1'b1), .i_in(drfm_i), .q_in(drfm_q),
    .valid_in(iq_valid_in), .sample_out(pe_sample));

  path_mux #(.W($bits(sample_t))) u_mux (
    .in0(ext0_in), .in1(ext1_in), .in2(st_sample), .in3(pe_sample),
    .sel(path_sel), .out(mux_out));

  test_counter #(.W(CNT_W)) u_cnt (.clk, .rst_n, .run(start_selftest), .count);

  eq_comparator #(.W(CNT_W)) u_cmp (.a(count), .b(test_count), .equal);

  sr_latch_n u_latch (.s_n(~equal), .r_n(start_selftest), .q(latch_q), .qn(latch_qn));

  // Operate/Maintenance 2-to-1 multiplexer.
  assign oper          = oper_mux_sel ? latch_qn : oper_mux_io;
  assign selftest_done = latch_q & start_selftest;
endmodule
