// Digital Image Synthesizer (DIS) top level.
//
// The control circuitry (dis_control) selects the phase-sample source and
// the Operate/Maintenance level; the selected 6-bit sample (PSV + phase)
// enters RBP 0 of a cascade of N_RBP range bin processors (rbp_array),
// which also receives the programming word, the Clock_Prog bit and an
// incoming partial sum (chain_in, normally zero; it lets chips be chained).
// The cascade's last RBP delivers the synthesised I/Q sample with overflow
// flags and ODV, and passes on the sample, programming word and Clock_Prog
// bit, as the chip's outputs do in the document.
//
// Timing: a phase sample on ext0_in/ext1_in reaches RBP 0 in the same clock
// and, as output k of the cascade, appears on chain_out N_RBP + 4 clocks
// later. The phase extractor adds three clocks; the self-test generator
// starts three clocks after start_selftest rises. A programming word reaches
// RBP k after k + 1 clocks; coefficients take effect at an UNP word.
// The whole chip runs on one clock; the document's counter-flow clock
// distribution is not modelled.
module dis_top
#(
  parameter int unsigned N_RBP  = 512,
  parameter int unsigned ADDR_W = dis_pkg::ADDR_W
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // programming
  input  dis_pkg::prog_t                  prog_in,
  input  logic                   clk_prog_in,
  // cascade input from a preceding chip
  input  dis_pkg::sum_t                   chain_in,
  // phase sample sources
  input  dis_pkg::sample_t                ext0_in,
  input  dis_pkg::sample_t                ext1_in,
  input  logic signed [dis_pkg::IQ_W-1:0] drfm_i,
  input  logic signed [dis_pkg::IQ_W-1:0] drfm_q,
  input  logic                   iq_valid_in,
  // control
  input  logic [1:0]             path_sel,
  input  logic                   start_selftest,
  input  logic [dis_pkg::CNT_W-1:0]       test_count,
  input  logic                   oper_mux_io,
  input  logic                   oper_mux_sel,
  // outputs
  output dis_pkg::sum_t                   chain_out,
  output dis_pkg::prog_t                  prog_out,
  output dis_pkg::sample_t                sample_out,
  output logic                   clk_prog_out,
  output dis_pkg::sample_t                mux_out,
  output logic                   oper,
  output logic                   selftest_done
);
  dis_control u_ctrl (
    .clk, .rst_n, .ext0_in, .ext1_in, .drfm_i, .drfm_q, .iq_valid_in,
    .path_sel, .start_selftest, .test_count, .oper_mux_io, .oper_mux_sel,
    .mux_out, .oper, .selftest_done);

  rbp_array #(.N_RBP(N_RBP), .ADDR_W(ADDR_W)) u_rbps (
    .clk, .rst_n, .oper,
    .sample_in(mux_out), .clk_prog_in, .prog_in, .sum_in(chain_in),
    .sample_out, .clk_prog_out, .prog_out, .sum_out(chain_out));
endmodule
