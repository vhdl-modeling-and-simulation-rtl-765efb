// Cascade of N_RBP range bin processors (512 in the document's chip).
//
// RBP k has the hard-wired address k: RBP 0 receives the phase samples, the
// programming words and the incoming partial sum first, and RBP N_RBP-1
// delivers the final I/Q sum. Phase samples advance one RBP every two clocks
// and partial sums one RBP every clock, so output k of the cascade is
//   sum over r of  term_r(phase sample k - r),
// the range-delayed sum of the document's equation (2.1). A sample entering
// RBP 0 reaches the cascade output N_RBP + 4 clocks later as part of output
// k; the last sample of a burst leaves with the output N_RBP - 1 samples
// after it. Programming words advance one RBP per clock.
module rbp_array
#(
  parameter int unsigned N_RBP  = 512,
  parameter int unsigned ADDR_W = dis_pkg::ADDR_W
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    oper,
  input  dis_pkg::sample_t sample_in,
  input  logic    clk_prog_in,
  input  dis_pkg::prog_t   prog_in,
  input  dis_pkg::sum_t    sum_in,
  output dis_pkg::sample_t sample_out,
  output logic    clk_prog_out,
  output dis_pkg::prog_t   prog_out,
  output dis_pkg::sum_t    sum_out
);
  dis_pkg::sample_t smp  [N_RBP+1];
  logic    cp   [N_RBP+1];
  dis_pkg::prog_t   prg  [N_RBP+1];
  dis_pkg::sum_t    sums [N_RBP+1];

  assign smp[0]  = sample_in;
  assign cp[0]   = clk_prog_in;
  assign prg[0]  = prog_in;
  assign sums[0] = sum_in;

  for (genvar k = 0; k < N_RBP; k++) begin : g_rbp
    rbp #(.ADDR_W(ADDR_W), .ADDR(ADDR_W'(k))) u_rbp (
      .clk, .rst_n, .oper,
      .sample_in (smp[k]),   .clk_prog_in (cp[k]),   .prog_in (prg[k]),   .sum_in (sums[k]),
      .sample_out(smp[k+1]), .clk_prog_out(cp[k+1]), .prog_out(prg[k+1]), .sum_out(sums[k+1])
    );
  end

  assign sample_out   = smp[N_RBP];
  assign clk_prog_out = cp[N_RBP];
  assign prog_out     = prg[N_RBP];
  assign sum_out      = sums[N_RBP];
endmodule
