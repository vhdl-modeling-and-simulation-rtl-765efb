// Range bin processor (RBP): one false-target range bin of the DIS.
//
// Each RBP adds its term 2^g * exp(j(phi + phi_inc)) to the running I/Q sum:
// the phase rotation adder adds the programmed phase increment to the phase
// sample, the sine/cosine table turns the rotated phase into I and Q, the
// gain shifters scale them, and the summation adders add them to the partial
// sum arriving from the previous RBP. Samples with PSV low, and all samples
// while the bin is not in use (URB = 0), add nothing.
//
// Pipeline (this design's choice of register placement). A phase sample
// passes two registers in every RBP (A and B) before it leaves on
// sample_out, while a partial sum passes one (the sum register). Hence RBP r
// of a cascade meets the partial sum of output k together with phase sample
// k - r, which is the range delay of the bin. Inside the RBP the term is
// computed in four stages:
//   A: sample and Clock_Prog bit registered;
//   B: rotated phase = sample + PInc, validity = PSV and URB, gain captured;
//   C: LUT outputs registered;
//   D: gain-shifted term registered;
//   then the sum register: sum_out = sum_in + term.
// The output of a single RBP appears five clocks after its sample enters.
// ODV (Output Data Valid) and the overflow flags travel with the sum.
// While oper (Operate/Maintenance) is low every data register holds its
// value, freezing the synthesised signature.
//
// Programming. The programming word ripples through one register per RBP.
// When a word with PRB high carries this RBP's hard-wired address ADDR, the
// next clock loads its URB, Gain and PInc into the preload register. A word
// with UNP high copies preload into the active register, so coefficients can
// be written while the bin keeps computing with the old ones (double
// buffering). Programming is not stopped by oper. After reset the active
// coefficients are zero with URB = 0, so an unprogrammed bin adds nothing;
// that reset value is this design's choice.
//
// The complement outputs of the two coefficient registers are not needed
// and are left unconnected.
//
// clk_prog_in is the document's Clock_Prog bit, kept in the sample register
// and passed on; the clock splitting circuit it adjusts is not modelled, the
// whole cascade runs on one clock.
module rbp
#(
  parameter int unsigned ADDR_W = dis_pkg::ADDR_W,
  parameter logic [ADDR_W-1:0] ADDR = '0
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
  localparam int unsigned COEF_W = $bits(dis_pkg::coef_t);

  // ---------------- programming ----------------
  dis_pkg::prog_t prog_q;
  dis_pkg::coef_t preload, active;
  logic  addr_match;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) prog_q <= '0;
    else        prog_q <= prog_in;
  end

  assign addr_match = prog_q.prb && (prog_q.sel == ADDR);

  load_reg #(.W(COEF_W)) u_preload (
    .clk, .rst_n, .ld(addr_match),
    .d({prog_q.urb, prog_q.gain, prog_q.pinc}),
    .q(preload), .q_n()
  );

  load_reg #(.W(COEF_W)) u_active (
    .clk, .rst_n, .ld(prog_q.unp),
    .d(preload), .q(active), .q_n()
  );

  assign prog_out = prog_q;

  // ---------------- data pipeline ----------------
  dis_pkg::sample_t smp_a, smp_b;
  logic    cp_a, cp_b;
  dis_pkg::phase_t  rot, rot_b;
  logic    v_b, v_c, v_d;
  dis_pkg::gain_t   gain_b, gain_c;
  logic signed [dis_pkg::LUT_W-1:0] cos_w, sin_w, cos_c, sin_c;
  logic signed [dis_pkg::SUM_W-1:0] ti_w, tq_w, ti_d, tq_d;
  logic signed [dis_pkg::SUM_W-1:0] si_w, sq_w;
  logic    iof_w, qof_w;

  phase_adder #(.W(dis_pkg::PH_W)) u_rot (.a(smp_a.phase), .b(active.pinc), .s(rot));

  sincos_lut u_lut (.phase(rot_b), .cos_o(cos_w), .sin_o(sin_w));

  gain_shifter u_gain_i (.in(cos_c), .gain(gain_c), .out(ti_w));
  gain_shifter u_gain_q (.in(sin_c), .gain(gain_c), .out(tq_w));

  sum_adder #(.W(dis_pkg::SUM_W)) u_sum_i (
    .a(sum_in.i), .b(v_d ? ti_d : '0), .of_in(sum_in.iof), .s(si_w), .of_out(iof_w));
  sum_adder #(.W(dis_pkg::SUM_W)) u_sum_q (
    .a(sum_in.q), .b(v_d ? tq_d : '0), .of_in(sum_in.qof), .s(sq_w), .of_out(qof_w));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_a <= '0;  cp_a <= 1'b0;
      smp_b <= '0;  cp_b <= 1'b0;
      rot_b <= '0;  v_b <= 1'b0;  gain_b <= '0;
      cos_c <= '0;  sin_c <= '0;  v_c <= 1'b0;  gain_c <= '0;
      ti_d  <= '0;  tq_d  <= '0;  v_d <= 1'b0;
      sum_out <= '0;
    end else if (oper) begin
      // A
      smp_a <= sample_in;
      cp_a  <= clk_prog_in;
      // B
      smp_b  <= smp_a;
      cp_b   <= cp_a;
      rot_b  <= rot;
      v_b    <= smp_a.psv & active.urb;
      gain_b <= active.gain;
      // C
      cos_c  <= cos_w;
      sin_c  <= sin_w;
      v_c    <= v_b;
      gain_c <= gain_b;
      // D
      ti_d <= ti_w;
      tq_d <= tq_w;
      v_d  <= v_c;
      // sum
      sum_out.i   <= si_w;
      sum_out.q   <= sq_w;
      sum_out.iof <= iof_w;
      sum_out.qof <= qof_w;
      sum_out.odv <= sum_in.odv | v_d;
    end
  end

  assign sample_out   = smp_b;
  assign clk_prog_out = cp_b;
endmodule
