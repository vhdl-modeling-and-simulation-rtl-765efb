// Testbench of the range bin processor cascade (16 RBPs).
//
// Runs the document's 1-, 4-, 13- and 16-bin experiments on one 16-bin
// cascade, checking every output against the published result tables where
// they are given (Tables 17 and 19) and against an independent reference
// model everywhere (the sum over bins of floor(round(127*e^{j phi}) *
// 2^shift / 32), computed with real arithmetic). It also checks the
// latency (output k appears N+4 clocks after phase sample k), ODV, the
// overflow flags, double-buffered programming during a burst, and the
// freeze while Operate/Maintenance is low.
module tb_rbp_array;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int MAXS = 64;
  localparam int CAP = MAXS + 2 * N + 16;

  localparam logic [15:0] T19_I [47] = '{
    16'h0003, 16'hFFFB, 16'h0009, 16'hFFEE, 16'h0006, 16'hFFE0, 16'h001A, 16'hFFDA,
    16'h0000, 16'h002C, 16'hFFF8, 16'h0112, 16'hFFF5, 16'h0343, 16'hFC4A, 16'h0BA9,
    16'h0BD9, 16'h0BA9, 16'h0AEA, 16'h09E3, 16'h0865, 16'h069E, 16'h0490, 16'h0252,
    16'h0000, 16'hFDA7, 16'hFB69, 16'hF95B, 16'hF796, 16'hF618, 16'hF50F, 16'hF450,
    16'hF41D, 16'hF455, 16'hF506, 16'hF62A, 16'hF790, 16'hF97B, 16'hFB4F, 16'hFDCD,
    16'h0000, 16'h0226, 16'h0498, 16'h058C, 16'h0870, 16'h06A0, 16'h0EA0
  };
  localparam logic [15:0] T19_Q [47] = '{
    16'h0000, 16'hFFFE, 16'h0003, 16'hFFF3, 16'h0006, 16'hFFD3, 16'h0042, 16'hFF4D,
    16'hFF89, 16'hFF0E, 16'h0007, 16'hFE60, 16'h0006, 16'hFDCB, 16'h0189, 16'hFDA7,
    16'h0000, 16'h0252, 16'h0490, 16'h069E, 16'h0865, 16'h09E3, 16'h0AEA, 16'h0BA9,
    16'h0BD9, 16'h0BA9, 16'h0AEA, 16'h09E3, 16'h0865, 16'h069E, 16'h0490, 16'h0252,
    16'h0000, 16'hFDA9, 16'hFB66, 16'hF968, 16'hF790, 16'hF645, 16'hF4CD, 16'hF503,
    16'hF497, 16'hF542, 16'hF508, 16'hF7B8, 16'hF790, 16'hFB90, 16'hF9E0
  };
  // single RBP, gain 0, PInc 0: (I, Q) for samples 00,10,01,11,...,0F,1F
  localparam logic [15:0] T17_IQ [64] = '{
    16'h0003, 16'h0000, 16'hFFFC, 16'h0000, 16'h0003, 16'h0000, 16'hFFFC, 16'hFFFF,
    16'h0003, 16'h0001, 16'hFFFC, 16'hFFFE, 16'h0003, 16'h0002, 16'hFFFC, 16'hFFFD,
    16'h0002, 16'h0002, 16'hFFFD, 16'hFFFD, 16'h0002, 16'h0003, 16'hFFFD, 16'hFFFC,
    16'h0001, 16'h0003, 16'hFFFE, 16'hFFFC, 16'h0000, 16'h0003, 16'hFFFF, 16'hFFFC,
    16'h0000, 16'h0003, 16'h0000, 16'hFFFC, 16'hFFFF, 16'h0003, 16'h0000, 16'hFFFC,
    16'hFFFE, 16'h0003, 16'h0001, 16'hFFFC, 16'hFFFD, 16'h0003, 16'h0002, 16'hFFFC,
    16'hFFFD, 16'h0002, 16'h0002, 16'hFFFD, 16'hFFFC, 16'h0002, 16'h0003, 16'hFFFD,
    16'hFFFC, 16'h0001, 16'h0003, 16'hFFFE, 16'hFFFC, 16'h0000, 16'h0003, 16'hFFFF
  };

  logic    clk = 1'b0;
  logic    rst_n;
  logic    oper;
  sample_t sample_in;
  logic    clk_prog_in;
  prog_t   prog_in;
  sum_t    sum_in;
  sample_t sample_out;
  logic    clk_prog_out;
  prog_t   prog_out;
  sum_t    sum_out;

  int checks = 0, failures = 0;

  rbp_array #(.N_RBP(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // coefficients the reference model uses (what has been committed)
  int ref_gain [N], ref_pinc [N], ref_urb [N];
  int smp [MAXS];
  int nsmp;
  int cap_i [CAP], cap_q [CAP], cap_iof [CAP], cap_qof [CAP], cap_odv [CAP];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic tick();
    @(negedge clk);
  endtask

  task automatic program_bin(input int addr, input int urb, input int gain, input int pinc);
    prog_in = '0;
    prog_in.prb  = 1'b1;
    prog_in.sel  = ADDR_W'(addr);
    prog_in.urb  = urb[0];
    prog_in.gain = gain_t'(gain);
    prog_in.pinc = phase_t'(pinc);
    tick();
    prog_in = '0;
  endtask

  // UNP word, then wait until it has passed every bin
  task automatic commit(input int new_gain [N], input int new_pinc [N], input int new_urb [N]);
    prog_in = '0;
    prog_in.unp = 1'b1;
    tick();
    prog_in = '0;
    repeat (N + 2) tick();
    ref_gain = new_gain;
    ref_pinc = new_pinc;
    ref_urb  = new_urb;
  endtask

  // Stream nsmp samples, capture the outputs; optional random freezes.
  task automatic run_stream(input bit freeze);
    int a, j, it;
    bit prev_oper;
    int last_i, last_q;
    a = 0; j = 0; it = 0;
    prev_oper = 1'b1;
    last_i = 0; last_q = 0;
    while (a < CAP) begin
      tick();
      if (prev_oper) begin
        cap_i[a] = int'(sum_out.i);  cap_q[a] = int'(sum_out.q);
        cap_iof[a] = int'(sum_out.iof); cap_qof[a] = int'(sum_out.qof);
        cap_odv[a] = int'(sum_out.odv);
        last_i = cap_i[a]; last_q = cap_q[a];
        a++;
      end else begin
        check(int'(sum_out.i) == last_i && int'(sum_out.q) == last_q,
              "outputs hold while oper is low");
      end
      oper = (freeze && it > 10 && ($urandom % 5 == 0)) ? 1'b0 : 1'b1;
      prev_oper = oper;
      if (oper) begin
        sample_in.psv   = (j < nsmp);
        sample_in.phase = (j < nsmp) ? phase_t'(smp[j]) : '0;
        j++;
      end
      it++;
    end
    oper = 1'b1;
    sample_in = '0;
    repeat (N + 8) tick();
  endtask

  // Compare captured outputs with the reference model; optionally with a
  // published table (tbl = 1: Table 19, tbl = 2: Table 17).
  task automatic compare(input string name, input int tbl);
    int k, r, jj, pi, pq, ti, tq, ni, nq, ofi, ofq, odv, nout;
    nout = nsmp + N - 1;
    for (k = -1; k <= nout; k++) begin
      pi = 0; pq = 0; ofi = 0; ofq = 0; odv = 0;
      for (r = 0; r < N; r++) begin
        jj = k - r;
        if (ref_urb[r] != 0 && jj >= 0 && jj < nsmp) begin
          ti = ref_term(ref_cos(smp[jj] + ref_pinc[r]), ref_gain[r]);
          tq = ref_term(ref_sin(smp[jj] + ref_pinc[r]), ref_gain[r]);
          odv = 1;
        end else begin
          ti = 0; tq = 0;
        end
        ni = wrap16(pi + ti); nq = wrap16(pq + tq);
        if (ni != pi + ti) ofi = 1;
        if (nq != pq + tq) ofq = 1;
        pi = ni; pq = nq;
      end
      check(cap_i[k + N + 4] == pi && cap_q[k + N + 4] == pq,
            $sformatf("%s output %0d: got %0d,%0d expected %0d,%0d", name, k,
                      cap_i[k + N + 4], cap_q[k + N + 4], pi, pq));
      check(cap_iof[k + N + 4] == ofi && cap_qof[k + N + 4] == ofq,
            $sformatf("%s overflow flags of output %0d", name, k));
      check(cap_odv[k + N + 4] == odv, $sformatf("%s ODV of output %0d", name, k));
      if (tbl == 1 && k >= 0 && k < 47)
        check(cap_i[k + N + 4] == int'($signed(T19_I[k])) &&
              cap_q[k + N + 4] == int'($signed(T19_Q[k])),
              $sformatf("%s matches Table 19 row %0d", name, k));
      if (tbl == 2 && k >= 0 && k < 32)
        check(cap_i[k + N + 4] == int'($signed(T17_IQ[2*k])) &&
              cap_q[k + N + 4] == int'($signed(T17_IQ[2*k+1])),
              $sformatf("%s matches Table 17 row %0d", name, k));
    end
  endtask

  int g [N], p [N], u [N];
  int overflows_seen;

  initial begin
    rst_n = 1'b0; oper = 1'b1; sample_in = '0; clk_prog_in = 1'b0; prog_in = '0; sum_in = '0;
    ref_gain = '{default: 0}; ref_pinc = '{default: 0}; ref_urb = '{default: 0};
    repeat (3) tick();
    rst_n = 1'b1;
    repeat (2) tick();

    // ---- nothing programmed: all bins idle, output stays zero
    nsmp = 8;
    for (int i = 0; i < nsmp; i++) smp[i] = i;
    run_stream(1'b0);
    compare("unprogrammed", 0);

    // ---- 1 RBP (Table 17): bin 0, gain 0, PInc 0
    g = '{default: 0}; p = '{default: 0}; u = '{default: 0}; u[0] = 1;
    program_bin(0, 1, 0, 0);
    commit(g, p, u);
    nsmp = 32;
    for (int i = 0; i < 16; i++) begin smp[2*i] = i; smp[2*i+1] = i + 16; end
    run_stream(1'b0);
    compare("1 RBP", 2);

    // ---- 4 RBPs (Table 18 coefficients)
    for (int r = 0; r < 4; r++) begin
      g[r] = 4 * r; p[r] = 8 * r; u[r] = 1;
      program_bin(r, 1, g[r], p[r]);
    end
    commit(g, p, u);
    run_stream(1'b0);
    compare("4 RBPs", 0);

    // ---- 16 RBPs (Table 19); new coefficients written during the burst
    for (int r = 0; r < N; r++) begin
      g[r] = r; p[r] = (r % 2 == 1) ? r + 16 : r; u[r] = 1;
      program_bin(r, 1, g[r], p[r]);
    end
    commit(g, p, u);
    nsmp = 32;
    for (int i = 0; i < 32; i++) smp[i] = i;
    fork
      run_stream(1'b0);
      begin
        repeat (6) tick();
        for (int r = 0; r < N; r++) program_bin(r, (r < 13) ? 1 : 0, r, p[r]);
      end
    join
    compare("16 RBPs", 1);

    // ---- 13 of 16 RBPs (Table 20): the preloaded URB = 0 of bins 13-15
    for (int r = 13; r < N; r++) u[r] = 0;
    commit(g, p, u);
    run_stream(1'b0);
    compare("13 RBPs", 0);

    // ---- same experiment with random Operate/Maintenance freezes
    run_stream(1'b1);
    compare("13 RBPs with freezes", 0);

    // ---- overflow: all 16 bins at the largest gain and the same phase
    for (int r = 0; r < N; r++) begin
      g[r] = 15; p[r] = 0; u[r] = 1;
      program_bin(r, 1, 15, 0);
    end
    commit(g, p, u);
    nsmp = 24;
    for (int i = 0; i < nsmp; i++) smp[i] = 0;
    run_stream(1'b0);
    compare("overflow", 0);
    overflows_seen = 0;
    for (int i = 0; i < CAP; i++) overflows_seen += cap_iof[i];
    check(overflows_seen > 0, "overflow flag raised at least once");

    // ---- programming words and samples leave the cascade
    check(prog_out == '0, "programming pipe drained");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
