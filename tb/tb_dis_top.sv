// End-to-end testbench of the DIS top level, with the cascade reduced to 16
// range bins so that every mechanism can be exercised many times.
//
// A monitor looks at every rising clock edge: when Operate/Maintenance is
// high the cascade accepts the sample on mux_out, and the output after that
// edge is recorded; when it is low the output must not change. After each
// experiment the recorded outputs are compared with a reference computed
// from the accepted samples and the coefficients in force (output after
// active edge m = sum over bins r of the term of the sample accepted at
// active edge m - (N + 3) - r), including the overflow flags and ODV.
//
// Experiments and the mechanisms they count:
//   path 1 (00) and path 2 (01) with random off-chip samples; path 3 (10)
//   the self test, which must freeze the cascade after test_count - 3
//   vectors;
//   path 4 (11) the phase extractor, whose output is checked against a
//   reference three clocks after each I/Q pair; coefficients written while
//   a burst runs (double buffering, committed later by UNP); bins with
//   URB = 0 skipping valid samples; random freezes from the off-chip
//   Operate/Maintenance input; an overflow burst with all gains at 15; ODV.
// The test fails if any mechanism never occurred.
module tb_dis_top;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  localparam int N = 16;
  localparam int MAXE = 1200;
  localparam int ST_COUNT = 40;

  logic    clk = 1'b0, rst_n;
  prog_t   prog_in;
  logic    clk_prog_in;
  sum_t    chain_in;
  sample_t ext0_in, ext1_in;
  logic signed [7:0] drfm_i, drfm_q;
  logic    iq_valid_in;
  logic [1:0] path_sel;
  logic    start_selftest;
  logic [11:0] test_count;
  logic    oper_mux_io, oper_mux_sel;
  sum_t    chain_out;
  prog_t   prog_out;
  sample_t sample_out;
  logic    clk_prog_out;
  sample_t mux_out;
  logic    oper, selftest_done;

  int checks = 0, failures = 0;

  dis_top #(.N_RBP(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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

  // mechanism counters
  int n_path [4];
  int n_st_freeze, n_io_freeze, n_overflow, n_urb_skip, n_unp, n_odv, n_pe;

  // committed coefficients (reference) and the preload contents
  int c_gain [N], c_pinc [N], c_urb [N];
  int p_gain [N], p_pinc [N], p_urb [N];
  bit preload_differs;

  // ---------------- monitor ----------------
  bit      mon = 1'b0;
  bit      have_prev, prev_active;
  sum_t    last_seen;
  int      m;
  sample_t acc [MAXE];
  sum_t    outs [MAXE];

  always @(posedge clk) begin
    if (mon) begin
      if (have_prev) begin
        if (prev_active) outs[m-1] = chain_out;
        else begin
          check(chain_out == last_seen, "output holds while Operate/Maintenance is low");
          if (oper_mux_sel) n_st_freeze++;
          else              n_io_freeze++;
        end
      end
      last_seen = chain_out;
      have_prev = 1'b1;
      if (oper) begin
        acc[m] = mux_out;
        if (mux_out.psv) n_path[path_sel]++;
        m++;
        prev_active = 1'b1;
      end else begin
        prev_active = 1'b0;
      end
    end
  end

  task automatic mon_start();
    m = 0; have_prev = 1'b0; prev_active = 1'b0;
    mon = 1'b1;
  endtask

  // Compare all complete outputs of the experiment with the reference.
  task automatic mon_check(input string name);
    int k, j, pi, pq, ti, tq, ni, nq, ofi, ofq, odv, skip;
    mon = 1'b0;
    for (int e = 0; e < m - 1; e++) begin
      k = e - (N + 3);
      pi = 0; pq = 0; ofi = 0; ofq = 0; odv = 0; skip = 0;
      for (int r = 0; r < N; r++) begin
        j = k - r;
        ti = 0; tq = 0;
        if (j >= 0 && acc[j].psv) begin
          if (c_urb[r] != 0) begin
            ti = ref_term(ref_cos(int'(acc[j].phase) + c_pinc[r]), c_gain[r]);
            tq = ref_term(ref_sin(int'(acc[j].phase) + c_pinc[r]), c_gain[r]);
            odv = 1;
          end else skip = 1;
        end
        ni = wrap16(pi + ti); nq = wrap16(pq + tq);
        if (ni != pi + ti) ofi = 1;
        if (nq != pq + tq) ofq = 1;
        pi = ni; pq = nq;
      end
      check(int'(outs[e].i) == pi && int'(outs[e].q) == pq,
            $sformatf("%s: output after active edge %0d = %0d,%0d expected %0d,%0d",
                      name, e, outs[e].i, outs[e].q, pi, pq));
      check(int'(outs[e].iof) == ofi && int'(outs[e].qof) == ofq,
            $sformatf("%s: overflow flags after edge %0d", name, e));
      check(int'(outs[e].odv) == odv, $sformatf("%s: ODV after edge %0d", name, e));
      if (ofi || ofq) n_overflow++;
      if (odv) n_odv++;
      if (skip && odv) n_urb_skip++;
      if (preload_differs && odv) n_unp++;
    end
  endtask

  // ---------------- stimulus helpers ----------------
  task automatic write_bin(input int r, input int urb, input int gain, input int pinc);
    prog_in = '0;
    prog_in.prb = 1'b1; prog_in.sel = 9'(r); prog_in.urb = urb[0];
    prog_in.gain = 4'(gain); prog_in.pinc = 5'(pinc);
    tick();
    prog_in = '0;
    p_gain[r] = gain; p_pinc[r] = pinc; p_urb[r] = urb;
    preload_differs = (p_gain != c_gain) || (p_pinc != c_pinc) || (p_urb != c_urb);
  endtask

  task automatic commit();
    prog_in = '0;
    prog_in.unp = 1'b1;
    tick();
    prog_in = '0;
    repeat (N + 2) tick();
    c_gain = p_gain; c_pinc = p_pinc; c_urb = p_urb;
    preload_differs = 1'b0;
  endtask

  // idle path 1, operating, until the cascade holds no sample
  task automatic flush();
    path_sel = 2'b00; ext0_in = '0; ext1_in = '0; iq_valid_in = 1'b0;
    oper_mux_sel = 1'b0; oper_mux_io = 1'b1;
    repeat (N + 8) tick();
  endtask

  // random samples on path 1 or 2 for len clocks, optional random freezes
  task automatic burst(input int path, input int len, input bit freezes, input bit reprogram);
    path_sel = 2'(path);
    for (int n = 0; n < len; n++) begin
      sample_t s;
      s.psv = ($urandom % 5) != 0;
      s.phase = 5'($urandom);
      if (path == 0) begin ext0_in = s; ext1_in = 6'($urandom); end
      else           begin ext1_in = s; ext0_in = 6'($urandom); end
      oper_mux_io = freezes ? (($urandom % 4) != 0) : 1'b1;
      if (reprogram && n >= 10 && n < 10 + N)
        write_bin(n - 10, (n - 10 < 13) ? 1 : 0, 15 - (n - 10), (3 * (n - 10)) % 32);
      else
        tick();
    end
    ext0_in = '0; ext1_in = '0; oper_mux_io = 1'b1;
    repeat (N + 8) tick();
  endtask

  initial begin
    int i_hist [4], q_hist [4], v_hist [4];
    int accepted;
    rst_n = 1'b0; prog_in = '0; clk_prog_in = 1'b0; chain_in = '0; ext0_in = '0; ext1_in = '0;
    drfm_i = '0; drfm_q = '0; iq_valid_in = 1'b0; path_sel = 2'b00; start_selftest = 1'b0;
    test_count = 12'(ST_COUNT + 3); oper_mux_io = 1'b1; oper_mux_sel = 1'b0;
    n_path = '{default: 0};
    {n_st_freeze, n_io_freeze, n_overflow, n_urb_skip, n_unp, n_odv, n_pe} = '0;
    c_gain = '{default: 0}; c_pinc = '{default: 0}; c_urb = '{default: 0};
    p_gain = c_gain; p_pinc = c_pinc; p_urb = c_urb;
    preload_differs = 1'b0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // coefficient set A: the document's 16-bin experiment
    for (int r = 0; r < N; r++) write_bin(r, 1, r, (r % 2 == 1) ? r + 16 : r);
    commit();

    // 1: path 1, set B written into the preload registers meanwhile
    flush(); mon_start();
    burst(0, 150, 1'b0, 1'b1);
    mon_check("path 1 with preload writes");
    check(preload_differs, "set B is waiting in the preload registers");

    // 2: commit set B (bins 13-15 unused), path 2
    commit();
    flush(); mon_start();
    burst(1, 150, 1'b0, 1'b0);
    mon_check("path 2, bins 13-15 unused");

    // 3: off-chip Operate/Maintenance freezes during path 1
    flush(); mon_start();
    burst(0, 150, 1'b1, 1'b0);
    mon_check("path 1 with freezes");

    // 4: self test, latch freezes the cascade after ST_COUNT vectors
    flush(); mon_start();
    path_sel = 2'b10; oper_mux_sel = 1'b1;
    tick();
    start_selftest = 1'b1;
    repeat (ST_COUNT + 30) tick();
    check(!oper && selftest_done, "self test finished and froze the cascade");
    accepted = 0;
    for (int e = 0; e < m; e++) accepted += int'(acc[e].psv);
    check(accepted == ST_COUNT, $sformatf("self test delivered %0d samples", accepted));
    path_sel = 2'b00; oper_mux_sel = 1'b0;
    repeat (N + 8) tick();
    start_selftest = 1'b0;
    tick();
    check(!selftest_done, "done flag cleared with Start_SelfTest");
    mon_check("self test");

    // 5: phase extractor path
    flush(); mon_start();
    path_sel = 2'b11;
    i_hist = '{default: 0}; q_hist = '{default: 0}; v_hist = '{default: 0};
    for (int n = 0; n < 200; n++) begin
      if (n >= 3) begin
        check(mux_out.psv == 1'(v_hist[(n - 3) % 4]) &&
              int'(mux_out.phase) == ref_phase(i_hist[(n - 3) % 4], q_hist[(n - 3) % 4]),
              $sformatf("phase extractor output for I=%0d Q=%0d", i_hist[(n - 3) % 4],
                        q_hist[(n - 3) % 4]));
        n_pe++;
      end
      drfm_i = 8'($urandom); drfm_q = 8'($urandom); iq_valid_in = ($urandom % 5) != 0;
      i_hist[n % 4] = int'(drfm_i); q_hist[n % 4] = int'(drfm_q); v_hist[n % 4] = int'(iq_valid_in);
      tick();
    end
    iq_valid_in = 1'b0;
    repeat (N + 8) tick();
    mon_check("phase extractor path");

    // 6: overflow, every bin at gain 15 and the same phase
    for (int r = 0; r < N; r++) write_bin(r, 1, 15, 0);
    commit();
    flush(); mon_start();
    path_sel = 2'b00;
    ext0_in.psv = 1'b1;
    for (int n = 0; n < 40; n++) begin
      ext0_in.phase = 5'(n % 3);
      tick();
    end
    ext0_in = '0;
    repeat (N + 8) tick();
    mon_check("overflow");

    check(prog_out == '0, "programming chain empty");

    $display("mechanisms: path1=%0d path2=%0d path3=%0d path4=%0d selftest_freeze=%0d io_freeze=%0d overflow=%0d urb=%0d unp=%0d odv=%0d phase_extraction=%0d",
             n_path[0], n_path[1], n_path[2], n_path[3], n_st_freeze, n_io_freeze, n_overflow,
             n_urb_skip, n_unp, n_odv, n_pe);
    check(n_path[0] > 0, "path 1 used");
    check(n_path[1] > 0, "path 2 used");
    check(n_path[2] > 0, "path 3 (self test) used");
    check(n_path[3] > 0, "path 4 (phase extractor) used");
    check(n_st_freeze > 0, "self-test freeze happened");
    check(n_io_freeze > 0, "off-chip Operate/Maintenance freeze happened");
    check(n_overflow > 0, "overflow happened");
    check(n_urb_skip > 0, "a bin with URB = 0 skipped a sample");
    check(n_unp > 0, "outputs checked while new coefficients waited for UNP");
    check(n_odv > 0, "ODV raised");
    check(n_pe > 0, "phase extraction checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
