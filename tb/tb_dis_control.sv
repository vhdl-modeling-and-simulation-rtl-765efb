// Testbench of the overhead control circuitry.
//  * Path select: 00 and 01 pass the off-chip inputs straight through.
//  * Path 10: after Start_SelfTest the self-test vectors appear (PSV three
//    clocks after the start). With the Operate/Maintenance multiplexer set
//    to the latch, Operate/Maintenance falls test_count clocks after the
//    start, once exactly test_count - 3 vectors have been offered at clocks
//    with Operate/Maintenance high (64 gives 61, the document's example), stays low
//    while the test is held, and rises when Start_SelfTest is released. Run
//    for several vector counts.
//  * With the multiplexer set to the off-chip input, Operate/Maintenance
//    follows that input whatever the latch holds.
//  * Path 11: the phase extractor output reaches mux_out three clocks after
//    its I/Q pair.
module tb_dis_control;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  logic    clk = 1'b0, rst_n;
  sample_t ext0_in, ext1_in;
  logic signed [7:0] drfm_i, drfm_q;
  logic    iq_valid_in;
  logic [1:0] path_sel;
  logic    start_selftest;
  logic [11:0] test_count;
  logic    oper_mux_io, oper_mux_sel;
  sample_t mux_out;
  logic    oper, selftest_done;

  int checks = 0, failures = 0;

  dis_control dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    #2000000;
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

  // one self test with the given vector count
  task automatic self_test(input int cnt);
    int offered, clocks, lo;
    path_sel = 2'b10; oper_mux_sel = 1'b1; test_count = 12'(cnt);
    tick();
    check(oper && !selftest_done, "operating before the start");
    start_selftest = 1'b1;
    offered = 0; clocks = 0;
    while (oper && clocks < cnt + 20) begin
      @(posedge clk);
      if (mux_out.psv) offered++;
      clocks++;
      tick();
    end
    check(offered == cnt - 3, $sformatf("count %0d: %0d vectors offered before the freeze", cnt, offered));
    check(clocks == cnt, $sformatf("count %0d: froze after %0d clocks", cnt, clocks));
    check(selftest_done, "done flag set");
    lo = 0;
    repeat (50) begin
      tick();
      lo += int'(!oper);
    end
    check(lo == 50, "Operate/Maintenance stays low while the test is held");
    start_selftest = 1'b0;
    #1;
    check(oper && !selftest_done, "operating again after Start_SelfTest is released");
    tick();
  endtask

  initial begin
    int ih [4], qh [4], vh [4];
    rst_n = 1'b0; ext0_in = '0; ext1_in = '0; drfm_i = '0; drfm_q = '0; iq_valid_in = 1'b0;
    path_sel = 2'b00; start_selftest = 1'b0; test_count = '0; oper_mux_io = 1'b1; oper_mux_sel = 1'b0;
    repeat (2) tick();
    rst_n = 1'b1;
    tick();

    // paths 1 and 2
    for (int n = 0; n < 100; n++) begin
      ext0_in = 6'($urandom); ext1_in = 6'($urandom); path_sel = 2'(n % 2);
      #1;
      check(mux_out == ((n % 2 == 0) ? ext0_in : ext1_in), "off-chip path passed through");
      tick();
    end

    // path 3 with several counts
    self_test(4);
    self_test(10);
    self_test(64);
    self_test(303);

    // off-chip Operate/Maintenance
    oper_mux_sel = 1'b0;
    start_selftest = 1'b1; test_count = 12'd5;
    for (int n = 0; n < 40; n++) begin
      oper_mux_io = 1'($urandom);
      #1;
      check(oper == oper_mux_io, "Operate/Maintenance follows the off-chip input");
      tick();
    end
    start_selftest = 1'b0;
    oper_mux_io = 1'b1;

    // path 4
    path_sel = 2'b11;
    for (int n = 0; n < 300; n++) begin
      if (n >= 3)
        check(mux_out.psv == 1'(vh[(n - 3) % 4]) &&
              int'(mux_out.phase) == ref_phase(ih[(n - 3) % 4], qh[(n - 3) % 4]),
              "phase extractor output on path 4");
      drfm_i = 8'($urandom); drfm_q = 8'($urandom); iq_valid_in = 1'($urandom);
      ih[n % 4] = int'(drfm_i); qh[n % 4] = int'(drfm_q); vh[n % 4] = int'(iq_valid_in);
      tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
