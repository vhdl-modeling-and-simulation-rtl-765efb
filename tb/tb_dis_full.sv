// Full-size end-to-end test of the DIS top level with its default size
// (512 range bin processors).
//
// The document's four-RBP experiment is run through the complete chip: range
// bins 0-3 are programmed with gains 04, 07, 08, 0B and phase increments 04,
// 17, 08, 1B through the serial programming chain (all 508 other bins stay
// unused), and the same 50 phase samples are applied
//   (a) on path 1 and on path 2, from the two off-chip inputs, and on path
//       4 as I/Q pairs of amplitude 100 at those phases through the phase
//       extractor (three clocks more latency), and
//   (b) on path 3, from the on-chip self-test generator with the off-chip
//       count set to 53 (three more than the 50 vectors wanted) and
//       Operate/Maintenance taken from the self-test latch.
// In every run the 50 I/Q outputs must equal the published results (the
// document's tables for paths 1 to 4 list the same outputs), output k
// leaving the last bin 512 + 4 clocks after sample k enters the first (plus
// three on path 4), and the ODV flag must mark
// exactly the outputs that carry a sample. In (b) exactly 50 samples must be
// accepted before the cascade freezes, and the frozen output must hold.
module tb_dis_full;
  import dis_pkg::*;

  localparam int N = 512;
  localparam int NS = 50;
  localparam logic [4:0] SEQ [NS] = '{
    5'h10, 5'h08, 5'h04, 5'h02, 5'h01, 5'h00, 5'h10, 5'h08, 5'h14, 5'h0A,
    5'h05, 5'h12, 5'h09, 5'h04, 5'h02, 5'h01, 5'h10, 5'h08, 5'h14, 5'h0A,
    5'h15, 5'h0A, 5'h05, 5'h12, 5'h09, 5'h04, 5'h02, 5'h11, 5'h08, 5'h04,
    5'h12, 5'h09, 5'h14, 5'h1A, 5'h1D, 5'h0E, 5'h17, 5'h0B, 5'h15, 5'h0A,
    5'h05, 5'h02, 5'h11, 5'h18, 5'h0C, 5'h06, 5'h03, 5'h11, 5'h08, 5'h04
  };
  localparam logic [15:0] EXP_I [NS] = '{
    16'hFFE9, 16'h001B, 16'h00FA, 16'hFF3E, 16'h01BE, 16'h01F1, 16'h0152, 16'h0183, 16'h0216, 16'hFDF8,
    16'h02C8, 16'hFE78, 16'h009A, 16'h0312, 16'hFEB3, 16'h017E, 16'h01C4, 16'h01B6, 16'h0262, 16'hFDF8,
    16'h02D5, 16'hFCFF, 16'h0244, 16'hFE70, 16'h009A, 16'h0312, 16'hFEB3, 16'h015B, 16'h01C4, 16'h02AE,
    16'hFED9, 16'h012E, 16'h030A, 16'hFDA8, 16'h00BA, 16'hFD74, 16'hFFA6, 16'hFEDD, 16'h00CA, 16'hFD25,
    16'h01EC, 16'hFE89, 16'h0107, 16'h01F9, 16'h009A, 16'hFF9E, 16'hFF05, 16'h0079, 16'h01B9, 16'h02DA
  };
  localparam logic [15:0] EXP_Q [NS] = '{
    16'hFFE9, 16'h0110, 16'hFFAD, 16'h00F1, 16'h0069, 16'hFEEE, 16'hFE11, 16'hFFE7, 16'hFDC6, 16'h0288,
    16'h0140, 16'hFF79, 16'h02D6, 16'hFFE4, 16'h0058, 16'h00B5, 16'hFEC1, 16'h0032, 16'hFE06, 16'h0288,
    16'h0101, 16'h010B, 16'h01D5, 16'hFF15, 16'h02D6, 16'hFFE4, 16'h0058, 16'h0080, 16'h00EA, 16'hFE92,
    16'h0076, 16'h0254, 16'hFF41, 16'h01D6, 16'h010F, 16'hFFBB, 16'hFF46, 16'hFE31, 16'h0229, 16'hFFD8,
    16'h0201, 16'hFF50, 16'h00B6, 16'h0121, 16'hFED7, 16'h0213, 16'hFE48, 16'h0107, 16'h01AD, 16'hFEEA
  };
  localparam int GAIN [4] = '{4, 7, 8, 11};
  localparam int PINC [4] = '{4, 23, 8, 27};

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

  dis_top dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
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

  // Watch the cascade output for NS + 8 clocks starting 'first' clocks after
  // the call and compare it with the published values; 'first' is the clock
  // at which output 0 is due.
  task automatic watch(input int first, input string name);
    repeat (first - 1) begin
      tick();
      check(!chain_out.odv, $sformatf("%s: no ODV before the first output", name));
    end
    for (int k = 0; k < NS; k++) begin
      tick();
      check(chain_out.odv, $sformatf("%s: ODV of output %0d", name, k));
      check(chain_out.i == EXP_I[k] && chain_out.q == EXP_Q[k] && !chain_out.iof && !chain_out.qof,
            $sformatf("%s: output %0d = %h %h, expected %h %h", name, k,
                      chain_out.i, chain_out.q, EXP_I[k], EXP_Q[k]));
    end
  endtask

  // Drive the 50 samples on path 1 (0), path 2 (1) or, as I/Q pairs on the
  // unit circle at the wanted phase, on path 4 (3); check mux_out, the 50
  // outputs, their latency and the end of the ODV burst.
  task automatic run_path(input int path);
    int lag;
    string name;
    name = $sformatf("path %0d", path + 1);
    lag = (path == 3) ? 3 : 0;     // phase extractor pipeline
    path_sel = 2'(path);
    fork
      for (int k = 0; k < NS + 4 + lag; k++) begin
        sample_t s;
        s.psv = (k < NS);
        s.phase = (k < NS) ? SEQ[k] : '0;
        ext0_in = '0; ext1_in = '0; iq_valid_in = 1'b0; drfm_i = '0; drfm_q = '0;
        case (path)
          0: ext0_in = s;
          1: ext1_in = s;
          default: begin
            iq_valid_in = s.psv;
            drfm_i = 8'(int'($floor(100.0 * $cos(2.0 * 3.14159265358979 * real'(s.phase) / 32.0) + 0.5)));
            drfm_q = 8'(int'($floor(100.0 * $sin(2.0 * 3.14159265358979 * real'(s.phase) / 32.0) + 0.5)));
          end
        endcase
        #1;
        if (k >= lag && k - lag < NS)
          check(mux_out.psv && mux_out.phase == SEQ[k - lag],
                $sformatf("%s: sample %0d at the multiplexer output", name, k - lag));
        tick();
      end
      watch(N + 4 + lag, name);
    join
    ext0_in = '0; ext1_in = '0; iq_valid_in = 1'b0;
    repeat (3) begin
      tick();
      check(chain_out.odv, $sformatf("%s: ODV while bins 1-3 hold the last samples", name));
    end
    tick();
    check(!chain_out.odv, $sformatf("%s: burst ends after 53 outputs", name));
    repeat (N) tick();
  endtask

  initial begin
    int accepted;
    rst_n = 1'b0; prog_in = '0; clk_prog_in = 1'b0; chain_in = '0; ext0_in = '0; ext1_in = '0;
    drfm_i = '0; drfm_q = '0; iq_valid_in = 1'b0; path_sel = 2'b00; start_selftest = 1'b0;
    test_count = 12'd53; oper_mux_io = 1'b1; oper_mux_sel = 1'b0;
    repeat (3) tick();
    rst_n = 1'b1;
    tick();

    // program bins 0-3, then commit
    for (int r = 0; r < 4; r++) begin
      prog_in = '0;
      prog_in.prb = 1'b1; prog_in.sel = 9'(r); prog_in.urb = 1'b1;
      prog_in.gain = 4'(GAIN[r]); prog_in.pinc = 5'(PINC[r]);
      tick();
    end
    prog_in = '0;
    prog_in.unp = 1'b1;
    tick();
    prog_in = '0;
    repeat (N + 4) tick();
    check(prog_out == '0, "programming words have left the chain");

    // (a) paths 1, 2 and 4
    for (int path = 0; path < 4; path++) begin
      if (path == 2) continue;
      run_path(path);
    end

    // (b) path 3, self test with 50 vectors, latch drives Operate/Maintenance
    path_sel = 2'b10;
    oper_mux_sel = 1'b1;
    tick();
    check(oper, "operating before the self test");
    start_selftest = 1'b1;
    accepted = 0;
    fork
      forever begin
        // samples accepted by the cascade: PSV high at an active clock
        @(posedge clk);
        if (oper && mux_out.psv) begin
          check(mux_out.phase == SEQ[accepted % NS], $sformatf("self-test vector %0d", accepted));
          accepted++;
        end
      end
    join_none
    repeat (100) tick();
    check(accepted == NS, $sformatf("self test accepted %0d samples (expected 50)", accepted));
    check(!oper && selftest_done, "frozen and done after the self test");
    begin
      sum_t frozen;
      frozen = chain_out;
      repeat (20) begin
        tick();
        check(chain_out == frozen, "output holds while frozen");
      end
    end
    // release the freeze from the off-chip Operate/Maintenance input with
    // the idle path 1 selected: the 50 self-test samples still in the
    // cascade come out
    path_sel = 2'b00;
    oper_mux_sel = 1'b0;
    oper_mux_io = 1'b1;
    begin
      int waited;
      waited = 0;
      while (!chain_out.odv && waited < N + 20) begin
        tick();
        waited++;
      end
      // 50 samples went in before the freeze, so the first output is due
      // N + 4 - 50 active clocks after the release
      check(waited == N + 4 - NS, $sformatf("first self-test output after %0d clocks", waited));
      for (int k = 0; k < NS; k++) begin
        check(chain_out.odv, $sformatf("path 3: ODV of output %0d", k));
        check(chain_out.i == EXP_I[k] && chain_out.q == EXP_Q[k],
              $sformatf("path 3: output %0d = %h %h, expected %h %h", k,
                        chain_out.i, chain_out.q, EXP_I[k], EXP_Q[k]));
        tick();
      end
      // bins 1-3 still add the last samples for three more outputs
      repeat (3) begin
        check(chain_out.odv, "path 3: ODV while bins 1-3 hold the last samples");
        tick();
      end
      check(!chain_out.odv, "path 3: burst ends after 53 outputs");
    end
    start_selftest = 1'b0;
    tick();
    check(!selftest_done, "done flag drops with Start_SelfTest");
    disable fork;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
