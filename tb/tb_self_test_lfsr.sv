// Testbench of the self-test generator. Checks: PSV rises three clocks after
// Start_SelfTest; the first 50 DRFM vectors equal the document's listing
// (10, 08, 04, 02, 01, 00, 10, ...); the newest-bit stream obeys
// b[n] = b[n-6] ^ b[n-8] ^ b[n-11] ^ b[n-12]; the sequence repeats after 4095
// vectors and not before; over one period every 5-bit value appears 128
// times except 00 (127 times); dropping Start clears PSV and a new start
// replays the same sequence.
module tb_self_test_lfsr;
  import dis_pkg::*;

  localparam logic [4:0] FIRST [50] = '{
    5'h10, 5'h08, 5'h04, 5'h02, 5'h01, 5'h00, 5'h10, 5'h08, 5'h14, 5'h0A,
    5'h05, 5'h12, 5'h09, 5'h04, 5'h02, 5'h01, 5'h10, 5'h08, 5'h14, 5'h0A,
    5'h15, 5'h0A, 5'h05, 5'h12, 5'h09, 5'h04, 5'h02, 5'h11, 5'h08, 5'h04,
    5'h12, 5'h09, 5'h14, 5'h1A, 5'h1D, 5'h0E, 5'h17, 5'h0B, 5'h15, 5'h0A,
    5'h05, 5'h02, 5'h11, 5'h18, 5'h0C, 5'h06, 5'h03, 5'h11, 5'h08, 5'h04
  };
  localparam int PERIOD = 4095;

  logic    clk = 1'b0, rst_n, start;
  sample_t sample_out;
  int checks = 0, failures = 0;
  logic [4:0] seq [PERIOD + 100];
  int hist [32];

  self_test_lfsr #(.W(12)) dut (.clk, .rst_n, .start, .sample_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
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

  task automatic start_and_wait();
    int d;
    start = 1'b1;
    d = 0;
    do begin
      @(negedge clk);
      d++;
    end while (!sample_out.psv && d < 10);
    check(d == 3, $sformatf("PSV rose %0d clocks after start (expected 3)", d));
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    #12 rst_n = 1'b1;
    repeat (3) @(negedge clk);
    check(!sample_out.psv, "PSV low before start");

    start_and_wait();
    for (int n = 0; n < PERIOD + 100; n++) begin
      check(sample_out.psv, "PSV stays high");
      seq[n] = sample_out.phase;
      @(negedge clk);
    end
    for (int n = 0; n < 50; n++)
      check(seq[n] == FIRST[n], $sformatf("vector %0d = %h, listing %h", n, seq[n], FIRST[n]));
    for (int n = 12; n < PERIOD + 100; n++)
      check(seq[n][4] == (seq[n-6][4] ^ seq[n-8][4] ^ seq[n-11][4] ^ seq[n-12][4]),
            $sformatf("recurrence at %0d", n));
    for (int n = 0; n < 100; n++)
      check(seq[n + PERIOD] == seq[n], $sformatf("period 4095 at %0d", n));
    hist = '{default: 0};
    for (int n = 0; n < PERIOD; n++) hist[seq[n]]++;
    for (int v = 0; v < 32; v++)
      check(hist[v] == ((v == 0) ? 127 : 128), $sformatf("value %h appears %0d times", v, hist[v]));

    // stop, then restart: same sequence
    start = 1'b0;
    @(negedge clk);
    check(!sample_out.psv, "PSV low after stop");
    @(negedge clk);
    start_and_wait();
    for (int n = 0; n < 50; n++) begin
      check(sample_out.phase == FIRST[n], $sformatf("restart vector %0d", n));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
