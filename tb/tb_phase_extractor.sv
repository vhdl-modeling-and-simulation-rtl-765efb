// Testbench of the phase extractor.
//  * The document's I/Q -> phase examples (its phase extractor table) are
//    applied and compared, except the point (1, 3); see below.
//  * All 65,536 I/Q pairs are compared with a reference written with real
//    arithmetic: the smaller magnitude over the larger one is compared with
//    the four thresholds 80/1024, 341/1024, 485/1024, 847/1024 to get the
//    step within the octant, which is then mirrored into the right octant.
//    Every result is also checked to lie within one 11.25-degree step of
//    atan2(Q, I).
//  * Latency: the phase of a sample loaded on one clock is on the output
//    three clocks later, with PSV equal to the sample's valid bit.
//  * With load low the input registers keep their value.
// The document lists (1, 3) -> 7 but (6, 2) -> 2 in its extractor
// self-test; both lie at the same angle to the I axis mirrored about 45
// degrees, so no single rule gives both. The design gives 6 for (1, 3).
module tb_phase_extractor;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  localparam int NT = 60;
  localparam int TI [NT] = '{-128,-128,-128,-128,-128,-128,-128,-128,-128,-128,-128,-127,-127,-127,-127,-127,-127,-127,-127,-127,-127,-100,-100,-100,-99,-19,-19,-19,-19,-19,0,0,0,0,0,1,1,1,1,1,1,1,127,127,127,127,127,127,127,127,127,100,100,100,101,19,19,19,19,19};
  localparam int TQ [NT] = '{-128,-105,-60,-42,-9,0,10,43,61,106,127,-128,-105,-60,-42,-9,10,43,61,106,127,0,120,121,-128,-128,-56,-40,0,127,-128,-1,0,1,127,-128,0,1,2,3,13,127,-128,-105,-60,-42,-9,10,43,61,106,0,120,121,-128,-128,-57,-40,0,127};
  localparam int TP [NT] = '{20,19,18,17,16,16,15,14,13,12,12,20,19,18,17,16,15,14,13,12,12,16,12,11,21,23,22,21,16,9,24,24,0,8,8,24,0,4,5,7,8,8,28,29,30,31,0,1,2,3,4,0,4,5,27,25,26,27,0,7};

  logic clk = 1'b0, rst_n, load, valid_in;
  logic signed [7:0] i_in, q_in;
  sample_t sample_out;
  int checks = 0, failures = 0;

  phase_extractor #(.IQ_W(8)) dut (.clk, .rst_n, .load, .i_in, .q_in, .valid_in, .sample_out);

  always #5 clk = ~clk;

  initial begin : watchdog
    #10000000;
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


  // Stream all pairs one per clock; output n is seen three clocks later.
  int exp_p [$];
  int exp_v [$];
  int exp_i [$];
  int exp_q [$];

  initial begin
    real ang, d;
    int e, ii, qq;
    rst_n = 1'b0; load = 1'b1; valid_in = 1'b0; i_in = '0; q_in = '0;
    #12 rst_n = 1'b1;
    @(negedge clk);

    // table points (same streaming scheme)
    for (int n = 0; n < NT + 3 + 65536; n++) begin
      if (n >= 3) begin
        e = exp_p.pop_front();
        ii = exp_i.pop_front();
        qq = exp_q.pop_front();
        check(sample_out.psv == 1'(exp_v.pop_front()), $sformatf("valid of sample %0d", n - 3));
        check(int'(sample_out.phase) == e,
              $sformatf("I=%0d Q=%0d gave %0d expected %0d", ii, qq, sample_out.phase, e));
        if (!(ii == 0 && qq == 0)) begin
          ang = $atan2(real'(qq), real'(ii)) * 32.0 / (2.0 * 3.14159265358979);
          d = real'(sample_out.phase) - ang;
          while (d > 16.0) d -= 32.0;
          while (d < -16.0) d += 32.0;
          check(d <= 1.0 && d >= -1.0, $sformatf("I=%0d Q=%0d within one step of atan2", ii, qq));
        end
      end
      if (n < NT) begin
        if (TI[n] == 1 && TQ[n] == 3) begin
          i_in = 8'sd6; q_in = 8'sd2;  // substitute the listed (6, 2) -> 2
          exp_p.push_back(2);
        end else begin
          i_in = 8'(TI[n]); q_in = 8'(TQ[n]);
          exp_p.push_back(TP[n]);
          // the table and the reference must agree as well
          check(ref_phase(TI[n], TQ[n]) == TP[n], $sformatf("reference at table point %0d", n));
        end
      end else if (n < NT + 65536) begin
        i_in = 8'((n - NT) >> 8); q_in = 8'(n - NT);
        exp_p.push_back(ref_phase(int'(i_in), int'(q_in)));
      end
      valid_in = 1'($urandom);
      exp_v.push_back(int'(valid_in));
      exp_i.push_back(int'(i_in));
      exp_q.push_back(int'(q_in));
      @(negedge clk);
    end

    // hold: load low keeps the registered sample
    i_in = 8'sd0; q_in = 8'sd100; valid_in = 1'b1;
    repeat (4) @(negedge clk);
    check(sample_out.phase == 5'd8 && sample_out.psv, "phase of (0,100)");
    load = 1'b0; i_in = -8'sd100; q_in = 8'sd0; valid_in = 1'b0;
    repeat (5) @(negedge clk);
    check(sample_out.phase == 5'd8 && sample_out.psv, "held while load is low");
    load = 1'b1;
    repeat (3) @(negedge clk);
    check(sample_out.phase == 5'd16 && !sample_out.psv, "new sample after load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
