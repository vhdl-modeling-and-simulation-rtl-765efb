// Testbench of the ~S/~R latch: walks the function table (set, hold, reset,
// hold, both low) in several orders and checks Q and ~Q after each step.
module tb_sr_latch_n;
  logic s_n, r_n, q, qn;
  int checks = 0, failures = 0;

  sr_latch_n dut (.s_n, .r_n, .q, .qn);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic sn, input logic rn, input logic eq, input logic eqn);
    s_n = sn; r_n = rn;
    #1;
    checks++;
    if (q != eq || qn != eqn) begin
      failures++;
      $display("FAIL: ~S=%b ~R=%b gave Q=%b ~Q=%b", sn, rn, q, qn);
    end
  endtask

  initial begin
    step(1, 0, 0, 1);  // reset
    step(1, 1, 0, 1);  // hold 0
    step(0, 1, 1, 0);  // set
    step(1, 1, 1, 0);  // hold 1
    step(1, 0, 0, 1);  // reset
    step(1, 1, 0, 1);
    step(0, 0, 1, 1);  // both low: both outputs high
    step(0, 1, 1, 0);
    step(1, 1, 1, 0);
    for (int n = 0; n < 200; n++) begin
      logic sn, rn, hq;
      hq = q;
      sn = 1'($urandom); rn = 1'($urandom);
      if (!sn && !rn)      step(sn, rn, 1, 1);
      else if (!sn)        step(sn, rn, 1, 0);
      else if (!rn)        step(sn, rn, 0, 1);
      else if (s_n & ~r_n) step(sn, rn, 0, 1);
      else if (~s_n & r_n) step(sn, rn, 1, 0);
      else if (s_n & r_n)  step(sn, rn, hq, ~hq);
      else                 begin s_n = sn; r_n = rn; #1; end // leaving 00: race, not checked
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
