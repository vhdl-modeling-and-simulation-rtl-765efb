// Testbench of the sine/cosine table: every 5-bit phase is applied and both
// outputs are compared with round(127*cos) and round(127*sin) computed with
// real arithmetic, and with the quarter-wave values 127, 125, 117, 106, 90,
// 71, 49, 25, 0 that the single-RBP results imply.
module tb_sincos_lut;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  localparam int QW [9] = '{127, 125, 117, 106, 90, 71, 49, 25, 0};

  phase_t phase;
  logic signed [7:0] cos_o, sin_o;
  int checks = 0, failures = 0;

  sincos_lut dut (.phase, .cos_o, .sin_o);

  initial begin : watchdog
    #100000;
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

  initial begin
    for (int p = 0; p < 32; p++) begin
      phase = phase_t'(p);
      #1;
      check(int'(cos_o) == ref_cos(p), $sformatf("cos of phase %0d = %0d", p, cos_o));
      check(int'(sin_o) == ref_sin(p), $sformatf("sin of phase %0d = %0d", p, sin_o));
      if (p <= 8) begin
        check(int'(cos_o) == QW[p], $sformatf("quarter wave cos %0d", p));
        check(int'(sin_o) == QW[8 - p], $sformatf("quarter wave sin %0d", p));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
