// Testbench of the 1-bit 4-to-1 multiplexer: the whole truth table (four
// data inputs and two select bits, 64 rows) against the select-table of the
// document (S1 S0 = 00 -> I0, 01 -> I1, 10 -> I2, 11 -> I3).
module tb_mux4_bit;
  logic i0, i1, i2, i3, f;
  logic [1:0] s;
  int checks = 0, failures = 0;

  mux4_bit dut (.i0, .i1, .i2, .i3, .s, .f);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [3:0] d;
    for (int v = 0; v < 64; v++) begin
      d = 4'(v);
      {i3, i2, i1, i0} = d;
      s = 2'(v >> 4);
      #1;
      checks++;
      if (f != d[s]) begin
        failures++;
        $display("FAIL: data %b sel %0d gave %b", d, s, f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
