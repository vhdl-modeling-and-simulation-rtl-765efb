// Testbench of the 5-bit phase rotation adder: all 32 x 32 input pairs are
// applied and the sum is compared with (a + b) mod 32, the carry out being
// dropped as in the document's adder tables.
module tb_phase_adder;
  logic [4:0] a, b, s;
  int checks = 0, failures = 0;

  phase_adder #(.W(5)) dut (.a, .b, .s);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a = 5'(i); b = 5'(j);
        #1;
        checks++;
        if (int'(s) != (i + j) % 32) begin
          failures++;
          $display("FAIL: %0d + %0d gave %0d", i, j, s);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
