// Testbench of the 16-bit summation adder: directed overflow corners and
// random operands, checking the wrapped sum and that the overflow flag is set
// on a signed overflow or when the incoming flag is already set.
module tb_sum_adder;
  logic signed [15:0] a, b, s;
  logic of_in, of_out;
  int checks = 0, failures = 0;

  sum_adder #(.W(16)) dut (.a, .b, .of_in, .s, .of_out);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input int x, input int y, input bit ofi);
    int full, wrapped;
    a = 16'(x); b = 16'(y); of_in = ofi;
    #1;
    full = int'(a) + int'(b);
    wrapped = tb_ref_pkg::wrap16(full);
    checks++;
    if (int'(s) != wrapped || of_out != (ofi || (wrapped != full))) begin
      failures++;
      $display("FAIL: %0d + %0d (of_in %0b) gave %0d of %0b", a, b, ofi, s, of_out);
    end
  endtask

  initial begin
    apply(32767, 1, 0);
    apply(-32768, -1, 0);
    apply(32767, -32768, 0);
    apply(16384, 16384, 0);
    apply(-16384, -16384, 0);
    apply(-16385, -16384, 0);
    apply(100, 200, 1);
    apply(0, 0, 0);
    for (int n = 0; n < 5000; n++)
      apply(int'($urandom_range(65535)) - 32768, int'($urandom_range(65535)) - 32768,
            ($urandom % 8) == 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
