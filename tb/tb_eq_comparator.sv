// Testbench of the 12-bit equality comparator: every a against b = a, and
// against every one-bit change of a, plus random unequal pairs.
module tb_eq_comparator;
  logic [11:0] a, b;
  logic equal;
  int checks = 0, failures = 0;

  eq_comparator #(.W(12)) dut (.a, .b, .equal);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [11:0] x, input logic [11:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (equal != (x == y)) begin
      failures++;
      $display("FAIL: %h vs %h gave %0b", x, y, equal);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) begin
      apply(12'(i), 12'(i));
      apply(12'(i), 12'(i) ^ (12'd1 << (i % 12)));
    end
    for (int n = 0; n < 2000; n++) apply(12'($urandom), 12'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
