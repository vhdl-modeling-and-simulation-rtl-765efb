// Testbench of the 5-bit load register: random data and load enables over
// many clocks; Q must take D on a rising edge with LD high and hold
// otherwise, ~Q must always be the complement, and reset must clear it.
module tb_load_reg;
  logic clk = 1'b0, rst_n, ld;
  logic [4:0] d, q, q_n, model;
  int checks = 0, failures = 0;

  load_reg #(.W(5)) dut (.clk, .rst_n, .ld, .d, .q, .q_n);

  always #5 clk = ~clk;

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
    rst_n = 1'b0; ld = 1'b0; d = '0;
    #12;
    check(q == 5'd0 && q_n == 5'h1F, "reset value");
    rst_n = 1'b1;
    model = '0;
    for (int n = 0; n < 500; n++) begin
      @(negedge clk);
      ld = 1'($urandom); d = 5'($urandom);
      @(posedge clk);
      if (ld) model = d;
      #1;
      check(q == model, $sformatf("cycle %0d: q=%h expected %h", n, q, model));
      check(q_n == ~q, "complement output");
    end
    @(negedge clk);
    rst_n = 1'b0;
    #1;
    check(q == 5'd0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
