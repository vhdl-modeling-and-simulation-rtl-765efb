// Testbench of the self-test counter: it must stay clear while run is
// low, count one per clock while run is high, clear again when run drops,
// and wrap from 4095 to 0.
module tb_test_counter;
  logic clk = 1'b0, rst_n, run;
  logic [11:0] count;
  int checks = 0, failures = 0;
  int model;

  test_counter #(.W(12)) dut (.clk, .rst_n, .run, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; run = 1'b0;
    #12 rst_n = 1'b1;
    model = 0;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (n < 100)       run = 1'($urandom);
      else if (n < 4300) run = 1'b1;   // long run through the wrap
      else               run = ($urandom % 16) != 0;
      @(posedge clk);
      model = run ? (model + 1) % 4096 : 0;
      #1;
      checks++;
      if (int'(count) != model) begin
        failures++;
        $display("FAIL: cycle %0d count %0d expected %0d", n, count, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
