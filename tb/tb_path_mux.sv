// Testbench of the 6-bit 4-to-1 path multiplexer: random words on the four
// inputs with each select value, checking that exactly the selected path
// (00 path 1, 01 path 2, 10 self test, 11 phase extractor) reaches the
// output.
module tb_path_mux;
  logic [5:0] in0, in1, in2, in3, out;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  path_mux #(.W(6)) dut (.in0, .in1, .in2, .in3, .sel, .out);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [5:0] exp;
    for (int n = 0; n < 1000; n++) begin
      in0 = 6'($urandom); in1 = 6'($urandom); in2 = 6'($urandom); in3 = 6'($urandom);
      sel = 2'(n);
      #1;
      case (sel)
        2'd0: exp = in0;
        2'd1: exp = in1;
        2'd2: exp = in2;
        default: exp = in3;
      endcase
      checks++;
      if (out != exp) begin
        failures++;
        $display("FAIL: sel %0d gave %h expected %h", sel, out, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
