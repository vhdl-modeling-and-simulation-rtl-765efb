// Testbench of the gain shifter: all 256 signed inputs with all 16 gain
// codes, compared with floor(in * 2^shift / 32), where the shift for a gain
// code is g[1:0] + 3*g[2] + 4*g[3] (the reading of the document's 4- and
// 16-bin result tables). Spot values from those tables are also checked.
module tb_gain_shifter;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  logic signed [7:0]  in;
  gain_t              gain;
  logic signed [15:0] out;
  int checks = 0, failures = 0;

  gain_shifter dut (.in, .gain, .out);

  initial begin : watchdog
    #1000000;
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
    for (int v = -128; v < 128; v++)
      for (int g = 0; g < 16; g++) begin
        in = 8'(v); gain = gain_t'(g);
        #1;
        check(int'(out) == ref_term(v, g),
              $sformatf("in %0d gain %0d gave %0d", v, g, out));
      end
    // 127 at gain F: 127*2^10/32 = 4064; at gain 0: 3; -127 at gain 0: -4
    in = 8'sd127;  gain = 4'hF; #1; check(out == 16'sd4064, "127 at gain F");
    in = 8'sd127;  gain = 4'h0; #1; check(out == 16'sd3, "127 at gain 0");
    in = -8'sd127; gain = 4'h0; #1; check(out == -16'sd4, "-127 at gain 0");
    in = -8'sd127; gain = 4'hC; #1; check(out == -16'sd508, "-127 at gain C");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
