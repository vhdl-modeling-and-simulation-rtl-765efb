// Testbench of one range bin processor (hard-wired address 5).
//  * Table 17 of the document: gain 0, PInc 0, the 32 phase samples in the
//    order 00, 10, 01, 11, ..., 0F, 1F, each I/Q output compared with the
//    published value, and appearing exactly five clocks after its sample.
//  * Random streams (random phase, PSV, incoming partial sum, overflow and
//    ODV flags) with several coefficient sets, checked cycle by cycle against
//    sum_out = sum_in + term(sample four clocks earlier), the term computed
//    with real arithmetic; sample_out is the sample two clocks later.
//  * Programming: a word for another address changes nothing; a PRB word for
//    this address only reaches the preload register, the bin keeps the old
//    coefficients until a UNP word arrives (double buffering).
//  * URB = 0: the bin adds nothing and raises no ODV.
//  * Operate/Maintenance low at random cycles: every output holds, and the
//    stream continues afterwards as if the frozen clocks had not happened.
module tb_rbp;
  import dis_pkg::*;
  import tb_ref_pkg::*;

  localparam logic [ADDR_W-1:0] MY_ADDR = 9'd5;
  localparam logic [15:0] T17_IQ [64] = '{
    16'h0003, 16'h0000, 16'hFFFC, 16'h0000, 16'h0003, 16'h0000, 16'hFFFC, 16'hFFFF,
    16'h0003, 16'h0001, 16'hFFFC, 16'hFFFE, 16'h0003, 16'h0002, 16'hFFFC, 16'hFFFD,
    16'h0002, 16'h0002, 16'hFFFD, 16'hFFFD, 16'h0002, 16'h0003, 16'hFFFD, 16'hFFFC,
    16'h0001, 16'h0003, 16'hFFFE, 16'hFFFC, 16'h0000, 16'h0003, 16'hFFFF, 16'hFFFC,
    16'h0000, 16'h0003, 16'h0000, 16'hFFFC, 16'hFFFF, 16'h0003, 16'h0000, 16'hFFFC,
    16'hFFFE, 16'h0003, 16'h0001, 16'hFFFC, 16'hFFFD, 16'h0003, 16'h0002, 16'hFFFC,
    16'hFFFD, 16'h0002, 16'h0002, 16'hFFFD, 16'hFFFC, 16'h0002, 16'h0003, 16'hFFFD,
    16'hFFFC, 16'h0001, 16'h0003, 16'hFFFE, 16'hFFFC, 16'h0000, 16'h0003, 16'hFFFF
  };
  localparam int LEN = 400;

  logic    clk = 1'b0;
  logic    rst_n;
  logic    oper;
  sample_t sample_in;
  logic    clk_prog_in;
  prog_t   prog_in;
  sum_t    sum_in;
  sample_t sample_out;
  logic    clk_prog_out;
  prog_t   prog_out;
  sum_t    sum_out;

  int checks = 0, failures = 0;

  rbp #(.ADDR(MY_ADDR)) dut (.*);

  always #5 clk = ~clk;

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

  task automatic tick();
    @(negedge clk);
  endtask

  // coefficients in use (model)
  int c_urb, c_gain, c_pinc;

  task automatic send_prog(input int addr, input bit prb, input bit unp,
                           input int urb, input int gain, input int pinc);
    prog_in = '0;
    prog_in.prb = prb; prog_in.unp = unp; prog_in.sel = ADDR_W'(addr);
    prog_in.urb = urb[0]; prog_in.gain = gain_t'(gain); prog_in.pinc = phase_t'(pinc);
    tick();
    check(prog_out == prog_in, "programming word passed on after one clock");
    prog_in = '0;
    repeat (2) tick();
  endtask

  // stimulus and captured outputs, indexed by active clock
  sample_t s_in [LEN];
  sum_t    y_in [LEN];
  logic    cp_in [LEN];
  sum_t    y_out [LEN + 1];
  sample_t s_out [LEN + 1];
  logic    cp_out [LEN + 1];

  // Drive LEN active clocks of stimulus (random unless table17), with
  // optional random freezes; then compare with the model.
  task automatic run(input bit table17, input bit freeze, input string name);
    int a, j;
    bit prev;
    sum_t held;
    sample_t sheld;
    int ti, tq, ei, eq, fi, fq;
    bit vld;
    for (int n = 0; n < LEN; n++) begin
      if (table17) begin
        s_in[n].psv = (n < 32);
        s_in[n].phase = phase_t'((n % 2 == 0) ? n / 2 : n / 2 + 16);
        y_in[n] = '0;
      end else begin
        s_in[n].psv = 1'($urandom);
        s_in[n].phase = phase_t'($urandom);
        y_in[n].i = 16'($urandom); y_in[n].q = 16'($urandom);
        if ($urandom % 4 == 0) begin  // near the limits to provoke overflow
          y_in[n].i = ($urandom % 2) ? 16'sh7F80 : 16'sh8070;
          y_in[n].q = ($urandom % 2) ? 16'sh7F80 : 16'sh8070;
        end
        y_in[n].iof = ($urandom % 8) == 0;
        y_in[n].qof = ($urandom % 8) == 0;
        y_in[n].odv = 1'($urandom);
      end
      cp_in[n] = 1'($urandom);
    end
    a = 0; j = 0; prev = 1'b1;
    held = sum_out; sheld = sample_out;
    while (a <= LEN) begin
      tick();
      if (prev) begin
        y_out[a] = sum_out; s_out[a] = sample_out; cp_out[a] = clk_prog_out;
        held = sum_out; sheld = sample_out;
        a++;
      end else begin
        check(sum_out == held && sample_out == sheld, $sformatf("%s: hold while frozen", name));
      end
      oper = (freeze && ($urandom % 4 == 0)) ? 1'b0 : 1'b1;
      if (a > LEN) oper = 1'b1;
      prev = oper;
      if (oper) begin
        if (j < LEN) begin
          sample_in = s_in[j]; sum_in = y_in[j]; clk_prog_in = cp_in[j];
        end else begin
          sample_in = '0; sum_in = '0; clk_prog_in = 1'b0;
        end
        j++;
      end
    end
    oper = 1'b1;
    sample_in = '0; sum_in = '0; clk_prog_in = 1'b0;
    repeat (6) tick();  // flush the pipeline for the next run
    // y_out[k+1] = y_in[k] + term(s_in[k-4])
    for (int k = 0; k < LEN; k++) begin
      vld = (k >= 4) && s_in[k-4].psv && (c_urb != 0);
      ti = vld ? ref_term(ref_cos(int'(s_in[k-4].phase) + c_pinc), c_gain) : 0;
      tq = vld ? ref_term(ref_sin(int'(s_in[k-4].phase) + c_pinc), c_gain) : 0;
      ei = wrap16(int'(y_in[k].i) + ti);
      eq = wrap16(int'(y_in[k].q) + tq);
      fi = int'(y_in[k].iof) | int'(ei != int'(y_in[k].i) + ti);
      fq = int'(y_in[k].qof) | int'(eq != int'(y_in[k].q) + tq);
      check(int'(y_out[k+1].i) == ei && int'(y_out[k+1].q) == eq,
            $sformatf("%s: sum %0d got %0d,%0d expected %0d,%0d", name, k,
                      y_out[k+1].i, y_out[k+1].q, ei, eq));
      check(int'(y_out[k+1].iof) == fi && int'(y_out[k+1].qof) == fq,
            $sformatf("%s: overflow flags %0d", name, k));
      check(y_out[k+1].odv == (y_in[k].odv | vld), $sformatf("%s: ODV %0d", name, k));
      if (k + 2 <= LEN)
        check(s_out[k+2] == s_in[k] && cp_out[k+2] == cp_in[k],
              $sformatf("%s: sample passed on after two clocks (%0d)", name, k));
      if (table17 && k >= 4 && k < 36)
        check(y_out[k+1].i == T17_IQ[2*(k-4)] && y_out[k+1].q == T17_IQ[2*(k-4)+1],
              $sformatf("%s: Table 17 row %0d, five clocks after its sample", name, k - 4));
    end
  endtask

  initial begin
    rst_n = 1'b0; oper = 1'b1; sample_in = '0; clk_prog_in = 1'b0; prog_in = '0; sum_in = '0;
    c_urb = 0; c_gain = 0; c_pinc = 0;
    repeat (2) tick();
    rst_n = 1'b1;
    tick();

    run(1'b0, 1'b0, "after reset (URB 0)");

    send_prog(MY_ADDR, 1, 0, 1, 0, 0);
    run(1'b0, 1'b0, "preloaded only");
    send_prog(0, 0, 1, 0, 0, 0);
    c_urb = 1; c_gain = 0; c_pinc = 0;
    run(1'b1, 1'b0, "Table 17");

    send_prog(MY_ADDR + 1, 1, 0, 1, 9, 3);   // other bin
    send_prog(0, 0, 1, 0, 0, 0);
    run(1'b0, 1'b0, "other address ignored");

    send_prog(MY_ADDR, 1, 0, 1, 13, 21);
    run(1'b0, 1'b0, "new coefficients waiting in preload");
    send_prog(0, 0, 1, 0, 0, 0);
    c_gain = 13; c_pinc = 21;
    run(1'b0, 1'b0, "gain 13 PInc 21");
    run(1'b0, 1'b1, "gain 13 PInc 21 with freezes");

    send_prog(MY_ADDR, 1, 0, 1, 15, 7);
    send_prog(0, 0, 1, 0, 0, 0);
    c_gain = 15; c_pinc = 7;
    run(1'b0, 1'b1, "gain 15 PInc 7 with freezes");

    send_prog(MY_ADDR, 1, 1, 0, 4, 4);       // PRB and UNP in one word
    run(1'b0, 1'b0, "PRB and UNP together load preload only");
    send_prog(0, 0, 1, 0, 0, 0);
    c_urb = 0;
    run(1'b0, 1'b0, "bin not used");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
