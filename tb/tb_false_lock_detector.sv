`timescale 1ns / 1ps
// tb_false_lock_detector: checks UNDER/OVER against the phase equations.
// Part 1 feeds the taps Pn = [frac(n*x/12) >= 1 - DC] (x = D/T) for a set
// of normalised delays at 50% duty cycle and compares with the expected
// region: UNDER for x < 2/3 (tap 9 has not reached half a period), OVER
// for 1.5 <= x < 2 (tap 8 has wrapped past a period), neither in between.
// Part 2 sweeps D/T from 0.2 to 1.9 in steps of 0.01 for duty cycles of
// 20% to 80% and checks where the flags switch: OVER at D = 1.5T whatever
// the duty cycle, UNDER clearing at D = (12/9)(1 - DC)T (tap 9 reaching
// the high part of the period).
// Part 3 drives random tap words and compares with the rule "UNDER = P1..P9
// all zero, OVER = some Pn=1, Pn+1=0 within P1..P8", and checks the
// one-clock latency of the sampling flip-flops.
module tb_false_lock_detector;
  logic clk = 0, rst_n = 0;
  logic [8:0] taps = '0;
  logic under, over;
  int checks = 0, failures = 0;

  false_lock_detector dut (.clk(clk), .rst_n(rst_n), .taps(taps), .under(under), .over(over));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic logic [8:0] phase_word(real x, real dc);
    logic [8:0] w;
    real f;
    for (int n = 1; n <= 9; n++) begin
      f = real'(n) * x / 12.0;
      f = f - $floor(f);
      w[n-1] = (f >= 1.0 - dc);
    end
    return w;
  endfunction

  localparam int NX = 11;
  localparam real XS[NX] = '{0.3, 0.5, 0.6, 0.7, 0.75, 0.8, 1.0, 1.25, 1.33, 1.6, 1.9};

  initial begin
    logic [8:0] w;
    bit exp_u, exp_o;
    #12 rst_n = 1;
    for (int i = 0; i < NX; i++) begin
      @(negedge clk) taps = phase_word(XS[i], 0.5);
      @(posedge clk); #1;
      exp_u = XS[i] < 2.0 / 3.0;
      exp_o = XS[i] >= 1.5;
      chk(under == exp_u && over == exp_o,
          $sformatf("x=%0.2f under=%0d over=%0d expected %0d/%0d", XS[i], under, over, exp_u, exp_o));
    end
    // threshold sweep against duty cycle
    for (int d = 2; d <= 8; d++) begin
      real dc, x_under, x_over, x;
      dc = real'(d) / 10.0;
      x_under = -1.0;
      x_over  = -1.0;
      for (int k = 20; k <= 190; k++) begin
        x = real'(k) / 100.0;
        @(negedge clk) taps = phase_word(x, dc);
        @(posedge clk); #1;
        if (!under && x_under < 0) x_under = x;
        if (over && x_over < 0) x_over = x;
      end
      chk(x_over >= 1.5 - 1e-9 && x_over < 1.51,
          $sformatf("DC=%0.1f OVER sets at %0.2f, expected 1.50", dc, x_over));
      chk(x_under >= 12.0 / 9.0 * (1.0 - dc) - 1e-9 && x_under < 12.0 / 9.0 * (1.0 - dc) + 0.01,
          $sformatf("DC=%0.1f UNDER clears at %0.2f, expected %0.3f", dc, x_under, 12.0 / 9.0 * (1.0 - dc)));
    end
    // random words against the stated rule, with one clock of latency
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      w = 9'($urandom);
      if (i % 5 == 0) w = 9'($urandom) & 9'h00F;
      if (i % 7 == 0) w = '0;
      taps = w;
      @(posedge clk); #1;
      exp_u = 1'b1;
      for (int n = 0; n < 9; n++) if (w[n]) exp_u = 1'b0;
      exp_o = 1'b0;
      for (int n = 0; n < 7; n++) if (w[n] == 1'b1 && w[n+1] == 1'b0) exp_o = 1'b1;
      chk(under == exp_u && over == exp_o,
          $sformatf("taps=%b under=%0d over=%0d expected %0d/%0d", w, under, over, exp_u, exp_o));
      // flags must not follow the taps before the next clock edge
      @(negedge clk) taps = ~w;
      #1 chk(under == exp_u && over == exp_o, "flags registered, not combinational on taps");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
