`timescale 1ns / 1ps
// tb_phase_detector: checks the bang-bang phase detector.
// P0 runs at 100 MHz; a model of P12 is P0 delayed by D, swept across
// 0.6T..1.4T. Expected output: 1 when D < T (P12 already high at the P0
// edge), 0 when D > T, worked out from D alone. Also checks the reset and
// that the output updates on the rising edge only.
module tb_phase_detector;
  logic clk = 0, rst_n = 0, d, early;
  int checks = 0, failures = 0;

  phase_detector dut (.clk(clk), .rst_n(rst_n), .d(d), .early(early));

  real dly_ns = 8.0;
  always #5 clk = ~clk;               // T = 10 ns
  always @(clk) begin                 // P12 model: transport delay
    automatic logic v = clk;
    automatic real  w = dly_ns;
    fork
      begin #(w) d = v; end
    join_none
  end
  initial d = 0;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    #7 chk(early == 0, "reset value");
    #20 rst_n = 1;
    for (int k = 0; k < 9; k++) begin
      dly_ns = 6.0 + 1.0 * k;          // 0.6T .. 1.4T
      if (k == 4) dly_ns = 10.5;       // skip the ambiguous D = T
      repeat (4) @(posedge clk);
      #1;
      chk(early == (dly_ns < 10.0), $sformatf("D=%0.1f ns early=%0d", dly_ns, early));
      @(negedge clk); #1;
      chk(early == (dly_ns < 10.0), $sformatf("hold over negedge D=%0.1f", dly_ns));
    end
    rst_n = 0; #1;
    chk(early == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
