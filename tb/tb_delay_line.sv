`timescale 1ns / 1ps
// tb_delay_line: checks the delay-line model. For several MSB codes and
// LSB currents, the rising edge of Pn must trail the P0 edge it came from
// by n * 1000 / (12 * (15 + 39*M + Ic)) ns, the cell delay for which the
// whole line spans one period at F = k*I (k = 1 MHz/uA). Each cell delay
// is rounded to the 1 ps time precision, hence a tolerance of 0.6 ps/cell.
module tb_delay_line;
  logic clk = 0;
  logic [3:0] m;
  real ic_ua;
  logic [11:0] p;
  int checks = 0, failures = 0;
  realtime t0;

  delay_line dut (.clk_in(clk), .m(m), .ic_ua(ic_ua), .p(p));

  task automatic measure(logic [3:0] code, real ic);
    real cell_ns, t;
    m = code; ic_ua = ic;
    cell_ns = 1000.0 / (12.0 * (15.0 + 39.0 * real'(code) + ic));
    #200;                       // let old edges drain
    clk = 1; t0 = $realtime;
    for (int n = 1; n <= 12; n++) begin
      @(posedge p[n-1]);
      t = $realtime - t0;
      checks++;
      if (t < real'(n) * (cell_ns - 0.0006) - 0.001 || t > real'(n) * (cell_ns + 0.0006) + 0.001) begin
        failures++;
        $display("FAIL M=%0d Ic=%0.2f P%0d at %0.4f expected %0.4f", code, ic, n, t, real'(n) * cell_ns);
      end
    end
    #(2.0 * cell_ns);
    clk = 0;
    #(14.0 * cell_ns);
  endtask

  initial begin
    measure(4'd15, 0.0);
    measure(4'd8, 39.6);
    measure(4'd3, 12.38);
    measure(4'd0, 50.0);
    measure(4'd12, 70.0);
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
