`timescale 1ns / 1ps
// tb_msb_dac: checks the MSB DAC model's 16 levels, 15 MHz + n*39 MHz
// of lock frequency (k = 1 MHz/uA), i.e. 15 MHz at 0000 and 600 MHz at 1111.
module tb_msb_dac;
  logic [3:0] m;
  real i_ua;
  int checks = 0, failures = 0;

  msb_dac dut (.m(m), .i_ua(i_ua));

  initial begin
    real e;
    for (int n = 0; n < 16; n++) begin
      m = 4'(n);
      #1;
      e = 15.0 + real'(n) * (600.0 - 15.0) / 15.0;
      checks++;
      if (i_ua < e - 1e-6 || i_ua > e + 1e-6) begin
        failures++;
        $display("FAIL M=%0d I=%f expected %f", n, i_ua, e);
      end
    end
    m = 4'hF; #1;
    checks++;
    if (i_ua < 599.999 || i_ua > 600.001) failures++;
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
