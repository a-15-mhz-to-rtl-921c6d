`timescale 1ns / 1ps
// tb_lsb_dac: checks the LSB DAC model: 64 equal steps of about 1.24 MHz
// of lock frequency, the full range spanning two MSB steps (78 MHz).
module tb_lsb_dac;
  logic [5:0] l;
  real ic_ua;
  int checks = 0, failures = 0;

  lsb_dac dut (.l(l), .ic_ua(ic_ua));

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  initial begin
    real prev;
    l = 0; #1;
    chk(ic_ua > -1e-9 && ic_ua < 1e-9, "zero code gives zero current");
    prev = ic_ua;
    for (int k = 1; k < 64; k++) begin
      l = 6'(k); #1;
      chk(ic_ua - prev > 1.235 && ic_ua - prev < 1.245,
          $sformatf("step at L=%0d is %f", k, ic_ua - prev));
      prev = ic_ua;
    end
    chk(ic_ua > 77.999 && ic_ua < 78.001, "full range = two MSB steps");
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
