`timescale 1ns / 1ps
// tb_updn_logic: exhaustive check of the counter-direction selection.
// Expected: LINEAR follows the phase detector (early -> down, else up);
// LINEAR_NIR ignores it and uses UNDER -> down, OVER -> up; all other
// states hold the counter.
module tb_updn_logic;
  import dll_pkg::*;
  dll_state_e state;
  logic early, under, over, up, dn;
  int checks = 0, failures = 0;

  updn_logic dut (.*);

  initial begin
    bit eu, ed;
    for (int s = 0; s < 7; s++)
      for (int v = 0; v < 8; v++) begin
        state = dll_state_e'(s);
        {early, under, over} = 3'(v);
        if (under && over) continue;   // cannot occur: UNDER needs all taps low
        #1;
        eu = 0; ed = 0;
        if (s == 5) begin eu = !early; ed = early; end
        if (s == 6) begin eu = over; ed = under; end
        checks++;
        if (up !== eu || dn !== ed) begin
          failures++;
          $display("FAIL state=%0d early=%0d under=%0d over=%0d up=%0d dn=%0d", s, early, under, over, up, dn);
        end
      end
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
