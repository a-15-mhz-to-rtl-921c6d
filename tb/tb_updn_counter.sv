`timescale 1ns / 1ps
// tb_updn_counter: checks the 9-bit linear-loop counter against a model.
// Random up/down/init traffic plus long runs into both ends. Expected:
// start and init value 256, one count per clock, saturation at 0 and 511,
// L = count / 8, and the end flags.
module tb_updn_counter;
  logic clk = 0, rst_n = 0, init = 0, up = 0, dn = 0;
  logic [8:0] count;
  logic [5:0] lsb_code;
  logic sat_hi, sat_lo;
  int checks = 0, failures = 0;
  int model;

  updn_counter dut (.*);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic step(bit i, bit u, bit d);
    @(negedge clk);
    init = i; up = u; dn = d;
    @(posedge clk); #1;
    if (i) model = 256;
    else if (u && !d) model = (model < 511) ? model + 1 : 511;
    else if (d && !u) model = (model > 0) ? model - 1 : 0;
    chk(int'(count) == model, $sformatf("count=%0d model=%0d", count, model));
    chk(int'(lsb_code) == model / 8, $sformatf("lsb_code=%0d model=%0d", lsb_code, model / 8));
    chk(sat_hi == (model == 511) && sat_lo == (model == 0), "saturation flags");
  endtask

  initial begin
    #7 chk(count == 9'd256, "reset to mid-range");
    model = 256;
    #3 rst_n = 1;
    for (int i = 0; i < 300; i++) step(0, 1, 0);   // run into the top
    for (int i = 0; i < 600; i++) step(0, 0, 1);   // and into the bottom
    step(1, 0, 1);                                 // init wins
    for (int i = 0; i < 2000; i++) begin
      int r;
      r = $urandom_range(0, 99);
      step(r < 2, r >= 2 && r < 55, r >= 45);
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
