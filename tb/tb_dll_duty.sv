`timescale 1ns / 1ps
// tb_dll_duty: duty-cycle behaviour of the range detector's tap choice.
// Two DLLs share one input clock: `std` uses the default taps (OVER from
// P1..P8, so OVER fires at D = 1.5T) and `wide` uses OVER_TAPS = 10
// (OVER at D = 1.25T). At 520 MHz both must lock with a 50% duty cycle.
// With a 60% duty cycle the first coarse code gives D = 520/366.6 T =
// 1.42T: inside std's window but beyond (2 - 0.6)T = 1.4T, where P12 is
// sampled high and the phase detector reads "early". Expected: std keeps
// drifting into OVER and restarting the search; wide flags OVER at once,
// searches on and locks.
module tb_dll_duty;
  import dll_pkg::*;

  logic clk_in = 1'b0, rst_n = 1'b0;
  real  t_ns = 1000.0 / 520.0, duty = 0.5;
  int   checks = 0, failures = 0;

  logic [N_PHASES-1:0] ph_s, ph_w;
  logic [M_BITS-1:0]   m_s, m_w;
  logic [L_BITS-1:0]   l_s, l_w;
  logic [CNT_BITS-1:0] c_s, c_w;
  dll_state_e          st_s, st_w;
  logic                u_s, o_s, e_s, u_w, o_w, e_w;

  dll_top std (.clk_in, .rst_n, .phases(ph_s), .m_code(m_s), .l_code(l_s), .count(c_s),
               .state(st_s), .under(u_s), .over(o_s), .early(e_s));
  dll_top #(.OVER_TAPS(10)) wide (.clk_in, .rst_n, .phases(ph_w), .m_code(m_w), .l_code(l_w),
               .count(c_w), .state(st_w), .under(u_w), .over(o_w), .early(e_w));

  always begin
    #(t_ns * (1.0 - duty)) clk_in = 1'b1;
    #(t_ns * duty)         clk_in = 1'b0;
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  function automatic bit locked(logic [3:0] m, logic [5:0] l, dll_state_e st);
    real f = 15.0 + 39.0 * real'(m) + 78.0 / 63.0 * real'(l);
    return st == ST_LINEAR && f > 520.0 - 3.72 && f < 520.0 + 3.72;
  endfunction

  int restarts_s;
  dll_state_e prev_s;
  always @(posedge clk_in) begin
    if (prev_s == ST_LINEAR && st_s == ST_BS1) restarts_s++;
    prev_s <= st_s;
  end

  task automatic run(real dc);
    duty = dc;
    rst_n = 1'b0;
    repeat (4) @(posedge clk_in);
    rst_n = 1'b1;
    repeat (3000) @(posedge clk_in);
    restarts_s = 0;
    repeat (1000) @(posedge clk_in);
  endtask

  initial begin
    run(0.5);
    chk(locked(m_s, l_s, st_s), "default taps lock at 50% duty");
    chk(locked(m_w, l_w, st_w), "OVER_TAPS=10 locks at 50% duty");
    chk(restarts_s == 0, "no restarts once locked at 50% duty");
    run(0.6);
    chk(locked(m_w, l_w, st_w), "OVER_TAPS=10 locks at 60% duty");
    chk(restarts_s > 0, $sformatf("default taps keep restarting at 60%% duty (%0d restarts)", restarts_s));
    $display("60%% duty: default taps restarted %0d times in 1000 clocks", restarts_s);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
