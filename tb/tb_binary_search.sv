`timescale 1ns / 1ps
// tb_binary_search: checks the split-control state machine.
// A plant model turns the MSB code into a lock frequency
// F = 15 + 39*M + 39.6 MHz (LSB code at mid-range) and, for an input
// frequency fin, raises UNDER when D/T = fin/F < 2/3 and OVER when
// D/T >= 1.5. For many input frequencies the test checks, against a
// reference search written from the state diagram: the final state
// (LINEAR when a code was in range, LINEAR_NIR otherwise), the final code,
// that the final code is in range when LINEAR is reached, the number of
// clocks (STEP clocks for the reset check plus STEP per search step), and
// that init is high throughout. It then checks the restart from LINEAR
// when UNDER/OVER appear, the exit from LINEAR_NIR when they clear, and
// the fine-range carry and borrow into M.
module tb_binary_search;
  import dll_pkg::*;

  localparam int unsigned STEP = 3;  // binary_search's default STEP_CYCLES

  logic clk = 0, rst_n = 0;
  logic under, over, up = 0, dn = 0, sat_hi = 0, sat_lo = 0;
  logic [3:0] m;
  dll_state_e state;
  logic init;
  int checks = 0, failures = 0;
  real fin = 100.0;
  bit  force_flags = 0;
  logic forced_under = 0, forced_over = 0;

  binary_search dut (.*);

  always #5 clk = ~clk;

  function automatic real f_of(logic [3:0] code);
    return 15.0 + 39.0 * real'(code) + 39.0 * 32.0 / 31.5;
  endfunction
  function automatic bit p_under(logic [3:0] code);
    return fin / f_of(code) < 2.0 / 3.0;
  endfunction
  function automatic bit p_over(logic [3:0] code);
    return fin / f_of(code) >= 1.5;
  endfunction

  always_comb begin
    under = force_flags ? forced_under : p_under(m);
    over  = force_flags ? forced_over  : p_over(m);
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic run_search(real f);
    logic [3:0] mm;
    int steps, n;
    dll_state_e exp_state;
    bit init_ok;
    fin = f;
    // reference search
    mm = 4'b1000;
    steps = 0;
    exp_state = ST_LINEAR;
    if (p_under(mm) || p_over(mm)) begin
      exp_state = ST_LINEAR_NIR;
      for (int b = 3; b >= 0; b--) begin
        steps++;
        if (!p_under(mm) && !p_over(mm)) begin exp_state = ST_LINEAR; break; end
        mm[b] = p_over(mm);
        if (b > 0) mm[b-1] = 1'b1;
      end
    end
    // run the DUT from reset
    @(negedge clk) rst_n = 0;
    @(negedge clk) rst_n = 1;
    n = 0;
    init_ok = 1;
    while (state != ST_LINEAR && state != ST_LINEAR_NIR && n < 100) begin
      if (!init) init_ok = 0;
      @(posedge clk); #1;
      n++;
    end
    chk(state == exp_state, $sformatf("fin=%0.1f state=%s expected %s", f, state.name(), exp_state.name()));
    chk(m == mm, $sformatf("fin=%0.1f M=%b expected %b", f, m, mm));
    chk(n == int'(STEP) * (steps + 1), $sformatf("fin=%0.1f took %0d clocks, expected %0d", f, n, STEP * (steps + 1)));
    chk(steps <= 4, "at most four search steps");
    chk(init_ok, "init high during the coarse search");
    chk(!init, "init low in linear search");
    if (state == ST_LINEAR) chk(!p_under(m) && !p_over(m), "code in range when coarsely locked");
  endtask

  int n_lin = 0, n_nir = 0, n_steps4 = 0;
  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < 60; i++) begin
      run_search(12.0 + 11.0 * real'(i));
      if (state == ST_LINEAR) n_lin++; else n_nir++;
    end
    chk(n_lin > 0 && n_nir > 0, "both search outcomes seen");

    // restart from LINEAR on a flag change
    run_search(400.0);
    chk(state == ST_LINEAR, "400 MHz locks");
    force_flags = 1; forced_over = 1;
    @(posedge clk); #1;
    chk(state == ST_BS1 && m == 4'b1000 && init, "restart to BS1 with M=1000");
    force_flags = 0;

    // LINEAR_NIR holds until the flags clear
    run_search(15.0);
    chk(state == ST_LINEAR_NIR, "15 MHz ends out of range");
    force_flags = 1; forced_under = 1; forced_over = 0;
    repeat (5) @(posedge clk); #1;
    chk(state == ST_LINEAR_NIR, "stays out of range while UNDER");
    forced_under = 0;
    @(posedge clk); #1;
    chk(state == ST_LINEAR, "NIR -> LINEAR when flags clear");

    // carry and borrow
    begin
      logic [3:0] m0;
      m0 = m;
      @(negedge clk) begin up = 1; sat_hi = 1; end
      #1 chk(init, "init pulses on carry");
      @(posedge clk); #1;
      chk(m == m0 + 1, "carry raises M");
      @(negedge clk) begin up = 0; sat_hi = 0; dn = 1; sat_lo = 1; end
      @(posedge clk); #1;
      chk(m == m0, "borrow lowers M");
      @(negedge clk) begin dn = 1; sat_lo = 0; end
      @(posedge clk); #1;
      chk(m == m0 && !init, "no borrow without saturation");
      dn = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200us;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
