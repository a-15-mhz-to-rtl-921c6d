`timescale 1ns / 1ps
// tb_dll_top: end-to-end test of the closed-loop DLL at its default size.
//
// Drives the input clock at the eight frequencies of the jitter table
// (600 down to 15 MHz), each after an external reset, then changes the
// frequency twice without reset to exercise the frequency-change restart,
// and finally locks with input duty cycles of 30%, 40%, 60% and 70%.
// After each acquisition it checks, independently of the RTL:
//   * the lock frequency implied by the codes, 15 + 39*M + (78/63)*L MHz,
//     is within 3 LSB steps of the input frequency (so D = T, not 2T);
//   * the measured P12 rising edge falls within 3 LSB steps of delay of a
//     P0 rising edge;
//   * the twelve phases are uniformly spaced (P(n) - P(n-1) equal);
//   * the coarse search finishes within 5 steps of STEP_CYCLES clocks.
// It counts every mechanism of the design (reset-time coarse lock, coarse
// lock at each search step, search ending out of range, linear search
// driven by UNDER/OVER, restart on frequency change, fine-range carry into
// the MSB code, counter up and down,
// UNDER and OVER flags) and fails any that never occurred.
module tb_dll_top;
  import dll_pkg::*;

  localparam int unsigned STEP = 3;  // must match dll_top's default

  logic                clk_in = 1'b0;
  logic                rst_n  = 1'b0;
  logic [N_PHASES-1:0] phases;
  logic [M_BITS-1:0]   m_code;
  logic [L_BITS-1:0]   l_code;
  logic [CNT_BITS-1:0] count;
  dll_state_e          state;
  logic                under, over, early;

  dll_top dut (.*);

  int  checks = 0, failures = 0;
  real half_ns = 5.0;
  real duty    = 0.5;   // fraction of the period P0 is high
  bit  clk_run = 1'b0;

  // mechanism counters
  int n_reset_lock, n_bs_lock[4], n_nir, n_nir_count, n_retrigger;
  int n_up, n_dn, n_under, n_over, n_carry;
  logic [M_BITS-1:0] prev_m;
  longint cycles = 0;

  always begin
    if (clk_run) begin
      #(2.0 * half_ns * (1.0 - duty)) clk_in = 1'b1;
      #(2.0 * half_ns * duty) clk_in = 1'b0;
    end else #1;
  end

  dll_state_e prev_state = ST_RESET;
  logic [CNT_BITS-1:0] prev_count;
  always @(posedge clk_in) begin
    cycles++;
    if (rst_n) begin
      if (prev_state == ST_RESET && state == ST_LINEAR) n_reset_lock++;
      if (prev_state inside {ST_BS1, ST_BS2, ST_BS3, ST_BS4} && state == ST_LINEAR)
        n_bs_lock[int'(prev_state) - int'(ST_BS1)]++;
      if (prev_state == ST_BS4 && state == ST_LINEAR_NIR) n_nir++;
      if (prev_state == ST_LINEAR && state == ST_BS1) n_retrigger++;
      if (prev_state == ST_LINEAR_NIR && count != prev_count) n_nir_count++;
      if (count > prev_count && prev_state != ST_RESET) n_up++;
      if (count < prev_count && prev_state != ST_RESET) n_dn++;
      if (prev_state inside {ST_LINEAR, ST_LINEAR_NIR} && state == prev_state &&
          m_code != prev_m) n_carry++;
      if (under) n_under++;
      if (over)  n_over++;
    end
    prev_state <= state;
    prev_count <= count;
    prev_m     <= m_code;
  end

  // edge times of P0 and of every phase
  realtime t_p0 = 0, t_ph[N_PHASES];
  always @(posedge clk_in) t_p0 = $realtime;
  for (genvar i = 0; i < N_PHASES; i++) begin : g_t
    always @(posedge phases[i]) t_ph[i] = $realtime;
  end

  function automatic void check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $realtime);
    end
  endfunction

  localparam real F_MSB = (600.0 - 15.0) / 15.0;
  localparam real F_LSB = 2.0 * F_MSB / 63.0;

  task automatic wait_cycles(int n);
    repeat (n) @(posedge clk_in);
  endtask

  // measure and check lock at input frequency f_mhz
  task automatic check_lock(real f_mhz, string tag);
    real t_ns, f_codes, d_err, tol_ns, sp, sp0, dt_lsb;
    bit  uniform;
    t_ns    = 1000.0 / f_mhz;
    f_codes = 15.0 + F_MSB * real'(m_code) + F_LSB * real'(l_code);
    check(state == ST_LINEAR, {tag, ": in linear search"});
    check(f_codes > f_mhz - 3.0 * F_LSB && f_codes < f_mhz + 3.0 * F_LSB,
          $sformatf("%s: code frequency %0.2f MHz vs input %0.2f (M=%0d L=%0d)",
                    tag, f_codes, f_mhz, m_code, l_code));
    // P12 edge against the nearest P0 edge
    @(posedge phases[N_PHASES-1]);
    #0;
    d_err  = $realtime - t_p0;
    if (d_err > t_ns / 2.0) d_err = d_err - t_ns;
    if (d_err < 0) d_err = -d_err;
    dt_lsb = t_ns * F_LSB / f_mhz;      // delay change of one LSB
    tol_ns = 3.0 * dt_lsb + 0.005;
    check(d_err <= tol_ns, $sformatf("%s: P12/P0 edge error %0.4f ns > %0.4f",
                                     tag, d_err, tol_ns));
    // uniform spacing of P1..P12 (edges of one pass of the line)
    @(posedge phases[N_PHASES-1]);
    #0;
    sp0 = t_ph[1] - t_ph[0];
    uniform = 1'b1;
    for (int i = 2; i < N_PHASES; i++) begin
      sp = t_ph[i] - t_ph[i-1];
      if (sp - sp0 > 0.003 || sp0 - sp > 0.003) uniform = 1'b0;
    end
    check(uniform && sp0 > t_ns / 12.0 * 0.85 && sp0 < t_ns / 12.0 * 1.15,
          $sformatf("%s: phase spacing %0.4f ns vs T/12 = %0.4f", tag, sp0, t_ns / 12.0));
  endtask

  task automatic acquire_after_reset(real f_mhz);
    int n;
    half_ns = 500.0 / f_mhz;
    clk_run = 1'b1;
    rst_n   = 1'b0;
    wait_cycles(4);
    rst_n = 1'b1;
    // coarse acquisition: reset check plus at most four search steps
    n = 0;
    while (dut.init && n < 100) begin
      @(posedge clk_in);
      n++;
    end
    check(n <= 5 * STEP + 2, $sformatf("%0.1f MHz: coarse search took %0d clocks", f_mhz, n));
    wait_cycles(3000);
    check_lock(f_mhz, $sformatf("%0.1f MHz", f_mhz));
  endtask

  localparam real DUTIES[4]     = '{0.3, 0.7, 0.4, 0.6};
  localparam real DUTY_FREQS[4] = '{200.0, 200.0, 80.0, 300.0};
  localparam real FREQS[8] = '{600.0, 500.0, 400.0, 300.0, 200.0, 150.0, 50.0, 15.0};

  initial begin
    for (int i = 0; i < 8; i++) acquire_after_reset(FREQS[i]);
    // frequency changes without reset: the UNDER/OVER flags restart the search
    half_ns = 500.0 / 200.0;
    wait_cycles(3000);
    check_lock(200.0, "200 MHz after change");
    half_ns = 500.0 / 450.0;
    wait_cycles(3000);
    check_lock(450.0, "450 MHz after change");
    // duty cycles away from 50%
    for (int i = 0; i < 4; i++) begin
      duty = DUTIES[i];
      acquire_after_reset(DUTY_FREQS[i]);
    end
    duty = 0.5;

    check(n_reset_lock > 0, "mechanism: coarse lock at reset check");
    check(n_bs_lock[0] + n_bs_lock[1] + n_bs_lock[2] + n_bs_lock[3] > 0,
          "mechanism: coarse lock during binary search");
    check(n_nir > 0,         "mechanism: search ended out of range");
    check(n_nir_count > 0,   "mechanism: counter driven by UNDER/OVER");
    check(n_retrigger > 0,   "mechanism: restart on frequency change");
    check(n_up > 0 && n_dn > 0, "mechanism: counter up and down");
    check(n_carry > 0,       "mechanism: fine-range carry into M");
    check(n_under > 0,       "mechanism: UNDER flag");
    check(n_over > 0,        "mechanism: OVER flag");
    $display("mechanisms: reset_lock=%0d bs_lock=%0d/%0d/%0d/%0d nir=%0d nir_count=%0d retrigger=%0d carry=%0d up=%0d dn=%0d under=%0d over=%0d",
             n_reset_lock, n_bs_lock[0], n_bs_lock[1], n_bs_lock[2], n_bs_lock[3],
             n_nir, n_nir_count, n_retrigger, n_carry, n_up, n_dn, n_under, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // watchdog
  initial begin
    #5ms;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
