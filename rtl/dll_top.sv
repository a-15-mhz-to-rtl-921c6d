`timescale 1ns / 1ps
// dll_top: 12-phase, wide-range digital DLL with split (coarse/fine) control.
//
// The input clock P0 runs through a 12-cell current-starved delay line.
// Each cell's current is the sum of its own 4-bit MSB DAC (code M, chosen
// by a binary search) and the shared 6-bit LSB DAC (code L, the top six
// bits of a 9-bit up/down counter). When locked, the line delays P0 by
// exactly one period and P1..P12 are 12 equally spaced phases.
//
//   false_lock_detector  samples P1..P9 on P0 and flags UNDER (D too short)
//                        and OVER (D too long, harmonic-lock risk)
//   binary_search        state machine: 4-step search of M on UNDER/OVER,
//                        then linear search; restarts when UNDER or OVER
//                        appears while locked (frequency change)
//   phase_detector       one flip-flop: P12 sampled on P0
//   updn_logic           counter direction from the PD (in range) or from
//                        UNDER/OVER (binary search ended out of range)
//   updn_counter         9-bit counter, mid-range start, top 6 bits -> L;
//                        when it runs out of range, M steps by one and it
//                        restarts at mid-range (carry, see binary_search)
//   msb_dac / lsb_dac /  behavioural models of the analog part
//   delay_line
//
// Interface: clk_in = P0, rst_n = external reset (restarts acquisition),
// phases = P1..P12, plus the internal codes and flags for observation.
// Timing: all digital logic runs on the rising edge of P0. Coarse
// acquisition takes at most 4 + 1 search steps of STEP_CYCLES clocks; the
// fine loop then moves the 9-bit counter by one count per clock.
// The block structure follows the design's block diagram; the step length
// and the analog model's current units are this implementation's choices.
// UNDER_TAPS/OVER_TAPS default to the taps the design names (P1..P9 and
// P1..P8). With P1..P8, OVER only fires at D = 1.5T, so for duty cycles
// above about 55% a coarse result between (2 - DC)T and 1.5T makes the
// phase detector push the wrong way and the search restarts repeatedly;
// OVER_TAPS = 10 moves OVER to D = 1.25T, the window edge the design
// quotes, and removes that case.
module dll_top
  import dll_pkg::*;
#(
  parameter int unsigned STEP_CYCLES = 3,  // clocks per binary-search step
  parameter int unsigned UNDER_TAPS  = 9,  // UNDER = none of P1..P(UNDER_TAPS) high
  parameter int unsigned OVER_TAPS   = 8   // OVER = a "10" pair within P1..P(OVER_TAPS)
) (
  input  logic                clk_in,   // P0, input clock
  input  logic                rst_n,    // external reset, active low
  output logic [N_PHASES-1:0] phases,   // phases[n-1] = Pn
  output logic [M_BITS-1:0]   m_code,   // MSB code M3..M0
  output logic [L_BITS-1:0]   l_code,   // LSB code L5..L0
  output logic [CNT_BITS-1:0] count,    // linear-loop counter
  output dll_state_e          state,    // split-control state
  output logic                under,    // delay below lock range
  output logic                over,     // delay above lock range
  output logic                early     // phase detector output
);

  localparam int unsigned N_TAPS = (UNDER_TAPS > OVER_TAPS) ? UNDER_TAPS : OVER_TAPS;

  logic up, dn, init, sat_hi, sat_lo;
  real  ic_ua;

  delay_line #(.N(N_PHASES)) u_delay_line (
    .clk_in (clk_in),
    .m      (m_code),
    .ic_ua  (ic_ua),
    .p      (phases)
  );

  false_lock_detector #(
    .N_TAPS     (N_TAPS),
    .UNDER_TAPS (UNDER_TAPS),
    .OVER_TAPS  (OVER_TAPS)
  ) u_fld (
    .clk   (clk_in),
    .rst_n (rst_n),
    .taps  (phases[N_TAPS-1:0]),
    .under (under),
    .over  (over)
  );

  binary_search #(.STEP_CYCLES(STEP_CYCLES)) u_bs (
    .clk   (clk_in),
    .rst_n (rst_n),
    .under (under),
    .over  (over),
    .up    (up),
    .dn    (dn),
    .sat_hi(sat_hi),
    .sat_lo(sat_lo),
    .m     (m_code),
    .state (state),
    .init  (init)
  );

  phase_detector u_pd (
    .clk   (clk_in),
    .rst_n (rst_n),
    .d     (phases[N_PHASES-1]),
    .early (early)
  );

  updn_logic u_updn_logic (
    .state (state),
    .early (early),
    .under (under),
    .over  (over),
    .up    (up),
    .dn    (dn)
  );

  updn_counter #(.CNT_BITS(CNT_BITS), .OUT_BITS(L_BITS)) u_counter (
    .clk      (clk_in),
    .rst_n    (rst_n),
    .init     (init),
    .up       (up),
    .dn       (dn),
    .count    (count),
    .lsb_code (l_code),
    .sat_hi   (sat_hi),
    .sat_lo   (sat_lo)
  );

  lsb_dac u_lsb_dac (
    .l     (l_code),
    .ic_ua (ic_ua)
  );

endmodule
