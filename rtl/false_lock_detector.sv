`timescale 1ns / 1ps
// false_lock_detector: range detector that prevents harmonic locking.
//
// At each rising edge of the input clock P0 the delay-line phases
// P1..P(N_TAPS) are sampled into flip-flops. With delay D spread over 12
// cells, tap n has delay n*D/12 and reads 1 when frac(n*D/(12T)) >= 0.5
// (50% duty cycle). Two signals are derived from the samples:
//   UNDER = 1 when all samples P1..P(UNDER_TAPS) are 0: the line is so
//           short that not even the 9th tap reaches half a period
//           (D below about 2T/3 at 50% duty cycle);
//   OVER  = 1 when a "1 then 0" pattern appears in two consecutive taps
//           among P1..P(OVER_TAPS): some tap has wrapped past a full
//           period, so D is well above T (a harmonic lock is possible).
// Defaults (9 taps for UNDER, 8 for OVER) are the ones the design uses;
// fewer UNDER taps widen the usable duty-cycle range for falling-edge
// locking. UNDER and OVER are combinational functions of the registered
// samples, so both are valid one clock after the sampling edge.
//
// Interface: clk = P0, taps[i] = P(i+1), under/over outputs.
module false_lock_detector #(
  parameter int unsigned N_TAPS     = 9,  // flip-flops, taps P1..P9
  parameter int unsigned UNDER_TAPS = 9,  // UNDER uses P1..P9
  parameter int unsigned OVER_TAPS  = 8   // OVER uses pairs within P1..P8
) (
  input  logic              clk,    // P0
  input  logic              rst_n,  // asynchronous reset, active low
  input  logic [N_TAPS-1:0] taps,   // taps[0] = P1 ... taps[N_TAPS-1] = P(N_TAPS)
  output logic              under,  // delay too short
  output logic              over    // delay too long / harmonic
);

  logic [N_TAPS-1:0] q;  // sampled phases

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= taps;
  end

  always_comb begin
    under = ~|q[UNDER_TAPS-1:0];
    over  = 1'b0;
    for (int n = 0; n < int'(OVER_TAPS) - 1; n++)
      over = over | (q[n] & ~q[n+1]);
  end

  initial begin
    assert (UNDER_TAPS <= N_TAPS && OVER_TAPS <= N_TAPS && OVER_TAPS >= 2)
      else $error("false_lock_detector: tap counts exceed sampled taps");
  end

endmodule
