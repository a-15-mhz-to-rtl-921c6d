`timescale 1ns / 1ps
// phase_detector: bang-bang phase detector of the linear loop.
//
// A single D flip-flop clocked by the rising edge of the input clock P0
// samples the delay-line output P12. With a 50% duty cycle and a total
// delay D between T/2 and 3T/2, the sample is 1 when P12 rose before P0
// (D < T, the line is too fast) and 0 when P12 is still low (D > T, the
// line is too slow). That one bit, `early`, is all the linear loop needs:
// it only tells the counter which way to move.
//
// Interface: clk = P0, d = P12, early = registered sample.
// Timing: early is valid one clock after the edge it describes.
// The flip-flop and what it compares follow the design; which input is
// the clock and which the data, and the asynchronous reset, are choices
// of this implementation.
module phase_detector (
  input  logic clk,     // P0, the input clock
  input  logic rst_n,   // asynchronous reset, active low
  input  logic d,       // P12, the delay-line output
  output logic early    // 1: P12 leads P0 (delay too short)
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) early <= 1'b0;
    else        early <= d;
  end

endmodule
