`timescale 1ns / 1ps
// updn_counter: linear-loop counter feeding the LSB DAC.
//
// A 9-bit up/down counter, loaded with its mid-range value (256) while
// `init` is high (reset and binary search), then moved one count per clock
// by up/dn. Only its top 6 bits drive the LSB DAC (L5..L0); the three
// lowest bits (C2..C0) are dropped. Dropping them makes the DAC code change
// only after eight net moves in one direction, which filters the random
// up/down decisions the bang-bang phase detector makes around lock and so
// lowers steady-state jitter.
//
// Interface: clk = P0; up/dn from updn_logic; lsb_code = count[8:3];
// sat_hi/sat_lo flag the two ends of the range for the coarse carry.
// Timing: the count changes on the clock edge after up/dn.
// Width, mid-range start and truncation follow the design. Saturation at
// 0 and 511 (instead of wrapping) is this implementation's choice.
module updn_counter #(
  parameter int unsigned CNT_BITS = 9,  // counter width
  parameter int unsigned OUT_BITS = 6   // bits sent to the LSB DAC
) (
  input  logic                clk,       // P0
  input  logic                rst_n,     // asynchronous reset, active low
  input  logic                init,      // hold at mid-range
  input  logic                up,        // count up
  input  logic                dn,        // count down
  output logic [CNT_BITS-1:0] count,     // full counter value
  output logic [OUT_BITS-1:0] lsb_code,  // L = count[CNT_BITS-1 -: OUT_BITS]
  output logic                sat_hi,    // count is at its maximum
  output logic                sat_lo     // count is zero
);

  localparam logic [CNT_BITS-1:0] MID = CNT_BITS'(1) << (CNT_BITS - 1);
  localparam logic [CNT_BITS-1:0] MAX = '1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          count <= MID;
    else if (init)                       count <= MID;
    else if (up && !dn && count != MAX)  count <= count + 1'b1;
    else if (dn && !up && count != '0)   count <= count - 1'b1;
  end

  assign lsb_code = count[CNT_BITS-1 -: OUT_BITS];
  assign sat_hi   = (count == MAX);
  assign sat_lo   = (count == '0);

endmodule
