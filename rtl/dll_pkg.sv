`timescale 1ns / 1ps
// dll_pkg: constants and types shared by the split-control DLL.
//
// The DLL delays its input clock P0 through 12 current-starved cells and
// locks the total delay to one clock period, so the 12 taps P1..P12 are
// uniformly spaced clock phases. Its 10-bit control word is split in two:
// a 4-bit MSB code M (coarse, set by a binary search) and a 6-bit LSB
// code L (fine, the top 6 bits of a 9-bit up/down counter). These sizes are
// the ones the design is built around; the state type below lists the
// states of the split-control state machine (reset, four binary-search
// steps, linear search, and linear search while still out of range).
package dll_pkg;

  localparam int unsigned N_PHASES = 12;  // delay cells / output phases
  localparam int unsigned M_BITS   = 4;   // coarse (MSB) code width
  localparam int unsigned L_BITS   = 6;   // fine (LSB) code width
  localparam int unsigned CNT_BITS = 9;   // linear-loop counter width

  typedef enum logic [2:0] {
    ST_RESET      = 3'd0,  // after external reset: first range check
    ST_BS1        = 3'd1,  // binary search, bit M3
    ST_BS2        = 3'd2,  // binary search, bit M2
    ST_BS3        = 3'd3,  // binary search, bit M1
    ST_BS4        = 3'd4,  // binary search, bit M0
    ST_LINEAR     = 3'd5,  // linear search driven by the phase detector
    ST_LINEAR_NIR = 3'd6   // linear search driven by UNDER/OVER (not in range)
  } dll_state_e;

endpackage
