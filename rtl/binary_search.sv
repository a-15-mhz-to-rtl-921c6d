`timescale 1ns / 1ps
// binary_search: split-control state machine of the DLL.
//
// Coarse loop: a successive-approximation search sets the 4-bit MSB code
// M3..M0 in four steps (states BS1..BS4, one per bit, MSB first), using
// the false-locking detector's UNDER and OVER flags. Each step starts with
// the bit under test set to 1; when the delay is still out of range, UNDER
// (delay too short, current too high) clears the bit and OVER (delay too
// long) keeps it, and the next lower bit is tried. As soon as neither flag
// is set the loop is "coarsely locked" and control passes to the linear
// search (state LINEAR), where the phase detector drives the 9-bit counter.
// If the range is still missed after bit M0, the machine enters LINEAR_NIR
// (linear search, not in range): the counter is then driven by UNDER/OVER
// until both drop, and LINEAR follows. From LINEAR, any UNDER or OVER
// (a frequency change) restarts the binary search; an external reset
// restarts it from ST_RESET, which first checks whether the initial code
// is already in range.
//
// Fine-range carry: the coarse window is wider than the reach of the fine
// code, so at high frequencies the linear loop can run its counter to an
// end. When the counter sits at its maximum and is asked to count up, M is
// raised by one and the counter restarts at mid-range (a borrow works the
// same way at zero). Because the LSB range spans two MSB steps, the
// restarted code lies close to where the old one ended and no frequency is
// skipped. This carry is this implementation's addition for the case the
// design leaves open.
//
// Interface: clk = P0; under/over from the detector; up/dn and
// sat_hi/sat_lo from the up/down logic and counter (for the carry);
// m = MSB code; state for the up/down logic; init loads the linear
// counter with mid-range while the coarse loop runs and on a carry.
// Timing: each check waits STEP_CYCLES clocks after the code changed,
// so that the delay line settles, the detector samples it and its output
// is registered here. A full search is therefore 4*STEP_CYCLES clocks.
// The states and transitions follow the design's state diagram; the
// step length, the initial code and the bit-decision rule are this
// implementation's choices.
module binary_search
  import dll_pkg::*;
#(
  parameter int unsigned        STEP_CYCLES = 3,        // clocks per search step
  parameter logic [M_BITS-1:0]  M_INIT      = 4'b1000   // code after reset
) (
  input  logic              clk,     // P0
  input  logic              rst_n,   // external reset, active low
  input  logic              under,   // delay below range
  input  logic              over,    // delay above range
  input  logic              up,      // linear loop counts up
  input  logic              dn,      // linear loop counts down
  input  logic              sat_hi,  // counter at its maximum
  input  logic              sat_lo,  // counter at zero
  output logic [M_BITS-1:0] m,       // MSB DAC code M3..M0 (m[3] = M3)
  output dll_state_e        state,   // current state
  output logic              init     // hold the linear counter at mid-range
);

  localparam logic [M_BITS-1:0] M_START = 4'b1000;  // first trial code
  localparam int unsigned TW = $clog2(STEP_CYCLES + 1);

  logic [TW-1:0] timer;
  logic          in_range;
  logic [1:0]    bit_idx;   // bit under test in BS1..BS4
  logic          linear;    // one of the two linear-search states
  logic          carry;     // fine range exhausted upward: M + 1
  logic          borrow;    // fine range exhausted downward: M - 1

  assign in_range = !under && !over;
  assign linear   = (state == ST_LINEAR) || (state == ST_LINEAR_NIR);
  assign carry    = linear && up && sat_hi && (m != '1);
  assign borrow   = linear && dn && sat_lo && (m != '0);
  assign init     = !linear || carry || borrow;

  always_comb begin
    unique case (state)
      ST_BS1:  bit_idx = 2'd3;
      ST_BS2:  bit_idx = 2'd2;
      ST_BS3:  bit_idx = 2'd1;
      default: bit_idx = 2'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_RESET;
      m     <= M_INIT;
      timer <= TW'(STEP_CYCLES - 1);
    end else begin
      unique case (state)
        ST_RESET: begin
          if (timer != '0) timer <= timer - 1'b1;
          else if (in_range) state <= ST_LINEAR;
          else begin
            state <= ST_BS1;
            m     <= M_START;
            timer <= TW'(STEP_CYCLES - 1);
          end
        end
        ST_BS1, ST_BS2, ST_BS3, ST_BS4: begin
          if (timer != '0) timer <= timer - 1'b1;
          else if (in_range) state <= ST_LINEAR;
          else begin
            // keep the bit under test only when the line is still too slow
            m[bit_idx] <= over && !under;
            if (state == ST_BS4) state <= ST_LINEAR_NIR;
            else begin
              m[bit_idx - 1'b1] <= 1'b1;
              state <= dll_state_e'(state + 3'd1);
              timer <= TW'(STEP_CYCLES - 1);
            end
          end
        end
        ST_LINEAR: begin
          if (!in_range) begin  // UNDER or OVER changed: frequency moved
            state <= ST_BS1;
            m     <= M_START;
            timer <= TW'(STEP_CYCLES - 1);
          end else if (carry)  m <= m + 1'b1;
          else if (borrow)     m <= m - 1'b1;
        end
        ST_LINEAR_NIR: begin
          if (in_range) state <= ST_LINEAR;
          if (carry)       m <= m + 1'b1;
          else if (borrow) m <= m - 1'b1;
        end
        default: state <= ST_RESET;
      endcase
    end
  end

  initial assert (STEP_CYCLES >= 1) else $error("binary_search: STEP_CYCLES must be >= 1");

endmodule
