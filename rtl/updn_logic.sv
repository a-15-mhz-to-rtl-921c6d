`timescale 1ns / 1ps
// updn_logic: chooses what drives the linear-loop counter.
//
// In the linear search (state LINEAR) the counter follows the phase
// detector: when P12 leads P0 the line is too fast and the current must
// fall (count down); otherwise it must rise (count up). If the binary
// search ended without bringing the delay into range (state LINEAR_NIR),
// the phase detector output is ignored, because it could steer the loop
// toward a false lock, and UNDER/OVER steer the counter instead: UNDER
// (delay too short) counts down, OVER (delay too long) counts up. During
// reset and the binary search the counter does not move.
//
// Purely combinational. An up count raises the LSB DAC current and so
// shortens the delay. The selection rule follows the design; the mapping
// of each condition to a direction follows from the current-starved cell
// (more current, less delay).
module updn_logic
  import dll_pkg::*;
(
  input  dll_state_e state,  // controller state
  input  logic       early,  // phase detector: P12 leads P0
  input  logic       under,  // delay below the lock range
  input  logic       over,   // delay above the lock range
  output logic       up,     // count up (more current, less delay)
  output logic       dn      // count down (less current, more delay)
);

  always_comb begin
    up = 1'b0;
    dn = 1'b0;
    unique case (state)
      ST_LINEAR: begin
        up = ~early;
        dn = early;
      end
      ST_LINEAR_NIR: begin
        up = over & ~under;
        dn = under;
      end
      default: ;
    endcase
    assert (!(up && dn)) else $error("updn_logic: up and dn both asserted");
  end

endmodule
