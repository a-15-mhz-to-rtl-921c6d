`timescale 1ns / 1ps
// lsb_dac: behavioural model of the 6-bit unit-element LSB current DAC.
//
// This is an analog block; the model only reproduces its transfer
// function. A single LSB DAC is shared by all delay cells and adds
// I = L * I_UNIT to each cell's current. The full LSB range (63 units)
// spans two MSB steps, so adjacent MSB codes overlap and mismatch in the
// MSB DAC cannot leave frequency gaps: one LSB is 2*(600-15)/(63*15) MHz,
// about 1.24 MHz of lock frequency. Currents are in uA with k = 1 MHz/uA
// assumed, as in msb_dac.
//
// Interface: l = L5..L0, ic_ua = current added to every cell.
// Timing: the output follows the code with no delay.
module lsb_dac #(
  parameter real I_UNIT_UA = 2.0 * (600.0 - 15.0) / (63.0 * 15.0)  // one LSB
) (
  input  logic [5:0] l,      // LSB code from the counter's top bits
  output real        ic_ua   // shared control current Ic
);

  always_comb ic_ua = I_UNIT_UA * real'(l);

endmodule
