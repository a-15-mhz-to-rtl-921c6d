`timescale 1ns / 1ps
// msb_dac: behavioural model of the 4-bit binary-weighted MSB current DAC.
//
// This is an analog block; the model only reproduces its transfer
// function so that the digital loop can be simulated. One copy sits in
// every delay cell. Its current is I = I_OFFSET + M * I_UNIT, so that with
// the delay-line gain k (frequency per unit current) the 16 codes place
// the lock frequency at 15 MHz + n * (600 - 15)/15 MHz, n = 0..15, as the
// design specifies. Currents are in uA, with k = 1 MHz/uA assumed (the
// real k depends on the cell load and supply). The offset current sets
// the lowest frequency and the binary weights set the coarse step; the
// unit chosen for the current is this model's own.
//
// Interface: m = M3..M0 (m[3] = M3), i_ua = cell current in uA.
// Timing: the output follows the code with no delay.
module msb_dac #(
  parameter real I_OFFSET_UA = 15.0,               // current at M = 0000
  parameter real I_UNIT_UA   = (600.0 - 15.0) / 15.0  // weight of M0
) (
  input  logic [3:0] m,     // MSB code
  output real        i_ua   // DAC output current
);

  always_comb i_ua = I_OFFSET_UA + I_UNIT_UA * real'(m);

endmodule
