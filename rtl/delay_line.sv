`timescale 1ns / 1ps
// delay_line: behavioural model of the 12-cell current-starved delay line.
//
// This is an analog block. Each of the N cells (two current-starved
// inverters in silicon) is modelled as a pure transport delay whose value
// comes from the cell's current: the cell's own MSB DAC current plus the
// shared LSB DAC current Ic. With F = k * I the frequency at which the
// whole line delays by exactly one period, the cell delay is
// 1 / (N * k * I). The delay of an edge is fixed when the edge enters a
// cell, so a code change affects only edges launched after it.
//
// Interface: clk_in = P0, m = MSB code, ic_ua = LSB DAC current,
// p[n-1] = phase Pn (n = 1..N), p[N-1] = P12 feeds the phase detector.
// Timing: Pn is P0 delayed by n cell delays. The equal cells, the
// per-cell MSB DAC and the shared LSB DAC follow the design; the linear
// current-to-frequency law (k = 1 MHz/uA) is this model's own.
// Lint notes: the delay value is a run-time real, so the tools cannot prove
// it non-zero (it never is: the smallest cell current is 15 uA); and the
// tap nodes are clocks of the detector flip-flops as well as data, which is
// the point of the circuit.
module delay_line #(
  parameter int unsigned N          = 12,   // delay cells
  parameter real         K_MHZ_PER_UA = 1.0 // delay-line gain k
) (
  input  logic         clk_in,  // P0
  input  logic [3:0]   m,       // MSB code, to every cell's MSB DAC
  input  real          ic_ua,   // shared LSB DAC current
  output logic [N-1:0] p        // p[0] = P1 ... p[N-1] = P(N)
);

  logic [N:0] node;  // node[0] = P0, node[n] = Pn

  assign node[0] = clk_in;
  assign p       = node[N:1];

  for (genvar i = 0; i < N; i++) begin : g_cell
    real i_msb_ua;  // this cell's MSB DAC current
    real dly_ns;    // this cell's delay

    msb_dac u_msb_dac (.m(m), .i_ua(i_msb_ua));

    always_comb dly_ns = 1000.0 / (K_MHZ_PER_UA * (i_msb_ua + ic_ua) * real'(N));

    initial node[i+1] = 1'b0;

    // transport delay: every input transition is replayed dly_ns later,
    // with the delay in force when the transition entered the cell
    always @(node[i]) begin
      automatic logic v = node[i];
      automatic real  d = dly_ns;
      fork
        begin
          #(d) node[i+1] = v;
        end
      join_none
    end
  end

endmodule
