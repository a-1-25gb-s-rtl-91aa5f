`timescale 1ps / 1fs
// clk_mux2: 2:1 clock MUX choosing a reference clock or its inverse.
//
// The reference PLL delivers two differential clocks in quadrature (I, Q).
// Inverting a differential clock (swapping its two wires) gives the other two
// phases, so a 2:1 MUX per clock reaches all four phases 0, 90, 180 and 270
// degrees. Here the pair is carried single-ended and sel = 1 picks the
// inverted clock. The MUX switches only while the phase interpolator gives this
// clock its smallest weight (see pi_ctrl), so the switching step is small.
// Purely combinational.
module clk_mux2 (
  input  logic clk_in,
  input  logic sel,
  output logic clk_out
);
  always_comb clk_out = sel ? ~clk_in : clk_in;
endmodule
