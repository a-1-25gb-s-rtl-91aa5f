`timescale 1ps / 1fs
// mux_ctrl: MUX controller, the coarse end of the phase pointer.
//
// A 2-bit up/down counter that counts in the Gray order 0, 1, 3, 2 (quadrants
// 0, 90, 180 and 270 degrees), so that a quadrant change flips one clock MUX
// only. sel[0] inverts the I clock and sel[1] the Q clock. It steps on the PI
// controller's carry (up) and borrow (down) and tells the PI controller which
// way the thermometer code runs in the current quadrant. The Gray order is
// the one printed on the published phase-code plot; the bit-to-MUX mapping is
// this design's.
//
// Timing: sel changes on the rising edge after inc/dec. Reset to quadrant 0,
// asynchronous, active low.
module mux_ctrl
  import cdr_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  input  logic                inc,
  input  logic                dec,
  output logic [MUX_BITS-1:0] sel,
  output logic                rising
);
  quad_e q;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)          q <= QUAD_0;
    else if (inc && !dec) q <= quad_next(q);
    else if (dec && !inc) q <= quad_prev(q);

  assign sel    = q;
  assign rising = quad_rising(q);
endmodule
