`timescale 1ps / 1fs
// dcdb_ctrl: DCDB controller, the fine end of the phase pointer.
//
// A W-bit up/down counter (W = 2: four delay steps of the delay buffer). Each
// UP_F adds one fine step, each DOWN_F removes one. When it wraps (3 -> 0 going
// up, 0 -> 3 going down) it raises carry or borrow in the same cycle, so the PI
// controller moves one interpolation step on the same clock edge: the DCDB code
// runs 0,1,2,3 inside each PI code, as in the published phase-code plot. The
// combinational carry/borrow is this design's choice.
//
// Timing: code changes on the rising edge after inc/dec. Reset to 0,
// asynchronous, active low. inc and dec together count as neither.
module dcdb_ctrl #(
  parameter int unsigned W = cdr_pkg::DCDB_BITS
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] code,
  output logic         carry,
  output logic         borrow
);
  logic step_up, step_dn;
  assign step_up = inc & ~dec;
  assign step_dn = dec & ~inc;

  assign carry  = step_up && (code == '1);
  assign borrow = step_dn && (code == '0);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       code <= '0;
    else if (step_up) code <= code + 1'b1;
    else if (step_dn) code <= code - 1'b1;
endmodule
