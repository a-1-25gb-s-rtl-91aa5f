`timescale 1ps / 1fs
// cdr_controller: the CDR controller, MUX, PI and DCDB controllers chained.
//
// Together the three hold an 8-bit phase pointer (256 positions per unit
// interval): quadrant (2 bits, Gray order), PI level (15-bit thermometer, 16
// levels) and DCDB step (2 bits). UP_F moves the recovered clock one step
// later, DOWN_F one step earlier. The DCDB counter wraps into the PI shift
// register, which at a quadrant end steps the MUX counter; all three change on
// the same rising edge. The split into these three controllers follows the
// published circuit; the chaining details are described in each sub-block.
//
// Timing: codes change on the rising edge after up_f/dn_f (one cycle latency).
// Reset to phase 0 (quadrant 0, empty PI code, DCDB 0), asynchronous, active low.
module cdr_controller
  import cdr_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 up_f,
  input  logic                 dn_f,
  output logic [MUX_BITS-1:0]  mux_sel,
  output logic [PI_TAPS-1:0]   pi_therm,
  output logic [DCDB_BITS-1:0] dcdb_c
);
  logic d_carry, d_borrow, p_carry, p_borrow, rising;

  dcdb_ctrl #(.W(DCDB_BITS)) u_dcdb_ctrl (
    .clk, .rst_n, .inc(up_f), .dec(dn_f),
    .code(dcdb_c), .carry(d_carry), .borrow(d_borrow)
  );

  pi_ctrl #(.TAPS(PI_TAPS)) u_pi_ctrl (
    .clk, .rst_n, .inc(d_carry), .dec(d_borrow), .rising,
    .therm(pi_therm), .carry(p_carry), .borrow(p_borrow)
  );

  mux_ctrl u_mux_ctrl (
    .clk, .rst_n, .inc(p_carry), .dec(p_borrow),
    .sel(mux_sel), .rising
  );
endmodule
