`timescale 1ps / 1fs
// cdr_core: one channel of the dual-loop CDR, the phase alignment loop.
//
// Two 2:1 MUXes pick I or /I and Q or /Q from the shared reference PLL, the
// phase interpolator mixes the two picked clocks in 16 levels, and the
// digitally-controlled delay buffer (DCDB) delays the result by 0..3 quarter
// levels. The DCDB output is the recovered clock. It clocks the bang-bang phase
// detector, whose UP/DOWN go through the Up/Down filter (two equal decisions in
// a row make one correction) into the controller, which moves the 8-bit phase
// pointer (256 positions per bit period) one step per correction. This
// negative feedback loop keeps the recovered clock's falling edge on the data
// transitions and its rising edge in the middle of the bit.
//
// The loop structure follows the published block diagram. Because the PI and
// DCDB are behavioural models of analog parts, this module is a simulation
// model as a whole; the logic in it (BBPD, filter, controller, MUXes) is
// synthesizable. rclk runs at the reference frequency; rdata is valid on its
// rising edge. The phase-code outputs are brought out for observation.
module cdr_core
  import cdr_pkg::*;
#(
  parameter int unsigned FILTER_N     = 2,
  parameter int          DCDB_ERR_PCT = 0
) (
  input  logic                 clk_i,
  input  logic                 clk_q,
  input  logic                 rst_n,
  input  logic                 din,
  output logic                 rclk,
  output logic                 rdata,
  output logic                 up,
  output logic                 dn,
  output logic                 up_f,
  output logic                 dn_f,
  output logic [MUX_BITS-1:0]  mux_sel,
  output logic [PI_TAPS-1:0]   pi_therm,
  output logic [DCDB_BITS-1:0] dcdb_c
);
  logic clk_a, clk_b, clk_pi;

  clk_mux2 u_mux_i (.clk_in(clk_i), .sel(mux_sel[0]), .clk_out(clk_a));
  clk_mux2 u_mux_q (.clk_in(clk_q), .sel(mux_sel[1]), .clk_out(clk_b));

  phase_interp #(.TAPS(PI_TAPS)) u_pi (
    .clk_a, .clk_b, .therm(pi_therm), .clk_out(clk_pi)
  );

  dcdb #(.ERR_PCT(DCDB_ERR_PCT)) u_dcdb (.vin(clk_pi), .c(dcdb_c), .vout(rclk));

  bbpd u_bbpd (.clk(rclk), .rst_n, .din, .up, .dn, .rdata);

  ud_filter #(.N(FILTER_N)) u_filter (.clk(rclk), .rst_n, .up, .dn, .up_f, .dn_f);

  cdr_controller u_ctrl (
    .clk(rclk), .rst_n, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c
  );
endmodule
