`timescale 1ps / 1fs
// cdr_top: the dual-loop clock and data recovery circuit, reference PLL plus
// one CDR channel.
//
// Outer loop: the reference PLL multiplies a 156.25 MHz external clock by 8 and
// hands two 1.25 GHz clocks in quadrature (I, Q) to the channel. Inner loop:
// the channel (cdr_core) picks, mixes and delays these clocks to put a
// recovered clock on the 1.25 Gb/s input data with 1/256 of a bit period of
// resolution, and retimes the data with it. In a multi-channel chip the PLL is
// shared and only cdr_core is repeated. The PLL's analog parts and the
// channel's interpolator and delay buffer are behavioural models, so this top
// is for simulation; everything else is synthesizable logic.
//
// Parameters: DCDB_ERR_PCT is the delay-step error of the DCDB in percent
// (the published circuit sets it with a tuning bias for test), FILTER_N the
// number of equal phase-detector decisions per correction, VCO_T0_PS the
// free-running VCO period before the PLL locks. All other outputs besides
// rclk/rdata are brought out for observation.
module cdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned FILTER_N     = 2,
  parameter int          DCDB_ERR_PCT = 0,
  parameter real         VCO_T0_PS    = 808.0
) (
  input  logic                 ext_clk,
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
  output logic [DCDB_BITS-1:0] dcdb_c,
  output logic                 clk_i,
  output logic                 clk_q,
  output logic                 pll_up,
  output logic                 pll_dn
);
  ref_pll #(.DIV(8), .T0_PS(VCO_T0_PS)) u_pll (
    .ext_clk, .rst_n, .clk_i, .clk_q, .up(pll_up), .dn(pll_dn)
  );

  cdr_core #(.FILTER_N(FILTER_N), .DCDB_ERR_PCT(DCDB_ERR_PCT)) u_core (
    .clk_i, .clk_q, .rst_n, .din, .rclk, .rdata, .up, .dn, .up_f, .dn_f,
    .mux_sel, .pi_therm, .dcdb_c
  );
endmodule
