`timescale 1ps / 1fs
// ref_pll: the reference PLL shared by all CDR channels.
//
// PFD -> charge pump/loop filter -> quadrature VCO -> divide-by-8 -> PFD, as in
// the published block diagram. From a 156.25 MHz external clock it makes two
// 1.25 GHz clocks in quadrature, I and Q. The PFD and the divider are logic;
// the charge pump and VCO are the behavioural model cp_vco, so this wrapper is
// a behavioural model as a whole. The PFD outputs are brought out so a test
// can watch the loop settle.
module ref_pll #(
  parameter int unsigned DIV   = 8,
  parameter real         T0_PS = 808.0
) (
  input  logic ext_clk,
  input  logic rst_n,
  output logic clk_i,
  output logic clk_q,
  output logic up,
  output logic dn
);
  logic fb;

  pfd u_pfd (.ref_clk(ext_clk), .fb_clk(fb), .rst_n, .up, .dn);

  cp_vco #(.T0_PS(T0_PS)) u_cp_vco (.up, .dn, .clk_i, .clk_q);

  clk_div #(.DIV(DIV)) u_div (.clk(clk_i), .rst_n, .clk_out(fb));
endmodule
