`timescale 1ps / 1fs
// cp_vco: behavioural model of the reference PLL's charge pump, loop filter and
// quadrature VCO. Not synthesizable: it stands for analog circuits.
//
// The VCO runs at period `per` and drives two clocks in quadrature: clk_q rises
// a quarter period after clk_i. The charge pump is modelled at the level of
// whole PFD comparisons: when a comparison ends (UP and DOWN both low again),
// the phase error e = width(UP) - width(DOWN) updates an integral period term
// and a proportional one, as a charge pump into a series R-C filter would:
//   per_int <= per_int - KI*e ;  per = per_int - KP*e
// (a positive error means the VCO lags, so its period shrinks). The published
// circuit only names these blocks; the gains and the free-running period T0_PS
// are this model's, as is the tuning range (half to twice T0_PS), which also
// keeps the model finite if the loop is wired with the wrong sign. Times in
// picoseconds.
module cp_vco #(
  parameter real T0_PS = 808.0,  // free-running period
  parameter real KP    = 0.03,   // proportional gain (ps of period per ps of error)
  parameter real KI    = 0.002   // integral gain
) (
  input  logic up,
  input  logic dn,
  output logic clk_i,
  output logic clk_q
);
  realtime per_int, per, t_up, t_dn, w_up, w_dn;
  bit      pending;  // a comparison has started and not been applied

  always @(posedge up) begin t_up = $realtime; pending = 1'b1; end
  always @(posedge dn) begin t_dn = $realtime; pending = 1'b1; end

  always @(negedge up or negedge dn) begin
    realtime e;
    if (!up && !dn && pending) begin
      pending = 1'b0;
      // Both outputs rose during this comparison; the earlier one is the
      // wider pulse.
      w_up = $realtime - t_up;
      w_dn = $realtime - t_dn;
      e    = w_up - w_dn;
      per_int = per_int - KI * e;
      per     = per_int - KP * e;
      // the VCO's tuning range: half to twice the free-running period
      if (per < T0_PS / 2.0) per = T0_PS / 2.0;
      if (per > T0_PS * 2.0) per = T0_PS * 2.0;
    end
  end

  initial begin
    per_int = T0_PS;
    per     = T0_PS;
    pending = 1'b0;
    clk_i   = 1'b0;
    clk_q   = 1'b0;
    t_up    = 0.0;
    t_dn  = 0.0;
    forever begin
      clk_i = 1'b1; #(per / 4.0);
      clk_q = 1'b1; #(per / 4.0);
      clk_i = 1'b0; #(per / 4.0);
      clk_q = 1'b0; #(per / 4.0);
    end
  end
endmodule
