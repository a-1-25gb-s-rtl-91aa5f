`timescale 1ps / 1fs
// phase_interp: behavioural model of the 4-bit phase interpolator. Not
// synthesizable: it stands for an analog current-mode mixer.
//
// The interpolator adds two clocks a quarter period apart, weighted by a
// thermometer-coded current DAC: with k of the TAPS = 15 control bits set, the
// output edge sits at the fraction w = (k + 0.5) / 16 of the way from clk_a's
// edge to clk_b's edge. The half-unit offset is this model's choice: it keeps
// the 64 levels of a full turn (four quadrants x 16 levels) evenly spaced when
// a quadrant change inverts the clock whose weight is 0.5/16. A real mixer
// adds curvature (the published phase-transfer curve shows such steps); this
// model is linear.
//
// How it works: on every rising edge of either input it takes the last rising
// edge of each, brings them within half a period of each other (the inputs are
// periodic), mixes them, adds LATENCY_PS and, if that edge lies in the future
// and at least half a period after the last one scheduled, schedules an output
// pulse of half a period. The period is measured on clk_a, accepting only
// values within 10 % of the nominal one so that a MUX switch cannot corrupt it.
// A MUX switch does disturb one output edge by at most 1/32 of a period.
module phase_interp #(
  parameter int unsigned TAPS       = cdr_pkg::PI_TAPS,
  parameter real         T_NOM_PS   = 800.0,
  parameter real         LATENCY_PS = 100.0
) (
  input  logic            clk_a,
  input  logic            clk_b,
  input  logic [TAPS-1:0] therm,
  output logic            clk_out
);
  realtime ta, tb, ta_prev, period, last_sched;

  initial begin
    ta         = -1.0e9;
    tb         = -1.0e9;
    ta_prev    = -1.0e9;
    period     = T_NOM_PS;
    last_sched = -1.0e9;
    clk_out    = 1'b0;
  end

  task automatic pulse(input realtime delay, input realtime width);
    #(delay) clk_out = 1'b1;
    #(width) clk_out = 1'b0;
  endtask

  function automatic realtime weight(input logic [TAPS-1:0] t);
    return (real'($countones(t)) + 0.5) / real'(TAPS + 1);
  endfunction

  always @(posedge clk_a) begin
    realtime p;
    ta_prev = ta;
    ta      = $realtime;
    p       = ta - ta_prev;
    if (p > 0.9 * T_NOM_PS && p < 1.1 * T_NOM_PS) period = p;
  end

  always @(posedge clk_b) tb = $realtime;

  always @(posedge clk_a or posedge clk_b) begin
    realtime a, b, t_out, w;
    // Let the edge-time updates above run first.
    #0;
    a = ta;
    b = tb;
    if (a > -1.0e8 && b > -1.0e8) begin
      while (b - a >  period / 2.0) b = b - period;
      while (a - b >  period / 2.0) b = b + period;
      w     = weight(therm);
      t_out = a + w * (b - a) + LATENCY_PS;
      while (t_out <= $realtime) t_out = t_out + period;
      if (t_out > last_sched + period / 2.0) begin
        last_sched = t_out;
        fork
          pulse(t_out - $realtime, period / 2.0);
        join_none
      end
    end
  end

endmodule
