`timescale 1ps / 1fs
// dcdb: behavioural model of the digitally-controlled delay buffer. Not
// synthesizable: it stands for a current-starved CMOS inverter stage.
//
// The buffer's charge and discharge currents are cut in binary-weighted steps
// by the 2-bit code c, so its delay grows in four equal steps:
//   delay = D0_PS + c * STEP_PS * (1 + ERR_PCT / 100)
// STEP_PS is the target step, one 256th of the 800 ps period, i.e. a quarter
// of a phase-interpolator step, so that the buffer adds three evenly spaced
// points between two interpolator levels. ERR_PCT is the relative error of the
// step caused by process, voltage and temperature (in silicon it is set by a
// tuning bias for test), defined as (actual step - ideal step) / ideal step.
// The delay formula and D0_PS are this model's; the four binary-weighted steps
// and the error definition are the published circuit's. Each input edge is
// passed on after the delay valid at that edge (transport delay, non-inverting
// as a pair of stages).
module dcdb #(
  parameter real STEP_PS = 3.125,
  parameter real D0_PS   = 50.0,
  parameter int  ERR_PCT = 0
) (
  input  logic       vin,
  input  logic [1:0] c,
  output logic       vout
);
  task automatic drive(input realtime delay, input logic v);
    #(delay) vout = v;
  endtask

  function automatic realtime delay_of(input logic [1:0] code);
    return D0_PS + real'(code) * STEP_PS * (1.0 + real'(ERR_PCT) / 100.0);
  endfunction

  always @(vin) begin
    realtime d;
    d = delay_of(c);
    fork
      drive(d, vin);
    join_none
  end

  initial vout = 1'b0;
endmodule
