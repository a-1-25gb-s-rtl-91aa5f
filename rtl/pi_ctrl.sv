`timescale 1ps / 1fs
// pi_ctrl: PI controller, a bidirectional shift register holding the
// thermometer code of the phase interpolator's current DAC.
//
// TAPS = 15 bits give 16 interpolation levels per quadrant. Ones enter at bit 0
// (code fills) or zeros enter at bit TAPS-1 (code empties). Whether a phase
// step up fills or empties the code depends on the quadrant: `rising` is 1
// where the phase grows as the code fills. At the end of a quadrant (full when
// moving towards full, empty when moving towards empty) the register holds and
// raises carry (phase going up) or borrow (phase going down) for the MUX
// controller instead; the next quadrant then starts from this same code, now
// read in the other direction. The shift-register form and width follow the
// published controller; the fill side and the quadrant handover are this
// design's.
//
// Timing: the code changes on the rising edge after inc/dec; carry/borrow are
// combinational. Reset to all zeros, asynchronous, active low.
module pi_ctrl #(
  parameter int unsigned TAPS = cdr_pkg::PI_TAPS
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            inc,
  input  logic            dec,
  input  logic            rising,
  output logic [TAPS-1:0] therm,
  output logic            carry,
  output logic            borrow
);
  logic fill, empty_step, full, empty, step;

  // Direction of the shift for this step: fill when (up and rising) or
  // (down and falling).
  assign step       = inc ^ dec;
  assign fill       = step && (inc == rising);
  assign empty_step = step && (inc != rising);
  assign full       = therm[TAPS-1];
  assign empty      = ~therm[0];

  assign carry  = inc & ~dec & ((fill & full) | (empty_step & empty));
  assign borrow = dec & ~inc & ((fill & full) | (empty_step & empty));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  therm <= '0;
    else if (fill && !full)      therm <= {therm[TAPS-2:0], 1'b1};
    else if (empty_step && !empty) therm <= {1'b0, therm[TAPS-1:1]};

  // The register only ever holds a thermometer code.
  a_therm: assert property (@(posedge clk) disable iff (!rst_n)
                             ((therm + 1'b1) & therm) == '0)
    else $error("pi_ctrl: not a thermometer code: %b", therm);
endmodule
