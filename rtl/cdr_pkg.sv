`timescale 1ps / 1fs
// cdr_pkg: constants and types shared by the digitally-controlled dual-loop CDR.
//
// The recovered-clock phase is one of 256 positions per unit interval, held by
// three chained controllers: a 2-bit quadrant (MUX) code, a 15-bit thermometer
// PI code (16 levels per quadrant) and a 2-bit DCDB code (4 delay steps per PI
// level). The widths are those of the published circuit (15-bit thermometer PI
// code, 2-bit DCDB and MUX codes, 256 levels); the names are this design's.
package cdr_pkg;
  localparam int unsigned PI_TAPS    = 15;  // thermometer bits of the PI code
  localparam int unsigned DCDB_BITS  = 2;   // DCDB code width (four delay steps)
  localparam int unsigned MUX_BITS   = 2;   // quadrant code width

  // Quadrant codes in the order the phase grows: 0, 1, 3, 2 (Gray order, so one
  // clock MUX switches at a time). Bit 0 inverts the I clock, bit 1 the Q clock.
  typedef enum logic [MUX_BITS-1:0] {
    QUAD_0   = 2'b00,  // I  .. Q      :   0 ..  90 degrees
    QUAD_90  = 2'b01,  // Q  .. /I     :  90 .. 180 degrees
    QUAD_180 = 2'b11,  // /I .. /Q     : 180 .. 270 degrees
    QUAD_270 = 2'b10   // /Q .. I      : 270 .. 360 degrees
  } quad_e;

  // Next quadrant going up / down in phase.
  function automatic quad_e quad_next(quad_e q);
    unique case (q)
      QUAD_0:   return QUAD_90;
      QUAD_90:  return QUAD_180;
      QUAD_180: return QUAD_270;
      default:  return QUAD_0;
    endcase
  endfunction

  function automatic quad_e quad_prev(quad_e q);
    unique case (q)
      QUAD_0:   return QUAD_270;
      QUAD_90:  return QUAD_0;
      QUAD_180: return QUAD_90;
      default:  return QUAD_180;
    endcase
  endfunction

  // In quadrants 0 and 180 the phase grows as the thermometer code fills; in
  // 90 and 270 it grows as the code empties (the clock being faded out is the
  // one that was just inverted).
  function automatic logic quad_rising(quad_e q);
    return (q == QUAD_0) || (q == QUAD_180);
  endfunction
endpackage
