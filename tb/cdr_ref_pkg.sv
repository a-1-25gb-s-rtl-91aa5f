`timescale 1ps / 1fs
// cdr_ref_pkg: reference model of the CDR phase pointer, for testbenches.
//
// A phase position p in 0..255 (one 256th of a bit period per step) maps to
//   quadrant   p / 64       -> MUX code 0, 1, 3, 2 (Gray order)
//   level      (p % 64) / 4 -> thermometer ones: level in quadrants 0 and 3,
//                              15 - level in quadrants 1 and 2
//   DCDB step  p % 4
// This is written as a plain table lookup, independent of the controller's
// chained-counter structure.
package cdr_ref_pkg;
  function automatic logic [1:0] exp_mux(input int p);
    logic [1:0] gray [4] = '{2'd0, 2'd1, 2'd3, 2'd2};
    return gray[(p / 64) % 4];
  endfunction

  function automatic int exp_ones(input int p);
    int q, lvl;
    q   = (p / 64) % 4;
    lvl = (p % 64) / 4;
    return (q == 0 || q == 2) ? lvl : 15 - lvl;
  endfunction

  function automatic logic [14:0] exp_therm(input int p);
    return 15'((32'd1 << exp_ones(p)) - 1);
  endfunction

  function automatic logic [1:0] exp_dcdb(input int p);
    return 2'(p % 4);
  endfunction
endpackage
