`timescale 1ps / 1fs
// pfd: tri-state phase-frequency detector of the reference PLL.
//
// Two flip-flops with their D inputs tied high: UP is set by a rising edge of
// the external reference clock, DOWN by a rising edge of the divided VCO clock,
// and both are cleared as soon as both are set. The UP-minus-DOWN pulse width
// is the phase error handed to the charge pump. The published circuit only
// names this block; this is the textbook structure.
//
// Circuit note: the clear path (up & dn back into the asynchronous resets) is
// the intended asynchronous feedback of a PFD, so a tool may flag it as a
// loop. In simulation the clear happens in the same time step, so the pulse
// of the lagging input has zero width.
module pfd (
  input  logic ref_clk,
  input  logic fb_clk,
  input  logic rst_n,
  output logic up,
  output logic dn
);
  logic clr;
  assign clr = (up & dn) | ~rst_n;

  always_ff @(posedge ref_clk or posedge clr)
    if (clr) up <= 1'b0;
    else     up <= 1'b1;

  always_ff @(posedge fb_clk or posedge clr)
    if (clr) dn <= 1'b0;
    else     dn <= 1'b1;
endmodule
