`timescale 1ps / 1fs
// bbpd: bang-bang (Alexander, early/late) phase detector with data retiming.
//
// The input data is sampled on the rising edge of the recovered clock (data
// sample, the retimed data) and on its falling edge (edge sample, taken half a
// unit interval earlier, where a locked clock puts the data transitions). For
// every pair of adjacent data samples that differ, the edge sample between them
// says whether the clock is early or late:
//   edge == previous bit  -> the transition came after the edge sample: clock
//                            early, UP (move the clock phase later);
//   edge == current bit   -> clock late, DOWN (move the clock phase earlier).
// No transition gives neither. The published circuit only says that the BBPD
// compares data and clock phase and gives UP or DOWN; the Alexander structure,
// the polarity of UP and the output registers are this design's choices.
//
// Timing: full rate (one bit per clock). The edge sample is retimed to the
// rising edge; up/dn are registered and valid for one cycle, two rising edges
// after the data sample that decides them. rdata is the data sample, one cycle
// after it was taken. Reset is asynchronous, active low.
module bbpd (
  input  logic clk,
  input  logic rst_n,
  input  logic din,
  output logic up,
  output logic dn,
  output logic rdata
);
  logic e_neg;        // edge sample, falling edge
  logic d_cur, d_prv; // last two data samples
  logic e_mid;        // edge sample between d_prv and d_cur

  always_ff @(negedge clk or negedge rst_n)
    if (!rst_n) e_neg <= 1'b0;
    else        e_neg <= din;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_cur <= 1'b0;
      d_prv <= 1'b0;
      e_mid <= 1'b0;
    end else begin
      d_cur <= din;
      d_prv <= d_cur;
      e_mid <= e_neg;
    end

  // At this rising edge d_cur holds bit n, d_prv bit n-1, e_mid the edge
  // sample between them.
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      up <= 1'b0;
      dn <= 1'b0;
    end else begin
      up <= (d_cur != d_prv) && (e_mid == d_prv);
      dn <= (d_cur != d_prv) && (e_mid == d_cur);
    end

  assign rdata = d_cur;

  a_exclusive: assert property (@(posedge clk) disable iff (!rst_n) !(up && dn))
    else $error("bbpd: UP and DOWN together");
endmodule
