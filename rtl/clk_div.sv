`timescale 1ps / 1fs
// clk_div: feedback divider of the reference PLL (divide by DIV = 8).
//
// A free-running counter on the VCO clock; the output is high for the upper
// half of the count, so for an even DIV it is a square wave at 1/DIV of the
// input frequency whose rising edge follows the input edge on which the count
// reaches DIV/2. The ratio 8 is the published one (156.25 MHz x 8 = 1.25 GHz);
// the counter is this design's. Reset asynchronous, active low.
module clk_div #(
  parameter int unsigned DIV = 8
) (
  input  logic clk,
  input  logic rst_n,
  output logic clk_out
);
  localparam int unsigned CW = (DIV < 2) ? 1 : $clog2(DIV);
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt     <= '0;
      clk_out <= 1'b0;
    end else begin
      cnt     <= (cnt == CW'(DIV - 1)) ? '0 : cnt + 1'b1;
      clk_out <= (cnt >= CW'(DIV / 2 - 1)) && (cnt != CW'(DIV - 1));
    end
endmodule
