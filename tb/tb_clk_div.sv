`timescale 1ps / 1fs
// tb_clk_div: self-checking test of the divide-by-8 feedback divider.
//
// Counts input rising edges between output rising edges (must be 8) and the
// output's high time (must be 4 input periods).
module tb_clk_div;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, clk_out;
  int n = 0, checks = 0, failures = 0;
  realtime t_r = 0.0;

  clk_div #(.DIV(8)) dut (.clk, .rst_n, .clk_out);

  always #(T / 2) clk = ~clk;
  always @(posedge clk) n++;

  initial begin
    #(3 * T) rst_n = 1'b1;
    @(posedge clk_out);
    n = 0;
    t_r = $realtime;
    for (int i = 0; i < 20; i++) begin
      @(negedge clk_out);
      checks++;
      if ($realtime - t_r != 4 * T) failures++;
      @(posedge clk_out);
      checks++;
      if (n != 8) failures++;
      n = 0;
      t_r = $realtime;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
