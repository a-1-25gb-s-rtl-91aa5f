`timescale 1ps / 1fs
// tb_mux_ctrl: self-checking test of the quadrant (MUX) counter.
//
// The model is the quadrant index 0..3; its code must follow the Gray order
// 0, 1, 3, 2, exactly one bit must change per step, and `rising` must be 1 in
// quadrants 0 and 2 (codes 0 and 3).
module tb_mux_ctrl;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0, dec = 1'b0;
  logic [1:0] sel, prev;
  logic rising;
  int checks = 0, failures = 0, q = 0;
  logic [1:0] gray [4] = '{2'd0, 2'd1, 2'd3, 2'd2};

  mux_ctrl dut (.clk, .rst_n, .inc, .dec, .sel, .rising);

  always #(T / 2) clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 1000; i++) begin
      {inc, dec} = 2'($urandom);
      prev = sel;
      @(posedge clk);
      #1;
      if (inc && !dec) q = (q + 1) % 4;
      if (dec && !inc) q = (q + 3) % 4;
      checks++;
      if (sel !== gray[q] || rising !== (q == 0 || q == 2)) failures++;
      checks++;
      if ($countones(sel ^ prev) > 1) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 2000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
