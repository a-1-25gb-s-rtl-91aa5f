`timescale 1ps / 1fs
// tb_clk_mux2: self-checking test of the clock / inverted-clock MUX.
module tb_clk_mux2;
  logic clk_in = 1'b0, sel = 1'b0, clk_out;
  int checks = 0, failures = 0;

  clk_mux2 dut (.clk_in, .sel, .clk_out);

  initial begin
    for (int i = 0; i < 200; i++) begin
      {clk_in, sel} = 2'($urandom);
      #10;
      checks++;
      if (clk_out !== (clk_in ^ sel)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
