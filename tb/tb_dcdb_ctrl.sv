`timescale 1ps / 1fs
// tb_dcdb_ctrl: self-checking test of the 2-bit DCDB up/down counter.
//
// Random inc/dec/idle (and the illegal both-at-once, which must hold) against
// an integer model modulo 4; carry must show exactly on 3 -> 0 going up and
// borrow on 0 -> 3 going down, in the cycle of the request.
module tb_dcdb_ctrl;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0, dec = 1'b0;
  logic [1:0] code;
  logic carry, borrow;
  int checks = 0, failures = 0, m = 0, n_carry = 0, n_borrow = 0;

  dcdb_ctrl #(.W(2)) dut (.clk, .rst_n, .inc, .dec, .code, .carry, .borrow);

  always #(T / 2) clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      bit ec, eb;
      {inc, dec} = 2'($urandom);
      #1;
      ec = inc && !dec && m == 3;
      eb = dec && !inc && m == 0;
      checks++;
      if (carry !== ec || borrow !== eb) failures++;
      n_carry += int'(carry);
      n_borrow += int'(borrow);
      @(posedge clk);
      #1;
      if (inc && !dec) m = (m + 1) % 4;
      if (dec && !inc) m = (m + 3) % 4;
      checks++;
      if (code !== 2'(m)) failures++;
    end
    checks++;
    if (n_carry < 20 || n_borrow < 20) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 3000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
