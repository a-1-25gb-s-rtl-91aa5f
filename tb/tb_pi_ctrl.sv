`timescale 1ps / 1fs
// tb_pi_ctrl: self-checking test of the 15-bit bidirectional thermometer
// shift register.
//
// The model is the number of ones k (0..15). A phase step up fills the code
// when `rising` is 1 and empties it otherwise (a step down does the reverse);
// at the end it would run past, the code holds and carry (up) or borrow
// (down) is raised in the same cycle. Random steps with a random direction
// bit; the code must equal (1 << k) - 1 after every edge.
module tb_pi_ctrl;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, inc = 1'b0, dec = 1'b0, rising = 1'b1;
  logic [14:0] therm;
  logic carry, borrow;
  int checks = 0, failures = 0, k = 0, n_carry = 0, n_borrow = 0, n_full = 0;

  pi_ctrl #(.TAPS(15)) dut (.clk, .rst_n, .inc, .dec, .rising, .therm, .carry, .borrow);

  always #(T / 2) clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      bit fill, emp, ec, eb;
      int r;
      r = $urandom_range(0, 9);
      // long runs in one direction so the code reaches both ends
      if (i % 200 == 0) rising = 1'($urandom);
      inc = (r < 6) ^ (i % 400 >= 200) && r != 9;
      dec = !inc && r != 9;
      #1;
      fill = (inc && rising) || (dec && !rising);
      emp  = (inc && !rising) || (dec && rising);
      ec = inc && ((fill && k == 15) || (emp && k == 0));
      eb = dec && ((fill && k == 15) || (emp && k == 0));
      checks++;
      if (carry !== ec || borrow !== eb) failures++;
      n_carry += int'(carry);
      n_borrow += int'(borrow);
      @(posedge clk);
      #1;
      if (fill && k < 15) k++;
      else if (emp && k > 0) k--;
      if (k == 15) n_full++;
      checks++;
      if (therm !== 15'((32'd1 << k) - 1)) begin
        failures++;
        if (failures < 10) $display("k=%0d therm=%b", k, therm);
      end
    end
    checks++;
    if (n_carry < 5 || n_borrow < 5 || n_full < 5) failures++;
    $display("carry %0d borrow %0d", n_carry, n_borrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 5000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
