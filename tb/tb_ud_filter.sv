`timescale 1ps / 1fs
// tb_ud_filter: self-checking test of the Up/Down filter.
//
// Random UP / DOWN / idle decisions (idle cycles included, as when the data
// has no transition) go in; a reference model kept as a signed run length
// (+n for n UPs in a row, -n for DOWNs) predicts a correction after every
// second equal decision. Outputs are compared one cycle later. It also checks
// that a lone UP between DOWNs is swallowed.
module tb_ud_filter;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, up = 1'b0, dn = 1'b0;
  logic up_f, dn_f;
  int checks = 0, failures = 0, n_upf = 0, n_dnf = 0, run = 0;
  bit exp_up = 0, exp_dn = 0;

  ud_filter #(.N(2)) dut (.clk, .rst_n, .up, .dn, .up_f, .dn_f);

  always #(T / 2) clk = ~clk;

  task automatic step(input bit u, input bit d);
    up = u; dn = d;
    @(posedge clk);
    #1;
    // reference model update for the decision just clocked in
    exp_up = 0; exp_dn = 0;
    if (u && !d) begin
      run = (run > 0) ? run + 1 : 1;
      if (run == 2) begin exp_up = 1; run = 0; end
    end else if (d && !u) begin
      run = (run < 0) ? run - 1 : -1;
      if (run == -2) begin exp_dn = 1; run = 0; end
    end
    checks++;
    if (up_f !== exp_up || dn_f !== exp_dn) begin
      failures++;
      if (failures < 10) $display("%t up=%b dn=%b -> up_f=%b dn_f=%b exp %b %b", $realtime, u, d, up_f, dn_f, exp_up, exp_dn);
    end
    n_upf += int'(up_f);
    n_dnf += int'(dn_f);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    // dither pattern: UP, DOWN, UP, DOWN: nothing may come out
    for (int i = 0; i < 8; i++) step(i % 2 == 0, i % 2 == 1);
    checks++;
    if (n_upf != 0 || n_dnf != 0) failures++;
    // UP, idle, UP -> one UP_F
    step(1, 0); step(0, 0); step(1, 0);
    checks++;
    if (n_upf != 1) failures++;
    for (int i = 0; i < 3000; i++) begin
      int r;
      r = $urandom_range(0, 3);
      step(r == 1 || r == 3 && $urandom_range(0, 1) == 1, r == 2);
    end
    checks++;
    if (n_upf < 100 || n_dnf < 100) failures++;
    $display("UP_F %0d DOWN_F %0d", n_upf, n_dnf);
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
