`timescale 1ps / 1fs
// tb_ref_pll: self-checking test of the reference PLL.
//
// A 156.25 MHz (6400 ps) external clock; the VCO starts 1 % slow. After 300
// reference cycles the I clock must run at 800 ps within 0.05 ps, Q must
// follow I by 200 ps, and the PFD pulses must have shrunk below 2 ps. Both
// UP and DOWN corrections must have happened on the way.
module tb_ref_pll;
  localparam realtime TREF = 6400.0;
  logic ext_clk = 1'b0, rst_n = 1'b0, clk_i, clk_q, up, dn;
  realtime ti = 0.0, ti_prev = 0.0, tq = 0.0, t_up = 0.0, w_up = 0.0, t_dn = 0.0, w_dn = 0.0;
  int checks = 0, failures = 0, n_up = 0, n_dn = 0;

  ref_pll #(.DIV(8), .T0_PS(808.0)) dut (.ext_clk, .rst_n, .clk_i, .clk_q, .up, .dn);

  always #(TREF / 2) ext_clk = ~ext_clk;
  always @(posedge clk_i) begin ti_prev = ti; ti = $realtime; end
  always @(posedge clk_q) tq = $realtime;
  always @(posedge up) begin t_up = $realtime; end
  always @(posedge dn) begin t_dn = $realtime; end
  always @(negedge up) begin w_up = $realtime - t_up; if (w_up > 0.5) n_up++; end
  always @(negedge dn) begin w_dn = $realtime - t_dn; if (w_dn > 0.5) n_dn++; end

  initial begin
    #(2 * TREF + 100.0) rst_n = 1'b1;
    repeat (300) @(posedge ext_clk);
    repeat (4) @(posedge clk_q);
    #0.01;
    checks += 3;
    if ((ti - ti_prev) - 800.0 > 0.05 || 800.0 - (ti - ti_prev) > 0.05) failures++;
    if ((tq - ti) - 200.0 > 0.05 || 200.0 - (tq - ti) > 0.05) failures++;
    if (w_up > 2.0 || w_dn > 2.0) failures++;
    checks++;
    if (n_up == 0 || n_dn == 0) failures++;
    $display("period %f ps, I->Q %f ps, last UP %f DOWN %f, UP pulses %0d DOWN pulses %0d",
             ti - ti_prev, tq - ti, w_up, w_dn, n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(TREF * 400);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
