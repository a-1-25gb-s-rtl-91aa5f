`timescale 1ps / 1fs
// tb_cp_vco: self-checking test of the charge-pump / VCO model.
//
// With no pulses the VCO must run at its free period (808 ps) with clk_q a
// quarter period after clk_i. An UP pulse 100 ps ahead of a DOWN pulse must then shorten the
// period by (KP + KI) * 100 ps, and once the proportional part has been
// replaced by the next (zero-width) comparison by KI * 100 ps only.
module tb_cp_vco;
  logic up = 1'b0, dn = 1'b0, clk_i, clk_q;
  realtime ti, ti_prev, tq;
  int checks = 0, failures = 0;

  cp_vco #(.T0_PS(808.0), .KP(0.03), .KI(0.002)) dut (.up, .dn, .clk_i, .clk_q);

  always @(posedge clk_i) begin ti_prev = ti; ti = $realtime; end
  always @(posedge clk_q) tq = $realtime;

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  task automatic measure(input realtime exp_per);
    repeat (3) @(posedge clk_i);
    @(posedge clk_q);
    #0.01;
    checks += 2;
    if (!near(ti - ti_prev, exp_per)) failures++;
    if (!near(tq - ti, exp_per / 4.0)) failures++;
    $display("period %f (expected %f), I->Q %f", ti - ti_prev, exp_per, tq - ti);
  endtask

  initial begin
    measure(808.0);
    up = 1'b1; #100; dn = 1'b1; #0.001; up = 1'b0; dn = 1'b0;
    measure(808.0 - 3.2 + 0.032 * 0.001);
    up = 1'b1; dn = 1'b1; #0.001; up = 1'b0; dn = 1'b0;
    measure(808.0 - 0.2 + 0.002 * 0.001);
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
