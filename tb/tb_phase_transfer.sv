`timescale 1ps / 1fs
// tb_phase_transfer: static phase-transfer curve of the MUX + PI + DCDB chain.
//
// The controller, the two clock MUXes, the interpolator and the delay buffer
// are wired as in a channel, but the loop is open: the test itself steps the
// phase pointer up through all 256 positions (and once more round to 0) and
// measures, after each step, the delay from the I clock's rising edge to the
// output's rising edge. Two chains run side by side:
//  * ideal DCDB step (error 0 %): every step must be 800/256 = 3.125 ps,
//    including at PI-level and quadrant changes, so the curve is a straight
//    line over one full period;
//  * DCDB step 50 % too large: inside a PI level the steps are 4.6875 ps, and
//    at each PI-level change the phase steps back by 3 * 4.6875 - 12.5 =
//    1.5625 ps: the "slipped" positions of an erroneous buffer make the curve
//    non-monotonic, while the PI levels themselves stay where they were.
module tb_phase_transfer;
  import cdr_ref_pkg::*;
  localparam realtime T = 800.0;
  localparam real     STEP = T / 256.0;

  logic clk_i = 1'b0, clk_q = 1'b0, rst_n = 1'b0, up_f = 1'b0, dn_f = 1'b0;
  logic [1:0] mux_sel, dcdb_c;
  logic [14:0] pi_therm;
  logic ca, cb, cpi, out0, out50;
  realtime t_i = 0.0, t_o0 = 0.0, t_o50 = 0.0;
  int checks = 0, failures = 0;

  cdr_controller ctrl (.clk(clk_i), .rst_n, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c);
  clk_mux2 mi (.clk_in(clk_i), .sel(mux_sel[0]), .clk_out(ca));
  clk_mux2 mq (.clk_in(clk_q), .sel(mux_sel[1]), .clk_out(cb));
  phase_interp pi (.clk_a(ca), .clk_b(cb), .therm(pi_therm), .clk_out(cpi));
  dcdb #(.ERR_PCT(0))  d0  (.vin(cpi), .c(dcdb_c), .vout(out0));
  dcdb #(.ERR_PCT(50)) d50 (.vin(cpi), .c(dcdb_c), .vout(out50));

  initial forever begin
    clk_i = 1'b1; #(T / 4); clk_q = 1'b1; #(T / 4);
    clk_i = 1'b0; #(T / 4); clk_q = 1'b0; #(T / 4);
  end
  always @(posedge clk_i) t_i = $realtime;
  always @(posedge out0)  t_o0 = $realtime;
  always @(posedge out50) t_o50 = $realtime;

  // delay from the latest I edge before the output edge, modulo the period
  function automatic real wrap(input real d);
    while (d < 0.0) d += T;
    while (d >= T) d -= T;
    return d;
  endfunction

  function automatic bit near(input real a, input real b);
    return (a - b < 0.01) && (b - a < 0.01);
  endfunction

  real ph0 [257], ph50 [257];

  initial begin
    #(2 * T) rst_n = 1'b1;
    for (int p = 0; p <= 256; p++) begin
      if (p > 0) begin
        @(negedge clk_i) up_f = 1'b1;
        @(negedge clk_i) up_f = 1'b0;
      end
      repeat (4) @(posedge clk_i);
      #(T - 1.0);
      ph0[p]  = wrap(t_o0 - t_i);
      ph50[p] = wrap(t_o50 - t_i);
      checks++;
      if (mux_sel !== exp_mux(p % 256) || pi_therm !== exp_therm(p % 256) || dcdb_c !== exp_dcdb(p % 256))
        failures++;
    end
    for (int p = 1; p <= 256; p++) begin
      real s0, s50, e50;
      s0  = wrap(ph0[p] - ph0[p - 1] + T / 2) - T / 2;
      s50 = wrap(ph50[p] - ph50[p - 1] + T / 2) - T / 2;
      e50 = (p % 4 == 0) ? 4.0 * STEP - 3.0 * 1.5 * STEP : 1.5 * STEP;
      checks += 2;
      if (!near(s0, STEP)) begin
        failures++;
        if (failures < 10) $display("ideal: step %0d is %f ps", p, s0);
      end
      if (!near(s50, e50)) begin
        failures++;
        if (failures < 10) $display("+50 %%: step %0d is %f ps, expected %f", p, s50, e50);
      end
    end
    checks++;
    if (!near(wrap(ph50[128] - ph0[128]), 0.0)) failures++;  // same PI level, DCDB 0
    $display("phase at pointer 0, 64, 128, 192: %.3f %.3f %.3f %.3f ps (ideal DCDB)",
             ph0[0], ph0[64], ph0[128], ph0[192]);
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
