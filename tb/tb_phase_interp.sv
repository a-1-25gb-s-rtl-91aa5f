`timescale 1ps / 1fs
// tb_phase_interp: self-checking test of the phase interpolator model.
//
// Two 800 ps clocks a quarter period apart drive the model. For each number
// of ones k = 0..15, and for clk_b lagging or leading clk_a, the output's
// rising edge must sit at  t_a + (k + 0.5)/16 * (t_b - t_a) + 100 ps
// (modulo the period), within 0.01 ps. Three periods are allowed to settle
// after each code change.
module tb_phase_interp;
  localparam realtime T = 800.0;
  logic clk_a = 1'b0, clk_b = 1'b0, clk_out;
  logic [14:0] therm = '0;
  bit b_leads = 1'b0;
  realtime t_out = 0.0;
  int checks = 0, failures = 0;

  phase_interp #(.TAPS(15), .T_NOM_PS(800.0), .LATENCY_PS(100.0)) dut (
    .clk_a, .clk_b, .therm, .clk_out
  );

  // clk_a rises at k*T; clk_b rises T/4 later, or T/4 earlier when b_leads.
  initial forever begin
    #(T / 2) clk_a = 1'b1;
    #(T / 2) clk_a = 1'b0;
  end
  task automatic b_pulse(input realtime d);
    #(d) clk_b = 1'b1;
    #(T / 2) clk_b = 1'b0;
  endtask
  always @(posedge clk_a)
    fork
      b_pulse(b_leads ? 3 * T / 4 : T / 4);
    join_none

  always @(posedge clk_out) t_out = $realtime;

  initial begin
    for (int lead = 0; lead < 2; lead++) begin
      for (int k = 0; k < 16; k++) begin
        realtime ph, exp_ph;
        therm = 15'((32'd1 << k) - 1);
        repeat (4) @(posedge clk_a);
        #(T - 1.0);
        // phase of the last output edge relative to clk_a's rising edges
        ph = t_out - T / 2;
        while (ph >= T) ph -= T;
        while (ph < 0) ph += T;
        exp_ph = (b_leads ? -1.0 : 1.0) * (real'(k) + 0.5) / 16.0 * (T / 4) + 100.0;
        while (exp_ph < 0) exp_ph += T;
        checks++;
        if (ph - exp_ph > 0.01 || exp_ph - ph > 0.01) begin
          failures++;
          $display("lead=%0d k=%0d phase %f expected %f", lead, k, ph, exp_ph);
        end
      end
      b_leads = 1'b1;
      repeat (3) @(posedge clk_a);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 200);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
