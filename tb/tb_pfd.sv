`timescale 1ps / 1fs
// tb_pfd: self-checking test of the phase-frequency detector.
//
// Reference and feedback clocks of 6400 ps with a set skew: when the reference
// leads by s, UP must be high for s and DOWN never; when it lags, the reverse.
// A feedback clock at half the frequency must give mostly UP (frequency
// detection).
module tb_pfd;
  localparam realtime T = 6400.0;
  logic ref_clk = 1'b0, fb_clk = 1'b0, rst_n = 1'b0, up, dn;
  realtime skew = 0.0, t_up, t_dn, w_up = 0.0, w_dn = 0.0;
  realtime sum_up = 0.0, sum_dn = 0.0;
  bit slow_fb = 1'b0;
  int checks = 0, failures = 0;

  pfd dut (.ref_clk, .fb_clk, .rst_n, .up, .dn);

  task automatic fb_pulse(input realtime d);
    #(d) fb_clk = 1'b1;
    #(T / 2) fb_clk = 1'b0;
  endtask

  initial forever begin
    #(T / 2) ref_clk = 1'b1;
    #(T / 2) ref_clk = 1'b0;
  end
  // Feedback rising edges at k*T + T/2 + skew, every second one dropped when
  // slow_fb is set.
  initial begin
    for (int k = 1; k < 200; k++) begin
      realtime t;
      t = k * T + T / 2 + skew;
      if (t > $realtime) begin
        #(t - $realtime);
        if (!slow_fb || k % 2 == 0) fork fb_pulse(0.0); join_none
      end
    end
  end

  always @(posedge up) t_up = $realtime;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge up) begin w_up = $realtime - t_up; sum_up += w_up; end
  always @(negedge dn) begin w_dn = $realtime - t_dn; sum_dn += w_dn; end

  initial begin
    #(T) rst_n = 1'b1;
    foreach (skew_list[i]) begin
      skew = skew_list[i];
      w_up = 0.0; w_dn = 0.0;
      #(4 * T);
      checks++;
      if (skew < 0) begin
        // feedback early: DOWN pulses of |skew|
        if (w_dn - (-skew) > 0.01 || (-skew) - w_dn > 0.01 || w_up > 0.01) failures++;
      end else begin
        if (w_up - skew > 0.01 || skew - w_up > 0.01 || w_dn > 0.01) failures++;
      end
      $display("skew %f: UP %f DOWN %f", skew, w_up, w_dn);
    end
    skew = 100.0;
    slow_fb = 1'b1;
    sum_up = 0.0; sum_dn = 0.0;
    #(20 * T);
    checks++;
    if (sum_up < 5.0 * sum_dn || sum_up < 1000.0) failures++;
    $display("slow feedback: UP %f ps, DOWN %f ps in total", sum_up, sum_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  realtime skew_list [4] = '{250.0, -130.0, 40.0, -700.0};

  initial begin
    #(T * 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
