`timescale 1ps / 1fs
// tb_dcdb: self-checking test of the delay-buffer model.
//
// Two instances, one ideal (error 0 %) and one with a +50 % step error, delay
// the same 800 ps clock. For each code c the measured delay of both edges
// must be 50 + c * 3.125 * (1 + err) ps.
module tb_dcdb;
  localparam realtime T = 800.0;
  logic vin = 1'b0, v0, v50;
  logic [1:0] c = '0;
  realtime t_in_r, t_in_f, d0_r, d0_f, d50_r;
  int checks = 0, failures = 0;

  dcdb #(.ERR_PCT(0))  u0  (.vin, .c, .vout(v0));
  dcdb #(.ERR_PCT(50)) u50 (.vin, .c, .vout(v50));

  always #(T / 2) vin = ~vin;
  always @(posedge vin) t_in_r = $realtime;
  always @(negedge vin) t_in_f = $realtime;
  always @(posedge v0)  d0_r  = $realtime - t_in_r;
  always @(negedge v0)  d0_f  = $realtime - t_in_f;
  always @(posedge v50) d50_r = $realtime - t_in_r;

  function automatic bit near(realtime a, realtime b);
    return (a - b < 0.001) && (b - a < 0.001);
  endfunction

  initial begin
    for (int k = 0; k < 4; k++) begin
      c = 2'(k);
      repeat (3) @(posedge vin);
      #(T - 1.0);
      checks += 3;
      if (!near(d0_r, 50.0 + k * 3.125)) failures++;
      if (!near(d0_f, 50.0 + k * 3.125)) failures++;
      if (!near(d50_r, 50.0 + k * 3.125 * 1.5)) failures++;
      $display("c=%0d delay %f / %f ps", k, d0_r, d50_r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * 100);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
