`timescale 1ps / 1fs
// tb_cdr_controller: self-checking test of the chained MUX/PI/DCDB controller.
//
// A random walk of UP_F / DOWN_F / idle cycles, biased first upwards and then
// downwards so that the pointer wraps through all 256 positions both ways,
// is compared every cycle with the table model in cdr_ref_pkg. It counts DCDB
// wraps, PI shifts and MUX (quadrant) changes in both directions.
module tb_cdr_controller;
  import cdr_ref_pkg::*;
  localparam realtime T = 800.0;
  logic clk = 1'b0, rst_n = 1'b0, up_f = 1'b0, dn_f = 1'b0;
  logic [1:0] mux_sel, dcdb_c;
  logic [14:0] pi_therm;
  int checks = 0, failures = 0, p = 0;
  int n_mux_up = 0, n_mux_dn = 0;

  cdr_controller dut (.clk, .rst_n, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c);

  always #(T / 2) clk = ~clk;

  task automatic check();
    checks++;
    if (mux_sel !== exp_mux(p) || pi_therm !== exp_therm(p) || dcdb_c !== exp_dcdb(p)) begin
      failures++;
      if (failures < 10)
        $display("p=%0d got mux=%0d therm=%b dcdb=%0d exp mux=%0d therm=%b dcdb=%0d",
                 p, mux_sel, pi_therm, dcdb_c, exp_mux(p), exp_therm(p), exp_dcdb(p));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    check();
    for (int i = 0; i < 4000; i++) begin
      int r, bias;
      logic [1:0] m0;
      bias = (i < 2000) ? 70 : 30;  // percent of steps that go up
      r = $urandom_range(0, 99);
      up_f = (r < bias * 8 / 10);
      dn_f = (r >= 80) && !(r < bias * 8 / 10);
      if (r >= bias * 8 / 10 && r < 80) begin up_f = 0; dn_f = 0; end
      m0 = mux_sel;
      @(posedge clk);
      #1;
      if (up_f) p = (p + 1) % 256;
      if (dn_f) p = (p + 255) % 256;
      if (mux_sel != m0 && up_f) n_mux_up++;
      if (mux_sel != m0 && dn_f) n_mux_dn++;
      check();
    end
    checks++;
    if (n_mux_up < 4 || n_mux_dn < 4) failures++;
    $display("quadrant changes up %0d down %0d", n_mux_up, n_mux_dn);
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
