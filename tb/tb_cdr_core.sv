`timescale 1ps / 1fs
// tb_cdr_core: closed-loop test of one CDR channel with ideal reference clocks.
//
// Ideal 800 ps I/Q clocks feed the channel; PRBS7 data arrives first 200 ppm
// slow (its phase drifts later, so the loop must keep stepping up through all
// quadrants) and then 200 ppm fast (stepping down). Checks:
//  * the retimed data obeys the PRBS7 recurrence bit[n] = bit[n-7]^bit[n-6]
//    once locked (an independent check that needs no alignment);
//  * the recovered clock's rising edge stays within +/-0.1 UI of the bit
//    centre once locked;
//  * the controller's codes always agree with a phase pointer counted here
//    from UP_F/DOWN_F (table model in cdr_ref_pkg);
//  * every mechanism happened: BBPD UP and DOWN, decisions swallowed by the
//    filter, UP_F, DOWN_F, DCDB wraps, PI shifts and quadrant changes in both
//    directions.
module tb_cdr_core;
  import cdr_ref_pkg::*;
  localparam realtime T = 800.0;
  localparam int LOCK_BITS = 1500;
  localparam int SEG_BITS  = 5000;

  logic clk_i = 1'b0, clk_q = 1'b0, rst_n = 1'b0;
  logic din, rclk, rdata, up, dn, up_f, dn_f;
  logic [1:0] mux_sel, dcdb_c;
  logic [14:0] pi_therm;
  real ppm = 200.0, jitter = 0.0, t_bound, ui;
  int n_bits;
  int checks = 0, failures = 0;

  data_source #(.UI_NOM_PS(800.0)) src (.ppm, .jitter_ps(jitter), .din, .t_bound, .ui, .n_bits);

  cdr_core #(.FILTER_N(2), .DCDB_ERR_PCT(0)) dut (
    .clk_i, .clk_q, .rst_n, .din, .rclk, .rdata, .up, .dn, .up_f, .dn_f,
    .mux_sel, .pi_therm, .dcdb_c
  );

  initial forever begin
    clk_i = 1'b1; #(T / 4); clk_q = 1'b1; #(T / 4);
    clk_i = 1'b0; #(T / 4); clk_q = 1'b0; #(T / 4);
  end

  cdr_monitor #(.LOCK_BITS(LOCK_BITS), .LIMIT_UI(0.1)) mon (
    .rclk, .rst_n, .rdata, .up, .dn, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c,
    .t_bound, .ui, .n_bits
  );

  initial begin
    #(3 * T) rst_n = 1'b1;
    wait (n_bits >= LOCK_BITS + SEG_BITS);
    ppm = -200.0;
    wait (n_bits >= LOCK_BITS + 2 * SEG_BITS);
    mon.final_checks();
    checks   = mon.checks;
    failures = mon.failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * (LOCK_BITS + 2 * SEG_BITS + 1000));
    checks   = mon.checks;
    failures = mon.failures + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
