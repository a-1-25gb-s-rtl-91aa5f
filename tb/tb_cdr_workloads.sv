`timescale 1ps / 1fs
// tb_cdr_workloads: the operating cases the CDR is meant for, run side by side.
//
//  * DCDB step-error sweep: four complete CDRs with a delay-buffer step error
//    of -50 %, 0 %, +50 % and +100 % receive the same clean PRBS7 data with a
//    +200 ppm frequency offset for 10000 bit periods. Each must lock, retime
//    without error and keep its sampling phase within +/-0.1 UI; the
//    peak-to-peak and RMS sampling jitter of each is printed.
//  * Frequency tracking: two CDRs receive data at +400 ppm and -400 ppm.
//  * Jittered input: one CDR receives data whose transitions are delayed by a
//    random 0 .. 0.53 UI (an eye closed by 0.53 UI) and must still retime it
//    without error.
module tb_cdr_workloads;
  localparam realtime TREF = 6400.0;
  localparam int LOCK_BITS = 3000;
  localparam int RUN_BITS  = 10000;
  localparam int NI        = 7;
  localparam int ERRS [4]  = '{-50, 0, 50, 100};

  logic ext_clk = 1'b0, rst_n = 1'b0;
  real  ppm_a = 200.0, ppm_p = 400.0, ppm_n = -400.0, ppm_j = 0.0;
  real  jit0 = 0.0, jit_j = 0.53 * 800.0;
  logic din [4];
  real  tb_b [4], ui_b [4];
  int   nb [4];

  // sources: 0 = +200 ppm clean, 1 = +400 ppm, 2 = -400 ppm, 3 = jittered
  data_source src0 (.ppm(ppm_a), .jitter_ps(jit0),  .din(din[0]), .t_bound(tb_b[0]), .ui(ui_b[0]), .n_bits(nb[0]));
  data_source src1 (.ppm(ppm_p), .jitter_ps(jit0),  .din(din[1]), .t_bound(tb_b[1]), .ui(ui_b[1]), .n_bits(nb[1]));
  data_source src2 (.ppm(ppm_n), .jitter_ps(jit0),  .din(din[2]), .t_bound(tb_b[2]), .ui(ui_b[2]), .n_bits(nb[2]));
  data_source src3 (.ppm(ppm_j), .jitter_ps(jit_j), .din(din[3]), .t_bound(tb_b[3]), .ui(ui_b[3]), .n_bits(nb[3]));

  always #(TREF / 2) ext_clk = ~ext_clk;

  // instance i: 0..3 sweep the DCDB error on source 0; 4, 5, 6 use sources 1, 2, 3
  for (genvar i = 0; i < NI; i++) begin : g
    localparam int SRC  = (i < 4) ? 0 : i - 3;
    localparam int ERR  = (i < 4) ? ERRS[i] : 0;
    localparam real LIM = (i == 6) ? 0.49 : 0.1;
    logic rclk, rdata, up, dn, up_f, dn_f, ci, cq, pu, pd;
    logic [1:0] mux_sel, dcdb_c;
    logic [14:0] pi_therm;

    cdr_top #(.DCDB_ERR_PCT(ERR)) dut (
      .ext_clk, .rst_n, .din(din[SRC]), .rclk, .rdata, .up, .dn, .up_f, .dn_f,
      .mux_sel, .pi_therm, .dcdb_c, .clk_i(ci), .clk_q(cq), .pll_up(pu), .pll_dn(pd)
    );

    cdr_monitor #(.LOCK_BITS(LOCK_BITS), .LIMIT_UI(LIM), .NEED_BOTH(1'b0)) mon (
      .rclk, .rst_n, .rdata, .up, .dn, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c,
      .t_bound(tb_b[SRC]), .ui(ui_b[SRC]), .n_bits(nb[SRC])
    );
  end

  int checks = 0, failures = 0;

  task automatic sum_up();
    checks   = g[0].mon.checks + g[1].mon.checks + g[2].mon.checks + g[3].mon.checks
             + g[4].mon.checks + g[5].mon.checks + g[6].mon.checks;
    failures = g[0].mon.failures + g[1].mon.failures + g[2].mon.failures + g[3].mon.failures
             + g[4].mon.failures + g[5].mon.failures + g[6].mon.failures;
  endtask

  initial begin
    #(2 * TREF + 100.0) rst_n = 1'b1;
    wait (nb[0] >= LOCK_BITS + RUN_BITS);
    $display("== DCDB error -50 %%, +200 ppm");  g[0].mon.final_checks();
    $display("== DCDB error 0 %%, +200 ppm");    g[1].mon.final_checks();
    $display("== DCDB error +50 %%, +200 ppm");  g[2].mon.final_checks();
    $display("== DCDB error +100 %%, +200 ppm"); g[3].mon.final_checks();
    $display("== +400 ppm");                     g[4].mon.final_checks();
    $display("== -400 ppm");                     g[5].mon.final_checks();
    $display("== input eye closed by 0.53 UI");  g[6].mon.final_checks();
    sum_up();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800.0 * (LOCK_BITS + RUN_BITS + 2000));
    sum_up();
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
