`timescale 1ps / 1fs
// tb_cdr_top: end-to-end test of the whole dual-loop CDR at its default
// parameters (reference PLL + one channel, DCDB step error 0 %).
//
// A 156.25 MHz external clock drives the reference PLL, whose VCO starts 1 %
// off. PRBS7 data at 1.25 Gb/s arrives 200 ppm slow for 5000 bits and then
// 200 ppm fast for 5000 bits, after 3000 bits for the PLL and the CDR to lock.
// Checks: the PLL settles to 800 ps; every check of cdr_monitor (codes against
// the table model, PRBS7 recurrence of the retimed data, sampling phase within
// +/-0.1 UI of the bit centre, each loop mechanism seen); the PLL's PFD gave
// both UP and DOWN pulses of non-zero width while settling.
module tb_cdr_top;
  localparam realtime TREF = 6400.0;
  localparam int LOCK_BITS = 3000;
  localparam int SEG_BITS  = 5000;

  logic ext_clk = 1'b0, rst_n = 1'b0;
  logic din, rclk, rdata, up, dn, up_f, dn_f, clk_i, clk_q, pll_up, pll_dn;
  logic [1:0] mux_sel, dcdb_c;
  logic [14:0] pi_therm;
  real ppm = 200.0, jitter = 0.0, t_bound, ui;
  int n_bits, checks = 0, failures = 0, n_pll_up = 0, n_pll_dn = 0;
  realtime ti = 0.0, ti_prev = 0.0;

  data_source #(.UI_NOM_PS(800.0)) src (.ppm, .jitter_ps(jitter), .din, .t_bound, .ui, .n_bits);

  cdr_top dut (
    .ext_clk, .rst_n, .din, .rclk, .rdata, .up, .dn, .up_f, .dn_f,
    .mux_sel, .pi_therm, .dcdb_c, .clk_i, .clk_q, .pll_up, .pll_dn
  );

  cdr_monitor #(.LOCK_BITS(LOCK_BITS), .LIMIT_UI(0.1)) mon (
    .rclk, .rst_n, .rdata, .up, .dn, .up_f, .dn_f, .mux_sel, .pi_therm, .dcdb_c,
    .t_bound, .ui, .n_bits
  );

  always #(TREF / 2) ext_clk = ~ext_clk;
  // count PFD pulses of non-zero width (the lagging side's pulse has none)
  realtime t_pu = 0.0, t_pd = 0.0;
  always @(posedge pll_up) t_pu = $realtime;
  always @(posedge pll_dn) t_pd = $realtime;
  always @(negedge pll_up) if ($realtime - t_pu > 0.5) n_pll_up++;
  always @(negedge pll_dn) if ($realtime - t_pd > 0.5) n_pll_dn++;
  always @(posedge clk_i) begin ti_prev = ti; ti = $realtime; end

  initial begin
    #(2 * TREF + 100.0) rst_n = 1'b1;
    wait (n_bits >= LOCK_BITS + SEG_BITS);
    ppm = -200.0;
    wait (n_bits >= LOCK_BITS + 2 * SEG_BITS);
    mon.final_checks();
    checks   = mon.checks + 3;
    failures = mon.failures;
    if (ti - ti_prev > 800.05 || ti - ti_prev < 799.95) failures++;
    if (n_pll_up == 0) failures++;
    if (n_pll_dn == 0) failures++;
    $display("reference PLL: period %f ps, PFD UP %0d DOWN %0d", ti - ti_prev, n_pll_up, n_pll_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(800.0 * (LOCK_BITS + 2 * SEG_BITS + 1000));
    checks   = mon.checks;
    failures = mon.failures + 1;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
