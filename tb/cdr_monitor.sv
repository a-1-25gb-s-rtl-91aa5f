`timescale 1ps / 1fs
// cdr_monitor: checker shared by the closed-loop CDR testbenches.
//
// On every rising edge of the recovered clock it
//  * follows UP_F/DOWN_F with its own phase pointer (0..255) and compares the
//    MUX, PI and DCDB codes with the table model of cdr_ref_pkg;
//  * once LOCK_BITS bits have been sent, checks the retimed data against the
//    PRBS7 recurrence bit[n] = bit[n-7] ^ bit[n-6], and measures the sampling
//    phase error: the time from the latest ideal bit boundary to the rising
//    edge, minus half a bit period, which must stay within LIMIT_UI;
//  * counts each loop mechanism (BBPD UP and DOWN, decisions swallowed by the
//    filter, UP_F, DOWN_F, DCDB wraps, PI shifts, quadrant changes up and down).
// final_checks() adds one check per mechanism that must have happened and
// prints the jitter statistics (peak-to-peak and RMS of the phase error).
module cdr_monitor #(
  parameter int  LOCK_BITS  = 1500,
  parameter real LIMIT_UI   = 0.1,
  parameter bit  NEED_BOTH  = 1'b1   // require quadrant changes both ways
) (
  input logic        rclk,
  input logic        rst_n,
  input logic        rdata,
  input logic        up,
  input logic        dn,
  input logic        up_f,
  input logic        dn_f,
  input logic [1:0]  mux_sel,
  input logic [14:0] pi_therm,
  input logic [1:0]  dcdb_c,
  input real         t_bound,
  input real         ui,
  input int          n_bits
);
  import cdr_ref_pkg::*;

  int checks = 0, failures = 0;
  int p = 0;
  int n_up = 0, n_dn = 0, n_upf = 0, n_dnf = 0, n_wrap = 0, n_shift = 0;
  int n_quad_up = 0, n_quad_dn = 0, n_ones = 0, n_meas = 0, n_prbs_err = 0, n_phase_err = 0;
  real e_min = 1.0e9, e_max = -1.0e9, e_sum = 0.0, e_sq = 0.0;
  logic [7:0] hist = '0;  // hist[k] is bit n-k
  int n_hist = 0;

  always @(posedge rclk) begin
    logic u, d, r;
    logic [1:0] m0, c0;
    logic [14:0] t0;
    real e;
    u  = up_f;
    d  = dn_f;
    m0 = mux_sel;
    c0 = dcdb_c;
    t0 = pi_therm;
    e  = $realtime - t_bound - ui / 2.0;
    while (e > ui / 2.0)  e -= ui;
    while (e < -ui / 2.0) e += ui;
    #1;
    if (!rst_n) begin
      p = 0;
    end else begin
      if (u) p = (p + 1) % 256;
      if (d) p = (p + 255) % 256;
      checks++;
      if (mux_sel !== exp_mux(p) || pi_therm !== exp_therm(p) || dcdb_c !== exp_dcdb(p)) begin
        failures++;
        if (failures < 10) $display("%t code mismatch at pointer %0d", $realtime, p);
      end
      n_up  += int'(up);
      n_dn  += int'(dn);
      n_upf += int'(up_f);
      n_dnf += int'(dn_f);
      if ((c0 == 2'd3 && dcdb_c == 2'd0) || (c0 == 2'd0 && dcdb_c == 2'd3)) n_wrap++;
      if (t0 != pi_therm) n_shift++;
      if (m0 != mux_sel && u) n_quad_up++;
      if (m0 != mux_sel && d) n_quad_dn++;
      r    = rdata;
      hist = {hist[6:0], r};
      n_hist++;
      if (n_bits > LOCK_BITS && n_hist > 8) begin
        checks++;
        if (hist[0] !== (hist[7] ^ hist[6])) begin
          failures++;
          n_prbs_err++;
        end
        n_ones += int'(r);
        n_meas++;
        e_min = (e < e_min) ? e : e_min;
        e_max = (e > e_max) ? e : e_max;
        e_sum += e;
        e_sq  += e * e;
        checks++;
        if (e > LIMIT_UI * ui || e < -LIMIT_UI * ui) begin
          failures++;
          n_phase_err++;
          if (n_phase_err < 5) $display("%t sampling phase error %f ps", $realtime, e);
        end
      end
    end
  end

  function automatic real rms_ps();
    real m;
    m = e_sum / real'(n_meas);
    return $sqrt(e_sq / real'(n_meas) - m * m);
  endfunction

  function automatic real pkpk_ps();
    return e_max - e_min;
  endfunction

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never seen: %s", what);
    end
  endtask

  task automatic final_checks();
    need("BBPD UP", n_up);
    need("BBPD DOWN", n_dn);
    need("filter swallowing a decision", n_up + n_dn - 2 * (n_upf + n_dnf));
    need("UP_F", n_upf);
    need("DOWN_F", n_dnf);
    need("DCDB wrap into the PI code", n_wrap);
    need("PI shift", n_shift);
    need("quadrant change up", n_quad_up);
    if (NEED_BOTH) need("quadrant change down", n_quad_dn);
    need("locked bits measured", n_meas);
    checks++;
    if (n_meas > 0 && (n_ones < n_meas * 4 / 10 || n_ones > n_meas * 6 / 10)) failures++;
    $display("BBPD UP %0d DOWN %0d | UP_F %0d DOWN_F %0d | DCDB wraps %0d PI shifts %0d quadrant up %0d down %0d",
             n_up, n_dn, n_upf, n_dnf, n_wrap, n_shift, n_quad_up, n_quad_dn);
    if (n_meas > 0)
      $display("locked bits %0d: PRBS errors %0d, sampling phase error mean %.2f ps, pk-pk %.2f ps, RMS %.2f ps",
               n_meas, n_prbs_err, e_sum / real'(n_meas), pkpk_ps(), rms_ps());
  endtask
endmodule
