`timescale 1ps / 1fs
// data_source: serial PRBS7 data source for the CDR testbenches.
//
// Sends the PRBS7 sequence (x^7 + x^6 + 1, new bit = bit[n-7] ^ bit[n-6]) at
// a bit period of UI_NOM_PS * (1 + ppm * 1e-6), where `ppm` (an input, so a
// test can change it on the fly) is the frequency offset of the data against
// the nominal rate. Bit boundaries are accumulated in absolute time so the
// offset does not suffer from rounding. t_bound is the time of the latest bit
// boundary and ui the current bit period, for measuring the sampling phase.
// `jitter_ps` delays each transition by a random amount, uniform in
// [0, jitter_ps] (0 gives clean data); the boundaries reported stay ideal.
module data_source #(
  parameter real UI_NOM_PS = 800.0,
  parameter real START_PS  = 1000.0
) (
  input  real  ppm,
  input  real  jitter_ps,
  output logic din,
  output real  t_bound,
  output real  ui,
  output int   n_bits
);
  logic [6:0] s;
  real        t_next;

  initial begin
    s       = 7'h5a;
    din     = 1'b0;
    n_bits  = 0;
    ui      = UI_NOM_PS;
    t_bound = START_PS;
    t_next  = START_PS;
    #(START_PS);
    forever begin
      logic nb;
      real  jit;
      nb  = s[6] ^ s[5];
      s   = {s[5:0], nb};
      jit = real'($urandom_range(0, 1000)) / 1000.0 * jitter_ps;
      fork
        drive_bit(nb, jit);
      join_none
      t_bound = t_next;
      ui      = UI_NOM_PS * (1.0 + ppm * 1.0e-6);
      t_next  = t_next + ui;
      n_bits++;
      #(t_next - $realtime);
    end
  end

  task automatic drive_bit(input logic v, input real d);
    #(d) din = v;
  endtask
endmodule
