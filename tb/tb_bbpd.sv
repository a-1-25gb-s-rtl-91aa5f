`timescale 1ps / 1fs
// tb_bbpd: self-checking test of the bang-bang phase detector.
//
// A 800 ps clock samples random data whose transitions sit 50 ps after the
// falling edge (clock early: every transition must give UP) or 50 ps before it
// (clock late: DOWN), switching between the two halfway. The expected UP/DOWN
// and retimed data are worked out from the transmitted bits: two rising edges
// after bits n-1 and n are sampled, UP/DOWN reflect the pair, and rdata holds
// the last sampled bit.
module tb_bbpd;
  localparam realtime T = 800.0;
  localparam int NB = 400;

  logic clk = 1'b0, rst_n = 1'b0, din = 1'b0;
  logic up, dn, rdata;
  int checks = 0, failures = 0;
  int n_up = 0, n_dn = 0;
  bit bits [NB + 4];
  bit early [NB + 4];

  bbpd dut (.clk, .rst_n, .din, .up, .dn, .rdata);

  initial begin
    for (int j = 0; j < NB + 4; j++) begin
      bits[j]  = 1'($urandom);
      early[j] = (j < NB / 2);
    end
  end

  // Clock: rising edge at k*T, falling at k*T + T/2.
  initial begin
    #(T);
    forever begin clk = 1'b1; #(T / 2); clk = 1'b0; #(T / 2); end
  end

  // Data: bit j is centred on rising edge j; its trailing transition is at
  // j*T + T/2 +/- 50 ps.
  initial begin
    din = bits[0];
    for (int j = 0; j < NB + 2; j++) begin
      #((j * T + T / 2 + (early[j] ? 50.0 : -50.0)) - $realtime);
      din = bits[j + 1];
    end
  end

  initial begin
    #(2.5 * T) rst_n = 1'b1;  // rising edges from k = 3 on
    for (int k = 3; k < NB; k++) begin
      #((k * T + 1.0) - $realtime);
      // At this point d_cur = bit k, d_prv = bit k-1, up/dn reflect bits
      // k-2 and k-1 and the edge sample taken between them.
      if (k >= 5) begin
        bit tr, exp_up, exp_dn;
        tr     = bits[k - 1] != bits[k - 2];
        exp_up = tr && early[k - 2];
        exp_dn = tr && !early[k - 2];
        checks++;
        if (up !== exp_up || dn !== exp_dn) begin
          failures++;
          if (failures < 10) $display("k=%0d up=%b dn=%b exp %b %b", k, up, dn, exp_up, exp_dn);
        end
        n_up += int'(up);
        n_dn += int'(dn);
      end
      checks++;
      if (rdata !== bits[k]) failures++;
    end
    checks++;
    if (n_up < 50 || n_dn < 50) failures++;
    $display("UP pulses %0d, DOWN pulses %0d", n_up, n_dn);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(T * (NB + 50));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
