`timescale 1ps / 1fs
// ud_filter: Up/Down filter between the phase detector and the controller.
//
// It passes a phase correction only after N consecutive decisions of the same
// sign (N = 2 in the published circuit), which removes the one-step dither a
// bang-bang loop makes around lock. A run counter holds how many UPs (or
// DOWNs) in a row have arrived; an opposite decision restarts it at one. When
// it reaches N the filter emits one UP_F (DOWN_F) pulse and the count restarts
// from zero. Cycles with neither UP nor DOWN (no data transition) leave the
// count alone: that choice, and the restart after an output, are this design's.
//
// Timing: up_f/dn_f are registered one-cycle pulses in the cycle after the
// Nth decision. Reset asynchronous, active low.
module ud_filter #(
  parameter int unsigned N = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic up,
  input  logic dn,
  output logic up_f,
  output logic dn_f
);
  localparam int unsigned CW = (N < 2) ? 1 : $clog2(N + 1);

  logic [CW-1:0] cnt;     // length of the current run, 0 = no run
  logic          run_up;  // sign of the current run

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cnt    <= '0;
      run_up <= 1'b0;
      up_f   <= 1'b0;
      dn_f   <= 1'b0;
    end else begin
      up_f <= 1'b0;
      dn_f <= 1'b0;
      if (up ^ dn) begin
        if (cnt != '0 && run_up == up) begin
          if (cnt == CW'(N - 1)) begin
            cnt  <= '0;
            up_f <= up;
            dn_f <= dn;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end else if (N == 1) begin
          cnt    <= '0;
          run_up <= up;
          up_f   <= up;
          dn_f   <= dn;
        end else begin
          cnt    <= CW'(1);
          run_up <= up;
        end
      end
    end
endmodule
