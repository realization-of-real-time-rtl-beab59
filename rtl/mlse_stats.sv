// mlse_stats: channel estimation for the MLSE.
//
// For every symbol k the pattern p = 16*a_{k-2} + 4*a_{k-1} + a_k of the
// MLSE's own decisions selects one of 64 accumulators, which sums the FFE
// output y_k and counts occurrences.  After WIN symbols (WIN / N beats) each
// mean = sum / count is published to the MLSE (patterns not seen keep their
// old mean) and the accumulators restart.  Means of every 1024 symbols per
// channel state follow the source design; the start-up means (the ideal
// level of a_k) and keeping unseen patterns are this design's choice.
//
// Interface: y (N x 7-bit signed), dec (N x 2-bit) with in_valid; the last
// two decisions of a beat carry over to the next.  means (64 x 7-bit, pattern
// p in bits 7p ...) change one clock after the last beat of a window;
// update pulses then.
module mlse_stats
  import pam4_pkg::*;
#(
  parameter int N   = NSYM,
  parameter int WIN = 1024
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  logic [N*7-1:0]    y,
  input  logic [2*N-1:0]    dec,
  output logic [64*7-1:0]   means,
  output logic              update
);
  localparam int NBEAT = WIN / N;
  localparam int SW    = 7 + $clog2(WIN) + 1;
  localparam int NW    = $clog2(WIN) + 1;

  logic signed [SW-1:0] sum_q [64];
  logic [NW-1:0]        cnt_q [64];
  logic [3:0]           hist_q;             // {a_{-2}, a_{-1}} of the next beat
  logic [31:0]          beat_q;

  logic signed [SW-1:0] sum_n [64];
  logic [NW-1:0]        cnt_n [64];

  always_comb begin
    logic [1:0] p2, p1;
    for (int p = 0; p < 64; p++) begin
      sum_n[p] = sum_q[p];
      cnt_n[p] = cnt_q[p];
    end
    p2 = hist_q[3:2];
    p1 = hist_q[1:0];
    for (int k = 0; k < N; k++) begin
      logic [5:0] p;
      p = {p2, p1, dec[2*k +: 2]};
      sum_n[p] = sum_n[p] + SW'(signed'(y[k*7 +: 7]));
      cnt_n[p] = cnt_n[p] + 1'b1;
      p2 = p1;
      p1 = dec[2*k +: 2];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < 64; p++) begin
        logic signed [7:0] l;
        l = level7(p[1:0]);
        sum_q[p] <= '0;
        cnt_q[p] <= '0;
        means[p*7 +: 7] <= l[6:0];
      end
      hist_q <= {TERM_SYM, TERM_SYM};
      beat_q <= '0;
      update <= 1'b0;
    end else begin
      update <= 1'b0;
      if (in_valid) begin
        hist_q <= {dec[2*(N-2) +: 2], dec[2*(N-1) +: 2]};
        if (int'(beat_q) == NBEAT - 1) begin
          beat_q <= '0;
          update <= 1'b1;
          for (int p = 0; p < 64; p++) begin
            if (cnt_n[p] != '0) begin
              logic signed [SW-1:0] m;
              m = sum_n[p] / $signed({1'b0, cnt_n[p]});
              means[p*7 +: 7] <= m[6:0];
            end
            sum_q[p] <= '0;
            cnt_q[p] <= '0;
          end
        end else begin
          beat_q <= beat_q + 1;
          for (int p = 0; p < 64; p++) begin
            sum_q[p] <= sum_n[p];
            cnt_q[p] <= cnt_n[p];
          end
        end
      end
    end
  end

endmodule
