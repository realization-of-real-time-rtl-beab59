// mlse_sova: T-spaced maximum-likelihood sequence equalizer with soft output.
//
// Channel memory two: the expected FFE output for symbol k is the mean of
// pattern (a_{k-2}, a_{k-1}, a_k) supplied by mlse_stats, so the trellis has
// 16 states (a_{k-1}, a_k) and 64 branches per step, with branch metric
// (y_k - mean)^2 / 16.  The beat is processed as four independent 32-symbol
// blocks: each block follows a termination symbol (start states
// (x, TERM_SYM) for any x) and ends with one (end states (x, TERM_SYM)), so
// paths are terminated as in the source design.
//
// Soft output: for each symbol and each of its two Gray bits, the difference
// between the best path metric with that bit 1 and the best with that bit 0,
// found with a forward and a backward min-sum recursion over the block
// (the max-log value a SOVA with full path updates delivers; the reduced
// SOVA of the source design is not described in detail, so this form is
// this design's choice).  LLR = (M1 - M0) >> LLR_SHIFT, saturated to
// +-(2^(LLRW-1)-1); positive favours bit 0.  Hard decisions are the symbols
// on the best path.
//
// Interface: y (N x 7-bit) and means (64 x 7-bit) with in_valid; llr (2N
// values, bit 2k+1 = MSB of symbol k at index 2k+1), dec (N x 2-bit) and the
// input y (passed along for the statistics) are registered, one clock.
module mlse_sova
  import pam4_pkg::*;
#(
  parameter int N         = NSYM,
  parameter int LLRW      = 5,
  parameter int LLR_SHIFT = 3
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic                  in_data,      // beat carries payload
  input  logic [N*7-1:0]        y,
  input  logic [64*7-1:0]       means,
  output logic                  out_valid,
  output logic                  out_data,
  output logic [2*N*LLRW-1:0]   llr,
  output logic [2*N-1:0]        dec,
  output logic [N*7-1:0]        y_out
);
  localparam int MW  = 20;
  localparam logic [MW-1:0] INF = MW'(1 << 18);
  localparam int LMAX = 2**(LLRW-1) - 1;

  logic [2*N*LLRW-1:0] llr_c;
  logic [2*N-1:0]      dec_c;

  always_comb begin
    for (int bl = 0; bl < N / BLK; bl++) begin
      logic [MW-1:0] bm    [BLK][64];
      logic [MW-1:0] alpha [BLK+1][16];
      logic [MW-1:0] beta  [BLK+1][16];
      // branch metrics, branch index {a_{k-2}, a_{k-1}, a_k}
      for (int i = 0; i < BLK; i++) begin
        for (int p = 0; p < 64; p++) begin
          int d;
          d = int'(signed'(y[(bl*BLK+i)*7 +: 7])) - int'(signed'(means[p*7 +: 7]));
          bm[i][p] = MW'((d * d) >> 4);
        end
      end
      // forward: alpha[i] = state after i symbols, state {a_{k-1}, a_k}
      for (int s = 0; s < 16; s++)
        alpha[0][s] = (s[1:0] == TERM_SYM) ? '0 : INF;
      for (int i = 0; i < BLK; i++) begin
        for (int s = 0; s < 16; s++) begin
          logic [MW-1:0] m;
          m = INF + INF;
          for (int x = 0; x < 4; x++) begin
            logic [MW-1:0] c;
            c = alpha[i][(x << 2) | (s >> 2)] + bm[i][(x << 4) | s];
            if (c < m) m = c;
          end
          alpha[i+1][s] = (m > INF) ? INF : m;
        end
      end
      // backward
      for (int s = 0; s < 16; s++)
        beta[BLK][s] = (s[1:0] == TERM_SYM) ? '0 : INF;
      for (int i = BLK - 1; i >= 0; i--) begin
        for (int s = 0; s < 16; s++) begin
          logic [MW-1:0] m;
          m = INF + INF;
          for (int c4 = 0; c4 < 4; c4++) begin
            logic [MW-1:0] c;
            c = bm[i][(s << 2) | c4] + beta[i+1][((s & 3) << 2) | c4];
            if (c < m) m = c;
          end
          beta[i][s] = (m > INF) ? INF : m;
        end
      end
      // soft output per symbol
      for (int i = 0; i < BLK; i++) begin
        logic [MW-1:0] m0 [2];
        logic [MW-1:0] m1 [2];
        logic [MW-1:0] best;
        logic [1:0]    bsym;
        int k;
        k = bl*BLK + i;
        m0[0] = '1; m0[1] = '1; m1[0] = '1; m1[1] = '1;
        best = '1; bsym = '0;
        for (int p = 0; p < 64; p++) begin
          logic [MW-1:0] t;
          logic [1:0] bits;
          t = alpha[i][p >> 2] + bm[i][p] + beta[i+1][p & 15];
          bits = gray_demap(p[1:0]);
          for (int b = 0; b < 2; b++) begin
            if (bits[b]) begin if (t < m1[b]) m1[b] = t; end
            else         begin if (t < m0[b]) m0[b] = t; end
          end
          if (t < best) begin best = t; bsym = p[1:0]; end
        end
        dec_c[2*k +: 2] = bsym;
        for (int b = 0; b < 2; b++) begin
          int l;
          l = (int'(m1[b]) - int'(m0[b])) >>> LLR_SHIFT;
          if (l > LMAX)  l = LMAX;
          if (l < -LMAX) l = -LMAX;
          llr_c[(2*k+b)*LLRW +: LLRW] = l[LLRW-1:0];
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= 1'b0;
      llr       <= '0;
      dec       <= '0;
      y_out     <= '0;
    end else begin
      out_valid <= in_valid;
      out_data  <= in_valid && in_data;
      if (in_valid) begin
        llr   <= llr_c;
        dec   <= dec_c;
        y_out <= y;
      end
    end
  end

endmodule
