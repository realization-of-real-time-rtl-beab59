// dfe: decision feedback equalizer, 128 symbols per clock.
//
// Feed-forward part: a T/2-spaced 25-tap FFE.  Symbol k of the beat uses
// input samples 2k .. 2k+24 of the 280-sample window (centre 2k+12):
//   f_k = (sum_t c_t * x[2k+t]) >> 10.
// Feedback part: one tap, y_k = f_k - b * L(a_{k-1}), sliced to a_k with
// thresholds -32, 0, 32 (levels L = -48, -16, 16, 48).  The 128 symbols form
// four 32-symbol blocks; the symbol before each block is a termination
// symbol of known value, so the four feedback chains are independent and
// run in parallel, as in the source design.
//
// Adaptation: LMS, once per clock, from 16 of the beat's symbols (every 8th):
//   c_t += mu * sum e_k x[2k+t],  b -= mu * sum e_k L(a_{k-1}) (sign folded in),
// with e_k = L(ref_k) - y_k, ref = known training symbol while train is
// high, else the decision.  Coefficients are kept with 20 fractional bits
// (level unit 16 = 1.0) and used with 10.  mu is 2^-12 (about 0.0002) at
// first and is halved after MU_T1, MU_T2 and MU_T3 updates (three further
// values, as in the source design; the values and switch points are this
// design's choice).  The centre tap starts at 1.0, all others at 0.
//
// Outputs, registered one clock after the input: ffe_out (f_k saturated to
// 7 bits, for the MLSE), dec (a_k) and valid.
module dfe
  import pam4_pkg::*;
#(
  parameter int NSYMB = NSYM,
  parameter int NTAP  = 25,
  parameter int NUPD  = 16,
  parameter int XW    = 7,
  parameter int MU_T1 = 256,
  parameter int MU_T2 = 1024,
  parameter int MU_T3 = 4096
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          in_valid,
  input  logic [(2*NSYMB+NTAP-1)*XW-1:0] in_smp,
  input  logic                          train,
  input  logic [2*NSYMB-1:0]            train_sym,
  output logic                          out_valid,
  output logic [NSYMB*7-1:0]            ffe_out,
  output logic [2*NSYMB-1:0]            dec,
  output logic [1:0]                    mu_stage
);
  localparam int CW  = 24;                 // coefficient accumulator width
  localparam int NB  = NSYMB / BLK;
  localparam int STEP = NSYMB / NUPD;
  typedef logic signed [CW-1:0] coef_t;

  coef_t       c_q [NTAP];
  coef_t       b_q;
  logic [31:0] nupd_q;

  logic signed [15:0] f   [NSYMB];
  logic signed [15:0] y   [NSYMB];
  logic [1:0]         a   [NSYMB];
  logic [1:0]         mu_sh;

  always_comb begin
    // FFE
    for (int k = 0; k < NSYMB; k++) begin
      logic signed [31:0] acc;
      acc = '0;
      for (int t = 0; t < NTAP; t++)
        acc += 32'(signed'(in_smp[(2*k+t)*XW +: XW])) * 32'(c_q[t] >>> 10);
      acc = acc >>> 10;
      if (acc > 32'sd2000) acc = 32'sd2000;
      if (acc < -32'sd2000) acc = -32'sd2000;
      f[k] = acc[15:0];
    end
    // FBE chains, one per block
    for (int bl = 0; bl < NB; bl++) begin
      logic [1:0] pv;
      pv = TERM_SYM;
      for (int i = 0; i < BLK; i++) begin
        int k;
        logic signed [31:0] fb;
        k  = bl*BLK + i;
        fb = (32'(level7(pv)) * 32'(b_q >>> 10)) >>> 10;
        y[k] = f[k] - fb[15:0];
        a[k] = slice7(y[k]);
        pv = train ? train_sym[2*k +: 2] : a[k];
      end
    end
    if (nupd_q < MU_T1)      mu_sh = 2'd0;
    else if (nupd_q < MU_T2) mu_sh = 2'd1;
    else if (nupd_q < MU_T3) mu_sh = 2'd2;
    else                     mu_sh = 2'd3;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int t = 0; t < NTAP; t++)
        c_q[t] <= (t == NTAP/2) ? coef_t'(1 << 20) : '0;
      b_q       <= '0;
      nupd_q    <= '0;
      out_valid <= 1'b0;
      ffe_out   <= '0;
      dec       <= '0;
      mu_stage  <= '0;
    end else begin
      out_valid <= in_valid;
      mu_stage  <= mu_sh;
      if (in_valid) begin
        logic signed [31:0] g [NTAP];
        logic signed [31:0] gb;
        for (int k = 0; k < NSYMB; k++) begin
          logic signed [15:0] s;
          s = f[k];
          if (s > 16'sd63)  s = 16'sd63;
          if (s < -16'sd64) s = -16'sd64;
          ffe_out[k*7 +: 7] <= s[6:0];
          dec[2*k +: 2]     <= a[k];
        end
        for (int t = 0; t < NTAP; t++) g[t] = '0;
        gb = '0;
        for (int u = 0; u < NUPD; u++) begin
          int k;
          logic [1:0] r, pr;
          logic signed [31:0] e;
          k  = u * STEP;
          r  = train ? train_sym[2*k +: 2] : a[k];
          pr = (k % BLK == 0) ? TERM_SYM : (train ? train_sym[2*(k-1) +: 2] : a[k-1]);
          e  = 32'(level7(r)) - 32'(y[k]);
          for (int t = 0; t < NTAP; t++)
            g[t] += e * 32'(signed'(in_smp[(2*k+t)*XW +: XW]));
          gb += e * 32'(level7(pr));
        end
        for (int t = 0; t < NTAP; t++)
          c_q[t] <= c_q[t] + coef_t'(g[t] >>> mu_sh);
        b_q    <= b_q - coef_t'(gb >>> mu_sh);
        if (nupd_q < 32'(MU_T3)) nupd_q <= nupd_q + 1;   // stops once the last step is reached
      end
    end
  end

endmodule
