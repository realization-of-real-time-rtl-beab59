// ldpc_dec_core: fully parallel min-sum decoder core for the (2448,2256)
// quasi-cyclic LDPC code of pam4_pkg (4 x 51 base matrix, Z = 48).
//
// Every check node and every variable node has its own unit and all edges
// are wired in parallel (flooding schedule), one iteration per clock:
//   variable node  T_v = L_v + sum of incoming check messages,
//                  message to check = T_v - message from that check (6-bit
//                  saturated);
//   check node     plain min-sum: sign = product of the other inputs' signs,
//                  magnitude = smallest other input (first and second minimum).
// After ITER iterations the hard decisions sign(T_v) of the information bits
// are presented.  Min-sum and a fully parallel node structure follow the
// source design; the iteration count and message widths are this design's
// choices.
//
// Interface: in_valid with in_llr (2448 x 5-bit, positive = bit 0) is taken
// when idle (in_ready).  out_valid with out_bits (2256 information bits)
// follows ITER + 1 clocks later and is held until out_ready.
module ldpc_dec_core
  import pam4_pkg::*;
#(
  parameter int ITER = 16,
  parameter int LLRW = 5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  output logic                  in_ready,
  input  logic [LN*LLRW-1:0]    in_llr,
  output logic                  out_valid,
  input  logic                  out_ready,
  output logic [LK-1:0]         out_bits
);
  localparam int MWD = 6;                 // edge message width
  localparam int TW  = 9;                 // variable-node total width
  localparam int MMAX = 2**(MWD-1) - 1;
  typedef logic signed [MWD-1:0] msg_t;
  typedef logic signed [TW-1:0]  tot_t;

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_OUT} state_e;
  state_e st_q;
  logic [$clog2(ITER+1)-1:0] it_q;

  logic signed [LLRW-1:0] ch_q  [LN];
  msg_t                   c2v_q [LMB][LNB][LZ];
  msg_t                   c2v_n [LMB][LNB][LZ];
  tot_t                   tot   [LN];

  always_comb begin
    // variable nodes
    for (int v = 0; v < LN; v++) tot[v] = tot_t'(ch_q[v]);
    for (int r = 0; r < LMB; r++)
      for (int c = 0; c < LNB; c++)
        if (ldpc_nz(r, c))
          for (int k = 0; k < LZ; k++)
            tot[c*LZ + (k + ldpc_shift(r, c)) % LZ] += tot_t'(c2v_q[r][c][k]);
    // check nodes
    for (int r = 0; r < LMB; r++) begin
      for (int k = 0; k < LZ; k++) begin
        msg_t v2c [LNB];
        int   min1, min2, idx, t, m;
        logic sgn;
        min1 = MMAX; min2 = MMAX; idx = 0; sgn = 1'b0; t = 0; m = 0;
        for (int c = 0; c < LNB; c++) begin
          v2c[c] = '0;
          c2v_n[r][c][k] = '0;
        end
        for (int c = 0; c < LNB; c++) begin
          if (ldpc_nz(r, c)) begin
            t = int'(tot[c*LZ + (k + ldpc_shift(r, c)) % LZ]) - int'(c2v_q[r][c][k]);
            if (t > MMAX)  t = MMAX;
            if (t < -MMAX) t = -MMAX;
            v2c[c] = msg_t'(t);
            m = (t < 0) ? -t : t;
            sgn ^= (t < 0);
            if (m < min1) begin min2 = min1; min1 = m; idx = c; end
            else if (m < min2) min2 = m;
          end
        end
        for (int c = 0; c < LNB; c++) begin
          m = (c == idx) ? min2 : min1;
          if (ldpc_nz(r, c)) begin
            if (sgn ^ v2c[c][MWD-1]) c2v_n[r][c][k] = msg_t'(-m);
            else                     c2v_n[r][c][k] = msg_t'(m);
          end
        end
      end
    end
  end

  assign in_ready  = (st_q == S_IDLE);
  assign out_valid = (st_q == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_q     <= S_IDLE;
      it_q     <= '0;
      out_bits <= '0;
      for (int v = 0; v < LN; v++) ch_q[v] <= '0;
      for (int r = 0; r < LMB; r++)
        for (int c = 0; c < LNB; c++)
          for (int k = 0; k < LZ; k++) c2v_q[r][c][k] <= '0;
    end else begin
      case (st_q)
        S_IDLE: if (in_valid) begin
          for (int v = 0; v < LN; v++) ch_q[v] <= in_llr[v*LLRW +: LLRW];
          for (int r = 0; r < LMB; r++)
            for (int c = 0; c < LNB; c++)
              for (int k = 0; k < LZ; k++) c2v_q[r][c][k] <= '0;
          it_q <= '0;
          st_q <= S_RUN;
        end
        S_RUN: begin
          if (int'(it_q) == ITER) begin
            for (int v = 0; v < LK; v++) out_bits[v] <= tot[v][TW-1];
            st_q <= S_OUT;
          end else begin
            c2v_q <= c2v_n;
            it_q  <= it_q + 1'b1;
          end
        end
        default: if (out_ready) st_q <= S_IDLE;
      endcase
    end
  end

endmodule
