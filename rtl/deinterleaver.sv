// deinterleaver: receiver-side inverse of the 12 x 1224 block interleaver.
//
// A block holds 14688 soft values in received order (position p = column
// p/12, row p%12 of the matrix).  The de-interleaved order q = row*1224 +
// column puts codeword m (of six) at q = m*2448 .. m*2448+2447.  Decoder d of
// three receives codewords d and d+3 back to back, 96 values per clock, so
// output beat t (0..50) carries, for each decoder d, the values of its
// stream positions s = 96t .. 96t+95 with q = (d + 3*(s/2448))*2448 + s%2448.
// Each output value is a fixed gather from the stored block, selected by t.
// The 1224 x 12 matrix and the 96-values-per-decoder split follow the source
// design; input width 288, ping-pong storage and the codeword-to-decoder
// assignment are this design's choices.
//
// Interface: in_valid/in_llr (NW x LLRW per beat, 51 beats per block);
// out_valid/out_llr (NDEC x 96 x LLRW; decoder d in the d-th slice), one beat
// per clock, starting the clock after a block is complete.  overflow flags an
// input block arriving while both buffers are occupied.
module deinterleaver
  import pam4_pkg::*;
#(
  parameter int ROWS = IL_ROWS,
  parameter int COLS = IL_COLS,
  parameter int NW   = 288,
  parameter int LLRW = 5,
  parameter int NDEC = 3
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [NW*LLRW-1:0]       in_llr,
  output logic                     out_valid,
  output logic [NW*LLRW-1:0]       out_llr,
  output logic                     overflow
);
  localparam int BLKN = ROWS * COLS;
  localparam int NBT  = BLKN / NW;             // beats per block
  localparam int DW   = NW / NDEC;             // values per decoder per beat
  localparam int CWN  = BLKN / (2 * NDEC);     // codeword length

  logic [LLRW-1:0] mem_q [2][BLKN];
  logic [1:0]      full_q;
  logic            wsel_q, rsel_q;
  logic [$clog2(NBT+1)-1:0] wb_q, rb_q;

  assign out_valid = full_q[rsel_q];

  always_comb begin
    for (int d = 0; d < NDEC; d++) begin
      for (int k = 0; k < DW; k++) begin
        int s, q, p;
        s = int'(rb_q) * DW + k;
        q = (d + NDEC * (s / CWN)) * CWN + s % CWN;
        p = (q % COLS) * ROWS + q / COLS;
        out_llr[(d*DW + k)*LLRW +: LLRW] = mem_q[rsel_q][p];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      full_q <= '0;
      wsel_q <= 1'b0;
      rsel_q <= 1'b0;
      wb_q   <= '0;
      rb_q   <= '0;
      overflow <= 1'b0;
    end else begin
      logic [1:0] fn;
      fn = full_q;
      overflow <= 1'b0;
      if (in_valid) begin
        if (full_q[wsel_q]) overflow <= 1'b1;
        for (int j = 0; j < NW; j++)
          mem_q[wsel_q][int'(wb_q)*NW + j] <= in_llr[j*LLRW +: LLRW];
        if (int'(wb_q) == NBT - 1) begin
          wb_q <= '0;
          fn[wsel_q] = 1'b1;
          wsel_q <= !wsel_q;
        end else begin
          wb_q <= wb_q + 1'b1;
        end
      end
      if (out_valid) begin
        if (int'(rb_q) == NBT - 1) begin
          rb_q <= '0;
          fn[rsel_q] = 1'b0;
          rsel_q <= !rsel_q;
        end else begin
          rb_q <= rb_q + 1'b1;
        end
      end
      full_q <= fn;
    end
  end

endmodule
