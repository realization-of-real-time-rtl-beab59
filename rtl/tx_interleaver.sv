// tx_interleaver: 12 x 1224 block interleaver for the transmitter.
//
// A block is six LDPC codewords (14688 bits), delivered as two input beats
// of three codewords (one per encoder).  Codeword m of the block fills
// matrix rows 2m and 2m+1, written row by row, so the bit at stream position
// q sits at row q / 1224, column q % 1224.  The block is read column by
// column: output position p takes row p % 12 of column p / 12.  Writing rows
// and reading columns without any further permutation follows the source
// design.  This design's choices: two block buffers in ping-pong so one fills
// while the other drains, and an output of 288 bits (24 columns) per beat,
// which makes a block exactly 51 output beats.
//
// Interface: in_valid/in_ready with in_data (bits e*2448 + i = bit i of
// encoder e's codeword); out_valid/out_ready with out_data.  Output starts the
// cycle after the second input beat of a block.
module tx_interleaver
  import pam4_pkg::*;
#(
  parameter int ROWS  = IL_ROWS,
  parameter int COLS  = IL_COLS,
  parameter int IN_W  = 3 * LN,
  parameter int OUT_W = 288
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic [IN_W-1:0]   in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic [OUT_W-1:0]  out_data
);
  localparam int BLKB  = ROWS * COLS;
  localparam int NIN   = BLKB / IN_W;     // input beats per block
  localparam int NOUT  = BLKB / OUT_W;    // output beats per block

  logic [BLKB-1:0] mem_q [2];
  logic [1:0]      full_q;                // buffer holds a complete block
  logic            wsel_q, rsel_q;
  logic [$clog2(NIN+1)-1:0]  wbeat_q;
  logic [$clog2(NOUT+1)-1:0] rbeat_q;

  assign in_ready  = !full_q[wsel_q];
  assign out_valid = full_q[rsel_q];

  // Column-wise read of the current output beat
  always_comb begin
    for (int j = 0; j < OUT_W; j++) begin
      int p, q;
      p = int'(rbeat_q) * OUT_W + j;
      q = (p % ROWS) * COLS + p / ROWS;
      out_data[j] = mem_q[rsel_q][q];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mem_q[0] <= '0;
      mem_q[1] <= '0;
      full_q   <= '0;
      wsel_q   <= 1'b0;
      rsel_q   <= 1'b0;
      wbeat_q  <= '0;
      rbeat_q  <= '0;
    end else begin
      logic [1:0] full_n;
      full_n = full_q;
      if (in_valid && in_ready) begin
        mem_q[wsel_q][int'(wbeat_q)*IN_W +: IN_W] <= in_data;
        if (int'(wbeat_q) == NIN - 1) begin
          wbeat_q <= '0;
          full_n[wsel_q] = 1'b1;
          wsel_q <= !wsel_q;
        end else begin
          wbeat_q <= wbeat_q + 1'b1;
        end
      end
      if (out_valid && out_ready) begin
        if (int'(rbeat_q) == NOUT - 1) begin
          rbeat_q <= '0;
          full_n[rsel_q] = 1'b0;
          rsel_q <= !rsel_q;
        end else begin
          rbeat_q <= rbeat_q + 1'b1;
        end
      end
      full_q <= full_n;
    end
  end

  initial begin
    assert (BLKB % IN_W == 0 && BLKB % OUT_W == 0);
  end

endmodule
