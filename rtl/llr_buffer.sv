// llr_buffer: removes the termination symbols' soft values and repacks.
//
// Each payload beat from the MLSE carries 256 soft values (two per symbol,
// 128 symbols); the values of symbols 31, 63, 95 and 127 (the termination
// symbols) are dropped, leaving 248 in transmit bit order, which a gearbox
// repacks into beats of OUT_N values for the de-interleaver.  Dropping the
// terminations in a buffer follows the source design; the output width of
// 288 (so that a 14688-value interleaver block is exactly 51 beats) is this
// design's choice.
//
// Interface: in_valid/in_llr (256 x LLRW); out_valid/out_llr (OUT_N x LLRW);
// the output is never stalled.  Two clocks from input to earliest output.
module llr_buffer
  import pam4_pkg::*;
#(
  parameter int LLRW  = 5,
  parameter int OUT_N = 288
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      in_valid,
  input  logic [2*NSYM*LLRW-1:0]    in_llr,
  output logic                      out_valid,
  output logic [OUT_N*LLRW-1:0]     out_llr,
  output logic                      overflow
);
  logic                   v_q;
  logic [DBITS*LLRW-1:0]  d_q;
  logic                   gb_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      d_q <= '0;
    end else begin
      v_q <= in_valid;
      if (in_valid) begin
        for (int k = 0; k < NSYM; k++) begin
          if (k % BLK != BLK - 1)
            d_q[2*(k - k/BLK)*LLRW +: 2*LLRW] <= in_llr[2*k*LLRW +: 2*LLRW];
        end
      end
    end
  end

  gearbox #(.EW(LLRW), .IN_N(DBITS), .OUT_N(OUT_N)) u_gb (
    .clk, .rst_n,
    .in_valid (v_q),
    .in_ready (gb_ready),
    .in_data  (d_q),
    .out_valid,
    .out_ready(1'b1),
    .out_data (out_llr)
  );

  assign overflow = v_q && !gb_ready;

endmodule
