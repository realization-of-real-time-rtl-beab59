// term_insert: termination symbol insertion.
//
// Takes 124 payload symbols per clock and outputs 128: after every 31
// payload symbols one termination symbol is inserted, so output symbols
// 31, 63, 95 and 127 are terminations and each 32-symbol block ends with one.
// The receiver uses them to end MLSE paths and to break the DFE feedback
// loop between blocks (as in the source design).  The termination value
// (pam4_pkg::TERM_SYM, symbol 0) is this design's choice.  Registered, one
// clock.
module term_insert
  import pam4_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic [2*NDATA-1:0] in_sym,
  output logic               out_valid,
  output logic [2*NSYM-1:0]  out_sym
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      for (int k = 0; k < NSYM; k++) begin
        if (k % BLK == BLK - 1) out_sym[2*k +: 2] <= TERM_SYM;
        else                    out_sym[2*k +: 2] <= in_sym[2*(k - k/BLK) +: 2];
      end
    end
  end
endmodule
