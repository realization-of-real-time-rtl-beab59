// pam4_mapper: Gray-coded PAM-4 mapping, 2*NSYM bits to NSYM symbols per
// clock, registered.
//
// Bits 2i+1 (MSB) and 2i (LSB) form symbol i.  The table 00->0, 01->1,
// 11->2, 10->3 (symbol index 0..3 is lowest..highest level) gives Gray
// coding between neighbouring levels, as the source design asks; the table
// itself is this design's choice (pam4_pkg::gray_map).
module pam4_mapper
  import pam4_pkg::*;
#(
  parameter int N = NDATA
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [2*N-1:0]   in_bits,
  output logic             out_valid,
  output logic [2*N-1:0]   out_sym
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_sym   <= '0;
    end else begin
      out_valid <= in_valid;
      for (int i = 0; i < N; i++)
        out_sym[2*i +: 2] <= gray_map(in_bits[2*i +: 2]);
    end
  end
endmodule
