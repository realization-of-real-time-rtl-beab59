// ldpc_encoder: systematic encoder for the quasi-cyclic (2448,2256) LDPC code
// with 48 x 48 circulants.
//
// The parity-check matrix has 4 block rows and 51 block columns.  Block
// column c < 47 carries information bits; its circulant in block row r is an
// identity shifted by s(r,c) (pam4_pkg::ldpc_shift).  The parity part is
// dual-diagonal: identity blocks on the diagonal and the sub-diagonal.  With
// that structure the syndrome of the information part of row block r,
// S_r[k] = XOR_c info_c[(k + s(r,c)) mod 48], gives the parity directly:
// p_0 = S_0 and p_r = S_r ^ p_{r-1}.  The circulants are fixed wiring and the
// rest is an XOR network, as in the source design; the particular shifts and
// the dual-diagonal parity part are this design's choice.
//
// Interface: info (2256 bits, bit c*48+j = column j of block column c) with
// in_valid; one clock later codeword = {parity, info} (info in bits 0..2255)
// with out_valid.
module ldpc_encoder
  import pam4_pkg::*;
#(
  parameter int Z  = LZ,
  parameter int MB = LMB,
  parameter int NB = LNB
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [(NB-MB)*Z-1:0]   info,
  output logic                   out_valid,
  output logic [NB*Z-1:0]        codeword
);
  localparam int KB = NB - MB;

  logic [MB*Z-1:0] parity;

  always_comb begin
    logic [Z-1:0] s;
    logic [Z-1:0] prev;
    prev = '0;
    for (int r = 0; r < MB; r++) begin
      s = '0;
      for (int c = 0; c < KB; c++) begin
        for (int k = 0; k < Z; k++) begin
          s[k] ^= info[c*Z + (k + ldpc_shift(r, c)) % Z];
        end
      end
      prev = s ^ prev;
      parity[r*Z +: Z] = prev;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      codeword  <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) codeword <= {parity, info};
    end
  end

endmodule
