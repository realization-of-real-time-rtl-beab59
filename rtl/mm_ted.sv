// mm_ted: Mueller-Mueller timing error estimator.
//
// For the 128 timing-recovered symbols y_k (compensator outputs at symbol
// centres) and the DFE decisions a_k (amplitudes -3, -1, 1, 3):
//   err = (sum_{k=1..N-1} y_k * a_{k-1} - y_{k-1} * a_k) / 8,
// saturated to EW bits.  The estimator is negative when the sampling point
// is late.  The decision-directed Mueller-Mueller rule follows the source
// design; the 1/8 scaling to the 14-bit output width of the source design
// is this design's choice.  Registered, one clock.
module mm_ted
  import pam4_pkg::*;
#(
  parameter int N  = NSYM,
  parameter int YW = 7,
  parameter int EW = 14
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [N*YW-1:0]        y,
  input  logic [2*N-1:0]         dec,
  output logic                   out_valid,
  output logic signed [EW-1:0]   err
);
  logic signed [31:0] s;

  always_comb begin
    s = '0;
    for (int k = 1; k < N; k++)
      s += 32'(signed'(y[k*YW +: YW])) * 32'(amp(dec[2*(k-1) +: 2]))
         - 32'(signed'(y[(k-1)*YW +: YW])) * 32'(amp(dec[2*k +: 2]));
    s = s >>> 3;
    if (s > 2**(EW-1) - 1) s = 2**(EW-1) - 1;
    if (s < -(2**(EW-1)))  s = -(2**(EW-1));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= '0;
    end else begin
      out_valid <= in_valid;
      err       <= in_valid ? s[EW-1:0] : '0;
    end
  end
endmodule
