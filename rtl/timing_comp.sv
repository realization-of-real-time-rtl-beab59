// timing_comp: timing error compensator (fractional delay).
//
// Output sample j is the input signal evaluated at position j + 2 + mu/16,
// where j + 2 is the centre of its 5-sample window in[j .. j+4] and mu is a
// signed 6-bit delay in 1/16 sample (range -2 .. +1.94 samples).  The integer
// part of the delay picks a pair of neighbouring window samples and the
// fraction interpolates linearly between them; the result has one more bit
// than the input (scale x2).  A 5-tap window per output follows the source
// design; linear interpolation inside it is this design's choice.
//
// Interface: in_smp holds IN_N signed SW-bit samples, out_smp OUT_N =
// IN_N - 4 signed (SW+1)-bit samples.  Registered, one clock.
module timing_comp #(
  parameter int IN_N = 284,
  parameter int SW   = 6,
  parameter int MUW  = 6
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [IN_N*SW-1:0]          in_smp,
  input  logic signed [MUW-1:0]       mu,
  output logic                        out_valid,
  output logic [(IN_N-4)*(SW+1)-1:0]  out_smp
);
  localparam int OUT_N = IN_N - 4;

  logic [(IN_N-4)*(SW+1)-1:0] y;

  always_comb begin
    int ip, fr;
    // floor(mu/16) and the fraction in 1/16
    ip = int'(mu) >>> 4;
    fr = int'(mu) - ip * 16;
    for (int j = 0; j < OUT_N; j++) begin
      int a, b, v;
      a = int'(signed'(in_smp[(j + 2 + ip) * SW +: SW]));
      b = int'(signed'(in_smp[(j + 3 + ip) * SW +: SW]));
      v = (a * (16 - fr) + b * fr) >>> 3;       // x2 scale, 16ths removed
      if (v > 2**SW - 1) v = 2**SW - 1;
      if (v < -(2**SW)) v = -(2**SW);
      y[j*(SW+1) +: SW+1] = v[SW:0];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_smp   <= '0;
    end else begin
      out_valid <= in_valid;
      out_smp   <= y;
    end
  end

endmodule
