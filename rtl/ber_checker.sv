// ber_checker: embedded pattern matcher for bit-error-rate measurement.
//
// For each of NL decoder outputs it runs a local copy of the PRBS-15
// sequence of the matching transmit lane (x^15 + x^14 + 1, seed SEED0 + lane,
// as in prbs_source), compares every W-bit output word with the next W
// reference bits and accumulates compared bits and bit errors.  Measuring BER
// with pattern matchers inside the receiver follows the source design; the
// per-lane references started at reset (no self-synchronisation) are this
// design's choice, which requires the transmitter to start from its reset
// state as well.
//
// Interface: in_valid[l] / in_bits (lane l in bits l*W ...); bits and errs
// are running totals over all lanes, updated one clock after each word;
// clear restarts the totals.  56-bit totals hold more than a day at 50 Gb/s.
module ber_checker #(
  parameter int NL    = 3,
  parameter int W     = 96,
  parameter int SEED0 = 1,
  parameter int CW    = 56
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic [NL-1:0]   in_valid,
  input  logic [NL*W-1:0] in_bits,
  output logic [CW-1:0]   bits,
  output logic [CW-1:0]   errs
);
  logic [14:0] st_q [NL];
  logic [14:0] st_n [NL];
  int          nerr [NL];

  always_comb begin
    for (int l = 0; l < NL; l++) begin
      logic [14:0] s;
      s = st_q[l];
      nerr[l] = 0;
      for (int i = 0; i < W; i++) begin
        logic r;
        r = s[14] ^ s[13];
        s = {s[13:0], r};
        if (in_bits[l*W + i] != r) nerr[l]++;
      end
      st_n[l] = s;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < NL; l++) st_q[l] <= 15'(SEED0 + l);
      bits <= '0;
      errs <= '0;
    end else begin
      logic [CW-1:0] b, e;
      b = clear ? '0 : bits;
      e = clear ? '0 : errs;
      for (int l = 0; l < NL; l++) begin
        if (in_valid[l]) begin
          st_q[l] <= st_n[l];
          b += CW'(W);
          e += CW'(nerr[l]);
        end
      end
      bits <= b;
      errs <= e;
    end
  end
endmodule
