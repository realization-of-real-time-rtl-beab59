// prbs_source: PRBS-15 test-data source for the transmitter.
//
// Produces NL lanes of W bits per accepted beat, lane e being a continuous
// PRBS-15 sequence (x^15 + x^14 + 1) started from seed SEED0 + e.  Bit i of
// a lane's word is the i-th next bit of its sequence.  The source design
// sends a 2^15 - 1 PRBS as payload; one independent sequence per encoder
// lane, so that each decoder's output can be checked on its own, is this
// design's choice.
//
// Interface: out_valid is high whenever enabled; the word advances on
// out_valid && out_ready.
module prbs_source #(
  parameter int NL    = 3,
  parameter int W     = 2256,
  parameter int SEED0 = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            enable,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [NL*W-1:0] out_data
);
  logic [14:0] st_q  [NL];
  logic [14:0] st_n  [NL];

  always_comb begin
    for (int e = 0; e < NL; e++) begin
      logic [14:0] s;
      s = st_q[e];
      for (int i = 0; i < W; i++) begin
        out_data[e*W + i] = s[14] ^ s[13];
        s = {s[13:0], s[14] ^ s[13]};
      end
      st_n[e] = s;
    end
  end

  assign out_valid = enable;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < NL; e++) st_q[e] <= 15'(SEED0 + e);
    end else if (out_valid && out_ready) begin
      st_q <= st_n;
    end
  end
endmodule
