// tx_dsp: transmitter DSP, 128 PAM-4 symbols per clock.
//
// Chain (as in the source design): three LDPC encoders in parallel ->
// 12 x 1224 block interleaver -> training insertion (frame marker, training
// beats, then data) -> Gray PAM-4 mapping -> termination symbol insertion.
// The interleaver delivers 288 bits per beat and the framer takes 248 (124
// payload symbols); a gearbox between them matches the widths and
// back-pressures the interleaver.  That gearbox is this design's addition.
//
// Interface: info carries 3 x 2256 information bits (encoder e in bits
// e*2256 ...), accepted with info_valid && info_ready.  start begins the
// frame.  sym/sym_valid: 128 two-bit symbol indices per clock for the DAC,
// symbol k in bits 2k+1:2k, sent in time order k = 0..127.  Latency from
// framer decision to symbols: 3 clocks.
module tx_dsp
  import pam4_pkg::*;
#(
  parameter int TRAIN_BEATS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic                info_valid,
  output logic                info_ready,
  input  logic [3*LK-1:0]     info,
  output logic                sym_valid,
  output logic [2*NSYM-1:0]   sym,
  output logic                underrun,
  output logic                in_training
);
  logic [2:0]        enc_v;
  logic [3*LN-1:0]   cw;
  logic              il_ready;
  logic              il_v, il_rdy;
  logic [287:0]      il_d;
  logic              gb_v, gb_rdy;
  logic [DBITS-1:0]  gb_d;
  logic              fr_v;
  logic [DBITS-1:0]  fr_bits;
  logic              mp_v;
  logic [DBITS-1:0]  mp_sym;

  // The encoders have a one-clock register; accept info only when the
  // interleaver will have room for their output.
  logic enc_busy_q;
  assign info_ready = il_ready && !enc_busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) enc_busy_q <= 1'b0;
    else        enc_busy_q <= info_valid && info_ready;
  end

  for (genvar e = 0; e < 3; e++) begin : g_enc
    ldpc_encoder u_enc (
      .clk, .rst_n,
      .in_valid (info_valid && info_ready),
      .info     (info[e*LK +: LK]),
      .out_valid(enc_v[e]),
      .codeword (cw[e*LN +: LN])
    );
  end

  tx_interleaver u_il (
    .clk, .rst_n,
    .in_valid (enc_v[0]),
    .in_ready (il_ready),
    .in_data  (cw),
    .out_valid(il_v),
    .out_ready(il_rdy),
    .out_data (il_d)
  );

  gearbox #(.EW(1), .IN_N(288), .OUT_N(DBITS)) u_gb (
    .clk, .rst_n,
    .in_valid (il_v),
    .in_ready (il_rdy),
    .in_data  (il_d),
    .out_valid(gb_v),
    .out_ready(gb_rdy),
    .out_data (gb_d)
  );

  training_insert #(.TRAIN_BEATS(TRAIN_BEATS)) u_tr (
    .clk, .rst_n, .start,
    .data_valid (gb_v),
    .data_ready (gb_rdy),
    .data       (gb_d),
    .out_valid  (fr_v),
    .out_bits   (fr_bits),
    .underrun,
    .in_training
  );

  pam4_mapper u_map (
    .clk, .rst_n,
    .in_valid (fr_v),
    .in_bits  (fr_bits),
    .out_valid(mp_v),
    .out_sym  (mp_sym)
  );

  term_insert u_term (
    .clk, .rst_n,
    .in_valid (mp_v),
    .in_sym   (mp_sym),
    .out_valid(sym_valid),
    .out_sym  (sym)
  );

endmodule
