// pam4_dsp_top: PAM-4 transceiver DSP with LDPC forward error correction for
// a 56 Gb/s C-band link (28 GBd, 128 symbols per clock at 218.75 MHz).
//
// The transmit DSP (tx_dsp) and the receive DSP (rx_dsp) stand side by side
// as on one transceiver chip.  The DAC, optics, fibre and ADC lie outside:
// tx_sym (128 two-bit symbol indices per clock) goes to the DAC, rx_smp
// (256 six-bit samples per clock, two per symbol) comes from the ADC.
//
// For measurements, prbs_mode replaces the payload by three PRBS-15
// sequences (prbs_source) and ber_checker counts compared bits and errors at
// the decoder outputs, like the pattern matchers of the source design.
//
// Interface: tx_info (3 x 2256 information bits per accepted beat,
// valid/ready, used when prbs_mode is low), tx_start begins the frame;
// rx_bits/rx_valid return 96 decoded bits per clock from each of the three
// decoders; ber_bits/ber_errs are the pattern matcher's running totals.  Status: rx lock,
// timing delay mu, DFE step stage, channel-estimate updates, overflows.
module pam4_dsp_top
  import pam4_pkg::*;
#(
  parameter int TRAIN_BEATS = 256,
  parameter int ITER        = 16,
  parameter int MU_T1       = 256,
  parameter int MU_T2       = 1024,
  parameter int MU_T3       = 4096
) (
  input  logic                clk,
  input  logic                rst_n,
  // transmitter
  input  logic                prbs_mode,      // payload from the PRBS source
  input  logic                tx_start,
  input  logic                tx_info_valid,
  output logic                tx_info_ready,
  input  logic [3*LK-1:0]     tx_info,
  output logic                tx_sym_valid,
  output logic [2*NSYM-1:0]   tx_sym,
  output logic                tx_underrun,
  output logic                tx_training,
  // receiver
  input  logic                rx_smp_valid,
  input  logic [NSMP*6-1:0]   rx_smp,
  output logic [2:0]          rx_valid,
  output logic [3*96-1:0]     rx_bits,
  output logic                rx_lock,
  output logic signed [5:0]   rx_mu,
  output logic [1:0]          rx_mu_stage,
  output logic                rx_stats_update,
  output logic                rx_data_beat,
  output logic                rx_overflow,
  // pattern matcher
  input  logic                ber_clear,
  output logic [55:0]         ber_bits,
  output logic [55:0]         ber_errs
);
  logic            prbs_valid, info_valid, info_ready;
  logic [3*LK-1:0] prbs_data, info;

  prbs_source #(.NL(3), .W(LK)) u_prbs (
    .clk, .rst_n, .enable(prbs_mode),
    .out_valid(prbs_valid), .out_ready(info_ready), .out_data(prbs_data)
  );

  assign info_valid    = prbs_mode ? prbs_valid : tx_info_valid;
  assign info          = prbs_mode ? prbs_data  : tx_info;
  assign tx_info_ready = !prbs_mode && info_ready;

  tx_dsp #(.TRAIN_BEATS(TRAIN_BEATS)) u_tx (
    .clk, .rst_n,
    .start      (tx_start),
    .info_valid (info_valid),
    .info_ready (info_ready),
    .info       (info),
    .sym_valid  (tx_sym_valid),
    .sym        (tx_sym),
    .underrun   (tx_underrun),
    .in_training(tx_training)
  );

  rx_dsp #(.TRAIN_BEATS(TRAIN_BEATS), .ITER(ITER),
           .MU_T1(MU_T1), .MU_T2(MU_T2), .MU_T3(MU_T3)) u_rx (
    .clk, .rst_n,
    .in_valid    (rx_smp_valid),
    .in_smp      (rx_smp),
    .out_valid   (rx_valid),
    .out_bits    (rx_bits),
    .lock        (rx_lock),
    .mu          (rx_mu),
    .mu_stage    (rx_mu_stage),
    .stats_update(rx_stats_update),
    .data_beat   (rx_data_beat),
    .overflow    (rx_overflow)
  );

  ber_checker #(.NL(3), .W(96), .CW(56)) u_ber (
    .clk, .rst_n, .clear(ber_clear),
    .in_valid(rx_valid), .in_bits(rx_bits),
    .bits(ber_bits), .errs(ber_errs)
  );

endmodule
