// rx_dsp: receiver DSP, 256 ADC samples (128 symbols) per clock.
//
// Front end: frame_sync finds the frame marker, data_align cuts 284-sample
// frame-aligned beats, timing_comp applies the fractional delay mu, and the
// DFE equalizes 128 symbols per clock.  Timing loop: mm_ted compares the
// compensated samples at symbol centres with the DFE decisions, loop_filter
// turns that into mu.  Back end (payload beats only): mlse_sova with the
// channel means of mlse_stats produces two soft values per symbol,
// llr_buffer drops the termination symbols and repacks, deinterleaver
// restores codeword order and three ldpc_decoder cores return 96 decoded
// bits each per clock.  This chain follows the source design.
//
// Training: the first TRAIN_BEATS aligned beats carry training symbols; the
// DFE then adapts on the regenerated training symbols (PRBS-15 beats 1 ..
// TRAIN_BEATS, beat 0 having filled the marker beat), afterwards on its own
// decisions.  Only later beats go to the MLSE.  These frame details are this
// design's choice.
//
// Interface: in_valid/in_smp (NS x 6-bit signed, continuous); out_valid[d] /
// out_bits[d] for decoder d (its codewords are numbers d, d+3, d+6, ... of the
// transmitted stream).  Status outputs report lock, mu, the LMS step-size
// stage, channel-estimate updates and overflow conditions.
module rx_dsp
  import pam4_pkg::*;
#(
  parameter int TRAIN_BEATS = 256,
  parameter int ITER        = 16,
  parameter int MU_T1       = 256,
  parameter int MU_T2       = 1024,
  parameter int MU_T3       = 4096
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [NSMP*6-1:0]    in_smp,
  output logic [2:0]           out_valid,
  output logic [3*96-1:0]      out_bits,
  output logic                 lock,
  output logic signed [5:0]    mu,
  output logic [1:0]           mu_stage,
  output logic                 stats_update,
  output logic                 data_beat,
  output logic                 overflow
);
  localparam int PAD = 14;

  // synchronisation and alignment
  logic             lock_pulse;
  logic [7:0]       offset;
  logic             al_v;
  logic [(NSMP+2*PAD)*6-1:0] al_smp;
  logic [31:0]      al_beat;

  frame_sync #(.NS(NSMP), .SW(6)) u_sync (
    .clk, .rst_n, .in_valid, .in_smp, .lock, .lock_pulse, .offset
  );

  data_align #(.NS(NSMP), .SW(6), .PAD(PAD)) u_align (
    .clk, .rst_n, .in_valid, .in_smp, .lock_pulse, .offset,
    .out_valid(al_v), .out_smp(al_smp), .beat(al_beat)
  );

  // timing compensation
  logic             tc_v;
  logic [(NSMP+2*PAD-4)*7-1:0] tc_smp;

  timing_comp #(.IN_N(NSMP+2*PAD), .SW(6), .MUW(6)) u_tc (
    .clk, .rst_n, .in_valid(al_v), .in_smp(al_smp), .mu,
    .out_valid(tc_v), .out_smp(tc_smp)
  );

  // training symbols and beat classification at the DFE input
  logic [31:0]      tc_cnt_q;
  logic [14:0]      prbs_q;
  logic             train;
  logic [2*NSYM-1:0] train_sym;

  assign train = (tc_cnt_q < 32'(TRAIN_BEATS));   // counter stops at TRAIN_BEATS

  always_comb begin
    logic [14:0]      s;
    logic [DBITS-1:0] b;
    s = prbs_q;
    b = prbs_beat(s);
    for (int k = 0; k < NSYM; k++) begin
      if (k % BLK == BLK - 1) train_sym[2*k +: 2] = TERM_SYM;
      else train_sym[2*k +: 2] = gray_map(b[2*(k - k/BLK) +: 2]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      logic [14:0]      s;
      logic [DBITS-1:0] b;
      s = PRBS_SEED;
      b = prbs_beat(s);           // beat 0 filled the marker beat
      prbs_q   <= s;
      tc_cnt_q <= '0;
    end else if (tc_v) begin
      logic [14:0]      s;
      logic [DBITS-1:0] b;
      s = prbs_q;
      b = prbs_beat(s);
      if (train) prbs_q <= s;
      if (train) tc_cnt_q <= tc_cnt_q + 1;
    end
  end

  // DFE
  logic              dfe_v;
  logic [NSYM*7-1:0] ffe_y;
  logic [2*NSYM-1:0] dfe_dec;
  logic              dfe_data_q;
  logic [NSYM*7-1:0] ctr_q;       // compensated samples at symbol centres

  dfe #(.MU_T1(MU_T1), .MU_T2(MU_T2), .MU_T3(MU_T3)) u_dfe (
    .clk, .rst_n, .in_valid(tc_v), .in_smp(tc_smp), .train, .train_sym,
    .out_valid(dfe_v), .ffe_out(ffe_y), .dec(dfe_dec), .mu_stage
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dfe_data_q <= 1'b0;
      ctr_q      <= '0;
    end else begin
      dfe_data_q <= tc_v && !train;
      for (int k = 0; k < NSYM; k++)
        ctr_q[k*7 +: 7] <= tc_smp[(2*k + 12)*7 +: 7];
    end
  end

  // timing loop
  logic               ted_v;
  logic signed [13:0] ted_err;

  mm_ted u_ted (
    .clk, .rst_n, .in_valid(dfe_v), .y(ctr_q), .dec(dfe_dec),
    .out_valid(ted_v), .err(ted_err)
  );

  loop_filter u_lf (
    .clk, .rst_n, .in_valid(ted_v), .err(ted_err), .mu
  );

  // MLSE with channel statistics
  logic [64*7-1:0]     means;
  logic                ml_v, ml_data;
  logic [2*NSYM*5-1:0] ml_llr;
  logic [2*NSYM-1:0]   ml_dec;
  logic [NSYM*7-1:0]   ml_y;

  mlse_sova u_mlse (
    .clk, .rst_n, .in_valid(dfe_v && dfe_data_q), .in_data(dfe_data_q),
    .y(ffe_y), .means,
    .out_valid(ml_v), .out_data(ml_data), .llr(ml_llr), .dec(ml_dec), .y_out(ml_y)
  );

  mlse_stats u_stats (
    .clk, .rst_n, .in_valid(ml_v && ml_data), .y(ml_y), .dec(ml_dec),
    .means, .update(stats_update)
  );

  assign data_beat = ml_v && ml_data;

  // termination removal, de-interleaving, decoding
  logic           bf_v, bf_ovf;
  logic [288*5-1:0] bf_llr;
  logic           di_v, di_ovf;
  logic [288*5-1:0] di_llr;
  logic [2:0]     dec_ovr;

  llr_buffer u_buf (
    .clk, .rst_n, .in_valid(ml_v && ml_data), .in_llr(ml_llr),
    .out_valid(bf_v), .out_llr(bf_llr), .overflow(bf_ovf)
  );

  deinterleaver u_di (
    .clk, .rst_n, .in_valid(bf_v), .in_llr(bf_llr),
    .out_valid(di_v), .out_llr(di_llr), .overflow(di_ovf)
  );

  for (genvar d = 0; d < 3; d++) begin : g_dec
    ldpc_decoder #(.ITER(ITER)) u_dec (
      .clk, .rst_n,
      .in_valid(di_v), .in_llr(di_llr[d*96*5 +: 96*5]),
      .out_valid(out_valid[d]), .out_bits(out_bits[d*96 +: 96]),
      .overrun(dec_ovr[d])
    );
  end

  assign overflow = bf_ovf || di_ovf || (|dec_ovr);

endmodule
