// tb_pam4_dsp_top: end-to-end test of the transceiver DSP at its default
// parameters.
//
// The transmitter runs in PRBS mode: its internal PRBS source supplies the
// payload (random words offered on tx_info must be refused), and the
// receiver's pattern matcher must count every decoded bit with no error.
// The transmitted information is also taken from inside the design so that
// each decoded bit can be compared directly.  The symbols pass through
// a behavioural link model: the analog waveform r(t) = sum_k L(a_k) h(t-k)
// with levels L = -24, -8, 8, 24 (6-bit ADC scale) and a triangular pulse
// h of half-width 1.25 symbols (inter-symbol interference on both sides),
// sampled twice per symbol with a fixed timing offset of 0.15 symbol after
// a delay of DELAY samples of idle noise; every 2003rd sample gets an
// impulse of +-14 so that some symbols are received wrongly.  The receiver
// output of decoder d must reproduce, bit for bit, the information of
// encoder d's codewords in order.
//
// Mechanisms counted (each must occur): frame lock; training beats then
// payload beats (mode switch of the DFE); a change of the LMS step size; a
// channel-statistics update of the MLSE; a non-zero timing correction mu;
// symbol errors at the MLSE output that the LDPC decoders then correct
// (raw errors > 0, decoded errors = 0); interleaver blocks on both
// sides; and bits counted by the pattern matcher.  Overflow and underrun flags must never rise.
module tb_pam4_dsp_top;
  import pam4_pkg::*;
  localparam int DELAY   = 77;
  localparam int NCW     = 6;       // codewords checked per decoder
  localparam int TRAINB  = 256;     // matches the top's default
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic                tx_start = 0, tx_info_valid = 0, tx_info_ready, tx_sym_valid, tx_underrun, tx_training;
  logic [3*LK-1:0]     tx_info;
  logic [2*NSYM-1:0]   tx_sym;
  logic                rx_smp_valid = 0;
  logic [NSMP*6-1:0]   rx_smp;
  logic [2:0]          rx_valid;
  logic [3*96-1:0]     rx_bits;
  logic                rx_lock, rx_stats_update, rx_data_beat, rx_overflow;
  logic signed [5:0]   rx_mu;
  logic [1:0]          rx_mu_stage;
  logic                prbs_mode = 1, ber_clear = 0;
  logic [55:0]         ber_bits, ber_errs;
  int                  n_refused = 0;

  pam4_dsp_top dut (.*);

  // ---------------- information source ----------------
  logic [3*LK-1:0] sent [$];
  always @(posedge clk) if (rst_n && dut.info_valid && dut.info_ready) sent.push_back(dut.info);
  always @(posedge clk) if (rst_n && tx_info_valid && tx_info_ready) n_refused++;
  always @(negedge clk) if (rst_n) begin
    tx_info_valid = 1;
    if (!(tx_info_valid && !tx_info_ready))
      for (int i = 0; i < 3*LK; i++) tx_info[i] = 1'($urandom);
  end

  // ---------------- link model ----------------
  int  txs [$];                  // transmitted symbols, in order
  real hist [4];                 // last symbols' levels for the waveform
  int  smp_q [$];
  int  nsmp = 0;
  int  tx_beats = 0;
  logic [2*NSYM-1:0] tx_log [$];

  function automatic real h(real t);
    if (t < 0) t = -t;
    return (t < 1.25) ? 1.0 - t / 1.25 : 0.0;
  endfunction

  always @(posedge clk) if (rst_n) begin
    // one beat of 128 symbols (or idle) -> 256 samples
    int sy [NSYM];
    for (int k = 0; k < NSYM; k++) sy[k] = tx_sym_valid ? int'(tx_sym[2*k +: 2]) : -1;
    if (tx_sym_valid) begin tx_log.push_back(tx_sym); tx_beats++; end
    for (int k = 0; k < NSYM; k++) txs.push_back(sy[k]);
  end

  function automatic real lev_of(int s);
    return (s < 0) ? 0.0 : real'(s * 16 - 24);
  endfunction

  // sample n is taken at time n/2 + 0.15 symbols
  function automatic int sample_at(int n);
    real t, v;
    int k0;
    t = n / 2.0 + 0.15;
    k0 = int'($floor(t));
    v = 0;
    for (int k = k0 - 2; k <= k0 + 2; k++)
      if (k >= 0 && k < txs.size()) v += lev_of(txs[k]) * h(t - k);
    if (n % 2003 == 0) v += (n % 4006 == 0) ? 14.0 : -14.0;
    v = $floor(v + 0.5);
    if (v > 31) v = 31;
    if (v < -32) v = -32;
    return int'(v);
  endfunction

  // feed the receiver once enough symbols exist (2 symbols of look-ahead)
  int rx_beats = 0;
  always @(negedge clk) if (rst_n) begin
    if (txs.size() >= (rx_beats + 1) * NSYM + 4 + DELAY) begin
      for (int i = 0; i < NSMP; i++) begin
        int n;
        n = rx_beats * NSMP + i - DELAY;
        rx_smp[i*6 +: 6] = (n < 0) ? 6'($signed($urandom_range(4)) - 2) : 6'(sample_at(n));
      end
      rx_smp_valid = 1;
      rx_beats++;
    end else rx_smp_valid = 0;
  end

  // ---------------- checking ----------------
  int nbit [3] = '{0, 0, 0};
  int dec_err = 0, raw_err = 0, n_lock = 0, n_data = 0, n_stats = 0, n_mu = 0, n_stage = 0;
  int n_ovf = 0, n_und = 0, n_train_tx = 0;
  logic [1:0] last_stage = 0;
  logic last_lock = 0;
  int data_beat_idx = 0;

  always @(posedge clk) if (rst_n) begin
    if (rx_lock && !last_lock) n_lock++;
    last_lock = rx_lock;
    if (rx_stats_update) n_stats++;
    if (rx_mu != 0) n_mu++;
    if ($test$plusargs("dbg") && dut.u_rx.ted_v) $display("ted %0d mu %0d stage %0d", dut.u_rx.ted_err, rx_mu, rx_mu_stage);
    if (rx_mu_stage != last_stage) n_stage++;
    last_stage = rx_mu_stage;
    if (rx_overflow) n_ovf++;
    if (tx_underrun) n_und++;
    if (tx_sym_valid && tx_training) n_train_tx++;
    if (rx_data_beat) begin
      // payload beat j of the receiver is transmitted beat 1 + TRAINB + j
      logic [2*NSYM-1:0] ref_sym, got;
      ref_sym = tx_log[1 + TRAINB + data_beat_idx];
      got = dut.u_rx.u_mlse.dec;
      for (int k = 0; k < NSYM; k++) if (got[2*k +: 2] != ref_sym[2*k +: 2]) raw_err++;
      data_beat_idx++;
      n_data++;
    end
    for (int d = 0; d < 3; d++) if (rx_valid[d]) begin
      for (int i = 0; i < 96; i++) begin
        int m, b;
        m = nbit[d] / LK; b = nbit[d] % LK;
        if (m < NCW) begin
          checks++;
          if (m >= sent.size() || rx_bits[d*96 + i] !== sent[m][d*LK + b]) begin
            failures++; dec_err++;
            if (dec_err < 5 || $test$plusargs("dbg2")) $display("decoder %0d codeword %0d bit %0d wrong", d, m, b);
          end
        end
        nbit[d]++;
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin failures++; $display("mechanism never seen: %s", what); end
    $display("  %-28s %0d", what, n);
  endtask

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired: decoded bits %0d %0d %0d", nbit[0], nbit[1], nbit[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    tx_start = 1;
    @(negedge clk);
    tx_start = 0;
    wait (nbit[0] >= NCW * LK && nbit[1] >= NCW * LK && nbit[2] >= NCW * LK);
    @(negedge clk);
    $display("mechanisms:");
    need("frame lock", n_lock);
    need("training beats sent", n_train_tx);
    need("payload beats equalized", n_data);
    need("LMS step-size change", n_stage);
    need("channel statistics update", n_stats);
    need("non-zero timing correction", n_mu);
    need("raw symbol errors (corrected)", raw_err);
    need("interleaver blocks decoded", nbit[0] / (2 * LK));
    need("pattern-matcher bits", int'(ber_bits));
    checks++;
    if (ber_bits != 56'(nbit[0] + nbit[1] + nbit[2]) || ber_errs != 0) begin
      failures++; $display("pattern matcher: bits %0d errors %0d, expected %0d bits", ber_bits, ber_errs, nbit[0] + nbit[1] + nbit[2]);
    end
    checks++;
    if (n_refused != 0) begin failures++; $display("external payload accepted in PRBS mode"); end
    checks++;
    if (n_ovf != 0 || n_und != 0) begin failures++; $display("overflow %0d underrun %0d", n_ovf, n_und); end
    $display("final mu %0d, decoded errors %0d", rx_mu, dec_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
