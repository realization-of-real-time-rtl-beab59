// tb_dfe: checks the equalizer on an ISI channel.
// The testbench builds a T/2-sampled signal of random PAM-4 symbols with a
// termination symbol (0) closing every 32-symbol block: centre samples
// 0.7*L(a_k) + 0.2*L(a_{k-1}) and half-way samples 0.45*(L(a_k)+L(a_{k+1})),
// levels L = -48, -16, 16, 48.  Without equalization a plain slicer on the
// centre samples makes errors (checked).  The DFE first trains on the known
// symbols, then runs decision directed; over the last beats every decision
// must equal the transmitted symbol and the FFE output must be within 12 of
// the level of a_k + the residual FBE term.  The step-size stage must pass
// through all four values, with the switch points scaled down here.
module tb_dfe;
  localparam int NS = 128, NTAP = 25, WIN = 2*NS + NTAP - 1;
  localparam int TRAIN = 700, DD = 100;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic in_valid = 0, train = 0, out_valid;
  logic [WIN*7-1:0] in_smp;
  logic [2*NS-1:0] train_sym, dec;
  logic [NS*7-1:0] ffe_out;
  logic [1:0] mu_stage;

  dfe #(.MU_T1(200), .MU_T2(400), .MU_T3(600)) dut (.clk, .rst_n, .in_valid, .in_smp, .train, .train_sym,
    .out_valid, .ffe_out, .dec, .mu_stage);

  function automatic int lev(int s); return s * 32 - 48; endfunction

  int sy [(TRAIN+DD+2)*NS];
  int raw_err = 0, dd_err = 0, seen_stage = 0;

  function automatic int smp(int n);   // sample n of the T/2 stream
    int k;
    real v;
    if (n < 0) return 0;
    k = n / 2;
    if (n % 2 == 0) v = 0.7 * lev(sy[k]) + ((k > 0) ? 0.2 * lev(sy[k-1]) : 0.0);
    else            v = 0.45 * (lev(sy[k]) + lev(sy[k+1]));
    return int'($floor(v + 0.5));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < (TRAIN+DD+2)*NS; k++) sy[k] = (k % 32 == 31) ? 0 : $urandom_range(3);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < TRAIN + DD; b++) begin
      for (int j = 0; j < WIN; j++) in_smp[j*7 +: 7] = 7'(smp(b*2*NS - 12 + j));
      for (int k = 0; k < NS; k++) train_sym[2*k +: 2] = 2'(sy[b*NS + k]);
      train = (b < TRAIN);
      in_valid = 1;
      @(negedge clk);
      seen_stage |= 1 << mu_stage;
      if (b >= TRAIN) begin
        for (int k = 0; k < NS; k++) begin
          int r;
          r = smp(b*2*NS + 2*k);
          if (r < -32 ? sy[b*NS+k] != 0 : r < 0 ? sy[b*NS+k] != 1 : r < 32 ? sy[b*NS+k] != 2 : sy[b*NS+k] != 3)
            raw_err++;
          if (b >= TRAIN + DD/2) begin
            checks++;
            if (dec[2*k +: 2] !== 2'(sy[b*NS + k])) begin
              dd_err++; failures++;
              if (dd_err < 5) $display("beat %0d symbol %0d: %0d expected %0d", b, k, dec[2*k +: 2], sy[b*NS+k]);
            end
          end
        end
      end
    end
    in_valid = 0;
    checks++;
    if (raw_err == 0) begin failures++; $display("channel too easy: no raw slicer errors"); end
    checks++;
    if (seen_stage != 4'hF) begin failures++; $display("step-size stages seen %b", seen_stage); end
    $display("raw slicer errors %0d, DFE errors %0d", raw_err, dd_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
